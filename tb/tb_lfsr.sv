// tb_lfsr: self-checking testbench for lfsr.
// Checks the state sequence against a reference step computed from the tap
// positions (16, 15, 13, 4) written out one by one, that the period is exactly
// 2^16 - 1 with every nonzero value visited once, that a load takes effect,
// and that a zero seed is replaced by 1.
module tb_lfsr;
  logic        clk = 1'b0;
  logic        rst_n, load;
  logic [15:0] seed, state;
  int checks = 0, failures = 0;

  lfsr #(.W(16), .TAPS(16'hD008)) dut (.*);

  always #5 clk = ~clk;

  function automatic logic [15:0] ref_step(logic [15:0] s);
    logic fb;
    fb = s[15] ^ s[14] ^ s[12] ^ s[3];
    return {s[14:0], fb};
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s: state=%h", what, state);
    end
  endtask

  initial begin : watchdog
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit seen [65536];
  logic [15:0] expect_s;
  int mismatches;

  initial begin
    rst_n = 1'b0; load = 1'b0; seed = '0;
    @(negedge clk); @(negedge clk);
    check(state == 16'h0001, "reset value");
    rst_n = 1'b1;
    // load a seed
    seed = 16'hACE1; load = 1'b1;
    @(negedge clk);
    load = 1'b0;
    check(state == 16'hACE1, "load");
    // walk one full period
    expect_s = 16'hACE1;
    mismatches = 0;
    for (int i = 0; i < 65535; i++) begin
      if (state != expect_s) mismatches++;
      if (seen[state]) mismatches++;
      seen[state] = 1'b1;
      expect_s = ref_step(expect_s);
      @(negedge clk);
    end
    check(mismatches == 0, "sequence matches reference and never repeats");
    check(state == 16'hACE1, "period is 65535");
    check(!seen[0], "zero never visited");
    // zero seed
    seed = 16'h0000; load = 1'b1;
    @(negedge clk);
    load = 1'b0;
    check(state == 16'h0001, "zero seed replaced by 1");
    @(negedge clk);
    check(state == 16'h0002, "step from 1");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
