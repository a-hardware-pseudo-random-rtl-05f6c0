// tb_sng: self-checking testbench for sng.
// Drives period_end every 65535 cycles and compares bit_out in every cycle
// with a reference LFSR (taps 16, 15, 13, 4) compared against x, restarting
// from seed + 1 at each period end. Also checks the one-count of a period
// (x - 1 for x >= 1, the exact unipolar value), the seed counter, and the
// wrap of the seed from FFFF to 0001.
module tb_sng;
  import prng_ref_pkg::*;

  logic        clk = 1'b0;
  logic        rst_n, init, period_end, bit_out;
  logic [15:0] seed_init, x, seed;
  int checks = 0, failures = 0;

  sng #(.W(16), .TAPS(16'hD008)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // One period with value xv; the model starts at model_seed.
  task automatic run_period(logic [15:0] xv, logic [15:0] model_seed);
    logic [15:0] m;
    int ones, bad;
    x = xv; m = model_seed; ones = 0; bad = 0;
    for (int i = 0; i < 65535; i++) begin
      period_end = (i == 65534);
      #1;
      if (bit_out != (m < xv)) bad++;
      ones += int'(bit_out);
      m = lfsr_next(m, TAPS_X);
      @(negedge clk);
    end
    period_end = 1'b0;
    check(bad == 0, $sformatf("bit stream for x=%h (%0d mismatches)", xv, bad));
    check(ones == ((xv == 0) ? 0 : xv - 1), $sformatf("one-count %0d for x=%h", ones, xv));
  endtask

  initial begin
    rst_n = 1'b0; init = 1'b0; period_end = 1'b0; seed_init = 16'h1234; x = '0;
    @(negedge clk); @(negedge clk);
    rst_n = 1'b1;
    init = 1'b1; @(negedge clk); init = 1'b0;
    check(seed == 16'h1234, "seed loaded");
    run_period(16'h4000, 16'h1234);
    check(seed == 16'h1235, "seed + 1 after one period");
    run_period(16'hC001, 16'h1235);
    check(seed == 16'h1236, "seed + 1 after two periods");
    run_period(16'h0000, 16'h1236);
    // seed wrap: FFFF -> 0001
    seed_init = 16'hFFFF;
    init = 1'b1; @(negedge clk); init = 1'b0;
    period_end = 1'b1; @(negedge clk); period_end = 1'b0;
    check(seed == 16'h0001, "seed wraps to 1");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
