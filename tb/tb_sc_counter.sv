// tb_sc_counter: self-checking testbench for sc_counter.
// Drives random bits, keeps its own count and checks `count` every cycle,
// including the zero-latency add of the current bit, the restart after
// `clear` and a full 65535-bit window of ones (no overflow).
module tb_sc_counter;
  logic        clk = 1'b0;
  logic        rst_n, clear, bit_in;
  logic [15:0] count;
  int checks = 0, failures = 0;
  int unsigned ref_acc;

  sc_counter #(.W(16)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s: count=%0d ref=%0d", what, count, ref_acc);
    end
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; clear = 1'b0; bit_in = 1'b0;
    @(negedge clk); @(negedge clk);
    rst_n = 1'b1;
    ref_acc = 0;
    for (int i = 0; i < 5000; i++) begin
      bit_in = 1'($urandom_range(1));
      clear  = ($urandom_range(99) == 0);
      #1;
      check(count == 16'(ref_acc + bit_in), "random count");
      ref_acc = clear ? 0 : ref_acc + bit_in;
      @(negedge clk);
    end
    clear = 1'b1; @(negedge clk); clear = 1'b0;
    bit_in = 1'b1;
    for (int i = 0; i < 65534; i++) @(negedge clk);
    #1;
    check(count == 16'd65535, "full window of ones");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
