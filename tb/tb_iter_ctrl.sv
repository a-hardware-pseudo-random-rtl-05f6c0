// tb_iter_ctrl: self-checking testbench for iter_ctrl.
// Checks that period_end comes exactly 65535 cycles after init and then every
// 65535 cycles, for one cycle each time, and that a second init restarts it.
module tb_iter_ctrl;
  logic clk = 1'b0;
  logic rst_n, init, period_end;
  int checks = 0, failures = 0;

  iter_ctrl #(.W(16)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // called in a period_end cycle: cycles to the next period_end, and checks
  // that the pulse lasts one cycle
  task automatic measure(output int n);
    n = 0;
    do begin
      @(negedge clk); n++;
      if (n == 1) check(!period_end, "one-cycle pulse");
    end while (!period_end && n < 200000);
  endtask

  initial begin
    int n, highs;
    rst_n = 1'b0; init = 1'b0;
    @(negedge clk); @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    init = 1'b1; @(negedge clk); init = 1'b0;
    n = 1; highs = 0;
    while (!period_end) begin @(negedge clk); n++; end
    check(n == 65535, $sformatf("first period_end after %0d cycles", n));
    measure(n); check(n == 65535, $sformatf("second period %0d", n));
    measure(n); check(n == 65535, $sformatf("third period %0d", n));
    // restart in the middle of a period
    repeat (1000) @(negedge clk);
    init = 1'b1; @(negedge clk); init = 1'b0;
    n = 1;
    while (!period_end) begin @(negedge clk); n++; end
    check(n == 65535, $sformatf("period after re-init %0d", n));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
