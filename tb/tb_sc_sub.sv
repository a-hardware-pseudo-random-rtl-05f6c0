// tb_sc_sub: self-checking testbench for sc_sub.
// Exhaustive truth table (select 1 passes a, select 0 passes NOT b) and a
// random-stream run whose output density must be close to
// 0.5 + (P(a) - P(b)) / 2.
module tb_sc_sub;
  logic a, b, sel, y;
  int checks = 0, failures = 0;

  sc_sub dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin : watchdog
    #10ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ones, n;
    for (int i = 0; i < 8; i++) begin
      {sel, a, b} = 3'(i); #1;
      check(y == (sel ? a : !b), "truth table");
    end
    ones = 0; n = 100000;
    for (int i = 0; i < n; i++) begin
      a   = ($urandom_range(999) < 700);   // 0.7
      b   = ($urandom_range(999) < 300);   // 0.3
      sel = ($urandom_range(999) < 500);   // 0.5
      #1; ones += int'(y);
    end
    // 0.5 + (0.7 - 0.3) / 2 = 0.7
    check(ones > 69000 && ones < 71000, "density 0.7");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
