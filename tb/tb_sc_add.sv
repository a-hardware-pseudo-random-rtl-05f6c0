// tb_sc_add: self-checking testbench for sc_add.
// Exhaustive truth table, the 8-bit example 11111011 (7/8) + 00100110 (3/8)
// with select 10010101 -> 10110011 (5/8), and a random-stream run whose output
// density must be close to (P(a) + P(b)) / 2.
module tb_sc_add;
  logic a, b, sel, y;
  int checks = 0, failures = 0;

  sc_add dut (.*);

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
    logic [7:0] x1, x2, s, yy;
    int ones, n;
    for (int i = 0; i < 8; i++) begin
      {sel, a, b} = 3'(i); #1;
      check(y == (sel ? a : b), "truth table");
    end
    x1 = 8'b11111011; x2 = 8'b00100110; s = 8'b10010101;
    for (int i = 7; i >= 0; i--) begin
      a = x1[i]; b = x2[i]; sel = s[i]; #1; yy[i] = y;
    end
    check(yy == 8'b10110011, "8-bit example");
    ones = 0; n = 100000;
    for (int i = 0; i < n; i++) begin
      a   = ($urandom_range(999) < 800);   // 0.8
      b   = ($urandom_range(999) < 200);   // 0.2
      sel = ($urandom_range(999) < 500);   // 0.5
      #1; ones += int'(y);
    end
    check(ones > 49000 && ones < 51000, "density 0.5");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
