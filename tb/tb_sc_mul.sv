// tb_sc_mul: self-checking testbench for sc_mul.
// Exhaustive truth table, the 8-bit example 10100110 x 01111110 = 00100110
// (4/8 x 6/8 -> 3/8), and a long run with independent random streams whose
// product density must be close to the product of the densities.
module tb_sc_mul;
  logic a, b, y;
  int checks = 0, failures = 0;

  sc_mul dut (.*);

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
    logic [7:0] x1, x2, yy;
    int ones, n;
    for (int i = 0; i < 4; i++) begin
      {a, b} = 2'(i); #1;
      check(y == (i == 3), "truth table");
    end
    x1 = 8'b10100110; x2 = 8'b01111110;
    for (int i = 7; i >= 0; i--) begin
      a = x1[i]; b = x2[i]; #1; yy[i] = y;
    end
    check(yy == 8'b00100110, "8-bit example");
    ones = 0; n = 100000;
    for (int i = 0; i < n; i++) begin
      a = ($urandom_range(999) < 600);   // 0.6
      b = ($urandom_range(999) < 300);   // 0.3
      #1; ones += int'(y);
    end
    check(ones > 17000 && ones < 19000, "density 0.18");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
