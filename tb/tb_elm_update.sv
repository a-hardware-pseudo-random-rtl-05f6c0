// tb_elm_update: self-checking testbench for elm_update.
// Compares x_next and d_next with min(4*cnt_xx - cnt_dxx, 65535) and
// x_next / 4, computed with integers, for edge cases (saturation at 1.0,
// zero) and random legal inputs (cnt_dxx <= cnt_xx, as in the PRNG).
module tb_elm_update;
  logic [15:0] cnt_xx, cnt_dxx, x_next, d_next;
  int checks = 0, failures = 0;
  int saturated = 0;

  elm_update #(.W(16)) dut (.*);

  task automatic apply(int xx, int dxx);
    int e;
    cnt_xx = 16'(xx); cnt_dxx = 16'(dxx);
    #1;
    e = 4 * xx - dxx;
    if (e > 65535) begin e = 65535; saturated++; end
    checks++;
    if (x_next != 16'(e) || d_next != 16'(e / 4)) begin
      failures++;
      if (failures < 10)
        $display("FAIL xx=%0d dxx=%0d: x=%0d d=%0d expected %0d %0d",
                 xx, dxx, x_next, d_next, e, e / 4);
    end
  endtask

  initial begin : watchdog
    #10ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int xx;
    apply(0, 0);
    apply(12288, 0);        // 4 * 0.1875 = 0.75
    apply(16384, 0);        // 1.0 saturates
    apply(16384, 4000);     // 1.0 - 0.06
    apply(16383, 0);
    apply(65535, 65535);
    apply(12235, 2315);
    for (int i = 0; i < 20000; i++) begin
      xx = $urandom_range(20000);
      apply(xx, $urandom_range(xx));
    end
    checks++;
    if (saturated < 2) begin failures++; $display("FAIL saturation never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
