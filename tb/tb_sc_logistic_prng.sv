// tb_sc_logistic_prng: end-to-end testbench of the PRNG at its default
// (16-bit) size.
// Each iteration's x_out and d_out are compared with prng_ref_pkg, which
// recomputes the whole iteration bit by bit. The time from init to each valid
// pulse is checked against one LFSR period (65535 cycles) per iteration.
// Mechanisms counted, each of which must occur at least once:
//   iterations       - valid pulses compared with the model
//   d_feedback       - iterations whose d x (1 - x) count was nonzero, i.e.
//                      the perturbed control parameter changed the result
//   seed_step        - iterations where stepping the seeds changed x'
//                      (the model rerun with the old seeds gives another value)
//   saturation       - 4 x (1 - x) - d x (1 - x) reached 1.0 and was clipped
//   reinit           - a second init in mid-run restarted the map
// The stand-alone stochastic adder and subtractor ports are driven with
// random bits and checked too.
module tb_sc_logistic_prng;
  import prng_ref_pkg::*;

  logic        clk = 1'b0;
  logic        rst_n, init;
  logic [15:0] x0, d0, seed_x1, seed_x, seed_u, x_out, d_out;
  logic        valid;
  logic        sca_a, sca_b, sca_sel, sca_y, scs_a, scs_b, scs_sel, scs_y;

  localparam int N_MAIN = 100;   // iterations of the main run

  int checks = 0, failures = 0;
  int n_iter = 0, n_dfb = 0, n_seed = 0, n_sat = 0, n_reinit = 0;
  longint cycle = 0;

  sc_logistic_prng dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  initial begin : watchdog
    repeat ((N_MAIN + 20) * 65535) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // combinational side blocks
  initial begin
    repeat (2000) begin
      @(negedge clk);
      {sca_a, sca_b, sca_sel, scs_a, scs_b, scs_sel} = 6'($urandom);
      #1;
      check(sca_y == (sca_sel ? sca_a : sca_b), "stochastic adder");
      check(scs_y == (scs_sel ? scs_a : !scs_b), "stochastic subtractor");
    end
  end

  task automatic start(logic [15:0] x, logic [15:0] d,
                       logic [15:0] s1, logic [15:0] s2, logic [15:0] s3,
                       ref state_t st, output longint t0);
    x0 = x; d0 = d; seed_x1 = s1; seed_x = s2; seed_u = s3;
    init = 1'b1;
    @(posedge clk);
    t0 = cycle;
    @(negedge clk);
    init = 1'b0;
    st.x = x; st.d = d; st.seed_x1 = s1; st.seed_x = s2; st.seed_u = s3;
    check(x_out == x && d_out == d, "init loads x0 and d0");
  endtask

  task automatic run(int iters, ref state_t st, input longint t0);
    for (int k = 1; k <= iters; k++) begin
      iterate(st);
      @(posedge clk iff valid);
      check(cycle - t0 == longint'(k) * 65535 + 1,
            $sformatf("valid at cycle %0d after init, expected %0d", cycle - t0, k * 65535 + 1));
      #1;
      check(x_out == st.x && d_out == st.d,
            $sformatf("iteration %0d: x=%h d=%h, model x=%h d=%h", k, x_out, d_out, st.x, st.d));
      n_iter++;
      if (st.c1 != 0) n_dfb++;
      if (st.saturated) n_sat++;
    end
  endtask

  initial begin
    state_t st, nostep;
    longint t0;
    rst_n = 1'b0; init = 1'b0;
    x0 = '0; d0 = '0; seed_x1 = '0; seed_x = '0; seed_u = '0;
    @(negedge clk); @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);

    // Main run: x0 = 0.25, d0 = 0.
    start(16'h4000, 16'h0000, 16'h1234, 16'hACE1, 16'h5A5A, st, t0);
    run(N_MAIN, st, t0);

    // Seed perturbation: the next iteration uses seeds + N_MAIN.
    // Recompute it from the same x and d with the original seeds.
    begin
      state_t a, b;
      a = st; b = st;
      b.seed_x1 = 16'h1234; b.seed_x = 16'hACE1; b.seed_u = 16'h5A5A;
      iterate(a); iterate(b);
      if (a.x != b.x) n_seed++;
      @(posedge clk iff valid);
      #1;
      check(x_out == a.x && d_out == a.d, "next iteration uses stepped seeds");
      n_iter++;
      if (a.c1 != 0) n_dfb++;
    end

    // Restart mid-period near x = 0.5, where 4 x (1 - x) clips at 1.0.
    repeat (1000) @(negedge clk);
    start(16'h8100, 16'h0000, 16'h0001, 16'h0002, 16'h0003, st, t0);
    n_reinit++;
    run(2, st, t0);

    // Small nonzero initial d (0.00012, about 8 / 2^16).
    start(16'h4000, 16'h0008, 16'h1234, 16'hACE1, 16'h5A5A, st, t0);
    n_reinit++;
    run(2, st, t0);

    $display("mechanisms: iterations=%0d d_feedback=%0d seed_step=%0d saturation=%0d reinit=%0d",
             n_iter, n_dfb, n_seed, n_sat, n_reinit);
    check(n_iter > 0, "iterations happened");
    check(n_dfb > 0, "d feedback happened");
    check(n_seed > 0, "seed step changed a result");
    check(n_sat > 0, "saturation happened");
    check(n_reinit > 0, "re-init happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
