// tb_workload_sensitivity: initial-value sensitivity of the PRNG.
// Five generators run side by side for 100 iterations:
//   A: x0 = 0.25 (4000h),      d0 = 0,             seed set 1
//   B: x0 = 0.250015 (4001h),  d0 = 0,             seed set 1
//   E: x0 = 0.25,              d0 = 0,             seed set 2
//   C: x0 = 0.25,              d0 = 0.00012 (8h),  seed set 2
//   D: identical to A, to show the generator is deterministic
// Seed set 1 is 1234h, ACE1h, 5A5Ah; set 2 is 1111h, 2222h, 3333h.
// B is compared with A, C with E. Because the counters count exactly, a
// one-LSB change of x0 moves each SNG stream by a single bit, and a change
// of d0 by 8 / 2^16 moves the first d x (1 - x) count by about one bit on
// average; whether that bit lands on a coincident one depends on the seeds.
// With seed set 2 the x0 change has no effect, and with seed set 1 the d0
// change has none, so each comparison uses the set where it shows.
// Checks: D tracks A exactly; B and C first differ from their references
// within 10 iterations; over the last 80 iterations their mean distance
// exceeds 0.15 (two independent uniform values are 1/3 apart on average);
// no trajectory ever reaches 0.
module tb_workload_sensitivity;
  localparam int N = 100;

  logic clk = 1'b0;
  logic rst_n, init;
  logic [15:0] xa, xb, xc, xd, xe, da, db, dc, dd, de;
  logic va, vb, vc, vd, ve;
  logic unused_y [10];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  // Generators with seeds 1234h, ACE1h, 5A5Ah (set 1) or 1111h, 2222h,
  // 3333h (set 2).
  sc_logistic_prng ua (.clk, .rst_n, .init, .x0(16'h4000), .d0(16'h0000),
    .seed_x1(16'h1234), .seed_x(16'hACE1), .seed_u(16'h5A5A),
    .x_out(xa), .d_out(da), .valid(va),
    .sca_a(1'b0), .sca_b(1'b0), .sca_sel(1'b0), .sca_y(unused_y[0]),
    .scs_a(1'b0), .scs_b(1'b0), .scs_sel(1'b0), .scs_y(unused_y[1]));
  sc_logistic_prng ub (.clk, .rst_n, .init, .x0(16'h4001), .d0(16'h0000),
    .seed_x1(16'h1234), .seed_x(16'hACE1), .seed_u(16'h5A5A),
    .x_out(xb), .d_out(db), .valid(vb),
    .sca_a(1'b0), .sca_b(1'b0), .sca_sel(1'b0), .sca_y(unused_y[2]),
    .scs_a(1'b0), .scs_b(1'b0), .scs_sel(1'b0), .scs_y(unused_y[3]));
  sc_logistic_prng ue (.clk, .rst_n, .init, .x0(16'h4000), .d0(16'h0000),
    .seed_x1(16'h1111), .seed_x(16'h2222), .seed_u(16'h3333),
    .x_out(xe), .d_out(de), .valid(ve),
    .sca_a(1'b0), .sca_b(1'b0), .sca_sel(1'b0), .sca_y(unused_y[8]),
    .scs_a(1'b0), .scs_b(1'b0), .scs_sel(1'b0), .scs_y(unused_y[9]));
  sc_logistic_prng uc (.clk, .rst_n, .init, .x0(16'h4000), .d0(16'h0008),
    .seed_x1(16'h1111), .seed_x(16'h2222), .seed_u(16'h3333),
    .x_out(xc), .d_out(dc), .valid(vc),
    .sca_a(1'b0), .sca_b(1'b0), .sca_sel(1'b0), .sca_y(unused_y[4]),
    .scs_a(1'b0), .scs_b(1'b0), .scs_sel(1'b0), .scs_y(unused_y[5]));
  sc_logistic_prng ud (.clk, .rst_n, .init, .x0(16'h4000), .d0(16'h0000),
    .seed_x1(16'h1234), .seed_x(16'hACE1), .seed_u(16'h5A5A),
    .x_out(xd), .d_out(dd), .valid(vd),
    .sca_a(1'b0), .sca_b(1'b0), .sca_sel(1'b0), .sca_y(unused_y[6]),
    .scs_a(1'b0), .scs_b(1'b0), .scs_sel(1'b0), .scs_y(unused_y[7]));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin : watchdog
    repeat ((N + 5) * 65535) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int first_b = -1, first_c = -1, zero_hits = 0, same_d = 1;
    real sum_b = 0.0, sum_c = 0.0;
    rst_n = 1'b0; init = 1'b0;
    @(negedge clk); @(negedge clk);
    rst_n = 1'b1;
    init = 1'b1; @(negedge clk); init = 1'b0;
    for (int k = 1; k <= N; k++) begin
      do @(negedge clk); while (!va);
      check(vb && vc && vd && ve, "all generators in step");
      if (xd != xa || dd != da) same_d = 0;
      if (first_b < 0 && xb != xa) first_b = k;
      if (first_c < 0 && xc != xe) first_c = k;
      if (xa == 0 || xb == 0 || xc == 0 || xe == 0) zero_hits++;
      if (k > N - 80) begin
        sum_b += (xb > xa) ? real'(xb - xa) : real'(xa - xb);
        sum_c += (xc > xe) ? real'(xc - xe) : real'(xe - xc);
      end
    end
    sum_b = sum_b / 80.0 / 65536.0;
    sum_c = sum_c / 80.0 / 65536.0;
    $display("x0 +1 LSB: first difference at iteration %0d, mean distance %f", first_b, sum_b);
    $display("d0 = 8  : first difference at iteration %0d, mean distance %f", first_c, sum_c);
    check(same_d == 1, "same inputs give the same sequence");
    check(first_b > 0 && first_b <= 10, "x0 change shows within 10 iterations");
    check(first_c > 0 && first_c <= 10, "d0 change shows within 10 iterations");
    check(sum_b > 0.15, "x0 trajectories decorrelate");
    check(sum_c > 0.15, "d0 trajectories decorrelate");
    check(zero_hits == 0, "no trajectory reaches 0");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
