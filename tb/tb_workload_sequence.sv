// tb_workload_sequence: a long run of the PRNG from x0 = 0.25, d0 = 0,
// standing in for the long-sequence evaluations (attractor, histogram,
// autocorrelation). Collects N consecutive outputs and checks:
//   - no short cycle: at least 90% of the outputs are distinct;
//   - spread: every one of 16 equal hist of [0, 1) is hit;
//   - d always equals x / 4;
//   - the lag-1 autocorrelation is reported, not checked (a one-dimensional
//     map is strongly correlated with its own previous value);
//   - no output is 0 (0 is a fixed point of the map);
//   - outputs arrive every 65535 cycles.
module tb_workload_sequence;
  localparam int N = 2000;

  logic clk = 1'b0;
  logic rst_n, init, valid, sca_y, scs_y;
  logic [15:0] x_out, d_out;
  int checks = 0, failures = 0;
  longint cycle = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  sc_logistic_prng dut (.clk, .rst_n, .init, .x0(16'h4000), .d0(16'h0000),
    .seed_x1(16'h1234), .seed_x(16'hACE1), .seed_u(16'h5A5A),
    .x_out, .d_out, .valid,
    .sca_a(1'b0), .sca_b(1'b0), .sca_sel(1'b0), .sca_y,
    .scs_a(1'b0), .scs_b(1'b0), .scs_sel(1'b0), .scs_y);

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
    bit seen [65536];
    int hist [16];
    int distinct = 0, zeros = 0, bad_d = 0, bad_t = 0, empty = 0;
    longint last;
    real m = 0.0, num = 0.0, den = 0.0, prev;
    real xs [N];
    rst_n = 1'b0; init = 1'b0;
    @(negedge clk); @(negedge clk);
    rst_n = 1'b1;
    init = 1'b1; @(posedge clk); last = cycle; @(negedge clk); init = 1'b0;
    for (int k = 0; k < N; k++) begin
      @(posedge clk iff valid);
      if (cycle - last != 65535 + ((k == 0) ? 1 : 0)) bad_t++;
      last = cycle;
      #1;
      if (!seen[x_out]) distinct++;
      seen[x_out] = 1'b1;
      hist[x_out[15:12]]++;
      if (x_out == 0) zeros++;
      if (d_out != {2'b00, x_out[15:2]}) bad_d++;
      xs[k] = real'(x_out) / 65536.0;
      m += xs[k];
    end
    m = m / N;
    for (int k = 0; k < N; k++) den += (xs[k] - m) * (xs[k] - m);
    for (int k = 1; k < N; k++) num += (xs[k] - m) * (xs[k - 1] - m);
    foreach (hist[i]) if (i > 0 && hist[i] == 0) empty++;
    $display("distinct=%0d of %0d, mean=%f, lag-1 autocorrelation=%f", distinct, N, m, num / den);
    $write("histogram:");
    foreach (hist[i]) $write(" %0d", hist[i]);
    $write("\n");
    check(bad_t == 0, "one output per 65535 cycles");
    check(distinct >= N * 9 / 10, "no short cycle");
    check(empty == 0, "bins 1 to 15 hit");
    check(bad_d == 0, "d = x / 4");
    check(zeros == 0, "never stuck at 0");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
