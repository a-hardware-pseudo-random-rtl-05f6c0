// sc_logistic_prng: pseudo-random number generator built on an enhanced
// logistic map whose arithmetic is done by stochastic computing.
//
// Map: x_{n+1} = 4 x_n (1 - x_n) - d x_n (1 - x_n),  d_{n+1} = x_{n+1} / 4.
// This is the logistic map r x (1 - x) with r = 4 - d; writing it with d
// keeps every operand in [0, 1]. Feeding a quarter of each output back as the
// next d perturbs the control parameter, which keeps a finite-precision
// implementation from falling into short cycles.
//
// Datapath, one iteration per LFSR period (2^W - 1 cycles):
//   SNG_x1 converts NOT(x_n) = 1 - x_n, SNG_x converts x_n, SNG_u converts d.
//   Multiplier 1 = SNG_x1 & SNG_x       -> stream of x (1 - x)
//   Multiplier 2 = Multiplier 1 & SNG_u -> stream of d x (1 - x)
//   Counter 2 counts Multiplier 1, Counter 1 counts Multiplier 2.
//   On the last cycle of the period elm_update forms x_{n+1} and d_{n+1},
//   the Register takes x_{n+1}, the d register takes d_{n+1}, the counters
//   clear and each SNG steps its seed by one and restarts its LFSR.
//
// Alongside, and not connected to the PRNG, are the scaled stochastic adder
// and subtractor (sca_*, scs_*), the other two basic stochastic elements.
//
// Ports: clk, rst_n (synchronous, active low), init (load x0, d0 and the
// seeds and start an iteration), x0, d0, seed_x1, seed_x, seed_u, x_out (x_n),
// d_out (d_n), valid (one-cycle pulse, high in the first cycle that shows a
// new x_out).
// Timing: after init in cycle t, valid is high in cycles t + k (2^W - 1) + 1,
// k = 1, 2, ...; the rate is f_clk / (2^W - 1), 1.53 kHz at 100 MHz.
//
// The structure, the 16-bit precision and the d = x/4 feedback follow the
// published design. The LFSR polynomials and seeds, the control interface,
// the saturation in elm_update and the single-clock timing are this design's
// choices.
module sc_logistic_prng #(
  parameter int unsigned  W       = prng_pkg::W,
  parameter logic [W-1:0] TAPS_X1 = W'(prng_pkg::TAPS_X1),
  parameter logic [W-1:0] TAPS_X  = W'(prng_pkg::TAPS_X),
  parameter logic [W-1:0] TAPS_U  = W'(prng_pkg::TAPS_U)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         init,
  input  logic [W-1:0] x0,
  input  logic [W-1:0] d0,
  input  logic [W-1:0] seed_x1,
  input  logic [W-1:0] seed_x,
  input  logic [W-1:0] seed_u,
  output logic [W-1:0] x_out,
  output logic [W-1:0] d_out,
  output logic         valid,
  // stand-alone scaled stochastic adder
  input  logic         sca_a,
  input  logic         sca_b,
  input  logic         sca_sel,
  output logic         sca_y,
  // stand-alone scaled stochastic subtractor
  input  logic         scs_a,
  input  logic         scs_b,
  input  logic         scs_sel,
  output logic         scs_y
);

  logic         period_end;
  logic [W-1:0] x_n, d_n, x_inv;
  logic         s_x1, s_x, s_u;
  logic         p_xx, p_dxx;
  logic [W-1:0] cnt_xx, cnt_dxx;
  logic [W-1:0] x_next, d_next;
  logic [W-1:0] seed_x1_q, seed_x_q, seed_u_q;
  logic         clear;

  assign clear = init | period_end;

  iter_ctrl #(.W(W)) u_ctrl (
    .clk(clk), .rst_n(rst_n), .init(init), .period_end(period_end)
  );

  // NOT gate ahead of SNG_x1: 1 - x_n
  assign x_inv = ~x_n;

  sng #(.W(W), .TAPS(TAPS_X1)) u_sng_x1 (
    .clk(clk), .rst_n(rst_n), .init(init), .seed_init(seed_x1),
    .period_end(period_end), .x(x_inv), .bit_out(s_x1), .seed(seed_x1_q)
  );

  sng #(.W(W), .TAPS(TAPS_X)) u_sng_x (
    .clk(clk), .rst_n(rst_n), .init(init), .seed_init(seed_x),
    .period_end(period_end), .x(x_n), .bit_out(s_x), .seed(seed_x_q)
  );

  sng #(.W(W), .TAPS(TAPS_U)) u_sng_u (
    .clk(clk), .rst_n(rst_n), .init(init), .seed_init(seed_u),
    .period_end(period_end), .x(d_n), .bit_out(s_u), .seed(seed_u_q)
  );

  sc_mul u_mul1 (.a(s_x1), .b(s_x), .y(p_xx));
  sc_mul u_mul2 (.a(p_xx), .b(s_u), .y(p_dxx));

  sc_counter #(.W(W)) u_cnt2 (
    .clk(clk), .rst_n(rst_n), .clear(clear), .bit_in(p_xx), .count(cnt_xx)
  );

  sc_counter #(.W(W)) u_cnt1 (
    .clk(clk), .rst_n(rst_n), .clear(clear), .bit_in(p_dxx), .count(cnt_dxx)
  );

  elm_update #(.W(W)) u_update (
    .cnt_xx(cnt_xx), .cnt_dxx(cnt_dxx), .x_next(x_next), .d_next(d_next)
  );

  // Register (x_n) and control-parameter register (d_n)
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      x_n   <= '0;
      d_n   <= '0;
      valid <= 1'b0;
    end else if (init) begin
      x_n   <= x0;
      d_n   <= d0;
      valid <= 1'b0;
    end else begin
      if (period_end) begin
        x_n <= x_next;
        d_n <= d_next;
      end
      valid <= period_end;
    end
  end

  assign x_out = x_n;
  assign d_out = d_n;

  // The three seed counters advance together, one step per period.
  a_seeds_step: assert property (@(posedge clk) disable iff (!rst_n)
    (period_end && !init) |=> (seed_x1_q != $past(seed_x1_q)) &&
                              (seed_x_q  != $past(seed_x_q))  &&
                              (seed_u_q  != $past(seed_u_q)));

  // Counter 1 counts a sub-stream of Counter 2's stream, which is what keeps
  // the subtraction in elm_update from going negative.
  a_sub_stream: assert property (@(posedge clk) disable iff (!rst_n)
    cnt_dxx <= cnt_xx);

  sc_add u_sca (.a(sca_a), .b(sca_b), .sel(sca_sel), .y(sca_y));
  sc_sub u_scs (.a(scs_a), .b(scs_b), .sel(scs_sel), .y(scs_y));

endmodule
