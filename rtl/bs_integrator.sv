// bs_integrator - one Bulirsch-Stoer step of a neuron over the interval H.
//
// For rows i = 0 .. ROWS-1 the modified-midpoint unit integrates the state
// (membrane potential and weights) from the same start values with
// nstep = 2(i+1) substeps of h = H/nstep, and the extrapolation unit folds
// each result into the tableau; the last extrapolated value is the new state.
// The interval is not re-adjusted and no error estimate is taken: profiling
// of the model showed one interval per step and two substep divisions per
// interval on average, so ROWS defaults to 2 (up to 8 are supported).
//
// h = H/nstep is formed as H times a 0.24 reciprocal of nstep (this design's
// choice, no divider): exact for the power-of-two step counts and within one
// 14.18 LSB otherwise for intervals below 64 time units.
// The units are chained without idle clocks: the extrapolation starts in the
// clock the midpoint unit reports done and vice versa, so
//   T = sum_{i<ROWS} ( T_MMID(i) + T_PZEXTR(i) )      clocks from start to done.
// Interface: pulse start with the operands; they are sampled then. y_a/y_w
// are valid from the done pulse until the next start.
module bs_integrator
  import see_pkg::*;
#(
  parameter int unsigned NW   = NMAX,
  parameter int unsigned ROWS = 2
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [3:0]    n,
  input  time_t         h_int,      // interval H
  input  model_t        y0_a,
  input  model_t        y0_w [NW],
  input  logic [NW-1:0] xl,
  input  logic          x_k,
  input  model_t        i_k,
  input  model_t        gamma,
  input  model_t        mu,
  input  model_t        theta,
  output logic          busy,
  output logic          done,
  output model_t        y_a,
  output model_t        y_w [NW]
);
  // operands held for the whole step
  logic [3:0]    n_q;
  time_t         h_int_q;
  model_t        y0_a_q, ik_q, gamma_q, mu_q, theta_q;
  model_t        y0_w_q [NW];
  logic [NW-1:0] xl_q;
  logic          xk_q;
  logic [2:0]    row_q;
  logic          run_q;

  always_ff @(posedge clk) begin
    if (start && !run_q) begin
      n_q     <= n;
      h_int_q <= h_int;
      y0_a_q  <= y0_a;
      y0_w_q  <= y0_w;
      xl_q    <= xl;
      xk_q    <= x_k;
      ik_q    <= i_k;
      gamma_q <= gamma;
      mu_q    <= mu;
      theta_q <= theta;
    end
  end

  // operands as seen by the midpoint unit: live in the start clock, held after
  logic          first;
  logic [3:0]    n_m;
  time_t         hi_m;
  model_t        y0a_m, ik_m, g_m, mu_m, th_m;
  model_t        y0w_m [NW];
  logic [NW-1:0] xl_m;
  logic          xk_m;
  logic [2:0]    row_m;

  assign first = start && !run_q;
  assign n_m   = first ? n     : n_q;
  assign hi_m  = first ? h_int : h_int_q;
  assign y0a_m = first ? y0_a  : y0_a_q;
  assign y0w_m = first ? y0_w  : y0_w_q;
  assign xl_m  = first ? xl    : xl_q;
  assign xk_m  = first ? x_k   : xk_q;
  assign ik_m  = first ? i_k   : ik_q;
  assign g_m   = first ? gamma : gamma_q;
  assign mu_m  = first ? mu    : mu_q;
  assign th_m  = first ? theta : theta_q;
  assign row_m = first ? 3'd0  : row_q + 3'd1;

  // substep count and size of the row being started
  logic [4:0]  nstep_m;
  logic [23:0] recip;
  time_t       h_m;
  assign nstep_m = 5'(2 * (row_m + 1));
  assign recip   = 24'((64'd1 << 24) / 64'(nstep_m));
  assign h_m     = time_t'((64'(hi_m) * 64'(recip)) >> 24);

  logic   m_start, m_done, m_busy, m_pair;
  model_t m_ya;
  model_t m_yw [NW];
  logic   p_start, p_done, p_busy;

  mmid_unit #(.NW(NW)) u_mmid (
    .clk, .rst_n, .start(m_start), .nstep(nstep_m), .n(n_m), .h(h_m),
    .y0_a(y0a_m), .y0_w(y0w_m), .xl(xl_m), .x_k(xk_m), .i_k(ik_m),
    .gamma(g_m), .mu(mu_m), .theta(th_m),
    .busy(m_busy), .done(m_done), .pair_out(m_pair), .y_a(m_ya), .y_w(m_yw));

  pzextr_unit #(.NW(NW)) u_pz (
    .clk, .rst_n, .start(p_start), .row(row_q), .n(n_q), .y_a(m_ya), .y_w(m_yw),
    .busy(p_busy), .done(p_done), .yext_a(y_a), .yext_w(y_w));

  logic last_row;
  assign last_row = (32'(row_q) + 1 >= ROWS);
  assign m_start  = first || (run_q && p_done && !last_row);
  assign p_start  = run_q && m_done;
  assign done     = run_q && p_done && last_row;
  assign busy     = run_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run_q <= 1'b0;
      row_q <= '0;
    end else if (first) begin
      run_q <= 1'b1;
      row_q <= '0;
    end else if (run_q && p_done) begin
      if (last_row) run_q <= 1'b0;
      else          row_q <= row_q + 3'd1;
    end
  end

endmodule
