// mmid_unit - modified-midpoint integration of one neuron over an interval H.
//
// The state vector of a neuron is its membrane potential a_K and its n
// presynaptic weights W_j (n <= NW). Its derivative is
//   a_K' = i_K + sum_j X_Lj * W_j            (non-leaky integrate-and-fire)
//   W_j' = weight adaptation rule            (see weight_deriv)
// The unit advances the state by H = nstep * h with the modified-midpoint
// rule, in nstep + 1 passes over the vector:
//   pass 0            k_1     = k_0 + h * f(k_0)
//   pass m (1..n-1)   k_{m+1} = k_{m-1} + 2h * f(k_m)
//   pass nstep        y       = (k_nstep + k_{nstep-1} + h * f(k_nstep)) / 2
// Two weights are processed per clock, matching the two 4-byte weights of
// one 8-byte weight-memory word; a_K runs in a separate scalar lane.
//
// Weight lane pipeline, from the clock a pair is read (issue) to the clock
// its result can be read back: weight_deriv 6, multiply by h 4, add 1,
// write 1 = 12 clocks, the latency t_MMID the design budgets.
// The potential lane sums X_L * W_j while the pairs are issued, multiplies
// the sum by h after the last pair and writes a_K 6 clocks later.
//
// k_m and k_{m-1} live in two register banks that swap roles after every
// pass; k_{m+1} overwrites k_{m-1} pair by pair as results return.
// A pass needs all of k_m, and k_m(a_K) needs all weights of the previous
// pass, so a pass starts only after the previous one has fully returned
// (this design's choice; the budget formula t_MMID + ceil(n/2)*(nstep+1)
// assumes the passes stream back to back). The resulting count is
//   T = 1 + (nstep + 1) * (max(ceil(n/2),1) + 12)    clocks from start to done.
//
// Interface: pulse start with the operands stable; y_a/y_w are valid from the
// done pulse until the next start. pair_out pulses whenever a result pair
// has been written (first one 12 clocks after the first issue).
module mmid_unit
  import see_pkg::*;
#(
  parameter int unsigned NW = NMAX
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [4:0]  nstep,      // 2..16
  input  logic [3:0]  n,          // number of weights, 0..NW
  input  time_t       h,          // substep size (14.18)
  input  model_t      y0_a,
  input  model_t      y0_w [NW],
  input  logic [NW-1:0] xl,       // presynaptic sending status (topology vector)
  input  logic        x_k,        // own status (1 = sending)
  input  model_t      i_k,        // external stimulus
  input  model_t      gamma,
  input  model_t      mu,
  input  model_t      theta,
  output logic        busy,
  output logic        done,
  output logic        pair_out,
  output model_t      y_a,
  output model_t      y_w [NW]
);
  localparam int unsigned NP  = (NW + 1) / 2;
  localparam int unsigned PW  = $clog2(NP + 1);
  localparam int unsigned HW  = 24;             // width of h*f before scaling
  localparam int unsigned TAGW = PW;

  typedef enum logic [1:0] {S_IDLE, S_ISSUE, S_DRAIN, S_DONE} state_t;
  state_t state_q;

  // operands sampled at start
  logic [4:0]    nstep_q;
  logic [3:0]    n_q;
  time_t         h_q;
  logic [NW-1:0] xl_q;
  logic          xk_q;
  model_t        ik_q, gamma_q, mu_q, theta_q;

  // the two banks; sel_q picks the bank that holds k_m
  model_t bank_w [2][NW];
  model_t bank_a [2];
  logic   sel_q;

  logic [4:0]    m_q;        // pass number
  logic [PW-1:0] p_q;        // pair being issued
  logic [PW:0]   inflight_q;
  logic          a_pending_q;
  model_t        acc_q;      // i_K + sum of X_L * W_j(k_m)
  logic [PW-1:0] npairs;

  assign npairs = PW'((n_q + 4'd1) >> 1);
  assign busy   = (state_q != S_IDLE);
  assign done   = (state_q == S_DONE);

  logic first_pass, last_pass;
  assign first_pass = (m_q == 5'd0);
  assign last_pass  = (m_q == nstep_q);

  // ---------------------------------------------------------------- issue
  logic   issue;
  model_t iss_w [2];
  logic [1:0] iss_xl;
  assign issue = (state_q == S_ISSUE) && (p_q < npairs);

  always_comb begin
    for (int l = 0; l < 2; l++) begin
      iss_w[l]  = bank_w[sel_q][(2 * p_q + l) % NW];
      iss_xl[l] = ((2 * p_q + l) < n_q) ? xl_q[(2 * p_q + l) % NW] : 1'b0;
    end
  end

  // weight derivative pipeline (6 clocks)
  logic          d_valid;
  model_t        d_f [2];
  logic [TAGW-1:0] d_tag;

  weight_deriv #(.TAGW(TAGW)) u_deriv (
    .clk, .rst_n,
    .in_valid(issue), .in_w(iss_w), .in_xl(iss_xl), .in_tag(p_q),
    .a_k(bank_a[sel_q]), .x_k(xk_q), .gamma(gamma_q), .mu(mu_q), .theta(theta_q),
    .out_valid(d_valid), .out_f(d_f), .out_tag(d_tag));

  // multiply by h (4 clocks)
  logic signed [HW-1:0] hf [2];
  logic                 hf_valid;
  logic                 hf_v1;
  logic [TAGW-1:0]      hf_tag [MUL_LAT];

  fx_mul #(.WA(MW), .WB(TW+1), .WO(HW), .SHIFT(FRAC), .LAT(MUL_LAT)) u_hmul0 (
    .clk, .rst_n, .in_valid(d_valid), .a(d_f[0]), .b({1'b0, h_q}),
    .out_valid(hf_valid), .p(hf[0]));
  fx_mul #(.WA(MW), .WB(TW+1), .WO(HW), .SHIFT(FRAC), .LAT(MUL_LAT)) u_hmul1 (
    .clk, .rst_n, .in_valid(d_valid), .a(d_f[1]), .b({1'b0, h_q}),
    .out_valid(hf_v1), .p(hf[1]));

  always_ff @(posedge clk) begin
    hf_tag[0] <= d_tag;
    for (int s = 1; s < MUL_LAT; s++) hf_tag[s] <= hf_tag[s-1];
  end

  // combine: the pass rule applied to h*f and the two banks
  function automatic model_t combine(input logic fp, input logic lp,
                                     input model_t km, input model_t kmm1,
                                     input logic signed [HW-1:0] hfv);
    logic signed [63:0] s;
    if (fp)      s = 64'(km) + 64'(hfv);
    else if (lp) s = (64'(km) + 64'(kmm1) + 64'(hfv)) >>> 1;
    else         s = 64'(kmm1) + (64'(hfv) <<< 1);
    return sat_m(s);
  endfunction

  logic            wr_valid_q;
  logic [TAGW-1:0] wr_pair_q;
  model_t          wr_w_q [2];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) wr_valid_q <= 1'b0;
    else        wr_valid_q <= hf_valid;
  end

  always_ff @(posedge clk) begin
    wr_pair_q <= hf_tag[MUL_LAT-1];
    for (int l = 0; l < 2; l++)
      wr_w_q[l] <= combine(first_pass, last_pass,
                           bank_w[sel_q][(2 * hf_tag[MUL_LAT-1] + l) % NW],
                           bank_w[~sel_q][(2 * hf_tag[MUL_LAT-1] + l) % NW],
                           hf[l]);
  end

  // potential lane: h * (i_K + sum) after the last pair
  logic                 a_launch_q;
  logic                 ah_valid;
  logic signed [HW-1:0] ah;
  logic                 a_wr_q;
  model_t               a_new_q;

  fx_mul #(.WA(MW), .WB(TW+1), .WO(HW), .SHIFT(FRAC), .LAT(MUL_LAT)) u_hmula (
    .clk, .rst_n, .in_valid(a_launch_q), .a(acc_q), .b({1'b0, h_q}),
    .out_valid(ah_valid), .p(ah));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) a_wr_q <= 1'b0;
    else        a_wr_q <= ah_valid;
  end

  always_ff @(posedge clk)
    a_new_q <= combine(first_pass, last_pass, bank_a[sel_q], bank_a[~sel_q], ah);

  // ---------------------------------------------------------------- control
  logic pass_end;
  assign pass_end = (state_q == S_DRAIN) && (inflight_q == '0) && !a_pending_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q     <= S_IDLE;
      m_q         <= '0;
      p_q         <= '0;
      inflight_q  <= '0;
      a_pending_q <= 1'b0;
      a_launch_q  <= 1'b0;
      pair_out    <= 1'b0;
      sel_q       <= 1'b0;
    end else begin
      a_launch_q <= 1'b0;
      pair_out   <= wr_valid_q;
      inflight_q <= inflight_q + (PW+1)'(issue) - (PW+1)'(wr_valid_q);
      if (a_wr_q) a_pending_q <= 1'b0;
      unique case (state_q)
        S_IDLE: if (start) begin
          state_q <= S_ISSUE;
          m_q     <= '0;
          p_q     <= '0;
          sel_q   <= 1'b0;
        end
        S_ISSUE: begin
          p_q <= p_q + 1'b1;
          if (PW'(p_q + 1'b1) >= npairs || npairs == '0) begin
            state_q     <= S_DRAIN;
            a_launch_q  <= 1'b1;
            a_pending_q <= 1'b1;
          end
        end
        S_DRAIN: if (pass_end) begin
          p_q <= '0;
          if (last_pass) state_q <= S_DONE;
          else begin
            state_q <= S_ISSUE;
            m_q     <= m_q + 1'b1;
            sel_q   <= ~sel_q;
          end
        end
        S_DONE: state_q <= S_IDLE;
        default: state_q <= S_IDLE;
      endcase
    end
  end

  // operands, accumulator and banks
  always_ff @(posedge clk) begin
    if (state_q == S_IDLE && start) begin
      nstep_q <= nstep;
      n_q     <= n;
      h_q     <= h;
      xl_q    <= xl;
      xk_q    <= x_k;
      ik_q    <= i_k;
      gamma_q <= gamma;
      mu_q    <= mu;
      theta_q <= theta;
      acc_q   <= i_k;
      bank_a[0] <= y0_a;
      for (int j = 0; j < NW; j++) bank_w[0][j] <= y0_w[j];
    end else begin
      if (state_q == S_DRAIN && pass_end) acc_q <= ik_q;
      else if (issue)
        acc_q <= sat_m(64'(acc_q) + (iss_xl[0] ? 64'(iss_w[0]) : 64'sd0)
                                  + (iss_xl[1] ? 64'(iss_w[1]) : 64'sd0));
      // results: the last pass goes to the output, the others overwrite k_{m-1}
      if (wr_valid_q) begin
        for (int l = 0; l < 2; l++) begin
          if ((2 * wr_pair_q + l) < n_q) begin
            if (last_pass) y_w[(2 * wr_pair_q + l) % NW] <= wr_w_q[l];
            else           bank_w[~sel_q][(2 * wr_pair_q + l) % NW] <= wr_w_q[l];
          end
        end
      end
      if (a_wr_q) begin
        if (last_pass) y_a <= a_new_q;
        else           bank_a[~sel_q] <= a_new_q;
      end
    end
  end

endmodule
