// pzextr_unit - polynomial extrapolation of modified-midpoint results.
//
// After the modified-midpoint unit has produced estimate y_i of the new state
// with nstep_i = 2(i+1) substeps, this unit extrapolates the sequence
// y_0 .. y_i to zero step size (Neville tableau, one row per call):
//   Q_{i,0} = D_{i,0} = y_i
//   Q_{i,k} = xq(i,k) * (D_{i,k-1} - Q_{i-1,k-1})      k = 1..i
//   D_{i,k} = xd(i,k) * (D_{i,k-1} - Q_{i-1,k-1})
//   y_ext,i = sum_{k=0..i} Q_{i,k}
// with x_i = (H/nstep_i)^2, xq = x_i/(x_{i-k}-x_i), xd = x_{i-k}/(x_{i-k}-x_i).
// Rows i = 0..KMAX-1 are supported; a call with i = 0 starts a new tableau.
// The coefficients depend only on i and k, so they are a constant table
// computed at elaboration. The row Q_{i-1,*} of the previous call is kept in
// a register file, as are the running D, Q and y_ext of every element.
//
// Schedule: elements go two weights per clock plus the membrane potential in
// a third lane alongside the first pair (P = ceil(n/2) pairs, at least 1).
// Column 0 copies y_i in P clocks. Each further column k gets a slot of
// S = ceil(P/t)*t clocks (t = 4, the multiplier latency) so that a column
// never reads a value the previous column has not returned; a value that
// returns in the very clock it is read is forwarded. done is raised
//   T = t + P + i * ceil(P/t) * t       clocks after start,
// the count budgeted for the extrapolation, with y_ext valid from then until
// the next start. Internal values are 6.18 (24 bits); outputs saturate to 2.18.
module pzextr_unit
  import see_pkg::*;
#(
  parameter int unsigned NW = NMAX
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [2:0]  row,        // i
  input  logic [3:0]  n,          // number of weights
  input  model_t      y_a,        // y_i, held stable while busy
  input  model_t      y_w [NW],
  output logic        busy,
  output logic        done,
  output model_t      yext_a,
  output model_t      yext_w [NW]
);
  localparam int unsigned NE  = NW + 1;          // elements: weights, then a_K
  localparam int unsigned EW  = 24;
  localparam int unsigned T_LAT = MUL_LAT;
  localparam int unsigned NL  = 3;               // lanes
  typedef logic signed [EW-1:0] ext_t;

  // constant coefficient tables, xq(i,k) and xd(i,k); zero where k = 0 or k > i
  coef_t XQ [KMAX][KMAX];
  coef_t XD [KMAX][KMAX];
  for (genvar gi = 0; gi < KMAX; gi++) begin : g_row
    for (genvar gk = 0; gk < KMAX; gk++) begin : g_col
      if (gk >= 1 && gk <= gi) begin : g_on
        localparam coef_t CQ = xq_coef(gi, gk);
        localparam coef_t CD = xd_coef(gi, gk);
        assign XQ[gi][gk] = CQ;
        assign XD[gi][gk] = CD;
      end else begin : g_off
        assign XQ[gi][gk] = '0;
        assign XD[gi][gk] = '0;
      end
    end
  end

  // ------------------------------------------------------------- state
  logic        run_q;
  logic [7:0]  cnt_q;
  logic [2:0]  row_q;
  logic [3:0]  n_q;
  logic [3:0]  npair;            // P
  logic [3:0]  slot;             // S
  logic [7:0]  t_total;

  ext_t qs   [KMAX][NE];         // Q_{i-1,k}
  ext_t dcur [NE];
  ext_t qcur [NE];
  ext_t ysum [NE];

  function automatic logic [3:0] pairs_of(input logic [3:0] nn);
    return (nn == 0) ? 4'd1 : 4'((nn + 4'd1) >> 1);
  endfunction

  assign npair   = pairs_of(run_q ? n_q : n);
  assign slot    = 4'(((npair + T_LAT - 1) / T_LAT) * T_LAT);
  assign t_total = 8'(T_LAT + npair + (run_q ? row_q : row) * slot);
  assign busy    = run_q;

  // Which column and pair are issued in this clock.
  // Column 0 (copy) runs at cnt 0..P-1, with cnt 0 being the start clock.
  logic [7:0]  c_eff;
  logic        col0, colk;
  logic [3:0]  p_cur;
  logic [2:0]  k_cur;
  logic [7:0]  rel;

  always_comb begin
    c_eff = run_q ? cnt_q : 8'd0;
    col0  = 1'b0;
    colk  = 1'b0;
    p_cur = '0;
    k_cur = '0;
    rel   = '0;
    if (run_q || start) begin
      if (c_eff < 8'(npair)) begin
        col0  = 1'b1;
        p_cur = c_eff[3:0];
      end else begin
        rel   = c_eff - 8'(npair);
        k_cur = 3'(rel / slot + 1);
        p_cur = 4'(rel % slot);
        colk  = (32'(k_cur) <= 32'(run_q ? row_q : row)) && (p_cur < npair) && run_q;
      end
    end
  end

  function automatic int unsigned elem(input logic [3:0] p, input int unsigned l);
    return (l < 2) ? ((2 * p + l) % NW) : NW;
  endfunction

  function automatic logic lane_on(input logic [3:0] p, input int unsigned l,
                                   input logic [3:0] nn);
    return (l < 2) ? ((2 * p + l) < nn) : (p == 0);
  endfunction

  // ------------------------------------------------------------- multipliers
  logic               m_in_valid;
  ext_t               delta  [NL];
  logic signed [EW-1:0] mq   [NL];
  logic signed [EW-1:0] mdv  [NL];
  logic               m_valid [NL];
  logic               md_unused [NL];
  logic [3:0]         ret_p  [T_LAT];
  logic [NL-1:0]      ret_on [T_LAT];
  logic               ret_valid;
  logic [3:0]         rp;
  logic [NL-1:0]      ron;

  assign m_in_valid = colk;
  assign ret_valid  = m_valid[0];
  assign rp         = ret_p[T_LAT-1];
  assign ron        = ret_on[T_LAT-1];

  // current D/Q of every element, with a value returning this clock forwarded
  ext_t d_now [NE];
  ext_t q_now [NE];
  always_comb begin
    for (int e = 0; e < NE; e++) begin
      d_now[e] = dcur[e];
      q_now[e] = qcur[e];
    end
    if (ret_valid)
      for (int l = 0; l < NL; l++)
        if (ron[l]) begin
          d_now[elem(rp, l)] = mdv[l];
          q_now[elem(rp, l)] = mq[l];
        end
  end

  always_comb
    for (int l = 0; l < NL; l++)
      delta[l] = d_now[elem(p_cur, l)] - qs[(k_cur - 3'd1) % KMAX][elem(p_cur, l)];

  for (genvar l = 0; l < NL; l++) begin : g_lane
    fx_mul #(.WA(EW), .WB(CW), .WO(EW), .SHIFT(FRAC), .LAT(T_LAT)) u_mq (
      .clk, .rst_n, .in_valid(m_in_valid), .a(delta[l]),
      .b(XQ[row_q][k_cur % KMAX]), .out_valid(m_valid[l]), .p(mq[l]));
    fx_mul #(.WA(EW), .WB(CW), .WO(EW), .SHIFT(FRAC), .LAT(T_LAT)) u_md (
      .clk, .rst_n, .in_valid(m_in_valid), .a(delta[l]),
      .b(XD[row_q][k_cur % KMAX]), .out_valid(md_unused[l]), .p(mdv[l]));
  end

  always_ff @(posedge clk) begin
    ret_p[0] <= p_cur;
    for (int l = 0; l < NL; l++) ret_on[0][l] <= colk && lane_on(p_cur, l, n_q);
    for (int s = 1; s < T_LAT; s++) begin
      ret_p[s]  <= ret_p[s-1];
      ret_on[s] <= ret_on[s-1];
    end
  end

  // ------------------------------------------------------------- control
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run_q <= 1'b0;
      cnt_q <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!run_q && start) begin
        run_q <= 1'b1;
        cnt_q <= 8'd1;
      end else if (run_q) begin
        cnt_q <= cnt_q + 8'd1;
        if (cnt_q + 8'd1 == t_total) begin
          run_q <= 1'b0;
          done  <= 1'b1;
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!run_q && start) begin
      row_q <= row;
      n_q   <= n;
    end
    // column 0: copy y_i
    if (col0) begin
      for (int l = 0; l < NL; l++) begin
        if (lane_on(p_cur, l, run_q ? n_q : n)) begin
          dcur[elem(p_cur, l)] <= (l < 2) ? EW'(y_w[elem(p_cur, l)]) : EW'(y_a);
          qcur[elem(p_cur, l)] <= (l < 2) ? EW'(y_w[elem(p_cur, l)]) : EW'(y_a);
          ysum[elem(p_cur, l)] <= (l < 2) ? EW'(y_w[elem(p_cur, l)]) : EW'(y_a);
        end
      end
    end
    // returning column k: new D, Q, and the running sum
    if (ret_valid) begin
      for (int l = 0; l < NL; l++) begin
        if (ron[l]) begin
          dcur[elem(rp, l)] <= mdv[l];
          qcur[elem(rp, l)] <= mq[l];
          ysum[elem(rp, l)] <= ysum[elem(rp, l)] + mq[l];
        end
      end
    end
    // column k issue: Q_{i,k-1} replaces Q_{i-1,k-1}
    if (colk) begin
      for (int l = 0; l < NL; l++)
        if (lane_on(p_cur, l, n_q))
          qs[(k_cur - 3'd1) % KMAX][elem(p_cur, l)] <= q_now[elem(p_cur, l)];
    end
    // end of row: Q_{i,i} is kept for the next row
    if (run_q && cnt_q + 8'd1 == t_total) begin
      for (int e = 0; e < NE; e++) qs[row_q][e] <= q_now[e];
    end
  end

  // outputs
  always_comb begin
    for (int j = 0; j < NW; j++) yext_w[j] = sat_m(64'(ysum[j]));
    yext_a = sat_m(64'(ysum[NW]));
  end

endmodule
