// weight_deriv - time derivative of two synaptic weights per clock.
//
// Implements the weight adaptation rule
//   W' = -gamma * W + ( mu * (a_K - theta/2)   if X_K = 0 and X_L = 1
//                       0                      otherwise )
// for the two 20-bit weights that one 64-bit weight-memory word carries.
// a_K, X_K, gamma, mu and theta belong to the neuron being integrated and
// are sampled with each pair; X_L is the presynaptic status bit of each
// weight, taken from the topology vector.
//
// Pipeline (6 clocks, as the design budgets for the derivation):
//   stage 0        register operands, form a_K - theta/2
//   stages 1..4    the gamma products (one per lane) and the mu product run
//                  in parallel in 4-clock multipliers
//   stage 5        select, subtract, saturate to 2.18 and register
// A TAGW-bit sideband word travels with each pair so that a caller can
// carry addresses or operands along without its own delay line.
// Interface: in_valid/in_w/in_xl/in_tag; out_valid/out_f/out_tag exactly
// LAT_DERIV clocks later. No back-pressure; one pair per clock.
module weight_deriv
  import see_pkg::*;
#(
  parameter int unsigned TAGW = 8
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            in_valid,
  input  model_t          in_w   [2],
  input  logic [1:0]      in_xl,
  input  logic [TAGW-1:0] in_tag,
  input  model_t          a_k,
  input  logic            x_k,
  input  model_t          gamma,
  input  model_t          mu,
  input  model_t          theta,
  output logic            out_valid,
  output model_t          out_f  [2],
  output logic [TAGW-1:0] out_tag
);
  localparam int unsigned LAT_DERIV = MUL_LAT + 2;

  // stage 0
  logic            s0_valid;
  model_t          s0_w [2];
  model_t          s0_d, s0_gamma, s0_mu;
  logic [1:0]      s0_sel;
  logic [TAGW-1:0] s0_tag;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) s0_valid <= 1'b0;
    else        s0_valid <= in_valid;
  end

  always_ff @(posedge clk) begin
    s0_w     <= in_w;
    s0_d     <= sat_m(64'(a_k) - 64'(theta >>> 1));
    s0_gamma <= gamma;
    s0_mu    <= mu;
    s0_sel   <= in_xl & {2{~x_k}};
    s0_tag   <= in_tag;
  end

  // stages 1..4: multipliers
  model_t gw [2];
  model_t md;
  logic   m_valid;
  logic   unused_v0, unused_v1;

  fx_mul #(.WA(MW), .WB(MW), .WO(MW), .SHIFT(FRAC), .LAT(MUL_LAT)) u_mul_g0 (
    .clk, .rst_n, .in_valid(s0_valid), .a(s0_gamma), .b(s0_w[0]),
    .out_valid(unused_v0), .p(gw[0]));
  fx_mul #(.WA(MW), .WB(MW), .WO(MW), .SHIFT(FRAC), .LAT(MUL_LAT)) u_mul_g1 (
    .clk, .rst_n, .in_valid(s0_valid), .a(s0_gamma), .b(s0_w[1]),
    .out_valid(unused_v1), .p(gw[1]));
  fx_mul #(.WA(MW), .WB(MW), .WO(MW), .SHIFT(FRAC), .LAT(MUL_LAT)) u_mul_m (
    .clk, .rst_n, .in_valid(s0_valid), .a(s0_mu), .b(s0_d),
    .out_valid(m_valid), .p(md));

  // sideband delay matching the multipliers
  logic [1:0]      sel_d [MUL_LAT];
  logic [TAGW-1:0] tag_d [MUL_LAT];
  always_ff @(posedge clk) begin
    sel_d[0] <= s0_sel;
    tag_d[0] <= s0_tag;
    for (int s = 1; s < MUL_LAT; s++) begin
      sel_d[s] <= sel_d[s-1];
      tag_d[s] <= tag_d[s-1];
    end
  end

  // stage 5
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= m_valid;
  end

  always_ff @(posedge clk) begin
    for (int l = 0; l < 2; l++)
      out_f[l] <= sat_m((sel_d[MUL_LAT-1][l] ? 64'(md) : 64'sd0) - 64'(gw[l]));
    out_tag <= tag_d[MUL_LAT-1];
  end

endmodule
