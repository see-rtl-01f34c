// fx_mul - pipelined signed fixed-point multiplier.
//
// Computes p = sat(a * b >>> SHIFT) and delivers it LAT clocks after the
// operands are presented (LAT = 4 by default, the multiplier latency the
// design assumes for every pipelined multiplication). The full product is
// formed in the first register stage and carried through LAT-1 further
// register stages so that synthesis can retime the multiplier into them;
// the shift and the saturation to WO bits are applied at the output.
// A valid bit travels alongside the data. One operation can start every clock.
//
// Interface: in_valid/a/b in, out_valid/p out; no back-pressure.
// Rounding is truncation toward minus infinity (arithmetic shift): this
// design's choice.
module fx_mul #(
  parameter int unsigned WA    = 20,
  parameter int unsigned WB    = 20,
  parameter int unsigned WO    = 20,
  parameter int unsigned SHIFT = 18,
  parameter int unsigned LAT   = 4
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic signed [WA-1:0] a,
  input  logic signed [WB-1:0] b,
  output logic                 out_valid,
  output logic signed [WO-1:0] p
);
  localparam int unsigned WP = WA + WB;

  logic signed [WP-1:0] prod_q [LAT];
  logic                 vld_q  [LAT];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < LAT; s++) vld_q[s] <= 1'b0;
    end else begin
      vld_q[0] <= in_valid;
      for (int s = 1; s < LAT; s++) vld_q[s] <= vld_q[s-1];
    end
  end

  always_ff @(posedge clk) begin
    prod_q[0] <= WP'(a) * WP'(b);
    for (int s = 1; s < LAT; s++) prod_q[s] <= prod_q[s-1];
  end

  localparam logic signed [WP-1:0] PMAX = WP'((64'sd1 <<< (WO - 1)) - 1);
  localparam logic signed [WP-1:0] PMIN = -WP'(64'sd1 <<< (WO - 1));

  logic signed [WP-1:0] shifted;
  always_comb begin
    shifted = prod_q[LAT-1] >>> SHIFT;
    if (shifted > PMAX)      p = PMAX[WO-1:0];
    else if (shifted < PMIN) p = PMIN[WO-1:0];
    else                     p = shifted[WO-1:0];
  end

  assign out_valid = vld_q[LAT-1];

endmodule
