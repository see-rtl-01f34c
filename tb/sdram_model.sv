// sdram_model - behavioural model of one weight-memory module (SDRAM with an
// 8-byte data bus and its controller) for simulation only.
// Grants every request at once, or, with STALL set, refuses about one in four
// requests at random. Read data return in order LAT clocks after the grant
// (LAT = 10, the worst-case access latency of the module); writes take effect
// at the grant, per 32-bit half as enabled by be. Holds 2^DEPTH_AW words;
// higher address bits are ignored. Requests are ignored while rst_n is low. Testbenches fill mem directly.
module sdram_model #(
  parameter int unsigned AW       = 27,
  parameter int unsigned DEPTH_AW = 12,
  parameter int unsigned LAT      = 10,
  parameter bit          STALL    = 1'b0
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          req,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  logic [63:0]   wdata,
  input  logic [1:0]    be,
  output logic          gnt,
  output logic          rvalid,
  output logic [63:0]   rdata
);
  logic [63:0] mem [2**DEPTH_AW];
  logic        v_q [LAT];
  logic [63:0] d_q [LAT];
  logic        stall_q = 1'b0;

  always_ff @(posedge clk) stall_q <= STALL && (($urandom % 4) == 0);
  assign gnt = !stall_q;

  initial for (int s = 0; s < LAT; s++) v_q[s] = 1'b0;

  always_ff @(posedge clk) begin
    v_q[0] <= rst_n && req && gnt && !we;
    d_q[0] <= mem[addr[DEPTH_AW-1:0]];
    for (int s = 1; s < LAT; s++) begin
      v_q[s] <= v_q[s-1];
      d_q[s] <= d_q[s-1];
    end
    if (rst_n && req && gnt && we) begin
      if (be[0]) mem[addr[DEPTH_AW-1:0]][31:0]  <= wdata[31:0];
      if (be[1]) mem[addr[DEPTH_AW-1:0]][63:32] <= wdata[63:32];
    end
  end

  // a read granted in clock c is seen in clock c + LAT
  assign rvalid = v_q[LAT-1];
  assign rdata  = d_q[LAT-1];
endmodule
