// ntc - network topology computation.
//
// Neurons form a 2^XB x 2^YB grid; neuron number = {y, x}. Two 1-bit tag
// fields are kept, one bit per neuron:
//   FTF (fire tag field)       set while a neuron is in the sending state
//   ETF (excitation tag field) set for every firing neuron and every neuron
//                              held in the dynamic event list (DEL)
// Commands (cmd_valid/cmd_ready, one at a time):
//   OP_TOPO    receptive field: builds the topology vector of a neuron, bit j
//              = FTF of its j-th presynaptic neighbour (0 outside the grid);
//              delivered on topo_valid/topo_ready with the neuron's own
//              FTF bit (its sending status X_K).
//   OP_FIRE    projective field: the neuron enters the sending state (FTF and
//              ETF set); every postsynaptic neighbour whose ETF is clear is
//              tagged and emitted on del_valid/del_ready for the DEL.
//   OP_STOP    the neuron returns to the receiving state (FTF cleared).
//   OP_RELEASE the neuron has left the DEL (ETF cleared).
//   OP_EXCITE  a neuron excited from outside (input stimulus): tagged and
//              emitted for the DEL unless already tagged.
// Connection schemes (scheme input): 4-nearest-neighbour (order W, E, N, S),
// 8-nearest-neighbour (W, E, N, S, NW, NE, SW, SE) and feedforward
// point-to-point, where the rows of the grid are the layers and neuron (x,y)
// feeds neuron (x,y+1) (this reading of "feedforward point-to-point" and the
// neighbour order are this design's choices).
// Timing: one tag-field access per clock, as with a single-ported SRAM: a
// topology vector takes 1 + (number of neighbours) clocks, a fire command
// 2 + neighbours clocks plus the clocks spent waiting on del_ready. After
// reset both fields are cleared, one word per clock (2^(XB+YB) clocks,
// clearing high meanwhile).
module ntc
  import see_pkg::*;
#(
  parameter int unsigned XB = 10,
  parameter int unsigned YB = 9
) (
  input  logic         clk,
  input  logic         rst_n,
  input  conn_t        scheme,
  output logic         clearing,
  input  logic         cmd_valid,
  output logic         cmd_ready,
  input  logic [2:0]   cmd_op,
  input  nid_t         cmd_id,
  output logic         topo_valid,
  input  logic         topo_ready,
  output nid_t         topo_id,
  output logic [7:0]   topo_vec,
  output logic         topo_self,     // FTF of the neuron itself (X_K)
  output logic         del_valid,
  input  logic         del_ready,
  output nid_t         del_id
);
  localparam int unsigned NB = XB + YB;
  localparam logic [2:0] OP_TOPO = 3'd0, OP_FIRE = 3'd1, OP_STOP = 3'd2,
                         OP_RELEASE = 3'd3, OP_EXCITE = 3'd4;

  logic ftf [2**NB];
  logic etf [2**NB];

  typedef enum logic [2:0] {T_CLR, T_IDLE, T_TOPO, T_TOUT, T_FIRE, T_EMIT} tstate_t;
  tstate_t st_q;

  logic [NB-1:0] clr_q;
  logic [2:0]    op_q;
  logic [NB-1:0] id_q;
  logic [3:0]    j_q;
  logic [7:0]    vec_q;
  logic          self_q;
  logic [NB-1:0] emit_q;

  // j-th neighbour of neuron id; pre = 1 for presynaptic, 0 for postsynaptic
  function automatic logic [NB:0] neighbour(input logic [NB-1:0] id, input logic [3:0] j,
                                            input conn_t sch, input logic pre);
    int x, y, dx, dy;
    x = int'(id[XB-1:0]);
    y = int'(id[NB-1:XB]);
    dx = 0; dy = 0;
    if (sch == CONN_P2P) begin
      dy = pre ? -1 : 1;
    end else begin
      unique case (j)
        4'd0: dx = -1;
        4'd1: dx = 1;
        4'd2: dy = -1;
        4'd3: dy = 1;
        4'd4: begin dx = -1; dy = -1; end
        4'd5: begin dx = 1;  dy = -1; end
        4'd6: begin dx = -1; dy = 1;  end
        default: begin dx = 1; dy = 1; end
      endcase
    end
    x = x + dx;
    y = y + dy;
    if (x < 0 || y < 0 || x >= (1 << XB) || y >= (1 << YB)) return '0;
    return {1'b1, YB'(y), XB'(x)};
  endfunction

  function automatic logic [3:0] fan(input conn_t sch);
    unique case (sch)
      CONN_P2P: return 4'd1;
      CONN_NN4: return 4'd4;
      default:  return 4'd8;
    endcase
  endfunction

  logic [NB:0]   nb;
  logic          nb_ok;
  logic [NB-1:0] nb_id;
  assign nb    = neighbour(id_q, j_q, scheme, (st_q == T_TOPO));
  assign nb_ok = nb[NB];
  assign nb_id = nb[NB-1:0];

  assign clearing   = (st_q == T_CLR);
  assign cmd_ready  = (st_q == T_IDLE);
  assign topo_valid = (st_q == T_TOUT);
  assign topo_id    = nid_t'(id_q);
  assign topo_vec   = vec_q;
  assign topo_self  = self_q;
  assign del_valid  = (st_q == T_EMIT);
  assign del_id     = nid_t'(emit_q);

  logic [NB-1:0] cid;
  assign cid = NB'(cmd_id);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q  <= T_CLR;
      clr_q <= '0;
      j_q   <= '0;
    end else begin
      unique case (st_q)
        T_CLR: begin
          clr_q <= clr_q + 1'b1;
          if (&clr_q) st_q <= T_IDLE;
        end
        T_IDLE: if (cmd_valid) begin
          j_q <= '0;
          unique case (cmd_op)
            OP_TOPO:   st_q <= T_TOPO;
            OP_FIRE:   st_q <= T_FIRE;
            OP_EXCITE: if (!etf[cid]) st_q <= T_EMIT;
            default:   st_q <= T_IDLE;
          endcase
        end
        T_TOPO: begin
          j_q <= j_q + 1'b1;
          if (j_q + 1'b1 == fan(scheme)) st_q <= T_TOUT;
        end
        T_TOUT: if (topo_ready) st_q <= T_IDLE;
        T_FIRE: begin
          j_q <= j_q + 1'b1;
          if (nb_ok && !etf[nb_id]) st_q <= T_EMIT;
          else if (j_q + 1'b1 == fan(scheme)) st_q <= T_IDLE;
        end
        T_EMIT: if (del_ready) begin
          if (op_q == OP_FIRE && j_q != fan(scheme)) st_q <= T_FIRE;
          else st_q <= T_IDLE;
        end
        default: st_q <= T_IDLE;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (st_q == T_CLR) begin
      ftf[clr_q] <= 1'b0;
      etf[clr_q] <= 1'b0;
    end
    if (st_q == T_IDLE && cmd_valid) begin
      op_q   <= cmd_op;
      id_q   <= cid;
      emit_q <= cid;
      vec_q  <= '0;
      self_q <= ftf[cid];
      unique case (cmd_op)
        OP_FIRE:    begin ftf[cid] <= 1'b1; etf[cid] <= 1'b1; end
        OP_STOP:    ftf[cid] <= 1'b0;
        OP_RELEASE: etf[cid] <= 1'b0;
        OP_EXCITE:  etf[cid] <= 1'b1;
        default: ;
      endcase
    end
    if (st_q == T_TOPO && nb_ok) vec_q[j_q[2:0]] <= ftf[nb_id];
    if (st_q == T_FIRE && nb_ok && !etf[nb_id]) begin
      etf[nb_id] <= 1'b1;
      emit_q     <= nb_id;
    end
  end

endmodule
