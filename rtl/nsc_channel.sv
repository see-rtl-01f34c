// nsc_channel - one weight-memory channel of the neuron state computation.
//
// A job names one excited neuron, its topology vector (which presynaptic
// neurons are sending), its own sending status and the interval H to advance.
// The channel
//   1. reads the neuron's 4-byte pointer from the pointer table at the start
//      of its memory (two pointers per 8-byte word),
//   2. reads the neuron information block (NIB) the pointer addresses:
//        word 0      header: bits 15:0 number of weights n, bit 63 stimulus
//                    present, bits 51:32 stimulus i_K (2.18)
//        word 1      bits 31:0 membrane potential a_K, bits 63:32 weight W0
//        word k>=2   bits 31:0 W(2k-3), bits 63:32 W(2k-2)
//      (4-byte fields hold sign-extended 2.18 values),
//   3. runs one Bulirsch-Stoer step (bs_integrator),
//   4. compares the new potential with the threshold theta; a neuron that
//      reaches it fires and its potential restarts from zero,
//   5. writes the potential and the weights back, with 32-bit half-word
//      enables so that the words shared with the next NIB are not disturbed,
//   6. returns the neuron number, the fire flag and the new potential.
// A trial job (job_dry, used by the next-spike phase) skips step 5: the
// memory keeps the old state and only the fire flag and potential are
// reported.
// Header, 8-byte words, 4-byte potential/weights and the pointer table follow
// the design; the bit positions inside the header and the reset-to-zero on
// firing are this design's choices. Up to NW = 8 weights are held on chip; n
// is clamped to NW.
//
// Memory port: mem_req with mem_we/mem_addr (8-byte word address)/mem_wdata/
// mem_be is accepted when mem_gnt is high; read data return in order on
// mem_rvalid/mem_rdata some clocks later. The NIB is read with NIB_WORDS
// back-to-back requests. With a memory that grants at once and answers L
// clocks after the grant, a job takes
//   T = 10 + 2L + T_BS + W    clocks from acceptance to res_valid,
// W = floor(n/2) + 1 the number of words written back (0 for a trial job).
module nsc_channel
  import see_pkg::*;
#(
  parameter int unsigned NW   = NMAX,
  parameter int unsigned ROWS = 2,
  parameter int unsigned AW   = 27          // 1 GB of 8-byte words
) (
  input  logic          clk,
  input  logic          rst_n,
  // job
  input  logic          job_valid,
  output logic          job_ready,
  input  nid_t          job_id,
  input  logic [NW-1:0] job_xl,
  input  logic          job_xk,
  input  time_t         job_h,
  input  logic          job_dry,    // trial integration: nothing written back
  // model constants
  input  model_t        gamma,
  input  model_t        mu,
  input  model_t        theta,
  // result
  output logic          res_valid,
  input  logic          res_ready,
  output nid_t          res_id,
  output logic          res_fired,
  output model_t        res_a,
  // weight memory
  output logic          mem_req,
  output logic          mem_we,
  output logic [AW-1:0] mem_addr,
  output logic [63:0]   mem_wdata,
  output logic [1:0]    mem_be,
  input  logic          mem_gnt,
  input  logic          mem_rvalid,
  input  logic [63:0]   mem_rdata
);
  localparam int unsigned NIB_WORDS = 2 + NW / 2;
  localparam int unsigned CW_ = $clog2(NIB_WORDS + 1);

  typedef enum logic [2:0] {
    C_IDLE, C_PTR_REQ, C_PTR_WAIT, C_NIB, C_RUN, C_FIRE, C_WB, C_RES
  } cstate_t;
  cstate_t st_q;

  nid_t          id_q;
  logic [NW-1:0] xl_q;
  logic          xk_q;
  logic          dry_q;
  time_t         h_q;
  logic [AW-1:0] nib_q;
  logic [CW_-1:0] req_cnt_q, rsp_cnt_q;
  logic [3:0]    n_q;
  model_t        ik_q, a_q;
  model_t        w_q [NW];
  logic          bs_start_q;
  logic          fired_q;

  logic   bs_done, bs_busy;
  model_t bs_a;
  model_t bs_w [NW];

  function automatic model_t fld(input logic [31:0] v);
    return model_t'(v[MW-1:0]);
  endfunction
  function automatic logic [31:0] ext32(input model_t v);
    return 32'(v);
  endfunction

  bs_integrator #(.NW(NW), .ROWS(ROWS)) u_bs (
    .clk, .rst_n, .start(bs_start_q), .n(n_q), .h_int(h_q),
    .y0_a(a_q), .y0_w(w_q), .xl(xl_q), .x_k(xk_q), .i_k(ik_q),
    .gamma, .mu, .theta, .busy(bs_busy), .done(bs_done), .y_a(bs_a), .y_w(bs_w));

  // write-back word k (1-based over the NIB)
  logic [3:0] wb_words;
  assign wb_words = 4'(n_q >> 1) + 4'd1;

  always_comb begin
    mem_req   = 1'b0;
    mem_we    = 1'b0;
    mem_addr  = '0;
    mem_wdata = '0;
    mem_be    = 2'b11;
    unique case (st_q)
      C_PTR_REQ: begin
        mem_req  = 1'b1;
        mem_addr = AW'(id_q >> 1);
      end
      C_NIB: begin
        mem_req  = (32'(req_cnt_q) < NIB_WORDS);
        mem_addr = nib_q + AW'(req_cnt_q);
      end
      C_WB: begin
        mem_req  = 1'b1;
        mem_we   = 1'b1;
        mem_addr = nib_q + AW'(req_cnt_q);
        if (req_cnt_q == CW_'(1)) begin
          mem_wdata = {ext32(w_q[0]), ext32(a_q)};
          mem_be    = {(n_q != 0), 1'b1};
        end else begin
          mem_wdata = {ext32(w_q[(2 * req_cnt_q - 2) % NW]), ext32(w_q[(2 * req_cnt_q - 3) % NW])};
          mem_be    = {(32'(2 * req_cnt_q - 2) < 32'(n_q)), 1'b1};
        end
      end
      default: ;
    endcase
  end

  assign job_ready = (st_q == C_IDLE);
  assign res_valid = (st_q == C_RES);
  assign res_id    = id_q;
  assign res_fired = fired_q;
  assign res_a     = a_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q       <= C_IDLE;
      bs_start_q <= 1'b0;
      req_cnt_q  <= '0;
      rsp_cnt_q  <= '0;
    end else begin
      bs_start_q <= 1'b0;
      unique case (st_q)
        C_IDLE: if (job_valid) st_q <= C_PTR_REQ;
        C_PTR_REQ: if (mem_gnt) st_q <= C_PTR_WAIT;
        C_PTR_WAIT: if (mem_rvalid) begin
          st_q      <= C_NIB;
          req_cnt_q <= '0;
          rsp_cnt_q <= '0;
        end
        C_NIB: begin
          if (mem_req && mem_gnt) req_cnt_q <= req_cnt_q + 1'b1;
          if (mem_rvalid) begin
            rsp_cnt_q <= rsp_cnt_q + 1'b1;
            if (32'(rsp_cnt_q) == NIB_WORDS - 1) begin
              st_q       <= C_RUN;
              bs_start_q <= 1'b1;
            end
          end
        end
        C_RUN: if (bs_done) st_q <= C_FIRE;
        C_FIRE: begin
          st_q      <= dry_q ? C_RES : C_WB;
          req_cnt_q <= CW_'(1);
        end
        C_WB: if (mem_gnt) begin
          req_cnt_q <= req_cnt_q + 1'b1;
          if (req_cnt_q == CW_'(wb_words)) st_q <= C_RES;
        end
        C_RES: if (res_ready) st_q <= C_IDLE;
        default: st_q <= C_IDLE;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (st_q == C_IDLE && job_valid) begin
      id_q <= job_id;
      xl_q <= job_xl;
      xk_q <= job_xk;
      h_q  <= job_h;
      dry_q <= job_dry;
    end
    if (st_q == C_PTR_WAIT && mem_rvalid)
      nib_q <= AW'((id_q[0] ? mem_rdata[63:32] : mem_rdata[31:0]) >> 3);
    if (st_q == C_NIB && mem_rvalid) begin
      if (rsp_cnt_q == '0) begin
        n_q  <= (mem_rdata[15:0] > 16'(NW)) ? 4'(NW) : mem_rdata[3:0];
        ik_q <= mem_rdata[63] ? fld(mem_rdata[63:32]) : '0;
      end else if (rsp_cnt_q == CW_'(1)) begin
        a_q    <= fld(mem_rdata[31:0]);
        w_q[0] <= fld(mem_rdata[63:32]);
      end else begin
        w_q[(2 * rsp_cnt_q - 3) % NW] <= fld(mem_rdata[31:0]);
        if (32'(2 * rsp_cnt_q - 2) < NW) w_q[(2 * rsp_cnt_q - 2) % NW] <= fld(mem_rdata[63:32]);
      end
    end
    if (st_q == C_RUN && bs_done) begin
      fired_q <= (bs_a >= theta);
      a_q     <= (bs_a >= theta) ? '0 : bs_a;
      for (int j = 0; j < NW; j++) if (j < 32'(n_q)) w_q[j] <= bs_w[j];
    end
  end

endmodule
