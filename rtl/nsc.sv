// nsc - neuron state computation: NCH parallel weight-memory channels.
//
// Each channel owns one weight memory (one SDRAM module with an 8-byte data
// bus) and integrates one excited neuron at a time (see nsc_channel); with
// the six memory modules of the design, six neurons are integrated in
// parallel. Neurons are spread over the memories by number: neuron id lives
// in memory id mod NCH and is always integrated by that channel, so its
// state is read from and written back to the same module every time (this
// design's choice; the document does not say how neurons are spread over
// the modules). Each channel has a one-job holding register: a job is taken
// in the clock it is offered if the holding register of its channel is
// empty (job_ready), and the channel loads it from there when idle. Finished
// neurons are reported one per clock through a round-robin arbiter over the
// channels; an offered result stays offered until it is taken.
// Interface: job and result are valid/ready handshakes; memory ports are
// arrays indexed by channel, each with the protocol of nsc_channel.
module nsc
  import see_pkg::*;
#(
  parameter int unsigned NCH  = 6,
  parameter int unsigned NW   = NMAX,
  parameter int unsigned ROWS = 2,
  parameter int unsigned AW   = 27
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          job_valid,
  output logic          job_ready,
  input  nid_t          job_id,
  input  logic [NW-1:0] job_xl,
  input  logic          job_xk,
  input  time_t         job_h,
  input  logic          job_dry,
  input  model_t        gamma,
  input  model_t        mu,
  input  model_t        theta,
  output logic          res_valid,
  input  logic          res_ready,
  output nid_t          res_id,
  output logic          res_fired,
  output model_t        res_a,
  output logic [NCH-1:0] busy,
  output logic          mem_req   [NCH],
  output logic          mem_we    [NCH],
  output logic [AW-1:0] mem_addr  [NCH],
  output logic [63:0]   mem_wdata [NCH],
  output logic [1:0]    mem_be    [NCH],
  input  logic          mem_gnt   [NCH],
  input  logic          mem_rvalid[NCH],
  input  logic [63:0]   mem_rdata [NCH]
);
  localparam int unsigned IW = (NCH > 1) ? $clog2(NCH) : 1;

  logic [NCH-1:0] ch_ready, ch_valid, ch_take, ch_res_ready;
  nid_t           ch_id    [NCH];
  logic           ch_fired [NCH];
  model_t         ch_a     [NCH];

  // dispatch: the channel that owns the neuron, through a one-job holding
  // register per channel so that a channel can be handed its next neuron
  // while it still works on the current one
  logic [IW-1:0]  job_ch;
  logic [NCH-1:0] pend_q;
  nid_t           pend_id [NCH];
  logic [NW-1:0]  pend_xl [NCH];
  logic           pend_xk [NCH];
  time_t          pend_h  [NCH];
  logic           pend_dry[NCH];

  assign job_ch    = IW'(job_id % NIDW'(NCH));
  assign job_ready = !pend_q[job_ch];
  assign ch_take   = pend_q;
  assign busy      = ~ch_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) pend_q <= '0;
    else
      for (int c = 0; c < NCH; c++) begin
        if (pend_q[c] && ch_ready[c])                              pend_q[c] <= 1'b0;
        else if (job_valid && !pend_q[c] && job_ch == IW'(c))      pend_q[c] <= 1'b1;
      end
  end

  always_ff @(posedge clk)
    for (int c = 0; c < NCH; c++)
      if (job_valid && !pend_q[c] && job_ch == IW'(c)) begin
        pend_id[c] <= job_id;
        pend_xl[c] <= job_xl;
        pend_xk[c] <= job_xk;
        pend_h[c]  <= job_h;
        pend_dry[c] <= job_dry;
      end

  for (genvar c = 0; c < NCH; c++) begin : g_ch
    nsc_channel #(.NW(NW), .ROWS(ROWS), .AW(AW)) u_ch (
      .clk, .rst_n,
      .job_valid(ch_take[c]), .job_ready(ch_ready[c]), .job_id(pend_id[c]),
      .job_xl(pend_xl[c]), .job_xk(pend_xk[c]), .job_h(pend_h[c]), .job_dry(pend_dry[c]),
      .gamma, .mu, .theta,
      .res_valid(ch_valid[c]), .res_ready(ch_res_ready[c]), .res_id(ch_id[c]),
      .res_fired(ch_fired[c]), .res_a(ch_a[c]),
      .mem_req(mem_req[c]), .mem_we(mem_we[c]), .mem_addr(mem_addr[c]),
      .mem_wdata(mem_wdata[c]), .mem_be(mem_be[c]), .mem_gnt(mem_gnt[c]),
      .mem_rvalid(mem_rvalid[c]), .mem_rdata(mem_rdata[c]));
  end

  // result: round robin starting after the last winner; a result that has
  // been offered stays selected until it is taken
  logic [IW-1:0] last_q, win, rr_win, lock_ch_q;
  logic          any, lock_q;
  always_comb begin
    rr_win = last_q;
    any    = 1'b0;
    for (int k = 1; k <= NCH; k++) begin
      int unsigned c;
      c = (32'(last_q) + k) % NCH;
      if (!any && ch_valid[c]) begin
        rr_win = IW'(c);
        any    = 1'b1;
      end
    end
    win = lock_q ? lock_ch_q : rr_win;
  end

  assign res_valid = any;
  assign res_id    = ch_id[win];
  assign res_fired = ch_fired[win];
  assign res_a     = ch_a[win];
  always_comb begin
    ch_res_ready = '0;
    if (any) ch_res_ready[win] = res_ready;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      last_q <= IW'(NCH - 1);
      lock_q <= 1'b0;
    end else if (any && res_ready) begin
      last_q <= win;
      lock_q <= 1'b0;
    end else if (any) begin
      lock_q <= 1'b1;
    end
  end

  always_ff @(posedge clk)
    if (any && !lock_q) lock_ch_q <= rr_win;

endmodule
