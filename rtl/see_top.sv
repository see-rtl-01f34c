// see_top - spiking neural network emulation engine, logic of the three FPGAs.
//
// The engine simulates up to 2^19 integrate-and-fire neurons with adaptive
// synaptic weights, event by event. Its logic is split as on the board:
//   simulation control   sim_control + event_lists: the event sequencer and
//                        the dynamic and fire event lists (DEL, FEL)
//   topology computation ntc: fire/excitation tag fields, topology vectors
//                        and projective fields for the connection scheme
//   state computation    nsc: NCH channels, each integrating one neuron at a
//                        time out of its own weight memory
// The weight memories (one SDRAM module per channel) are outside: their
// ports are brought out as arrays, one per channel, with the protocol of
// nsc_channel. Stimulated neurons are marked through ext_* before a run;
// start launches a run of run_time; done pulses at its end. Every event has
// a next-spike phase (trial integrations, no write-back, bisection down to
// h_min) followed by an update phase over the interval it found.
// The tag fields and event lists are memories inside this logic; on the
// board they are SRAM devices next to the FPGAs. The neuron grid is
// 2^XB x 2^YB; the event lists hold 2^(XB+YB) entries.
module see_top
  import see_pkg::*;
#(
  parameter int unsigned XB   = 10,
  parameter int unsigned YB   = 9,
  parameter int unsigned NCH  = 6,
  parameter int unsigned ROWS = 2,
  parameter int unsigned AW   = 27
) (
  input  logic          clk,
  input  logic          rst_n,
  // host
  input  conn_t         scheme,
  input  model_t        gamma,
  input  model_t        mu,
  input  model_t        theta,
  input  logic          ext_valid,
  output logic          ext_ready,
  input  nid_t          ext_id,
  input  logic          start,
  input  time_t         run_time,
  input  time_t         h_max,
  input  time_t         h_min,          // resolution of the next-spike search
  input  time_t         t_d,
  output logic          ready,          // tag fields cleared after reset
  output logic          busy,
  output logic          done,
  output time_t         t_now,
  output logic [31:0]   n_events,
  output logic [31:0]   n_spikes,
  output logic [31:0]   n_expired,
  output logic [31:0]   n_trials,       // trial passes of the next-spike phase
  output logic [XB+YB:0] del_count,
  output logic [XB+YB:0] fel_count,
  output logic          del_overflow,
  output logic          fel_overflow,
  output logic [NCH-1:0] nsc_busy,
  // weight memories, one per channel
  output logic          mem_req   [NCH],
  output logic          mem_we    [NCH],
  output logic [AW-1:0] mem_addr  [NCH],
  output logic [63:0]   mem_wdata [NCH],
  output logic [1:0]    mem_be    [NCH],
  input  logic          mem_gnt   [NCH],
  input  logic          mem_rvalid[NCH],
  input  logic [63:0]   mem_rdata [NCH]
);
  localparam int unsigned LAW = XB + YB;

  // event lists
  logic           del_push_ready;
  logic [LAW-1:0] del_rd_idx;
  nid_t           del_rd_id;
  logic           fel_push_valid, fel_push_ready, fel_rm_valid, fel_scan_start;
  logic           fel_scan_busy, fel_scan_done;
  nid_t           fel_push_id, fel_min_id;
  time_t          fel_push_t, fel_min_t;
  logic [LAW-1:0] fel_rm_idx, fel_min_idx;

  // topology unit
  logic           clearing;
  logic           ntc_cmd_valid, ntc_cmd_ready;
  logic [2:0]     ntc_cmd_op;
  nid_t           ntc_cmd_id;
  logic           topo_valid, topo_ready, topo_self;
  nid_t           topo_id;
  logic [7:0]     topo_vec;
  logic           ntc_del_valid;
  nid_t           ntc_del_id;

  // state computation
  logic           job_valid, job_ready, job_xk;
  nid_t           job_id;
  logic [NMAX-1:0] job_xl;
  time_t          job_h;
  logic           job_dry;
  logic           res_valid, res_ready, res_fired;
  nid_t           res_id;
  model_t         res_a;

  logic           sc_ext_valid;
  assign sc_ext_valid = ext_valid && !clearing;
  assign ready        = !clearing;

  event_lists #(.DEL_AW(LAW), .FEL_AW(LAW)) u_lists (
    .clk, .rst_n,
    .del_push_valid(ntc_del_valid), .del_push_ready, .del_push_id(ntc_del_id),
    .del_rm_valid(1'b0), .del_rm_idx('0), .del_rd_idx, .del_rd_id,
    .del_count, .del_overflow,
    .fel_push_valid, .fel_push_ready, .fel_push_id, .fel_push_t,
    .fel_rm_valid, .fel_rm_idx, .fel_scan_start, .fel_scan_busy, .fel_scan_done,
    .fel_min_t, .fel_min_id, .fel_min_idx, .fel_count, .fel_overflow);

  ntc #(.XB(XB), .YB(YB)) u_ntc (
    .clk, .rst_n, .scheme, .clearing,
    .cmd_valid(ntc_cmd_valid), .cmd_ready(ntc_cmd_ready), .cmd_op(ntc_cmd_op),
    .cmd_id(ntc_cmd_id),
    .topo_valid, .topo_ready, .topo_id, .topo_vec, .topo_self,
    // a full DEL drops the entry and raises del_overflow instead of stalling
    .del_valid(ntc_del_valid), .del_ready(del_push_ready || del_overflow ||
               del_count == (LAW+1)'(2**LAW)), .del_id(ntc_del_id));

  sim_control #(.DEL_AW(LAW), .FEL_AW(LAW), .NW(NMAX)) u_ctrl (
    .clk, .rst_n,
    .ext_valid(sc_ext_valid), .ext_ready, .ext_id, .start, .run_time, .h_max, .h_min, .t_d,
    .busy, .done, .t_now, .n_events, .n_spikes, .n_expired, .n_trials,
    .del_count, .del_rd_idx, .del_rd_id,
    .fel_push_valid, .fel_push_ready, .fel_push_id, .fel_push_t,
    .fel_rm_valid, .fel_rm_idx, .fel_scan_start, .fel_scan_done,
    .fel_min_t, .fel_min_id, .fel_min_idx, .fel_count,
    .ntc_cmd_valid, .ntc_cmd_ready, .ntc_cmd_op, .ntc_cmd_id,
    .topo_valid, .topo_ready, .topo_vec, .topo_self,
    .job_valid, .job_ready, .job_id, .job_xl, .job_xk, .job_h, .job_dry,
    .res_valid, .res_ready, .res_id, .res_fired);

  nsc #(.NCH(NCH), .NW(NMAX), .ROWS(ROWS), .AW(AW)) u_nsc (
    .clk, .rst_n,
    .job_valid, .job_ready, .job_id, .job_xl, .job_xk, .job_h, .job_dry,
    .gamma, .mu, .theta,
    .res_valid, .res_ready, .res_id, .res_fired, .res_a,
    .busy(nsc_busy),
    .mem_req, .mem_we, .mem_addr, .mem_wdata, .mem_be, .mem_gnt, .mem_rvalid, .mem_rdata);

endmodule
