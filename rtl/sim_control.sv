// sim_control - event-driven simulation sequencer.
//
// Advances the network from one simulation event to the next. An event is a
// neuron switching between the receiving and the sending state; between
// events the neurons are integrated over the whole interval, so no fixed
// time step is used. One event cycle:
//   1. expire  scan the fire event list (FEL) for the earliest end time; while
//              it is not later than the current time, remove that entry and
//              return the neuron to the receiving state (topology unit STOP)
//   2. plan    interval H = earliest FEL end time - now, at most h_max, and
//              not past the end of the run
//   3. next spike  trial passes: every DEL neuron is integrated over a
//              trial interval without writing its state back (job_dry).
//              If one fires within H, the first firing time is located by
//              bisection between the last trial without and the last with a
//              firing neuron, down to h_min; H becomes the end of that
//              bracket. The first trial is over the whole H, so an event
//              without a firing neuron costs one trial pass.
//   4. update  for every neuron in the dynamic event list (DEL, the list
//              length is sampled at the start of the pass): fetch its
//              topology vector, hand it with H to the neuron state
//              computation; each neuron reported as firing is appended to
//              the FEL with end time now + H + t_d and its projective field
//              is evaluated (topology unit FIRE, which adds newly excited
//              neurons to the DEL)
//   5. advance now += H; stop when the run time is reached.
// Results have priority over new dispatches, so the state computation never
// stalls on a full result path: a dispatch waiting for a busy channel is
// abandoned when a result arrives and retried after it.
// The split into a next-spike phase and an update phase follows the design;
// locating the firing time by bisection with trial integrations, the
// resolution h_min and the limit h_max are this design's choices. Neurons are
// not released from the DEL (when a neuron leaves it is not specified).
// Host side: ext_valid/ext_id mark a stimulated neuron as excited (only while
// idle); start/run_time/h_max/h_min/t_d launch a run; done pulses at its
// end. n_trials counts the trial passes of the next-spike phase.
module sim_control
  import see_pkg::*;
#(
  parameter int unsigned DEL_AW = 19,
  parameter int unsigned FEL_AW = 19,
  parameter int unsigned NW     = NMAX
) (
  input  logic              clk,
  input  logic              rst_n,
  // host
  input  logic              ext_valid,
  output logic              ext_ready,
  input  nid_t              ext_id,
  input  logic              start,
  input  time_t             run_time,
  input  time_t             h_max,
  input  time_t             h_min,
  input  time_t             t_d,
  output logic              busy,
  output logic              done,
  output time_t             t_now,
  output logic [31:0]       n_events,
  output logic [31:0]       n_spikes,
  output logic [31:0]       n_expired,
  output logic [31:0]       n_trials,
  // event lists
  input  logic [DEL_AW:0]   del_count,
  output logic [DEL_AW-1:0] del_rd_idx,
  input  nid_t              del_rd_id,
  output logic              fel_push_valid,
  input  logic              fel_push_ready,
  output nid_t              fel_push_id,
  output time_t             fel_push_t,
  output logic              fel_rm_valid,
  output logic [FEL_AW-1:0] fel_rm_idx,
  output logic              fel_scan_start,
  input  logic              fel_scan_done,
  input  time_t             fel_min_t,
  input  nid_t              fel_min_id,
  input  logic [FEL_AW-1:0] fel_min_idx,
  input  logic [FEL_AW:0]   fel_count,
  // topology unit
  output logic              ntc_cmd_valid,
  input  logic              ntc_cmd_ready,
  output logic [2:0]        ntc_cmd_op,
  output nid_t              ntc_cmd_id,
  input  logic              topo_valid,
  output logic              topo_ready,
  input  logic [7:0]        topo_vec,
  input  logic              topo_self,
  // neuron state computation
  output logic              job_valid,
  input  logic              job_ready,
  output nid_t              job_id,
  output logic [NW-1:0]     job_xl,
  output logic              job_xk,
  output time_t             job_h,
  output logic              job_dry,
  input  logic              res_valid,
  output logic              res_ready,
  input  nid_t              res_id,
  input  logic              res_fired
);
  localparam logic [2:0] OP_TOPO = 3'd0, OP_FIRE = 3'd1, OP_STOP = 3'd2, OP_EXCITE = 3'd4;

  typedef enum logic [3:0] {
    Q_IDLE, Q_EXT, Q_SCAN, Q_SCANW, Q_EXPIRE, Q_PLAN, Q_PASS, Q_TOPO, Q_TOPOW,
    Q_DISP, Q_FEL, Q_FIRE, Q_NSP, Q_ADV, Q_DONE
  } qstate_t;
  qstate_t st_q;

  time_t             run_end_q, hmax_q, hmin_q, td_q, h_q, tmin_q;
  time_t             lo_q, hi_q;        // bisection bracket of the next spike
  logic              dry_q;             // current pass is a trial
  logic              any_fire_q;        // a neuron fired in this trial pass
  logic              fel_any_q;
  nid_t              exp_id_q;
  logic [FEL_AW-1:0] exp_idx_q;
  logic [DEL_AW:0]   ndel_q, k_q;
  logic [DEL_AW+1:0] outst_q;
  nid_t              cur_id_q;
  logic [NW-1:0]     xl_q;
  logic              xk_q;

  assign busy       = (st_q != Q_IDLE);
  assign done       = (st_q == Q_DONE);
  assign ext_ready  = (st_q == Q_EXT) && ntc_cmd_ready;
  assign del_rd_idx = DEL_AW'(k_q);

  always_comb begin
    ntc_cmd_valid  = 1'b0;
    ntc_cmd_op     = OP_TOPO;
    ntc_cmd_id     = cur_id_q;
    topo_ready     = (st_q == Q_TOPOW);
    job_valid      = (st_q == Q_DISP);
    job_id         = cur_id_q;
    job_xl         = xl_q;
    job_xk         = xk_q;
    job_h          = h_q;
    job_dry        = dry_q;
    fel_push_valid = (st_q == Q_FEL);
    fel_push_id    = res_id;
    fel_push_t     = t_now + h_q + td_q;
    fel_rm_valid   = 1'b0;
    fel_rm_idx     = exp_idx_q;
    fel_scan_start = (st_q == Q_SCAN);
    res_ready      = 1'b0;
    unique case (st_q)
      Q_EXT:    begin ntc_cmd_valid = 1'b1; ntc_cmd_op = OP_EXCITE; ntc_cmd_id = ext_id; end
      Q_EXPIRE: begin
        ntc_cmd_valid = 1'b1; ntc_cmd_op = OP_STOP; ntc_cmd_id = exp_id_q;
        fel_rm_valid  = ntc_cmd_ready;
      end
      Q_TOPO:   begin ntc_cmd_valid = 1'b1; ntc_cmd_op = OP_TOPO; ntc_cmd_id = cur_id_q; end
      Q_PASS:   res_ready = res_valid && (dry_q || !res_fired);
      Q_FIRE:   begin
        ntc_cmd_valid = 1'b1; ntc_cmd_op = OP_FIRE; ntc_cmd_id = res_id;
        res_ready     = ntc_cmd_ready;
      end
      default: ;
    endcase
  end

  // next bracket after a trial pass, and its width
  time_t new_lo, new_hi, width;
  assign new_lo = any_fire_q ? lo_q : h_q;
  assign new_hi = any_fire_q ? h_q  : hi_q;
  assign width  = new_hi - new_lo;

  // interval for this event
  time_t h_plan, to_end;
  always_comb begin
    to_end = run_end_q - t_now;
    h_plan = hmax_q;
    if (fel_any_q && (tmin_q - t_now) < h_plan) h_plan = tmin_q - t_now;
    if (to_end < h_plan) h_plan = to_end;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q      <= Q_IDLE;
      t_now     <= '0;
      n_events  <= '0;
      n_spikes  <= '0;
      n_expired <= '0;
      n_trials  <= '0;
      outst_q   <= '0;
      dry_q     <= 1'b0;
      k_q       <= '0;
    end else begin
      unique case (st_q)
        Q_IDLE: begin
          if (ext_valid) st_q <= Q_EXT;
          else if (start) begin
            st_q      <= Q_SCAN;
            t_now     <= '0;
            run_end_q <= run_time;
            hmax_q    <= h_max;
            hmin_q    <= h_min;
            td_q      <= t_d;
            n_events  <= '0;
            n_spikes  <= '0;
            n_expired <= '0;
            n_trials  <= '0;
          end
        end
        Q_EXT:   if (ntc_cmd_ready) st_q <= Q_IDLE;
        Q_SCAN:  st_q <= Q_SCANW;
        Q_SCANW: if (fel_scan_done) begin
          fel_any_q <= (fel_count != 0);
          tmin_q    <= fel_min_t;
          exp_id_q  <= fel_min_id;
          exp_idx_q <= fel_min_idx;
          if (fel_count != 0 && fel_min_t <= t_now) st_q <= Q_EXPIRE;
          else                                      st_q <= Q_PLAN;
        end
        Q_EXPIRE: if (ntc_cmd_ready) begin
          n_expired <= n_expired + 1'b1;
          st_q      <= Q_SCAN;
        end
        // wait until the topology unit has pushed the last projective field
        Q_PLAN: if (ntc_cmd_ready) begin
          h_q        <= h_plan;
          hi_q       <= h_plan;
          lo_q       <= '0;
          dry_q      <= 1'b1;
          any_fire_q <= 1'b0;
          n_trials   <= n_trials + 1'b1;
          ndel_q     <= del_count;
          k_q        <= '0;
          outst_q    <= '0;
          st_q       <= Q_PASS;
        end
        Q_PASS: begin
          if (res_valid) begin
            if (res_fired && !dry_q) st_q <= Q_FEL;
            else begin
              outst_q <= outst_q - 1'b1;
              if (res_fired) any_fire_q <= 1'b1;
            end
          end else if (k_q < ndel_q) begin
            cur_id_q <= del_rd_id;
            st_q     <= Q_TOPO;
          end else if (outst_q == '0) begin
            st_q <= dry_q ? Q_NSP : Q_ADV;
          end
        end
        // end of a trial pass: narrow the bracket, try its middle or update
        Q_NSP: begin
          lo_q       <= new_lo;
          hi_q       <= new_hi;
          any_fire_q <= 1'b0;
          k_q        <= '0;
          st_q       <= Q_PASS;
          if (width <= hmin_q || width <= time_t'(1)) begin
            h_q   <= new_hi;
            dry_q <= 1'b0;
          end else begin
            h_q      <= new_lo + (width >> 1);
            n_trials <= n_trials + 1'b1;
          end
        end
        Q_TOPO:  if (ntc_cmd_ready) st_q <= Q_TOPOW;
        Q_TOPOW: if (topo_valid) begin
          xl_q <= NW'(topo_vec);
          xk_q <= topo_self;
          st_q <= Q_DISP;
        end
        Q_DISP: if (job_ready) begin
          outst_q <= outst_q + 1'b1;
          k_q     <= k_q + 1'b1;
          st_q    <= Q_PASS;
        end else if (res_valid) begin
          // the owner channel is busy: take results first (the channel may
          // be waiting to hand one over), then fetch this neuron again
          st_q    <= Q_PASS;
        end
        Q_FEL:  if (fel_push_ready) st_q <= Q_FIRE;
        Q_FIRE: if (ntc_cmd_ready) begin
          outst_q  <= outst_q - 1'b1;
          n_spikes <= n_spikes + 1'b1;
          st_q     <= Q_PASS;
        end
        Q_ADV: begin
          t_now    <= t_now + h_q;
          n_events <= n_events + 1'b1;
          if (t_now + h_q >= run_end_q) st_q <= Q_DONE;
          else                          st_q <= Q_SCAN;
        end
        Q_DONE: st_q <= Q_IDLE;
        default: st_q <= Q_IDLE;
      endcase
    end
  end

endmodule
