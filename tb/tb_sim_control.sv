// tb_sim_control - event sequencer with the real event lists and topology
// unit on a 4 x 4 grid (4-nearest-neighbour) and a behavioural state
// computation: it accepts jobs with random stalls and answers in order after
// 1..8 clocks. Each neuron of the model holds a charge that grows at a rate
// set by its index and its number of sending neighbours while it is
// receiving; it fires when the charge reaches 1. A trial job only reports
// whether the charge would reach 1 within H; an update job commits it.
// The testbench keeps its own model of the sending neurons, the fire event
// list and the excited set, and checks: X_K and the topology vector of every
// job, that every pass dispatches each excited neuron exactly once, the
// planned interval min(h_max, earliest end time - now, run end - now), the
// trial interval of every bisection step of the next-spike phase and the
// interval it commits, that time advances by the committed interval, the
// FEL entry of every firing neuron (now + H + t_d), that expiries come out
// earliest first once due, and the final counters.
module tb_sim_control;
  import see_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  localparam int XB = 2, YB = 2, LAW = 4, NN = 16;
  localparam time_t HMAX = time_t'(32'h1_0000);   // 0.25
  localparam time_t TD   = time_t'(32'h4_6666);   // 1.1
  localparam time_t RUN  = time_t'(32'h28_0000);  // 10.0
  localparam time_t HMIN = time_t'(32'h1000);     // 1/64

  // host
  logic  ext_valid, ext_ready, start, busy, done;
  nid_t  ext_id;
  time_t t_now;
  logic [31:0] n_events, n_spikes, n_expired, n_trials;
  // lists
  logic [LAW:0]   del_count, fel_count;
  logic [LAW-1:0] del_rd_idx, fel_rm_idx, fel_min_idx;
  nid_t           del_rd_id, fel_push_id, fel_min_id;
  logic           del_push_ready, del_overflow, fel_overflow;
  logic           fel_push_valid, fel_push_ready, fel_rm_valid, fel_scan_start, fel_scan_busy, fel_scan_done;
  time_t          fel_push_t, fel_min_t;
  // topology
  logic           clearing, ntc_cmd_valid, ntc_cmd_ready, topo_valid, topo_ready, topo_self;
  logic [2:0]     ntc_cmd_op;
  nid_t           ntc_cmd_id, topo_id, ntc_del_id;
  logic [7:0]     topo_vec;
  logic           ntc_del_valid;
  // state computation
  logic           job_valid, job_ready, job_xk, res_valid, res_ready, res_fired;
  nid_t           job_id, res_id;
  logic [NMAX-1:0] job_xl;
  time_t          job_h;
  logic           job_dry;

  int checks = 0, failures = 0;

  event_lists #(.DEL_AW(LAW), .FEL_AW(LAW)) u_lists (
    .clk, .rst_n,
    .del_push_valid(ntc_del_valid), .del_push_ready, .del_push_id(ntc_del_id),
    .del_rm_valid(1'b0), .del_rm_idx('0), .del_rd_idx, .del_rd_id,
    .del_count, .del_overflow,
    .fel_push_valid, .fel_push_ready, .fel_push_id, .fel_push_t,
    .fel_rm_valid, .fel_rm_idx, .fel_scan_start, .fel_scan_busy, .fel_scan_done,
    .fel_min_t, .fel_min_id, .fel_min_idx, .fel_count, .fel_overflow);

  ntc #(.XB(XB), .YB(YB)) u_ntc (
    .clk, .rst_n, .scheme(CONN_NN4), .clearing,
    .cmd_valid(ntc_cmd_valid), .cmd_ready(ntc_cmd_ready), .cmd_op(ntc_cmd_op),
    .cmd_id(ntc_cmd_id),
    .topo_valid, .topo_ready, .topo_id, .topo_vec, .topo_self,
    .del_valid(ntc_del_valid), .del_ready(del_push_ready), .del_id(ntc_del_id));

  sim_control #(.DEL_AW(LAW), .FEL_AW(LAW), .NW(NMAX)) dut (
    .clk, .rst_n,
    .ext_valid(ext_valid && !clearing), .ext_ready, .ext_id, .start,
    .run_time(RUN), .h_max(HMAX), .h_min(HMIN), .t_d(TD),
    .busy, .done, .t_now, .n_events, .n_spikes, .n_expired, .n_trials,
    .del_count, .del_rd_idx, .del_rd_id,
    .fel_push_valid, .fel_push_ready, .fel_push_id, .fel_push_t,
    .fel_rm_valid, .fel_rm_idx, .fel_scan_start, .fel_scan_done,
    .fel_min_t, .fel_min_id, .fel_min_idx, .fel_count,
    .ntc_cmd_valid, .ntc_cmd_ready, .ntc_cmd_op, .ntc_cmd_id,
    .topo_valid, .topo_ready, .topo_vec, .topo_self,
    .job_valid, .job_ready, .job_id, .job_xl, .job_xk, .job_h, .job_dry,
    .res_valid, .res_ready, .res_id, .res_fired);

  initial begin
    #5000000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------ behavioural state computation
  typedef struct { nid_t id; logic fired; logic dry; int due; } res_t;
  res_t rq [$];
  int   cyc = 0;
  real  charge [NN];
  always @(posedge clk) cyc <= cyc + 1;

  always_ff @(posedge clk) job_ready <= ($urandom % 10) < 7;
  assign res_valid = rq.size() > 0 && rq[0].due <= cyc;
  assign res_id    = (rq.size() > 0) ? rq[0].id : '0;
  assign res_fired = (rq.size() > 0) ? rq[0].fired : 1'b0;

  // ------------------------------------------------ reference model
  logic  snd [NN];      // sending
  logic  exc [NN];      // excited (in the DEL)
  nid_t  fid [$];       // fire event list
  time_t fend [$];
  logic  seen [NN];
  int    jobs_in_pass = 0, res_in_pass = 0, n_exc_pass = 0;
  time_t h_pass, t_last;            // committed interval of the event
  time_t h_job, lo, hi;             // expected job interval, bisection bracket
  logic  exp_dry = 1'b1, evt_start = 1'b1, any_fire = 1'b0;
  int    n_fire = 0, n_stop = 0, n_pass = 0, n_fel_limited = 0, n_proj = 0, n_jobs = 0;
  int    n_trial = 0, n_bisect = 0;

  // the model: rate of charge per time unit, 0 while sending
  function automatic real rate(input nid_t id, input logic xk, input logic [NMAX-1:0] xl);
    return xk ? 0.0 : 0.4 + 0.1 * real'(int'(id) % 4) + 0.5 * real'($countones(xl));
  endfunction

  function automatic int nb(input nid_t id, input int j);   // W, E, N, S
    int x = int'(id) % 4, y = int'(id) / 4;
    case (j)
      0: x--; 1: x++; 2: y--; default: y++;
    endcase
    return (x < 0 || x > 3 || y < 0 || y > 3) ? -1 : y * 4 + x;
  endfunction

  function automatic time_t exp_h();
    time_t h = HMAX;
    foreach (fend[i]) if (fend[i] - t_now < h) h = fend[i] - t_now;
    if (RUN - t_now < h) h = RUN - t_now;
    return h;
  endfunction

  function automatic int n_excited();
    int c = 0;
    foreach (exc[i]) c += exc[i];
    return c;
  endfunction

  task automatic check(input logic ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("%0t %s", $time, msg);
    end
  endtask

  always @(posedge clk) if (rst_n) begin
    // jobs
    if (job_valid && job_ready) begin
      automatic logic [NMAX-1:0] xl = '0;
      automatic int n;
      for (int j = 0; j < 4; j++) begin
        n = nb(job_id, j);
        xl[j] = (n >= 0) ? snd[n] : 1'b0;
      end
      if (jobs_in_pass == 0) begin
        if (evt_start) begin
          foreach (fend[i]) check(fend[i] > t_now, "FEL entry due but not expired");
          h_job = exp_h();
          lo = '0; hi = h_job; exp_dry = 1'b1; evt_start = 1'b0;
          if (h_job < HMAX && h_job < RUN - t_now) n_fel_limited++;
          n_trial++;
        end
        n_exc_pass = n_excited();
        foreach (seen[i]) seen[i] = 1'b0;
        any_fire = 1'b0;
        res_in_pass = 0;
      end
      jobs_in_pass++;
      n_jobs++;
      check(int'(job_id) < NN && exc[int'(job_id) % NN] && !seen[int'(job_id) % NN], $sformatf("job %0d not excited or repeated", job_id));
      seen[int'(job_id) % NN] = 1'b1;
      check(job_xk == snd[int'(job_id) % NN], $sformatf("job %0d X_K %0d", job_id, job_xk));
      check(job_xl == xl, $sformatf("job %0d X_L %b, expected %b", job_id, job_xl, xl));
      check(job_h == h_job && job_dry == exp_dry,
            $sformatf("job H %0h dry %0d, expected %0h %0d", job_h, job_dry, h_job, exp_dry));
      begin
        automatic int  i = int'(job_id) % NN;
        automatic real c = charge[i] + rate(job_id, job_xk, job_xl) * real'(job_h) / 262144.0;
        automatic logic f = (c >= 1.0);
        if (!job_dry) charge[i] = f ? 0.0 : c;
        if (!job_dry) h_pass = job_h;
        rq.push_back('{id: job_id, fired: f, dry: job_dry, due: cyc + 1 + $urandom % 8});
      end
    end
    if (res_valid && res_ready) begin
      if (rq[0].dry && rq[0].fired) any_fire = 1'b1;
      void'(rq.pop_front());
      res_in_pass++;
      // end of a trial pass: the next trial or the committed interval
      if (exp_dry && res_in_pass == n_exc_pass && jobs_in_pass == n_exc_pass) begin
        automatic time_t nlo = any_fire ? lo : h_job;
        automatic time_t nhi = any_fire ? h_job : hi;
        lo = nlo; hi = nhi;
        if (nhi - nlo <= HMIN || nhi - nlo <= 1) begin
          exp_dry = 1'b0;
          h_job   = nhi;
        end else begin
          h_job = nlo + ((nhi - nlo) >> 1);
          n_trial++;
          n_bisect++;
        end
        jobs_in_pass = 0;
      end
    end
    // FEL entry of a firing neuron
    if (fel_push_valid && fel_push_ready)
      check(fel_push_t == t_now + h_pass + TD && fel_push_id == res_id && res_fired,
            $sformatf("FEL push %0d @%0h", fel_push_id, fel_push_t));
    // topology commands
    if (ntc_cmd_valid && ntc_cmd_ready) begin
      case (ntc_cmd_op)
        3'd4: exc[int'(ntc_cmd_id) % NN] = 1'b1;
        3'd1: begin
          check(res_valid && res_fired && res_id == ntc_cmd_id, "FIRE without firing result");
          snd[int'(ntc_cmd_id) % NN] = 1'b1;
          fid.push_back(ntc_cmd_id);
          fend.push_back(t_now + h_pass + TD);
          check(!exp_dry, "FIRE during a trial pass");
          for (int j = 0; j < 4; j++)
            if (nb(ntc_cmd_id, j) >= 0 && !exc[nb(ntc_cmd_id, j)]) begin
              exc[nb(ntc_cmd_id, j)] = 1'b1;
              n_proj++;
            end
          n_fire++;
        end
        3'd2: begin
          automatic int best = -1, hit = -1;
          foreach (fend[i]) if (best < 0 || fend[i] < fend[best]) best = i;
          foreach (fid[i]) if (best >= 0 && fid[i] == ntc_cmd_id && fend[i] == fend[best]) hit = i;
          check(hit >= 0 && fend[best] <= t_now,
                $sformatf("STOP %0d not the earliest due entry", ntc_cmd_id));
          if (hit >= 0) begin fid.delete(hit); fend.delete(hit); end
          snd[int'(ntc_cmd_id) % NN] = 1'b0;
          n_stop++;
        end
        default: ;
      endcase
    end
  end

  // event end: time advances by the committed interval after an update pass
  // that covered the excited set
  always @(t_now) if (rst_n && busy) begin
    check(!exp_dry && !evt_start, "time advanced without an update pass");
    check(t_now == t_last + h_pass, $sformatf("t_now %0h, expected %0h", t_now, t_last + h_pass));
    check(jobs_in_pass == n_exc_pass, $sformatf("pass had %0d jobs, %0d excited", jobs_in_pass, n_exc_pass));
    t_last = t_now;
    jobs_in_pass = 0;
    evt_start = 1'b1;
    n_pass++;
  end

  initial begin
    ext_valid = 0; ext_id = '0; start = 0;
    foreach (snd[i]) begin snd[i] = 0; exc[i] = 0; charge[i] = 0.0; end
    t_last = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    while (clearing) @(negedge clk);
    foreach (ext_id_list[i]) begin
      ext_valid = 1; ext_id = ext_id_list[i];
      @(posedge clk);
      while (!ext_ready) @(posedge clk);
      @(negedge clk);
      ext_valid = 0;
      repeat (4) @(negedge clk);
    end
    start = 1;
    @(negedge clk);
    start = 0;
    while (!done) @(negedge clk);
    check(t_now == RUN, "run did not end at run_time");
    check(n_spikes == n_fire && n_expired == n_stop && n_events == n_pass &&
          n_trials == n_trial,
          $sformatf("counters %0d/%0d/%0d/%0d vs %0d/%0d/%0d/%0d", n_spikes, n_expired,
                    n_events, n_trials, n_fire, n_stop, n_pass, n_trial));
    check(int'(del_count) == n_excited(), "DEL count");
    check(int'(fel_count) == fid.size(), "FEL count");
    check(n_fire > 0 && n_stop > 0 && n_fel_limited > 0 && n_proj > 0 && n_bisect > 0,
          "a mechanism never happened");
    $display("events %0d jobs %0d spikes %0d expiries %0d FEL-limited %0d DEL adds %0d trials %0d bisection steps %0d",
             n_pass, n_jobs, n_fire, n_stop, n_fel_limited, n_proj, n_trial, n_bisect);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  nid_t ext_id_list [2] = '{nid_t'(5), nid_t'(10)};
endmodule
