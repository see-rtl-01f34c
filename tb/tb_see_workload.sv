// tb_see_workload - the smallest network of the published evaluation run on
// the engine: a single 32 x 32 layer with 4-nearest-neighbour connections
// (NWT = 4; set NWT = 8 for the 8-nearest-neighbour network), every neuron
// with its weights in the six behavioural weight memories (one refusing
// about a quarter of its requests). The 48 x 48 and 64 x 64 networks differ
// only in the grid size. The evaluation ran 1000 ms of model time; this
// bench runs 3 time units, long enough for spikes, expiries and the spread of
// excitation, and prints the integrations and clocks it took.
// Every neuron has NWT weights, W(0) = 0.12, and a random a(0) in [0, 1);
// sixteen neurons, one in each 8 x 8 tile, get an input stimulus i_K = 0.6
// and are marked excited before the run. Parameters gamma = 0.1, mu = 0.3,
// theta = 1, t_d = 1.1, h_max = 0.25, h_min = 1/64.
// Checks, as in tb_see_top: every integration (trial and update) against
// the double-precision Bulirsch-Stoer model started from the block in memory
// at dispatch; trial jobs leave memory unchanged; time ends at the run time;
// the spike counter matches the firing update results; and each mechanism
// (spikes, spikes located by bisection, expiries, projective fields,
// topology vectors, sending neurons, weight growth and decay, all channels
// busy, refused memory requests, FEL-limited intervals) must occur.
module tb_see_workload;
  import see_pkg::*;
  import see_ref_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  // grid (the whole grid is the network), weights per neuron, memory depth
  localparam int XB = 5, YB = 5, X0 = 0, Y0 = 0, R = 32, NWT = 4, DAW = 14, NSTIM = 16;
  localparam int NB = XB + YB, NCH = 6;
  localparam int PT = 2 ** (NB - 1);               // first word after the pointer table
  localparam time_t HMAX = time_t'(32'h1_0000);    // 0.25
  localparam time_t TD   = time_t'(32'h4_6666);    // 1.1
  localparam time_t HMIN = time_t'(32'h1000);      // 1/64
  localparam time_t RUN  = time_t'(32'h0C_0000);   // 3.0

  logic  ready, busy, done, ext_valid, ext_ready, start, del_overflow, fel_overflow;
  nid_t  ext_id;
  time_t t_now;
  logic [31:0] n_events, n_spikes, n_expired, n_trials;
  logic [NB:0] del_count, fel_count;
  logic [NCH-1:0] nsc_busy;
  logic        mem_req [NCH], mem_we [NCH], mem_gnt [NCH], mem_rvalid [NCH];
  logic [26:0] mem_addr [NCH];
  logic [63:0] mem_wdata [NCH], mem_rdata [NCH];
  logic [1:0]  mem_be [NCH];
  model_t gamma, mu, theta;
  int checks = 0, failures = 0;

  see_top #(.XB(XB), .YB(YB), .NCH(NCH), .ROWS(2), .AW(27)) dut (
    .clk, .rst_n, .scheme(NWT == 4 ? CONN_NN4 : CONN_NN8), .gamma, .mu, .theta,
    .ext_valid, .ext_ready, .ext_id, .start, .run_time(RUN), .h_max(HMAX), .h_min(HMIN), .t_d(TD),
    .ready, .busy, .done, .t_now, .n_events, .n_spikes, .n_expired, .n_trials,
    .del_count, .fel_count, .del_overflow, .fel_overflow, .nsc_busy,
    .mem_req, .mem_we, .mem_addr, .mem_wdata, .mem_be, .mem_gnt, .mem_rvalid, .mem_rdata);

  for (genvar c = 0; c < NCH; c++) begin : g_mem
    sdram_model #(.AW(27), .DEPTH_AW(DAW), .LAT(10), .STALL(c == 2)) u_mem (.clk, .rst_n,
      .req(mem_req[c]), .we(mem_we[c]), .addr(mem_addr[c]), .wdata(mem_wdata[c]),
      .be(mem_be[c]), .gnt(mem_gnt[c]), .rvalid(mem_rvalid[c]), .rdata(mem_rdata[c]));
  end

  initial begin
    #60000000;
    $display("state %0d t_now %0h del %0d fel %0d jobs %0d res %0d busy %b", dut.u_ctrl.st_q, t_now, del_count, fel_count, n_job, n_res, nsc_busy);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ memories
  function automatic logic [63:0] rd(input int c, input int w);
    case (c)
      0: return g_mem[0].u_mem.mem[w];
      1: return g_mem[1].u_mem.mem[w];
      2: return g_mem[2].u_mem.mem[w];
      3: return g_mem[3].u_mem.mem[w];
      4: return g_mem[4].u_mem.mem[w];
      default: return g_mem[5].u_mem.mem[w];
    endcase
  endfunction

  task automatic wr(input int c, input int w, input logic [63:0] v);
    case (c)
      0: g_mem[0].u_mem.mem[w] = v;
      1: g_mem[1].u_mem.mem[w] = v;
      2: g_mem[2].u_mem.mem[w] = v;
      3: g_mem[3].u_mem.mem[w] = v;
      4: g_mem[4].u_mem.mem[w] = v;
      default: g_mem[5].u_mem.mem[w] = v;
    endcase
  endtask

  // region index of a neuron, -1 outside the prepared region
  function automatic int reg_of(input int id);
    int x = id % (2 ** XB), y = id / (2 ** XB);
    if (x < X0 || x >= X0 + R || y < Y0 || y >= Y0 + R) return -1;
    return (y - Y0) * R + (x - X0);
  endfunction

  // block word address of a neuron: the region blocks, or one shared empty block
  function automatic int blk_of(input int id);
    return (reg_of(id) < 0) ? PT : PT + 8 + 8 * reg_of(id);
  endfunction

  function automatic real vw(input logic [31:0] v);
    return m2r(v[19:0]);
  endfunction

  // ------------------------------------------------------------ monitor
  int stim [NSTIM];
  rvec_t y0q [int];
  rvec_t yrq [int];
  int    nq  [int];
  logic  dq  [int];
  int m_tfire = 0;
  int m_spike = 0, m_expire = 0, m_proj = 0, m_topo = 0, m_xk = 0, m_grow = 0, m_decay = 0;
  int m_allbusy = 0, m_stall = 0, m_felh = 0, n_res = 0, n_job = 0;

  task automatic check(input logic ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("%0t %s", $time, msg);
    end
  endtask

  always @(posedge clk) if (rst_n) begin
    if (&nsc_busy) m_allbusy++;
    for (int c = 0; c < NCH; c++) if (mem_req[c] && !mem_gnt[c]) m_stall++;
    if (dut.job_valid && dut.job_ready) begin
      automatic int id = int'(dut.job_id), c = int'(dut.job_id) % NCH, b = blk_of(int'(dut.job_id));
      automatic logic [63:0] hdr = rd(c, b);
      automatic rvec_t y0;
      automatic int n = int'(hdr[15:0]);
      for (int j = 0; j < 8; j++) y0[j] = 0.0;
      y0[8] = vw(rd(c, b + 1));
      for (int j = 0; j < n; j++)
        y0[j] = (j == 0) ? vw(rd(c, b + 1) >> 32) : vw(rd(c, b + 1 + (j + 1) / 2) >> (((j + 1) % 2) * 32));
      y0q[id] = y0;
      nq[id]  = n;
      dq[id]  = dut.job_dry;
      yrq[id] = bs_step(y0, 2, t2r(dut.job_h), n, dut.job_xl, dut.job_xk, m2r(hdr[51:32]),
                        0.1, 0.3, 1.0);
      n_job++;
      if (dut.job_xl != 0) m_topo++;
      if (dut.job_xk) m_xk++;
      if (dut.job_dry && dut.u_ctrl.lo_q == '0 && dut.job_h == dut.u_ctrl.hi_q &&
          dut.job_h < HMAX && dut.job_h < RUN - t_now) m_felh++;
    end
    if (dut.res_valid && dut.res_ready) begin
      automatic int id = int'(dut.res_id), c = int'(dut.res_id) % NCH, b = blk_of(int'(dut.res_id));
      automatic rvec_t yr = yrq[id];
      automatic logic fref = yr[8] >= 1.0;
      automatic real w;
      n_res++;
      if (dut.res_fired && !dq[id]) m_spike++;
      if (dut.res_fired && dq[id])  m_tfire++;
      if (dq[id]) begin
        check(vw(rd(c, b + 1)) == y0q[id][8], $sformatf("neuron %0d: trial wrote a back", id));
        for (int j = 0; j < nq[id]; j++) begin
          w = (j == 0) ? vw(rd(c, b + 1) >> 32) : vw(rd(c, b + 1 + (j + 1) / 2) >> (((j + 1) % 2) * 32));
          check(w == y0q[id][j], $sformatf("neuron %0d: trial wrote W%0d back", id, j));
        end
      end
      if (yr[8] - 1.0 > 2.0e-3 || yr[8] - 1.0 < -2.0e-3) begin
        check(dut.res_fired == fref && (m2r(dut.res_a) - (fref ? 0.0 : yr[8])) < 2.0e-3 &&
              (m2r(dut.res_a) - (fref ? 0.0 : yr[8])) > -2.0e-3,
              $sformatf("neuron %0d: fired %b a %f, model %f", id, dut.res_fired,
                        m2r(dut.res_a), yr[8]));
        if (!dq[id])
          check(vw(rd(c, b + 1)) == m2r(dut.res_a), $sformatf("neuron %0d: a not written back", id));
      end
      if (!dq[id]) for (int j = 0; j < nq[id]; j++) begin
        w = (j == 0) ? vw(rd(c, b + 1) >> 32) : vw(rd(c, b + 1 + (j + 1) / 2) >> (((j + 1) % 2) * 32));
        check(w - yr[j] < 2.0e-3 && w - yr[j] > -2.0e-3,
              $sformatf("neuron %0d: W%0d %f, model %f", id, j, w, yr[j]));
        if (w > y0q[id][j]) m_grow++;
        if (w < y0q[id][j]) m_decay++;
      end
    end
  end

  // ------------------------------------------------------------ stimulus
  initial begin
    automatic int b;
    automatic logic [63:0] v;
    gamma = r2m(0.1); mu = r2m(0.3); theta = ONE_M;
    ext_valid = 0; ext_id = '0; start = 0;
    for (int k = 0; k < NSTIM; k++)
      stim[k] = (Y0 + 8 * (k / 4) + 2 + k % 3) * 2 ** XB + X0 + 8 * (k % 4) + 3 + k % 4;
    // pointer tables and the shared empty block in every memory
    for (int c = 0; c < NCH; c++) begin
      for (int w = 0; w < 2 ** DAW; w++) wr(c, w, 64'h0);
      for (int id = 0; id < 2 ** NB; id += 2)
        wr(c, id / 2, {32'(blk_of(id + 1) * 8), 32'(blk_of(id) * 8)});
      wr(c, PT, nib_header(0, '0));
    end
    // region blocks, each in the memory of its owner channel
    for (int y = 0; y < R; y++)
      for (int x = 0; x < R; x++) begin
        automatic int id = (Y0 + y) * 2 ** XB + X0 + x;
        automatic logic is_stim = 1'b0;
        for (int k = 0; k < NSTIM; k++) if (id == stim[k]) is_stim = 1'b1;
        b = blk_of(id);
        wr(id % NCH, b, nib_header(16'(NWT), is_stim ? r2m(0.6) : '0));
        wr(id % NCH, b + 1, pack2(model_t'($urandom % 262144), r2m(0.12)));
        // word k >= 2 holds weights 2k-3 and 2k-2
        for (int k = 2; 2 * k - 3 < NWT; k++)
          wr(id % NCH, b + k, pack2(r2m(0.12), (2 * k - 2 < NWT) ? r2m(0.12) : '0));
      end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    while (!ready) @(negedge clk);
    for (int k = 0; k < NSTIM; k++) begin
      ext_valid = 1; ext_id = nid_t'(stim[k]);
      @(posedge clk);
      while (!ext_ready) @(posedge clk);
      @(negedge clk);
      ext_valid = 0;
      repeat (3) @(negedge clk);
    end
    check(int'(del_count) == NSTIM, "stimulated neurons not all in the DEL");
    start = 1;
    @(negedge clk);
    start = 0;
    while (!done) @(negedge clk);
    m_expire = int'(n_expired);
    m_proj   = int'(del_count) - NSTIM;
    check(t_now == RUN, "run did not end at the run time");
    check(n_job == n_res, "jobs without result");
    check(int'(n_spikes) == m_spike, $sformatf("spike counter %0d, results %0d", n_spikes, m_spike));
    check(!del_overflow && !fel_overflow, "list overflow");
    check(m_spike > 0, "no spike");
    check(m_tfire > 0 && n_trials > n_events, "no spike located by bisection");
    check(m_expire > 0, "no expiry");
    check(m_proj > 0, "no neuron added by a projective field");
    check(m_topo > 0, "no non-zero topology vector");
    check(m_xk > 0, "no job of a sending neuron");
    check(m_grow > 0, "no weight growth");
    check(m_decay > 0, "no weight decay");
    check(m_allbusy > 0, "never all channels busy");
    check(m_stall > 0, "no refused memory request");
    check(m_felh > 0, "no interval cut by the FEL");
    $display("events %0d jobs %0d spikes %0d expiries %0d DEL adds %0d topo %0d X_K %0d",
             n_events, n_job, m_spike, m_expire, m_proj, m_topo, m_xk);
    $display("trial passes %0d trial fires %0d", n_trials, m_tfire);
    $display("grow %0d decay %0d all-busy %0d stalls %0d FEL-cut %0d clocks %0d",
             m_grow, m_decay, m_allbusy, m_stall, m_felh, $time / 10);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
