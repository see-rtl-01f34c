// tb_nsc - the six-channel state computation on six behavioural weight
// memories (one refusing about a quarter of its requests). Every memory holds
// the same pointer table; the block of neuron k is only in memory k mod 6, so
// a neuron sent to the wrong channel reads an empty block. 36 jobs are
// offered back to back. Checks: every neuron is reported exactly once with the fire flag
// and potential of the double-precision model; all six channels are busy at
// the same time at least once; and the whole batch takes less than a quarter
// of the clocks one channel would need for it alone (six in parallel).
module tb_nsc;
  import see_pkg::*;
  import see_ref_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  localparam int NN = 36;
  localparam int NCH = 6;

  logic job_valid, job_ready, job_xk, job_dry, res_valid, res_ready, res_fired;
  nid_t job_id, res_id;
  logic [7:0] job_xl;
  time_t job_h;
  model_t gamma, mu, theta, res_a;
  logic [NCH-1:0] busy;
  logic mem_req [NCH], mem_we [NCH], mem_gnt [NCH], mem_rvalid [NCH];
  logic [26:0] mem_addr [NCH];
  logic [63:0] mem_wdata [NCH], mem_rdata [NCH];
  logic [1:0] mem_be [NCH];
  int checks = 0, failures = 0;

  nsc #(.NCH(NCH), .NW(8), .ROWS(2), .AW(27)) dut (.clk, .rst_n, .job_valid, .job_ready,
    .job_id, .job_xl, .job_xk, .job_h, .job_dry, .gamma, .mu, .theta, .res_valid, .res_ready, .res_id,
    .res_fired, .res_a, .busy, .mem_req, .mem_we, .mem_addr, .mem_wdata, .mem_be, .mem_gnt,
    .mem_rvalid, .mem_rdata);

  for (genvar c = 0; c < NCH; c++) begin : g_mem
    sdram_model #(.AW(27), .DEPTH_AW(10), .LAT(10), .STALL(c == 3)) u_mem (.clk, .rst_n,
      .req(mem_req[c]), .we(mem_we[c]), .addr(mem_addr[c]), .wdata(mem_wdata[c]),
      .be(mem_be[c]), .gnt(mem_gnt[c]), .rvalid(mem_rvalid[c]), .rdata(mem_rdata[c]));
  end

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [63:0] image [1024];
  int     nw   [NN];
  logic [7:0] xl [NN];
  logic   xk   [NN];
  time_t  hh   [NN];
  real    aref [NN];
  logic   fref [NN];
  int     seen [NN];
  int     all_busy = 0;
  int     cycles = 0;
  int     single = 0;

  always @(posedge clk) if (rst_n) begin
    cycles <= cycles + 1;
    if (&busy) all_busy <= all_busy + 1;
  end

  initial begin
    rvec_t y0, yr;
    model_t wa, ik;
    model_t ww [8];
    int base, got, p, start_cyc;
    real err;
    job_valid = 0; job_id = 0; job_xl = 0; job_xk = 0; job_h = 0; job_dry = 0; res_ready = 1;
    gamma = r2m(0.1); mu = r2m(0.3); theta = ONE_M;
    for (int w = 0; w < 1024; w++) image[w] = 64'h0;
    for (int k = 0; k < NN; k++) begin
      nw[k] = 1 + $urandom % 8;
      base  = 64 + 8 * k;
      wa    = model_t'($urandom % 200000);
      ik    = model_t'($urandom % 262144);
      for (int j = 0; j < 8; j++) ww[j] = r2m(0.12) - model_t'($urandom % 30000);
      if (k % 2 == 0) image[k / 2][31:0] = 32'(base * 8);
      else            image[k / 2][63:32] = 32'(base * 8);
      image[base] = nib_header(nw[k], ik);
      image[base + 1] = pack2(wa, ww[0]);
      for (int w = 2; 2 * w - 3 < nw[k]; w++)
        image[base + w] = pack2(ww[2 * w - 3], ww[(2 * w - 2) % 8]);
      xl[k] = 8'($urandom);
      xk[k] = ($urandom % 5) == 0;
      hh[k] = time_t'(131072 + $urandom % 131072);
      for (int j = 0; j < 8; j++) y0[j] = m2r(ww[j]);
      y0[8] = m2r(wa);
      yr = bs_step(y0, 2, t2r(hh[k]), nw[k], xl[k], xk[k], m2r(ik), 0.1, 0.3, 1.0);
      fref[k] = yr[8] >= 1.0;
      aref[k] = fref[k] ? 0.0 : yr[8];
      seen[k] = 0;
      // clocks a single channel needs for this neuron (no memory stalls)
      p = (nw[k] + 1) / 2;
      single += 30 + nw[k] / 2 + 1;
      for (int i = 0; i < 2; i++) single += 1 + (2 * (i + 1) + 1) * (p + 12) + 4 + p + i * ((p + 3) / 4) * 4;
    end
    // pointer table in every memory; neuron k's block only in memory k mod 6
    for (int w = 0; w < 1024; w++) begin
      int c;
      c = (w < 64) ? -1 : ((w - 64) / 8) % NCH;
      g_mem[0].u_mem.mem[w] = (c < 0 || c == 0) ? image[w] : 64'h0;
      g_mem[1].u_mem.mem[w] = (c < 0 || c == 1) ? image[w] : 64'h0;
      g_mem[2].u_mem.mem[w] = (c < 0 || c == 2) ? image[w] : 64'h0;
      g_mem[3].u_mem.mem[w] = (c < 0 || c == 3) ? image[w] : 64'h0;
      g_mem[4].u_mem.mem[w] = (c < 0 || c == 4) ? image[w] : 64'h0;
      g_mem[5].u_mem.mem[w] = (c < 0 || c == 5) ? image[w] : 64'h0;
    end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    start_cyc = cycles;
    fork
      begin
        for (int k = 0; k < NN; k++) begin
          @(negedge clk);
          job_valid = 1;
          job_id = nid_t'(k);
          job_xl = xl[k];
          job_xk = xk[k];
          job_h  = hh[k];
          #1;
          while (!job_ready) @(negedge clk);
          @(posedge clk);
        end
        @(negedge clk);
        job_valid = 0;
      end
      begin
        got = 0;
        while (got < NN) begin
          @(posedge clk);
          if (res_valid && res_ready) begin
            got++;
            if (int'(res_id) >= NN) begin
              failures++;
              $display("unknown neuron %0d", res_id);
            end else begin
              seen[res_id]++;
              if ((yr_near(res_id)) == 0) begin
                checks++;
                err = m2r(res_a) - aref[res_id];
                if (res_fired != fref[res_id] || err > 2.0e-3 || err < -2.0e-3) begin
                  failures++;
                  $display("neuron %0d: fired %b a %f, reference %b %f", res_id, res_fired,
                           m2r(res_a), fref[res_id], aref[res_id]);
                end
              end
            end
          end
        end
      end
    join
    for (int k = 0; k < NN; k++) begin
      checks++;
      if (seen[k] != 1) begin failures++; $display("neuron %0d reported %0d times", k, seen[k]); end
    end
    checks++;
    if (all_busy == 0) begin failures++; $display("never all channels busy"); end
    checks++;
    if ((cycles - start_cyc) * 4 > single) begin
      failures++;
      $display("batch took %0d clocks, one channel alone %0d", cycles - start_cyc, single);
    end
    $display("batch %0d clocks, one channel alone %0d, all busy %0d clocks",
             cycles - start_cyc, single, all_busy);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // a potential within 2e-3 of the threshold may round either way: not checked
  function automatic int yr_near(input nid_t k);
    real d;
    d = fref[k] ? 0.0 : aref[k] - 1.0;
    if (!fref[k] && d > -2.0e-3) return 1;
    return 0;
  endfunction
endmodule
