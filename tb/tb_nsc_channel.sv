// tb_nsc_channel - one state-computation channel on a behavioural weight
// memory (10-clock latency). 24 neurons with random weight counts, stimuli,
// potentials and topology bits are placed behind a pointer table; each job
// must return the fire flag and potential of the double-precision model
// (a neuron at or above theta = 1 fires and restarts from 0), write the new
// potential and weights back into its information block within 2e-3, leave
// the padding half of the last word untouched, and take exactly
//   10 + 2*10 + T_BS + (floor(n/2) + 1)    clocks from job to result.
// Each neuron is first run as a trial job (job_dry): same results, no
// write-back (the block must be unchanged) and floor(n/2) + 1 clocks less.
module tb_nsc_channel;
  import see_pkg::*;
  import see_ref_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  localparam int NN = 24;
  localparam int LAT = 10;

  logic job_valid, job_ready, job_xk, job_dry, res_valid, res_ready, res_fired;
  nid_t job_id, res_id;
  logic [7:0] job_xl;
  time_t job_h;
  model_t gamma, mu, theta, res_a;
  logic mem_req, mem_we, mem_gnt, mem_rvalid;
  logic [26:0] mem_addr;
  logic [63:0] mem_wdata, mem_rdata;
  logic [1:0] mem_be;
  int checks = 0, failures = 0;

  nsc_channel #(.NW(8), .ROWS(2), .AW(27)) dut (.clk, .rst_n, .job_valid, .job_ready, .job_id,
    .job_xl, .job_xk, .job_h, .job_dry, .gamma, .mu, .theta, .res_valid, .res_ready, .res_id, .res_fired,
    .res_a, .mem_req, .mem_we, .mem_addr, .mem_wdata, .mem_be, .mem_gnt, .mem_rvalid, .mem_rdata);

  sdram_model #(.AW(27), .DEPTH_AW(12), .LAT(LAT)) u_mem (.clk, .rst_n, .req(mem_req), .we(mem_we),
    .addr(mem_addr), .wdata(mem_wdata), .be(mem_be), .gnt(mem_gnt), .rvalid(mem_rvalid),
    .rdata(mem_rdata));

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int     nw   [NN];
  int     base [NN];
  model_t wa   [NN];
  model_t ww   [NN][8];
  model_t ik   [NN];

  function automatic real absr(input real r);
    return (r < 0) ? -r : r;
  endfunction

  initial begin
    rvec_t y0, yr;
    int cyc, p, tbs, texp, nfired;
    logic fired_ref;
    real aref;
    job_valid = 0; job_id = 0; job_xl = 0; job_xk = 0; job_h = 0; job_dry = 0; res_ready = 1;
    gamma = r2m(0.1); mu = r2m(0.3); theta = ONE_M;
    nfired = 0;
    for (int w = 0; w < 4096; w++) u_mem.mem[w] = 64'hDEAD_BEEF_0000_0000 | 64'(w);
    // pointer table, then the blocks at 8-byte aligned byte addresses
    for (int k = 0; k < NN; k++) begin
      nw[k]   = 1 + $urandom % 8;
      base[k] = 64 + 8 * k;
      wa[k]   = model_t'($urandom % 200000);
      ik[k]   = model_t'($urandom % 262144);
      for (int j = 0; j < 8; j++) ww[k][j] = r2m(0.12) - model_t'($urandom % 30000);
      if (k % 2 == 0) u_mem.mem[k / 2][31:0] = 32'(base[k] * 8);
      else            u_mem.mem[k / 2][63:32] = 32'(base[k] * 8);
      u_mem.mem[base[k]] = nib_header(nw[k], ik[k]);
      u_mem.mem[base[k] + 1] = pack2(wa[k], ww[k][0]);
      for (int w = 2; 2 * w - 3 < nw[k]; w++)
        u_mem.mem[base[k] + w] = pack2(ww[k][2 * w - 3], (2 * w - 2 < nw[k]) ? ww[k][2 * w - 2] : 20'sh5A5A5);
    end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < NN; k++) begin
      @(negedge clk);
      job_id = nid_t'(k);
      job_xl = 8'($urandom);
      job_xk = ($urandom % 5) == 0;
      job_h  = time_t'(131072 + $urandom % 131072);
      for (int j = 0; j < 8; j++) y0[j] = m2r(ww[k][j]);
      y0[8] = m2r(wa[k]);
      yr = bs_step(y0, 2, t2r(job_h), nw[k], job_xl, job_xk, m2r(ik[k]), 0.1, 0.3, 1.0);
      for (int pass = 0; pass < 2; pass++) begin
      logic [63:0] prev_w [6];
      for (int w = 0; w < 6; w++) prev_w[w] = u_mem.mem[base[k] + w];
      job_dry = (pass == 0);
      @(negedge clk);
      job_valid = 1;
      @(negedge clk);
      job_valid = 0;
      cyc = 1;
      while (!res_valid) begin
        @(negedge clk);
        cyc++;
      end
      p = (nw[k] + 1) / 2;
      tbs = 0;
      for (int i = 0; i < 2; i++) tbs += 1 + (2 * (i + 1) + 1) * (p + 12) + 4 + p + i * ((p + 3) / 4) * 4;
      texp = 10 + 2 * LAT + tbs + (job_dry ? 0 : nw[k] / 2 + 1);
      checks++;
      if (cyc != texp) begin
        failures++;
        $display("neuron %0d: %0d clocks, expected %0d", k, cyc, texp);
      end
      fired_ref = yr[8] >= 1.0;
      aref = fired_ref ? 0.0 : yr[8];
      checks++;
      if (res_id != nid_t'(k)) begin failures++; $display("neuron %0d: wrong id %0d", k, res_id); end
      if (absr(yr[8] - 1.0) > 2.0e-3) begin
        checks++;
        if (res_fired != fired_ref) begin
          failures++;
          $display("neuron %0d: fired %b, reference %b (a = %f)", k, res_fired, fired_ref, yr[8]);
        end
        checks++;
        if (absr(m2r(res_a) - aref) > 2.0e-3) begin
          failures++;
          $display("neuron %0d: a = %f, reference %f", k, m2r(res_a), aref);
        end
      end
      if (res_fired && !job_dry) nfired++;
      @(negedge clk);
      if (job_dry) begin
        for (int w = 0; w < 6; w++) begin
          checks++;
          if (u_mem.mem[base[k] + w] != prev_w[w]) begin
            failures++;
            $display("neuron %0d: trial job changed word %0d", k, w);
          end
        end
        continue;
      end
      // memory contents after write-back
      checks++;
      if (u_mem.mem[base[k] + 1][19:0] != res_a) begin
        failures++;
        $display("neuron %0d: potential not written back", k);
      end
      for (int j = 0; j < nw[k]; j++) begin
        int w; logic [31:0] v;
        w = (j == 0) ? 1 : (j + 3) / 2;
        v = (j == 0) ? u_mem.mem[base[k] + 1][63:32] : ((j % 2) ? u_mem.mem[base[k] + w][31:0] : u_mem.mem[base[k] + w][63:32]);
        checks++;
        if (absr(m2r(v[19:0]) - yr[j]) > 2.0e-3 || v[31:20] != {12{v[19]}}) begin
          failures++;
          $display("neuron %0d: W%0d in memory %f, reference %f", k, j, m2r(v[19:0]), yr[j]);
        end
      end
      if (nw[k] % 2 == 0) begin
        checks++;
        if (u_mem.mem[base[k] + nw[k] / 2 + 1][63:32] != 32'(20'sh5A5A5)) begin
          failures++;
          $display("neuron %0d: padding overwritten", k);
        end
      end
      checks++;
      if (u_mem.mem[base[k]] != nib_header(nw[k], ik[k])) begin
        failures++;
        $display("neuron %0d: header changed", k);
      end
      end
    end
    checks++;
    if (nfired == 0) begin failures++; $display("no neuron fired"); end
    $display("fired %0d of %0d", nfired, NN);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
