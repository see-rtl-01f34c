// tb_mmid_unit - checks the modified-midpoint unit against a double-precision
// model of the same integration rule for 40 random neurons (n = 1..8 weights,
// nstep = 2..8, random topology bits, stimulus and potential). The results
// must agree to within 2e-3. Timing checks: the first result pair is
// written 12 clocks after the first pair is issued (issue starts one clock
// after start), and done comes 1 + (nstep+1)*(ceil(n/2)+12) clocks after start.
module tb_mmid_unit;
  import see_pkg::*;
  import see_ref_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic start, x_k, busy, done, pair_out;
  logic [4:0] nstep;
  logic [3:0] n;
  time_t h;
  model_t y0_a, i_k, gamma, mu, theta, y_a;
  model_t y0_w [8], y_w [8];
  logic [7:0] xl;
  int checks = 0, failures = 0;

  mmid_unit #(.NW(8)) dut (.clk, .rst_n, .start, .nstep, .n, .h, .y0_a, .y0_w, .xl, .x_k,
    .i_k, .gamma, .mu, .theta, .busy, .done, .pair_out, .y_a, .y_w);

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rvec_t y0, yr;
    int cyc, first_pair, p;
    real err, tol;
    tol = 2.0e-3;
    start = 0; nstep = 2; n = 4; h = 0; y0_a = 0; i_k = 0; x_k = 0; xl = 0;
    gamma = r2m(0.1); mu = r2m(0.3); theta = ONE_M;
    for (int j = 0; j < 8; j++) y0_w[j] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 40; t++) begin
      @(negedge clk);
      n     = 4'(1 + $urandom % 8);
      nstep = 5'(2 * (1 + $urandom % 4));
      h     = time_t'(26214 + $urandom % 40000);       // 0.1 .. 0.25 time units
      y0_a  = model_t'($urandom % 262144);
      i_k   = model_t'($urandom % 262144);
      x_k   = ($urandom % 4) == 0;
      xl    = 8'($urandom);
      for (int j = 0; j < 8; j++) y0_w[j] = model_t'(20000 + $urandom % 20000) - model_t'(($urandom % 2) * 40000);
      for (int j = 0; j < 8; j++) y0[j] = m2r(y0_w[j]);
      y0[8] = m2r(y0_a);
      yr = mmid(y0, int'(nstep), t2r(h), int'(n), xl, x_k, m2r(i_k), m2r(gamma), m2r(mu), m2r(theta));
      start = 1;
      cyc = 0;
      first_pair = -1;
      @(negedge clk);
      start = 0;
      cyc = 1;
      while (!done) begin
        if (pair_out && first_pair < 0) first_pair = cyc;
        @(negedge clk);
        cyc++;
      end
      p = (int'(n) + 1) / 2;
      checks++;
      if (cyc != 1 + (int'(nstep) + 1) * (p + 12)) begin
        failures++;
        $display("neuron %0d: done after %0d clocks, expected %0d", t, cyc, 1 + (int'(nstep) + 1) * (p + 12));
      end
      checks++;
      if (first_pair != 13) begin
        failures++;
        $display("neuron %0d: first pair after %0d clocks, expected 13", t, first_pair);
      end
      err = m2r(y_a) - yr[8];
      if (err < 0) err = -err;
      checks++;
      if (err > tol) begin
        failures++;
        $display("neuron %0d: a = %f, reference %f", t, m2r(y_a), yr[8]);
      end
      for (int j = 0; j < int'(n); j++) begin
        err = m2r(y_w[j]) - yr[j];
        if (err < 0) err = -err;
        checks++;
        if (err > tol) begin
          failures++;
          $display("neuron %0d: W%0d = %f, reference %f", t, j, m2r(y_w[j]), yr[j]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
