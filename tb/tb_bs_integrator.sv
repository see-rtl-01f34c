// tb_bs_integrator - checks one Bulirsch-Stoer step (two rows: midpoint with
// 2 and 4 substeps, then extrapolation) against the double-precision model
// for 30 random neurons with n = 1..8 weights and intervals of 0.25 to 1 time
// unit. Results must agree within 2e-3. The step must take exactly
//   sum over i = 0,1 of [1 + (2(i+1)+1)(P+12)] + [4 + P + i*ceil(P/4)*4]
// clocks, P = ceil(n/2): the midpoint and extrapolation counts of the two
// units chained without gaps.
module tb_bs_integrator;
  import see_pkg::*;
  import see_ref_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic start, x_k, busy, done;
  logic [3:0] n;
  time_t h_int;
  model_t y0_a, i_k, gamma, mu, theta, y_a;
  model_t y0_w [8], y_w [8];
  logic [7:0] xl;
  int checks = 0, failures = 0;

  bs_integrator #(.NW(8), .ROWS(2)) dut (.clk, .rst_n, .start, .n, .h_int, .y0_a, .y0_w,
    .xl, .x_k, .i_k, .gamma, .mu, .theta, .busy, .done, .y_a, .y_w);

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rvec_t y0, yr;
    int cyc, p, texp;
    real err;
    start = 0; n = 4; h_int = 0; y0_a = 0; i_k = 0; x_k = 0; xl = 0;
    gamma = r2m(0.1); mu = r2m(0.3); theta = ONE_M;
    for (int j = 0; j < 8; j++) y0_w[j] = r2m(0.12);
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 30; t++) begin
      @(negedge clk);
      n     = 4'(1 + $urandom % 8);
      h_int = time_t'(65536 + $urandom % 196608);
      y0_a  = model_t'($urandom % 262144);
      i_k   = model_t'($urandom % 262144);
      x_k   = ($urandom % 4) == 0;
      xl    = 8'($urandom);
      for (int j = 0; j < 8; j++) y0_w[j] = r2m(0.12) - model_t'($urandom % 20000);
      for (int j = 0; j < 8; j++) y0[j] = m2r(y0_w[j]);
      y0[8] = m2r(y0_a);
      yr = bs_step(y0, 2, t2r(h_int), int'(n), xl, x_k, m2r(i_k), m2r(gamma), m2r(mu), m2r(theta));
      start = 1;
      @(negedge clk);
      start = 0;
      // operands may change once the step has started
      y0_a = 0;
      cyc = 1;
      while (!done) begin
        @(negedge clk);
        cyc++;
      end
      p = (int'(n) + 1) / 2;
      texp = 0;
      for (int i = 0; i < 2; i++)
        texp += 1 + (2 * (i + 1) + 1) * (p + 12) + 4 + p + i * ((p + 3) / 4) * 4;
      checks++;
      if (cyc != texp) begin
        failures++;
        $display("neuron %0d: %0d clocks, expected %0d", t, cyc, texp);
      end
      for (int k = 0; k < 9; k++) begin
        if (k < 8 && k >= int'(n)) continue;
        err = ((k < 8) ? m2r(y_w[k]) : m2r(y_a)) - yr[k];
        if (err < 0) err = -err;
        checks++;
        if (err > 2.0e-3) begin
          failures++;
          $display("neuron %0d element %0d: %f, reference %f", t, k,
                   (k < 8) ? m2r(y_w[k]) : m2r(y_a), yr[k]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
