// tb_pzextr_unit - checks the polynomial extrapolation unit against a
// double-precision Neville tableau. 30 tableaus with n = 1..8 weights and
// 1..8 rows are fed rows y_i = c + d/nstep_i^2 + e/nstep_i^4 (as produced by
// a midpoint rule with error in h^2); after every row the extrapolated
// vector must agree with the reference within 1e-3, and done must come
// exactly 4 + P + i*ceil(P/4)*4 clocks after start, P = max(1, ceil(n/2)).
module tb_pzextr_unit;
  import see_pkg::*;
  import see_ref_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic start, busy, done;
  logic [2:0] row;
  logic [3:0] n;
  model_t y_a, yext_a;
  model_t y_w [8], yext_w [8];
  int checks = 0, failures = 0;

  pzextr_unit #(.NW(8)) dut (.clk, .rst_n, .start, .row, .n, .y_a, .y_w, .busy, .done,
    .yext_a, .yext_w);

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rvec_t qs [8];
    rvec_t yv, yr;
    real c [9], d [9], e [9];
    int rows, cyc, p, texp;
    real err, ns;
    start = 0; row = 0; n = 1; y_a = 0;
    for (int j = 0; j < 8; j++) y_w[j] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 30; t++) begin
      n = 4'(1 + $urandom % 8);
      rows = 1 + $urandom % 8;
      for (int k = 0; k < 9; k++) begin
        c[k] = real'($urandom % 1000) / 1000.0 - 0.3;
        d[k] = real'($urandom % 1000) / 2000.0 - 0.25;
        e[k] = real'($urandom % 1000) / 4000.0 - 0.125;
      end
      for (int i = 0; i < rows; i++) begin
        @(negedge clk);
        ns = real'(2 * (i + 1));
        for (int k = 0; k < 9; k++) yv[k] = m2r(r2m(c[k] + d[k] / (ns * ns) + e[k] / (ns * ns * ns * ns)));
        for (int j = 0; j < 8; j++) y_w[j] = r2m(yv[j]);
        y_a = r2m(yv[8]);
        yr = pzextr(i, yv, qs);
        row = 3'(i);
        start = 1;
        @(negedge clk);
        start = 0;
        cyc = 1;
        while (!done) begin
          @(negedge clk);
          cyc++;
        end
        p = (int'(n) + 1) / 2;
        if (p < 1) p = 1;
        texp = 4 + p + i * ((p + 3) / 4) * 4;
        checks++;
        if (cyc != texp) begin
          failures++;
          $display("tableau %0d row %0d: done after %0d clocks, expected %0d", t, i, cyc, texp);
        end
        for (int k = 0; k < 9; k++) begin
          if (k < 8 && k >= int'(n)) continue;
          err = ((k < 8) ? m2r(yext_w[k]) : m2r(yext_a)) - yr[k];
          if (err < 0) err = -err;
          checks++;
          if (err > 1.0e-3) begin
            failures++;
            $display("tableau %0d row %0d element %0d: %f, reference %f", t, i, k,
                     (k < 8) ? m2r(yext_w[k]) : m2r(yext_a), yr[k]);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
