// tb_weight_deriv - checks the weight derivative pipeline against an integer
// model of the adaptation rule
//   f = -floor(gamma*W) + (X_K = 0 and X_L = 1 ? floor(mu*(a - theta/2)) : 0)
// (products in 2.18, truncated) for 400 random pairs with random potentials
// and status bits, issued back to back. Every result and its tag must leave
// exactly 6 clocks after the pair entered.
module tb_weight_deriv;
  import see_pkg::*;
  import see_ref_pkg::r2m;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic in_valid, x_k, out_valid;
  model_t in_w [2], out_f [2];
  logic [1:0] in_xl;
  logic [7:0] in_tag, out_tag;
  model_t a_k, gamma, mu, theta;
  int checks = 0, failures = 0;

  weight_deriv #(.TAGW(8)) dut (.clk, .rst_n, .in_valid, .in_w, .in_xl, .in_tag,
    .a_k, .x_k, .gamma, .mu, .theta, .out_valid, .out_f, .out_tag);

  function automatic longint fmul(input longint x, input longint y);
    longint r;
    r = (x * y) >>> 18;
    if (r > 524287) r = 524287;
    if (r < -524288) r = -524288;
    return r;
  endfunction
  function automatic longint sat(input longint r);
    if (r > 524287) return 524287;
    if (r < -524288) return -524288;
    return r;
  endfunction

  typedef struct { logic v; longint f0, f1; logic [7:0] tag; } exp_t;
  exp_t q [$];

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    exp_t e;
    longint d;
    in_valid = 0; in_w[0] = 0; in_w[1] = 0; in_xl = 0; in_tag = 0; x_k = 0;
    a_k = 0; gamma = r2m(0.1); mu = r2m(0.3); theta = ONE_M;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < 6; k++) begin e.v = 0; e.f0 = 0; e.f1 = 0; e.tag = 0; q.push_back(e); end
    for (int t = 0; t < 410; t++) begin
      @(negedge clk);
      if (t < 400) begin
        in_valid = ($urandom % 4) != 0;
        in_w[0] = model_t'($urandom % 300000) - model_t'(100000);
        in_w[1] = model_t'($urandom % 300000) - model_t'(100000);
        in_xl = 2'($urandom);
        x_k = ($urandom % 3) == 0;
        a_k = model_t'($urandom % 400000);
        gamma = model_t'($urandom % 100000);
        mu = model_t'($urandom % 150000);
        in_tag = 8'(t);
      end else in_valid = 0;
      d = sat(longint'(a_k) - (longint'(theta) >>> 1));
      e.v = in_valid;
      e.tag = in_tag;
      e.f0 = sat(((!x_k && in_xl[0]) ? fmul(mu, d) : 0) - fmul(gamma, in_w[0]));
      e.f1 = sat(((!x_k && in_xl[1]) ? fmul(mu, d) : 0) - fmul(gamma, in_w[1]));
      q.push_back(e);
      e = q.pop_front();
      checks++;
      if (out_valid !== e.v) begin
        failures++;
        $display("valid mismatch at %0d", t);
      end else if (e.v) begin
        checks++;
        if (longint'(out_f[0]) != e.f0 || longint'(out_f[1]) != e.f1 || out_tag != e.tag) begin
          failures++;
          $display("mismatch at %0d: %0d %0d (%0d) vs %0d %0d (%0d)", t, out_f[0], out_f[1],
                   out_tag, e.f0, e.f1, e.tag);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
