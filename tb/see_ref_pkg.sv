// see_ref_pkg - floating-point reference model of the neuron integration,
// used by the testbenches to check the fixed-point hardware.
//
// State vector: elements 0..NW-1 are the weights W_j, element NW is the
// membrane potential a_K. Everything is computed in double precision
// straight from the model equations, independently of the hardware schedule.
package see_ref_pkg;
  localparam int NW = 8;
  localparam int NE = NW + 1;
  typedef real rvec_t [NE];

  function automatic real m2r(input logic signed [19:0] v);
    return real'(v) / 262144.0;
  endfunction
  function automatic logic signed [19:0] r2m(input real r);
    return 20'(longint'(r * 262144.0));
  endfunction
  function automatic real t2r(input logic [31:0] v);
    return real'(v) / 262144.0;
  endfunction

  // derivative of the state (weight rule and integrate-and-fire potential)
  function automatic rvec_t deriv(input rvec_t y, input int n, input logic [NW-1:0] xl,
                                  input logic xk, input real ik, input real g,
                                  input real mu, input real th);
    rvec_t f;
    real s;
    s = ik;
    for (int j = 0; j < NE; j++) f[j] = 0.0;
    for (int j = 0; j < n; j++) begin
      f[j] = -g * y[j] + ((!xk && xl[j]) ? mu * (y[NW] - th / 2.0) : 0.0);
      if (xl[j]) s += y[j];
    end
    f[NW] = s;
    return f;
  endfunction

  // modified midpoint over H = nstep * h
  function automatic rvec_t mmid(input rvec_t y0, input int nstep, input real h, input int n,
                                 input logic [NW-1:0] xl, input logic xk, input real ik,
                                 input real g, input real mu, input real th);
    rvec_t zm, zn, f, sw;
    f = deriv(y0, n, xl, xk, ik, g, mu, th);
    for (int j = 0; j < NE; j++) begin zm[j] = y0[j]; zn[j] = y0[j] + h * f[j]; end
    for (int m = 1; m < nstep; m++) begin
      f = deriv(zn, n, xl, xk, ik, g, mu, th);
      for (int j = 0; j < NE; j++) begin
        sw[j] = zm[j] + 2.0 * h * f[j];
        zm[j] = zn[j];
        zn[j] = sw[j];
      end
    end
    f = deriv(zn, n, xl, xk, ik, g, mu, th);
    for (int j = 0; j < NE; j++) sw[j] = 0.5 * (zm[j] + zn[j] + h * f[j]);
    return sw;
  endfunction

  // polynomial extrapolation, one row; qs holds the previous row's Q values
  function automatic rvec_t pzextr(input int i, input rvec_t y, inout rvec_t qs [8]);
    rvec_t d, q, acc;
    real ni, nk, delta, xq, xd;
    rvec_t qold [8];
    qold = qs;
    for (int e = 0; e < NE; e++) begin d[e] = y[e]; q[e] = y[e]; acc[e] = y[e]; end
    for (int k = 1; k <= i; k++) begin
      ni = real'(2 * (i + 1)) ** 2;
      nk = real'(2 * (i - k + 1)) ** 2;
      xq = nk / (ni - nk);
      xd = ni / (ni - nk);
      for (int e = 0; e < NE; e++) begin
        qs[k-1][e] = q[e];
        delta = d[e] - qold[k-1][e];
        q[e] = xq * delta;
        d[e] = xd * delta;
        acc[e] += q[e];
      end
    end
    for (int e = 0; e < NE; e++) qs[i][e] = q[e];
    return acc;
  endfunction

  // full Bulirsch-Stoer step with rows 0..rows-1
  function automatic rvec_t bs_step(input rvec_t y0, input int rows, input real hint, input int n,
                                    input logic [NW-1:0] xl, input logic xk, input real ik,
                                    input real g, input real mu, input real th);
    rvec_t qs [8];
    rvec_t ym, ye;
    for (int i = 0; i < rows; i++) begin
      ym = mmid(y0, 2 * (i + 1), hint / real'(2 * (i + 1)), n, xl, xk, ik, g, mu, th);
      ye = pzextr(i, ym, qs);
    end
    return ye;
  endfunction

  // neuron information block words (see nsc_channel)
  function automatic logic [63:0] nib_header(input int n, input logic signed [19:0] ik);
    return {1'b1, 11'd0, ik, 16'd0, 16'(n)};
  endfunction
  function automatic logic [63:0] pack2(input logic signed [19:0] lo, input logic signed [19:0] hi);
    return {32'(hi), 32'(lo)};
  endfunction

endpackage
