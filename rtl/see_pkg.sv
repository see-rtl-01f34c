// see_pkg - types and constants shared by the spiking-neuron emulation engine.
//
// Model quantities (membrane potential, weights, input stimulus, gamma, mu,
// theta) are signed fixed-point numbers with 2 integer and 18 fraction bits
// (2.18, 20 bits); the firing threshold is 1.0, so two integer bits suffice.
// Time quantities (event times, integration interval H, pulse width t_d) are
// unsigned 14.18 numbers (32 bits). Both formats follow the resolution study
// of the design; the 4.18 coefficient format of the extrapolation unit is
// this design's own choice (its coefficients reach 4.27).
// Neuron numbers are 19 bits wide: 2^19 = 512 K neurons, the size fixed by
// the 2 MB dynamic event list holding one 4-byte entry per neuron.
package see_pkg;

  localparam int unsigned FRAC   = 18;  // fraction bits of every fixed-point format
  localparam int unsigned MW     = 20;  // model word: 2.18 signed
  localparam int unsigned TW     = 32;  // time word: 14.18 unsigned
  localparam int unsigned CW     = 22;  // extrapolation coefficient: 4.18 signed
  localparam int unsigned NIDW   = 19;  // neuron id width (2^19 neurons)
  localparam int unsigned NMAX   = 8;   // presynaptic weights held on chip (8-nearest-neighbour)
  localparam int unsigned KMAX   = 8;   // extrapolation rows i = 0..7
  localparam int unsigned MUL_LAT = 4;  // pipelined multiplier latency in clocks

  typedef logic signed [MW-1:0] model_t;
  typedef logic        [TW-1:0] time_t;
  typedef logic signed [CW-1:0] coef_t;
  typedef logic        [NIDW-1:0] nid_t;

  localparam model_t ONE_M  = model_t'(1 << FRAC);       // 1.0 in 2.18
  localparam model_t MAX_M  = {1'b0, {(MW-1){1'b1}}};    // largest 2.18 value
  localparam model_t MIN_M  = {1'b1, {(MW-1){1'b0}}};    // smallest 2.18 value

  // Connection schemes of the topology unit.
  typedef enum logic [1:0] {
    CONN_P2P = 2'd0,   // feedforward point-to-point: row y feeds row y+1
    CONN_NN4 = 2'd1,   // 4-nearest-neighbour
    CONN_NN8 = 2'd2    // 8-nearest-neighbour
  } conn_t;

  // Saturate a wide signed value to the 2.18 model range.
  function automatic model_t sat_m(input logic signed [63:0] v);
    if (v > 64'(signed'(MAX_M)))      return MAX_M;
    else if (v < 64'(signed'(MIN_M))) return MIN_M;
    else                              return model_t'(v);
  endfunction

  // Number of modified-midpoint substeps of extrapolation row i: 2(i+1).
  function automatic int unsigned nstep_of(input int unsigned i);
    return 2 * (i + 1);
  endfunction

  // Extrapolation coefficients for row i, column k (1 <= k <= i), with
  // x_i = (H / nstep_i)^2. They do not depend on H:
  //   xq = x_i     / (x_{i-k} - x_i) = n_{i-k}^2 / (n_i^2 - n_{i-k}^2)
  //   xd = x_{i-k} / (x_{i-k} - x_i) = n_i^2     / (n_i^2 - n_{i-k}^2)
  function automatic coef_t xq_coef(input int unsigned i, input int unsigned k);
    longint unsigned ni, nk;
    ni = longint'(nstep_of(i)) * nstep_of(i);
    nk = longint'(nstep_of(i - k)) * nstep_of(i - k);
    return coef_t'((nk << FRAC) / (ni - nk));
  endfunction

  function automatic coef_t xd_coef(input int unsigned i, input int unsigned k);
    longint unsigned ni, nk;
    ni = longint'(nstep_of(i)) * nstep_of(i);
    nk = longint'(nstep_of(i - k)) * nstep_of(i - k);
    return coef_t'((ni << FRAC) / (ni - nk));
  endfunction

endpackage
