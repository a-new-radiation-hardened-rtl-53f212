// hma_pkg: shared widths, fixed-point formats, physical constants and
// constant functions of the protected holographic memory address unit.
//
// Number formats (all two's complement):
//   * coordinates: COORD_W-bit signed integers in pixel units, both planes
//     sharing one pixel pitch;
//   * distance path: DATA_W-bit words with VFRAC fraction bits;
//   * angles: DATA_W-bit binary angles in units of pi, so the word spans
//     [-pi, pi) and wraps modulo 2*pi for free (the "x pi" at the CORDIC
//     angle input is this scaling);
//   * cosine/sine: DATA_W-bit words with TFRAC fraction bits (range [-2, 2)).
// The 40-bit word, the 8 parallel units, the 532 nm wavelength and the
// 10 mm plane gap follow the design description; the coordinate width,
// pixel pitch, iteration count and hologram size are this design's choices.
package hma_pkg;

  // ---- sizes --------------------------------------------------------------
  parameter int DATA_W   = 40;             // datapath precision
  parameter int B_N      = 8;              // parallel calculation units
  parameter int COORD_W  = 16;             // pixel coordinate width
  parameter int DIFF_W   = COORD_W + 1;    // coordinate difference width
  parameter int VFRAC    = DATA_W - DIFF_W - 2;  // distance fraction bits
  parameter int TFRAC    = DATA_W - 2;     // cosine/sine fraction bits
  parameter int ITER     = DATA_W - 2;     // CORDIC micro-rotations
  parameter int HOLO_W   = 256;            // hologram pixels per row
  parameter int HOLO_H   = 256;            // hologram rows
  parameter int MAX_BRIGHT = 64;           // bright-bit table depth
  // gamma of the cos^2 + sin^2 = 1 check, in units of 2^-TFRAC. Simulation
  // of the default CORDIC shows deviations up to a few tens of units.
  parameter int GAMMA_LSB = 256;

  // ---- optics -------------------------------------------------------------
  parameter real PI        = 3.14159265358979323846;
  parameter real LAMBDA_M  = 532.0e-9;     // laser wavelength
  parameter real GAP_M     = 10.0e-3;      // hologram to observation plane
  parameter real PITCH_M   = 10.0e-6;      // pixel pitch (both planes)
  // Phase per squared pixel distance, in units of pi: pitch^2 / (lambda L).
  parameter real PHASE_PER_PX2 = PITCH_M * PITCH_M / (LAMBDA_M * GAP_M);

  // ---- types --------------------------------------------------------------
  typedef logic signed [COORD_W-1:0] coord_t;

  // Observation-plane coordinates of one bright bit.
  typedef struct packed {
    coord_t x;
    coord_t y;
  } bright_bit_t;

  // Detection flags of one calculation unit.
  typedef struct packed {
    logic dmr1;   // the two scaled distances differ
    logic dmr2;   // the two squared distances differ
    logic dmr3;   // cos^2 + sin^2 outside 1 +/- gamma
  } unit_err_t;

  // ---- constant functions -------------------------------------------------
  // atan(2^-i) as a binary angle of zw bits (units of pi), rounded.
  function automatic longint atan_pi(input int i, input int zw);
    real a;
    a = $atan(1.0 / (2.0 ** i)) / PI;
    return longint'(a * (2.0 ** (zw - 1)) + 0.5);
  endfunction

  // CORDIC gain after n micro-rotations: prod sqrt(1 + 2^-2i).
  function automatic real cordic_gain(input int n);
    real g;
    g = 1.0;
    for (int i = 0; i < n; i++) g = g * $sqrt(1.0 + 2.0 ** (-2 * i));
    return g;
  endfunction

  // Real value to fixed point with frac fraction bits, rounded.
  function automatic longint to_fix(input real v, input int frac);
    real s;
    s = v * (2.0 ** frac);
    return (s >= 0.0) ? longint'(s + 0.5) : -longint'(-s + 0.5);
  endfunction

  // Pipeline latencies (cycles from in_valid to out_valid).
  function automatic int cordic_latency(input int iter);
    return iter + 1;
  endfunction
  function automatic int distance_latency(input int iter);
    return 1 + cordic_latency(iter) + 1 + 1;  // subtract, CORDIC, scale, square
  endfunction
  function automatic int cosine_latency(input int iter);
    return cordic_latency(iter) + 2;          // CORDIC, square, add/compare
  endfunction
  function automatic int calc_latency(input int iter);
    return distance_latency(iter) + cosine_latency(iter);
  endfunction
  function automatic int tree_latency(input int n);
    return ((n > 1) ? $clog2(n) : 0) + 1;     // adder levels + accumulator
  endfunction

endpackage
