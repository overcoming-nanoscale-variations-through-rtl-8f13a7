// ssnoc_pkg: shared sizes and helper functions of the SSNOC signal detector.
//
// The detector correlates an 8-bit noisy input stream with a 256-chip stored
// PN code. Instead of one 256-tap FIR filter followed by a threshold, the
// filter is split into 64 four-tap "sensors" whose outputs are each compared
// with the threshold; a majority vote over the 64 comparison bits gives the
// decision. The tap count, sensor count and input precision below follow the
// document; the coefficient width is this design's choice (8 bits, wide enough
// for a +/-1 PN code as well as general filter coefficients).
package ssnoc_pkg;

  // Document sizes.
  localparam int unsigned N_TAPS_DEF    = 256; // total correlation length N
  localparam int unsigned M_SENSORS_DEF = 64;  // number of sensors M
  localparam int unsigned X_W_DEF       = 8;   // input sample precision

  // Design choice: signed coefficient width.
  localparam int unsigned H_W_DEF       = 8;

  // Taps per sensor for a given N and M (N/M, 4 in the document).
  function automatic int unsigned taps_per_sensor(int unsigned n, int unsigned m);
    return n / m;
  endfunction

  // Width of one sensor output: product width plus growth of a K-term sum.
  function automatic int unsigned sensor_out_w(int unsigned xw, int unsigned hw,
                                               int unsigned k);
    return xw + hw + $clog2(k);
  endfunction

  // Width needed to count up to m ones.
  function automatic int unsigned count_w(int unsigned m);
    return $clog2(m + 1);
  endfunction

endpackage
