// pids_pkg: constants and helper functions shared by the parallel delta-sigma
// (Pi-Delta-Sigma) converter with continuous gain calibration.
//
// Sequences are carried as one bit per sample: 1 means -1, 0 means +1.
//
// hadamard_neg(r, j)  element (r, j) of the Sylvester Hadamard matrix of order
//                     M = 2^k, built by the recursion H = [H H; H -H]. Its value
//                     is (-1)^popcount(r & j). Row r (0-based) is the sequence of
//                     channel r+1; row 0 is all ones, so channel 1 is an
//                     unmodulated converter.
// cal_neg(j)          the calibration-channel sequence s_c, a +-1 sequence that is
//                     a linear combination of all Hadamard rows with coefficients
//                     of equal magnitude. This design uses the "bent" function
//                     f(j) = j0*j1 xor j2*j3 xor ... ; its Walsh spectrum is flat,
//                     so s_c = sum_r alpha_r * row_r with |alpha_r| = 1/sqrt(M)
//                     (1/4 for M = 16) and sign(alpha_r) = (-1)^f(r).
// alpha_neg(r)        sign bit of alpha_r (the function is its own dual).
// ALPHA_SHIFT         log2(1/|alpha_r|) = log2(M)/2.
//
// The recursion and the equal-magnitude +-1/4 coefficients for 16 channels are
// the converter's definition; the choice of the bent function as the particular
// set of coefficients is this design's.
package pids_pkg;

  // Default converter configuration: 16 channels, oversampling ratio 6.
  localparam int unsigned M_DEFAULT = 16;
  localparam int unsigned D_DEFAULT = 6;

  function automatic logic hadamard_neg(input int unsigned r, input int unsigned j);
    return ^(r & j);
  endfunction

  // Bent function over the bits of j, taken in pairs (bit 2i with bit 2i+1).
  function automatic logic bent(input int unsigned j);
    logic b;
    b = 1'b0;
    for (int i = 0; i < 8; i++) b ^= j[2*i] & j[2*i+1];
    return b;
  endfunction

  function automatic logic cal_neg(input int unsigned j);
    return bent(j);
  endfunction

  function automatic logic alpha_neg(input int unsigned r);
    return bent(r);
  endfunction

  function automatic int unsigned alpha_shift(input int unsigned m);
    return $clog2(m) / 2;
  endfunction

endpackage
