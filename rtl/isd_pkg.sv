// isd_pkg: constants and elaboration-time helpers shared by the ISD
// (improved signed digit) constant vector multiplier and the Gaussian filter
// built from it.
//
// The ISD idea writes a constant vector a as PM * PV, where PV (the "public"
// vector) holds numbers of the form 2^q + 1 or 2^q - 1 (and 1 itself) that are
// formed once from the input, and PM (the "private" matrix) holds signed
// powers of two that shift and add those public results into each entry.
// The numbers below are the 11-tap Gaussian filter example and its
// decomposition a = PM * PV with PV = (1, 2^2+1, 2^4+1).  The coefficient
// set, PV and PM follow the source example; the input width is this design's
// own choice.
package isd_pkg;

  // Default input sample width (signed two's complement).
  localparam int unsigned W_IN_DEF = 8;
  // Default internal width: sum of the Gaussian taps is 512 = 2^9, so a
  // filtered W_IN-bit signed sample needs W_IN + 10 bits with margin.
  localparam int unsigned W_DEF = W_IN_DEF + 10;

  // Distinct Gaussian coefficients (the constant vector a).
  localparam int unsigned GAUSS_N = 6;
  localparam int GAUSS_COEF [GAUSS_N] = '{1, 4, 19, 57, 108, 134};

  // Public vector: x, (2^2 + 1) x, (2^4 + 1) x.
  localparam int unsigned GAUSS_M = 3;
  localparam int GAUSS_PV [GAUSS_M] = '{1, 5, 17};

  // Private matrix: each row is one coefficient, each entry 0 or +/-2^k.
  localparam int GAUSS_PM [GAUSS_N][GAUSS_M] = '{
    '{ 1, 0, 0},   //   1 = 1
    '{ 4, 0, 0},   //   4 = 4*1
    '{ 2, 0, 1},   //  19 = 2*1 + 17
    '{ 0, 8, 1},   //  57 = 8*5 + 17
    '{ 0, 8, 4},   // 108 = 8*5 + 4*17
    '{-2, 0, 8}    // 134 = -2*1 + 8*17
  };

  // Filter taps: tap k multiplies x[n-k] by GAUSS_COEF[GAUSS_TAP_IDX[k]],
  // giving 1 4 19 57 108 134 108 57 19 4 1.
  localparam int unsigned GAUSS_TAPS = 11;
  localparam int GAUSS_TAP_IDX [GAUSS_TAPS] = '{0, 1, 2, 3, 4, 5, 4, 3, 2, 1, 0};

  // True when v is a positive power of two.
  function automatic bit is_pow2(input int v);
    return (v > 0) && ((v & (v - 1)) == 0);
  endfunction

  // Exponent of a power of two (v must satisfy is_pow2).
  function automatic int log2_exact(input int v);
    int r = 0;
    while (v > 1) begin
      v = v >> 1;
      r++;
    end
    return r;
  endfunction

  // Pipeline depth of a binary adder tree with n leaves: one register level
  // per adder level, and one register even for a single leaf.
  function automatic int tree_depth(input int n);
    return (n <= 1) ? 1 : $clog2(n);
  endfunction

  // A public-vector entry is valid when it is 1, 2^q + 1 or 2^q - 1.
  function automatic bit pv_ok(input int v);
    return (v == 1) || is_pow2(v - 1) || is_pow2(v + 1);
  endfunction

  // A private-matrix entry is valid when it is 0 or +/- a power of two.
  function automatic bit pm_ok(input int v);
    return (v == 0) || is_pow2(v) || is_pow2(-v);
  endfunction

  // Entry n of the constant vector rebuilt as row n of PM times PV, for the
  // elaboration check that the decomposition matches the coefficients.
  function automatic int gauss_pm_pv(input int n);
    int acc = 0;
    for (int m = 0; m < int'(GAUSS_M); m++) acc += GAUSS_PM[n][m] * GAUSS_PV[m];
    return acc;
  endfunction

endpackage
