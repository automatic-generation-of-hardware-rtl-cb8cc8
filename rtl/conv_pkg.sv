// conv_pkg: shared types, constants and elaboration-time analysis for the
// fixed-kernel convolver generator.
//
// Every convolver in this design is specialised to one set of integer
// (fixed-point) kernel coefficients, given as a parameter. The functions here
// classify a coefficient the way the coefficient analyzer does: a zero needs
// no multiplier at all (zero skip), a signed power of two needs only a shift
// and possibly a negation, and anything else gets a constant multiplier.
//
// Kernels are passed as flat, row-major int arrays: element r*COLS+c is the
// coefficient applied to window row r, column c. Column COLS-1 holds the
// newest pixel column of a sliding window, column 0 the oldest.
//
// The default kernels below are integer kernels: the 5x5 Gaussian
// approximation (scale 1/273), the 5x5 Sobel y kernel and its separable
// factors, the 3x3 Sobel kernel and the 3x3 binomial kernel with its factors.
// The sampled Gaussians are quantised with the rule floor(g / g_max *
// (2^N - 1)): the largest coefficient becomes 2^N - 1. The 5x5, sigma = 1.2
// tables are the quantiser's own output; the 3x3 (sigma = 1) and 7x7
// (sigma = 1.5) tables, and the 4-bit sigma = 1.2 table, were computed with
// the same rule.
// The 5x5 Gaussian (1/273), the 5x5 Sobel y kernel, the 3x3 binomial
// factorisation and the sigma 1.2 tables are published examples of the
// original convolver generator; the Sobel factorisation, the 3x3 Sobel x
// coefficients and the classification functions are this design's own.
package conv_pkg;

  // Kind of hardware unit generated for one kernel position.
  typedef enum logic [1:0] {
    MK_ZERO  = 2'd0,  // zero skipped: no unit, no adder-tree input
    MK_SHIFT = 2'd1,  // +-2^n: wiring shift, optional negation
    MK_MULT  = 2'd2   // general constant multiplier
  } mult_kind_e;

  localparam int PIX_W_DEFAULT = 8;

  // 5x5 Gaussian, integer approximation, scale 1/273.
  localparam int GAUSS5_273 [25] = '{
    1,  4,  7,  4, 1,
    4, 16, 26, 16, 4,
    7, 26, 41, 26, 7,
    4, 16, 26, 16, 4,
    1,  4,  7,  4, 1
  };

  // 5x5 Sobel y kernel and its separable factors (vertical, horizontal).
  localparam int SOBEL5_Y [25] = '{
     2,  2,  4,  2,  2,
     1,  1,  2,  1,  1,
     0,  0,  0,  0,  0,
    -1, -1, -2, -1, -1,
    -2, -2, -4, -2, -2
  };
  localparam int SOBEL5_V [5] = '{2, 1, 0, -1, -2};
  localparam int SOBEL5_H [5] = '{1, 1, 2, 1, 1};

  // 3x3 Sobel x kernel (three zero coefficients, the rest +-1 and +-2).
  localparam int SOBEL3_X [9] = '{
    -1, 0, 1,
    -2, 0, 2,
    -1, 0, 1
  };

  // 3x3 binomial kernel and its separable factors.
  localparam int BINOM3 [9] = '{
    1, 2, 1,
    2, 4, 2,
    1, 2, 1
  };
  localparam int BINOM3_1D [3] = '{1, 2, 1};

  // 3x3 Gaussian, sigma = 1, 16-bit fixed point (max coefficient 65535).
  localparam int GAUSS3_Q16 [9] = '{
    24108, 39748, 24108,
    39748, 65535, 39748,
    24108, 39748, 24108
  };

  // 5x5 Gaussian, sigma = 1.2, quantised to 16 bits (max 65535) and to
  // 8 bits (max 255), as produced by the coefficient quantiser.
  localparam int GAUSS5_S12_Q16 [25] = '{
     4074, 11547, 16341, 11547,  4074,
    11547, 32725, 46310, 32725, 11547,
    16341, 46310, 65535, 46310, 16341,
    11547, 32725, 46310, 32725, 11547,
     4074, 11547, 16341, 11547,  4074
  };
  localparam int GAUSS5_S12_Q8 [25] = '{
     15,  45,  63,  45,  15,
     45, 127, 180, 127,  45,
     63, 180, 255, 180,  63,
     45, 127, 180, 127,  45,
     15,  45,  63,  45,  15
  };

  // The same Gaussian quantised to 4 bits (max 15): the corner coefficients
  // fall to zero and are skipped.
  localparam int GAUSS5_S12_Q4 [25] = '{
    0,  2,  3,  2, 0,
    2,  7, 10,  7, 2,
    3, 10, 15, 10, 3,
    2,  7, 10,  7, 2,
    0,  2,  3,  2, 0
  };

  // 7x7 Gaussian, sigma = 1.5, 8 bits: floor(g / g_max * 255).
  localparam int GAUSS7_S15_Q8 [49] = '{
     4,  14,  27,  34,  27,  14,  4,
    14,  43,  83, 104,  83,  43, 14,
    27,  83, 163, 204, 163,  83, 27,
    34, 104, 204, 255, 204, 104, 34,
    27,  83, 163, 204, 163,  83, 27,
    14,  43,  83, 104,  83,  43, 14,
     4,  14,  27,  34,  27,  14,  4
  };

  function automatic int iabs(int v);
    return (v < 0) ? -v : v;
  endfunction

  // True when |v| is a power of two (1, 2, 4, ...).
  function automatic bit is_pow2(int v);
    int a;
    a = iabs(v);
    return (a != 0) && ((a & (a - 1)) == 0);
  endfunction

  // Exponent n of |v| = 2^n; only meaningful when is_pow2(v).
  function automatic int log2_exact(int v);
    int a;
    int n;
    a = iabs(v);
    n = 0;
    while (a > 1) begin
      a = a >> 1;
      n++;
    end
    return n;
  endfunction

  function automatic mult_kind_e classify(int coef);
    if (coef == 0) return MK_ZERO;
    if (is_pow2(coef)) return MK_SHIFT;
    return MK_MULT;
  endfunction

  // Bits needed for a signed two's-complement value of magnitude up to mag.
  function automatic int signed_width(longint mag);
    int w;
    w = 1;
    while ((longint'(1) <<< (w - 1)) <= mag) w++;
    return w;
  endfunction

  // Largest magnitude an input word of in_w bits can have.
  function automatic longint in_mag(int in_w, bit in_signed);
    return in_signed ? (longint'(1) <<< (in_w - 1)) : ((longint'(1) <<< in_w) - 1);
  endfunction

endpackage
