// wdf_pkg: word formats and arithmetic shared by the 4-D wave-digital depth filters.
//
// All waves travel as signed Q2.13 numbers (15 bits: sign, one integer bit, 13 fraction
// bits) and adapter multipliers are signed Q2.11 numbers (13 bits), so a coefficient can
// span [-2, 2), which the unconstrained adapters need (their coefficients exceed 1).
// Input pixels are 8-bit unsigned values read as fractions of one. Sums inside an adapter
// are kept in a wider accumulator; a coefficient product is truncated toward zero
// (magnitude truncation) back to 13 fraction bits, and every wave that leaves an adapter
// is saturated to Q2.13. Magnitude truncation is the classic wave-digital choice that
// keeps the recursions free of zero-input limit cycles: with floor or round-to-nearest
// the impulse response settles into a +-1 LSB offset that never dies out.
//
// The word lengths (13-bit coefficients with 11 fraction bits, 15-bit data, 8-bit input)
// follow the published FPGA implementation. Saturation and magnitude truncation are this design's
// choice; the published word lengths were picked so that neither overflow nor saturation
// occurs for the intended inputs.
package wdf_pkg;

  // Data path (waves): W_SYS bits, D_SYS fraction bits.
  localparam int W_SYS  = 15;
  localparam int D_SYS  = 13;
  // Adapter multiplier constants: W_COEF bits, D_COEF fraction bits.
  localparam int W_COEF = 13;
  localparam int D_COEF = 11;
  // Input pixel width.
  localparam int W_PIX  = 8;
  // Accumulator width for sums of three waves and coefficient products.
  localparam int W_ACC  = W_SYS + 5;

  typedef logic signed [W_SYS-1:0]  sys_t;
  typedef logic signed [W_COEF-1:0] coef_t;
  typedef logic signed [W_ACC-1:0]  acc_t;
  typedef logic        [W_PIX-1:0]  pix_t;

  localparam sys_t SYS_MAX = sys_t'({1'b0, {(W_SYS-1){1'b1}}});
  localparam sys_t SYS_MIN = sys_t'({1'b1, {(W_SYS-1){1'b0}}});

  // Multiplier set of one 4-D non-separable hyperplanar section (Fig. 4b order):
  // g1 source port of adapter 1, g2 input port of adapter 2, g3/g4 the two outer ports
  // of the unconstrained adapter, g5 load port of the last adapter.
  typedef struct packed {
    coef_t g1;
    coef_t g2;
    coef_t g3;
    coef_t g4;
    coef_t g5;
  } ns_coef_t;

  // Multiplier set of one 2-D section of the partially-separable filter (Fig. 5b):
  // g_src source port of the reflection-free adapter, g_in and g_load the input and
  // load ports of the unconstrained adapter.
  typedef struct packed {
    coef_t g_src;
    coef_t g_in;
    coef_t g_load;
  } sec2d_coef_t;

  typedef struct packed {
    sec2d_coef_t su;
    sec2d_coef_t tv;
  } ps_coef_t;

  // Which two dimensions a 2-D section filters.
  typedef enum logic {PAIR_SU = 1'b0, PAIR_TV = 1'b1} pair_e;

  // Edge flags of the raster-scan grid: 1 where the delayed sample along that dimension
  // lies outside the grid and a zero initial condition must be used.
  typedef struct packed {
    logic s;
    logic t;
    logic u;
    logic v;
  } zic_t;

  // Example coefficients of the refocusing experiment, rounded to Q2.11:
  // 0.5556 -> 1138, 0.72 -> 1475, 1.087 -> 2226, 0.652 -> 1335, 0.75 -> 1536,
  // 1.0588 -> 2168, 0.5882 -> 1205.
  localparam ns_coef_t NS_COEF_EXAMPLE = '{
    g1: coef_t'(1138), g2: coef_t'(1475), g3: coef_t'(2226), g4: coef_t'(1335), g5: coef_t'(1536)
  };
  localparam sec2d_coef_t SEC2D_COEF_EXAMPLE = '{
    g_src: coef_t'(1138), g_in: coef_t'(2168), g_load: coef_t'(1205)
  };

  // Saturate an accumulator value to a wave.
  function automatic sys_t sat(input acc_t v);
    if (v > acc_t'(SYS_MAX)) return SYS_MAX;
    if (v < acc_t'(SYS_MIN)) return SYS_MIN;
    return sys_t'(v);
  endfunction

  // Coefficient times accumulator value, truncated toward zero to D_SYS fraction bits.
  function automatic acc_t cmul(input coef_t g, input acc_t a);
    logic signed [W_COEF+W_ACC-1:0] p;
    p = g * a;
    if (p < 0) p = p + (W_COEF+W_ACC)'((1 << D_COEF) - 1);
    return acc_t'(p >>> D_COEF);
  endfunction

  // Widen a wave to the accumulator.
  function automatic acc_t wide(input sys_t x);
    return acc_t'(x);
  endfunction

  // Map an 8-bit pixel p to the wave p/256 in Q2.13.
  function automatic sys_t pix_to_sys(input pix_t p);
    return sys_t'({2'b00, p, {(D_SYS-W_PIX){1'b0}}});
  endfunction

endpackage
