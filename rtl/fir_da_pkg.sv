// fir_da_pkg: constants and types shared by the distributed-arithmetic (DA)
// FIR filter.
//
// The filter is a 31st-order (32-tap) linear-phase low-pass FIR designed with
// a Kaiser window (beta = 3.39, normalised cut-off 0.18). Its coefficients are
// quantised to 12-bit signed integers with a scale of 2^11, so that
// y = sum(h[k] * x[n-k]) carries a gain of 2048 relative to the real filter.
// The coefficient values and the 12-bit width follow the filter description;
// h[5]..h[9] (and their mirrors) are negative and h[10] positive, which makes the
// coefficients sum to exactly 2048 (unity DC gain) and gives a stop band near
// -44 dB. The 32 taps are split into eight groups of four, each group served by
// one 4-input DA look-up unit.
package fir_da_pkg;

  localparam int unsigned NTAPS   = 32;          // filter order 31
  localparam int unsigned GROUP   = 4;           // taps per look-up unit
  localparam int unsigned NGROUPS = NTAPS / GROUP;
  localparam int unsigned COEF_W  = 12;          // signed coefficient width
  localparam int unsigned LUT_W   = COEF_W + 2;  // sum of four coefficients

  typedef logic signed [COEF_W-1:0] coef_t;
  typedef logic signed [LUT_W-1:0]  lut_t;

  // Which realisation of the 4-tap partial-sum unit is used.
  //   LUT_BASIC    : 16-word table of every partial sum
  //   LUT_MODIFIED : 8-word table over three taps, a 2:1 mux and an adder
  //   LUT_LESS     : four 2:1 muxes and an adder tree, no table at all
  typedef enum logic [1:0] {
    LUT_BASIC    = 2'd0,
    LUT_MODIFIED = 2'd1,
    LUT_LESS     = 2'd2
  } lut_style_e;

  // Quantised coefficients h[0]..h[31] (symmetric: h[k] = h[31-k]).
  localparam coef_t H_DEFAULT [NTAPS] = '{
    12'sd4,   12'sd9,   12'sd13,  12'sd12,  12'sd5,  -12'sd10, -12'sd30, -12'sd48,
   -12'sd55, -12'sd39,  12'sd3,   12'sd72,  12'sd158, 12'sd247, 12'sd321, 12'sd362,
    12'sd362, 12'sd321, 12'sd247, 12'sd158, 12'sd72,  12'sd3,  -12'sd39, -12'sd55,
   -12'sd48, -12'sd30, -12'sd10,  12'sd5,   12'sd12,  12'sd13,  12'sd9,   12'sd4
  };

endpackage
