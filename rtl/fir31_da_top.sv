// fir31_da_top: 31st-order (32-tap) low-pass FIR filter built with bit-serial
// distributed arithmetic (DA) and no multipliers.
//
// y[n] = sum_{k=0}^{31} h[k] * x[n-k] is computed one bit slice at a time.
// Each accepted sample enters the tap delay line of da_shift_register, whose
// serialiser then presents, for DATA_W cycles, one bit of every stored sample
// (sign bit first). The 32 bits form eight 4-bit addresses; eight 4-tap DA
// units turn each into the sum of the coefficients of the taps whose bit is 1.
// da_adder_tree registers the eight sums and adds them in three pipelined
// levels (4 cycles), and da_accumulator subtracts the sign slice and then
// doubles-and-adds the others, so after DATA_W slices it holds y[n] exactly.
//
// Interface: offer x_in with in_valid; it is taken in a cycle where in_ready
// is high. The filter takes one sample per DATA_W cycles at most. y_out
// (full precision, signed, gain 2^11 against the real-valued filter) is
// valid for one cycle with y_valid, which rises at the (DATA_W + 4)-th clock
// edge after the edge that accepted the sample (12 cycles for DATA_W = 8).
// Reset is asynchronous, active low, and clears the sample history.
//
// TAPS (default 32) sets the filter length; it must be four times a power of
// two (16 gives the 15th-order variant with four DA units), and H must then
// be given with TAPS coefficients. The LUT_STYLE parameter picks the DA unit: LUT_MODIFIED (8-word table plus
// a mux and an adder, the default), LUT_BASIC (16-word table) or LUT_LESS
// (muxes and adders only); all give the same output. The 32 taps, the groups
// of four, the 12-bit coefficients, the pipeline registers and the pairwise
// adder tree follow the filter's structure. The input width DATA_W = 8, the
// handshake and the sign-bit-first order are this implementation's choices;
// the block diagram's input pretreatment stage is not included, samples enter
// as two's-complement words.
module fir31_da_top
  import fir_da_pkg::*;
#(
  parameter int unsigned DATA_W    = 8,
  parameter int unsigned TAPS      = NTAPS,
  parameter lut_style_e  LUT_STYLE = LUT_MODIFIED,
  parameter coef_t       H [TAPS]  = H_DEFAULT,
  localparam int unsigned NG       = TAPS / GROUP,
  localparam int unsigned PIPE     = 1 + $clog2(NG),
  localparam int unsigned SUM_W    = LUT_W + $clog2(NG),
  localparam int unsigned Y_W      = SUM_W + DATA_W
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  output logic                  in_ready,
  input  logic signed [DATA_W-1:0] x_in,
  output logic signed [Y_W-1:0] y_out,
  output logic                  y_valid
);

  // the tap count must fill whole groups of four, and the adder tree pairs
  // units, so the number of groups must be a power of two
  if (TAPS % GROUP != 0 || NG < 2 || (NG & (NG - 1)) != 0) begin : g_bad_taps
    $error("TAPS must be 4 times a power of two (at least 8)");
  end

  logic             load, shift;
  logic             acc_en, acc_msb, acc_last;
  logic [TAPS-1:0]  bits;
  lut_t             lut_out [NG];
  logic signed [SUM_W-1:0] slice_sum;

  da_control #(.DATA_W(DATA_W), .PIPE(PIPE)) u_ctrl (
    .clk, .rst_n, .in_valid, .in_ready, .load, .shift,
    .acc_en, .acc_msb, .acc_last
  );

  da_shift_register #(.DATA_W(DATA_W), .TAPS(TAPS)) u_sreg (
    .clk, .rst_n, .load, .shift, .x_in, .bits
  );

  for (genvar g = 0; g < NG; g++) begin : g_lut
    localparam coef_t HG [GROUP] = '{H[GROUP*g], H[GROUP*g+1], H[GROUP*g+2], H[GROUP*g+3]};
    if (LUT_STYLE == LUT_BASIC) begin : g_basic
      da_lut_basic #(.H(HG)) u_lut (.addr(bits[GROUP*g +: GROUP]), .data(lut_out[g]));
    end else if (LUT_STYLE == LUT_LESS) begin : g_less
      da_lut_less #(.H(HG)) u_lut (.addr(bits[GROUP*g +: GROUP]), .data(lut_out[g]));
    end else begin : g_mod
      da_lut_modified #(.H(HG)) u_lut (.addr(bits[GROUP*g +: GROUP]), .data(lut_out[g]));
    end
  end

  da_adder_tree #(.NIN(NG), .IN_W(LUT_W)) u_tree (
    .clk, .rst_n, .din(lut_out), .sum(slice_sum)
  );

  da_accumulator #(.IN_W(SUM_W), .DATA_W(DATA_W)) u_acc (
    .clk, .rst_n, .en(acc_en), .msb(acc_msb), .last(acc_last),
    .s(slice_sum), .y(y_out), .y_valid
  );

endmodule
