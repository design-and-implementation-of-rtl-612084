// da_shift_register: tap delay line and parallel-in/serial-out (PISO)
// bit-slice generator for a bit-serial distributed-arithmetic FIR.
//
// Two register banks of TAPS words each (32 by default):
//   * the delay line holds x[n], x[n-1], ... x[n-TAPS+1]; on `load` the new
//     sample enters word 0 and every word moves one tap down;
//   * the serialiser is loaded in parallel with the same, already shifted,
//     contents on `load`, and on every `shift` each word moves one bit left.
// `bits[k]` is the MSB of serialiser word k, i.e. bit (DATA_W-1-c) of
// x[n-k] in the c-th cycle after the load: the words are read sign bit first.
// Both banks reset to zero (an all-zero history). Loading the serialiser in
// parallel from the delay line (rather than rotating each tap word in place)
// is this implementation's choice; the bit order (sign bit first) is also a
// choice, made so that the accumulator doubles rather than halves its sum.
module da_shift_register
  import fir_da_pkg::*;
#(
  parameter int unsigned DATA_W = 8,
  parameter int unsigned TAPS   = NTAPS
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     load,     // accept x_in, restart serialiser
  input  logic                     shift,    // advance serialiser one bit
  input  logic signed [DATA_W-1:0] x_in,
  output logic [TAPS-1:0]          bits      // current bit of every tap
);

  logic [DATA_W-1:0] delay [TAPS];
  logic [DATA_W-1:0] ser   [TAPS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < TAPS; k++) begin
        delay[k] <= '0;
        ser[k]   <= '0;
      end
    end else if (load) begin
      delay[0] <= x_in;
      ser[0]   <= x_in;
      for (int k = 1; k < TAPS; k++) begin
        delay[k] <= delay[k-1];
        ser[k]   <= delay[k-1];
      end
    end else if (shift) begin
      for (int k = 0; k < TAPS; k++)
        ser[k] <= ser[k] << 1;
    end
  end

  always_comb begin
    for (int k = 0; k < TAPS; k++)
      bits[k] = ser[k][DATA_W-1];
  end

endmodule
