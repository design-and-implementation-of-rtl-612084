// da_accumulator: adder/subtractor and shift-accumulator of the DA FIR.
//
// Bit slices arrive sign bit first. For each valid slice sum s:
//   sign slice (msb = 1): acc <= 0 - s        (the sign bit weighs -2^(B-1))
//   other slices        : acc <= 2*acc + s
// After the DATA_W-th slice acc = sum_k h[k]*x[n-k] exactly. On the last slice
// the new value is also copied to `y` and `y_valid` pulses for one cycle, so y
// appears one cycle after the last slice sum. The adder/subtractor with its
// select driven by the sign-bit slice and the doubling feedback follow the
// filter's DA unit; processing sign bit first (doubling rather than halving,
// so no low bits are lost) is this implementation's choice.
module da_accumulator #(
  parameter int unsigned IN_W   = 17,
  parameter int unsigned DATA_W = 8,
  localparam int unsigned ACC_W = IN_W + DATA_W
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    en,      // slice sum valid
  input  logic                    msb,     // sign-bit slice: subtract, restart
  input  logic                    last,    // final slice of this sample
  input  logic signed [IN_W-1:0]  s,
  output logic signed [ACC_W-1:0] y,
  output logic                    y_valid
);

  logic signed [ACC_W-1:0] acc, fb, a_ext, acc_next;

  assign a_ext    = ACC_W'(s);
  assign fb       = msb ? '0 : (acc <<< 1);
  assign acc_next = msb ? fb - a_ext : fb + a_ext;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc     <= '0;
      y       <= '0;
      y_valid <= 1'b0;
    end else begin
      y_valid <= en && last;
      if (en) begin
        acc <= acc_next;
        if (last) y <= acc_next;
      end
    end
  end

endmodule
