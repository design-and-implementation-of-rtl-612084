// da_adder_tree: pipelined adder tree that sums the eight look-up outputs.
//
// Stage 0 registers the NIN inputs (the pipeline registers right behind the
// look-up units); each following stage adds neighbouring pairs and registers
// the sums, halving the count until one value remains. For NIN = 8 that is
// 8 -> 4 -> 2 -> 1 with a register after each level, so `sum` follows `din`
// by LATENCY = 1 + log2(NIN) = 4 clock cycles, and a new set can enter every
// cycle. Outputs are full precision (IN_W + log2(NIN) bits, signed).
// The register placement follows the filter's block diagram; pairing
// neighbours (units 0+1, 2+3, ...) also follows it.
module da_adder_tree #(
  parameter int unsigned NIN  = 8,
  parameter int unsigned IN_W = 14,
  localparam int unsigned LEVELS = $clog2(NIN),
  localparam int unsigned OUT_W  = IN_W + LEVELS
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic signed [IN_W-1:0]  din [NIN],
  output logic signed [OUT_W-1:0] sum
);

  logic signed [OUT_W-1:0] st [LEVELS+1][NIN];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int l = 0; l <= LEVELS; l++)
        for (int i = 0; i < NIN; i++)
          st[l][i] <= '0;
    end else begin
      for (int i = 0; i < NIN; i++)
        st[0][i] <= OUT_W'(din[i]);
      for (int l = 1; l <= LEVELS; l++) begin
        for (int i = 0; i < NIN / 2; i++)
          st[l][i] <= (i < (NIN >> l)) ? st[l-1][2*i] + st[l-1][2*i+1] : '0;
        for (int i = NIN / 2; i < NIN; i++)
          st[l][i] <= '0;
      end
    end
  end

  assign sum = st[LEVELS][0];

endmodule
