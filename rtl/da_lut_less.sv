// da_lut_less: memory-free distributed-arithmetic unit for four taps.
//
// Repeating the halving of the DA table until nothing is left gives one
// 2:1 multiplexer per tap (coefficient h[k] when address bit k is 1, else 0)
// followed by a two-level adder tree. The result equals the 16-word table's
// word at the same address. Purely combinational.
module da_lut_less
  import fir_da_pkg::*;
#(
  parameter coef_t H [GROUP] = '{12'sd4, 12'sd9, 12'sd13, 12'sd12}
) (
  input  logic [GROUP-1:0] addr,   // bit k from tap k of this group
  output lut_t             data    // sum of h[k] over the set bits
);

  lut_t sel [GROUP];
  lut_t sum01, sum23;

  always_comb begin
    for (int k = 0; k < GROUP; k++)
      sel[k] = addr[k] ? lut_t'(H[k]) : '0;
  end

  assign sum01 = sel[0] + sel[1];
  assign sum23 = sel[2] + sel[3];
  assign data  = sum01 + sum23;

endmodule
