// da_lut_modified: half-size distributed-arithmetic unit for four taps.
//
// The upper half of a 16-word DA table (b3 = 1) equals the lower half plus
// h[3]. This unit therefore stores only the eight words addressed by
// {b2,b1,b0} and adds h[3] through a 2:1 multiplexer (h[3] when b3 = 1,
// 0 otherwise) and one adder. The output is identical to the 16-word table.
// Purely combinational. The 8-word table is computed at elaboration from the
// coefficient parameters.
module da_lut_modified
  import fir_da_pkg::*;
#(
  parameter coef_t H [GROUP] = '{12'sd4, 12'sd9, 12'sd13, 12'sd12}
) (
  input  logic [GROUP-1:0] addr,   // bit k from tap k of this group
  output lut_t             data    // sum of h[k] over the set bits
);

  localparam int unsigned HALF = GROUP - 1;

  function automatic lut_t word_of(input int unsigned a);
    lut_t s = '0;
    for (int k = 0; k < HALF; k++)
      if (a[k]) s += lut_t'(H[k]);
    return s;
  endfunction

  lut_t rom [2**HALF];
  lut_t mux_out;

  for (genvar a = 0; a < 2**HALF; a++) begin : g_rom
    assign rom[a] = word_of(a);
  end

  assign mux_out = addr[HALF] ? lut_t'(H[HALF]) : '0;
  assign data    = rom[addr[HALF-1:0]] + mux_out;

endmodule
