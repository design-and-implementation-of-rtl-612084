// da_lut_basic: 16-word distributed-arithmetic look-up table for four taps.
//
// The address is one bit slice {b3,b2,b1,b0} taken from the same bit position
// of four consecutive input samples; the table returns the sum of the
// coefficients whose address bit is 1 (word 0 is 0, word 0101 is h[0]+h[2],
// word 1111 is h[0]+h[1]+h[2]+h[3]). The table contents follow the filter's
// look-up table exactly; here the sixteen words are computed at elaboration
// from the four coefficient parameters and held in an array read
// combinationally, so the unit has no latency. Addressing bit k selects h[k].
module da_lut_basic
  import fir_da_pkg::*;
#(
  parameter coef_t H [GROUP] = '{12'sd4, 12'sd9, 12'sd13, 12'sd12}
) (
  input  logic [GROUP-1:0] addr,   // bit k from tap k of this group
  output lut_t             data    // sum of h[k] over the set bits
);

  function automatic lut_t word_of(input int unsigned a);
    lut_t s = '0;
    for (int k = 0; k < GROUP; k++)
      if (a[k]) s += lut_t'(H[k]);
    return s;
  endfunction

  lut_t rom [2**GROUP];

  for (genvar a = 0; a < 2**GROUP; a++) begin : g_rom
    assign rom[a] = word_of(a);
  end

  assign data = rom[addr];

endmodule
