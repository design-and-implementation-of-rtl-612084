// tb_da_lut_less: exhaustive check of da_lut_less. Two instances, one with the
// first four filter coefficients and one with a group holding negative
// coefficients, are driven with all 16 addresses; every output is compared
// with the sum of the selected coefficients computed here.
module tb_da_lut_less;
  import fir_da_pkg::*;

  localparam coef_t HA [GROUP] = '{12'sd4, 12'sd9, 12'sd13, 12'sd12};
  localparam coef_t HB [GROUP] = '{12'sd5, -12'sd10, -12'sd30, -12'sd48};
  localparam coef_t HC [GROUP] = '{-12'sd2048, 12'sd2047, -12'sd2048, -12'sd2048};

  logic [GROUP-1:0] addr;
  lut_t da, db, dc;
  int checks = 0, failures = 0;

  da_lut_less #(.H(HA)) u_a (.addr, .data(da));
  da_lut_less #(.H(HB)) u_b (.addr, .data(db));
  da_lut_less #(.H(HC)) u_c (.addr, .data(dc));

  function automatic int ref_sum(input coef_t h [GROUP], input logic [GROUP-1:0] a);
    int s = 0;
    for (int k = 0; k < GROUP; k++) if (a[k]) s += int'(h[k]);
    return s;
  endfunction

  task automatic check(input string nm, input lut_t got, input int exp);
    checks++;
    if (int'(got) != exp) begin
      failures++;
      $display("FAIL %s addr=%b got=%0d exp=%0d", nm, addr, got, exp);
    end
  endtask

  initial begin
    for (int a = 0; a < 2**GROUP; a++) begin
      addr = GROUP'(a);
      #1;
      check("A", da, ref_sum(HA, addr));
      check("B", db, ref_sum(HB, addr));
      check("C", dc, ref_sum(HC, addr));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // watchdog
  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
