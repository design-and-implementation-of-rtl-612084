// tb_da_shift_register: checks the tap delay line and serialiser.
// Random samples are loaded with random idle gaps between them; after each
// load the testbench keeps its own history of the last 32 samples and, for
// each of the DATA_W following cycles, compares every tap's presented bit
// with bit (DATA_W-1-c) of its own copy of that tap's sample.
module tb_da_shift_register;
  import fir_da_pkg::*;

  localparam int unsigned DATA_W = 8;

  logic clk = 0, rst_n = 0, load = 0, shift = 0;
  logic signed [DATA_W-1:0] x_in = '0;
  logic [NTAPS-1:0] bits;
  logic [DATA_W-1:0] hist [NTAPS];
  int checks = 0, failures = 0;

  da_shift_register #(.DATA_W(DATA_W)) dut (.clk, .rst_n, .load, .shift, .x_in, .bits);

  always #5 clk = ~clk;

  initial begin
    for (int k = 0; k < NTAPS; k++) hist[k] = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    // after reset every tap presents 0
    checks++; if (bits != '0) begin failures++; $display("FAIL reset bits=%h", bits); end
    for (int s = 0; s < 60; s++) begin
      logic [DATA_W-1:0] v;
      v = DATA_W'($urandom);
      if (s == 3) v = '1;
      if (s == 4) v = {1'b1, {(DATA_W-1){1'b0}}};
      x_in <= v; load <= 1; shift <= 0;
      @(posedge clk);
      for (int k = NTAPS-1; k > 0; k--) hist[k] = hist[k-1];
      hist[0] = v;
      load <= 0; shift <= 1;
      for (int c = 0; c < DATA_W; c++) begin
        #1;
        for (int k = 0; k < NTAPS; k++) begin
          checks++;
          if (bits[k] !== hist[k][DATA_W-1-c]) begin
            failures++;
            if (failures < 10) $display("FAIL s=%0d c=%0d tap=%0d got=%b", s, c, k, bits[k]);
          end
        end
        @(posedge clk);
      end
      shift <= 0;
      repeat ($urandom_range(0, 2)) @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
