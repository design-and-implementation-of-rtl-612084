// tb_da_control: random in_valid; the testbench predicts, from each accepted
// sample at cycle t, that in_ready is low in cycles t+1..t+B-1 and high
// otherwise, that shift is high in cycles t+1..t+B, and that the accumulator
// tags appear PIPE cycles later: en for slices t+1..t+B, msb at t+1, last at
// t+B. Every cycle is compared with that prediction.
module tb_da_control;
  localparam int unsigned DATA_W = 8, PIPE = 4, NCYC = 3000;

  logic clk = 0, rst_n = 0, in_valid = 0;
  logic in_ready, load, shift, acc_en, acc_msb, acc_last;
  bit exp_busy [NCYC + 64];
  bit exp_en [NCYC + 64], exp_msb [NCYC + 64], exp_last [NCYC + 64], exp_rdy_low [NCYC + 64];
  int checks = 0, failures = 0, accepts = 0, b2b = 0;

  da_control #(.DATA_W(DATA_W), .PIPE(PIPE)) dut (
    .clk, .rst_n, .in_valid, .in_ready, .load, .shift, .acc_en, .acc_msb, .acc_last);

  always #5 clk = ~clk;

  task automatic chk(input string nm, input logic got, input bit exp, input int t);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s t=%0d got=%b exp=%b", nm, t, got, exp);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int t = 0; t < NCYC; t++) begin
      in_valid <= ($urandom_range(0, 3) != 0);
      #1;
      chk("in_ready", in_ready, !exp_rdy_low[t], t);
      chk("load", load, in_valid && !exp_rdy_low[t], t);
      chk("shift", shift, exp_busy[t], t);
      chk("acc_en", acc_en, exp_en[t], t);
      chk("acc_msb", acc_msb, exp_msb[t], t);
      chk("acc_last", acc_last, exp_last[t], t);
      if (in_valid && !exp_rdy_low[t]) begin
        accepts++;
        if (exp_busy[t]) b2b++;
        for (int c = 1; c <= DATA_W; c++) begin
          exp_busy[t + c] = 1;
          exp_en[t + c + PIPE] = 1;
          if (c < DATA_W) exp_rdy_low[t + c] = 1;
        end
        exp_msb[t + 1 + PIPE] = 1;
        exp_last[t + DATA_W + PIPE] = 1;
      end
      @(posedge clk);
    end
    checks++;
    if (accepts < 100 || b2b == 0) begin failures++; $display("FAIL accepts=%0d b2b=%0d", accepts, b2b); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NCYC + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
