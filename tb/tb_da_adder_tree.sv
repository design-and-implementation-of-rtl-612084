// tb_da_adder_tree: random 14-bit signed inputs every cycle; the sum of the
// inputs applied four cycles earlier (the tree's latency) must appear at the
// output. Extreme values exercise the full output range.
module tb_da_adder_tree;
  localparam int unsigned NIN = 8, IN_W = 14, LAT = 4, OUT_W = IN_W + 3;

  logic clk = 0, rst_n = 0;
  logic signed [IN_W-1:0] din [NIN];
  logic signed [OUT_W-1:0] sum;
  int exp_q [$];
  int checks = 0, failures = 0;

  da_adder_tree #(.NIN(NIN), .IN_W(IN_W)) dut (.clk, .rst_n, .din, .sum);

  always #5 clk = ~clk;

  initial begin
    for (int i = 0; i < NIN; i++) din[i] = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int t = 0; t < 300; t++) begin
      int s;
      s = 0;
      for (int i = 0; i < NIN; i++) begin
        logic signed [IN_W-1:0] v;
        v = IN_W'($urandom);
        if (t == 10) v = {1'b1, {(IN_W-1){1'b0}}};
        if (t == 11) v = {1'b0, {(IN_W-1){1'b1}}};
        din[i] <= v;
        s += int'(v);
      end
      exp_q.push_back(s);
      @(posedge clk);
      #1;
      if (t >= LAT - 1) begin
        int e;
        e = exp_q.pop_front();
        checks++;
        if (int'(sum) != e) begin
          failures++;
          if (failures < 10) $display("FAIL t=%0d got=%0d exp=%0d", t, sum, e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
