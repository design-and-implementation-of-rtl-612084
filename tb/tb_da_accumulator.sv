// tb_da_accumulator: feeds groups of DATA_W slice sums, sign slice first,
// with random gaps inside and between groups, and checks y against
// -2^(B-1)*s[B-1] + sum_{b<B-1} 2^b*s[b] computed here, y_valid one cycle
// after the last slice, and that y_valid pulses exactly once per group.
module tb_da_accumulator;
  localparam int unsigned IN_W = 17, DATA_W = 8, ACC_W = IN_W + DATA_W;

  logic clk = 0, rst_n = 0, en = 0, msb = 0, last = 0;
  logic signed [IN_W-1:0] s = '0;
  logic signed [ACC_W-1:0] y;
  logic y_valid;
  int checks = 0, failures = 0, pulses = 0;

  da_accumulator #(.IN_W(IN_W), .DATA_W(DATA_W)) dut (.clk, .rst_n, .en, .msb, .last, .s, .y, .y_valid);

  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n && y_valid) pulses++;

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int g = 0; g < 200; g++) begin
      longint e;
      e = 0;
      for (int b = DATA_W - 1; b >= 0; b--) begin
        logic signed [IN_W-1:0] v;
        v = IN_W'($urandom);
        if (g == 5) v = {1'b1, {(IN_W-1){1'b0}}};
        if (g == 6) v = (b == DATA_W - 1) ? {1'b1, {(IN_W-1){1'b0}}} : {1'b0, {(IN_W-1){1'b1}}};
        e += (b == DATA_W - 1) ? -(longint'(v) <<< b) : (longint'(v) <<< b);
        en <= 1; msb <= (b == DATA_W - 1); last <= (b == 0); s <= v;
        @(posedge clk);
        en <= 0; msb <= 0; last <= 0;
        #1;
        checks++;
        if (y_valid !== (b == 0)) begin
          failures++;
          $display("FAIL g=%0d b=%0d y_valid=%b", g, b, y_valid);
        end
        if (b == 0) begin
          checks++;
          if (longint'(y) != e) begin
            failures++;
            $display("FAIL g=%0d y=%0d exp=%0d", g, y, e);
          end
        end
        repeat ($urandom_range(0, 1)) @(posedge clk);
      end
    end
    @(posedge clk);
    checks++;
    if (pulses != 200) begin failures++; $display("FAIL pulses=%0d", pulses); end
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
