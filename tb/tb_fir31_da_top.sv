// tb_fir31_da_top: end-to-end test of the 32-tap DA FIR filter.
// Three filters, one per DA unit style (8-word table with mux and adder,
// 16-word table, table-free), receive the same sample stream. A reference
// model here keeps the last 32 samples and computes sum h[k]*x[n-k] with
// ordinary multiplication. Every output of every filter is compared with the
// reference, and must arrive exactly DATA_W + 4 clock edges after the edge
// that accepted its sample. The stream mixes back-to-back samples, idle
// gaps, negative samples and full-scale runs (+127 / -128 / the sign
// pattern of h), and the test counts how often each of these happened.
// A fourth filter, built with TAPS = 16 (four DA units, two adder levels, so
// one cycle less latency) and test coefficients including full-scale values,
// gets the same stream and its own reference.
module tb_fir31_da_top;
  import fir_da_pkg::*;

  localparam int unsigned DATA_W = 8;
  localparam int unsigned Y_W    = LUT_W + 3 + DATA_W;
  localparam int unsigned LAT    = DATA_W + 4;
  localparam int unsigned NSAMP  = 600;

  logic clk = 0, rst_n = 0, in_valid = 0;
  logic signed [DATA_W-1:0] x_in = '0;
  logic rdy [3];
  logic signed [Y_W-1:0] y [3];
  logic yv [3];

  fir31_da_top #(.DATA_W(DATA_W), .LUT_STYLE(LUT_MODIFIED)) u_mod (
    .clk, .rst_n, .in_valid, .in_ready(rdy[0]), .x_in, .y_out(y[0]), .y_valid(yv[0]));
  fir31_da_top #(.DATA_W(DATA_W), .LUT_STYLE(LUT_BASIC)) u_basic (
    .clk, .rst_n, .in_valid, .in_ready(rdy[1]), .x_in, .y_out(y[1]), .y_valid(yv[1]));
  fir31_da_top #(.DATA_W(DATA_W), .LUT_STYLE(LUT_LESS)) u_less (
    .clk, .rst_n, .in_valid, .in_ready(rdy[2]), .x_in, .y_out(y[2]), .y_valid(yv[2]));

  // 16-tap variant
  localparam int unsigned T16 = 16;
  localparam int unsigned Y16_W = LUT_W + 2 + DATA_W;
  localparam coef_t H16 [T16] = '{
    -12'sd2048, 12'sd2047, 12'sd100, -12'sd7, 12'sd0, 12'sd1, -12'sd1, 12'sd555,
     12'sd362, -12'sd321, 12'sd247, 12'sd158, -12'sd2048, -12'sd2048, 12'sd13, 12'sd4};
  logic rdy16, yv16;
  logic signed [Y16_W-1:0] y16;
  fir31_da_top #(.DATA_W(DATA_W), .TAPS(T16), .H(H16), .LUT_STYLE(LUT_MODIFIED)) u_16 (
    .clk, .rst_n, .in_valid, .in_ready(rdy16), .x_in, .y_out(y16), .y_valid(yv16));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cyc = 0;
  int hist [NTAPS];
  int exp_y [$], exp_t [$];
  int got_cnt [3] = '{0, 0, 0};
  int exp_idx [3] = '{0, 0, 0};
  int exp16_y [$], exp16_t [$];
  int got16 = 0;
  int n_acc = 0, n_b2b = 0, n_gap = 0, n_neg = 0, n_fullscale = 0, n_neg_out = 0;
  int max_abs = 0;

  always @(posedge clk) cyc <= cyc + 1;

  // reference model and accept bookkeeping, sampled at the falling edge
  always @(negedge clk) if (rst_n) begin
    for (int i = 1; i < 3; i++) begin
      checks++;
      if (rdy[i] !== rdy[0]) begin failures++; $display("FAIL in_ready mismatch"); end
    end
    checks++;
    if (rdy16 !== rdy[0]) begin failures++; $display("FAIL in_ready mismatch (16 taps)"); end
    if (rdy[0] && !in_valid) n_gap++;
    if (in_valid && rdy[0]) begin
      int s;
      n_acc++;
      if (last_was_b2b()) n_b2b++;
      if (x_in < 0) n_neg++;
      if (x_in == -128 || x_in == 127) n_fullscale++;
      for (int k = NTAPS - 1; k > 0; k--) hist[k] = hist[k-1];
      hist[0] = int'(x_in);
      s = 0;
      for (int k = 0; k < NTAPS; k++) s += int'(H_DEFAULT[k]) * hist[k];
      exp_y.push_back(s);
      exp_t.push_back(cyc + 1 + LAT);  // accepting edge is the next one
      s = 0;
      for (int k = 0; k < T16; k++) s += int'(H16[k]) * hist[k];
      exp16_y.push_back(s);
      exp16_t.push_back(cyc + LAT);    // one adder level fewer
      if (s < 0) n_neg_out++;
      if ((s < 0 ? -s : s) > max_abs) max_abs = (s < 0 ? -s : s);
    end
    if (yv16) begin
      checks += 2;
      if (got16 >= exp16_y.size()) begin
        failures += 2; $display("FAIL 16-tap filter: unexpected output");
      end else begin
        if (int'(y16) != exp16_y[got16]) begin
          failures++;
          if (failures < 20) $display("FAIL 16-tap out %0d: y=%0d exp=%0d", got16, y16, exp16_y[got16]);
        end
        if (cyc != exp16_t[got16]) begin
          failures++;
          if (failures < 20) $display("FAIL 16-tap out %0d: at cycle %0d exp %0d", got16, cyc, exp16_t[got16]);
        end
      end
      got16++;
    end
    for (int i = 0; i < 3; i++) if (yv[i]) begin
      int j;
      j = exp_idx[i];
      checks += 2;
      if (j >= exp_y.size()) begin
        failures += 2; $display("FAIL filter %0d: unexpected output", i);
      end else begin
        if (int'(y[i]) != exp_y[j]) begin
          failures++;
          if (failures < 20) $display("FAIL filter %0d out %0d: y=%0d exp=%0d", i, j, y[i], exp_y[j]);
        end
        if (cyc != exp_t[j]) begin
          failures++;
          if (failures < 20) $display("FAIL filter %0d out %0d: at cycle %0d exp %0d", i, j, cyc, exp_t[j]);
        end
      end
      exp_idx[i]++;
      got_cnt[i]++;
    end
  end

  // a sample accepted while the previous one is in its last slice
  int last_accept_cyc = -100;
  function automatic bit last_was_b2b();
    return (cyc - last_accept_cyc) == DATA_W;
  endfunction
  always @(negedge clk) if (rst_n && in_valid && rdy[0]) last_accept_cyc <= cyc;

  function automatic logic signed [DATA_W-1:0] pick(input int n);
    if (n >= 100 && n < 140) return -128;                       // full-scale negative
    if (n >= 140 && n < 180) return 127;                        // full-scale positive
    if (n >= 180 && n < 212)                                    // sign pattern of h
      return (H_DEFAULT[211 - n] < 0) ? -128 : 127;
    return DATA_W'($urandom);
  endfunction

  initial begin
    for (int k = 0; k < NTAPS; k++) hist[k] = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int n = 0; n < NSAMP; n++) begin
      // first 60 samples back to back, then random gaps
      if (n >= 60) repeat ($urandom_range(0, 14)) @(posedge clk);
      #1;
      x_in <= pick(n);
      in_valid <= 1;
      do @(posedge clk); while (!rdy[0]);
      #1 in_valid <= 0;
    end
    repeat (LAT + 5) @(posedge clk);
    for (int i = 0; i < 3; i++) begin
      checks++;
      if (got_cnt[i] != NSAMP) begin failures++; $display("FAIL filter %0d gave %0d outputs", i, got_cnt[i]); end
    end
    checks++;
    if (got16 != NSAMP) begin failures++; $display("FAIL 16-tap filter gave %0d outputs", got16); end
    $display("mechanisms: accepted=%0d back_to_back=%0d idle_cycles=%0d negative_in=%0d fullscale_in=%0d negative_out=%0d max|y|=%0d",
             n_acc, n_b2b, n_gap, n_neg, n_fullscale, n_neg_out, max_abs);
    checks += 5;
    if (n_b2b == 0) begin failures++; $display("FAIL no back-to-back sample"); end
    if (n_gap == 0) begin failures++; $display("FAIL no idle gap"); end
    if (n_neg == 0) begin failures++; $display("FAIL no negative sample"); end
    if (n_fullscale == 0) begin failures++; $display("FAIL no full-scale sample"); end
    if (n_neg_out == 0) begin failures++; $display("FAIL no negative output"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NSAMP * (DATA_W + 16) + 200) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
