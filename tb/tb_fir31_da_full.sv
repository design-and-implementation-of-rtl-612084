// tb_fir31_da_full: the filter at its default configuration (8-bit samples,
// half-size DA units, the 32 quantised low-pass coefficients) run through
// three jobs, every output compared with a direct-form reference computed
// here and its arrival checked at 12 cycles after the accepting edge:
//   1. impulse of height 1: the 32 outputs must be h[0]..h[31];
//   2. a sine of amplitude 100 at 0.05 of the Nyquist frequency (pass band):
//      the steady-state output peak must be within 1 dB of 100 * 2048;
//   3. a sine of amplitude 100 at 0.5 of Nyquist (stop band): the steady-
//      state peak must be at least 35 dB below 100 * 2048.
// Samples are offered back to back, one every 8 cycles.
module tb_fir31_da_full;
  import fir_da_pkg::*;

  localparam int unsigned DATA_W = 8;
  localparam int unsigned LAT    = DATA_W + 4;
  localparam int unsigned NSINE  = 200;

  logic clk = 0, rst_n = 0, in_valid = 0, in_ready, y_valid;
  logic signed [DATA_W-1:0] x_in = '0;
  logic signed [LUT_W+3+DATA_W-1:0] y_out;

  fir31_da_top dut (.clk, .rst_n, .in_valid, .in_ready, .x_in, .y_out, .y_valid);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, cyc = 0;
  int hist [NTAPS];
  int exp_y [$], exp_t [$];
  int outs [$];
  int n_out = 0;

  always @(posedge clk) cyc <= cyc + 1;

  always @(negedge clk) if (rst_n) begin
    if (in_valid && in_ready) begin
      int s;
      for (int k = NTAPS - 1; k > 0; k--) hist[k] = hist[k-1];
      hist[0] = int'(x_in);
      s = 0;
      for (int k = 0; k < NTAPS; k++) s += int'(H_DEFAULT[k]) * hist[k];
      exp_y.push_back(s);
      exp_t.push_back(cyc + 1 + LAT);
    end
    if (y_valid) begin
      checks += 2;
      if (n_out >= exp_y.size()) begin
        failures += 2; $display("FAIL unexpected output");
      end else begin
        if (int'(y_out) != exp_y[n_out]) begin
          failures++;
          if (failures < 20) $display("FAIL out %0d y=%0d exp=%0d", n_out, y_out, exp_y[n_out]);
        end
        if (cyc != exp_t[n_out]) begin
          failures++;
          if (failures < 20) $display("FAIL out %0d at cycle %0d exp %0d", n_out, cyc, exp_t[n_out]);
        end
      end
      outs.push_back(int'(y_out));
      n_out++;
    end
  end

  task automatic send(input logic signed [DATA_W-1:0] v);
    #1;
    x_in <= v;
    in_valid <= 1;
    do @(posedge clk); while (!in_ready);
    #1 in_valid <= 0;
  endtask

  task automatic drain();
    repeat (LAT + 4) @(posedge clk);
  endtask

  function automatic int peak(input int first, input int last);
    int p = 0;
    for (int i = first; i <= last; i++) begin
      int a;
      a = outs[i] < 0 ? -outs[i] : outs[i];
      if (a > p) p = a;
    end
    return p;
  endfunction

  initial begin
    int base, pk;
    real db;
    for (int k = 0; k < NTAPS; k++) hist[k] = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;

    // 1. impulse response
    send(1);
    for (int i = 1; i < NTAPS + 8; i++) send(0);
    drain();
    for (int k = 0; k < NTAPS; k++) begin
      checks++;
      if (outs[k] != int'(H_DEFAULT[k])) begin
        failures++; $display("FAIL impulse tap %0d got %0d exp %0d", k, outs[k], H_DEFAULT[k]);
      end
    end

    // 2. pass-band tone
    base = outs.size();
    for (int i = 0; i < NSINE; i++) send(DATA_W'($rtoi($floor(100.0 * $sin(3.14159265358979 * 0.05 * i) + 0.5))));
    drain();
    pk = peak(base + 2 * NTAPS, base + NSINE - 1);
    db = 20.0 * $log10(real'(pk) / (100.0 * 2048.0));
    $display("pass band (0.05 Nyquist): peak %0d, gain %0.2f dB", pk, db);
    checks++;
    if (db < -1.0 || db > 1.0) begin failures++; $display("FAIL pass-band gain"); end

    // 3. stop-band tone
    base = outs.size();
    for (int i = 0; i < NSINE; i++) send(DATA_W'($rtoi($floor(100.0 * $sin(3.14159265358979 * 0.5 * i) + 0.5))));
    drain();
    pk = peak(base + 2 * NTAPS, base + NSINE - 1);
    db = 20.0 * $log10((real'(pk) + 0.5) / (100.0 * 2048.0));
    $display("stop band (0.5 Nyquist): peak %0d, gain %0.2f dB", pk, db);
    checks++;
    if (db > -35.0) begin failures++; $display("FAIL stop-band attenuation"); end

    checks++;
    if (n_out != exp_y.size()) begin failures++; $display("FAIL %0d outputs for %0d samples", n_out, exp_y.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
