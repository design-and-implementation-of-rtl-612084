// da_control: sample sequencer ("addressing unit") of the bit-serial DA FIR.
//
// A sample is accepted when in_valid and in_ready are both high; that cycle
// raises `load` for the shift register. The next DATA_W cycles each present
// one bit slice (sign bit first) and raise `shift`. in_ready is high when idle
// and in the last slice cycle, so back-to-back samples are taken every DATA_W
// cycles with no gap; an idle input just leaves the unit waiting.
// Each slice is tagged valid / msb (sign slice, to be subtracted) / last; the
// tags travel through PIPE registers so they arrive at the accumulator with
// the partial sum of the same slice, PIPE being the adder tree's latency.
// The handshake and the tag pipeline are this implementation's choices.
module da_control #(
  parameter int unsigned DATA_W = 8,
  parameter int unsigned PIPE   = 4
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  output logic in_ready,
  output logic load,       // capture the new sample
  output logic shift,      // advance the serialiser
  output logic acc_en,     // slice sum at accumulator input is valid
  output logic acc_msb,    // ... and is the sign-bit slice
  output logic acc_last    // ... and is the last slice of the sample
);

  localparam int unsigned CNT_W = (DATA_W > 1) ? $clog2(DATA_W) : 1;

  logic             busy;
  logic [CNT_W-1:0] cnt;
  logic             last_slice;

  assign last_slice = busy && (cnt == CNT_W'(DATA_W - 1));
  assign in_ready   = !busy || last_slice;
  assign load       = in_valid && in_ready;
  assign shift      = busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      cnt  <= '0;
    end else if (load) begin
      busy <= 1'b1;
      cnt  <= '0;
    end else if (busy) begin
      if (last_slice) busy <= 1'b0;
      else            cnt  <= cnt + 1'b1;
    end
  end

  // tag pipeline: index 0 is the slice presented in this cycle
  logic [PIPE:0] v_q, m_q, l_q;

  assign v_q[0] = busy;
  assign m_q[0] = busy && (cnt == '0);
  assign l_q[0] = last_slice;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v_q[PIPE:1] <= '0;
      m_q[PIPE:1] <= '0;
      l_q[PIPE:1] <= '0;
    end else begin
      v_q[PIPE:1] <= v_q[PIPE-1:0];
      m_q[PIPE:1] <= m_q[PIPE-1:0];
      l_q[PIPE:1] <= l_q[PIPE-1:0];
    end
  end

  assign acc_en   = v_q[PIPE];
  assign acc_msb  = m_q[PIPE];
  assign acc_last = l_q[PIPE];

  // the slice counter never leaves 0..DATA_W-1
  a_cnt_range: assert property (@(posedge clk) disable iff (!rst_n)
    cnt <= CNT_W'(DATA_W - 1));
  // a load is never taken in the middle of a sample
  a_load_ok: assert property (@(posedge clk) disable iff (!rst_n)
    load |-> (!busy || last_slice));

endmodule
