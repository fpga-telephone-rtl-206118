// spk_filter: 1:8 interpolation of 6 kHz audio for the speaker.
//
// The latest 6 kHz sample (in_valid) is held, and on every 48 kHz ready the
// held value enters a RATIO-sample moving average whose result is the speaker
// sample. Hold followed by an average over one 6 kHz period ramps linearly
// from one 6 kHz sample to the next, removing the steps of a plain hold.
// out_sample changes one cycle after ready. Samples are signed 8-bit. The
// 6 kHz to 48 kHz rate follows the description; the filter, which the
// description only names, is this design's simplest choice. RATIO must be a
// power of two.
module spk_filter #(
  parameter int unsigned RATIO = 8
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       in_valid,
  input  logic [7:0] in_sample,
  input  logic       ready,
  output logic [7:0] out_sample
);
  localparam int RW = $clog2(RATIO);
  localparam int SW = 8 + RW;

  logic signed [7:0]    held;
  logic signed [7:0]    hist [RATIO];
  logic signed [SW-1:0] sum, sum_next;

  assign sum_next = sum + SW'(held) - SW'(hist[RATIO-1]);

  always_ff @(posedge clk) begin
    if (rst) begin
      held <= '0;
      for (int i = 0; i < RATIO; i++) hist[i] <= '0;
      sum        <= '0;
      out_sample <= '0;
    end else begin
      if (in_valid) held <= signed'(in_sample);
      if (ready) begin
        hist[0] <= held;
        for (int i = 1; i < RATIO; i++) hist[i] <= hist[i-1];
        sum        <= sum_next;
        out_sample <= 8'(sum_next >>> RW);
      end
    end
  end
endmodule
