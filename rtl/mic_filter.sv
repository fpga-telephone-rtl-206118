// mic_filter: low-pass and 8:1 decimation of the microphone audio.
//
// Conversation and message audio travel at 6 kHz, one 8-bit sample per
// packet, while the codec delivers 48 kHz. Each 48 kHz sample (in_valid) is
// added to a running sum of the last RATIO samples (a moving-average low-pass
// that suppresses what would alias); every RATIO-th input the average is
// output with a one-cycle out_valid, one cycle after that input. Samples are
// signed 8-bit. The 48 kHz to 6 kHz rate follows the description; the filter,
// which the description only names, is this design's simplest choice. RATIO
// must be a power of two.
module mic_filter #(
  parameter int unsigned RATIO = 8
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       in_valid,
  input  logic [7:0] in_sample,
  output logic       out_valid,
  output logic [7:0] out_sample
);
  localparam int RW = $clog2(RATIO);
  localparam int SW = 8 + RW;

  logic signed [7:0]    hist [RATIO];
  logic signed [SW-1:0] sum, sum_next;
  logic [RW-1:0]        phase;

  assign sum_next = sum + SW'(signed'(in_sample)) - SW'(hist[RATIO-1]);

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < RATIO; i++) hist[i] <= '0;
      sum        <= '0;
      phase      <= '0;
      out_valid  <= 1'b0;
      out_sample <= '0;
    end else begin
      out_valid <= 1'b0;
      if (in_valid) begin
        hist[0] <= signed'(in_sample);
        for (int i = 1; i < RATIO; i++) hist[i] <= hist[i-1];
        sum   <= sum_next;
        phase <= phase + 1'b1;
        if (phase == RW'(RATIO - 1)) begin
          out_valid  <= 1'b1;
          out_sample <= 8'(sum_next >>> RW);
        end
      end
    end
  end
endmodule
