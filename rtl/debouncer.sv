// debouncer: cleans up one mechanical button or switch.
//
// The raw input is brought into the clock domain through two flip-flops. The
// clean output takes the synchronised value only after it has stayed the same
// for DEBOUNCE_CYCLES consecutive clocks; any change restarts the count. A
// change therefore reaches the output DEBOUNCE_CYCLES + 2 clocks after it
// settles. The default window (10 ms at 27 MHz) is this design's choice; the
// description only says that the buttons and switches are noisy and must be
// debounced. Reset clears the output to 0.
module debouncer #(
  parameter int unsigned DEBOUNCE_CYCLES = 270_000
) (
  input  logic clk,
  input  logic rst,
  input  logic noisy,
  output logic clean
);
  localparam int CW = $clog2(DEBOUNCE_CYCLES + 1);

  logic          sync0, sync1;
  logic [CW-1:0] count;

  always_ff @(posedge clk) begin
    if (rst) begin
      sync0 <= 1'b0;
      sync1 <= 1'b0;
      clean <= 1'b0;
      count <= '0;
    end else begin
      sync0 <= noisy;
      sync1 <= sync0;
      if (sync1 == clean) begin
        count <= '0;
      end else if (count == CW'(DEBOUNCE_CYCLES - 1)) begin
        clean <= sync1;
        count <= '0;
      end else begin
        count <= count + 1'b1;
      end
    end
  end
endmodule
