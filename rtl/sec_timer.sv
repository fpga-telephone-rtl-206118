// sec_timer: counts whole seconds for the telephone controller.
//
// A start pulse clears the count and latches the limit in seconds. A prescaler
// divides the clock by CLK_HZ to make one tick per second; each tick increments
// count until it equals the limit, at which point expired goes high and stays
// high until the next start. A limit of zero expires one cycle after start.
// Before the first start the timer is idle with expired low. Counting seconds
// on request with a limit that depends on the state follows the description;
// the interface is this design's own.
module sec_timer #(
  parameter int unsigned CLK_HZ = 27_000_000
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       start,
  input  logic [7:0] seconds,
  output logic [7:0] count,
  output logic       expired
);
  localparam int PW = $clog2(CLK_HZ + 1);

  logic [PW-1:0] prescale;
  logic [7:0]    limit;
  logic          running;

  always_ff @(posedge clk) begin
    if (rst) begin
      prescale <= '0;
      limit    <= '0;
      count    <= '0;
      running  <= 1'b0;
      expired  <= 1'b0;
    end else if (start) begin
      prescale <= '0;
      limit    <= seconds;
      count    <= '0;
      running  <= 1'b1;
      expired  <= 1'b0;
    end else if (running) begin
      if (count == limit) begin
        expired <= 1'b1;
        running <= 1'b0;
      end else if (prescale == PW'(CLK_HZ - 1)) begin
        prescale <= '0;
        count    <= count + 1'b1;
      end else begin
        prescale <= prescale + 1'b1;
      end
    end
  end
endmodule
