// wired_or_line: behavioural model of the transistor circuit joining the nodes.
//
// Each node's output drives a transistor; the shared wire, pulled up through a
// resistor, reads high when any node drives high and low when none does. The
// real circuit is slow: the wire takes about 700 ns (19 clocks at 27 MHz) to
// follow a change. This model ORs the N drivers and an extra noise input, and
// lets the wire follow a rising OR after RISE_DELAY clocks and a falling OR
// after FALL_DELAY clocks. It is a clocked approximation for simulation only.
module wired_or_line #(
  parameter int unsigned N          = 2,
  parameter int unsigned RISE_DELAY = 19,
  parameter int unsigned FALL_DELAY = 17
) (
  input  logic         clk,
  input  logic [N-1:0] drv,
  input  logic         noise,
  output logic         line
);
  localparam int unsigned D = (RISE_DELAY > FALL_DELAY) ? RISE_DELAY : FALL_DELAY;
  logic [D-1:0] hist = '0;
  initial line = 1'b0;
  always_ff @(posedge clk) begin
    hist <= {hist[D-2:0], |drv};
    line <= (line ? hist[FALL_DELAY-1] : hist[RISE_DELAY-1]) | noise;
  end
endmodule
