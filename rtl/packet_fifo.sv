// packet_fifo: the eight-entry packet buffer of the serial link.
//
// One instance sits between the controller and the serialiser (output
// buffer), so the controller can hand over packets while the wire is busy;
// another sits between the deserialiser and the packet reader (input buffer).
// It is a circular buffer with show-ahead read: dout is the oldest entry
// whenever empty is low, and pop removes it. Push and pop in the same cycle
// are both honoured. A push while full drops the packet and pulses overflow
// for one cycle. Depth eight follows the description; dropping on overflow
// is this design's choice.
module packet_fifo #(
  parameter int unsigned DEPTH = 8,
  parameter int unsigned WIDTH = 13
) (
  input  logic                       clk,
  input  logic                       rst,
  input  logic                       push,
  input  logic [WIDTH-1:0]           din,
  input  logic                       pop,
  output logic [WIDTH-1:0]           dout,
  output logic                       empty,
  output logic                       full,
  output logic [$clog2(DEPTH+1)-1:0] count,
  output logic                       overflow
);
  localparam int AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    rd_ptr, wr_ptr;
  logic             do_push, do_pop;

  assign empty   = (count == 0);
  assign full    = (count == DEPTH[$clog2(DEPTH+1)-1:0]);
  assign do_pop  = pop && !empty;
  assign do_push = push && (!full || do_pop);
  assign dout    = mem[rd_ptr];

  function automatic logic [AW-1:0] next_ptr(input logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (do_push) mem[wr_ptr] <= din;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      rd_ptr   <= '0;
      wr_ptr   <= '0;
      count    <= '0;
      overflow <= 1'b0;
    end else begin
      overflow <= push && !do_push;
      if (do_push) wr_ptr <= next_ptr(wr_ptr);
      if (do_pop)  rd_ptr <= next_ptr(rd_ptr);
      count <= count + $bits(count)'(do_push) - $bits(count)'(do_pop);
    end
  end

  // The buffer never holds more than DEPTH entries.
  a_count_bound: assert property (@(posedge clk) disable iff (rst) 32'(count) <= DEPTH);
endmodule
