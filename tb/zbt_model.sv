// zbt_model: behavioural model of the external synchronous SRAM.
//
// A write (we high) stores wdata at addr on the clock edge. A read returns the
// word at addr LATENCY clocks after the edge that samples the address, as a
// pipelined ZBT part does. Contents start at zero.
module zbt_model #(
  parameter int unsigned ADDR_W  = 19,
  parameter int unsigned DATA_W  = 36,
  parameter int unsigned LATENCY = 2
) (
  input  logic              clk,
  input  logic [ADDR_W-1:0] addr,
  input  logic              we,
  input  logic [DATA_W-1:0] wdata,
  output logic [DATA_W-1:0] rdata
);
  logic [DATA_W-1:0] mem [2**ADDR_W];
  logic [DATA_W-1:0] pipe [LATENCY];
  initial begin
    for (int i = 0; i < 2**ADDR_W; i++) mem[i] = '0;
    for (int i = 0; i < LATENCY; i++) pipe[i] = '0;
  end
  always_ff @(posedge clk) begin
    if (we) mem[addr] <= wdata;
    pipe[0] <= mem[addr];
    for (int i = 1; i < LATENCY; i++) pipe[i] <= pipe[i-1];
  end
  assign rdata = pipe[LATENCY-1];
endmodule
