// get_data: deserialiser for the single shared wire.
//
// While enabled and idle it waits for the line to go high, which marks the
// first preamble bit. From that cycle it cuts the line into windows of
// BIT_CYCLES clocks, one per bit. The first SKIP_CYCLES samples of each window
// are ignored because the line circuit is still settling; the remaining
// samples decide the bit by the MJRTY majority vote (keep a candidate and a
// counter, count up on agreement, down on disagreement, take a new candidate
// when the counter is zero). If the four preamble bits are not 1011 the
// reception is abandoned and preamble_err pulses: the rise was noise. After
// 13 data bits the packet is output with a one-cycle pkt_valid, 17 bit times
// after the rise was seen. Either way the receiver then waits until the line
// has been low for IDLE_LOW_CYCLES clocks before it can start again. Bit time,
// skipped samples, preamble and majority vote follow the description; the
// alignment to the first rise and the low-time rule are this design's own.
module get_data
  import phone_pkg::*;
#(
  parameter int unsigned BIT_CYCLES      = 32,
  parameter int unsigned SKIP_CYCLES     = 13,
  parameter int unsigned IDLE_LOW_CYCLES = 8
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic                   enable,
  input  logic                   line_in,
  output logic                   busy,
  output logic                   pkt_valid,
  output logic [PACKET_BITS-1:0] packet,
  output logic                   preamble_err
);
  localparam int FRAME_BITS = PREAMBLE_BITS + PACKET_BITS;
  localparam int CW  = $clog2(BIT_CYCLES + 1);
  localparam int LW  = $clog2(IDLE_LOW_CYCLES + 1);
  localparam int MW  = $clog2(BIT_CYCLES + 1);

  typedef enum logic [1:0] {RX_IDLE, RX_BITS, RX_WAIT_LOW} rx_state_t;

  rx_state_t             st;
  logic [CW-1:0]         cyc;
  localparam int NW = $clog2(FRAME_BITS + 1);
  logic [NW-1:0]         nbits;
  logic [FRAME_BITS-2:0] shreg;
  logic                  cand;
  logic [MW-1:0]         votes;
  logic [LW-1:0]         low_cnt;
  logic                  bit_val;
  logic [FRAME_BITS-1:0] frame;

  assign busy = (st != RX_IDLE);

  // The bit decided at the end of a window includes the last sample.
  always_comb begin
    if (votes == 0)          bit_val = line_in;
    else if (line_in == cand) bit_val = cand;
    else if (votes == 1)     bit_val = line_in;  // counter drops to zero; last sample decides
    else                     bit_val = cand;
    frame = {shreg, bit_val};
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      st           <= RX_IDLE;
      cyc          <= '0;
      nbits        <= '0;
      shreg        <= '0;
      cand         <= 1'b0;
      votes        <= '0;
      low_cnt      <= '0;
      pkt_valid    <= 1'b0;
      packet       <= '0;
      preamble_err <= 1'b0;
    end else begin
      pkt_valid    <= 1'b0;
      preamble_err <= 1'b0;
      unique case (st)
        RX_IDLE: if (enable && line_in) begin
          st    <= RX_BITS;
          cyc   <= CW'(1);
          nbits <= '0;
          votes <= '0;
          cand  <= 1'b0;
        end
        RX_BITS: begin
          // MJRTY vote over samples SKIP_CYCLES .. BIT_CYCLES-1 of the window.
          if (cyc >= CW'(SKIP_CYCLES) && cyc != CW'(BIT_CYCLES - 1)) begin
            if (votes == 0) begin
              cand  <= line_in;
              votes <= MW'(1);
            end else if (line_in == cand) begin
              votes <= votes + 1'b1;
            end else begin
              votes <= votes - 1'b1;
            end
          end
          if (cyc == CW'(BIT_CYCLES - 1)) begin
            cyc   <= '0;
            votes <= '0;
            shreg <= frame[FRAME_BITS-2:0];
            nbits <= nbits + 1'b1;
            if (nbits == NW'(PREAMBLE_BITS - 1) && frame[PREAMBLE_BITS-1:0] != PREAMBLE) begin
              preamble_err <= 1'b1;
              st           <= RX_WAIT_LOW;
              low_cnt      <= '0;
            end else if (nbits == NW'(FRAME_BITS - 1)) begin
              packet    <= frame[PACKET_BITS-1:0];
              pkt_valid <= 1'b1;
              st        <= RX_WAIT_LOW;
              low_cnt   <= '0;
            end
          end else begin
            cyc <= cyc + 1'b1;
          end
        end
        RX_WAIT_LOW: begin
          if (line_in) begin
            low_cnt <= '0;
          end else if (low_cnt == LW'(IDLE_LOW_CYCLES - 1)) begin
            st <= RX_IDLE;
          end else begin
            low_cnt <= low_cnt + 1'b1;
          end
        end
        default: st <= RX_IDLE;
      endcase
    end
  end
endmodule
