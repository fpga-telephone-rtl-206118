// send_data: serialiser for the single shared wire.
//
// On start it latches a 13-bit packet and sends 17 bits, MSB first: the
// preamble 1011 that lets receivers tell a packet from noise, then the packet
// itself. Each bit is held on line_out for BIT_CYCLES clocks (32 in the final
// single-wire build, long enough to cover the roughly 700 ns the line circuit
// needs to follow a change). After the last bit the line is held low for
// GAP_CYCLES so the delayed tail of the packet has left the wire before the
// node may listen again; done pulses when that gap ends, and busy is high from
// the cycle after start until then. Preamble, bit time and MSB-first framing
// follow the description; the trailing gap is this design's own choice.
module send_data
  import phone_pkg::*;
#(
  parameter int unsigned BIT_CYCLES = 32,
  parameter int unsigned GAP_CYCLES = 32
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic                   start,
  input  logic [PACKET_BITS-1:0] packet,
  output logic                   busy,
  output logic                   done,
  output logic                   line_out
);
  localparam int FRAME_BITS = PREAMBLE_BITS + PACKET_BITS;
  localparam int CW = $clog2((BIT_CYCLES > GAP_CYCLES ? BIT_CYCLES : GAP_CYCLES) + 1);

  typedef enum logic [1:0] {TX_IDLE, TX_BITS, TX_GAP} tx_state_t;

  tx_state_t               st;
  logic [FRAME_BITS-1:0]   shreg;
  logic [$clog2(FRAME_BITS+1)-1:0] bits_left;
  logic [CW-1:0]           cyc;

  assign busy     = (st != TX_IDLE);
  assign line_out = (st == TX_BITS) && shreg[FRAME_BITS-1];

  always_ff @(posedge clk) begin
    if (rst) begin
      st        <= TX_IDLE;
      shreg     <= '0;
      bits_left <= '0;
      cyc       <= '0;
      done      <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (st)
        TX_IDLE: if (start) begin
          shreg     <= {PREAMBLE, packet};
          bits_left <= FRAME_BITS[$bits(bits_left)-1:0];
          cyc       <= '0;
          st        <= TX_BITS;
        end
        TX_BITS: begin
          if (cyc == CW'(BIT_CYCLES - 1)) begin
            cyc       <= '0;
            shreg     <= {shreg[FRAME_BITS-2:0], 1'b0};
            bits_left <= bits_left - 1'b1;
            if (bits_left == 1) st <= TX_GAP;
          end else begin
            cyc <= cyc + 1'b1;
          end
        end
        TX_GAP: begin
          if (cyc == CW'(GAP_CYCLES - 1)) begin
            cyc  <= '0;
            st   <= TX_IDLE;
            done <= 1'b1;
          end else begin
            cyc <= cyc + 1'b1;
          end
        end
        default: st <= TX_IDLE;
      endcase
    end
  end
endmodule
