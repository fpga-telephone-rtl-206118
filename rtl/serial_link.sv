// serial_link: one node's side of the shared single-wire bus.
//
// Every node drives line_out into an external resistor/transistor circuit that
// pulls the common wire high when any node drives high, and reads the wire back
// on line_in. Packets from the controller go into an eight-entry output buffer;
// received packets come out of an eight-entry input buffer, one per cycle with
// rx_valid. A global link state keeps the node from sending and receiving at
// once: in IDLE a high wire starts a reception (RECEIVING_DATA); otherwise, if
// the output buffer holds a packet, it is handed to the serialiser
// (SENDING_DATA). The receiver is disabled while sending, so a node never
// decodes its own packets. The state returns to IDLE when the serialiser's
// trailing gap ends or the receiver has seen the wire low again. The three
// states and the buffers follow the description; the priority of a high wire
// over a waiting packet, and a hold-off of RX_HOLDOFF_CYCLES (1.5 bit times)
// after each reception before the node may send, are this design's own
// choices. The hold-off is longer than a sender's trailing gap plus the wire
// delay, so a node with a burst of packets keeps the wire until its buffer is
// empty instead of colliding with a listener that has something queued. Nothing resolves two nodes
// that start within the wire's delay of each other: both packets are lost and
// the receivers reject the garbled frame by its preamble.
module serial_link
  import phone_pkg::*;
#(
  parameter int unsigned BIT_CYCLES      = BIT_CYCLES_DEFAULT,
  parameter int unsigned SKIP_CYCLES     = SKIP_CYCLES_DEFAULT,
  parameter int unsigned GAP_CYCLES      = BIT_CYCLES_DEFAULT,
  parameter int unsigned IDLE_LOW_CYCLES = 8,
  parameter int unsigned RX_HOLDOFF_CYCLES = 48,
  parameter int unsigned FIFO_DEPTH      = 8
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic                   tx_valid,
  input  logic [PACKET_BITS-1:0] tx_packet,
  output logic                   rx_valid,
  output logic [PACKET_BITS-1:0] rx_packet,
  output logic                   line_out,
  input  logic                   line_in,
  output link_state_t            link_state,
  output logic                   tx_overflow,
  output logic                   rx_overflow,
  output logic                   preamble_err
);
  localparam int FCW = $clog2(FIFO_DEPTH + 1);
  localparam int HW  = $clog2(RX_HOLDOFF_CYCLES + 1);

  logic [HW-1:0]          holdoff;

  logic                   ob_empty, ob_full, ob_pop;
  logic [PACKET_BITS-1:0] ob_dout;
  logic [FCW-1:0]         ob_count;
  logic                   ib_empty, ib_full;
  logic [FCW-1:0]         ib_count;
  logic                   tx_start, tx_busy, tx_done;
  logic                   rx_enable, rx_busy, rx_pkt_valid;
  logic [PACKET_BITS-1:0] rx_pkt;

  packet_fifo #(.DEPTH(FIFO_DEPTH), .WIDTH(PACKET_BITS)) u_out_buf (
    .clk, .rst,
    .push(tx_valid), .din(tx_packet),
    .pop(ob_pop), .dout(ob_dout),
    .empty(ob_empty), .full(ob_full), .count(ob_count), .overflow(tx_overflow)
  );

  packet_fifo #(.DEPTH(FIFO_DEPTH), .WIDTH(PACKET_BITS)) u_in_buf (
    .clk, .rst,
    .push(rx_pkt_valid), .din(rx_pkt),
    .pop(!ib_empty), .dout(rx_packet),
    .empty(ib_empty), .full(ib_full), .count(ib_count), .overflow(rx_overflow)
  );
  assign rx_valid = !ib_empty;

  send_data #(.BIT_CYCLES(BIT_CYCLES), .GAP_CYCLES(GAP_CYCLES)) u_send (
    .clk, .rst, .start(tx_start), .packet(ob_dout),
    .busy(tx_busy), .done(tx_done), .line_out
  );

  get_data #(.BIT_CYCLES(BIT_CYCLES), .SKIP_CYCLES(SKIP_CYCLES),
             .IDLE_LOW_CYCLES(IDLE_LOW_CYCLES)) u_get (
    .clk, .rst, .enable(rx_enable), .line_in,
    .busy(rx_busy), .pkt_valid(rx_pkt_valid), .packet(rx_pkt),
    .preamble_err
  );

  // The receiver may only start from IDLE; it starts on the same high line
  // that moves the link state to RECEIVING_DATA.
  assign rx_enable = (link_state == LINK_IDLE);
  assign tx_start  = (link_state == LINK_IDLE) && !line_in && !ob_empty && (holdoff == '0);
  assign ob_pop    = tx_start;

  always_ff @(posedge clk) begin
    if (rst) begin
      link_state <= LINK_IDLE;
      holdoff    <= '0;
    end else begin
      unique case (link_state)
        LINK_IDLE: begin
          if (holdoff != '0) holdoff <= holdoff - 1'b1;
          if (line_in)       link_state <= LINK_RECEIVING;
          else if (tx_start) link_state <= LINK_SENDING;
        end
        LINK_SENDING:   if (tx_done) link_state <= LINK_IDLE;
        LINK_RECEIVING: if (!rx_busy) begin
          link_state <= LINK_IDLE;
          holdoff    <= HW'(RX_HOLDOFF_CYCLES);
        end
        default: link_state <= LINK_IDLE;
      endcase
    end
  end

  // Never send while receiving, and never receive while sending.
  a_no_tx_while_rx: assert property (@(posedge clk) disable iff (rst)
    !(tx_busy && rx_busy));
endmodule
