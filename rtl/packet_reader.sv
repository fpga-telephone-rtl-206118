// packet_reader: address filter between the input buffer and the controller.
//
// Takes a whole received packet with its ready strobe and compares the packet's
// destination address with this node's ID from the switches. On a match the
// header and data are passed on, registered, with out_valid one cycle later;
// a packet for another node produces nothing. The filtering rule follows the
// description; the register stage is this design's choice.
module packet_reader
  import phone_pkg::*;
(
  input  logic                   clk,
  input  logic                   rst,
  input  node_id_t               my_id,
  input  logic                   in_valid,
  input  logic [PACKET_BITS-1:0] in_packet,
  output logic                   out_valid,
  output header_t                out_header,
  output logic [7:0]             out_data
);
  packet_t pkt;
  assign pkt = packet_t'(in_packet);

  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid  <= 1'b0;
      out_header <= HDR_CALL;
      out_data   <= '0;
    end else begin
      out_valid <= in_valid && (pkt.addr == my_id);
      if (in_valid && pkt.addr == my_id) begin
        out_header <= pkt.header;
        out_data   <= pkt.data;
      end
    end
  end
endmodule
