// phone_pkg: types and constants shared by the telephone node.
//
// Every exchange between telephones is one 13-bit packet: a 2-bit destination
// address, a 3-bit header saying what the packet means, and 8 bits of data
// (usually one audio sample). The field widths, the 1011 preamble and the
// 32-cycle bit time with 13 ignored samples come from the design description;
// the field order inside the word and the header codes are this design's own.
package phone_pkg;

  localparam int PACKET_BITS = 13;
  localparam int PREAMBLE_BITS = 4;
  localparam logic [PREAMBLE_BITS-1:0] PREAMBLE = 4'b1011;

  // Bit timing on the shared wire (27 MHz clock).
  localparam int BIT_CYCLES_DEFAULT = 32;
  localparam int SKIP_CYCLES_DEFAULT = 13;

  typedef logic [1:0] node_id_t;

  // Meaning of a packet.
  typedef enum logic [2:0] {
    HDR_CALL    = 3'd0,  // start a call; data[1:0] = caller's ID
    HDR_ANSWER  = 3'd1,  // callee picked up
    HDR_HANGUP  = 3'd2,  // either side hung up
    HDR_VOICE   = 3'd3,  // conversation audio sample
    HDR_PRE     = 3'd4,  // greeting audio sample
    HDR_MSG     = 3'd5,  // voice-message audio sample
    HDR_PRE_END = 3'd6,  // greeting finished, start leaving a message
    HDR_MSG_END = 3'd7   // message finished
  } header_t;

  typedef struct packed {
    node_id_t   addr;
    header_t    header;
    logic [7:0] data;
  } packet_t;

  // States of the telephone controller.
  typedef enum logic [3:0] {
    S_IDLE        = 4'd0,
    S_CALLING     = 4'd1,
    S_RINGING     = 4'd2,
    S_IN_CALL     = 4'd3,
    S_NEW_PRE     = 4'd4,
    S_NEW_PRE_END = 4'd5,
    S_LISTEN_PRE  = 4'd6,
    S_LISTEN_MSG  = 4'd7,
    S_SEND_PRE    = 4'd8,
    S_REC_PRE     = 4'd9,
    S_SEND_MSG    = 4'd10,
    S_REC_MSG     = 4'd11
  } phone_state_t;

  // Global state of the shared wire as seen by one node.
  typedef enum logic [1:0] {
    LINK_IDLE      = 2'd0,
    LINK_SENDING   = 2'd1,
    LINK_RECEIVING = 2'd2
  } link_state_t;

endpackage
