// fpga_telephone: one telephone node, as loaded identically into every board.
//
// Nodes share one wire. Each drives it through a transistor circuit that makes
// the wire high if any node drives high, and reads it back, so the same pin
// pair both sends and receives. Data moves as 13-bit packets (destination
// address, header, 8-bit data) sent bit-serially with a 1011 preamble and
// 32 clocks per bit. The path through the node:
//   buttons, switches -> debouncers -> controller
//   microphone (48 kHz) -> mic_filter (6 kHz) -> controller -> packets
//   wire -> serial_link (deserialiser, input buffer) -> packet_reader
//        (drops packets for other addresses) -> controller
//   controller -> serial_link (output buffer, serialiser) -> wire
//   controller <-> voice_memory <-> external ZBT SRAM (greeting, two messages)
//   controller -> spk_filter (48 kHz) or sounds (tones) -> speaker
//   controller <-> sec_timer (ring and message time limits)
// Button mapping: btn[0] listen to a message, btn[1] listen to the greeting,
// btn[2] record a greeting, btn[3] answer / hang up, btn[4] call. Switches:
// sw[1:0] own ID, sw[3:2] ID to call, sw[4] message slot to play. Audio is
// signed 8-bit with a one-cycle ac97_ready per 48 kHz sample; the codec, its
// driver, the clock deskew for the SRAM and the display driver are outside
// this module, and the disp_* outputs carry what the display shows. All logic
// runs on clk (27 MHz by default) with synchronous active-high reset. The
// structure follows the description's block diagram; the button and switch
// assignment is this design's own.
module fpga_telephone
  import phone_pkg::*;
#(
  parameter int unsigned CLK_HZ          = 27_000_000,
  parameter int unsigned DEBOUNCE_CYCLES = 270_000,
  parameter int unsigned BIT_CYCLES      = 32,
  parameter int unsigned SKIP_CYCLES     = 13,
  parameter int unsigned FIFO_DEPTH      = 8,
  parameter int unsigned RING_SECONDS    = 10,
  parameter int unsigned MSG_SECONDS     = 10,
  parameter int unsigned BEEP_SAMPLES    = 3000,
  parameter int unsigned CADENCE_SAMPLES = 24_000,
  parameter int unsigned NUM_MSG         = 2,
  parameter int unsigned SLOT_AW         = 16,
  parameter int unsigned ZBT_ADDR_W      = 19,
  parameter int unsigned ZBT_DATA_W      = 36,
  parameter int unsigned ZBT_LATENCY     = 2
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic [4:0]            btn,
  input  logic [7:0]            sw,
  // codec samples
  input  logic                  ac97_ready,
  input  logic [7:0]            ac97_in,
  output logic [7:0]            ac97_out,
  // shared wire
  output logic                  line_out,
  input  logic                  line_in,
  // external ZBT SRAM
  output logic [ZBT_ADDR_W-1:0] zbt_addr,
  output logic                  zbt_we,
  output logic [ZBT_DATA_W-1:0] zbt_wdata,
  input  logic [ZBT_DATA_W-1:0] zbt_rdata,
  // display and status
  output node_id_t              disp_my_id,
  output node_id_t              disp_target_id,
  output node_id_t              disp_peer_id,
  output phone_state_t          disp_state,
  output link_state_t           link_state,
  output logic                  tx_overflow,
  output logic                  rx_overflow,
  output logic                  preamble_err
);
  localparam int unsigned SLOT_W = $clog2(NUM_MSG + 1);
  localparam int unsigned SEL_W  = (NUM_MSG > 1) ? $clog2(NUM_MSG) : 1;

  // ---- debounced controls ----
  logic [4:0] btn_c;
  logic [7:0] sw_c;
  for (genvar i = 0; i < 5; i++) begin : g_btn
    debouncer #(.DEBOUNCE_CYCLES(DEBOUNCE_CYCLES)) u_db (
      .clk, .rst, .noisy(btn[i]), .clean(btn_c[i]));
  end
  for (genvar i = 0; i < 8; i++) begin : g_sw
    debouncer #(.DEBOUNCE_CYCLES(DEBOUNCE_CYCLES)) u_db (
      .clk, .rst, .noisy(sw[i]), .clean(sw_c[i]));
  end

  node_id_t         my_id, target_id;
  logic [SEL_W-1:0] msg_sel;
  assign my_id     = sw_c[1:0];
  assign target_id = sw_c[3:2];
  assign msg_sel   = SEL_W'(sw_c[4]);

  // ---- audio in ----
  logic       mic_valid;
  logic [7:0] mic_sample;
  mic_filter #(.RATIO(8)) u_mic (
    .clk, .rst, .in_valid(ac97_ready), .in_sample(ac97_in),
    .out_valid(mic_valid), .out_sample(mic_sample));

  // ---- link ----
  logic                   tx_valid, link_rx_valid;
  packet_t                tx_packet;
  logic [PACKET_BITS-1:0] link_rx_packet;
  serial_link #(
    .BIT_CYCLES(BIT_CYCLES), .SKIP_CYCLES(SKIP_CYCLES), .GAP_CYCLES(BIT_CYCLES),
    .FIFO_DEPTH(FIFO_DEPTH)
  ) u_link (
    .clk, .rst,
    .tx_valid, .tx_packet(tx_packet),
    .rx_valid(link_rx_valid), .rx_packet(link_rx_packet),
    .line_out, .line_in, .link_state,
    .tx_overflow, .rx_overflow, .preamble_err);

  logic       rx_valid;
  header_t    rx_header;
  logic [7:0] rx_data;
  packet_reader u_reader (
    .clk, .rst, .my_id,
    .in_valid(link_rx_valid), .in_packet(link_rx_packet),
    .out_valid(rx_valid), .out_header(rx_header), .out_data(rx_data));

  // ---- timer, tones, memory ----
  logic       tmr_start, tmr_expired;
  logic [7:0] tmr_seconds, tmr_count;
  sec_timer #(.CLK_HZ(CLK_HZ)) u_timer (
    .clk, .rst, .start(tmr_start), .seconds(tmr_seconds),
    .count(tmr_count), .expired(tmr_expired));

  phone_state_t state;
  logic [7:0]   tone_out, beep;
  sounds #(.CADENCE_SAMPLES(CADENCE_SAMPLES)) u_sounds (
    .clk, .rst, .ready(ac97_ready), .state, .tone_out, .beep);

  logic              mem_rec_start, mem_play_start, mem_wr_valid, mem_rd_req;
  logic              mem_rd_valid, mem_full, mem_play_done;
  logic [SLOT_W-1:0] mem_slot;
  logic [7:0]        mem_wr_data, mem_rd_data;
  voice_memory #(
    .NUM_MSG(NUM_MSG), .SLOT_AW(SLOT_AW), .ADDR_W(ZBT_ADDR_W),
    .DATA_W(ZBT_DATA_W), .READ_LATENCY(ZBT_LATENCY)
  ) u_mem (
    .clk, .rst,
    .rec_start(mem_rec_start), .play_start(mem_play_start), .slot(mem_slot),
    .wr_valid(mem_wr_valid), .wr_data(mem_wr_data),
    .rd_req(mem_rd_req), .rd_valid(mem_rd_valid), .rd_data(mem_rd_data),
    .full(mem_full), .play_done(mem_play_done),
    .zbt_addr, .zbt_we, .zbt_wdata, .zbt_rdata);

  // ---- controller ----
  logic       spk_valid, spk_tone;
  logic [7:0] spk_sample, spk_out;
  phone_fsm #(
    .RING_SECONDS(RING_SECONDS), .MSG_SECONDS(MSG_SECONDS),
    .BEEP_SAMPLES(BEEP_SAMPLES), .NUM_MSG(NUM_MSG)
  ) u_fsm (
    .clk, .rst,
    .btn_call(btn_c[4]), .btn_answer(btn_c[3]), .btn_record(btn_c[2]),
    .btn_listen_pre(btn_c[1]), .btn_listen_msg(btn_c[0]),
    .my_id, .target_id, .msg_sel,
    .rx_valid, .rx_header, .rx_data,
    .tx_valid, .tx_packet,
    .mic_valid, .mic_sample, .beep_sample(beep),
    .mem_rec_start, .mem_play_start, .mem_slot, .mem_wr_valid, .mem_wr_data,
    .mem_rd_req, .mem_rd_valid, .mem_rd_data, .mem_full, .mem_play_done,
    .tmr_start, .tmr_seconds, .tmr_expired,
    .spk_valid, .spk_sample, .spk_tone,
    .state, .peer_id(disp_peer_id));

  // ---- audio out ----
  spk_filter #(.RATIO(8)) u_spk (
    .clk, .rst, .in_valid(spk_valid), .in_sample(spk_sample),
    .ready(ac97_ready), .out_sample(spk_out));

  assign ac97_out       = spk_tone ? tone_out : spk_out;
  assign disp_my_id     = my_id;
  assign disp_target_id = target_id;
  assign disp_state     = state;
endmodule
