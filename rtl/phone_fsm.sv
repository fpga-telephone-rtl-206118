// phone_fsm: the telephone's central controller.
//
// Every other block reports to this state machine, and its state decides what
// the phone does. States and their exits:
//   IDLE        call button -> CALLING (sends CALL to the selected ID, carrying
//               our own ID); CALL packet -> RINGING (remembers the caller);
//               record -> NEW_PRE; listen-greeting -> LISTEN_PRE;
//               listen-message -> LISTEN_MSG (slot from the switch)
//   CALLING     ANSWER -> IN_CALL; first greeting packet -> REC_PRE;
//               hang-up button (sends HANGUP) or HANGUP -> IDLE
//   RINGING     answer button (sends ANSWER) -> IN_CALL; HANGUP -> IDLE;
//               ring timer expired -> SEND_PRE
//   IN_CALL     each 6 kHz microphone sample is sent as VOICE, each VOICE
//               received goes to the speaker; hang-up either side -> IDLE
//   SEND_PRE    plays the greeting slot into PRE packets, then sends PRE_END
//               -> REC_MSG
//   REC_PRE     plays received PRE samples; PRE_END (or a quiet ring time)
//               -> SEND_MSG
//   SEND_MSG    microphone samples sent as MSG; hang-up button or message
//               timer -> sends MSG_END -> IDLE
//   REC_MSG     MSG samples written to the next message slot (round robin);
//               MSG_END or message timer -> IDLE
//   NEW_PRE     microphone recorded into the greeting slot; record button or
//               slot full -> NEW_PRE_END
//   NEW_PRE_END BEEP_SAMPLES samples of the 750 Hz tone appended -> IDLE
//   LISTEN_PRE, LISTEN_MSG  play a slot to the speaker; end of recording or
//               hang-up button -> IDLE
// Buttons are debounced levels; the controller acts on their rising edges.
// mic_valid is the 6 kHz tick that also paces memory playback. Outputs are
// registered: a packet, memory command or timer start appears one cycle after
// the event that causes it. spk_tone selects the call-progress tones for the
// speaker; otherwise the speaker plays the spk_valid/spk_sample stream.
// The states, their order and what they do follow the description and its
// state diagram; the packet codes, the buttons that leave the recorder and
// player states, the timer limits and the watchdog exits from REC_PRE and
// REC_MSG are this design's own choices.
module phone_fsm
  import phone_pkg::*;
#(
  parameter int unsigned RING_SECONDS = 10,
  parameter int unsigned MSG_SECONDS  = 10,
  parameter int unsigned BEEP_SAMPLES = 3000,
  parameter int unsigned NUM_MSG      = 2,
  localparam int unsigned SLOT_W      = $clog2(NUM_MSG + 1),
  localparam int unsigned SEL_W       = (NUM_MSG > 1) ? $clog2(NUM_MSG) : 1
) (
  input  logic              clk,
  input  logic              rst,
  // debounced controls
  input  logic              btn_call,
  input  logic              btn_answer,      // answer / hang up
  input  logic              btn_record,
  input  logic              btn_listen_pre,
  input  logic              btn_listen_msg,
  input  node_id_t          my_id,
  input  node_id_t          target_id,
  input  logic [SEL_W-1:0]  msg_sel,
  // packets for this node, from the packet reader
  input  logic              rx_valid,
  input  header_t           rx_header,
  input  logic [7:0]        rx_data,
  // packets to the output buffer
  output logic              tx_valid,
  output packet_t           tx_packet,
  // 6 kHz microphone samples and the beep tone
  input  logic              mic_valid,
  input  logic [7:0]        mic_sample,
  input  logic [7:0]        beep_sample,
  // voice memory
  output logic              mem_rec_start,
  output logic              mem_play_start,
  output logic [SLOT_W-1:0] mem_slot,
  output logic              mem_wr_valid,
  output logic [7:0]        mem_wr_data,
  output logic              mem_rd_req,
  input  logic              mem_rd_valid,
  input  logic [7:0]        mem_rd_data,
  input  logic              mem_full,
  input  logic              mem_play_done,
  // timer
  output logic              tmr_start,
  output logic [7:0]        tmr_seconds,
  input  logic              tmr_expired,
  // speaker
  output logic              spk_valid,
  output logic [7:0]        spk_sample,
  output logic              spk_tone,
  // status for the display
  output phone_state_t      state,
  output node_id_t          peer_id
);
  localparam int BW = $clog2(BEEP_SAMPLES + 1);

  logic [4:0]        btn_q;
  logic              call_p, answer_p, record_p, lpre_p, lmsg_p;
  logic [SLOT_W-1:0] next_msg;
  logic [BW-1:0]     beep_cnt;

  always_ff @(posedge clk) begin
    if (rst) btn_q <= '0;
    else     btn_q <= {btn_call, btn_answer, btn_record, btn_listen_pre, btn_listen_msg};
  end
  assign call_p   = btn_call       && !btn_q[4];
  assign answer_p = btn_answer     && !btn_q[3];
  assign record_p = btn_record     && !btn_q[2];
  assign lpre_p   = btn_listen_pre && !btn_q[1];
  assign lmsg_p   = btn_listen_msg && !btn_q[0];

  function automatic logic rx_is(input logic v, input header_t h, input header_t want);
    return v && (h == want);
  endfunction

  assign spk_tone = !(state inside {S_IN_CALL, S_REC_PRE, S_LISTEN_PRE, S_LISTEN_MSG});

  always_ff @(posedge clk) begin
    if (rst) begin
      state          <= S_IDLE;
      peer_id        <= '0;
      next_msg       <= SLOT_W'(1);
      beep_cnt       <= '0;
      tx_valid       <= 1'b0;
      tx_packet      <= '0;
      mem_rec_start  <= 1'b0;
      mem_play_start <= 1'b0;
      mem_slot       <= '0;
      mem_wr_valid   <= 1'b0;
      mem_wr_data    <= '0;
      mem_rd_req     <= 1'b0;
      tmr_start      <= 1'b0;
      tmr_seconds    <= '0;
      spk_valid      <= 1'b0;
      spk_sample     <= '0;
    end else begin
      tx_valid       <= 1'b0;
      mem_rec_start  <= 1'b0;
      mem_play_start <= 1'b0;
      mem_wr_valid   <= 1'b0;
      mem_rd_req     <= 1'b0;
      tmr_start      <= 1'b0;
      spk_valid      <= 1'b0;

      unique case (state)
        S_IDLE: begin
          if (rx_is(rx_valid, rx_header, HDR_CALL)) begin
            peer_id     <= node_id_t'(rx_data[1:0]);
            tmr_start   <= 1'b1;
            tmr_seconds <= 8'(RING_SECONDS);
            state       <= S_RINGING;
          end else if (call_p) begin
            peer_id   <= target_id;
            tx_valid  <= 1'b1;
            tx_packet <= '{addr: target_id, header: HDR_CALL, data: 8'(my_id)};
            state     <= S_CALLING;
          end else if (record_p) begin
            mem_rec_start <= 1'b1;
            mem_slot      <= '0;
            state         <= S_NEW_PRE;
          end else if (lpre_p) begin
            mem_play_start <= 1'b1;
            mem_slot       <= '0;
            state          <= S_LISTEN_PRE;
          end else if (lmsg_p) begin
            mem_play_start <= 1'b1;
            mem_slot       <= SLOT_W'(msg_sel) + SLOT_W'(1);
            state          <= S_LISTEN_MSG;
          end
        end

        S_CALLING: begin
          if (answer_p) begin
            tx_valid  <= 1'b1;
            tx_packet <= '{addr: peer_id, header: HDR_HANGUP, data: 8'd0};
            state     <= S_IDLE;
          end else if (rx_is(rx_valid, rx_header, HDR_HANGUP)) begin
            state <= S_IDLE;
          end else if (rx_is(rx_valid, rx_header, HDR_ANSWER)) begin
            state <= S_IN_CALL;
          end else if (rx_is(rx_valid, rx_header, HDR_PRE)) begin
            spk_valid   <= 1'b1;
            spk_sample  <= rx_data;
            tmr_start   <= 1'b1;
            tmr_seconds <= 8'(RING_SECONDS);
            state       <= S_REC_PRE;
          end else if (rx_is(rx_valid, rx_header, HDR_PRE_END)) begin
            // Empty greeting: pass through REC_PRE at once.
            tmr_start   <= 1'b1;
            tmr_seconds <= 8'd0;
            state       <= S_REC_PRE;
          end
        end

        S_RINGING: begin
          if (answer_p) begin
            tx_valid  <= 1'b1;
            tx_packet <= '{addr: peer_id, header: HDR_ANSWER, data: 8'd0};
            state     <= S_IN_CALL;
          end else if (rx_is(rx_valid, rx_header, HDR_HANGUP)) begin
            state <= S_IDLE;
          end else if (tmr_expired && !tmr_start) begin
            mem_play_start <= 1'b1;
            mem_slot       <= '0;
            state          <= S_SEND_PRE;
          end
        end

        S_IN_CALL: begin
          if (answer_p) begin
            tx_valid  <= 1'b1;
            tx_packet <= '{addr: peer_id, header: HDR_HANGUP, data: 8'd0};
            state     <= S_IDLE;
          end else if (rx_is(rx_valid, rx_header, HDR_HANGUP)) begin
            state <= S_IDLE;
          end else begin
            if (mic_valid) begin
              tx_valid  <= 1'b1;
              tx_packet <= '{addr: peer_id, header: HDR_VOICE, data: mic_sample};
            end
            if (rx_is(rx_valid, rx_header, HDR_VOICE)) begin
              spk_valid  <= 1'b1;
              spk_sample <= rx_data;
            end
          end
        end

        S_SEND_PRE: begin
          if (mem_rd_valid) begin
            tx_valid  <= 1'b1;
            tx_packet <= '{addr: peer_id, header: HDR_PRE, data: mem_rd_data};
          end else if (mic_valid && !mem_play_start) begin
            if (mem_play_done) begin
              tx_valid      <= 1'b1;
              tx_packet     <= '{addr: peer_id, header: HDR_PRE_END, data: 8'd0};
              mem_rec_start <= 1'b1;
              mem_slot      <= next_msg;
              tmr_start     <= 1'b1;
              tmr_seconds   <= 8'(MSG_SECONDS + 2);
              state         <= S_REC_MSG;
            end else begin
              mem_rd_req <= 1'b1;
            end
          end
        end

        S_REC_PRE: begin
          if (rx_is(rx_valid, rx_header, HDR_PRE)) begin
            spk_valid  <= 1'b1;
            spk_sample <= rx_data;
          end
          if (rx_is(rx_valid, rx_header, HDR_PRE_END) || (tmr_expired && !tmr_start)) begin
            tmr_start   <= 1'b1;
            tmr_seconds <= 8'(MSG_SECONDS);
            state       <= S_SEND_MSG;
          end
        end

        S_SEND_MSG: begin
          if (answer_p || (tmr_expired && !tmr_start)) begin
            tx_valid  <= 1'b1;
            tx_packet <= '{addr: peer_id, header: HDR_MSG_END, data: 8'd0};
            state     <= S_IDLE;
          end else if (mic_valid) begin
            tx_valid  <= 1'b1;
            tx_packet <= '{addr: peer_id, header: HDR_MSG, data: mic_sample};
          end
        end

        S_REC_MSG: begin
          if (rx_is(rx_valid, rx_header, HDR_MSG_END) || (tmr_expired && !tmr_start)) begin
            next_msg <= (next_msg == SLOT_W'(NUM_MSG)) ? SLOT_W'(1) : next_msg + 1'b1;
            state    <= S_IDLE;
          end else if (rx_is(rx_valid, rx_header, HDR_MSG)) begin
            mem_wr_valid <= 1'b1;
            mem_wr_data  <= rx_data;
          end
        end

        S_NEW_PRE: begin
          if (record_p || (mem_full && !mem_rec_start)) begin
            beep_cnt <= '0;
            state    <= S_NEW_PRE_END;
          end else if (mic_valid) begin
            mem_wr_valid <= 1'b1;
            mem_wr_data  <= mic_sample;
          end
        end

        S_NEW_PRE_END: begin
          if (beep_cnt == BW'(BEEP_SAMPLES) || mem_full) begin
            state <= S_IDLE;
          end else if (mic_valid) begin
            mem_wr_valid <= 1'b1;
            mem_wr_data  <= beep_sample;
            beep_cnt     <= beep_cnt + 1'b1;
          end
        end

        S_LISTEN_PRE, S_LISTEN_MSG: begin
          if (mem_rd_valid) begin
            spk_valid  <= 1'b1;
            spk_sample <= mem_rd_data;
          end
          if (answer_p) begin
            state <= S_IDLE;
          end else if (mic_valid && !mem_play_start) begin
            if (mem_play_done) state <= S_IDLE;
            else               mem_rd_req <= 1'b1;
          end
        end

        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
