// tb_phone_fsm: the controller with a real timer, memory controller and SRAM
// model; the testbench plays the far-end phone by injecting received packets
// and collecting sent ones, presses the buttons, and supplies a 6 kHz tick
// with a counting microphone sample. It walks every state of the diagram:
// an answered outgoing call, an incoming call the caller abandons, an incoming
// call answered, recording and replaying the greeting with its beep, an
// unanswered incoming call that sends the greeting and records a message,
// replaying that message, and the caller's side of leaving a message
// (greeting heard, message sent, ended by the message timer on the second
// run). Packet fields, state sequence, memory contents and speaker samples
// are checked.
module tb_phone_fsm;
  import phone_pkg::*;
  localparam int HZ = 200, RING = 2, MSGS = 3, BEEP = 4, TICK = 40;
  logic clk = 0, rst = 1;
  logic btn_call = 0, btn_answer = 0, btn_record = 0, btn_listen_pre = 0, btn_listen_msg = 0;
  node_id_t my_id = 2'd1, target_id = 2'd2;
  logic [0:0] msg_sel = '0;
  logic rx_valid = 0;
  header_t rx_header = HDR_CALL;
  logic [7:0] rx_data = '0;
  logic tx_valid;
  packet_t tx_packet;
  logic mic_valid = 0;
  logic [7:0] mic_sample = '0, beep_sample;
  logic mem_rec_start, mem_play_start, mem_wr_valid, mem_rd_req, mem_rd_valid, mem_full, mem_play_done;
  logic [1:0] mem_slot;
  logic [7:0] mem_wr_data, mem_rd_data;
  logic tmr_start, tmr_expired;
  logic [7:0] tmr_seconds, tmr_count;
  logic spk_valid, spk_tone;
  logic [7:0] spk_sample;
  phone_state_t state;
  node_id_t peer_id;
  logic [18:0] zbt_addr;
  logic zbt_we;
  logic [35:0] zbt_wdata, zbt_rdata;
  int checks = 0, failures = 0;
  packet_t txq[$];
  logic [7:0] spkq[$];
  bit visited [16];

  phone_fsm #(.RING_SECONDS(RING), .MSG_SECONDS(MSGS), .BEEP_SAMPLES(BEEP), .NUM_MSG(2)) dut (.*);
  sec_timer #(.CLK_HZ(HZ)) u_tmr (.clk, .rst, .start(tmr_start), .seconds(tmr_seconds),
    .count(tmr_count), .expired(tmr_expired));
  voice_memory #(.NUM_MSG(2), .SLOT_AW(5)) u_mem (.clk, .rst,
    .rec_start(mem_rec_start), .play_start(mem_play_start), .slot(mem_slot),
    .wr_valid(mem_wr_valid), .wr_data(mem_wr_data), .rd_req(mem_rd_req),
    .rd_valid(mem_rd_valid), .rd_data(mem_rd_data), .full(mem_full), .play_done(mem_play_done),
    .zbt_addr, .zbt_we, .zbt_wdata, .zbt_rdata);
  zbt_model u_zbt (.clk, .addr(zbt_addr), .we(zbt_we), .wdata(zbt_wdata), .rdata(zbt_rdata));

  assign beep_sample = ~mic_sample;

  always #5 clk = ~clk;

  // 6 kHz tick with a counting sample.
  int tick_cnt = 0;
  always @(posedge clk) begin
    if (rst) begin tick_cnt <= 0; mic_valid <= 0; end
    else begin
      tick_cnt <= (tick_cnt == TICK - 1) ? 0 : tick_cnt + 1;
      mic_valid <= (tick_cnt == TICK - 1);
      if (mic_valid) mic_sample <= mic_sample + 8'd3;
    end
  end
  always @(posedge clk) if (!rst) begin
    if (tx_valid) txq.push_back(tx_packet);
    if (spk_valid) spkq.push_back(spk_sample);
    visited[state] = 1;
  end

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic press(ref logic b);
    @(negedge clk) b = 1;
    repeat (3) @(negedge clk);
    b = 0;
    repeat (2) @(negedge clk);
  endtask

  task automatic rx(input header_t h, input logic [7:0] d);
    @(negedge clk) rx_valid = 1; rx_header = h; rx_data = d;
    @(negedge clk) rx_valid = 0;
    repeat (2) @(negedge clk);
  endtask

  task automatic expect_tx(input header_t h, input node_id_t a, input string what);
    int n;
    n = 0;
    while (txq.size() == 0 && n < 20 * TICK) begin @(negedge clk); n++; end
    check(txq.size() > 0, {what, ": packet sent"});
    if (txq.size() > 0) begin
      packet_t p;
      p = txq.pop_front();
      check(p.header == h && p.addr == a, $sformatf("%s: header %0d addr %0d", what, p.header, p.addr));
    end
  endtask

  task automatic wait_state(input phone_state_t s, input int limit, input string what);
    int n;
    n = 0;
    while (state != s && n < limit) begin @(negedge clk); n++; end
    check(state == s, $sformatf("%s: state %s", what, state.name()));
  endtask

  initial begin
    logic [7:0] greeting[$], message[$];
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    repeat (5) @(negedge clk);
    check(state == S_IDLE && spk_tone, "idle with tones after reset");

    // 1. Outgoing call, answered, we hang up.
    press(btn_call);
    check(state == S_CALLING && peer_id == 2'd2, "calling the selected ID");
    begin
      packet_t p;
      check(txq.size() == 1, "one CALL packet");
      p = txq.pop_front();
      check(p.header == HDR_CALL && p.addr == 2'd2 && p.data == 8'(my_id), "CALL carries our ID to the target");
    end
    rx(HDR_ANSWER, 0);
    check(state == S_IN_CALL && !spk_tone, "in call after ANSWER");
    txq.delete();
    repeat (3 * TICK + 2) @(negedge clk);
    check(txq.size() == 3, $sformatf("one VOICE per tick (%0d)", txq.size()));
    while (txq.size() > 0) begin
      packet_t p;
      p = txq.pop_front();
      check(p.header == HDR_VOICE && p.addr == 2'd2, "VOICE to peer");
    end
    spkq.delete();
    rx(HDR_VOICE, 8'h5A);
    rx(HDR_PRE, 8'h11);    // ignored in a call
    check(spkq.size() == 1 && spkq[0] == 8'h5A, "received VOICE to speaker only");
    press(btn_answer);
    check(state == S_IDLE, "hang up");
    while (txq.size() > 0 && txq[0].header == HDR_VOICE) void'(txq.pop_front());
    expect_tx(HDR_HANGUP, 2'd2, "hang-up");

    // 2. Incoming call, caller gives up.
    rx(HDR_CALL, 8'd3);
    check(state == S_RINGING && peer_id == 2'd3 && spk_tone, "ringing with caller ID");
    rx(HDR_HANGUP, 0);
    check(state == S_IDLE, "caller hung up");

    // 3. Incoming call answered, far end hangs up.
    rx(HDR_CALL, 8'd0);
    press(btn_answer);
    check(state == S_IN_CALL, "answered");
    expect_tx(HDR_ANSWER, 2'd0, "answer");
    rx(HDR_HANGUP, 0);
    check(state == S_IDLE, "far end hung up");
    txq.delete();

    // 4. Record a greeting, then the beep.
    press(btn_record);
    check(state == S_NEW_PRE, "recording greeting");
    repeat (6 * TICK) @(negedge clk);
    press(btn_record);
    check(state == S_NEW_PRE_END, "appending beep");
    wait_state(S_IDLE, 10 * TICK, "beep done");
    repeat (5) @(negedge clk);  // last write reaches the SRAM
    check(u_mem.len[0] >= 6 + BEEP && u_mem.len[0] <= 7 + BEEP, $sformatf("greeting length %0d", u_mem.len[0]));
    for (int i = 0; i < int'(u_mem.len[0]); i++) greeting.push_back(u_zbt.mem[i][7:0]);
    for (int i = 1; i < greeting.size() - BEEP; i++)
      check(greeting[i] == greeting[i-1] + 8'd3, "greeting holds consecutive microphone samples");
    for (int i = greeting.size() - BEEP + 1; i < greeting.size(); i++)
      check(greeting[i] == greeting[i-1] - 8'd3, "beep samples follow");

    // 5. Listen to the greeting.
    spkq.delete();
    press(btn_listen_pre);
    check(state == S_LISTEN_PRE && !spk_tone, "listening to greeting");
    wait_state(S_IDLE, 40 * TICK, "greeting played");
    check(spkq.size() == greeting.size(), $sformatf("played %0d samples", spkq.size()));
    for (int i = 0; i < spkq.size() && i < greeting.size(); i++) check(spkq[i] == greeting[i], "greeting sample");

    // 6. Incoming call not answered: greeting sent, message recorded.
    rx(HDR_CALL, 8'd2);
    check(state == S_RINGING, "ringing");
    repeat (RING * HZ - 20) @(negedge clk);
    check(state == S_RINGING, "still ringing before the limit");
    wait_state(S_SEND_PRE, 40, "ring timeout");
    wait_state(S_REC_MSG, 40 * TICK, "greeting sent");
    for (int i = 0; i < greeting.size(); i++) begin
      packet_t p;
      p = txq.pop_front();
      check(p.header == HDR_PRE && p.addr == 2'd2 && p.data == greeting[i], $sformatf("PRE packet %0d", i));
    end
    expect_tx(HDR_PRE_END, 2'd2, "end of greeting");
    for (int i = 0; i < 5; i++) begin message.push_back(8'(8'h40 + i * 7)); rx(HDR_MSG, message[i]); end
    rx(HDR_MSG_END, 0);
    check(state == S_IDLE, "message stored");
    check(u_mem.len[1] == 5, "message length");
    for (int i = 0; i < 5; i++) check(u_zbt.mem[32 + i][7:0] == message[i], "message sample in slot 1");

    // 7. Listen to message 0 (slot 1).
    spkq.delete();
    msg_sel = 1'b0;
    press(btn_listen_msg);
    check(state == S_LISTEN_MSG, "listening to message");
    wait_state(S_IDLE, 20 * TICK, "message played");
    check(spkq.size() == 5, "message played in full");
    for (int i = 0; i < spkq.size() && i < 5; i++) check(spkq[i] == message[i], "message sample");

    // 8. Our call goes to the far end's voicemail; we end the message.
    txq.delete();
    press(btn_call);
    rx(HDR_PRE, 8'h21);
    check(state == S_REC_PRE, "hearing greeting");
    rx(HDR_PRE, 8'h22);
    check(spkq[$] == 8'h22, "greeting to speaker");
    rx(HDR_PRE_END, 0);
    check(state == S_SEND_MSG, "leaving a message");
    repeat (2 * TICK + 5) @(negedge clk);
    press(btn_answer);
    check(state == S_IDLE, "message ended");
    void'(txq.pop_front());  // CALL
    while (txq.size() > 1) begin
      packet_t p;
      p = txq.pop_front();
      check(p.header == HDR_MSG && p.addr == 2'd2, "MSG packets");
    end
    expect_tx(HDR_MSG_END, 2'd2, "message end");

    // 9. Same, greeting never ends and the message runs into the timer.
    press(btn_call);
    rx(HDR_PRE, 8'h01);
    wait_state(S_SEND_MSG, RING * HZ + 20, "greeting watchdog");
    wait_state(S_IDLE, MSGS * HZ + 20, "message timer");

    // 10. Second unanswered call records into slot 2.
    rx(HDR_CALL, 8'd3);
    wait_state(S_REC_MSG, RING * HZ + 40 * TICK, "second voicemail");
    rx(HDR_MSG, 8'h77);
    rx(HDR_MSG_END, 0);
    check(u_mem.len[2] == 1 && u_zbt.mem[64][7:0] == 8'h77, "second message in slot 2");

    for (int s = 0; s < 12; s++) check(visited[s], $sformatf("state %s visited", phone_state_t'(s)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
