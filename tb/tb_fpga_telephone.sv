// tb_fpga_telephone: three telephone nodes on one modelled wire, each with its
// own SRAM model, checked only through their ports. Time is scaled down (one
// "second" is 16000 clocks, ten 6 kHz samples) but the wire runs at the real
// 32 clocks per bit with a 19-clock line delay. The scenario:
//   node 1 records a greeting (two levels, then the beep) and replays it;
//   node 0 calls node 1, which answers; each hears the other's level; node 0
//   floods its output buffer for a while (overflow); node 0 hangs up;
//   node 0 calls node 1 again, nobody answers, node 1's ring timer sends the
//   greeting, node 0 leaves a message that its message timer ends;
//   node 1 replays the message.
// Node 2 hears every frame and must stay idle (address filter); a glitch on
// its call button must be ignored (debouncer); a noise pulse on the idle wire
// must be rejected (preamble); one-clock spikes during frames must be voted
// out (majority). Each mechanism is counted and must have happened.
module tb_fpga_telephone;
  import phone_pkg::*;
  localparam int N = 3, P = 200, HZ = 16000, RING = 2, MSGS = 3, BEEP = 4;

  logic clk = 0, rst = 1;
  logic [4:0] btn [N];
  logic [7:0] sw [N];
  logic ready [N];
  logic [7:0] mic [N], spk [N];
  logic [N-1:0] drv;
  logic line, noise = 0;
  logic [18:0] zaddr [N];
  logic zwe [N];
  logic [35:0] zwdata [N], zrdata [N];
  node_id_t my_id [N], tgt [N], peer [N];
  phone_state_t st [N];
  link_state_t lst [N];
  logic tovf [N], rovf [N], perr [N];
  int period [N];

  int checks = 0, failures = 0;
  int n_tovf = 0, n_perr = 0, n_node2_rx = 0, n_spikes = 0, n_glitch = 0;
  int n_calling_silence = 0, n_calling_tone = 0;
  bit visited [N][16];

  wired_or_line #(.N(N)) u_line (.clk, .drv, .noise, .line);

  for (genvar i = 0; i < N; i++) begin : g_node
    fpga_telephone #(
      .CLK_HZ(HZ), .DEBOUNCE_CYCLES(4), .RING_SECONDS(RING), .MSG_SECONDS(MSGS),
      .BEEP_SAMPLES(BEEP), .CADENCE_SAMPLES(16), .SLOT_AW(5)
    ) u_phone (
      .clk, .rst, .btn(btn[i]), .sw(sw[i]),
      .ac97_ready(ready[i]), .ac97_in(mic[i]), .ac97_out(spk[i]),
      .line_out(drv[i]), .line_in(line),
      .zbt_addr(zaddr[i]), .zbt_we(zwe[i]), .zbt_wdata(zwdata[i]), .zbt_rdata(zrdata[i]),
      .disp_my_id(my_id[i]), .disp_target_id(tgt[i]), .disp_peer_id(peer[i]),
      .disp_state(st[i]), .link_state(lst[i]),
      .tx_overflow(tovf[i]), .rx_overflow(rovf[i]), .preamble_err(perr[i]));
    zbt_model u_zbt (.clk, .addr(zaddr[i]), .we(zwe[i]), .wdata(zwdata[i]), .rdata(zrdata[i]));

    // Codec sample strobe; node i starts i*400 clocks late so the nodes' 6 kHz
    // ticks do not line up.
    int cnt;
    always @(posedge clk) begin
      if (rst) begin cnt <= -i * 400; ready[i] <= 0; end
      else if (period[i] == 0) ready[i] <= 0;
      else if (cnt >= period[i] - 1) begin cnt <= 0; ready[i] <= 1; end
      else begin cnt <= cnt + 1; ready[i] <= 0; end
    end
  end

  always #5 clk = ~clk;

  always @(posedge clk) if (!rst) begin
    for (int i = 0; i < N; i++) begin
      visited[i][st[i]] = 1;
      if (perr[i]) n_perr++;
    end
    if (tovf[0]) n_tovf++;
    if (lst[2] == LINK_RECEIVING) n_node2_rx++;
    if (st[0] == S_CALLING && ready[0]) begin
      if (spk[0] == 0) n_calling_silence++; else n_calling_tone++;
    end
  end

  initial begin : watchdog
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic press(input int node, input int b);
    @(negedge clk) btn[node][b] = 1;
    repeat (20) @(negedge clk);
    btn[node][b] = 0;
    repeat (20) @(negedge clk);
  endtask

  task automatic wait_state(input int node, input phone_state_t s, input int limit, input string what);
    int n;
    n = 0;
    while (st[node] != s && n < limit) begin @(negedge clk); n++; end
    check(st[node] == s, $sformatf("%s: node %0d in %s", what, node, st[node].name()));
  endtask

  // Speaker output of a node must sit at a level over a stretch of samples.
  task automatic expect_level(input int node, input int level, input string what);
    int ok, tot;
    ok = 0; tot = 0;
    repeat (40 * P) begin
      @(negedge clk);
      if (ready[node]) begin
        tot++;
        if (int'($signed(spk[node])) == level) ok++;
      end
    end
    check(tot > 0 && ok == tot, $sformatf("%s: node %0d level %0d on %0d of %0d samples", what, node, level, ok, tot));
  endtask

  // Wait until a level shows up at a speaker.
  task automatic see_level(input int node, input int level, input int limit, input string what);
    int n;
    n = 0;
    while (int'($signed(spk[node])) != level && n < limit) begin @(negedge clk); n++; end
    check(int'($signed(spk[node])) == level, $sformatf("%s: node %0d heard %0d", what, node, level));
  endtask

  // One-clock spikes while node 1 is receiving a frame.
  bit spikes_on = 0;
  always @(negedge clk) begin
    noise = 0;
    if (spikes_on && lst[1] == LINK_RECEIVING && ($urandom % 97) == 0) begin
      noise = 1;
      n_spikes++;
    end
  end

  int zeros_in_ring;
  initial begin
    for (int i = 0; i < N; i++) begin
      btn[i] = '0; sw[i] = 8'(i); mic[i] = '0; period[i] = P;
    end
    sw[0][3:2] = 2'd1;  // node 0 calls node 1
    repeat (5) @(posedge clk);
    @(negedge clk) rst = 0;
    repeat (50) @(negedge clk);
    for (int i = 0; i < N; i++) check(my_id[i] == node_id_t'(i) && st[i] == S_IDLE, "IDs from switches");

    // Debounce: a two-clock glitch on node 2's call button is ignored.
    @(negedge clk) btn[2][4] = 1;
    repeat (2) @(negedge clk);
    btn[2][4] = 0;
    repeat (50) @(negedge clk);
    check(st[2] == S_IDLE, "button glitch ignored");
    n_glitch++;

    // Noise pulse on the idle wire.
    @(negedge clk) noise = 1;
    repeat (3) @(negedge clk);
    noise = 0;
    repeat (1000) @(negedge clk);
    check(n_perr == N, $sformatf("noise pulse rejected by every node (%0d)", n_perr));

    // --- node 1 records a greeting: level 50, then -50, then the beep ---
    press(1, 2);
    check(st[1] == S_NEW_PRE, "node 1 recording");
    mic[1] = 8'd50;
    repeat (6 * 8 * P) @(negedge clk);
    mic[1] = 8'(-50);
    repeat (6 * 8 * P) @(negedge clk);
    press(1, 2);
    check(st[1] == S_NEW_PRE_END, "node 1 appends the beep");
    wait_state(1, S_IDLE, 20 * 8 * P, "greeting done");
    repeat (10) @(negedge clk);
    begin
      int n50, nm50, nb;
      n50 = 0; nm50 = 0; nb = 0;
      for (int a = 0; a < 32; a++) begin
        int v;
        v = int'($signed(u_zbt_mem(1, a)));
        if (v == 50) n50++;
        else if (v == -50) nm50++;
      end
      check(n50 >= 4 && nm50 >= 4, $sformatf("greeting holds both levels (%0d, %0d)", n50, nm50));
    end
    mic[1] = 8'd0;

    // Node 1 replays its greeting.
    press(1, 1);
    check(st[1] == S_LISTEN_PRE, "node 1 replays greeting");
    see_level(1, 50, 20 * 8 * P, "greeting replay");
    see_level(1, -50, 20 * 8 * P, "greeting replay");
    wait_state(1, S_IDLE, 40 * 8 * P, "replay done");

    // --- node 0 calls node 1, node 1 answers ---
    mic[0] = 8'd40; mic[1] = 8'(-25);
    press(0, 4);
    check(st[0] == S_CALLING && peer[0] == 2'd1, "node 0 calling node 1");
    wait_state(1, S_RINGING, 4000, "call arrives");
    check(peer[1] == 2'd0, "caller ID shown at node 1");
    zeros_in_ring = 0;
    repeat (40 * P) begin
      @(negedge clk);
      if (ready[1] && spk[1] == 0) zeros_in_ring++;
    end
    check(zeros_in_ring == 0, "ringing tone never silent");
    check(n_calling_tone > 0 && n_calling_silence > 0, "calling tone alternates with silence");
    press(1, 3);
    wait_state(0, S_IN_CALL, 4000, "answer arrives");
    check(st[1] == S_IN_CALL, "node 1 in call");
    spikes_on = 1;
    repeat (20 * 8 * P) @(negedge clk);
    expect_level(1, 40, "voice 0 -> 1");
    expect_level(0, -25, "voice 1 -> 0");
    spikes_on = 0;
    check(n_spikes > 0, "spikes injected during frames");
    // Node 0's codec runs far too fast for a while: its output buffer overflows.
    period[0] = 20;
    repeat (20000) @(negedge clk);
    period[0] = P;
    check(n_tovf > 0, $sformatf("output buffer overflowed %0d times", n_tovf));
    repeat (20 * 8 * P) @(negedge clk);
    check(st[0] == S_IN_CALL && st[1] == S_IN_CALL, "call survives the overflow");
    mic[0] = 8'd90;
    repeat (20 * 8 * P) @(negedge clk);
    expect_level(1, 90, "voice 0 -> 1 after overflow");
    // Quiet the codecs so the hang-up is not queued behind audio, then hang up.
    period[0] = 0; period[1] = 0;
    repeat (2000) @(negedge clk);
    press(0, 3);
    check(st[0] == S_IDLE, "node 0 hung up");
    wait_state(1, S_IDLE, 4000, "hang-up arrives");
    period[0] = P; period[1] = P;

    // --- node 0 calls again, nobody answers: voicemail ---
    mic[0] = 8'd70;
    press(0, 4);
    wait_state(1, S_RINGING, 4000, "second call");
    wait_state(1, S_SEND_PRE, RING * HZ + 1000, "ring timer");
    wait_state(0, S_REC_PRE, 8 * P * 4, "greeting arriving");
    see_level(0, 50, 20 * 8 * P, "greeting heard");
    see_level(0, -50, 20 * 8 * P, "greeting heard");
    wait_state(0, S_SEND_MSG, 40 * 8 * P, "greeting finished");
    check(st[1] == S_REC_MSG, "node 1 records the message");
    wait_state(0, S_IDLE, MSGS * HZ + 4000, "message timer");
    wait_state(1, S_IDLE, 8000, "message end arrives");
    repeat (10) @(negedge clk);
    begin
      int n70;
      n70 = 0;
      for (int a = 32; a < 64; a++) if (u_zbt_mem(1, a) == 8'd70) n70++;
      check(n70 >= 16, $sformatf("message in node 1 slot 1 (%0d samples of 70)", n70));
    end
    mic[0] = 8'd0;

    // --- node 1 replays the message ---
    sw[1][4] = 1'b0;
    press(1, 0);
    check(st[1] == S_LISTEN_MSG, "node 1 replays message");
    see_level(1, 70, 20 * 8 * P, "message replay");
    wait_state(1, S_IDLE, 60 * 8 * P, "message replay done");

    // Node 2 saw the traffic but never left IDLE.
    check(n_node2_rx > 0, "node 2 received frames for others");
    for (int s = 1; s < 12; s++) check(!visited[2][s], $sformatf("node 2 never in %s", phone_state_t'(s)));
    // Every state was visited by node 0 or node 1.
    for (int s = 0; s < 12; s++) check(visited[0][s] || visited[1][s], $sformatf("state %s used", phone_state_t'(s)));
    check(n_glitch > 0, "debounce exercised");
    $display("mechanisms: overflow=%0d preamble_rejects=%0d spikes=%0d node2_rx_cycles=%0d",
             n_tovf, n_perr, n_spikes, n_node2_rx);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Read a sample from a node's SRAM model.
  function automatic logic [7:0] u_zbt_mem(input int node, input int a);
    case (node)
      0: return g_node[0].u_zbt.mem[a][7:0];
      1: return g_node[1].u_zbt.mem[a][7:0];
      default: return g_node[2].u_zbt.mem[a][7:0];
    endcase
  endfunction
endmodule
