// tb_link_audio_load: the shared wire under the load of a call.
//
// Three serial_link nodes at their default timing share the modelled wire
// (wired OR, 19-clock rise and 17-clock fall). Nodes 0 and 1 stream VOICE
// packets at each other at the 6 kHz call rate: node 0 every 4500 clocks of
// 27 MHz, node 1 every 4501, as two codecs on separate crystals would. Their
// relative phase therefore drifts by one clock per sample. Over the run it
// passes through every case:
//   * far apart: each frame finds the wire free;
//   * one node's sample arrives while the other's frame is on the wire: the
//     packet waits in the output buffer and goes out after the hold-off;
//   * both start within the wire delay: both frames collide and are lost.
//     The link has no retry, so this is the one way audio is lost.
// Checks: the packets each node receives are, in order, a subsequence of what
// the other sent, none altered; nothing is lost outside the collision window;
// no buffer overflows; node 2, a bystander, receives every frame that reached
// its destination (address filtering comes after the link); the wire is busy
// for about 2 x 576 / 4500 of the time. Each case above must happen at least
// once, and the garbled frames of a collision must be rejected by their
// preamble somewhere.
module tb_link_audio_load;
  import phone_pkg::*;

  localparam int unsigned N        = 3;
  localparam int unsigned SAMPLES  = 1200;
  localparam int unsigned PERIOD0  = 4500;
  localparam int unsigned PERIOD1  = 4501;
  // node 1 starts 3900 clocks after node 0, i.e. 600 ahead of node 0's next
  // sample; the drift brings the two together after about 600 samples
  localparam int unsigned START1   = 3900;
  localparam int unsigned FRAME    = 17 * 32 + 32;

  logic clk = 0, rst = 1;
  logic [N-1:0] tx_valid, rx_valid, drv, tovf, rovf, perr;
  logic [PACKET_BITS-1:0] tx_packet [N];
  logic [PACKET_BITS-1:0] rx_packet [N];
  link_state_t lst [N];
  logic line;
  int checks = 0, failures = 0;

  for (genvar i = 0; i < N; i++) begin : g_node
    serial_link u_link (
      .clk, .rst, .tx_valid(tx_valid[i]), .tx_packet(tx_packet[i]),
      .rx_valid(rx_valid[i]), .rx_packet(rx_packet[i]),
      .line_out(drv[i]), .line_in(line), .link_state(lst[i]),
      .tx_overflow(tovf[i]), .rx_overflow(rovf[i]), .preamble_err(perr[i]));
  end
  wired_or_line #(.N(N)) u_line (.clk, .drv, .noise(1'b0), .line);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (SAMPLES * PERIOD1 + 100_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // what each of nodes 0 and 1 has sent and not yet seen arrive
  packet_t sent [2][$];
  int unsigned n_sent [2], n_got [2], n_lost [2], n_bad [2], n_deferred [2];
  int unsigned n_lost_far = 0, n_collide = 0, n_node2 = 0, n_ovf = 0;
  longint unsigned busy = 0, cyc = 0;
  int signed   phase;   // start of node 1's latest sample relative to node 0's

  // sample ticks and packet sources
  int unsigned tick_cyc [2];
  int unsigned n_perr = 0;
  initial begin
    tx_valid = '0;
    for (int i = 0; i < N; i++) tx_packet[i] = '0;
    n_sent = '{0, 0};
    n_got = '{0, 0};
    n_lost = '{0, 0};
    n_bad = '{0, 0};
    n_deferred = '{0, 0};
    tick_cyc = '{0, 0};
    repeat (4) @(negedge clk);
    rst = 0;
    repeat (4) @(negedge clk);
    fork
      for (int k = 0; k < SAMPLES; k++) begin
        send(0, k);
        repeat (PERIOD0 - 1) @(negedge clk);
      end
      begin
        repeat (START1) @(negedge clk);
        for (int k = 0; k < SAMPLES; k++) begin
          send(1, k);
          repeat (PERIOD1 - 1) @(negedge clk);
        end
      end
    join
    repeat (3 * FRAME) @(negedge clk);
    finish_up();
  end

  task automatic send(input int node, input int k);
    packet_t p;
    p = '{addr: node_id_t'(1 - node), header: HDR_VOICE, data: 8'(k)};
    if (lst[node] == LINK_RECEIVING) n_deferred[node]++;
    sent[node].push_back(p);
    n_sent[node]++;
    tick_cyc[node] = int'(cyc);
    tx_valid[node]  = 1'b1;
    tx_packet[node] = p;
    @(negedge clk);
    tx_valid[node] = 1'b0;
  endtask

  // receivers: match each delivery against what the other node sent
  initial forever begin
    @(posedge clk);
    #1;
    cyc++;
    if (lst[0] == LINK_SENDING || lst[1] == LINK_SENDING) busy++;
    if (|tovf || |rovf) n_ovf++;
    if (rx_valid[2]) n_node2++;
    if (|perr) n_perr++;
    for (int r = 0; r < 2; r++) begin
      if (rx_valid[r]) begin
        automatic int s = 1 - r;
        automatic packet_t got = packet_t'(rx_packet[r]);
        automatic bit found = 0;
        while (sent[s].size() != 0 && !found) begin
          if (sent[s][0] == got) found = 1;
          else begin
            n_lost[r]++;
            classify_loss();
          end
          void'(sent[s].pop_front());
        end
        if (found) n_got[r]++;
        else n_bad[r]++;
      end
    end
  end

  // A lost packet is expected only while the two sample ticks are closer
  // than the wire's rise delay plus a little; anything else is a fault.
  task automatic classify_loss();
    phase = int'(tick_cyc[1]) - int'(tick_cyc[0]);
    if (phase < 0) phase = -phase;
    if (phase > int'(PERIOD0 / 2)) phase = int'(PERIOD0) - phase;
    if (phase <= 40) n_collide++;
    else n_lost_far++;
  endtask

  task automatic finish_up();
    real util;
    util = real'(busy) / real'(cyc);
    $display("sent %0d/%0d, delivered %0d/%0d, lost %0d/%0d, deferred %0d/%0d, wire busy %.3f, preamble rejects %0d",
             n_sent[0], n_sent[1], n_got[1], n_got[0], n_lost[1], n_lost[0],
             n_deferred[0], n_deferred[1], util, n_perr);
    for (int r = 0; r < 2; r++) begin
      check(n_bad[r] == 0, $sformatf("node %0d received %0d packets nobody sent", r, n_bad[r]));
      check(n_got[r] + n_lost[r] + sent[1 - r].size() == n_sent[1 - r],
            $sformatf("node %0d: accounting", r));
      check(sent[1 - r].size() == 0, $sformatf("node %0d: %0d packets still pending", r, sent[1 - r].size()));
      check(n_got[r] >= n_sent[1 - r] * 95 / 100,
            $sformatf("node %0d got %0d of %0d", r, n_got[r], n_sent[1 - r]));
      check(n_deferred[r] > 0, $sformatf("node %0d never had to wait for the wire", r));
    end
    check(n_lost_far == 0, $sformatf("%0d packets lost outside the collision window", n_lost_far));
    check(n_collide > 0, "the two nodes never collided");
    check(n_perr > 0, "no collided frame was rejected by its preamble");
    check(n_ovf == 0, "no buffer overflow at the call rate");
    check(n_node2 >= n_got[0] + n_got[1], $sformatf("bystander received %0d frames of %0d",
          n_node2, n_got[0] + n_got[1]));
    check(util > 0.24 && util < 0.27, $sformatf("wire busy %.3f, expected about %.3f",
          util, 2.0 * FRAME / PERIOD0));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask
endmodule
