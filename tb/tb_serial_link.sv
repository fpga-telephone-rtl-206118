// tb_serial_link: two link endpoints on one modelled wire. Node A is handed a
// burst larger than its output buffer: the overflow pulses must drop exactly
// the packets that did not fit, and node B must receive the accepted ones in
// order. Then both nodes send, B while A is still receiving-side busy, and a
// noise pulse is injected. Checks that a node never receives its own packets,
// that a node never goes straight from sending to receiving, and that the
// noise is rejected by the preamble.
module tb_serial_link;
  import phone_pkg::*;
  logic clk = 0, rst = 1, noise = 0;
  logic a_tx_valid = 0, b_tx_valid = 0;
  logic [12:0] a_tx_packet = '0, b_tx_packet = '0;
  logic a_rx_valid, b_rx_valid, a_line_out, b_line_out, line;
  logic [12:0] a_rx_packet, b_rx_packet;
  link_state_t a_state, b_state;
  logic a_tovf, a_rovf, a_perr, b_tovf, b_rovf, b_perr;
  int checks = 0, failures = 0;
  logic [12:0] a_sent[$], b_sent[$], a_got[$], b_got[$];
  int a_ovf_count = 0, b_perr_count = 0, a_perr_count = 0;

  wired_or_line #(.N(2)) u_line (.clk, .drv({a_line_out, b_line_out}), .noise, .line);

  serial_link u_a (.clk, .rst, .tx_valid(a_tx_valid), .tx_packet(a_tx_packet),
    .rx_valid(a_rx_valid), .rx_packet(a_rx_packet), .line_out(a_line_out), .line_in(line),
    .link_state(a_state), .tx_overflow(a_tovf), .rx_overflow(a_rovf), .preamble_err(a_perr));
  serial_link u_b (.clk, .rst, .tx_valid(b_tx_valid), .tx_packet(b_tx_packet),
    .rx_valid(b_rx_valid), .rx_packet(b_rx_packet), .line_out(b_line_out), .line_in(line),
    .link_state(b_state), .tx_overflow(b_tovf), .rx_overflow(b_rovf), .preamble_err(b_perr));

  always #5 clk = ~clk;

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

  always @(posedge clk) if (!rst) begin
    if (a_rx_valid) a_got.push_back(a_rx_packet);
    if (b_rx_valid) b_got.push_back(b_rx_packet);
    if (a_tovf) a_ovf_count++;
    if (a_perr) a_perr_count++;
    if (b_perr) b_perr_count++;
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    repeat (5) @(negedge clk);
    // Burst of 12 into A, one per clock.
    for (int i = 0; i < 12; i++) begin
      a_tx_valid = 1; a_tx_packet = 13'(16'h0A00 + i);
      @(negedge clk);
      // the overflow pulse for a push shows one clock later
    end
    a_tx_valid = 0;
    @(negedge clk);
    // A pops its first packet the clock after it arrives, so 1 + 8 fit.
    check(a_ovf_count == 3, $sformatf("overflow count %0d, expected 3", a_ovf_count));
    for (int i = 0; i < 9; i++) a_sent.push_back(13'(16'h0A00 + i));
    // While A is sending, B queues two packets; they must wait for the wire.
    repeat (100) @(negedge clk);
    for (int i = 0; i < 2; i++) begin
      b_tx_valid = 1; b_tx_packet = 13'(16'h1B00 + i);
      b_sent.push_back(b_tx_packet);
      @(negedge clk);
    end
    b_tx_valid = 0;
    repeat (20 * 600) @(negedge clk);
    check(b_got.size() == a_sent.size() + 0, $sformatf("B got %0d packets", b_got.size()));
    for (int i = 0; i < a_sent.size() && i < b_got.size(); i++)
      check(b_got[i] == a_sent[i], $sformatf("B packet %0d = %h expected %h", i, b_got[i], a_sent[i]));
    check(a_got.size() == b_sent.size(), $sformatf("A got %0d packets", a_got.size()));
    for (int i = 0; i < b_sent.size() && i < a_got.size(); i++)
      check(a_got[i] == b_sent[i], $sformatf("A packet %0d", i));
    check(a_perr_count == 0 && b_perr_count == 0, "no preamble errors on clean traffic");
    // Noise pulse on an idle wire: both reject it.
    @(negedge clk) noise = 1;
    repeat (3) @(negedge clk);
    noise = 0;
    repeat (600) @(negedge clk);
    check(a_perr_count == 1 && b_perr_count == 1, "noise rejected by both");
    check(a_got.size() == b_sent.size() && b_got.size() == a_sent.size(), "noise produced no packet");
    check(a_state == LINK_IDLE && b_state == LINK_IDLE, "both idle at end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // The link state of a node only leaves SENDING for IDLE: a node never
  // switches straight from sending to receiving.
  link_state_t a_prev = LINK_IDLE;
  always @(negedge clk) if (!rst) begin
    checks++;
    if (a_prev == LINK_SENDING && a_state == LINK_RECEIVING) begin
      failures++; $display("FAIL: A went from sending to receiving");
    end
    a_prev = a_state;
  end
endmodule
