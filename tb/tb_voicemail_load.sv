// tb_voicemail_load: the voice store at its full default size.
//
// voice_memory keeps its default parameters (three 2^16-word slots in a
// 2^19-word SRAM, two-clock read latency) on the SRAM model. The test fills
// the greeting slot to the end and beyond, records a 10 s message (60000
// samples at 6 kHz) into each message slot, then plays all three back. Every
// word is compared with a pattern computed from slot and position, every write
// address is checked against {slot, offset}, and full must rise exactly at the
// 65536th sample. Finally message slot 1 is overwritten with a shorter
// recording, as the controller does when the slots wrap round, and the other
// slots must be unchanged. Samples arrive one per clock, faster than the real
// 6 kHz, because the memory does not depend on the rate; the read delay of
// three clocks from request to data is checked on every read.
module tb_voicemail_load;
  localparam int unsigned SLOT_WORDS = 2 ** 16;
  localparam int unsigned MSG_LEN    = 60_000;
  localparam int unsigned SHORT_LEN  = 12_345;

  logic clk = 0, rst = 1;
  logic rec_start = 0, play_start = 0, wr_valid = 0, rd_req = 0;
  logic [1:0] slot = '0;
  logic [7:0] wr_data = '0, rd_data;
  logic rd_valid, full, play_done;
  logic [18:0] zbt_addr;
  logic zbt_we;
  logic [35:0] zbt_wdata, zbt_rdata;
  int checks = 0, failures = 0;

  voice_memory dut (.*);
  zbt_model u_zbt (.clk, .addr(zbt_addr), .we(zbt_we), .wdata(zbt_wdata), .rdata(zbt_rdata));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (2_000_000) @(posedge clk);
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

  // test pattern: depends on slot, generation and position, not periodic in 256
  function automatic logic [7:0] pat(input int unsigned s, input int unsigned gen, input int unsigned i);
    return 8'((i * 37) ^ (i >> 8) ^ (s * 101) ^ (gen * 59));
  endfunction

  // write-side monitor: every SRAM write lands at {slot, offset} in order
  int unsigned wr_seen;
  logic [1:0]  wr_slot;
  int unsigned wr_gen;
  int unsigned addr_errs = 0, data_errs = 0;
  initial forever begin
    @(posedge clk);
    if (zbt_we) begin
      if (zbt_addr != {1'b0, wr_slot, 16'(wr_seen)}) addr_errs++;
      if (zbt_wdata != 36'(pat(int'(wr_slot), wr_gen, wr_seen))) data_errs++;
      wr_seen++;
    end
  end

  task automatic record(input logic [1:0] s, input int unsigned gen, input int unsigned n,
                        output int unsigned full_at);
    full_at = 0;
    wr_slot = s;
    wr_gen  = gen;
    wr_seen = 0;
    @(negedge clk); slot = s; rec_start = 1;
    @(negedge clk); rec_start = 0;
    for (int unsigned i = 0; i < n; i++) begin
      if (full && full_at == 0) full_at = i;
      wr_valid = 1; wr_data = pat(int'(s), gen, i);
      @(negedge clk);
      // a pause now and then, as between real samples
      if (i % 997 == 0) begin wr_valid = 0; @(negedge clk); end
    end
    wr_valid = 0;
    repeat (2) @(negedge clk);
    if (full && full_at == 0) full_at = n;
  endtask

  // Request on every clock for n + 5 clocks: only the first n may be taken.
  // The request sampled on clock edge k must return its word with rd_valid
  // high after edge k + 2, so that it is read on edge k + 3.
  task automatic play(input logic [1:0] s, input int unsigned gen, input int unsigned n,
                      input string what);
    int unsigned got = 0, bad = 0, late = 0;
    int unsigned edge_no = 0;
    @(negedge clk); slot = s; play_start = 1;
    @(negedge clk); play_start = 0;
    rd_req = 1;
    while (edge_no < n + 10) begin
      @(posedge clk);
      #1;
      if (rd_valid) begin
        if (edge_no != got + 2) late++;
        if (rd_data != pat(int'(s), gen, got)) bad++;
        got++;
      end
      edge_no++;
      @(negedge clk);
      if (edge_no == n + 5) rd_req = 0;
    end
    rd_req = 0;
    check(got == n, $sformatf("%s: played %0d samples, recorded %0d", what, got, n));
    check(bad == 0, $sformatf("%s: %0d samples differ", what, bad));
    check(late == 0, $sformatf("%s: %0d reads not three clocks after request", what, late));
    check(play_done, $sformatf("%s: play_done at the end", what));
  endtask

  initial begin : stimulus
    int unsigned full_at;
    repeat (4) @(negedge clk);
    rst = 0;
    repeat (2) @(negedge clk);

    // greeting: offer 100 more samples than the slot holds
    record(2'd0, 0, SLOT_WORDS + 100, full_at);
    check(full_at == SLOT_WORDS, $sformatf("full rose after %0d samples, slot holds %0d", full_at, SLOT_WORDS));
    check(wr_seen == SLOT_WORDS, $sformatf("%0d greeting words written", wr_seen));

    // two 10 s messages
    record(2'd1, 0, MSG_LEN, full_at);
    check(full_at == 0, "a 10 s message does not fill its slot");
    check(wr_seen == MSG_LEN, "message 1 words written");
    record(2'd2, 0, MSG_LEN, full_at);
    check(full_at == 0, "second message does not fill its slot");
    check(wr_seen == MSG_LEN, "message 2 words written");

    check(addr_errs == 0, $sformatf("%0d writes outside {slot, offset}", addr_errs));
    check(data_errs == 0, $sformatf("%0d writes with the wrong word", data_errs));

    play(2'd0, 0, SLOT_WORDS, "greeting");
    play(2'd1, 0, MSG_LEN, "message 1");
    play(2'd2, 0, MSG_LEN, "message 2");

    // the slots wrap round: a third message replaces message 1
    record(2'd1, 1, SHORT_LEN, full_at);
    check(addr_errs == 0 && data_errs == 0, "overwrite lands in slot 1 only");
    play(2'd1, 1, SHORT_LEN, "message 1 overwritten");
    play(2'd2, 0, MSG_LEN, "message 2 after overwrite");
    play(2'd0, 0, SLOT_WORDS, "greeting after overwrite");

    $display("voice store: %0d + %0d + %0d words in a %0d-word SRAM",
             SLOT_WORDS, MSG_LEN, MSG_LEN, 2 ** 19);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
