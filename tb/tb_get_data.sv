// tb_get_data: drives the receiver with frames built by the testbench, through
// the behavioural line model, with disturbances the receiver must survive:
// spikes inside the ignored head of a bit window and single-cycle spikes
// inside the voting region. Checks the decoded packets, the 17-bit-time
// latency from the first rise to pkt_valid, the rejection of a noise pulse and
// of a frame with a wrong preamble, and that nothing starts while disabled.
module tb_get_data;
  import phone_pkg::*;
  localparam int BC = 32, SKIP = 13;
  logic clk = 0, rst = 1, enable = 1, drv = 0, noise = 0, line_in;
  logic busy, pkt_valid, preamble_err;
  logic [12:0] packet;
  int checks = 0, failures = 0;
  int got = 0, errs = 0;
  logic [12:0] last_pkt;
  longint cyc = 0, rise_at = 0, valid_at = 0;

  wired_or_line #(.N(1), .RISE_DELAY(19), .FALL_DELAY(17)) u_line (
    .clk, .drv(drv), .noise, .line(line_in));

  get_data #(.BIT_CYCLES(BC), .SKIP_CYCLES(SKIP)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (pkt_valid) begin got++; last_pkt = packet; valid_at = cyc; end
    if (preamble_err) errs++;
    if (!busy && enable && line_in) rise_at = cyc;
  end

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Send a frame of 17 bits, each held BC clocks, with optional spikes.
  task automatic send_frame(input logic [16:0] frame, input bit spikes);
    for (int b = 16; b >= 0; b--) begin
      for (int c = 0; c < BC; c++) begin
        @(negedge clk);
        drv = frame[b];
        // A one-clock spike late in some zero bits; the line delay moves it
        // into the voting region of the receiver's window.
        noise = spikes && !frame[b] && (c == 20) && (b % 3 == 0);
      end
    end
    @(negedge clk) drv = 0; noise = 0;
    repeat (3 * BC) @(negedge clk);
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    repeat (10) @(negedge clk);
    for (int p = 0; p < 30; p++) begin
      logic [12:0] pk;
      int g0;
      pk = (p == 0) ? 13'h1FFF : (p == 1) ? 13'h0 : 13'($urandom);
      g0 = got;
      send_frame({PREAMBLE, pk}, p % 2 == 1);
      check(got == g0 + 1, $sformatf("packet %0d received", p));
      check(last_pkt == pk, $sformatf("packet %0d data %h expected %h", p, last_pkt, pk));
      check(valid_at - rise_at == 17 * BC, $sformatf("latency %0d", valid_at - rise_at));
    end
    // A noise pulse is rejected by the preamble check.
    begin
      int g0, e0;
      g0 = got; e0 = errs;
      @(negedge clk) noise = 1;
      repeat (4) @(negedge clk);
      noise = 0;
      repeat (8 * BC) @(negedge clk);
      check(errs == e0 + 1, "noise pulse flagged");
      check(got == g0, "noise pulse produced no packet");
      // A frame with the wrong preamble is rejected.
      send_frame({4'b1001, 13'h0AAA}, 0);
      check(errs >= e0 + 2, "bad preamble flagged");
      check(got == g0, "bad preamble produced no packet");
      // Disabled: nothing starts.
      enable = 0;
      send_frame({PREAMBLE, 13'h0555}, 0);
      check(got == g0 && !busy, "disabled receiver ignores the line");
      enable = 1;
      send_frame({PREAMBLE, 13'h1234}, 0);
      check(got == g0 + 1 && last_pkt == 13'h1234, "receives again after enable");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
