// tb_send_data: captures the line for each packet and checks the frame: the
// preamble 1011 and the 13 packet bits, MSB first, each held for exactly
// BIT_CYCLES clocks, then a low gap, and done after 17 bit times plus the gap.
module tb_send_data;
  import phone_pkg::*;
  localparam int BC = 32, GAP = 32;
  logic clk = 0, rst = 1, start = 0;
  logic [12:0] packet = '0;
  logic busy, done, line_out;
  int checks = 0, failures = 0;

  send_data #(.BIT_CYCLES(BC), .GAP_CYCLES(GAP)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    logic [16:0] frame;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int p = 0; p < 20; p++) begin
      logic [12:0] pk;
      int n;
      pk = (p == 0) ? 13'h1FFF : (p == 1) ? 13'h0000 : 13'($urandom);
      frame = {4'b1011, pk};
      @(negedge clk);
      check(!line_out && !busy, "idle low before start");
      start = 1; packet = pk;
      @(negedge clk);
      start = 0; packet = 13'($urandom);  // input may change after start
      // The first frame bit is on the line from the edge that took start.
      for (int b = 16; b >= 0; b--) begin
        for (int c = 0; c < BC; c++) begin
          check(line_out == frame[b], $sformatf("pkt %0d bit %0d cycle %0d", p, 16 - b, c));
          check(busy, "busy during frame");
          @(negedge clk);
        end
      end
      n = 0;
      while (!done && n < 4 * GAP) begin
        check(line_out == 0, "low during gap");
        @(negedge clk); n++;
      end
      check(n == GAP, $sformatf("gap length %0d", n));
      check(!busy, "idle with done");
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
