// tb_packet_fifo: random pushes and pops against a queue reference model.
// Checks head data, empty, full, count and the overflow pulse on a push to a
// full buffer, and that exactly eight entries fit.
module tb_packet_fifo;
  localparam int DEPTH = 8, W = 13;
  logic clk = 0, rst = 1, push = 0, pop = 0;
  logic [W-1:0] din = '0, dout;
  logic empty, full, overflow;
  logic [3:0] count;
  int checks = 0, failures = 0;
  logic [W-1:0] q[$];
  bit exp_ovf;

  packet_fifo #(.DEPTH(DEPTH), .WIDTH(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    int pushes_ok;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    exp_ovf = 0;
    // Fill past capacity: exactly DEPTH accepted.
    pushes_ok = 0;
    for (int i = 0; i < DEPTH + 3; i++) begin
      @(negedge clk);
      push = 1; din = W'(i + 100);
      @(posedge clk); #1;
      if (q.size() < DEPTH) begin q.push_back(W'(i + 100)); pushes_ok++; check(!overflow, "no overflow while space"); end
      else check(overflow, "overflow pulse when full");
    end
    @(negedge clk) push = 0;
    check(pushes_ok == DEPTH, "eight entries fit");
    check(full && count == DEPTH, "full and count at capacity");
    // Random traffic.
    for (int i = 0; i < 3000; i++) begin
      bit do_push, do_pop, ovf;
      @(negedge clk);
      do_push = ($urandom % 100) < 50;
      do_pop  = ($urandom % 100) < 45;
      push = do_push; pop = do_pop; din = W'($urandom);
      check(empty == (q.size() == 0), "empty flag");
      check(full == (q.size() == DEPTH), "full flag");
      check(count == q.size(), "count");
      if (q.size() > 0) check(dout == q[0], "head data");
      @(posedge clk); #1;
      ovf = 0;
      begin
        if (do_pop && q.size() > 0) void'(q.pop_front());
        if (do_push) begin
          if (q.size() < DEPTH) q.push_back(din);
          else ovf = 1;
        end
      end
      check(overflow == ovf, "overflow pulse");
    end
    @(negedge clk) push = 0; pop = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
