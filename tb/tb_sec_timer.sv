// tb_sec_timer: with CLK_HZ = 10 a limit of S seconds must raise expired
// exactly 10*S + 1 clocks after the clock edge that takes the start pulse, hold it until the next start,
// and count the seconds on the way; a restart in mid-count begins again.
module tb_sec_timer;
  localparam int HZ = 10;
  logic clk = 0, rst = 1, start = 0, expired;
  logic [7:0] seconds = '0, count;
  int checks = 0, failures = 0;

  sec_timer #(.CLK_HZ(HZ)) dut (.*);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic run(input int s);
    int n;
    @(negedge clk) start = 1; seconds = 8'(s);
    @(negedge clk) start = 0; seconds = 8'd99;
    n = 1;
    while (!expired && n < 1000) begin
      check(32'(count) == (n - 1) / HZ, $sformatf("count %0d at clock %0d", count, n));
      @(negedge clk); n++;
    end
    check(n - 1 == HZ * s + 1, $sformatf("limit %0d expired %0d clocks after start", s, n - 1));
    repeat (25) begin @(negedge clk); check(expired, "expired held"); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    repeat (30) begin @(negedge clk); check(!expired, "not expired before first start"); end
    run(3);
    run(1);
    run(0);
    run(7);
    // restart in mid-count
    @(negedge clk) start = 1; seconds = 8'd5;
    @(negedge clk) start = 0;
    repeat (30) @(negedge clk);
    run(2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
