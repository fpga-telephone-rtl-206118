// tb_debouncer: checks that short glitches never reach the output and that a
// stable change appears exactly DEBOUNCE_CYCLES+2 clocks after it is first
// applied (two synchroniser stages, then the stability count).
module tb_debouncer;
  localparam int D = 20;
  logic clk = 0, rst = 1, noisy = 0, clean;
  int checks = 0, failures = 0;

  debouncer #(.DEBOUNCE_CYCLES(D)) dut (.clk, .rst, .noisy, .clean);

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

  // Apply a level, then count clocks until the output follows.
  task automatic settle(input logic v, output int n);
    @(negedge clk) noisy = v;
    n = 0;
    while (clean != v && n < 10 * D) begin
      @(posedge clk); n++;
      #1;
    end
  endtask

  initial begin
    int n;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    // glitches of 1..D-2 clocks are ignored
    for (int g = 1; g < D - 1; g += 3) begin
      @(negedge clk) noisy = 1;
      repeat (g) @(negedge clk);
      noisy = 0;
      repeat (D + 5) begin
        @(posedge clk); #1;
        check(clean == 0, $sformatf("glitch of %0d cycles passed", g));
      end
    end
    // bouncing press: several short pulses, then stable high
    for (int b = 0; b < 4; b++) begin
      @(negedge clk) noisy = 1;
      repeat (3) @(negedge clk);
      noisy = 0;
      repeat (2) @(negedge clk);
    end
    settle(1'b1, n);
    check(n == D + 2, $sformatf("rise latency %0d, expected %0d", n, D + 2));
    repeat (5) @(posedge clk);
    settle(1'b0, n);
    check(n == D + 2, $sformatf("fall latency %0d, expected %0d", n, D + 2));
    repeat (5) @(posedge clk); #1;
    check(clean == 0, "output low at end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
