// tb_spk_filter: 6 kHz samples arrive once per eight 48 kHz ready pulses; each
// speaker sample must equal the floor of the mean of the last eight held
// values, so a step ramps across eight output samples.
module tb_spk_filter;
  logic clk = 0, rst = 1, in_valid = 0, ready = 0;
  logic [7:0] in_sample = '0, out_sample;
  int checks = 0, failures = 0;
  int hist[$];
  int held = 0;

  spk_filter #(.RATIO(8)) dut (.*);
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
    for (int i = 0; i < 8; i++) hist.push_back(0);
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int i = 0; i < 960; i++) begin
      int sum;
      if (i % 8 == 0) begin
        int s;
        s = (i < 80) ? 100 : (i < 160) ? -100 : int'($signed(8'($urandom)));
        @(negedge clk) in_valid = 1; in_sample = 8'(s);
        held = s;
        @(negedge clk) in_valid = 0;
      end
      @(negedge clk) ready = 1;
      hist.push_back(held); void'(hist.pop_front());
      @(negedge clk) ready = 0;
      sum = 0;
      foreach (hist[k]) sum += hist[k];
      check($signed(out_sample) == (sum >>> 3), $sformatf("out %0d: %0d vs %0d", i, $signed(out_sample), sum >>> 3));
      if (i == 7) check($signed(out_sample) == 100, "step settled after eight samples");
      if (i == 3) check($signed(out_sample) == 50, "step half way after four samples");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
