// tb_mic_filter: random 48 kHz samples; every eighth input must produce one
// 6 kHz output equal to the floor of the mean of the last eight inputs.
module tb_mic_filter;
  logic clk = 0, rst = 1, in_valid = 0, out_valid;
  logic [7:0] in_sample = '0, out_sample;
  int checks = 0, failures = 0;
  int hist[$];
  int outs = 0;

  mic_filter #(.RATIO(8)) dut (.*);
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
    for (int i = 0; i < 800; i++) begin
      int s, sum, expect_v;
      s = (i < 16) ? 127 : (i < 32) ? -128 : int'($signed(8'($urandom)));
      @(negedge clk) in_valid = 1; in_sample = 8'(s);
      hist.push_back(s); void'(hist.pop_front());
      @(negedge clk) in_valid = 0;
      if (i % 8 == 7) begin
        sum = 0;
        foreach (hist[k]) sum += hist[k];
        expect_v = sum >>> 3;
        check(out_valid, $sformatf("output after input %0d", i));
        check($signed(out_sample) == expect_v, $sformatf("avg %0d vs %0d", $signed(out_sample), expect_v));
        outs++;
      end else begin
        check(!out_valid, "no output between decimation points");
      end
      repeat ($urandom % 4) @(negedge clk);
    end
    check(outs == 100, "one output per eight inputs");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
