// tb_packet_reader: random packets with random addresses; only those
// addressed to this node come out, one clock later, split into header and
// data.
module tb_packet_reader;
  import phone_pkg::*;
  logic clk = 0, rst = 1, in_valid = 0, out_valid;
  node_id_t my_id = 2'd2;
  logic [12:0] in_packet = '0;
  header_t out_header;
  logic [7:0] out_data;
  int checks = 0, failures = 0, passed = 0, dropped = 0;

  packet_reader dut (.*);
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

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int i = 0; i < 2000; i++) begin
      logic v;
      logic [12:0] p;
      if (i % 500 == 0) my_id = node_id_t'($urandom);
      v = 1'($urandom);
      p = 13'($urandom);
      in_valid = v; in_packet = p;
      @(negedge clk);
      if (v && p[12:11] == my_id) begin
        passed++;
        check(out_valid, "matching packet passed");
        check(out_header == header_t'(p[10:8]) && out_data == p[7:0], "fields");
      end else begin
        if (v) dropped++;
        check(!out_valid, "other packet dropped");
      end
    end
    check(passed > 100 && dropped > 100, "both cases seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
