// tb_voice_memory: the memory controller on a modelled ZBT with two-clock read
// latency and 16-word slots. Records different lengths into the greeting and
// both message slots, fills one slot past its end, re-records a slot shorter,
// and plays every slot back: the samples, their count, play_done, the full
// flag, the slot addresses and the READ_LATENCY+1 clock read delay are checked.
module tb_voice_memory;
  localparam int AW = 4, NM = 2, LAT = 2;
  logic clk = 0, rst = 1;
  logic rec_start = 0, play_start = 0, wr_valid = 0, rd_req = 0;
  logic [1:0] slot = '0;
  logic [7:0] wr_data = '0, rd_data;
  logic rd_valid, full, play_done;
  logic [18:0] zbt_addr;
  logic zbt_we;
  logic [35:0] zbt_wdata, zbt_rdata;
  int checks = 0, failures = 0;
  logic [7:0] ref_mem [3][$];

  voice_memory #(.NUM_MSG(NM), .SLOT_AW(AW), .READ_LATENCY(LAT)) dut (.*);
  zbt_model #(.ADDR_W(19), .DATA_W(36), .LATENCY(LAT)) u_zbt (
    .clk, .addr(zbt_addr), .we(zbt_we), .wdata(zbt_wdata), .rdata(zbt_rdata));

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

  task automatic record(input int s, input int n);
    @(negedge clk) rec_start = 1; slot = 2'(s);
    @(negedge clk) rec_start = 0;
    ref_mem[s].delete();
    for (int i = 0; i < n; i++) begin
      logic [7:0] d;
      d = 8'($urandom);
      wr_valid = 1; wr_data = d;
      if (i < 2 ** AW) begin
        check(!full, "not full before the end of the slot");
        ref_mem[s].push_back(d);
      end else begin
        check(full, "full at the end of the slot");
      end
      @(negedge clk);
      if (i < 2 ** AW) begin
        check(zbt_we && zbt_addr == 19'(s * 2 ** AW + i), $sformatf("write address slot %0d word %0d", s, i));
        check(zbt_wdata[7:0] == d, "write data");
      end else begin
        check(!zbt_we, "no write when full");
      end
      wr_valid = 0;
      repeat ($urandom % 3) @(negedge clk);
    end
  endtask

  task automatic play(input int s);
    int n;
    @(negedge clk) play_start = 1; slot = 2'(s);
    @(negedge clk) play_start = 0;
    n = 0;
    while (!play_done && n < 100) begin
      int lat;
      rd_req = 1;
      @(negedge clk) rd_req = 0;
      lat = 1;
      while (!rd_valid && lat < 10) begin @(negedge clk); lat++; end
      check(lat == LAT + 1, $sformatf("read latency %0d", lat));
      check(rd_data == ref_mem[s][n], $sformatf("slot %0d sample %0d: %h vs %h", s, n, rd_data, ref_mem[s][n]));
      n++;
      @(negedge clk);
    end
    check(n == ref_mem[s].size(), $sformatf("slot %0d played %0d of %0d", s, n, ref_mem[s].size()));
    // Requests after the end return nothing.
    rd_req = 1;
    @(negedge clk) rd_req = 0;
    repeat (5) begin @(negedge clk); check(!rd_valid && play_done, "nothing after the end"); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    record(0, 9);
    record(1, 5);
    record(2, 20);   // overfills a 16-word slot
    play(0);
    play(1);
    play(2);
    record(2, 3);    // shorter re-recording
    play(2);
    play(0);         // greeting untouched
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
