// tb_fpga_telephone_full: one complete call between real-time nodes with every
// parameter of the telephone at its default: 27 MHz clock, 10 ms debouncing,
// 48 kHz codec strobes (562/563 clocks apart), 32 clocks per bit. Three nodes
// share the modelled wire. Node 0 calls node 1, node 1 answers, both talk,
// node 0 hangs up. Checks states, caller ID, the speech level heard at each
// end, that node 2 stays idle, and that call set-up over the wire takes one
// packet time (17 bits of 32 clocks) plus the line and pipeline delays.
module tb_fpga_telephone_full;
  import phone_pkg::*;
  localparam int N = 3;
  localparam int DEB = 270_000;

  logic clk = 0, rst = 1;
  logic [4:0] btn [N];
  logic [7:0] sw [N];
  logic ready [N];
  logic [7:0] mic [N], spk [N];
  logic [N-1:0] drv;
  logic line;
  logic [18:0] zaddr [N];
  logic zwe [N];
  logic [35:0] zwdata [N], zrdata [N];
  node_id_t my_id [N], tgt [N], peer [N];
  phone_state_t st [N];
  link_state_t lst [N];
  logic tovf [N], rovf [N], perr [N];
  int checks = 0, failures = 0;
  bit n2_busy = 0;

  wired_or_line #(.N(N)) u_line (.clk, .drv, .noise(1'b0), .line);

  for (genvar i = 0; i < N; i++) begin : g_node
    fpga_telephone u_phone (
      .clk, .rst, .btn(btn[i]), .sw(sw[i]),
      .ac97_ready(ready[i]), .ac97_in(mic[i]), .ac97_out(spk[i]),
      .line_out(drv[i]), .line_in(line),
      .zbt_addr(zaddr[i]), .zbt_we(zwe[i]), .zbt_wdata(zwdata[i]), .zbt_rdata(zrdata[i]),
      .disp_my_id(my_id[i]), .disp_target_id(tgt[i]), .disp_peer_id(peer[i]),
      .disp_state(st[i]), .link_state(lst[i]),
      .tx_overflow(tovf[i]), .rx_overflow(rovf[i]), .preamble_err(perr[i]));
    zbt_model u_zbt (.clk, .addr(zaddr[i]), .we(zwe[i]), .wdata(zwdata[i]), .rdata(zrdata[i]));

    // 48 kHz from 27 MHz: alternate 562 and 563 clocks; stagger the nodes.
    int cnt;
    bit odd;
    always @(posedge clk) begin
      if (rst) begin cnt <= -i * 1500; ready[i] <= 0; odd <= 0; end
      else if (cnt >= (odd ? 562 : 561)) begin cnt <= 0; ready[i] <= 1; odd <= !odd; end
      else begin cnt <= cnt + 1; ready[i] <= 0; end
    end
  end

  always #5 clk = ~clk;   // 10 ns stands for the 37 ns period; only cycles matter

  always @(posedge clk) if (!rst && st[2] != S_IDLE) n2_busy = 1;

  initial begin : watchdog
    repeat (6_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic press(input int node, input int b);
    @(negedge clk) btn[node][b] = 1;
    repeat (DEB + 100) @(negedge clk);
    btn[node][b] = 0;
    repeat (DEB + 100) @(negedge clk);
  endtask

  task automatic expect_level(input int node, input int level, input string what);
    int ok, tot;
    ok = 0; tot = 0;
    repeat (40 * 563) begin
      @(negedge clk);
      if (ready[node]) begin
        tot++;
        if (int'($signed(spk[node])) == level) ok++;
      end
    end
    check(tot > 30 && ok == tot, $sformatf("%s: node %0d level %0d on %0d of %0d samples", what, node, level, ok, tot));
  endtask

  initial begin
    longint t_call, t_ring;
    for (int i = 0; i < N; i++) begin btn[i] = '0; sw[i] = 8'(i); mic[i] = '0; end
    sw[0][3:2] = 2'd1;
    repeat (5) @(posedge clk);
    @(negedge clk) rst = 0;
    repeat (DEB + 100) @(negedge clk);   // switches settle through the debouncers
    for (int i = 0; i < N; i++) check(my_id[i] == node_id_t'(i), "ID from switches");
    check(tgt[0] == 2'd1, "node 0 will call node 1");

    mic[0] = 8'd33; mic[1] = 8'(-77);
    fork
      press(0, 4);
      begin
        wait (st[0] == S_CALLING);
        t_call = $time;
        wait (st[1] == S_RINGING);
        t_ring = $time;
      end
    join
    check(st[1] == S_RINGING && peer[1] == 2'd0, "node 1 rings with caller ID 0");
    // CALL packet: 17 bits x 32 clocks, plus line delay and pipeline stages.
    begin
      longint dt;
      dt = (t_ring - t_call) / 10;
      check(dt >= 17 * 32 && dt <= 17 * 32 + 19 + 10, $sformatf("call set-up took %0d clocks", dt));
    end
    press(1, 3);
    check(st[0] == S_IN_CALL && st[1] == S_IN_CALL, "both in call");
    repeat (30 * 4500) @(negedge clk);
    expect_level(1, 33, "node 0 heard at node 1");
    expect_level(0, -77, "node 1 heard at node 0");
    press(0, 3);
    check(st[0] == S_IDLE && st[1] == S_IDLE, "both idle after hang-up");
    check(!n2_busy, "node 2 stayed idle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
