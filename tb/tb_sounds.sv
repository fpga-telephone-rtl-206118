// tb_sounds: compares the tone samples with 127*sin computed in real
// arithmetic. In IDLE the 750 Hz tone must repeat every 64 samples; in
// CALLING it alternates with silence every CADENCE_SAMPLES; in RINGING it
// alternates with the 375 Hz tone, which advances one table step every two
// samples. Other states are silent.
module tb_sounds;
  import phone_pkg::*;
  localparam int CAD = 40;
  logic clk = 0, rst = 1, ready = 0;
  phone_state_t state = S_IDLE;
  logic [7:0] tone_out, beep;
  int checks = 0, failures = 0;

  sounds #(.CADENCE_SAMPLES(CAD)) dut (.*);
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

  function automatic logic [7:0] ref_sine(input int ph);
    real q;
    int k, m;
    k = ph % 16;
    if ((ph / 16) % 2 == 1) k = 15 - k;
    q = 127.0 * $sin(2.0 * 3.14159265358979 * (real'(k) + 0.5) / 64.0);
    m = int'(q);  // int'() rounds to nearest
    return ((ph / 32) % 2 == 1) ? 8'(-m) : 8'(m);
  endfunction

  // One sample: pulse ready, return the new tone_out (one clock later).
  task automatic sample(output logic [7:0] t, output logic [7:0] b);
    @(negedge clk) ready = 1;
    b = beep;
    @(negedge clk) ready = 0;
    t = tone_out;
    repeat (3) @(negedge clk);
  endtask

  initial begin
    logic [7:0] t, b;
    int ph750, ph375;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    // IDLE: 750 Hz. Phase starts at 0 after reset.
    ph750 = 0; ph375 = 0;
    for (int i = 0; i < 128; i++) begin
      sample(t, b);
      check(t == ref_sine(ph750 % 64), $sformatf("idle sample %0d: %0d vs %0d", i, $signed(t), $signed(ref_sine(ph750 % 64))));
      check(b == ref_sine(ph750 % 64), "beep equals the 750 Hz tone");
      ph750++; if (i % 2 == 1) ph375++;
    end
    // CALLING: tone for CAD samples, then silence for CAD samples.
    @(negedge clk) state = S_CALLING;
    repeat (2) @(negedge clk);
    for (int i = 0; i < 4 * CAD; i++) begin
      sample(t, b);
      if ((i / CAD) % 2 == 0) check(t == ref_sine(ph750 % 64), $sformatf("calling tone %0d", i));
      else                    check(t == 8'd0, $sformatf("calling silence %0d", i));
      ph750++; if ((ph750 % 2) == 0) ph375++;
    end
    // RINGING: 750 Hz, then 375 Hz.
    @(negedge clk) state = S_RINGING;
    repeat (2) @(negedge clk);
    for (int i = 0; i < 4 * CAD; i++) begin
      sample(t, b);
      if ((i / CAD) % 2 == 0) check(t == ref_sine(ph750 % 64), $sformatf("ringing high %0d", i));
      else                    check(t == ref_sine(ph375 % 64), $sformatf("ringing low %0d", i));
      ph750++; if ((ph750 % 2) == 0) ph375++;
    end
    @(negedge clk) state = S_IN_CALL;
    for (int i = 0; i < 20; i++) begin sample(t, b); check(t == 8'd0, "silent in call"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
