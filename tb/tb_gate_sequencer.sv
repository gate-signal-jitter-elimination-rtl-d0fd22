// tb_gate_sequencer -- self-checking testbench of the dead-time and blanking sequencer.
//
// Drives the PWM request with long and short pulses (some shorter than the dead time)
// and toggles the enable. A cycle-by-cycle monitor checks: the two gates are never on
// together; every gate state (including "both off") lasts at least DEAD_CYC cycles;
// BLK is low exactly in cycles BLK_DLY .. BLK_DLY+BLK_CYC-1 after every gate change and
// high otherwise; from a settled state a PWM edge turns the active gate off one cycle
// later and the other one on DEAD_CYC cycles after that; with the enable low both
// gates end up off.
`timescale 1ns / 1ps
module tb_gate_sequencer;
  localparam int DEAD = classd_pkg::DEAD_CYC;
  localparam int BDLY = classd_pkg::BLK_DLY;
  localparam int BCYC = classd_pkg::BLK_CYC;

  logic clk, rst_n, en, pwm;
  logic g_hi, g_lo, blk, chg;
  int checks, failures;
  int cyc, last_chg, n_changes, n_blank, n_short;
  logic [1:0] prev_g;

  gate_sequencer dut (.clk, .rst_n, .en_i(en), .pwm_i(pwm), .g_hi_o(g_hi), .g_lo_o(g_lo), .blk_o(blk), .chg_o(chg));

  initial begin
    clk = 1'b0; rst_n = 1'b0; en = 1'b0; pwm = 1'b0;
    checks = 0; failures = 0; cyc = 0; last_chg = -1000; n_changes = 0; n_blank = 0; n_short = 0;
    prev_g = 2'b00;
  end
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fail(input string msg);
    failures++;
    if (failures < 10) $display("cycle %0d: %s", cyc, msg);
  endtask

  // monitor, sampled between clock edges
  always @(negedge clk) if (rst_n) begin
    logic [1:0] g;
    int since;
    cyc++;
    g = {g_hi, g_lo};
    checks++;
    if (g == 2'b11) fail("both gates on");
    if (g != prev_g) begin
      checks++;
      if (cyc - last_chg < DEAD) fail($sformatf("state held only %0d cycles", cyc - last_chg));
      checks++;
      if (!chg) fail("chg_o missing");
      last_chg = cyc;
      n_changes++;
    end
    since = cyc - last_chg;
    checks++;
    if (blk != !(since >= BDLY && since < BDLY + BCYC)) fail($sformatf("BLK=%b %0d cycles after a change", blk, since));
    if (!blk) n_blank++;
    prev_g = g;
  end

  task automatic hold_pwm(input logic v, input int n);
    pwm = v;
    repeat (n) @(negedge clk);
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    en = 1'b1;
    hold_pwm(1'b0, 20);
    checks++;
    if (!(g_lo && !g_hi)) fail("low side not on after enable");
    // settled edge timing, both directions
    for (int r = 0; r < 4; r++) begin
      logic v;
      int t_off, t_on;
      v = (r % 2 == 0);
      pwm = v;
      t_off = -1; t_on = -1;
      for (int t = 1; t <= DEAD + 3; t++) begin
        @(negedge clk);
        if (t_off < 0 && !g_hi && !g_lo) t_off = t;
        if (t_on < 0 && (v ? g_hi : g_lo)) t_on = t;
      end
      checks++;
      if (t_off != 1) fail($sformatf("gate off %0d cycles after the PWM edge", t_off));
      checks++;
      if (t_on != 1 + DEAD) fail($sformatf("complementary gate on %0d cycles after the PWM edge", t_on));
      hold_pwm(v, 20);
    end
    // random pulse train, some pulses shorter than the dead time
    for (int k = 0; k < 600; k++) begin
      int len;
      bit hi_seen;
      len = 1 + int'($urandom % (3 * DEAD));
      pwm = ~pwm;
      hi_seen = 1'b0;
      for (int t = 0; t < len; t++) begin
        @(negedge clk);
        if (pwm ? g_hi : g_lo) hi_seen = 1'b1;
      end
      if (len < DEAD && !hi_seen) n_short++;
    end
    hold_pwm(1'b1, 30);
    checks++;
    if (!(g_hi && !g_lo)) fail("high side not on after a long request");
    // disable: both off, then re-enable
    en = 1'b0;
    repeat (3 * DEAD) @(negedge clk);
    checks++;
    if (g_hi || g_lo) fail("gates not off with enable low");
    en = 1'b1;
    repeat (3 * DEAD) @(negedge clk);
    checks++;
    if (!g_hi) fail("high side not back on after re-enable");
    checks++;
    if (n_short == 0 || n_blank == 0 || n_changes < 100) fail("mechanisms not exercised");
    $display("gate changes %0d, blanking cycles %0d, short pulses absorbed %0d", n_changes, n_blank, n_short);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
