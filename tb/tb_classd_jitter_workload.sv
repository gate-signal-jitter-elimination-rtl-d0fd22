// tb_classd_jitter_workload -- gate-path jitter measurement on the complete modulator
// at its default sizes: a square wave is sent to both gate drivers and the RMS timing
// error of every edge is measured before and after the re-synchronisation flip-flops.
//
// A zero reference makes the noise shaper output exactly zero, so the PWM produces a
// 50 % square wave at 97.66 kHz and the dead-time sequencer turns it into the two gate
// signals G. Each gate path has a signal-isolator model (8 ns, uniform +/-0.6 ns
// random jitter per edge) and an RC/diode CE filter model; the isolated clock is the
// control clock delayed by 5 ns plus a random per-edge jitter of +/-15.6 ns/1000
// (uniform, 9 ps RMS), the jitter the separately isolated low-jitter clock brings.
// There is no bridge transient here (a measurement without power transistors).
//
// For every G edge the deviation of the matching isolator-output edge from its nominal
// position (G + 8 ns) and of the matching flip-flop-output edge from its nominal
// position (G + 15 ns, the first isolated clock edge after the isolator output) is
// recorded. Checked: the isolator RMS jitter lies near the model's 0.346 ns; the
// flip-flop RMS jitter is at most the isolated clock's own jitter (plus margin) and at
// least ten times lower than the isolator's; every G edge produces one flip-flop edge.
// The maximum SNR that a given RMS jitter allows is reported with
// SNR = 20 log10( m / (4 sqrt(2) T_rms) * sqrt(T_PWM / f_BW) ), m = 1, f_BW = 10 kHz.
// The model numbers are this testbench's choice; the square-wave method and the
// formula follow the jitter measurement the design is built around.
`timescale 1ns / 1ps
module tb_classd_jitter_workload;
  localparam int  REF_W = classd_pkg::REF_W;
  localparam int  OUT_W = classd_pkg::NS_OUT_W;
  localparam int  TOP   = 1 << OUT_W;
  localparam int  N_PER = 300;               // PWM periods measured
  localparam real CLK_JIT = 0.0156;          // isolated clock jitter, +/- ns, uniform
  localparam real T_ISO  = 8.0;              // nominal isolator delay
  localparam real T_FF   = 15.0;             // nominal G edge to flip-flop edge
  localparam real T_PWM  = 2.0 * real'(TOP) * 10.0e-9;
  localparam real F_BW   = 10.0e3;

  logic clk, rst_n, en;
  logic signed [REF_W-1:0] ref_x;
  logic ref_req, ns_sat, pwm, blk, gate_chg;
  logic signed [OUT_W-1:0] ns_q;
  logic [1:0] g, clk_iso, ce, g_iso, blk_iso, g_ff;

  classd_modulator_top dut (
    .clk, .rst_n, .en_i(en), .ref_i(ref_x), .ref_req_o(ref_req), .ns_q_o(ns_q),
    .ns_sat_o(ns_sat), .pwm_o(pwm), .g_o(g), .blk_o(blk), .gate_chg_o(gate_chg),
    .clk_iso_i(clk_iso), .ce_i(ce), .g_iso_i(g_iso), .g_ff_o(g_ff)
  );

  for (genvar d = 0; d < 2; d++) begin : g_iso_side
    tb_signal_isolator u_iso_g   (.in_i(g[d]), .transient_i(1'b0), .out_o(g_iso[d]));
    tb_signal_isolator u_iso_blk (.in_i(blk),  .transient_i(1'b0), .out_o(blk_iso[d]));
    tb_ce_filter       u_rc      (.blk_i(blk_iso[d]), .ce_o(ce[d]));
  end

  initial begin clk = 1'b0; rst_n = 1'b0; en = 1'b0; ref_x = '0; end
  always #5 clk = ~clk;

  // jittered isolated clock, shared by both drivers
  logic clk_j;
  initial clk_j = 1'b0;
  function automatic real clk_dly();
    return 5.0 + CLK_JIT * (2.0 * real'($urandom % 1001) / 1000.0 - 1.0);
  endfunction
  always @(posedge clk) clk_j <= #(clk_dly()) 1'b1;
  always @(negedge clk) clk_j <= #(clk_dly()) 1'b0;
  assign clk_iso = {2{clk_j}};

  int checks, failures;
  initial begin checks = 0; failures = 0; end

  task automatic fail(input string msg);
    failures++;
    if (failures < 15) $display("%0t: %s", $realtime, msg);
  endtask

  initial begin : watchdog
    #10ms;
    fail("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- edge timing ----------------------------------------------------------------
  realtime g_t [2];
  real     iso_sq, ff_sq, ff_max;
  int      n_iso, n_ff, n_g;
  bit      measuring;
  initial begin
    g_t[0] = 0; g_t[1] = 0; iso_sq = 0.0; ff_sq = 0.0; ff_max = 0.0;
    n_iso = 0; n_ff = 0; n_g = 0; measuring = 1'b0;
  end

  for (genvar d = 0; d < 2; d++) begin : g_mon
    always @(g[d]) begin
      g_t[d] = $realtime;
      if (measuring) n_g++;
    end
    always @(g_iso[d]) if (measuring) begin
      real e;
      e = ($realtime - g_t[d]) - T_ISO;
      iso_sq += e * e;
      n_iso++;
    end
    always @(g_ff[d]) if (measuring) begin
      real e;
      e = ($realtime - g_t[d]) - T_FF;
      ff_sq += e * e;
      n_ff++;
      if ((e < 0 ? -e : e) > ff_max) ff_max = (e < 0 ? -e : e);
    end
  end

  function automatic real snr_max_db(input real t_rms_ns);
    return 20.0 * $log10(1.0 / (4.0 * $sqrt(2.0) * t_rms_ns * 1.0e-9) * $sqrt(T_PWM / F_BW));
  endfunction

  // ---- sequence -------------------------------------------------------------------
  real iso_rms, ff_rms;
  int  n_periods;
  initial n_periods = 0;
  always @(posedge clk) if (ref_req) n_periods <= n_periods + 1;

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    en = 1'b1;
    wait (n_periods == 4);          // the square wave has settled
    #100 measuring = 1'b1;
    wait (n_periods == 4 + N_PER);
    @(negedge clk);
    measuring = 1'b0;
    #100;
    iso_rms = $sqrt(iso_sq / real'(n_iso > 0 ? n_iso : 1));
    ff_rms  = $sqrt(ff_sq / real'(n_ff > 0 ? n_ff : 1));
    checks += 6;
    if (n_g < 4 * N_PER - 4)              fail($sformatf("only %0d G edges for a square wave", n_g));
    if (n_iso != n_g)                     fail($sformatf("%0d G edges, %0d isolator edges", n_g, n_iso));
    if (n_ff != n_g)                      fail($sformatf("%0d G edges, %0d flip-flop edges", n_g, n_ff));
    if (iso_rms < 0.30 || iso_rms > 0.40) fail($sformatf("isolator RMS jitter %0.4f ns", iso_rms));
    if (ff_max > CLK_JIT + 0.002)         fail($sformatf("flip-flop edge off by %0.4f ns", ff_max));
    if (ff_rms * 10.0 > iso_rms)          fail($sformatf("flip-flop RMS jitter %0.4f ns not 10x lower", ff_rms));
    $display("square wave, %0d PWM periods, %0d gate edges", N_PER, n_g);
    $display("G_ISO: RMS jitter %0.1f ps, max. SNR %0.1f dB", iso_rms * 1000.0, snr_max_db(iso_rms));
    $display("G_FF : RMS jitter %0.1f ps, max. SNR %0.1f dB", ff_rms * 1000.0, snr_max_db(ff_rms));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
