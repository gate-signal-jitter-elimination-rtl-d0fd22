// tb_classd_modulator_top -- end-to-end testbench of the class-D gate-signal path at
// its default sizes (26-bit reference, 11th-order shaper, 9-bit PWM at 97.66 kHz,
// 100 MHz clocks).
//
// Around the design it models the parts outside the chip: four signal-isolator
// channels (8 ns +/- 0.6 ns per edge, random), two RC/diode CE filters, an isolated
// clock that is the modulator clock delayed by 5 ns (the phase shift that puts the
// isolator output inside the flip-flop's sampling window), gate driver ICs with
// 15 ns delay, and a 6 ns bridge-output transient after every gate-voltage change,
// during which every isolator channel outputs garbage.
//
// Stimulus: four periods of a 170 Hz sine at modulation index 0.85 sampled at the
// PWM rate (4 x 575 PWM periods), then a level near negative full scale that saturates the
// shaper and asks for PWM pulses shorter than the dead time, then a disable / enable.
// Checked: one reference sample per 1024 clock cycles; every PWM period 1024 cycles
// long with 2*CMP high cycles for CMP = shaper output + 256; the shaper output tracks
// the reference (mean error over 128-sample windows below 1/8 output LSB) and the
// in-band (DC..10 kHz) SNR of the shaper output exceeds 110 dB; the in-band SNR of
// the PWM waveform itself, from the exact spectrum of its pulses with harmonics left
// out, exceeds 105 dB and its THD stays below -100 dB; no
// shoot-through and at least 5 cycles dead time at G; CE of both drivers low before
// every gate-voltage change; every flip-flop output edge exactly 15 ns after its G
// edge (isolator jitter removed) and no flip-flop edge without a G edge (transient
// glitches rejected). Each mechanism (blanking, glitch rejection, jitter removal,
// saturation, absorbed short pulse, disable) must occur at least once.
`timescale 1ns / 1ps
module tb_classd_modulator_top;
  localparam int  REF_W = classd_pkg::REF_W;
  localparam int  OUT_W = classd_pkg::NS_OUT_W;
  localparam int  SH    = REF_W - OUT_W;
  localparam int  TOP   = 1 << OUT_W;
  localparam real T_GD  = 15.0;   // gate driver IC propagation delay
  localparam real T_TR  = 6.0;    // bridge output transition time
  localparam real FF_DLY = 15.0;  // G edge to flip-flop edge: next isolated clock edge
  localparam int  SINE_N = 575;   // PWM periods of one 170 Hz cycle at 97.66 kHz
  localparam int  SINE_CYC = 4;   // sine periods simulated
  localparam int  NS_N = SINE_N * SINE_CYC;
  localparam real PI = 3.14159265358979;

  logic clk, rst_n, en;
  logic signed [REF_W-1:0] ref_x;
  logic ref_req, ns_sat, pwm, blk, gate_chg;
  logic signed [OUT_W-1:0] ns_q;
  logic [1:0] g, clk_iso, ce, g_iso, blk_iso, g_ff, u_g;
  logic transient;

  classd_modulator_top dut (
    .clk, .rst_n, .en_i(en), .ref_i(ref_x), .ref_req_o(ref_req), .ns_q_o(ns_q),
    .ns_sat_o(ns_sat), .pwm_o(pwm), .g_o(g), .blk_o(blk), .gate_chg_o(gate_chg),
    .clk_iso_i(clk_iso), .ce_i(ce), .g_iso_i(g_iso), .g_ff_o(g_ff)
  );

  for (genvar d = 0; d < 2; d++) begin : g_iso_side
    tb_signal_isolator u_iso_g   (.in_i(g[d]), .transient_i(transient), .out_o(g_iso[d]));
    tb_signal_isolator u_iso_blk (.in_i(blk),  .transient_i(transient), .out_o(blk_iso[d]));
    tb_ce_filter       u_rc      (.blk_i(blk_iso[d]), .ce_o(ce[d]));
    always @(g_ff[d]) u_g[d] <= #(T_GD) g_ff[d];
  end

  initial begin
    clk = 1'b0; rst_n = 1'b0; en = 1'b0; ref_x = '0; transient = 1'b0; u_g = 2'b00;
  end
  always #5 clk = ~clk;
  logic clk_iso_src;
  assign #5 clk_iso_src = clk;
  assign clk_iso = {2{clk_iso_src}};

  int checks, failures;
  initial begin checks = 0; failures = 0; end

  task automatic fail(input string msg);
    failures++;
    if (failures < 15) $display("%0t: %s", $realtime, msg);
  endtask

  initial begin : watchdog
    #40ms;
    fail("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- bridge output transient after every gate-voltage change ------------------
  int n_transients;
  initial n_transients = 0;
  // The bridge is powered from 100 ns on, once the driver flip-flops hold defined
  // values (they have no reset).
  always @(u_g) if ($realtime > 100) begin
    checks++;
    if (ce !== 2'b00) fail($sformatf("gate voltage changed with CE=%b", ce));
    n_transients++;
    transient = 1'b1;
    #(T_TR) transient = 1'b0;
  end

  // ---- reference source ----------------------------------------------------------
  int  k_ref, n_req, last_req_cyc, cyc;
  longint sampled_x, win_err, amp;
  int  win_n, win_ok, win_cnt;
  initial begin k_ref = 0; n_req = 0; last_req_cyc = -1; cyc = 0; win_err = 0; win_n = 0; win_ok = 0; win_cnt = 0; end

  function automatic longint ref_value(input int k);
    if (k < NS_N + 5)
      return longint'($rtoi(real'(amp) * $sin(2.0 * PI * real'(k) / real'(SINE_N))));
    return -((longint'(1) << (REF_W-1)) - 2);  // just inside negative full scale
  endfunction

  always @(posedge clk) if (rst_n) begin
    cyc <= cyc + 1;
    if (ref_req) begin
      if (last_req_cyc >= 0) begin
        checks++;
        if (cyc - last_req_cyc != 2 * TOP) fail($sformatf("sample spacing %0d cycles", cyc - last_req_cyc));
      end
      last_req_cyc <= cyc;
      sampled_x <= longint'(ref_x);
      k_ref <= k_ref + 1;
      ref_x <= REF_W'(ref_value(k_ref + 1));
      n_req <= n_req + 1;
    end
  end

  // tracking of the shaper output, sine part only
  int  n_sat;
  real yv [NS_N];   // shaper output over SINE_CYC sine periods
  initial n_sat = 0;

  // In-band SNR of the shaper output: 4-term Blackman-Harris window over SINE_CYC
  // sine periods, DFT bins up to 10 kHz. The sine sits in bin SINE_CYC; bins within
  // 4 of it (the window's main lobe) count as signal, bins SINE_CYC+5 .. BB_BIN as
  // in-band noise (the few bins below the signal are left out).
  localparam int BB_BIN = (10000 * NS_N) / 97656;   // 10 kHz
  localparam real PWM_SNR_MIN = 105.0;  // plain 9-bit PWM reaches about 66 dB
  localparam real PWM_THD_MAX = -100.0; // harmonics of the uniformly sampled PWM
  function automatic real inband_snr_db();
    real re, im, ps, pn, w, y;
    ps = 0.0; pn = 0.0;
    for (int b = 0; b <= BB_BIN; b++) begin
      re = 0.0; im = 0.0;
      for (int k = 0; k < NS_N; k++) begin
        w = 0.35875 - 0.48829 * $cos(2.0 * PI * real'(k) / real'(NS_N))
                    + 0.14128 * $cos(4.0 * PI * real'(k) / real'(NS_N))
                    - 0.01168 * $cos(6.0 * PI * real'(k) / real'(NS_N));
        y = w * yv[k];
        re += y * $cos(2.0 * PI * real'(b) * real'(k) / real'(NS_N));
        im += y * $sin(2.0 * PI * real'(b) * real'(k) / real'(NS_N));
      end
      if (b >= SINE_CYC - 4 && b <= SINE_CYC + 4) ps += re * re + im * im;
      else if (b > SINE_CYC + 4)                  pn += re * re + im * im;
    end
    return 10.0 * $log10(ps / pn);
  endfunction
  always @(posedge clk) if (rst_n && ref_req && n_req >= 1) begin
    #1;
    if (ns_sat) n_sat++;
    if (k_ref >= 1 && k_ref <= NS_N) yv[k_ref-1] = real'(ns_q);
    if (k_ref > 20 && k_ref <= NS_N) begin
      win_err += longint'(ns_q) * (longint'(1) << SH) - sampled_x;
      win_n++;
      if (win_n == 128) begin
        win_cnt++;
        checks++;
        if ((win_err < 0 ? -win_err : win_err) * 8 >= 128 * (longint'(1) << SH))
          fail($sformatf("shaper mean error %0d over 128 samples", win_err));
        else win_ok++;
        win_err = 0; win_n = 0;
      end
    end
  end

  // ---- PWM duty per period -------------------------------------------------------
  int highs, plen, cmp_cur, n_periods;
  initial begin highs = 0; plen = 0; cmp_cur = TOP / 2; n_periods = 0; end
  always @(negedge clk) if (rst_n) begin
    plen++;
    if (pwm) highs++;
    if (ref_req) begin
      if (n_periods > 0) begin
        checks += 2;
        if (plen != 2 * TOP) fail($sformatf("PWM period %0d cycles", plen));
        if (highs != 2 * cmp_cur) fail($sformatf("PWM high %0d cycles, CMP %0d", highs, cmp_cur));
      end
      n_periods++;
      cmp_cur = int'(ns_q) + TOP / 2;   // loaded on the coming edge
      highs = 0; plen = 0;
    end
  end

  // PWM output spectrum: every high interval [rise, fall) in clock cycles inside an
  // analysis span of NS_N periods is kept, and the in-band spectrum is computed from the
  // exact Fourier transform of the rectangular pulses (no sampling of the waveform).
  // The Blackman-Harris window is taken at each pulse centre; it changes little over
  // one pulse. Bins at 2..5 times the signal bin are harmonics and are left out of the
  // noise, as the SNR definition excludes harmonic distortion.
  int pwm_t0, pwm_rise;
  int pwm_ts [$];
  int pwm_te [$];
  initial begin pwm_t0 = -1; pwm_rise = -1; end
  always @(negedge clk) if (rst_n) begin
    if (ref_req && n_periods == 3) pwm_t0 = cyc + 1;   // n_periods already counted this strobe
    if (pwm_t0 >= 0 && cyc >= pwm_t0 && cyc < pwm_t0 + NS_N * 2 * TOP) begin
      if (pwm && pwm_rise < 0) pwm_rise = cyc;
      if (!pwm && pwm_rise >= 0) begin
        pwm_ts.push_back(pwm_rise - pwm_t0); pwm_te.push_back(cyc - pwm_t0); pwm_rise = -1;
      end
      if (pwm && cyc == pwm_t0 + NS_N * 2 * TOP - 1) begin   // clip the last pulse
        pwm_ts.push_back(pwm_rise - pwm_t0); pwm_te.push_back(cyc + 1 - pwm_t0); pwm_rise = -1;
      end
    end
  end
  function automatic bit harmonic_bin(input int b);
    for (int h = 2; h <= 5; h++)
      if (b >= h * SINE_CYC - 4 && b <= h * SINE_CYC + 4) return 1'b1;
    return 1'b0;
  endfunction
  function automatic real pwm_snr_db(output real thd_db);
    real re, im, ps, pn, ph, w, wl, c, len;
    len = real'(NS_N * 2 * TOP);
    ps = 0.0; pn = 0.0; ph = 0.0;
    for (int b = 1; b <= BB_BIN; b++) begin
      wl = 2.0 * PI * real'(b) / len;
      re = 0.0; im = 0.0;
      for (int i = 0; i < pwm_ts.size(); i++) begin
        c = 0.5 * real'(pwm_ts[i] + pwm_te[i]) / len;
        w = 0.35875 - 0.48829 * $cos(2.0 * PI * c) + 0.14128 * $cos(4.0 * PI * c)
                    - 0.01168 * $cos(6.0 * PI * c);
        re += w * ($sin(wl * real'(pwm_te[i])) - $sin(wl * real'(pwm_ts[i]))) / wl;
        im -= w * ($cos(wl * real'(pwm_ts[i])) - $cos(wl * real'(pwm_te[i]))) / wl;
      end
      if (b >= SINE_CYC - 4 && b <= SINE_CYC + 4) ps += re * re + im * im;
      else if (harmonic_bin(b))    ph += re * re + im * im;
      else if (b > SINE_CYC + 4)   pn += re * re + im * im;
    end
    thd_db = 10.0 * $log10(ph / ps);
    return 10.0 * $log10(ps / pn);
  endfunction

  // ---- gate timing at the controller outputs ---------------------------------------
  int both_off, n_blank_cyc, n_short;
  logic [1:0] prev_g;
  int pwm_run;
  logic prev_pwm;
  initial begin both_off = 0; n_blank_cyc = 0; n_short = 0; prev_g = 2'b00; pwm_run = 0; prev_pwm = 1'b0; end
  always @(negedge clk) if (rst_n) begin
    checks++;
    if (g == 2'b11) fail("shoot-through at G");
    if (g == 2'b00) both_off++;
    else begin
      if (prev_g == 2'b00 && en && cyc > 20 && both_off < classd_pkg::DEAD_CYC) fail($sformatf("dead time %0d cycles", both_off));
      both_off = 0;
    end
    if (!blk) n_blank_cyc++;
    // a PWM pulse shorter than the dead time must not reach the gates
    if (pwm != prev_pwm) begin
      if (pwm_run > 0 && pwm_run < classd_pkg::DEAD_CYC) n_short++;
      pwm_run = 0;
    end
    pwm_run++;
    prev_pwm = pwm;
    prev_g = g;
  end

  // ---- isolated side: jitter removal and glitch rejection ----------------------------
  realtime g_edge_t [2];
  logic    g_val [2];
  real     iso_min, iso_max, ff_min, ff_max;
  int      n_ff_edges, n_g_edges;
  initial begin
    g_edge_t[0] = -1000; g_edge_t[1] = -1000; g_val[0] = 1'b0; g_val[1] = 1'b0;
    iso_min = 1e9; iso_max = -1e9; ff_min = 1e9; ff_max = -1e9; n_ff_edges = 0; n_g_edges = 0;
  end
  for (genvar d = 0; d < 2; d++) begin : g_mon
    always @(g[d]) begin
      g_edge_t[d] = $realtime;
      g_val[d] = g[d];
      if ($realtime > 50) n_g_edges++;
    end
    always @(g_iso[d]) if (!transient && $realtime > 50 && g_iso[d] == g_val[d]) begin
      real dt;
      dt = $realtime - g_edge_t[d];
      if (dt < iso_min) iso_min = dt;
      if (dt > iso_max) iso_max = dt;
    end
    always @(g_ff[d]) if ($realtime > 50) begin
      real dt;
      dt = $realtime - g_edge_t[d];
      n_ff_edges++;
      checks++;
      if (g_ff[d] != g_val[d] || dt < FF_DLY - 0.001 || dt > FF_DLY + 0.001)
        fail($sformatf("driver %0d: flip-flop edge to %b %0.3f ns after G edge", d, g_ff[d], dt));
      if (dt < ff_min) ff_min = dt;
      if (dt > ff_max) ff_max = dt;
    end
  end

  // ---- sequence -------------------------------------------------------------------------
  real snr_db, pwm_db, pwm_thd;
  initial begin
    amp = longint'(0.85 * real'((longint'(1) << (REF_W-1)) - 1));
    ref_x = REF_W'(ref_value(0));
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    en = 1'b1;
    wait (n_req >= NS_N + 40);
    // disable, both gates must go off, then enable again
    @(negedge clk);
    en = 1'b0;
    repeat (4 * classd_pkg::DEAD_CYC) @(negedge clk);
    checks++;
    if (g != 2'b00) fail("gates not off while disabled");
    #200;
    checks++;
    if (g_ff != 2'b00) fail("driver flip-flops not off while disabled");
    en = 1'b1;
    repeat (4 * TOP) @(negedge clk);
    #100;
    // mechanisms
    checks += 7;
    if (n_transients == 0)           fail("no bridge transient happened");
    if (n_blank_cyc == 0)            fail("no blanking happened");
    if (iso_max - iso_min < 0.5)     fail("isolator jitter not exercised");
    if (ff_max - ff_min > 0.001)     fail("jitter left at the flip-flop output");
    if (n_sat == 0)                  fail("shaper never saturated");
    if (n_short == 0)                fail("no PWM pulse shorter than the dead time");
    if (win_cnt < 3 || win_ok != win_cnt) fail("tracking windows failed");
    snr_db = inband_snr_db();
    checks++;
    if (snr_db < 110.0) fail($sformatf("in-band SNR of the shaper output %0.1f dB", snr_db));
    pwm_db = pwm_snr_db(pwm_thd);
    checks += 3;
    if (pwm_thd > PWM_THD_MAX) fail($sformatf("THD of the PWM output %0.1f dB", pwm_thd));
    if (pwm_ts.size() < NS_N) fail($sformatf("only %0d PWM pulses in the analysis span", pwm_ts.size()));
    if (pwm_db < PWM_SNR_MIN) fail($sformatf("in-band SNR of the PWM output %0.1f dB", pwm_db));
    checks++;
    // every G edge produced exactly one flip-flop edge (the last ones may be in flight)
    if (n_ff_edges > n_g_edges || n_g_edges - n_ff_edges > 2)
      fail($sformatf("%0d G edges but %0d flip-flop edges", n_g_edges, n_ff_edges));
    $display("periods %0d, G edges %0d, FF edges %0d, transients %0d, blank cycles %0d",
             n_periods, n_g_edges, n_ff_edges, n_transients, n_blank_cyc);
    $display("isolator delay %0.3f..%0.3f ns, flip-flop delay %0.3f..%0.3f ns",
             iso_min, iso_max, ff_min, ff_max);
    $display("shaper output SNR, DC to 10 kHz, %0d periods of 170 Hz: %0.1f dB", SINE_CYC, snr_db);
    $display("PWM output SNR, DC to 10 kHz, harmonics excluded: %0.1f dB, THD (2nd..5th) %0.1f dB (%0d pulses)",
             pwm_db, pwm_thd, pwm_ts.size());
    $display("saturated samples %0d, short PWM pulses absorbed %0d, tracking windows %0d/%0d",
             n_sat, n_short, win_ok, win_cnt);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
