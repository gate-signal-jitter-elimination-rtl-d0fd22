// tb_ncs_noise_shaper -- self-checking testbench of the noise-coupled noise shaper.
//
// A behavioural model written from the loop equations (64-bit integers, quantiser as
// floor division by 2^(m-n) computed with a remainder) predicts every output sample;
// the testbench compares bit for bit for a sine at modulation index 0.85, a random
// input and an overdriven square wave that forces saturation. Independently of the
// model it checks that the output tracks the input at low frequency (the mean of
// y*2^(m-n) - x over 256-sample windows stays far below one output LSB, whereas plain
// truncation would leave half an LSB), that the output never clips for the sine, that
// the output appears one cycle after the sample strobe and holds until the next one.
`timescale 1ns / 1ps
module tb_ncs_noise_shaper;
  localparam int REF_W = classd_pkg::REF_W;
  localparam int OUT_W = classd_pkg::NS_OUT_W;
  localparam int N     = classd_pkg::NS_ORDER;
  localparam int SH    = REF_W - OUT_W;
  localparam int FRAC  = classd_pkg::COEF_FRAC;
  localparam int EN_EVERY = 4;

  logic clk, rst_n, en;
  logic signed [REF_W-1:0] x = '0;
  logic signed [OUT_W-1:0] q;
  logic sat;
  int checks = 0, failures = 0;

  ncs_noise_shaper dut (.clk, .rst_n, .en_i(en), .x_i(x), .q_o(q), .sat_o(sat));

  initial begin clk = 1'b0; rst_n = 1'b0; en = 1'b0; end
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- reference model -------------------------------------------------------
  longint mdf [N];
  longint mdb [N];
  longint exp_q;
  bit     exp_sat;

  function automatic longint floor_div(longint a, longint d);
    longint r;
    r = a % d;
    if (r < 0) r += d;
    return (a - r) / d;
  endfunction

  task automatic model_step(input longint xin);
    longint acc, v, vs, ya, hi, lo;
    acc = 0;
    for (int i = 0; i < N; i++)
      acc += longint'(classd_pkg::FWD_COEF[i]) * mdf[i] + longint'(classd_pkg::BWD_COEF[i]) * mdb[i];
    v  = xin + floor_div(acc, longint'(1) << FRAC);
    hi = (longint'(1) << (REF_W-1)) - 1;
    lo = -(longint'(1) << (REF_W-1));
    exp_sat = (v > hi) || (v < lo);
    vs = (v > hi) ? hi : (v < lo) ? lo : v;
    exp_q = floor_div(vs, longint'(1) << SH);
    ya = exp_q * (longint'(1) << SH);
    for (int i = N-1; i > 0; i--) begin
      mdf[i] = mdf[i-1];
      mdb[i] = mdb[i-1];
    end
    mdf[0] = xin - ya;
    mdb[0] = vs - ya;
  endtask

  // ---- stimulus --------------------------------------------------------------
  longint win_err;
  int     win_n, sat_seen, sat_in_sine;
  int     windows_ok, windows;
  localparam real PI = 3.14159265358979;

  task automatic sample(input longint xin, input bit track);
    x  <= REF_W'(xin);
    @(negedge clk);
    en = 1'b1;
    @(negedge clk);
    en = 1'b0;
    model_step(xin);
    checks++;
    if (longint'(q) != exp_q || sat != exp_sat) begin
      failures++;
      if (failures < 10) $display("mismatch: x=%0d q=%0d exp=%0d sat=%b exp=%b", xin, q, exp_q, sat, exp_sat);
    end
    if (sat) sat_seen++;
    if (track) begin
      win_err += longint'(q) * (longint'(1) << SH) - xin;
      win_n++;
    end
    for (int k = 0; k < EN_EVERY - 2; k++) begin
      @(negedge clk);
      checks++;
      if (longint'(q) != exp_q) begin
        failures++;
        $display("output did not hold between strobes");
      end
    end
  endtask

  initial begin
    longint amp, xv;
    windows_ok = 0; windows = 0;
    for (int i = 0; i < N; i++) begin mdf[i] = 0; mdb[i] = 0; end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);

    // 1: sine, modulation index 0.85, 500 samples per period
    amp = longint'(0.85 * real'((longint'(1) << (REF_W-1)) - 1));
    sat_seen = 0;
    for (int w = 0; w < 24; w++) begin
      win_err = 0; win_n = 0;
      for (int k = 0; k < 256; k++) begin
        xv = longint'($rtoi(real'(amp) * $sin(2.0 * PI * real'(w*256 + k) / 500.0)));
        sample(xv, 1'b1);
      end
      if (w >= 2) begin
        windows++;
        checks++;
        // |mean error| < LSB/16
        if ((win_err < 0 ? -win_err : win_err) * 16 >= longint'(win_n) * (longint'(1) << SH)) begin
          failures++;
          $display("window %0d: mean tracking error %0d/%0d too large", w, win_err, win_n);
        end else windows_ok++;
      end
    end
    sat_in_sine = sat_seen;
    checks++;
    if (sat_in_sine != 0) begin failures++; $display("sine at m=0.85 clipped %0d times", sat_in_sine); end

    // 2: random input within half of full scale
    for (int k = 0; k < 2000; k++) begin
      xv = longint'($signed($urandom)) >>> (32 - REF_W + 1);
      sample(xv, 1'b0);
    end

    // 3: overdriven square wave -> saturation
    sat_seen = 0;
    for (int k = 0; k < 400; k++) begin
      xv = ((k / 50) % 2 == 0) ? (longint'(1) << (REF_W-1)) - 1 : -(longint'(1) << (REF_W-1));
      sample(xv, 1'b0);
    end
    checks++;
    if (sat_seen == 0) begin failures++; $display("saturation never happened"); end

    $display("tracking windows ok %0d/%0d, saturations in overdrive %0d", windows_ok, windows, sat_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
