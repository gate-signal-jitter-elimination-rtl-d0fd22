// tb_ncs_fig13_workload -- time-domain tracking of the noise shaper for a 12-bit input,
// at the shaper's default sizes (26-bit input, 9-bit output, order 11).
//
// An arbitrary, slowly varying 12-bit signal (two sines whose amplitudes change in
// random steps, 80 % of full scale at most) is placed in the upper 12 bits of the
// 26-bit reference. The 9-bit output, rescaled by 2^(12-9) = 8, must follow the 12-bit
// input with STF = 1: its error against the input, averaged over windows of 256
// samples, stays below one 12-bit LSB (1/8 of the output step), although every single
// output is off by up to several output steps. The testbench also checks that the
// output is not simply the truncated input (the shaper really does dither between
// neighbouring levels) and that the averaged error is at least 20 times smaller than
// the RMS error of a single sample, which is the noise shaping made visible in the
// time domain. One sample every 4 clock cycles; the shaper does not depend on the rate.
`timescale 1ns / 1ps
module tb_ncs_fig13_workload;
  localparam int REF_W = classd_pkg::REF_W;
  localparam int OUT_W = classd_pkg::NS_OUT_W;
  localparam int IN_BITS = 12;
  localparam int N_SAMP = 20000;
  localparam int WIN = 256;
  localparam real PI = 3.14159265358979;

  logic clk, rst_n, en;
  logic signed [REF_W-1:0] x;
  logic signed [OUT_W-1:0] q;
  logic sat;

  ncs_noise_shaper dut (.clk, .rst_n, .en_i(en), .x_i(x), .q_o(q), .sat_o(sat));

  initial begin clk = 1'b0; rst_n = 1'b0; en = 1'b0; x = '0; end
  always #5 clk = ~clk;

  int checks, failures;
  initial begin checks = 0; failures = 0; end

  task automatic fail(input string msg);
    failures++;
    if (failures < 15) $display("%0t: %s", $realtime, msg);
  endtask

  initial begin : watchdog
    #5ms;
    fail("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real a1, a2, err_sq, worst_mean;
  int  x12, win_err, win_n, n_win, n_dither, n_sat;
  initial begin
    a1 = 0.5; a2 = 0.3; err_sq = 0.0; worst_mean = 0.0;
    win_err = 0; win_n = 0; n_win = 0; n_dither = 0; n_sat = 0; x12 = 0;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < N_SAMP; k++) begin
      if (k % 2500 == 0) begin   // new amplitudes, total at most 0.8 of full scale
        a1 = 0.1 + 0.4 * real'($urandom % 1000) / 1000.0;
        a2 = 0.3 * real'($urandom % 1000) / 1000.0;
      end
      x12 = $rtoi(2047.0 * (a1 * $sin(2.0 * PI * real'(k) / 3100.0)
                          + a2 * $sin(2.0 * PI * real'(k) / 730.0 + 1.0)));
      x = REF_W'(longint'(x12) <<< (REF_W - IN_BITS));
      en = 1'b1;
      @(negedge clk);
      en = 1'b0;
      // q now holds the output for x12
      begin
        int e;
        e = int'(q) * (1 << (IN_BITS - OUT_W)) - x12;
        if (sat) n_sat++;
        if (int'(q) != (x12 >>> (IN_BITS - OUT_W))) n_dither++;
        if (k >= 100) begin
          err_sq += real'(e) * real'(e);
          win_err += e;
          win_n++;
          if (win_n == WIN) begin
            real m;
            m = real'(win_err) / real'(WIN);
            n_win++;
            checks++;
            if (m > 1.0 || m < -1.0) fail($sformatf("window mean error %0.3f LSB", m));
            if ((m < 0 ? -m : m) > worst_mean) worst_mean = (m < 0 ? -m : m);
            win_err = 0; win_n = 0;
          end
        end
      end
      repeat (3) @(negedge clk);
    end
    begin
      real rms;
      rms = $sqrt(err_sq / real'(N_SAMP - 100));
      checks += 4;
      if (n_win < 50)                  fail("too few windows");
      if (n_sat != 0)                  fail($sformatf("%0d saturated samples", n_sat));
      if (n_dither < N_SAMP / 10)      fail($sformatf("output equals the truncated input too often (%0d differ)", n_dither));
      if (worst_mean * 20.0 > rms)     fail($sformatf("averaged error %0.3f not 20x below RMS %0.3f", worst_mean, rms));
      $display("12-bit input, 9-bit output: single-sample RMS error %0.2f LSB(12), worst %0d-sample mean %0.3f LSB(12)",
               rms, WIN, worst_mean);
      $display("samples differing from the truncated input: %0d of %0d", n_dither, N_SAMP);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
