// tb_pwm_modulator -- self-checking testbench of the double-sided counter PWM.
//
// Presents a new random compare value after every period strobe (plus the end values
// 0 and TOP-1) and checks, period by period: the period is 2*TOP cycles long, the
// number of high cycles is exactly 2*CMP for the compare value loaded at the start of
// the period, the high time is one contiguous pulse centred on the period boundary,
// and the carrier counts up to TOP-1 and back.
`timescale 1ns / 1ps
module tb_pwm_modulator;
  localparam int RES_W = classd_pkg::NS_OUT_W;
  localparam int TOP   = 1 << RES_W;

  logic clk, rst_n;
  logic [RES_W-1:0] cmp, cnt;
  logic pwm, period, up;
  int checks, failures;

  pwm_modulator dut (.clk, .rst_n, .cmp_i(cmp), .pwm_o(pwm), .period_o(period), .cnt_o(cnt), .up_o(up));

  initial begin clk = 1'b0; rst_n = 1'b0; cmp = '0; checks = 0; failures = 0; end
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("%s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    int loaded, highs, len, edges, maxcnt, prev_pwm;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // first period after reset runs at CMP = TOP/2
    loaded = TOP / 2;
    for (int p = 0; p < 80; p++) begin
      int next;
      next = (p == 3) ? 0 : (p == 4) ? TOP - 1 : (p == 5) ? 1 : int'($urandom % TOP);
      cmp = RES_W'(next);
      // from the second period on, the loop starts in the strobe cycle, so this value
      // is loaded on the next edge and governs the period measured below
      if (p > 0) loaded = next;
      highs = 0; len = 0; edges = 0; maxcnt = 0; prev_pwm = -1;
      do begin
        @(negedge clk);
        len++;
        if (pwm) highs++;
        if (prev_pwm >= 0 && int'(pwm) != prev_pwm) edges++;
        prev_pwm = int'(pwm);
        if (int'(cnt) > maxcnt) maxcnt = int'(cnt);
      end while (!period);
      if (p > 0) begin
        expect_eq(len, 2 * TOP, "period length");
        expect_eq(highs, 2 * loaded, "high cycles");
        expect_eq(maxcnt, TOP - 1, "carrier peak");
        // high at both ends of the period, low in the middle: at most two edges
        checks++;
        if (edges > 2 || (loaded > 0 && loaded < TOP && edges != 2)) begin
          failures++;
          $display("period %0d: %0d pwm edges for CMP %0d", p, edges, loaded);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
