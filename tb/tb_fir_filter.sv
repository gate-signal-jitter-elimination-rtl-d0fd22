// tb_fir_filter -- self-checking testbench of the strictly causal FIR filter.
//
// Drives random samples with a random sample strobe, keeps its own history of the
// accepted samples and checks y = sum COEF[i-1] * x[k-i] in the cycle after every
// strobe and in the idle cycles in between (the output must hold). Uses the default
// 11 taps and the pole coefficients of the noise shaper, then a reset check.
`timescale 1ns / 1ps
module tb_fir_filter;
  localparam int TAPS = classd_pkg::NS_ORDER;
  localparam int IN_W = 28;
  localparam int ACC_W = 72;

  logic clk, rst_n, en;
  logic signed [IN_W-1:0]  x;
  logic signed [ACC_W-1:0] y;
  int checks, failures;
  longint hist [TAPS];

  fir_filter dut (.clk, .rst_n, .en_i(en), .x_i(x), .y_o(y));

  initial begin clk = 1'b0; rst_n = 1'b0; en = 1'b0; x = '0; checks = 0; failures = 0; end
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic signed [ACC_W-1:0] expected();
    logic signed [ACC_W-1:0] s;
    s = '0;
    for (int i = 0; i < TAPS; i++)
      s += ACC_W'(classd_pkg::FWD_COEF[i]) * ACC_W'(hist[i]);
    return s;
  endfunction

  task automatic check(input string what);
    checks++;
    if (y !== expected()) begin
      failures++;
      if (failures < 10) $display("%s: y=%0d expected %0d", what, y, expected());
    end
  endtask

  initial begin
    for (int i = 0; i < TAPS; i++) hist[i] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check("after reset");
    for (int k = 0; k < 3000; k++) begin
      x  = IN_W'($signed($urandom));
      en = ($urandom % 3) != 0;
      @(negedge clk);
      if (en) begin
        for (int i = TAPS-1; i > 0; i--) hist[i] = hist[i-1];
        hist[0] = longint'(x);
      end
      check(en ? "after strobe" : "idle");
    end
    // single impulse walks through every tap
    en = 1'b1; x = IN_W'(1);
    @(negedge clk);
    for (int i = TAPS-1; i > 0; i--) hist[i] = hist[i-1];
    hist[0] = 1;
    x = '0;
    for (int t = 0; t < TAPS + 2; t++) begin
      check("impulse");
      @(negedge clk);
      for (int i = TAPS-1; i > 0; i--) hist[i] = hist[i-1];
      hist[0] = 0;
    end
    en = 1'b0;
    rst_n = 1'b0;
    @(negedge clk);
    checks++;
    if (y != '0) begin failures++; $display("reset did not clear the delay line"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
