// fir_filter -- strictly causal FIR filter, y[k] = sum_{i=1..TAPS} COEF[i-1] * x[k-i].
//
// Used twice inside the noise-coupled noise shaper, as H_FWD and H_BWD. Both filters
// must be strictly causal (no z^0 term), because their output is added to the
// quantiser input of the same sample; the output therefore depends only on the
// delay line and is combinational from registers.
//
// Interface: x_i is shifted into the TAPS-deep delay line on every clock edge with
// en_i high; y_o is the full-precision sum of products (COEF carries its own
// fractional bits, which the user removes). Reset clears the delay line.
// Timing: y_o is valid one cycle after the en_i edge and stays constant until the
// next one. In the shaper en_i fires once per PWM period, so the multiplier tree is
// a multicycle path. The document asks only for "FIR filters"; the direct form
// with parallel multipliers is this design's choice.
`timescale 1ns / 1ps
module fir_filter #(
  parameter int unsigned TAPS   = classd_pkg::NS_ORDER,
  parameter int unsigned IN_W   = 28,
  parameter int unsigned COEF_W = classd_pkg::COEF_W,
  parameter int unsigned ACC_W  = 72,
  parameter logic signed [COEF_W-1:0] COEF [TAPS] = classd_pkg::FWD_COEF
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    en_i,
  input  logic signed [IN_W-1:0]  x_i,
  output logic signed [ACC_W-1:0] y_o
);

  logic signed [IN_W-1:0] dl [TAPS];  // dl[i] holds x[k-1-i]

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < TAPS; i++) dl[i] <= '0;
    end else if (en_i) begin
      dl[0] <= x_i;
      for (int i = 1; i < TAPS; i++) dl[i] <= dl[i-1];
    end
  end

  always_comb begin
    logic signed [ACC_W-1:0] acc;
    acc = '0;
    for (int i = 0; i < TAPS; i++) begin
      acc += ACC_W'(COEF[i]) * ACC_W'(dl[i]);
    end
    y_o = acc;
  end

endmodule
