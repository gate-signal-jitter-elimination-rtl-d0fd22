// ncs_noise_shaper -- noise-coupled noise shaper (NCS) that reduces an m-bit
// reference to an n-bit PWM compare word while keeping the quantisation noise out of
// the 0..10 kHz baseband.
//
// Structure (one sample per en_i):
//   v   = x + (H_FWD(x - yA) + H_BWD(vs - yA)) >>> COEF_FRAC
//   vs  = saturate(v) to REF_W bits                         ("Sat")
//   q   = vs >>> (REF_W - OUT_W)   (floor, remainder dropped: the quantiser, "Div")
//   yA  = q <<< (REF_W - OUT_W)                              ("Mul", gain A)
// H_FWD and H_BWD are strictly causal FIR filters, so the output is
//   y = x + NTF * (yA - vs),  NTF = (1 - H_BWD) / (1 + H_FWD),  STF = 1.
// The structure, the saturation, the shift quantiser and the NTF formula follow the
// document; the sign convention of the error node, the fixed-point format of the
// coefficients and the coefficient values (see classd_pkg) are this design's own.
//
// Interface: x_i (signed REF_W) is sampled on the clock edge where en_i is high; on
// the same edge the new output q_o (signed OUT_W) is registered and the two FIR delay
// lines advance. sat_o is high for the sample whose quantiser input was clipped.
// Timing: q_o is valid from the cycle after en_i until the next en_i. The path from
// the FIR delay lines and x_i to q_o is combinational; it is a multicycle path,
// since en_i comes once per PWM period (1024 clock cycles at the default sizes).
`timescale 1ns / 1ps
module ncs_noise_shaper #(
  parameter int unsigned REF_W     = classd_pkg::REF_W,
  parameter int unsigned OUT_W     = classd_pkg::NS_OUT_W,
  parameter int unsigned ORDER     = classd_pkg::NS_ORDER,
  parameter int unsigned COEF_W    = classd_pkg::COEF_W,
  parameter int unsigned COEF_FRAC = classd_pkg::COEF_FRAC,
  parameter int unsigned ACC_W     = 64,
  parameter logic signed [COEF_W-1:0] FWD_COEF [ORDER] = classd_pkg::FWD_COEF,
  parameter logic signed [COEF_W-1:0] BWD_COEF [ORDER] = classd_pkg::BWD_COEF
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    en_i,
  input  logic signed [REF_W-1:0] x_i,
  output logic signed [OUT_W-1:0] q_o,
  output logic                    sat_o
);

  localparam int unsigned SH = REF_W - OUT_W;  // bits dropped by the quantiser

  localparam logic signed [ACC_W-1:0] VMAX = ACC_W'((64'sd1 <<< (REF_W-1)) - 64'sd1);
  localparam logic signed [ACC_W-1:0] VMIN = -ACC_W'(64'sd1 <<< (REF_W-1));

  logic signed [ACC_W-1:0] fwd_y, bwd_y;
  logic signed [ACC_W-1:0] v;
  logic signed [REF_W-1:0] vs, ya;
  logic signed [OUT_W-1:0] q;
  logic signed [REF_W:0]   fwd_in;   // x - yA
  logic signed [SH:0]      bwd_in;   // vs - yA, always in [0, 2^SH)
  logic                    clip;

  fir_filter #(
    .TAPS(ORDER), .IN_W(REF_W+1), .COEF_W(COEF_W), .ACC_W(ACC_W), .COEF(FWD_COEF)
  ) u_fir_fwd (
    .clk, .rst_n, .en_i, .x_i(fwd_in), .y_o(fwd_y)
  );

  fir_filter #(
    .TAPS(ORDER), .IN_W(SH+1), .COEF_W(COEF_W), .ACC_W(ACC_W), .COEF(BWD_COEF)
  ) u_fir_bwd (
    .clk, .rst_n, .en_i, .x_i(bwd_in), .y_o(bwd_y)
  );

  always_comb begin
    v    = ACC_W'(x_i) + ((fwd_y + bwd_y) >>> COEF_FRAC);
    clip = 1'b0;
    if (v > VMAX) begin
      vs   = VMAX[REF_W-1:0];
      clip = 1'b1;
    end else if (v < VMIN) begin
      vs   = VMIN[REF_W-1:0];
      clip = 1'b1;
    end else begin
      vs   = v[REF_W-1:0];
    end
    q      = vs[REF_W-1:SH];               // arithmetic shift right by SH
    ya     = {q, {SH{1'b0}}};              // shift back left by SH
    fwd_in = (REF_W+1)'(x_i) - (REF_W+1)'(ya);
    bwd_in = (SH+1)'(vs - ya);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q_o   <= '0;
      sat_o <= 1'b0;
    end else if (en_i) begin
      q_o   <= q;
      sat_o <= clip;
    end
  end

endmodule
