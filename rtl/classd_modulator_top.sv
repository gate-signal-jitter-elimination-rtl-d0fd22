// classd_modulator_top -- digital gate-signal path of one class-D half-bridge leg:
// noise-shaping PWM modulator, dead-time and blanking sequencer, and the two
// isolated-side re-synchronisation flip-flops.
//
// Control side (clk, the phase-shifted modulator clock):
//   ref_i --> ncs_noise_shaper --(n-bit word + 2^(n-1))--> pwm_modulator --> pwm_o
//         --> gate_sequencer --> g_o (G of both drivers), blk_o (BLK of both drivers)
// One reference sample is consumed per PWM period: ref_req_o is high in the last
// cycle of every period, and ref_i is sampled on that clock edge. The compare value
// loaded on a ref_req_o edge is the shaper output of the previous ref_req_o edge, so
// a sample sets the duty cycle of the period that starts one period after it was taken.
//
// Isolated side (one flip-flop per driver, clocked by the isolated clock): g_o and
// blk_o leave the chip, pass the signal isolators and come back as g_iso_i; blk_o,
// through the RC filter with its bypass diode, comes back as ce_i; the clock sent
// across the clock isolator comes back as clk_iso_i. g_ff_o goes to the gate driver
// ICs. The isolators, the RC filter, the clock isolator, the driver ICs and the power
// transistors are analogue or bought parts outside this module.
//
// Bit 1 of every two-bit port belongs to the high-side transistor (T1), bit 0 to the
// low-side transistor (T2). The chain follows the document's signal flow with the
// noise shaper feeding a counter PWM; the offset that maps the signed shaper output to
// an unsigned compare value and the port-level split are this design's own.
`timescale 1ns / 1ps
module classd_modulator_top #(
  parameter int unsigned REF_W    = classd_pkg::REF_W,
  parameter int unsigned OUT_W    = classd_pkg::NS_OUT_W,
  parameter int unsigned DEAD_CYC = classd_pkg::DEAD_CYC,
  parameter int unsigned BLK_DLY  = classd_pkg::BLK_DLY,
  parameter int unsigned BLK_CYC  = classd_pkg::BLK_CYC
) (
  // control side
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    en_i,
  input  logic signed [REF_W-1:0] ref_i,
  output logic                    ref_req_o,
  output logic signed [OUT_W-1:0] ns_q_o,
  output logic                    ns_sat_o,
  output logic                    pwm_o,
  output logic [1:0]              g_o,
  output logic                    blk_o,
  output logic                    gate_chg_o,
  // isolated side, one bit per driver
  input  logic [1:0]              clk_iso_i,
  input  logic [1:0]              ce_i,
  input  logic [1:0]              g_iso_i,
  output logic [1:0]              g_ff_o
);

  logic [OUT_W-1:0] cmp;

  ncs_noise_shaper #(
    .REF_W(REF_W), .OUT_W(OUT_W)
  ) u_ns (
    .clk, .rst_n, .en_i(ref_req_o), .x_i(ref_i), .q_o(ns_q_o), .sat_o(ns_sat_o)
  );

  // Signed shaper output -2^(n-1)..2^(n-1)-1 to compare value 0..2^n-1.
  assign cmp = {~ns_q_o[OUT_W-1], ns_q_o[OUT_W-2:0]};

  pwm_modulator #(
    .RES_W(OUT_W)
  ) u_pwm (
    .clk, .rst_n, .cmp_i(cmp), .pwm_o, .period_o(ref_req_o), .cnt_o(), .up_o()
  );

  gate_sequencer #(
    .DEAD_CYC(DEAD_CYC), .BLK_DLY(BLK_DLY), .BLK_CYC(BLK_CYC)
  ) u_seq (
    .clk, .rst_n, .en_i, .pwm_i(pwm_o),
    .g_hi_o(g_o[1]), .g_lo_o(g_o[0]), .blk_o, .chg_o(gate_chg_o)
  );

  for (genvar d = 0; d < 2; d++) begin : g_drv
    resync_ff u_ff (
      .clk_iso_i(clk_iso_i[d]), .ce_i(ce_i[d]), .g_iso_i(g_iso_i[d]), .g_ff_o(g_ff_o[d])
    );
  end

endmodule
