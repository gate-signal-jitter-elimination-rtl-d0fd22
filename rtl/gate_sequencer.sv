// gate_sequencer -- turns the PWM bit into the two complementary gate control signals
// G of a half-bridge leg, with dead time, and generates the blanking signal BLK that
// is sent to both isolated gate drivers alongside G.
//
// Every gate change (one gate switching on or off) restarts a cycle counter. A new
// change is only allowed once the current gate state has been held DEAD_CYC cycles,
// which sets the dead time between one transistor turning off and the other turning
// on, and also the minimum on and off times. BLK_DLY cycles after each change BLK is
// pulled low for BLK_CYC cycles; on the isolated side BLK, filtered, becomes the
// clock enable CE of the re-synchronisation flip-flop, which then ignores its input
// while the bridge output slews. BLK is the same for both drivers, since the output
// transient may follow either transistor's switching. Delaying BLK by one cycle lets
// the flip-flop capture the new G before CE falls; it must fall before the driver IC
// switches (5..30 ns). The document gives this ordering and a dead time of about
// 50 ns at 100 MHz; the cycle counts, the three-state machine and the rule that a
// PWM pulse shorter than the dead time is absorbed are this design's choices.
//
// Interface: pwm_i = 1 requests the high-side transistor, 0 the low-side one. en_i = 0
// turns both off (through a dead-time state). g_hi_o / g_lo_o are register bits.
// blk_o is high in normal operation and low while blanking. chg_o pulses in the first
// cycle of every new gate state. Timing: a pwm_i edge moves the gates one cycle later
// if the lock-out time has passed, otherwise as soon as it has.
`timescale 1ns / 1ps
module gate_sequencer #(
  parameter int unsigned DEAD_CYC = classd_pkg::DEAD_CYC,
  parameter int unsigned BLK_DLY  = classd_pkg::BLK_DLY,
  parameter int unsigned BLK_CYC  = classd_pkg::BLK_CYC
) (
  input  logic clk,
  input  logic rst_n,
  input  logic en_i,
  input  logic pwm_i,
  output logic g_hi_o,
  output logic g_lo_o,
  output logic blk_o,
  output logic chg_o
);

  localparam int unsigned TMAX = (DEAD_CYC > BLK_DLY + BLK_CYC) ? DEAD_CYC : BLK_DLY + BLK_CYC;
  localparam int unsigned TW   = $clog2(TMAX + 1);

  classd_pkg::gate_state_e st_q, st_n;
  logic [TW-1:0]  t_q, t_n;
  logic           ready, blk_n, chg;

  always_comb begin
    ready = 32'(t_q) >= DEAD_CYC - 1;
    st_n  = st_q;
    unique case (st_q)
      classd_pkg::GS_LO:   if (ready && (pwm_i || !en_i)) st_n = classd_pkg::GS_DEAD;
      classd_pkg::GS_HI:   if (ready && (!pwm_i || !en_i)) st_n = classd_pkg::GS_DEAD;
      default: if (ready && en_i) st_n = pwm_i ? classd_pkg::GS_HI : classd_pkg::GS_LO;
    endcase
    chg   = st_n != st_q;
    if (chg)                    t_n = '0;
    else if (32'(t_q) < TMAX)   t_n = t_q + 1'b1;
    else                        t_n = t_q;
    blk_n = !(32'(t_n) >= BLK_DLY && 32'(t_n) < BLK_DLY + BLK_CYC);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q  <= classd_pkg::GS_DEAD;
      t_q   <= TW'(TMAX);
      blk_o <= 1'b1;
      chg_o <= 1'b0;
    end else begin
      st_q  <= st_n;
      t_q   <= t_n;
      blk_o <= blk_n;
      chg_o <= chg;
    end
  end

  assign g_hi_o = (st_q == classd_pkg::GS_HI);
  assign g_lo_o = (st_q == classd_pkg::GS_LO);

  // Both transistors on at once would short the DC link.
  a_no_shoot_through: assert property (@(posedge clk) disable iff (!rst_n) !(g_hi_o && g_lo_o));
  // The blanking window must end before the next change is allowed.
  initial assert (DEAD_CYC > BLK_DLY + BLK_CYC && BLK_DLY >= 1 && BLK_CYC >= 1)
    else $error("gate_sequencer: need DEAD_CYC > BLK_DLY + BLK_CYC, BLK_DLY >= 1, BLK_CYC >= 1");

endmodule
