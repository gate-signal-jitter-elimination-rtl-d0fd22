// pwm_modulator -- counter-based, double-sided (triangular carrier) pulse-width
// modulator.
//
// A RES_W-bit counter counts 0, 1, ..., TOP-1 and back down TOP-1, ..., 0 with
// TOP = 2^RES_W, so one switching period is 2*TOP clock cycles (1024 cycles, i.e.
// 97.66 kHz at 100 MHz for RES_W = 9). The output is high while the counter is below
// the compare value CMP, which gives exactly 2*CMP high cycles per period (duty
// CMP/TOP) centred on the period boundary. CMP is taken from cmp_i once per period,
// so the duty cycle is both amplitude- and time-quantised. The counter, the
// up/down count and the "high while below CMP" rule follow the document; holding each
// end value for two cycles (which makes the duty exactly linear in CMP) and the
// sampling point of CMP are this design's choices.
//
// Interface: period_o is high in the last cycle of every period; cmp_i is loaded on
// that clock edge and governs the period that starts right after it. pwm_o is
// combinational from the counter and compare registers. cnt_o and up_o expose the
// carrier. Reset starts a period with CMP = TOP/2 (50 % duty, zero output voltage).
`timescale 1ns / 1ps
module pwm_modulator #(
  parameter int unsigned RES_W = classd_pkg::NS_OUT_W
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [RES_W-1:0] cmp_i,
  output logic             pwm_o,
  output logic             period_o,
  output logic [RES_W-1:0] cnt_o,
  output logic             up_o
);

  localparam logic [RES_W-1:0] CNT_MAX = '1;  // TOP - 1

  logic [RES_W-1:0] cnt_q, cmp_q;
  logic             up_q;

  assign period_o = !up_q && (cnt_q == '0);
  assign pwm_o    = cnt_q < cmp_q;
  assign cnt_o    = cnt_q;
  assign up_o     = up_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt_q <= '0;
      up_q  <= 1'b1;
      cmp_q <= {1'b1, {(RES_W-1){1'b0}}};
    end else begin
      if (up_q) begin
        if (cnt_q == CNT_MAX) up_q <= 1'b0;
        else                  cnt_q <= cnt_q + 1'b1;
      end else begin
        if (cnt_q == '0) begin
          up_q  <= 1'b1;
          cmp_q <= cmp_i;
        end else begin
          cnt_q <= cnt_q - 1'b1;
        end
      end
    end
  end

endmodule
