// resync_ff -- isolated-side re-synchronisation flip-flop of one gate driver.
//
// The gate control signal reaches the isolated side through a digital signal isolator
// that adds most of the timing jitter of the gate path. This D flip-flop samples the
// isolator output g_iso_i on the rising edge of the isolated low-jitter clock
// clk_iso_i, so the edges of g_ff_o inherit the jitter of that clock instead of the
// isolator's. While ce_i is low (blanking during a bridge output transient) the
// flip-flop keeps its state whatever g_iso_i does. This is the document's circuit: a
// single D flip-flop whose clock enable is an AND gate in front of its clock input;
// here the enable is written as a synchronous clock enable, which behaves the same
// when ce_i changes while clk_iso_i is low.
//
// Interface and timing: g_ff_o changes only on rising clk_iso_i edges with ce_i
// high. There is no reset, as on the discrete part; the output is defined after the
// first enabled clock edge. g_iso_i must meet setup and hold to clk_iso_i, which the
// control side ensures by shifting the phase of its own clock.
`timescale 1ns / 1ps
module resync_ff (
  input  logic clk_iso_i,
  input  logic ce_i,
  input  logic g_iso_i,
  output logic g_ff_o
);

  always_ff @(posedge clk_iso_i) begin
    if (ce_i) g_ff_o <= g_iso_i;
  end

endmodule
