// tb_ce_filter -- behavioural model of the RC low-pass with bypass diode between the
// isolated BLK signal and the flip-flop clock enable CE, for simulation only.
//
// A falling BLK pulls CE low at once (the diode); a rising BLK lets CE rise only after
// BLK has stayed high for T_RC ns without interruption (the RC charge time to the
// logic threshold), so nanosecond-long high glitches from the isolator during a
// transient never reach CE.
`timescale 1ns / 1ps
module tb_ce_filter #(
  parameter real T_RC = 8.0
) (
  input  logic blk_i,
  output logic ce_o
);
  real hi_time;   // how long BLK has been high without interruption

  initial ce_o = 1'b1;

  // BLK is sampled every 0.25 ns while CE is low; CE is released once BLK has been
  // high for T_RC.
  always begin
    @(negedge blk_i);
    ce_o = 1'b0;
    hi_time = 0.0;
    while (!ce_o) begin
      #0.25;
      if (blk_i) hi_time += 0.25;
      else       hi_time = 0.0;
      if (hi_time >= T_RC) ce_o = 1'b1;
    end
  end
endmodule
