// tb_signal_isolator -- behavioural model of one channel of a digital signal isolator,
// for simulation only.
//
// Every input edge reaches the output after T_PD plus a random jitter uniformly
// distributed in +/-JIT (ns), independently per edge, which is what makes the
// re-synchronisation flip-flop necessary. While transient_i is high (a fast output
// voltage transition of the bridge leg across the isolation barrier) the output
// toggles every 0.7 ns, modelling the erroneous output an isolator may give when its
// common-mode transient rating is exceeded; it returns to the correct level afterwards.
`timescale 1ns / 1ps
module tb_signal_isolator #(
  parameter real T_PD = 8.0,
  parameter real JIT  = 0.6
) (
  input  logic in_i,
  input  logic transient_i,
  output logic out_o
);
  logic clean, glitch;

  initial begin clean = 1'b0; glitch = 1'b0; end

  always @(in_i) begin
    real d;
    d = T_PD + JIT * (2.0 * real'($urandom % 1001) / 1000.0 - 1.0);
    clean <= #(d) in_i;
  end

  always @(posedge transient_i) begin
    while (transient_i) begin
      #0.7 glitch = ~glitch;
    end
    glitch = 1'b0;
  end

  assign out_o = clean ^ glitch;
endmodule
