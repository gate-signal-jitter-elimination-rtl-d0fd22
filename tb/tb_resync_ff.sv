// tb_resync_ff -- self-checking testbench of the isolated-side re-synchronisation
// flip-flop.
//
// The data input changes at random instants between clock edges (a jittery isolator
// output), the clock enable is held low for random stretches. After every rising
// clock edge the output must equal the input sampled at that edge when the enable
// was high, and be unchanged when it was low; the output may change only at a clock
// edge, whatever the input does in between.
`timescale 1ns/1ps
module tb_resync_ff;
  logic clk_iso, ce, d, q;
  int checks, failures, n_hold, n_take;
  realtime last_edge;

  resync_ff dut (.clk_iso_i(clk_iso), .ce_i(ce), .g_iso_i(d), .g_ff_o(q));

  initial begin clk_iso = 1'b0; ce = 1'b1; d = 1'b0; checks = 0; failures = 0; n_hold = 0; n_take = 0; last_edge = 0; end
  always #5 clk_iso = ~clk_iso;   // 100 MHz
  always @(posedge clk_iso) last_edge = $realtime;

  initial begin : watchdog
    #200us;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // output edges only at clock edges
  always @(q) if ($realtime > 20) begin
    checks++;
    if ($realtime != last_edge) begin
      failures++;
      $display("output moved at %0t, last clock edge %0t", $realtime, last_edge);
    end
  end

  initial begin
    logic exp_q, d_at, ce_at;
    @(posedge clk_iso);
    #1 exp_q = d;
    for (int k = 0; k < 4000; k++) begin
      // input changes somewhere in the low-clock half, 1.0..3.9 ns after the falling edge
      @(negedge clk_iso);
      #(1.0 + 0.1 * real'($urandom % 30));
      d = $urandom % 2;
      if (k % 50 == 0) ce = ~ce;
      // a glitch on the input after the capture window must be ignored
      @(posedge clk_iso);
      d_at = d; ce_at = ce;
      #0.5 d = ~d;
      #0.5 d = ~d;
      if (ce_at) begin exp_q = d_at; n_take++; end else n_hold++;
      checks++;
      if (q !== exp_q) begin
        failures++;
        if (failures < 10) $display("k=%0d ce=%b q=%b expected %b", k, ce_at, q, exp_q);
      end
    end
    checks++;
    if (n_hold == 0 || n_take == 0) failures++;
    $display("captured %0d, held %0d", n_take, n_hold);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
