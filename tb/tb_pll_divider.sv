// Self-checking testbench for pll_divider: a 20 MHz oscillator clock is
// divided by 8; the testbench checks the period (400 ns), the 50 % duty
// cycle and that every output edge coincides with a rising oscillator edge
// (re-synchronisation).
`timescale 1ns/1ps
module tb_pll_divider;
  logic vco = 1'b0, rst_n = 1'b1, div;
  initial #0.001 rst_n = 1'b0;    // a real falling edge, so asynchronous resets act on random power-up state
  int checks = 0, failures = 0;
  realtime t_rise, t_fall, t_last_vco;

  pll_divider dut (.vco_clk(vco), .rst_n(rst_n), .div_clk(div));

  always #25 vco = ~vco;
  always @(posedge vco) t_last_vco = $realtime;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin : watchdog
    #200us; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #110 rst_n = 1'b1;
    @(posedge div); t_rise = $realtime;
    for (int i = 0; i < 100; i++) begin
      @(negedge div); t_fall = $realtime;
      check(t_fall - t_rise == 200.0, "high time 4 periods");
      check(t_fall == t_last_vco, "fall on oscillator edge");
      @(posedge div);
      check($realtime - t_rise == 400.0, "period 8 oscillator periods");
      check($realtime == t_last_vco, "rise on oscillator edge");
      t_rise = $realtime;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
