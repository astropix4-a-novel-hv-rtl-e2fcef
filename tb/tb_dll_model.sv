// Self-checking testbench for dll_model: the 20 MHz reference is released to
// the delay line one period before the phase detector, as the start-up
// controller does, after a forced start. For three process corners (fastest
// element 1.0, 1.5 and 2.5 ns) the testbench checks that the control code
// starts at its maximum (shortest delay), that the loop reports lock within
// 60 periods, and that 16 element delays then equal the 50 ns clock period
// within 0.2 of a 3.125 ns TDC step. The expected delay is computed here
// from the element delay law, independently of the model.
`timescale 1ns/1ps
module tb_dll_model;
  logic clk = 1'b0, force_v = 1'b1, en_vco = 1'b0, en_pfd = 1'b0;
  logic [15:0] cmin;
  logic [9:0]  vctrl;
  logic        locked;
  int checks = 0, failures = 0;

  dll_model dut (.clk2vco(clk & en_vco), .clk2pfd(clk & en_pfd),
                 .vctrl_force(force_v), .cell_min_ps(cmin), .vctrl(vctrl),
                 .locked(locked));

  always #25 clk = ~clk;

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
    int corners [3] = '{1000, 1500, 2500};
    foreach (corners[i]) begin
      real line_ns;
      int  n;
      cmin = 16'(corners[i]);
      force_v = 1'b1; en_vco = 1'b0; en_pfd = 1'b0;
      repeat (3) @(negedge clk);
      check(vctrl == 10'h3ff, "forced to shortest delay");
      force_v = 1'b0;
      @(negedge clk) en_vco = 1'b1;
      @(negedge clk) en_pfd = 1'b1;
      n = 0;
      while (!locked && n < 60) begin @(posedge clk); n++; end
      check(locked, "lock within 60 periods");
      repeat (10) @(posedge clk);
      #1;
      line_ns = 16.0 * real'(corners[i] + (1023 - int'(vctrl)) * 4) / 1000.0;
      check(line_ns > 50.0 - 0.625 && line_ns < 50.0 + 0.625, "line delay = 50 ns");
      $display("corner %0d ps: code %0d, line %0.3f ns", corners[i], vctrl, line_ns);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
