// Self-checking testbench for dll_startup_ctrl: checks the forced control
// voltage during and just after reset, that the delay-line clock starts with
// the 2nd reference edge after reset and the phase-detector clock exactly one
// period later, and that both then follow the reference. Reset is applied
// twice to check that it restarts the sequence.
`timescale 1ns/1ps
module tb_dll_startup_ctrl;
  logic clk = 1'b0, rst_n = 1'b1;
  initial #0.001 rst_n = 1'b0;    // a real falling edge, so asynchronous resets act on random power-up state
  logic force_v, c2vco, c2pfd;
  int checks = 0, failures = 0;

  dll_startup_ctrl dut (.clk_ref(clk), .rst_n(rst_n), .vctrl_force(force_v),
                        .clk2vco(c2vco), .clk2pfd(c2pfd));

  always #25 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin : watchdog
    #100us; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int run = 0; run < 2; run++) begin
      rst_n = 1'b0;
      repeat (3) @(posedge clk);
      #5;
      check(force_v && !c2vco && !c2pfd, "reset state");
      #10 rst_n = 1'b1;                   // between edges
      #1 check(force_v, "forced until first edge");
      // Edge 1
      @(posedge clk); #1;
      check(!force_v, "released at edge 1");
      check(!c2vco && !c2pfd, "no clocks at edge 1");
      // Edge 2
      @(posedge clk); #1;
      check(c2vco && !c2pfd, "delay line clock from edge 2");
      @(negedge clk); #1;
      check(!c2vco && !c2pfd, "both low in low phase");
      // Edge 3 and later
      for (int i = 0; i < 20; i++) begin
        @(posedge clk); #1;
        check(c2vco && c2pfd && !force_v, "both clocks running");
        @(negedge clk); #1;
        check(!c2vco && !c2pfd, "low phase");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
