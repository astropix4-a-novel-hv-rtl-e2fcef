// Self-checking testbench for pll_model: a 2.5 MHz reference is applied; the
// testbench checks that the loop reports lock within 200 reference periods,
// that the output period is then 50 ns (20 MHz) within 0.2 %, that the
// feedback runs at the reference frequency and is phase aligned within 1 ns,
// and that lock is re-acquired after a reset.
`timescale 1ns/1ps
module tb_pll_model;
  logic ref_clk = 1'b0, rst_n = 1'b1;
  initial #0.001 rst_n = 1'b0;    // a real falling edge, so asynchronous resets act on random power-up state
  logic clk_out, clk_fb, locked;
  int checks = 0, failures = 0;

  pll_model dut (.clk_ref(ref_clk), .rst_n(rst_n), .clk_out(clk_out),
                 .clk_fb(clk_fb), .locked(locked));

  always #200 ref_clk = ~ref_clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin : watchdog
    #500us; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_lock();
    int n;
    realtime t0, t1, tr;
    n = 0;
    while (!locked && n < 200) begin @(posedge ref_clk); n++; end
    check(locked, "locked within 200 reference periods");
    repeat (20) @(posedge ref_clk);
    check(locked, "stays locked");
    // Output period over 80 cycles.
    @(posedge clk_out); t0 = $realtime;
    repeat (80) @(posedge clk_out);
    t1 = $realtime;
    check((t1 - t0) / 80.0 > 49.9 && (t1 - t0) / 80.0 < 50.1, "20 MHz output");
    // Feedback aligned with the reference.
    @(posedge ref_clk); tr = $realtime;
    @(posedge clk_fb);
    check(($realtime - tr) < 1.0 || ($realtime - tr) > 399.0, "feedback phase");
  endtask

  initial begin
    #1000 rst_n = 1'b1;
    run_lock();
    rst_n = 1'b0;
    #1000;
    check(!locked, "lock flag cleared by reset");
    rst_n = 1'b1;
    run_lock();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
