// Self-checking testbench for ts_gray_counter: runs the 20 MHz clock for
// 3000 periods and checks, against a count kept by the testbench, that the
// gray word equals the gray code of the number of rising edges, that only one
// bit changes per rising edge, and that the 25 ns time stamp (count plus the
// falling-edge bit) reads 2n in the first and 2n+1 in the second half of
// period n.
`timescale 1ns/1ps
module tb_ts_gray_counter;
  import astropix4_pkg::*;

  logic clk = 1'b0, rst_n = 1'b1;
  initial #0.001 rst_n = 1'b0;    // a real falling edge, so asynchronous resets act on random power-up state
  logic [TS_BITS-1:0] ts;
  int checks = 0, failures = 0;

  ts_gray_counter dut (.clk(clk), .rst_n(rst_n), .ts(ts));

  always #25 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin : watchdog
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [TS_POS_BITS-1:0] prev, n;
    #60 rst_n = 1'b1;            // released between edges (rising edge at 75)
    n = '0;
    prev = ts[TS_BITS-1:1];
    for (int i = 0; i < 3000; i++) begin
      @(posedge clk); #1;
      n = n + 1'b1;
      check(ts[TS_BITS-1:1] == (n ^ (n >> 1)), "gray count");
      check($countones(ts[TS_BITS-1:1] ^ prev) == 1, "single bit change");
      prev = ts[TS_BITS-1:1];
      #10;    // first half of the period
      check(ts_half_count(ts) == {n, 1'b0}, "first half stamp");
      #25;    // second half
      check(ts_half_count(ts) == {n, 1'b1}, "second half stamp");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
