// Self-checking testbench for tdc_delay_line: with a fixed control code the
// element delay is known (computed here from the delay law); the testbench
// applies rising and falling edges and checks at many instants that exactly
// the elements the edge has passed show its new value, for two codes, and a
// pulse shorter than the line (both edges inside it at once).
`timescale 1ns/1ps
module tb_tdc_delay_line;
  logic        start = 1'b0;
  logic [9:0]  vctrl;
  logic [15:0] cmin = 16'd1500;
  logic [15:0] taps;
  int checks = 0, failures = 0;

  tdc_delay_line dut (.start(start), .vctrl(vctrl), .cell_min_ps(cmin), .taps(taps));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t: %b", what, $time, taps); end
  endtask

  function automatic logic [15:0] therm(input int n);
    return (n >= 16) ? 16'hffff : 16'((32'd1 << n) - 1);
  endfunction

  initial begin : watchdog
    #100us; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int codes [2] = '{617, 1023};
    foreach (codes[c]) begin
      real d;
      vctrl = 10'(codes[c]);
      d = real'(1500 + (1023 - codes[c]) * 4) / 1000.0;
      #200;
      start = 1'b1;
      for (int k = 0; k <= 17; k++) begin
        #(d * 0.5); check(taps == therm(k), "rising edge progress");
        #(d * 0.5);
      end
      #100;
      start = 1'b0;
      for (int k = 0; k <= 17; k++) begin
        #(d * 0.5); check(taps == ~therm(k), "falling edge progress");
        #(d * 0.5);
      end
      // Short pulse of 5 element delays.
      #100;
      start = 1'b1;
      #(d * 5.0);
      start = 1'b0;
      #(d * 8.5);
      check(taps == (therm(13) & ~therm(8)), "short pulse inside the line");
      #(d * 20.0);
      check(taps == 16'h0000, "short pulse left the line");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
