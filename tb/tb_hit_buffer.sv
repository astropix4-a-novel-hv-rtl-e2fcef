// Self-checking testbench for hit_buffer, together with a Flash-TDC delay
// line (tdc_delay_line) and the time-stamp counter (ts_gray_counter) as on
// the chip. Hits are placed at chosen distances before a rising clock edge;
// the testbench keeps its own count of clock edges and computes the expected
// coarse count and the number of TDC elements passed (floor of the distance
// to the stopping edge over the element delay) for both edges. It also
// checks that the buffer becomes ready one clock edge after the trailing
// edge, that a second hit before the readout clear changes nothing, and that
// clear frees the buffer.
`timescale 1ns/1ps
module tb_hit_buffer;
  import astropix4_pkg::*;

  localparam real D_NS = real'(1500 + (1023 - 617) * 4) / 1000.0;  // element delay

  logic clk = 1'b0, rst_n = 1'b1, hit = 1'b0, clear = 1'b0;
  initial #0.001 rst_n = 1'b0;    // a real falling edge, so asynchronous resets act on random power-up state
  logic [TS_BITS-1:0]   ts;
  logic [TDC_CELLS-1:0] taps;
  logic       ready;
  edge_time_t lead, trail;
  int checks = 0, failures = 0;
  int unsigned edges = 0;        // rising clock edges since reset release

  ts_gray_counter u_ts (.clk(clk), .rst_n(rst_n), .ts(ts));
  tdc_delay_line  u_tdc (.start(hit), .vctrl(10'd617), .cell_min_ps(16'd1500), .taps(taps));
  hit_buffer dut (.hit(hit), .clk(clk), .rst_n(rst_n), .ts(ts), .taps(taps),
                  .clear(clear), .ready(ready), .lead(lead), .trail(trail));

  always #25 clk = ~clk;
  always @(posedge clk) if (rst_n) edges++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin : watchdog
    #2ms; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Place an edge (j + 0.5) element delays before the next rising clock edge
  // that is at least 'wait_edges' edges away; return the coarse count then.
  task automatic edge_at(input logic v, input int j, input int wait_edges,
                         output int unsigned count);
    repeat (wait_edges) @(posedge clk);
    #(50.0 - (real'(j) + 0.5) * D_NS);
    count = edges;
    hit = v;
  endtask

  task automatic pulse_clear();
    @(negedge clk) clear = 1'b1;
    @(negedge clk) clear = 1'b0;
  endtask

  initial begin
    int unsigned c_lead, c_trail;
    int j_lead, j_trail;
    #60 rst_n = 1'b1;
    repeat (3) @(posedge clk);
    for (int n = 0; n < 40; n++) begin
      edge_time_t lead_s, trail_s;
      j_lead  = (n * 7) % 16;
      j_trail = (n * 5 + 3) % 16;
      edge_at(1'b1, j_lead, 1 + n % 4, c_lead);
      edge_at(1'b0, j_trail, 2 + n % 37, c_trail);
      check(!ready, "not ready before the stopping edge");
      @(posedge clk); #1;
      check(ready, "ready after the stopping edge");
      check(gray2bin(lead.ts[TS_BITS-1:1])  == TS_POS_BITS'(c_lead),  "leading coarse count");
      check(gray2bin(trail.ts[TS_BITS-1:1]) == TS_POS_BITS'(c_trail), "trailing coarse count");
      check(tdc_count(lead.tdc)  == 5'(j_lead),  "leading TDC code");
      check(tdc_count(trail.tdc) == 5'(j_trail), "trailing TDC code");
      check(lead.tdc == TDC_CELLS'((32'd1 << j_lead) - 1), "leading thermometer");
      check(ts_half_count(lead.ts) == {TS_POS_BITS'(c_lead), j_lead < 8}, "half-period bit");
      lead_s  = lead;
      trail_s = trail;
      if (n % 3 == 0) begin
        // A second hit before readout must not disturb the stored one.
        int unsigned dummy;
        edge_at(1'b1, 4, 2, dummy);
        edge_at(1'b0, 9, 3, dummy);
        repeat (2) @(posedge clk); #1;
        check(ready && lead == lead_s && trail == trail_s, "lock-out until readout");
      end
      pulse_clear();
      #1 check(!ready, "clear frees the buffer");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
