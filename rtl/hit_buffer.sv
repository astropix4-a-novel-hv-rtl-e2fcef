// Per-pixel hit buffer of AstroPix4 (one per pixel, placed below the matrix).
//
// Each pixel's comparator output (hit) drives its own hit buffer. On the
// leading and on the trailing edge of a hit the buffer stores
//   * the 18 bit coarse time stamp broadcast by the gray counter, and
//   * the state of the 16 delay elements of its Flash-TDC, which were started
//     by the same edge and are frozen by the next rising edge of the 20 MHz
//     clock: a thermometer code of the time from the edge to that clock edge
//     in steps of 1/16 clock period (3.125 ns).
// The TDC storage is level sensitive, like the 3T-DRAM cells of the chip: it
// follows the delay-element outputs while its write enable is high and keeps
// the last value when the enable falls. The two time-stamp words are taken
// on the hit edges themselves.
//
// RAM enable logic, per edge: a "start" flag is set by the hit edge and a
// "stop" flag copies it on the next rising clock edge; write enable =
// start AND NOT stop. Once set, both flags stay set until the readout clears
// the buffer, so a second hit cannot restart the TDC or overwrite the time
// stamps before the stored hit was read out. The trailing edge is only
// recorded if the leading edge was. ready (in the clock domain) tells the
// end-of-column logic that a complete hit is stored.
//
// The TDC stores raw delay-element outputs: after a leading edge the passed
// elements read 1, after a trailing edge 0. The trailing word is inverted on
// its way out so that both words are thermometer codes with 1 = passed.
//
// Interface: hit, clk (20 MHz), rst_n (asynchronous, active low), ts (coarse
// time stamp), taps (delay-element outputs), clear (one clock cycle, from the
// readout, clears the flags asynchronously), ready, lead, trail.
// Timing: ready rises on the first rising clock edge after the trailing
// edge; lead/trail are stable from then until clear.
//
// Storing time stamp and TDC state on both edges, the stop at the next rising
// clock edge and the lock-out until readout follow the chip. Modelling the
// time-stamp cells as edge-triggered registers, the flag circuit and the
// inversion of the trailing code are this design's own. The latches below are
// intended: they are the TDC's dynamic memory cells.
`timescale 1ns/1ps
module hit_buffer
  import astropix4_pkg::*;
(
  input  logic                 hit,
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [TS_BITS-1:0]   ts,
  input  logic [TDC_CELLS-1:0] taps,
  input  logic                 clear,
  output logic                 ready,
  output edge_time_t           lead,
  output edge_time_t           trail
);

  logic flags_rst;       // asynchronous clear of the enable flags
  logic lead_start, lead_stop, trail_start, trail_stop;
  logic wr_lead, wr_trail;
  logic [TS_BITS-1:0]   ts_lead_q, ts_trail_q;
  logic [TDC_CELLS-1:0] tdc_lead_q, tdc_trail_q;

  assign flags_rst = clear | ~rst_n;

  // Leading edge: time stamp and start flag.
  always_ff @(posedge hit or posedge flags_rst) begin
    if (flags_rst) begin
      lead_start <= 1'b0;
    end else begin
      lead_start <= 1'b1;
    end
  end

  always_ff @(posedge hit) begin
    if (!lead_start) ts_lead_q <= ts;
  end

  // Trailing edge: only after a recorded leading edge.
  always_ff @(negedge hit or posedge flags_rst) begin
    if (flags_rst) begin
      trail_start <= 1'b0;
    end else if (lead_start) begin
      trail_start <= 1'b1;
    end
  end

  always_ff @(negedge hit) begin
    if (lead_start && !trail_start) ts_trail_q <= ts;
  end

  // Stop flags: the next rising clock edge freezes the TDC.
  always_ff @(posedge clk or posedge flags_rst) begin
    if (flags_rst) begin
      lead_stop  <= 1'b0;
      trail_stop <= 1'b0;
    end else begin
      lead_stop  <= lead_start;
      trail_stop <= trail_start;
    end
  end

  assign wr_lead  = lead_start  & ~lead_stop;
  assign wr_trail = trail_start & ~trail_stop;

  // TDC memory cells (level sensitive).
  always_latch begin
    if (wr_lead) tdc_lead_q <= taps;
  end

  always_latch begin
    if (wr_trail) tdc_trail_q <= taps;
  end

  assign ready = trail_stop;
  assign lead  = '{ts: ts_lead_q,  tdc: tdc_lead_q};
  assign trail = '{ts: ts_trail_q, tdc: ~tdc_trail_q};

endmodule
