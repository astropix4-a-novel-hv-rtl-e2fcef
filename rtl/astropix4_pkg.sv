// Shared constants and types of the AstroPix4 timing and readout logic.
//
// The chip measures time of arrival (ToA) and time over threshold (ToT) of
// every pixel hit with an 18 bit coarse time stamp (17 bit rising-edge gray
// count plus 1 bit falling-edge count of the 20 MHz clock) and a 16 cell
// Flash-TDC that measures the time from a hit edge to the next rising clock
// edge. The sizes below are the ones the design is built for: a 35 x 35 pixel
// matrix, 17+1 time-stamp bits, 16 TDC cells, 50 ns clock period.
// The hit word layout is this design's own choice.
`timescale 1ns/1ps
package astropix4_pkg;

  localparam int unsigned N_ROWS      = 35;   // pixel matrix rows
  localparam int unsigned N_COLS      = 35;   // pixel matrix columns
  localparam int unsigned TS_POS_BITS = 17;   // rising-edge gray count
  localparam int unsigned TS_BITS     = TS_POS_BITS + 1; // + falling-edge bit
  localparam int unsigned TDC_CELLS   = 16;   // Flash-TDC delay elements
  localparam int unsigned ADDR_BITS   = 6;    // enough for 35 rows / columns

  // Time of one hit edge as stored in a hit buffer.
  typedef struct packed {
    logic [TS_BITS-1:0]   ts;   // {gray count[16:0], falling-edge bit}
    logic [TDC_CELLS-1:0] tdc;  // thermometer code, cell 0 = first delay element
  } edge_time_t;

  // One drained hit: 6+6+34+34 = 80 bits, shifted out MSB first.
  typedef struct packed {
    logic [ADDR_BITS-1:0] row;
    logic [ADDR_BITS-1:0] col;
    edge_time_t           lead;
    edge_time_t           trail;
  } hit_word_t;

  localparam int unsigned HIT_WORD_BITS = $bits(hit_word_t);

  // Delay-element model shared by the pixel delay lines and the DLL replica:
  // element delay in ps = corner minimum + (VCTRL_MAX - code) * step, so the
  // highest control code (control voltage at the supply) is the fastest.
  function automatic int cell_delay_ps(input int vctrl, input int vctrl_max,
                                       input int cell_min_ps, input int step_ps);
    return cell_min_ps + (vctrl_max - vctrl) * step_ps;
  endfunction

  // Gray <-> binary conversion of the rising-edge count.
  function automatic logic [TS_POS_BITS-1:0] bin2gray(input logic [TS_POS_BITS-1:0] b);
    return b ^ (b >> 1);
  endfunction

  function automatic logic [TS_POS_BITS-1:0] gray2bin(input logic [TS_POS_BITS-1:0] g);
    logic [TS_POS_BITS-1:0] b;
    b[TS_POS_BITS-1] = g[TS_POS_BITS-1];
    for (int i = TS_POS_BITS - 2; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction

  // Number of TDC cells the edge passed before the stopping clock edge.
  function automatic logic [4:0] tdc_count(input logic [TDC_CELLS-1:0] t);
    logic [4:0] n = '0;
    for (int i = 0; i < TDC_CELLS; i++) n += 5'(t[i]);
    return n;
  endfunction

  // 25 ns time stamp: twice the rising-edge count plus 1 when the edge came
  // after the falling clock edge (the falling-edge bit then equals the
  // count's binary LSB).
  function automatic logic [TS_BITS-1:0] ts_half_count(input logic [TS_BITS-1:0] ts);
    logic [TS_POS_BITS-1:0] c = gray2bin(ts[TS_BITS-1:1]);
    return {c, ts[0] == c[0]};
  endfunction

  // Edge time in 3.125 ns units (1/16 clock period): the edge lies
  // tdc_count cells before the rising edge that follows the stored count.
  function automatic logic [TS_POS_BITS+4:0] edge_fine_time(input edge_time_t e);
    logic [TS_POS_BITS+4:0] next_edge;
    next_edge = {1'b0, gray2bin(e.ts[TS_BITS-1:1]) + 1'b1, 4'b0000};
    return next_edge - (TS_POS_BITS+5)'(tdc_count(e.tdc));
  endfunction

endpackage
