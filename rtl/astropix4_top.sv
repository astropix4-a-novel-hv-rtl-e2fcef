// AstroPix4 timing and readout core.
//
// AstroPix4 is a monolithic HV-CMOS pixel sensor for a space-borne Compton
// gamma-ray tracker, where the power budget is 1.5 mW/cm^2. Instead of a
// fast 200 MHz clock for the time measurement it uses only slow clocks plus
// a small asynchronous TDC in every pixel's hit buffer:
//   * pll_model multiplies the 2.5 MHz reference to the 20 MHz clock;
//   * ts_gray_counter counts that clock (17 bit gray on rising edges plus a
//     falling-edge bit, 25 ns) and broadcasts the count to all hit buffers;
//   * every pixel has a hit_buffer with its own 16-element tdc_delay_line:
//     on both edges of the pixel's comparator output it stores the count and
//     the delay-line state frozen by the next rising clock edge, i.e. the
//     edge time to 50 ns / 16 = 3.125 ns;
//   * a global DLL (dll_startup_ctrl + dll_model, with a replica delay line)
//     sets the control code of all delay lines so that 16 elements delay by
//     exactly one clock period in any process corner;
//   * column_drain_readout drains complete hits pixel by pixel through
//     end-of-column logic, and spi_readout sends the hit words on two MISO
//     lines with a data-ready line.
//
// Interface: clk_ref (2.5 MHz), rst_n (asynchronous, active low), hit
// ([column][row] comparator outputs of the analog pixel front ends, which
// are not part of this RTL), cell_min_ps (process corner of the delay
// elements, an input of the behavioural delay-line models that stands for
// the silicon), sck / cs_n / miso / interrupt_n (serial readout), and the
// status outputs clk20 (generated clock), pll_locked and dll_locked.
//
// Block structure, clocks, counter widths, TDC size and the DLL start-up
// follow the chip; the readout word, the serial protocol details and the
// lock flags are this design's own.
`timescale 1ns/1ps
module astropix4_top
  import astropix4_pkg::*;
#(
  parameter int unsigned ROWS       = N_ROWS,
  parameter int unsigned COLS       = N_COLS,
  parameter int unsigned VCTRL_BITS = 10
) (
  input  logic        clk_ref,
  input  logic        rst_n,
  input  logic        hit [COLS][ROWS],
  input  logic [15:0] cell_min_ps,
  input  logic        sck,
  input  logic        cs_n,
  output logic [1:0]  miso,
  output logic        interrupt_n,
  output logic        clk20,
  output logic        pll_locked,
  output logic        dll_locked
);

  logic [TS_BITS-1:0]    ts;
  logic                  vctrl_force, clk2vco, clk2pfd;
  logic [VCTRL_BITS-1:0] vctrl;

  logic       buf_ready [COLS][ROWS];
  logic       buf_clear [COLS][ROWS];
  edge_time_t buf_lead  [COLS][ROWS];
  edge_time_t buf_trail [COLS][ROWS];

  logic      word_valid, word_ready;
  hit_word_t word;

  // Clock generation and coarse time stamp.
  pll_model u_pll (
    .clk_ref(clk_ref), .rst_n(rst_n), .clk_out(clk20), .clk_fb(),
    .locked(pll_locked)
  );

  ts_gray_counter u_ts (
    .clk(clk20), .rst_n(rst_n), .ts(ts)
  );

  // Global DLL.
  dll_startup_ctrl u_dll_start (
    .clk_ref(clk20), .rst_n(rst_n), .vctrl_force(vctrl_force),
    .clk2vco(clk2vco), .clk2pfd(clk2pfd)
  );

  dll_model #(.CELLS(TDC_CELLS), .VCTRL_BITS(VCTRL_BITS)) u_dll (
    .clk2vco(clk2vco), .clk2pfd(clk2pfd), .vctrl_force(vctrl_force),
    .cell_min_ps(cell_min_ps), .vctrl(vctrl), .locked(dll_locked)
  );

  // Pixel hit buffers with their Flash-TDCs.
  for (genvar c = 0; c < COLS; c++) begin : g_col
    for (genvar r = 0; r < ROWS; r++) begin : g_row
      logic [TDC_CELLS-1:0] taps;

      tdc_delay_line #(.CELLS(TDC_CELLS), .VCTRL_BITS(VCTRL_BITS)) u_tdc (
        .start(hit[c][r]), .vctrl(vctrl), .cell_min_ps(cell_min_ps), .taps(taps)
      );

      hit_buffer u_buf (
        .hit(hit[c][r]), .clk(clk20), .rst_n(rst_n), .ts(ts), .taps(taps),
        .clear(buf_clear[c][r]), .ready(buf_ready[c][r]),
        .lead(buf_lead[c][r]), .trail(buf_trail[c][r])
      );
    end
  end

  // Readout.
  column_drain_readout #(.ROWS(ROWS), .COLS(COLS)) u_readout (
    .clk(clk20), .rst_n(rst_n),
    .buf_ready(buf_ready), .buf_lead(buf_lead), .buf_trail(buf_trail),
    .buf_clear(buf_clear),
    .word_valid(word_valid), .word_ready(word_ready), .word(word)
  );

  spi_readout u_spi (
    .clk(clk20), .rst_n(rst_n),
    .in_valid(word_valid), .in_ready(word_ready), .in_word(word),
    .sck(sck), .cs_n(cs_n), .miso(miso), .interrupt_n(interrupt_n)
  );

endmodule
