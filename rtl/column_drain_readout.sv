// Column-drain readout of the AstroPix4 hit buffers.
//
// Every pixel has its own hit buffer below the matrix, so hits in the same
// row or column no longer mask each other. This block drains the buffers
// that hold a complete hit (leading and trailing edge recorded):
//   * end of column (EoC): in every column a priority encoder picks the
//     lowest-numbered row whose buffer is ready;
//   * a round-robin arbiter picks one of the columns that have a candidate,
//     starting after the column served last, so no column can starve;
//   * the chosen buffer's address and both edge times are registered as one
//     hit word, and that buffer receives a one-cycle clear, which frees it
//     for the next hit.
// One hit word can be taken per clock cycle. The output is a valid/ready
// stream: a word stays unchanged while valid is high and ready is low.
//
// Interface: clk (20 MHz), rst_n (asynchronous, active low), buf_ready /
// buf_lead / buf_trail (from the hit buffers, [column][row]), buf_clear (to
// the hit buffers), word_valid / word_ready / word (hit word stream).
// Timing: a buffer that becomes ready before rising edge k is, with no
// competition and a free output, presented as a word after edge k and
// cleared during cycle k+1.
//
// Per-pixel readout through end-of-column logic follows the chip. The
// priority order, the column arbitration, the word layout and the stream
// handshake are this design's own.
`timescale 1ns/1ps
module column_drain_readout
  import astropix4_pkg::*;
#(
  parameter int unsigned ROWS = N_ROWS,
  parameter int unsigned COLS = N_COLS
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       buf_ready [COLS][ROWS],
  input  edge_time_t buf_lead  [COLS][ROWS],
  input  edge_time_t buf_trail [COLS][ROWS],
  output logic       buf_clear [COLS][ROWS],
  output logic       word_valid,
  input  logic       word_ready,
  output hit_word_t  word
);

  localparam int unsigned CW = (COLS > 1) ? $clog2(COLS) : 1;

  logic [ADDR_BITS-1:0] eoc_row   [COLS];   // EoC candidate per column
  logic [COLS-1:0]      eoc_valid;
  logic [CW-1:0]        last_col_q;
  logic [CW-1:0]        sel_col;
  logic                 sel_valid;
  logic                 take;
  logic                 clear_q [COLS][ROWS];

  // End-of-column priority encoders; a buffer being cleared is skipped.
  always_comb begin
    for (int c = 0; c < COLS; c++) begin
      eoc_valid[c] = 1'b0;
      eoc_row[c]   = '0;
      for (int r = ROWS - 1; r >= 0; r--) begin
        if (buf_ready[c][r] && !clear_q[c][r]) begin
          eoc_valid[c] = 1'b1;
          eoc_row[c]   = ADDR_BITS'(r);
        end
      end
    end
  end

  // Round-robin column arbiter: first candidate after the last served column.
  always_comb begin
    int c;
    sel_valid = 1'b0;
    sel_col   = '0;
    for (int k = COLS; k >= 1; k--) begin
      c = (int'(last_col_q) + k) % COLS;
      if (eoc_valid[c]) begin
        sel_valid = 1'b1;
        sel_col   = CW'(c);
      end
    end
  end

  assign take = sel_valid && (!word_valid || word_ready);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      word_valid <= 1'b0;
      word       <= '0;
      last_col_q <= CW'(COLS - 1);
    end else begin
      if (take) begin
        word_valid <= 1'b1;
        word.row   <= eoc_row[sel_col];
        word.col   <= ADDR_BITS'(sel_col);
        word.lead  <= buf_lead[sel_col][eoc_row[sel_col]];
        word.trail <= buf_trail[sel_col][eoc_row[sel_col]];
        last_col_q <= sel_col;
      end else if (word_ready) begin
        word_valid <= 1'b0;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int c = 0; c < COLS; c++)
        for (int r = 0; r < ROWS; r++)
          clear_q[c][r] <= 1'b0;
    end else begin
      for (int c = 0; c < COLS; c++)
        for (int r = 0; r < ROWS; r++)
          clear_q[c][r] <= take && (sel_col == CW'(c)) && (eoc_row[sel_col] == ADDR_BITS'(r));
    end
  end

  always_comb begin
    for (int c = 0; c < COLS; c++)
      for (int r = 0; r < ROWS; r++)
        buf_clear[c][r] = clear_q[c][r];
  end

  // A presented word must not change before it is accepted.
  property p_word_stable;
    @(posedge clk) disable iff (!rst_n)
      (word_valid && !word_ready) |=> (word_valid && $stable(word));
  endproperty
  a_word_stable: assert property (p_word_stable);

endmodule
