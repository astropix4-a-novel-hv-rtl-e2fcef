// Self-checking testbench for column_drain_readout on a 5 x 4 matrix. The
// testbench plays the hit buffers: it loads hits with unique contents, keeps
// a buffer ready until the readout clears it, and consumes the word stream
// with random back-pressure. It checks that every hit comes out exactly once
// with its own address and data, that the EoC takes the lowest ready row of
// a column first, that with all columns busy consecutive words come from
// different columns (round robin), that a stalled word does not change, and
// that a full matrix drains at one word per clock cycle when not stalled.
`timescale 1ns/1ps
module tb_column_drain_readout;
  import astropix4_pkg::*;

  localparam int R = 5, C = 4;

  logic clk = 1'b0, rst_n = 1'b1;
  initial #0.001 rst_n = 1'b0;    // a real falling edge, so asynchronous resets act on random power-up state
  logic       pend      [C][R];
  logic       buf_ready [C][R];
  logic       buf_clear [C][R];
  edge_time_t buf_lead  [C][R];
  edge_time_t buf_trail [C][R];
  logic       snap      [C][R];
  logic       snap_old  [C][R];
  logic       word_valid, word_ready;
  hit_word_t  word;
  int checks = 0, failures = 0;
  int got [C][R];
  int words = 0;
  int stall_pct = 0;

  column_drain_readout #(.ROWS(R), .COLS(C)) dut (
    .clk(clk), .rst_n(rst_n), .buf_ready(buf_ready), .buf_lead(buf_lead),
    .buf_trail(buf_trail), .buf_clear(buf_clear), .word_valid(word_valid),
    .word_ready(word_ready), .word(word));

  always #25 clk = ~clk;

  always_comb
    for (int c = 0; c < C; c++)
      for (int r = 0; r < R; r++)
        buf_ready[c][r] = pend[c][r] & ~buf_clear[c][r];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin : watchdog
    #1ms; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic edge_time_t mk(input int c, input int r, input int seq, input bit tr);
    edge_time_t e;
    e.ts  = TS_BITS'({seq[7:0], 2'(tr), 4'(c), 4'(r)});
    e.tdc = TDC_CELLS'(seq * 977 + c * 31 + r * 7 + int'(tr));
    return e;
  endfunction

  int seq [C][R];
  int last_col;
  logic [C-1:0] cols_seen;
  hit_word_t held;
  logic      held_v = 1'b0;

  // Consumer and checks at every rising edge (values before the edge).
  always @(posedge clk) begin
    if (rst_n) begin
      // Clear pulses come from a word taken at the previous edge.
      for (int c = 0; c < C; c++)
        for (int r = 0; r < R; r++)
          if (buf_clear[c][r]) begin
            pend[c][r] <= 1'b0;
            // The word taken at the previous edge is this buffer's.
            check(int'(word.col) == c && int'(word.row) == r, "cleared buffer matches word");
            check(word.lead == mk(c, r, seq[c][r], 1'b0) &&
                  word.trail == mk(c, r, seq[c][r], 1'b1), "word data");
            for (int q = 0; q < r; q++)
              check(!snap_old[c][q], "lowest ready row first");
          end
      if (held_v) check(word_valid && word == held, "stalled word unchanged");
      held_v <= word_valid && !word_ready;
      held   <= word;
      if (word_valid && word_ready) begin
        int c, r;
        c = int'(word.col); r = int'(word.row);
        check(c < C && r < R, "address in range");
        if (c < C && r < R) got[c][r]++;
        words++;
      end
      word_ready <= ($urandom_range(99) >= stall_pct);
    end
  end

  // Ready state before each edge, for the priority check one edge later.
  always @(negedge clk)
    for (int c = 0; c < C; c++)
      for (int r = 0; r < R; r++)
        begin
          snap_old[c][r] <= snap[c][r];
          snap[c][r]     <= buf_ready[c][r];
        end

  task automatic load(input int c, input int r);
    seq[c][r]++;
    buf_lead[c][r]  = mk(c, r, seq[c][r], 1'b0);
    buf_trail[c][r] = mk(c, r, seq[c][r], 1'b1);
    pend[c][r] = 1'b1;
  endtask

  initial begin
    int t0, expect_words;
    for (int c = 0; c < C; c++)
      for (int r = 0; r < R; r++) begin
        pend[c][r] = 1'b0; seq[c][r] = 0; got[c][r] = 0;
        buf_lead[c][r] = '0; buf_trail[c][r] = '0; snap[c][r] = 1'b0; snap_old[c][r] = 1'b0;
      end
    word_ready = 1'b1;
    #60 rst_n = 1'b1;

    // 1. Full matrix, no stall: drains at one word per cycle, columns rotate.
    @(negedge clk);
    for (int c = 0; c < C; c++) for (int r = 0; r < R; r++) load(c, r);
    t0 = words;
    cols_seen = '0;
    for (int k = 0; k < C; k++) begin
      @(posedge clk); #1;
      if (k > 0) begin
        check(!cols_seen[word.col], "round robin over busy columns");
        cols_seen[word.col] = 1'b1;
      end else cols_seen[word.col] = 1'b1;
    end
    repeat (R * C - C + 2) @(posedge clk);
    #1 check(words - t0 == R * C, "full matrix in R*C cycles");

    // 2. Random hits with random back-pressure.
    stall_pct = 40;
    expect_words = words;
    for (int n = 0; n < 300; n++) begin
      int c, r;
      @(negedge clk);
      c = $urandom_range(C - 1); r = $urandom_range(R - 1);
      if (!pend[c][r]) begin load(c, r); expect_words++; end
    end
    stall_pct = 0;
    repeat (60) @(posedge clk);
    #1;
    check(words == expect_words, "every hit read exactly once");
    for (int c = 0; c < C; c++)
      for (int r = 0; r < R; r++)
        check(got[c][r] == seq[c][r] && !pend[c][r], "per-pixel count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
