// Dual-clock FIFO used to pass hit words from the 20 MHz readout domain to
// the serial-interface clock domain.
//
// Classic gray-pointer design: each side keeps a binary pointer one bit wider
// than the address and sends its gray-coded copy through a two-flip-flop
// synchroniser to the other side. Full is detected on the write side, empty
// on the read side, both conservatively. The read port is show-ahead: rd_data
// is the oldest word whenever rd_empty is low, and rd_pop removes it.
//
// Interface: wr_clk / rd_clk (rising edge), rst_n (asynchronous, active low,
// both sides), wr_en / wr_data / wr_full / wr_nonempty (write-domain view), rd_pop / rd_data / rd_empty.
// Timing: a written word becomes visible on the read side after two to three
// read clock edges; freed space reaches the write side likewise.
//
// The chip's documentation does not describe this buffer; it is part of this
// design's own serial readout path.
`timescale 1ns/1ps
module async_fifo #(
  parameter int unsigned WIDTH = 8,
  parameter int unsigned DEPTH_LOG2 = 4
) (
  input  logic             wr_clk,
  input  logic             rd_clk,
  input  logic             rst_n,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wr_data,
  output logic             wr_full,
  output logic             wr_nonempty,
  input  logic             rd_pop,
  output logic [WIDTH-1:0] rd_data,
  output logic             rd_empty
);

  localparam int unsigned DEPTH = 1 << DEPTH_LOG2;
  typedef logic [DEPTH_LOG2:0] ptr_t;

  logic [WIDTH-1:0] mem [DEPTH];
  ptr_t wr_bin, wr_gray, rd_bin, rd_gray;
  ptr_t rd_gray_s1, rd_gray_s2;   // read pointer in the write domain
  ptr_t wr_gray_s1, wr_gray_s2;   // write pointer in the read domain

  function automatic ptr_t to_gray(input ptr_t b);
    return b ^ (b >> 1);
  endfunction

  // Write side.
  always_ff @(posedge wr_clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_bin     <= '0;
      wr_gray    <= '0;
      rd_gray_s1 <= '0;
      rd_gray_s2 <= '0;
    end else begin
      rd_gray_s1 <= rd_gray;
      rd_gray_s2 <= rd_gray_s1;
      if (wr_en && !wr_full) begin
        wr_bin  <= wr_bin + 1'b1;
        wr_gray <= to_gray(wr_bin + 1'b1);
      end
    end
  end

  always_ff @(posedge wr_clk) begin
    if (wr_en && !wr_full) mem[wr_bin[DEPTH_LOG2-1:0]] <= wr_data;
  end

  assign wr_full = (wr_gray == {~rd_gray_s2[DEPTH_LOG2:DEPTH_LOG2-1],
                                rd_gray_s2[DEPTH_LOG2-2:0]});

  // Occupancy seen from the write side (may lag the reader by the sync delay).
  assign wr_nonempty = (wr_gray != rd_gray_s2);

  // Read side.
  always_ff @(posedge rd_clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_bin     <= '0;
      rd_gray    <= '0;
      wr_gray_s1 <= '0;
      wr_gray_s2 <= '0;
    end else begin
      wr_gray_s1 <= wr_gray;
      wr_gray_s2 <= wr_gray_s1;
      if (rd_pop && !rd_empty) begin
        rd_bin  <= rd_bin + 1'b1;
        rd_gray <= to_gray(rd_bin + 1'b1);
      end
    end
  end

  assign rd_empty = (rd_gray == wr_gray_s2);
  assign rd_data  = mem[rd_bin[DEPTH_LOG2-1:0]];

endmodule
