// Coarse time-stamp generator of AstroPix4.
//
// A synchronous 17 bit gray counter advances on every rising edge of the
// 20 MHz clock and a single bit is updated on every falling edge; together
// they form the 18 bit time stamp that is broadcast to all hit buffers below
// the pixel matrix. Gray coding means only one bit changes per edge, so a hit
// buffer that samples the bus asynchronously at a hit edge never catches a
// mixture of two counts. Combining both edges gives 25 ns resolution.
//
// Interface: clk (20 MHz), rst_n (asynchronous, active low), ts[17:1] = gray
// count, ts[0] = falling-edge bit. Timing: ts[17:1] changes right after each
// rising edge, ts[0] right after each falling edge.
//
// The counter widths and the use of both clock edges follow the chip. The
// falling-edge bit is this design's own encoding: it copies the binary LSB of
// the rising-edge count, so within one clock period it differs from that LSB
// in the first half and equals it in the second half.
`timescale 1ns/1ps
module ts_gray_counter
  import astropix4_pkg::*;
#(
  parameter int unsigned POS_BITS = TS_POS_BITS
) (
  input  logic                clk,
  input  logic                rst_n,
  output logic [POS_BITS:0]   ts
);

  logic [POS_BITS-1:0] bin_q;   // binary shadow of the gray count
  logic [POS_BITS-1:0] gray_q;
  logic                neg_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bin_q  <= '0;
      gray_q <= '0;
    end else begin
      bin_q  <= bin_q + 1'b1;
      gray_q <= (bin_q + 1'b1) ^ ((bin_q + 1'b1) >> 1);
    end
  end

  always_ff @(negedge clk or negedge rst_n) begin
    if (!rst_n) neg_q <= 1'b0;
    else        neg_q <= bin_q[0];
  end

  assign ts = {gray_q, neg_q};

endmodule
