// Serial (SPI) data readout of AstroPix4 with two MISO lines.
//
// Hit words from the column-drain readout are queued in a dual-clock FIFO.
// interrupt_n goes low while the queue holds a word, telling the data
// acquisition to start reading; on the chip this line is open drain and
// shared by all chips on one bus (here: a plain output, low = data). The
// acquisition selects the chip with cs_n low and clocks sck; the word is
// shifted out most significant bit first, two bits per sck period: in sck
// period k of a word, miso[1] carries bit 79-2k and miso[0] bit 78-2k. Data
// change after the falling sck edge and are to be sampled on the rising one.
// A word takes 40 sck periods, so two lines at 20 MHz move 5 MB/s. If the
// queue is empty when a word starts, an idle word of all ones is sent (row
// and column 63 do not exist).
//
// Interface: clk (20 MHz) / rst_n, in_valid / in_ready / in_word (hit word
// stream), sck, cs_n, miso[1:0], interrupt_n.
// Timing: the first two bits of a word are on miso before the first rising
// sck edge after cs_n falls; raising cs_n abandons the current word (an
// already started word is not repeated). The read side only sees newly
// queued words through synchronisers clocked by sck, so after a pause of
// sck the first word read can be an idle word although interrupt_n is low;
// the shift register clears on a rising edge of cs_n | ~rst_n, so a master
// keeps cs_n low through reset or raises it once before the first read;
// the acquisition reads until interrupt_n is high and drops idle words.
//
// The two MISO lines, the data-rate target and the data-ready line follow
// the chip. The word format, idle word and bit order are this design's own;
// the daisy chain between chips and the configuration path over the same
// bus are not modelled.
`timescale 1ns/1ps
module spi_readout
  import astropix4_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH_LOG2 = 4
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  output logic       in_ready,
  input  hit_word_t  in_word,
  input  logic       sck,
  input  logic       cs_n,
  output logic [1:0] miso,
  output logic       interrupt_n
);

  localparam int unsigned W       = HIT_WORD_BITS;
  localparam int unsigned PERIODS = W / 2;            // sck periods per word
  localparam int unsigned CNT_W   = $clog2(PERIODS);

  logic             wr_full, rd_empty, rd_pop;
  logic             sr_rst;          // clears the shift register (edge)
  logic [W-1:0]     rd_data, head;
  logic [W-1:0]     shift_q;
  logic [CNT_W-1:0] cnt_q;
  logic             sck_n;
  logic             wr_nonempty;
  logic             pending_q;   // a word is queued (in the clk domain)

  assign sck_n = ~sck;

  async_fifo #(.WIDTH(W), .DEPTH_LOG2(FIFO_DEPTH_LOG2)) u_fifo (
    .wr_clk(clk), .rd_clk(sck_n), .rst_n(rst_n),
    .wr_en(in_valid), .wr_data(in_word), .wr_full(wr_full), .wr_nonempty(wr_nonempty),
    .rd_pop(rd_pop), .rd_data(rd_data), .rd_empty(rd_empty)
  );

  assign in_ready = ~wr_full;
  assign head     = rd_empty ? '1 : rd_data;

  // Shift register, read side (falling sck edges). Cleared on a rising edge
  // of cs_n | ~rst_n, so the chip reset clears it only while cs_n is low.
  assign sr_rst = cs_n | ~rst_n;
  always_ff @(posedge sck_n or posedge sr_rst) begin
    if (sr_rst) begin
      cnt_q   <= '0;
      shift_q <= '0;
    end else begin
      if (cnt_q == '0) shift_q <= head << 2;
      else             shift_q <= shift_q << 2;
      cnt_q <= (cnt_q == CNT_W'(PERIODS - 1)) ? '0 : cnt_q + 1'b1;
    end
  end

  assign rd_pop = !cs_n && (cnt_q == '0);
  assign miso   = (cnt_q == '0) ? head[W-1 -: 2] : shift_q[W-1 -: 2];

  // Data-ready line, from the write side's view of the queue.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) pending_q <= 1'b0;
    else        pending_q <= wr_nonempty;
  end

  assign interrupt_n = ~pending_q;

endmodule
