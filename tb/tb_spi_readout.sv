// Self-checking testbench for spi_readout. A producer in the 20 MHz domain
// offers random hit words (respecting in_ready, so the queue fills up and
// pushes back); a serial master clocked at 20 MHz, with its own phase, waits
// for interrupt_n, selects the chip and clocks 40 periods per word, sampling
// both MISO lines on rising sck edges. The testbench checks that the words
// arrive complete and in order, that idle words are all ones, that
// back-pressure occurred, that a filled queue streams without idle words
// (80 bits per 40 sck periods, i.e. 5 MB/s at 20 MHz) and that interrupt_n
// is high once everything was read.
`timescale 1ns/1ps
module tb_spi_readout;
  import astropix4_pkg::*;

  localparam int N = 60;

  logic clk = 1'b0, rst_n = 1'b1;
  initial #0.001 rst_n = 1'b0;    // a real falling edge, so asynchronous resets act on random power-up state
  logic in_valid = 1'b0, in_ready;
  hit_word_t in_word;
  logic sck = 1'b0, cs_n = 1'b0;  // chip not selected until after the reset edge
  initial #0.002 cs_n = 1'b1;
  logic [1:0] miso;
  logic interrupt_n;
  int checks = 0, failures = 0;
  hit_word_t sent [$];
  int pushback = 0;

  spi_readout dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_ready(in_ready),
                   .in_word(in_word), .sck(sck), .cs_n(cs_n), .miso(miso),
                   .interrupt_n(interrupt_n));

  always #25 clk = ~clk;

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

  function automatic hit_word_t rnd_word();
    hit_word_t w;
    w = {$urandom, $urandom, $urandom};
    w.row = ADDR_BITS'($urandom_range(34));
    w.col = ADDR_BITS'($urandom_range(34));
    return w;
  endfunction

  // Producer: first a burst that overfills the queue, later sparse words.
  initial begin
    #110 rst_n = 1'b1;
    for (int n = 0; n < N; n++) begin
      @(negedge clk);
      in_word  = rnd_word();
      in_valid = 1'b1;
      @(posedge clk);
      while (!in_ready) begin pushback++; @(posedge clk); end
      sent.push_back(in_word);
      #1 in_valid = 1'b0;
      if (n >= 30) repeat ($urandom_range(300)) @(posedge clk);
    end
  end

  task automatic read_word(output hit_word_t w);
    for (int k = 0; k < 40; k++) begin
      #12.5 sck = 1'b1;
      w[79 - 2 * k -: 2] = miso;
      #25 sck = 1'b0;
      #12.5;
    end
  endtask

  initial begin
    hit_word_t w;
    int got = 0, idle = 0, streamed = 0;
    bit first;
    #3000;   // let the burst fill the queue
    while (got < N) begin
      wait (!interrupt_n);
      #7 cs_n = 1'b0;
      #20;
      first = 1'b1;
      forever begin
        read_word(w);
        if (w == '1) begin
          idle++;
          if (interrupt_n) break;
        end else begin
          check(sent.size() > 0 && w == sent.pop_front(), "word content and order");
          if (!first && got < 16) streamed++;
          got++;
        end
        first = 1'b0;
      end
      #20 cs_n = 1'b1;
      #100;
    end
    check(streamed >= 15, "queued words stream back to back");
    check(pushback > 0, "queue pushed back on the producer");
    check(idle > 0, "idle words sent when the queue is empty");
    repeat (10) @(posedge clk);
    check(interrupt_n, "data-ready line released");
    $display("words %0d idle %0d pushback cycles %0d", got, idle, pushback);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
