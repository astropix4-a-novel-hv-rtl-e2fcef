// End-to-end testbench for astropix4_top on a reduced 8 x 8 pixel matrix
// (everything else at its default size; tb_astropix4_full runs the same
// sequence on the full 35 x 35 matrix).
//
// The testbench applies the 2.5 MHz reference, waits for the PLL and the DLL
// to lock, then applies comparator pulses to chosen pixels at random times
// and reads everything back over the serial interface. For every hit it
// knows the true leading and trailing edge times; from the hit word it
// rebuilds them as (rising clock edge after the stored count) minus (TDC
// cells passed) x 50/16 ns, using the clock edge times it recorded itself,
// and requires agreement within one TDC step (3.125 ns) plus 0.5 ns.
//
// Mechanisms that must each occur at least once (counted, a failure if not):
// PLL lock, the DLL's forced start at the shortest delay, DLL lock, a hit
// pattern that a row/column OR readout cannot resolve (three hits on two
// rows and two columns at once), two hits drained from one column, the
// hit-buffer lock-out (a second pulse on a pixel whose hit is not read out
// yet is not recorded), back-pressure from the serial queue into the column
// drain, idle words on the serial link and the data-ready line.
`timescale 1ns/1ps
module tb_astropix4_top;
  import astropix4_pkg::*;

  localparam int R = 8, C = 8;
  localparam real STEP = 50.0 / 16.0;

  logic clk_ref = 1'b0, rst_n = 1'b1;
  initial #0.001 rst_n = 1'b0;    // a real falling edge, so asynchronous resets act on random power-up state
  logic hit [C][R];
  logic [15:0] cell_min_ps = 16'd1800;
  logic sck = 1'b0, cs_n = 1'b0;  // chip not selected until after the reset edge
  initial #0.002 cs_n = 1'b1;
  logic [1:0] miso;
  logic interrupt_n, clk20, pll_locked, dll_locked;
  int checks = 0, failures = 0;

  astropix4_top #(.ROWS(R), .COLS(C)) dut (.clk_ref(clk_ref), .rst_n(rst_n), .hit(hit), .cell_min_ps(cell_min_ps),
                     .sck(sck), .cs_n(cs_n), .miso(miso), .interrupt_n(interrupt_n),
                     .clk20(clk20), .pll_locked(pll_locked), .dll_locked(dll_locked));

  always #200 clk_ref = ~clk_ref;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin : watchdog
    #3ms; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Rising clk20 edge times, indexed by the count the gray counter holds
  // after that edge.
  real edge_t [int];
  int  count = 0;
  always @(posedge clk20) if (rst_n) begin count++; edge_t[count] = $realtime; end

  // Expected hits per pixel, in order.
  typedef struct { real t_lead; real t_trail; } exp_t;
  exp_t expq [C][R][$];

  // Mechanism counters.
  int n_pll_lock = 0, n_dll_force = 0, n_dll_lock = 0, n_ambiguous = 0;
  int n_col_pair = 0, n_lockout = 0, n_backpressure = 0, n_idle = 0, n_irq = 0;
  int n_hits = 0, n_words = 0;

  always @(posedge clk20)
    if (dut.word_valid && !dut.word_ready) n_backpressure++;

  // Pulse schedule: edges sorted by time, played by the main sequence.
  typedef struct { real t; int c; int r; bit v; bit rec; } ev_t;
  ev_t evq [$];
  real lead_tmp [C][R];

  task automatic add_edge(input ev_t e);
    int i = 0;
    while (i < evq.size() && evq[i].t <= e.t) i++;
    evq.insert(i, e);
  endtask

  // A pulse starting 'start' ns from now; recorded as expected if 'rec'.
  task automatic add_pulse(input real start, input int c, input int r,
                           input real tot, input bit rec);
    ev_t e;
    e.c = c; e.r = r; e.rec = rec;
    e.t = $realtime + start;       e.v = 1'b1; add_edge(e);
    e.t = $realtime + start + tot; e.v = 1'b0; add_edge(e);
  endtask

  task automatic play_until(input real t_end);
    while (evq.size() > 0 && evq[0].t <= t_end) begin
      ev_t e = evq.pop_front();
      if (e.t > $realtime) #(e.t - $realtime);
      apply(e);
    end
  endtask

  task automatic play();
    while (evq.size() > 0) begin
      ev_t e = evq.pop_front();
      if (e.t > $realtime) #(e.t - $realtime);
      apply(e);
    end
  endtask

  task automatic apply(input ev_t e);
    hit[e.c][e.r] = e.v;
    if (e.rec) begin
      if (e.v) lead_tmp[e.c][e.r] = $realtime;
      else begin
        exp_t x;
        x.t_lead  = lead_tmp[e.c][e.r];
        x.t_trail = $realtime;
        expq[e.c][e.r].push_back(x);
      end
    end
  endtask

  real tlast_word;
  bit  reading = 1'b0;

  // Serial master: reads while enabled, drops idle words, checks every hit.
  task automatic read_word(output hit_word_t w);
    for (int k = 0; k < 40; k++) begin
      #12.5 sck = 1'b1;
      w[79 - 2 * k -: 2] = miso;
      #25 sck = 1'b0;
      #12.5;
    end
  endtask

  task automatic check_word(input hit_word_t w);
    int c, r;
    real dec_lead, dec_trail;
    c = int'(w.col); r = int'(w.row);
    n_words++;
    if (c >= C || r >= R || expq[c][r].size() == 0) begin
      check(1'b0, "word for a pixel without a pending hit");
      return;
    end
    begin
      exp_t e = expq[c][r].pop_front();
      int cl = int'(gray2bin(w.lead.ts[TS_BITS-1:1]));
      int ct = int'(gray2bin(w.trail.ts[TS_BITS-1:1]));
      if (!edge_t.exists(cl + 1) || !edge_t.exists(ct + 1)) begin
        check(1'b0, "stored count out of range");
        return;
      end
      dec_lead  = edge_t[cl + 1] - real'(tdc_count(w.lead.tdc))  * STEP;
      dec_trail = edge_t[ct + 1] - real'(tdc_count(w.trail.tdc)) * STEP;
      check(dec_lead  - e.t_lead  < STEP + 0.5 && e.t_lead  - dec_lead  < STEP + 0.5, "ToA");
      check(dec_trail - e.t_trail < STEP + 0.5 && e.t_trail - dec_trail < STEP + 0.5, "trailing edge");
      check((dec_trail - dec_lead) - (e.t_trail - e.t_lead) < 2.0 * STEP + 1.0 &&
            (e.t_trail - e.t_lead) - (dec_trail - dec_lead) < 2.0 * STEP + 1.0, "ToT");
    end
  endtask

  initial begin
    hit_word_t w;
    forever begin
      wait (reading && !interrupt_n);
      n_irq++;
      #7 cs_n = 1'b0;
      #20;
      forever begin
        read_word(w);
        if (w == '1) begin
          n_idle++;
          if (interrupt_n || !reading) break;
        end else check_word(w);
      end
      #20 cs_n = 1'b1;
      #100;
    end
  end

  function automatic int pending();
    int n = 0;
    for (int c = 0; c < C; c++) for (int r = 0; r < R; r++) n += expq[c][r].size();
    return n;
  endfunction

  initial begin
    int n;
    for (int c = 0; c < C; c++) for (int r = 0; r < R; r++) hit[c][r] = 1'b0;
    #1000 rst_n = 1'b1;
    #1;
    if (dut.vctrl_force && dut.vctrl == '1) n_dll_force++;
    n = 0;
    while (!(pll_locked && dll_locked) && n < 400) begin @(posedge clk_ref); n++; end
    if (pll_locked) n_pll_lock++;
    if (dll_locked) n_dll_lock++;
    check(pll_locked && dll_locked, "clocks locked within 400 reference periods");
    $display("locked after %0d reference periods, DLL code %0d", n, dut.vctrl);
    repeat (4) @(posedge clk_ref);
    reading = 1'b1;

    // 1. Three hits on two rows and two columns at once (the pattern
    //    that would give ghost hits with shared row and column lines): all
    //    three must come out.
    add_pulse(13.7, 1, 2, 900.0, 1'b1);
    add_pulse(13.7, 5, 6, 700.0, 1'b1);
    add_pulse(35.0, 1, 6, 400.0, 1'b1);
    play();
    n_ambiguous++;
    n_col_pair++;      // column 1 holds two hits that are drained in turn
    #5000;

    // 2. Random single hits.
    begin
      real t = 0.0;
      bit used [C][R];
      for (int c = 0; c < C; c++) for (int r = 0; r < R; r++) used[c][r] = 1'b0;
      for (int k = 0; k < 40; k++) begin
        int c, r;
        c = $urandom_range(C - 1);
        r = $urandom_range(R - 1);
        t += real'($urandom_range(4000)) / 10.0 + 300.0;
        if (!used[c][r]) begin
          used[c][r] = 1'b1;
          add_pulse(t, c, r, 200.0 + real'($urandom_range(30000)) / 10.0, 1'b1);
        end
      end
    end
    play();
    #8000;

    // 3. Serial link paused: a burst fills the queue and the buffers; a
    //    second pulse on a pixel still holding a hit is locked out.
    reading = 1'b0;
    wait (cs_n);
    begin
      real t = 0.0;
      for (int k = 0; k < 30; k++) begin
        t += real'($urandom_range(500)) / 10.0 + 20.0;
        add_pulse(t, k % C, (k / C + 2) % R, 300.0, 1'b1);
      end
    end
    play();
    #3000;
    begin
      bit done = 1'b0;
      for (int k = 29; k >= 0 && !done; k--) begin
        int c, r;
        c = k % C;
        r = (k / C + 2) % R;
        if (dut.buf_ready[c][r]) begin
          add_pulse(10.0, c, r, 250.0, 1'b0);
          play();
          n_lockout++;
          done = 1'b1;
        end
      end
    end
    #2000;
    reading = 1'b1;

    // Drain everything.
    n = 0;
    while ((pending() > 0 || !interrupt_n) && n < 400) begin #1000; n++; end
    #5000;
    check(pending() == 0, "every recorded hit read out");
    check(interrupt_n, "data-ready released at the end");

    check(n_pll_lock > 0, "mechanism: PLL lock");
    check(n_dll_force > 0, "mechanism: DLL forced start");
    check(n_dll_lock > 0, "mechanism: DLL lock");
    check(n_ambiguous > 0, "mechanism: hits sharing rows and columns");
    check(n_col_pair > 0, "mechanism: two hits in one column");
    check(n_lockout > 0, "mechanism: hit-buffer lock-out");
    check(n_backpressure > 0, "mechanism: back-pressure into the column drain");
    check(n_idle > 0, "mechanism: idle words");
    check(n_irq > 0, "mechanism: data-ready line");
    $display("words %0d, lock-outs %0d, back-pressure cycles %0d, idle words %0d",
             n_words, n_lockout, n_backpressure, n_idle);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
