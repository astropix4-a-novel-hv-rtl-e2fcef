// Behavioural model (not synthesizable) of the AstroPix4 clock PLL, which
// makes the 20 MHz time-stamp clock from the 2.5 MHz reference.
//
// The chip's PLL has a true-single-phase-clock phase/frequency detector, a
// cascode charge pump, an integrated loop filter and a nine-stage ring
// oscillator of current-starved inverters, with a programmable current
// setting the coarse operating point and the filtered control voltage
// fine-tuning it. The oscillator output is the 20 MHz clock; its division by
// 8 (pll_divider, synthesizable and instantiated here) is compared with the
// reference.
//
// Modelled at the level of edge times: the oscillator is a clock whose
// half-period is a real number; the phase detector pairs the first reference
// and the first feedback rising edge after the last comparison (so it also
// detects frequency) and hands the time between them to the loop filter, a
// proportional-plus-integral update of the oscillator period. The coarse
// operating point is the free-running period FREE_PERIOD_NS. locked is this
// model's own status output: LOCK_COUNT comparisons in a row with an error
// below LOCK_TOL_NS.
//
// Interface: clk_ref (2.5 MHz), rst_n (resets the divider and the loop),
// clk_out (oscillator, 20 MHz when locked), clk_fb (divider output), locked.
//
// Reference and output frequencies, the divide-by-8 with re-synchronisation
// and the loop components follow the chip; the filter gains and the lock
// flag are this model's own.
`timescale 1ns/1ps
module pll_model #(
  parameter real         FREE_PERIOD_NS = 44.0,
  parameter real         KP             = 0.06,
  parameter real         KI             = 0.01,
  parameter real         LOCK_TOL_NS    = 0.5,
  parameter int unsigned LOCK_COUNT     = 8
) (
  input  logic clk_ref,
  input  logic rst_n,
  output logic clk_out,
  output logic clk_fb,
  output logic locked
);

  real  period_int, period_ns, t_ref, t_fb, err_ns;
  logic ref_seen, fb_seen, ref_prev, fb_prev;
  int   good_cnt;

  initial begin
    clk_out    = 1'b0;
    period_int = FREE_PERIOD_NS;
    period_ns  = FREE_PERIOD_NS;
    ref_seen = 1'b0; fb_seen = 1'b0; ref_prev = 1'b0; fb_prev = 1'b0;
    t_ref = 0.0; t_fb = 0.0; err_ns = 0.0; good_cnt = 0;
  end

  // Ring oscillator.
  always begin
    #(period_ns / 2.0);
    clk_out = ~clk_out;
  end

  pll_divider #(.STAGES(3)) u_div (
    .vco_clk(clk_out), .rst_n(rst_n), .div_clk(clk_fb)
  );

  // Phase/frequency detector, charge pump and loop filter.
  always @(clk_ref or clk_fb or rst_n) begin
    if (!rst_n) begin
      period_int = FREE_PERIOD_NS;
      period_ns  = FREE_PERIOD_NS;
      ref_seen   = 1'b0;
      fb_seen    = 1'b0;
      good_cnt   = 0;
    end else begin
      if (clk_ref && !ref_prev && !ref_seen) begin ref_seen = 1'b1; t_ref = $realtime; end
      if (clk_fb  && !fb_prev  && !fb_seen)  begin fb_seen  = 1'b1; t_fb  = $realtime; end
      if (ref_seen && fb_seen) begin
        // Positive error: feedback early, oscillator too fast.
        err_ns     = t_ref - t_fb;
        period_int = period_int + KI * err_ns;
        period_ns  = period_int + KP * err_ns;
        if (period_ns < 1.0) period_ns = 1.0;
        if (err_ns < LOCK_TOL_NS && err_ns > -LOCK_TOL_NS) good_cnt++;
        else                                               good_cnt = 0;
        ref_seen = 1'b0;
        fb_seen  = 1'b0;
      end
    end
    ref_prev = clk_ref;
    fb_prev  = clk_fb;
  end

  assign locked = (good_cnt >= int'(LOCK_COUNT));

endmodule
