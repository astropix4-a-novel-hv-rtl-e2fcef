// Behavioural model (not synthesizable) of the AstroPix4 global delay-locked
// loop, without its start-up controller (a separate, synthesizable module).
//
// The DLL holds the total delay of a replica of the Flash-TDC delay line at
// one period of the 20 MHz clock (50 ns), so that each of the 16 elements of
// every pixel TDC delays by 3.125 ns whatever the process, voltage and
// temperature. A replica of the pixel delay line (same delay law as the
// tdc_delay_line model) is driven by clk2vco; a phase/frequency detector
// compares its output with clk2pfd, which is the same reference clock released one period
// later; a charge pump moves the control voltage on the loop filter
// capacitor in proportion to the measured phase error:
//   line output before reference -> delay too short -> control code down;
//   reference before line output -> delay too long  -> control code up.
// While vctrl_force is high the control voltage is held at the supply
// (highest code, shortest delay).
//
// The loop is modelled at the level of edge times: the replica output edge
// is the launch time plus 16 element delays, the phase detector takes the
// time between it and the reference edge, and the charge pump turns it into a
// code step of LOOP_GAIN times the code error it corresponds to. locked is
// this model's own status output: high after LOCK_COUNT comparisons in a row
// with an error below LOCK_TOL_PS.
//
// Interface: clk2vco, clk2pfd, vctrl_force (from the start-up controller),
// cell_min_ps (corner of the replica, as in tdc_delay_line), vctrl (control
// code broadcast to all pixel delay lines), locked.
//
// The loop components, the replica line and the forced start-up follow the
// chip. The linear delay law, the gain and the lock flag are this model's own.
`timescale 1ns/1ps
module dll_model
  import astropix4_pkg::*;
#(
  parameter int unsigned CELLS        = 16,
  parameter int unsigned VCTRL_BITS   = 10,
  parameter int unsigned CELL_STEP_PS = 4,
  parameter real         LOOP_GAIN    = 0.5,
  parameter real         LOCK_TOL_PS  = 200.0,
  parameter int unsigned LOCK_COUNT   = 8
) (
  input  logic                  clk2vco,
  input  logic                  clk2pfd,
  input  logic                  vctrl_force,
  input  logic [15:0]           cell_min_ps,
  output logic [VCTRL_BITS-1:0] vctrl,
  output logic                  locked
);

  localparam real VCTRL_MAX = real'((1 << VCTRL_BITS) - 1);

  real  v_ctrl;          // "voltage" on the loop filter, in code units
  real  fb_due [$];      // replica-line output edges still to be compared
  real  err_ps, d_ns;
  int   good_cnt;
  logic vco_prev, pfd_prev;

  initial begin
    vco_prev = 1'b0;
    pfd_prev = 1'b0;
    v_ctrl   = VCTRL_MAX;
    good_cnt = 0;
    err_ps   = 0.0;
    d_ns     = 0.0;
  end

  // Phase detector, charge pump and loop filter. A reference edge is compared
  // with the oldest replica output edge not compared yet; then a delay-line
  // clock edge at the same instant launches a new edge into the replica.
  always @(clk2pfd or clk2vco or vctrl_force) begin
    if (vctrl_force) begin
      v_ctrl   = VCTRL_MAX;
      good_cnt = 0;
      fb_due.delete();
    end else begin
      if (clk2pfd && !pfd_prev && fb_due.size() > 0) begin
        // Positive error: reference after feedback, delay too short.
        err_ps = ($realtime - fb_due.pop_front()) * 1000.0;
        v_ctrl = v_ctrl - LOOP_GAIN * err_ps / real'(CELLS * CELL_STEP_PS);
        if (v_ctrl > VCTRL_MAX) v_ctrl = VCTRL_MAX;
        if (v_ctrl < 0.0)       v_ctrl = 0.0;
        if (err_ps < LOCK_TOL_PS && err_ps > -LOCK_TOL_PS) good_cnt++;
        else                                               good_cnt = 0;
      end
      if (clk2vco && !vco_prev) begin
        d_ns = real'(cell_delay_ps(int'(vctrl), int'(VCTRL_MAX), int'(cell_min_ps),
                                   int'(CELL_STEP_PS))) / 1000.0;
        fb_due.push_back($realtime + real'(CELLS) * d_ns);
      end
    end
    vco_prev = clk2vco;
    pfd_prev = clk2pfd;
  end

  always_comb begin
    vctrl  = VCTRL_BITS'($rtoi(v_ctrl + 0.5));
    locked = (good_cnt >= int'(LOCK_COUNT));
  end

endmodule
