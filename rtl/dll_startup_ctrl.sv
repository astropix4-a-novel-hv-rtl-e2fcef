// Start-up controller of the AstroPix4 global DLL.
//
// A delay-locked loop can lock onto a multiple of the reference period
// (harmonic lock) or, if the delay line starts out shorter than the
// reference, drive its control voltage into the rail (stuck state). This
// controller avoids both without any reset-free loop logic:
//   * while reset is applied and until the first reference edge after it,
//     the control voltage is forced to the supply, i.e. the delay line starts
//     at its shortest delay;
//   * the reference clock is released to the delay line one period before it
//     is released to the phase detector, so the phase detector always sees
//     the delayed edge of clock pulse k next to the reference edge k+1, and a
//     delay shorter than one period can only be lengthened into lock.
// Three flip-flops in a chain, all clocked by the reference clock and cleared
// by the reset, count the first three edges; the first one's inverted output
// enables the driver that forces the control voltage, the later two gate the
// reference clock onto the two outputs.
//
// Interface: clk_ref (20 MHz reference), rst_n (asynchronous, active low),
// vctrl_force (enable of the driver pulling the control voltage to the
// supply), clk2vco (clock into the delay line), clk2pfd (reference into the
// phase detector). Timing: vctrl_force falls at the 1st rising clk_ref edge
// after reset, clk2vco passes clk_ref from the 2nd edge on, clk2pfd from the
// 3rd.
//
// The flip-flop chain, the forced control voltage and the one-period offset
// follow the chip. Passing the clock only once the stage is set (a clock
// gate) is how this design reads the output gates.
`timescale 1ns/1ps
module dll_startup_ctrl (
  input  logic clk_ref,
  input  logic rst_n,
  output logic vctrl_force,
  output logic clk2vco,
  output logic clk2pfd
);

  logic [2:0] chain_q;

  always_ff @(posedge clk_ref or negedge rst_n) begin
    if (!rst_n) chain_q <= '0;
    else        chain_q <= {chain_q[1:0], 1'b1};
  end

  always_comb begin
    vctrl_force = ~chain_q[0];
    clk2vco     = clk_ref & chain_q[1];
    clk2pfd     = clk_ref & chain_q[2];
  end

endmodule
