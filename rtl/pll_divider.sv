// Feedback divider of the AstroPix4 clock PLL.
//
// The VCO output is divided by 8 with an asynchronous (ripple) chain of three
// toggle flip-flops: each stage toggles on the falling edge of the stage
// before it, so the stages switch one after another and the divided output
// collects the ripple delay and its jitter. A final flip-flop clocked by the
// VCO itself re-samples the last stage, so the divider output is aligned to a
// VCO edge again and the jitter does not accumulate.
//
// Interface: vco_clk (oscillator output), rst_n (asynchronous, active low),
// div_clk (vco_clk / 8, 50 % duty cycle). Timing: div_clk changes on a rising
// vco_clk edge, one VCO period after the last ripple stage toggled.
//
// The ratio, the ripple structure and the re-synchronisation follow the
// chip; the reset is this design's own addition.
`timescale 1ns/1ps
module pll_divider #(
  parameter int unsigned STAGES = 3     // 2**STAGES = division ratio 8
) (
  input  logic vco_clk,
  input  logic rst_n,
  output logic div_clk
);

  logic [STAGES-1:0] stage_q;

  always_ff @(posedge vco_clk or negedge rst_n) begin
    if (!rst_n) stage_q[0] <= 1'b0;
    else        stage_q[0] <= ~stage_q[0];
  end

  for (genvar i = 1; i < STAGES; i++) begin : g_ripple
    always_ff @(negedge stage_q[i-1] or negedge rst_n) begin
      if (!rst_n) stage_q[i] <= 1'b0;
      else        stage_q[i] <= ~stage_q[i];
    end
  end

  // Re-synchronisation with the oscillator output.
  always_ff @(posedge vco_clk or negedge rst_n) begin
    if (!rst_n) div_clk <= 1'b0;
    else        div_clk <= stage_q[STAGES-1];
  end

endmodule
