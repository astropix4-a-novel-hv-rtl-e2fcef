// Behavioural model (not synthesizable) of the Flash-TDC delay line in each
// AstroPix4 hit buffer.
//
// The real line is a chain of 16 delay elements, each made of two current
// starved inverters whose delay is set by the control voltage of the global
// DLL. A hit edge entering the line travels along it; each element output
// feeds the hit buffer's memory cells, so when the buffer stops writing at
// the next rising 20 MHz clock edge it keeps a thermometer code of how far
// the edge got.
//
// The model does not run a process per element (which makes a full 35 x 35
// matrix too heavy to simulate). It remembers the time and value of the last
// three input edges; element k shows the value of the latest edge that
// entered at least (k+1) element delays ago. One process records the edges,
// a second one wakes at exactly the instants at which an element output
// changes and recomputes the whole line state, until the latest edge has left
// the line. Edges closer together than one element delay behave as in the
// real chain only approximately.

// The control voltage is represented by a code, vctrl, with the supply at its
// maximum: element delay = cell_min_ps + (VCTRL_MAX - vctrl) * CELL_STEP_PS
// (astropix4_pkg::cell_delay_ps). cell_min_ps stands for the process,
// voltage and temperature corner.
//
// Interface: start (the hit signal), vctrl (control
// code from the DLL), cell_min_ps (corner), taps[i] (output of element i,
// i = 0 nearest the input).
//
// The element count and its control by the DLL follow the chip; the linear
// delay law and the code standing for the control voltage are this model's
// own.
`timescale 1ns/1ps
module tdc_delay_line
  import astropix4_pkg::*;
#(
  parameter int unsigned CELLS        = 16,
  parameter int unsigned VCTRL_BITS   = 10,
  parameter int unsigned CELL_STEP_PS = 4
) (
  input  logic                  start,
  input  logic [VCTRL_BITS-1:0] vctrl,
  input  logic [15:0]           cell_min_ps,
  output logic [CELLS-1:0]      taps
);

  localparam int VCTRL_MAX = (1 << VCTRL_BITS) - 1;
  localparam int HIST      = 3;

  real  edge_t [HIST];    // entry 0 = latest edge
  logic edge_v [HIST];
  event edge_ev;

  initial begin
    for (int i = 0; i < HIST; i++) begin
      edge_t[i] = -1.0e9;
      edge_v[i] = 1'b0;
    end
    taps = '0;
  end

  function automatic real delay_ns();
    return real'(cell_delay_ps(int'(vctrl), VCTRL_MAX, int'(cell_min_ps),
                               int'(CELL_STEP_PS))) / 1000.0;
  endfunction

  // Time from now to the next element output change, 0 if none is due.
  function automatic real next_change(input real now, input real d);
    real best = 0.0;
    for (int i = 0; i < HIST; i++)
      for (int k = 0; k < CELLS; k++) begin
        real t = edge_t[i] + real'(k + 1) * d - now;
        if (t > 1.0e-6 && (best == 0.0 || t < best)) best = t;
      end
    return best;
  endfunction

  function automatic logic [CELLS-1:0] line_state(input real now, input real d);
    logic [CELLS-1:0] s;
    for (int k = 0; k < CELLS; k++) begin
      s[k] = ~edge_v[HIST-1];          // before the oldest remembered edge
      for (int i = HIST - 1; i >= 0; i--)
        if (edge_t[i] + real'(k + 1) * d <= now + 1.0e-6) s[k] = edge_v[i];
    end
    return s;
  endfunction

  // Input edges: remember time and value (never blocked).
  always @(start) begin
    for (int i = HIST - 1; i > 0; i--) begin
      edge_t[i] = edge_t[i-1];
      edge_v[i] = edge_v[i-1];
    end
    edge_t[0] = $realtime;
    edge_v[0] = start;
    -> edge_ev;
  end

  // Line state: after an edge, wake at every instant an element output
  // changes until the latest edge has left the line.
  always begin
    @(edge_ev);
    taps = line_state($realtime, delay_ns());
    while (next_change($realtime, delay_ns()) > 0.0) begin
      #(next_change($realtime, delay_ns()));
      taps = line_state($realtime, delay_ns());
    end
  end

endmodule
