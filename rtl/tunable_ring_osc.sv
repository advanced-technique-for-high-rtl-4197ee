// tunable_ring_osc -- behavioural model of the open-loop tuneable ring oscillator.
//
// An AND gate (fbin & clockEnb) feeds a chain of N_CELLS tunable_cell stages.
// Select bit N_CELLS-1 (N_CELLS = 8 from tdc_pkg) drives the first cell after the gate and bit 0 the last,
// whose output is outClock. The ring is closed outside this module by wiring
// outClock back to fbin; keeping the loop open here lets a timing analyser see
// the chain as an ordinary path. With an odd number of ones in sel the closed
// ring oscillates while clockEnb is high, with period
//   T = 2 * (TAND_PS + sum over cells of (sel ? TINV_PS : TPASS_PS)).
// Moving an inverter (changing which bits are set) changes T by the difference
// of the (Tpass - Tinv) spreads of the two cells concerned.
//
// Idle behaviour: with clockEnb low the gate output is 0 and outClock rests at the
// parity of sel, which is 1 for a legal select word. After clockEnb rises, the
// k-th rising edge of outClock comes k*T after it (k >= 1).
//
// This is a behavioural model: the delays exist only in simulation. The gate
// and stage structure follow the reference design; the delay values are a model.
module tunable_ring_osc
  import tdc_pkg::*;
#(
  parameter int unsigned TAND_PS = TAND_PS_DEF,
  parameter delay_tab_t  TPASS_PS = TPASS_PS_DEF,
  parameter delay_tab_t  TINV_PS  = TINV_PS_DEF
) (
  input  logic [N_CELLS-1:0] sel,       // Osc_sel: 1 = stage inverts
  input  logic         fbin,      // feedback input (outClock of the closed ring)
  input  logic         clockEnb,  // oscillation enable
  output logic         outClock
);
  timeunit 1ps; timeprecision 1ps;

  logic [N_CELLS:0] node;   // node[0]: gate output, node[i+1]: output of cell i

  always begin
    node[0] <= #(TAND_PS) (fbin & clockEnb);
    @(fbin or clockEnb);
  end

  for (genvar i = 0; i < N_CELLS; i++) begin : g_cell
    tunable_cell #(.TPASS_PS(TPASS_PS[i]), .TINV_PS(TINV_PS[i])) u_cell (
      .in (node[i]),
      .sel(sel[N_CELLS-1-i]),
      .out(node[i+1])
    );
  end

  assign outClock = node[N_CELLS];

endmodule
