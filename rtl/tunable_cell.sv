// tunable_cell -- behavioural model of one "moving inverter" oscillator stage.
//
// The stage is an XOR cell: with sel = 0 it passes its input, with sel = 1 it
// inverts it (the same truth table as an inverter followed by a 2:1 multiplexer).
// Its propagation delay depends on the function it performs: TPASS_PS when
// passing, TINV_PS when inverting. These two delays, and the fact that they
// differ from cell to cell, are what make the ring period tuneable. The XOR
// function and the two delays follow the reference design; the default delay
// values and the transport-delay behaviour are this design's model.
//
// This is a behavioural timing model. Each input change schedules
// the new output value after the delay of the current mode (transport delay), so
// several edges may be in flight at once. Synthesis sees a plain XOR; on silicon the
// delays come from the cell and its routing, not from this code.
// The delay is a parameter chosen by sel at run time, so a lint tool cannot prove
// it non-zero and warns that it may be #0; both delays are always positive here.
module tunable_cell #(
  parameter int unsigned TPASS_PS = 417,   // delay when passing (sel = 0), ps
  parameter int unsigned TINV_PS  = 402    // delay when inverting (sel = 1), ps
) (
  input  logic in,
  input  logic sel,
  output logic out
);
  timeunit 1ps; timeprecision 1ps;

  always begin
    out <= #(sel ? TINV_PS : TPASS_PS) (in ^ sel);
    @(in or sel);
  end

endmodule
