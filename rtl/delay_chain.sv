// delay_chain -- behavioural model of the tapped buffer chain of the hybrid TDC.
//
// The slow oscillator enters a chain of NTAP buffers of delay TBUF_PS each. Tap k
// is the input of buffer k, so tap[k] is the input delayed by k*TBUF_PS and tap[0]
// is the input itself. Each tap feeds one phase detector of the hybrid TDC.
//
// This is a behavioural model: the buffer delays exist only in simulation
// (transport delay). The tapping follows the reference design; the buffer delay is
// this design's choice, picked so that the taps split one slow period into NTAP
// roughly equal parts for the default oscillator selection.
module delay_chain #(
  parameter int unsigned NTAP    = 4,
  parameter int unsigned TBUF_PS = 2320
) (
  input  logic            din,
  output logic [NTAP-1:0] tap
);
  timeunit 1ps; timeprecision 1ps;

  assign tap[0] = din;

  for (genvar k = 1; k < NTAP; k++) begin : g_buf
    always begin
      tap[k] <= #(TBUF_PS) tap[k-1];
      @(tap[k-1]);
    end
  end

endmodule
