// phase_detector -- coincidence detector of the vernier TDC.
//
// The slow oscillator is sampled by the fast one through two flip-flops in series,
// both clocked by the fast clock: q1 is the slow clock at the latest fast edge, q2
// at the one before. phase = q2 & ~q1 is high for one fast period after the fast
// edge at which the slow clock, high at the previous fast edge, is found low.
// Because the fast clock gains dt on the slow one every period, this happens on
// the first fast rising edge that arrives ahead of a slow rising edge: the two
// clocks are in phase to within dt.
//
// Both flip-flops are cleared asynchronously by clear (active high), so no
// coincidence is reported until two fast edges have been seen. The two flip-flops
// in series and the rule "slow clock previously high, now low" follow the
// reference design; the reset polarity is this design's choice.
module phase_detector (
  input  logic fast_clk,   // fast oscillator (sampling clock)
  input  logic slow_clk,   // slow oscillator (sampled signal)
  input  logic clear,      // asynchronous clear, active high
  output logic phase       // phase detected
);
  timeunit 1ps; timeprecision 1ps;

  logic q1, q2;   // slow clock at the latest and at the previous fast edge

  always_ff @(posedge fast_clk or posedge clear) begin
    if (clear) begin
      q1 <= 1'b0;
      q2 <= 1'b0;
    end else begin
      q1 <= slow_clk;
      q2 <= q1;
    end
  end

  assign phase = q2 & ~q1;

endmodule
