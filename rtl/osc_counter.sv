// osc_counter -- period counter of one ring oscillator (the N0 or N1 counter).
//
// Counts the rising edges of the oscillator it is clocked by. It is cleared
// asynchronously (clear, active high) because its clock only runs while the
// oscillator is enabled. The count wraps at 2**W. The counter itself is the
// reference design's; its width and clearing are this design's choices.
module osc_counter #(
  parameter int unsigned W = 16
) (
  input  logic         osc_clk,
  input  logic         clear,
  output logic [W-1:0] count
);
  timeunit 1ps; timeprecision 1ps;

  always_ff @(posedge osc_clk or posedge clear) begin
    if (clear) count <= '0;
    else       count <= count + 1'b1;
  end

endmodule
