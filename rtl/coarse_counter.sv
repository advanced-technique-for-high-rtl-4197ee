// coarse_counter -- reference-clock period counter extending the TDC range.
//
// The vernier core measures intervals up to a few slow periods. For a trigger
// measured against a reference clock (for instance 40 MHz) the coarse counter
// counts reference periods and the vernier core measures the fine interval from
// the trigger to the next reference edge:
//   t_trigger = coarse * T_ref - T_fine  (plus a fixed offset).
//
// count increments on every clk_ref rising edge. The rising edge of start
// (the trigger) copies count into coarse and arms ref_stop, which rises on the
// first clk_ref edge after start and serves as the vernier stop. clear (active
// high, asynchronous) disarms the stop and must also be high during reset;
// rst_n (active low, asynchronous) zeroes the counter and the held value. Because start is asynchronous to clk_ref, a trigger
// within a flip-flop setup window of a reference edge may be resolved either
// way in hardware; the fine result then lies near 0 or near T_ref and tells which.
//
// The reference design plots a coarse counter next to the fine TDC output; the
// copy-on-start and the generation of stop from the reference clock are this
// design's reading of that measurement.
module coarse_counter #(
  parameter int unsigned W = 16
) (
  input  logic         clk_ref,
  input  logic         rst_n,
  input  logic         clear,
  input  logic         start,
  output logic [W-1:0] count,
  output logic [W-1:0] coarse,
  output logic         ref_stop
);
  timeunit 1ps; timeprecision 1ps;

  logic armed;

  always_ff @(posedge clk_ref or negedge rst_n) begin
    if (!rst_n) count <= '0;
    else        count <= count + 1'b1;
  end

  always_ff @(posedge start or negedge rst_n) begin
    if (!rst_n) coarse <= '0;
    else        coarse <= count;
  end

  always_ff @(posedge start or posedge clear) begin
    if (clear) armed <= 1'b0;
    else                 armed <= 1'b1;
  end

  always_ff @(posedge clk_ref or posedge clear) begin
    if (clear) ref_stop <= 1'b0;
    else if (armed)      ref_stop <= 1'b1;
  end

endmodule
