// beat_calib -- measures the vernier resolution dt with free-running oscillators.
//
// When the slow and fast oscillators both run freely, the fast clock gains dt on
// the slow one every period and the phase detector fires once every N1 fast
// periods, where N1 * dt = T_slow. Counting the fast periods between two
// successive coincidences therefore gives dt = T_slow / N1.
//
// Clocked by the fast oscillator and cleared asynchronously (clear, active high).
// After clear the first phase pulse starts the count and the second one ends
// it: beat then holds N1 and beat_valid rises on that edge and stays high until
// the next clear, so a slower clock domain can read beat safely. The principle is
// the reference design's; one-shot operation and widths are this design's choices.
module beat_calib #(
  parameter int unsigned W = 16
) (
  input  logic         fast_clk,
  input  logic         clear,       // asynchronous clear, active high
  input  logic         phase,       // phase detector output (fast clock domain)
  output logic [W-1:0] beat,        // fast periods between two coincidences
  output logic         beat_valid
);
  timeunit 1ps; timeprecision 1ps;

  logic         armed;
  logic [W-1:0] cnt;

  always_ff @(posedge fast_clk or posedge clear) begin
    if (clear) begin
      armed      <= 1'b0;
      cnt        <= '0;
      beat       <= '0;
      beat_valid <= 1'b0;
    end else if (!beat_valid) begin
      if (phase) begin
        if (armed) begin
          beat       <= cnt;
          beat_valid <= 1'b1;
        end
        armed <= 1'b1;
        cnt   <= W'(1);
      end else begin
        cnt <= cnt + 1'b1;
      end
    end
  end

endmodule
