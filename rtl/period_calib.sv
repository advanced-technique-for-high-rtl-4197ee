// period_calib -- measures an oscillator period against a stable reference clock.
//
// During a window of N_ref reference periods the rising edges of the oscillator
// are counted, giving N_calib with
//   N_calib * T_osc + E = N_ref * T_ref,   0 <= E < T_osc,
// so T_osc = T_ref * N_ref / N_calib - E / N_calib, known to within T_osc / N_calib.
// A longer window makes the error smaller.
//
// Reference domain: a pulse on go (sampled on clk_ref) opens the window on that
// edge; it stays open for exactly n_ref reference periods. SETTLE periods after it
// closes, the count is copied to n_calib and done rises (it stays high until the
// next go). busy is high from the go edge to done.
// Oscillator domain: the window passes through a two-flip-flop synchroniser; the
// counter counts the oscillator edges at which the synchronised window is high.
// Both window edges see the same synchroniser delay, so the count equals the
// number of oscillator edges in the window (to within one edge in hardware).
// The count is read by the reference domain only after it has stopped changing,
// which needs SETTLE * T_ref > 3 * T_osc.
//
// The measurement principle is the reference design's; the window control,
// synchroniser, widths and handshake are this design's choices.
module period_calib #(
  parameter int unsigned REF_W  = 16,   // width of n_ref
  parameter int unsigned CAL_W  = 24,   // width of n_calib
  parameter int unsigned SETTLE = 4     // reference periods between window end and read
) (
  input  logic             clk_ref,
  input  logic             rst_n,     // asynchronous reset, active low
  input  logic             go,
  input  logic [REF_W-1:0] n_ref,     // window length in reference periods (>= 1)
  input  logic             osc_clk,   // oscillator under calibration (free running)
  output logic             busy,
  output logic             done,
  output logic [CAL_W-1:0] n_calib
);
  timeunit 1ps; timeprecision 1ps;

  typedef enum logic [1:0] {S_IDLE, S_WINDOW, S_SETTLE} state_t;
  state_t            state;
  logic [REF_W-1:0]  rcnt;
  logic              window;
  logic              w1, w2, w3;
  logic [CAL_W-1:0]  ocnt;

  // Reference clock domain: window and read-out.
  always_ff @(posedge clk_ref or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      rcnt    <= '0;
      window  <= 1'b0;
      done    <= 1'b0;
      n_calib <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (go) begin
          window <= 1'b1;
          done   <= 1'b0;
          rcnt   <= n_ref - 1'b1;
          state  <= S_WINDOW;
        end
        S_WINDOW: if (rcnt == '0) begin
          window <= 1'b0;
          rcnt   <= REF_W'(SETTLE - 1);
          state  <= S_SETTLE;
        end else begin
          rcnt <= rcnt - 1'b1;
        end
        S_SETTLE: if (rcnt == '0) begin
          n_calib <= ocnt;
          done    <= 1'b1;
          state   <= S_IDLE;
        end else begin
          rcnt <= rcnt - 1'b1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);

  // Oscillator domain: synchronise the window and count edges inside it.
  always_ff @(posedge osc_clk or negedge rst_n) begin
    if (!rst_n) begin
      {w3, w2, w1} <= '0;
      ocnt         <= '0;
    end else begin
      {w3, w2, w1} <= {w2, w1, window};
      if (w2 && !w3)  ocnt <= CAL_W'(1);
      else if (w2)    ocnt <= ocnt + 1'b1;
    end
  end

endmodule
