// hybrid_tdc -- vernier TDC with a tapped delay chain and several phase detectors.
//
// The cumulated jitter of the two rings grows with the number of periods before
// they coincide, which is up to T0/dt. The hybrid architecture shortens that
// wait: the slow clock is delayed through a chain of NTAP taps spaced by Td, and
// each tap is compared with the fast clock in its own phase detector. The fast
// clock now only has to catch up with the nearest delayed copy of the slow
// clock, so at most about Td/dt fast periods elapse before a coincidence.
//
// The detector outputs are ORed into one disable signal. On the fast edge after
// the first coincidence the slow counter (N0, undelayed slow clock), the fast
// counter (N1) and the vector of detector outputs (taps) are latched, valid
// rises and both oscillators stop. For a coincidence on tap k at fast edge N1,
//   T = (N0 - [k > 0]) * T0 + k*Td - N1*T1   (to within dt):
// tap k sees the slow clock k*Td late, so when it fires the undelayed slow clock
// has already made one more rising edge, which the slow counter has counted. This
// holds when 2*dt < Td and (NTAP-1)*Td < T0. If several taps fire on the same edge
// any of them may be used. The tap delays k*Td are obtained by calibration.
//
// Start, stop, clear and the select words behave as in vernier_tdc.
// The chain, the per-tap detectors, the combined disable and the latch of the
// detector outputs follow the reference design, which presents this architecture
// with preliminary results; combining the detectors with an OR, stopping the
// oscillators on the disable signal, the latch timing and the
// tap spacing are this design's choices; the four taps are as drawn in the
// reference.
module hybrid_tdc
  import tdc_pkg::*;
#(
  parameter int unsigned NTAP          = 4,
  parameter int unsigned TBUF_PS       = 2320,
  parameter int unsigned TAND_PS       = TAND_PS_DEF,
  parameter delay_tab_t  SLOW_TPASS_PS = TPASS_PS_DEF,
  parameter delay_tab_t  SLOW_TINV_PS  = TINV_PS_DEF,
  parameter delay_tab_t  FAST_TPASS_PS = TPASS_PS_DEF,
  parameter delay_tab_t  FAST_TINV_PS  = TINV_PS_DEF
) (
  input  logic               clear,
  input  logic               start,
  input  logic               stop,
  input  logic [N_CELLS-1:0] sel_slow,
  input  logic [N_CELLS-1:0] sel_fast,
  output tdc_result_t        result,
  output logic [NTAP-1:0]    taps,      // latched phase detector outputs
  output logic               valid
);
  timeunit 1ps; timeprecision 1ps;

  logic run_slow, run_fast, done;
  logic en_slow, en_fast;
  logic slow_clk, fast_clk, disable_any;
  logic [NTAP-1:0] slow_tap, phase;
  logic [CNT_W-1:0] n0_cnt, n1_cnt;

  always_ff @(posedge start or posedge clear) begin
    if (clear) run_slow <= 1'b0;
    else       run_slow <= 1'b1;
  end

  always_ff @(posedge stop or posedge clear) begin
    if (clear) run_fast <= 1'b0;
    else       run_fast <= 1'b1;
  end

  assign en_slow = run_slow & ~done & ~clear;
  assign en_fast = run_fast & ~done & ~clear;

  tunable_ring_osc #(
    .TAND_PS(TAND_PS), .TPASS_PS(SLOW_TPASS_PS), .TINV_PS(SLOW_TINV_PS)
  ) u_slow (
    .sel(sel_slow), .fbin(slow_clk), .clockEnb(en_slow), .outClock(slow_clk)
  );

  tunable_ring_osc #(
    .TAND_PS(TAND_PS), .TPASS_PS(FAST_TPASS_PS), .TINV_PS(FAST_TINV_PS)
  ) u_fast (
    .sel(sel_fast), .fbin(fast_clk), .clockEnb(en_fast), .outClock(fast_clk)
  );

  delay_chain #(.NTAP(NTAP), .TBUF_PS(TBUF_PS)) u_chain (.din(slow_clk), .tap(slow_tap));

  for (genvar k = 0; k < NTAP; k++) begin : g_pd
    phase_detector u_pd (
      .fast_clk(fast_clk), .slow_clk(slow_tap[k]), .clear(clear), .phase(phase[k])
    );
  end

  assign disable_any = |phase;

  osc_counter #(.W(CNT_W)) u_n0 (.osc_clk(slow_clk), .clear(clear), .count(n0_cnt));
  osc_counter #(.W(CNT_W)) u_n1 (.osc_clk(fast_clk), .clear(clear), .count(n1_cnt));

  // Phase detect latch: counters and detector outputs on the edge after the
  // first coincidence.
  always_ff @(posedge fast_clk or posedge clear) begin
    if (clear) begin
      done   <= 1'b0;
      result <= '0;
      taps   <= '0;
    end else if (disable_any && !done) begin
      done      <= 1'b1;
      result.n0 <= n0_cnt;
      result.n1 <= n1_cnt;
      taps      <= phase;
    end
  end

  assign valid = done;

endmodule
