// vernier_tdc -- ring-oscillator vernier time-to-digital converter core.
//
// Two tuneable ring oscillators with slightly different periods, slow (T0) and
// fast (T1 = T0 - dt), measure the time T between a start and a stop edge:
//   1. the rising edge of start enables the slow oscillator;
//   2. the rising edge of stop enables the fast oscillator;
//   3. every period the fast clock gains dt on the slow one;
//   4. when the phase detector sees the fast clock catch up, the period counts
//      N0 (slow) and N1 (fast) are latched and both oscillators are stopped.
// Then T = N0*T0 - N1*T1 = T0*(N0 - N1) + N1*dt, and the resolution is dt.
//
// Timing. With the oscillator model used here, slow rising edge k comes at
// start + k*T0 and fast rising edge j at stop + j*T1. The phase detector output
// rises just after the first fast edge j that precedes a slow edge k; the result
// is latched on the next fast edge, where the slow counter has just reached k and
// the fast counter still holds j. So n0 = k, n1 = j and
//   N0*T0 - N1*T1 - dt < T <= N0*T0 - N1*T1.
// valid rises with that latching edge, about (N1 + 1) fast periods after stop,
// and holds, with both oscillators stopped, until clear.
//
// free_run enables both oscillators without start and stop and without
// latching: it is the calibration mode in which the oscillators run freely and
// coincidences recur every T0/dt fast periods (see beat_calib).
//
// clear (active high, asynchronous) returns everything to idle and stops both
// rings; hold it for longer than one oscillator period so that no edge is left
// circulating. Change the select words only while the rings are stopped (in
// clear or after valid): switching a stage while an edge is in flight can leave
// several edges circulating, which multiplies the ring frequency.
// start and stop are edge events from outside and may arrive at any time; the
// two arming flip-flops are clocked by them. The block structure (oscillators,
// phase detector, two counters, latch) follows the reference design; the arming
// flip-flops, the latch-on-next-edge timing, the clear and free_run are this
// design's choices.
module vernier_tdc
  import tdc_pkg::*;
#(
  parameter int unsigned TAND_PS       = TAND_PS_DEF,
  parameter delay_tab_t  SLOW_TPASS_PS = TPASS_PS_DEF,
  parameter delay_tab_t  SLOW_TINV_PS  = TINV_PS_DEF,
  parameter delay_tab_t  FAST_TPASS_PS = TPASS_PS_DEF,
  parameter delay_tab_t  FAST_TINV_PS  = TINV_PS_DEF
) (
  input  logic               clear,     // asynchronous clear, active high
  input  logic               start,     // rising edge starts the slow oscillator
  input  logic               stop,      // rising edge starts the fast oscillator
  input  logic               free_run,  // calibration: both oscillators run freely
  input  logic [N_CELLS-1:0] sel_slow,  // slow oscillator select word (odd weight)
  input  logic [N_CELLS-1:0] sel_fast,  // fast oscillator select word (odd weight)
  output logic               slow_clk,
  output logic               fast_clk,
  output logic               phase,     // phase detector output
  output tdc_result_t        result,    // latched N0, N1
  output logic               valid      // result holds a measurement
);
  timeunit 1ps; timeprecision 1ps;

  logic run_slow, run_fast, done;
  logic en_slow, en_fast;
  logic [CNT_W-1:0] n0_cnt, n1_cnt;

  // Step 1 and 2: arm the oscillators on the start and stop edges.
  always_ff @(posedge start or posedge clear) begin
    if (clear) run_slow <= 1'b0;
    else begin
      run_slow <= 1'b1;
      assert (^sel_slow) else $error("slow select word has an even number of inverters");
    end
  end

  always_ff @(posedge stop or posedge clear) begin
    if (clear) run_fast <= 1'b0;
    else begin
      run_fast <= 1'b1;
      assert (^sel_fast) else $error("fast select word has an even number of inverters");
    end
  end

  // clear also stops both rings, so that they are flushed before a new select
  // word is applied or free running resumes.
  assign en_slow = ((run_slow & ~done) | free_run) & ~clear;
  assign en_fast = ((run_fast & ~done) | free_run) & ~clear;

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

  phase_detector u_pd (
    .fast_clk(fast_clk), .slow_clk(slow_clk), .clear(clear),
    .phase(phase)
  );

  osc_counter #(.W(CNT_W)) u_n0 (.osc_clk(slow_clk), .clear(clear), .count(n0_cnt));
  osc_counter #(.W(CNT_W)) u_n1 (.osc_clk(fast_clk), .clear(clear), .count(n1_cnt));

  // Step 4: latch the counters on the fast edge after the coincidence and stop.
  always_ff @(posedge fast_clk or posedge clear) begin
    if (clear) begin
      done   <= 1'b0;
      result <= '0;
    end else if (phase && !done && !free_run) begin
      done      <= 1'b1;
      result.n0 <= n0_cnt;
      result.n1 <= n1_cnt;
    end
  end

  assign valid = done;

endmodule
