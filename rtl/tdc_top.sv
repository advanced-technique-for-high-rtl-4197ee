// tdc_top -- tuneable ring-oscillator vernier TDC with coarse counter and
// calibration counters.
//
// Measurement. The vernier core (vernier_tdc) measures the interval between a
// start edge and a stop edge with two tuneable ring oscillators; its resolution
// dt = T_slow - T_fast is set at run time by the two 8-bit select words, which
// choose which of the eight XOR stages of each ring invert. Stop comes either
// from the stop pin (stop_src = 0) or from the first reference-clock edge after
// start (stop_src = 1); in that mode the coarse counter holds the number of
// reference periods counted up to the trigger, which extends the range to
// 2**COARSE_W reference periods.
//
// Calibration. With free_run high both oscillators run continuously and:
//  - two period_calib units count slow and fast periods over cal_n_ref reference
//    periods (go: cal_go), giving T_slow and T_fast against the reference;
//  - beat_calib counts the fast periods between two coincidences, N1, giving
//    dt = T_slow / N1 directly.
// The calibration sweep (sweep_go) does this for every pair of three-inverter
// select words and streams one record per pair (rec, rec_valid): the table from
// which a TDC with the wanted resolution is chosen. While it runs it owns the
// select words, free_run, cal_go and the clear of the vernier core.
//
// Hybrid TDC. A second, independent converter (h_start, h_stop, h_result,
// h_taps, h_valid) with its own pair of rings, set by the same select pins,
// splits the slow period with a tapped delay chain and one phase detector per
// tap, which shortens the time to coincidence and so the jitter accumulated.
//
// Clocks and resets: clk_ref is the stable reference (40 MHz in the reference
// measurements). rst_n (active low, asynchronous) resets everything; tdc_clear
// (active high, asynchronous) re-arms the vernier core and the beat counter
// between measurements. beat_calib is also held clear while free_run is low.
// start and stop are asynchronous edge events.
//
// The blocks and their connection follow the reference design; the stop source
// selection, the shared clear and the widths are this design's choices.
module tdc_top
  import tdc_pkg::*;
#(
  parameter int unsigned COARSE_W = 16,
  parameter int unsigned SETTLE   = 4,
  parameter int unsigned TMO_W    = 20,
  parameter int unsigned NTAP     = 4,
  parameter int unsigned TBUF_PS  = 2320,
  parameter int unsigned TAND_PS       = TAND_PS_DEF,
  parameter delay_tab_t  SLOW_TPASS_PS = TPASS_PS_DEF,
  parameter delay_tab_t  SLOW_TINV_PS  = TINV_PS_DEF,
  parameter delay_tab_t  FAST_TPASS_PS = TPASS_PS_DEF,
  parameter delay_tab_t  FAST_TINV_PS  = TINV_PS_DEF
) (
  input  logic                clk_ref,
  input  logic                rst_n,
  input  logic                tdc_clear,
  input  logic                start,
  input  logic                stop,
  input  logic                stop_src,      // 0: stop pin, 1: next clk_ref edge
  input  logic                free_run,      // calibration mode
  input  logic [N_CELLS-1:0]  sel_slow,
  input  logic [N_CELLS-1:0]  sel_fast,
  input  logic                cal_go,
  input  logic [REF_W-1:0]    cal_n_ref,
  output tdc_result_t         result,
  output logic                valid,
  output logic [COARSE_W-1:0] coarse,
  output logic [COARSE_W-1:0] ref_count,     // running reference period count
  output logic                cal_busy,
  output logic                cal_done,
  output logic [CAL_W-1:0]    n_calib_slow,
  output logic [CAL_W-1:0]    n_calib_fast,
  output logic [CNT_W-1:0]    beat,
  output logic                beat_valid,
  // calibration sweep over all three-inverter select pairs
  input  logic                sweep_go,
  input  logic [TMO_W-1:0]    beat_timeout,
  output logic                sweep_busy,
  output logic                sweep_done,
  output logic                rec_valid,
  output sweep_rec_t          rec,
  // hybrid (delay chain) TDC, side by side with the vernier core
  input  logic                h_start,
  input  logic                h_stop,
  output tdc_result_t         h_result,
  output logic [NTAP-1:0]     h_taps,
  output logic                h_valid
);
  timeunit 1ps; timeprecision 1ps;

  logic clear, clear_h, stop_int, ref_stop;
  logic sw_clear, sw_free_run, sw_cal_go;
  logic [N_CELLS-1:0] sw_sel_slow, sw_sel_fast;
  logic [N_CELLS-1:0] sel_slow_i, sel_fast_i;
  logic free_run_i, cal_go_i;
  logic slow_clk, fast_clk, phase;
  logic busy_s, busy_f, done_s, done_f;

  // While the sweep runs it owns the select words, free_run, clear and cal_go.
  assign clear      = ~rst_n | tdc_clear | (sweep_busy & sw_clear);
  assign clear_h    = ~rst_n | tdc_clear;
  assign sel_slow_i = sweep_busy ? sw_sel_slow : sel_slow;
  assign sel_fast_i = sweep_busy ? sw_sel_fast : sel_fast;
  assign free_run_i = sweep_busy ? sw_free_run : free_run;
  assign cal_go_i   = sweep_busy ? sw_cal_go   : cal_go;
  assign stop_int   = stop_src ? ref_stop : stop;

  coarse_counter #(.W(COARSE_W)) u_coarse (
    .clk_ref(clk_ref), .rst_n(rst_n), .clear(clear), .start(start),
    .count(ref_count), .coarse(coarse), .ref_stop(ref_stop)
  );

  vernier_tdc #(
    .TAND_PS(TAND_PS),
    .SLOW_TPASS_PS(SLOW_TPASS_PS), .SLOW_TINV_PS(SLOW_TINV_PS),
    .FAST_TPASS_PS(FAST_TPASS_PS), .FAST_TINV_PS(FAST_TINV_PS)
  ) u_vernier (
    .clear(clear), .start(start), .stop(stop_int), .free_run(free_run_i),
    .sel_slow(sel_slow_i), .sel_fast(sel_fast_i),
    .slow_clk(slow_clk), .fast_clk(fast_clk), .phase(phase),
    .result(result), .valid(valid)
  );

  period_calib #(.REF_W(REF_W), .CAL_W(CAL_W), .SETTLE(SETTLE)) u_cal_slow (
    .clk_ref(clk_ref), .rst_n(rst_n), .go(cal_go_i), .n_ref(cal_n_ref),
    .osc_clk(slow_clk), .busy(busy_s), .done(done_s), .n_calib(n_calib_slow)
  );

  period_calib #(.REF_W(REF_W), .CAL_W(CAL_W), .SETTLE(SETTLE)) u_cal_fast (
    .clk_ref(clk_ref), .rst_n(rst_n), .go(cal_go_i), .n_ref(cal_n_ref),
    .osc_clk(fast_clk), .busy(busy_f), .done(done_f), .n_calib(n_calib_fast)
  );

  assign cal_busy = busy_s | busy_f;
  assign cal_done = done_s & done_f;

  beat_calib #(.W(CNT_W)) u_beat (
    .fast_clk(fast_clk), .clear(clear | ~free_run_i), .phase(phase),
    .beat(beat), .beat_valid(beat_valid)
  );

  calib_sweep #(.TMO_W(TMO_W)) u_sweep (
    .clk_ref(clk_ref), .rst_n(rst_n), .go(sweep_go), .beat_timeout(beat_timeout),
    .sel_slow(sw_sel_slow), .sel_fast(sw_sel_fast), .tdc_clear(sw_clear),
    .free_run(sw_free_run), .cal_go(sw_cal_go),
    .cal_done(cal_done), .n_calib_slow(n_calib_slow), .n_calib_fast(n_calib_fast),
    .beat(beat), .beat_valid(beat_valid),
    .busy(sweep_busy), .done(sweep_done), .rec_valid(rec_valid), .rec(rec)
  );

  hybrid_tdc #(
    .NTAP(NTAP), .TBUF_PS(TBUF_PS), .TAND_PS(TAND_PS),
    .SLOW_TPASS_PS(SLOW_TPASS_PS), .SLOW_TINV_PS(SLOW_TINV_PS),
    .FAST_TPASS_PS(FAST_TPASS_PS), .FAST_TINV_PS(FAST_TINV_PS)
  ) u_hybrid (
    .clear(clear_h), .start(h_start), .stop(h_stop),
    .sel_slow(sel_slow), .sel_fast(sel_fast),
    .result(h_result), .taps(h_taps), .valid(h_valid)
  );

endmodule
