// tb_tdc_top -- end-to-end test of the TDC at its default parameters.
//
// The testbench plays the host: it picks select words, calibrates, and measures.
//  1. Measurements with the stop pin: start, stop T later; N0 and N1 must equal
//     the values predicted from the two periods (slow level known at every fast
//     edge), and N0*T0 - N1*T1 must bound T to within one resolution step.
//  2. Measurements against the reference clock (stop_src = 1): a trigger at a
//     random time; the fine interval runs to the next reference edge, the coarse
//     count must equal the reference edges seen before the trigger, and
//     coarse*TREF - T_fine must give back the trigger time.
//  3. Calibration (free_run): the slow and fast period counts over N_ref
//     reference periods and the beat count N1 = T0/dt must match the periods.
//  4. Tuning: the same is repeated after the select words are changed, and the
//     measured resolution must follow the new words.
//  5. Calibration sweep: all 56 x 56 three-inverter pairs, each record checked
//     against the periods of its two words (period counts, beat = T0/|dt|, and
//     timeouts only where two beats last longer than the timeout).
//  6. Hybrid TDC: the interval rebuilt from N0, N1 and the tap that fired must
//     be within one step of T, reached within Td/dt fast periods.
// Each mechanism is counted, and one that never happened counts as a failure.
// All parameters of the top are at their defaults.
module tb_tdc_top;
  import tdc_pkg::*;
  timeunit 1ps; timeprecision 1ps;

  localparam longint TREF = 25000;   // 40 MHz reference clock

  logic clk_ref = 1'b0, rst_n = 1'b1, tdc_clear = 1'b0, start = 1'b0, stop = 1'b0;
  logic stop_src = 1'b0, free_run = 1'b0, cal_go = 1'b0;
  logic [N_CELLS-1:0] sel_slow = SEL_SLOW_DEF, sel_fast = SEL_FAST_DEF;
  logic [15:0] cal_n_ref = 16'd100;
  tdc_result_t result;
  logic valid, cal_busy, cal_done, beat_valid;
  logic [15:0] coarse, ref_count;
  logic [23:0] n_calib_slow, n_calib_fast;
  logic [CNT_W-1:0] beat;
  logic sweep_go = 1'b0, sweep_busy, sweep_done, rec_valid;
  logic [19:0] beat_timeout = 20'd400;
  sweep_rec_t rec;
  logic h_start = 1'b0, h_stop = 1'b0, h_valid;
  tdc_result_t h_result;
  logic [3:0] h_taps;
  localparam longint TD = 2320;   // hybrid tap spacing (default of the top)

  int checks = 0, failures = 0;
  int n_ext = 0, n_ref_stop = 0, n_cal = 0, n_beat = 0, n_tune = 0;
  int n_rec = 0, n_rec_ok = 0, n_rec_timeout = 0, n_rec_50 = 0, n_hybrid = 0;
  longint t_rel;
  logic clk_run = 1'b0;

  always #(TREF / 2) if (clk_run) clk_ref = ~clk_ref;

  tdc_top dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 50) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  function automatic longint period_of(logic [N_CELLS-1:0] sel);
    longint half = TAND_PS_DEF;
    for (int i = 0; i < N_CELLS; i++)
      half += sel[N_CELLS-1-i] ? TINV_PS_DEF[i] : TPASS_PS_DEF[i];
    return 2 * half;
  endfunction

  function automatic bit predict(longint t, longint t0, longint t1,
                                 output longint n0, output longint n1);
    bit prev = 1'b0, cur;
    longint tf, tlat;
    for (longint j = 1; j < 60000; j++) begin
      tf = t + j * t1;
      if (tf % t0 == 0 || tf % t0 == t0 / 2) return 1'b0;
      cur = (tf % t0) < (t0 / 2);
      if (j >= 2 && prev && !cur) begin
        n1   = j;
        tlat = t + (j + 1) * t1;
        if (tlat % t0 == 0) return 1'b0;
        n0   = tlat / t0;
        return 1'b1;
      end
      prev = cur;
    end
    return 1'b0;
  endfunction

  task automatic clear_tdc();
    tdc_clear = 1'b1;
    #(30000);
    tdc_clear = 1'b0;
    #(1000);
  endtask

  task automatic wait_valid(longint limit);
    fork
      wait (valid);
      #(limit);
    join_any
    disable fork;
    check(valid, "measurement completed");
  endtask

  task automatic check_result(longint t, longint t0, longint t1, longint n0, longint n1);
    longint est;
    check(longint'(result.n0) == n0, $sformatf("N0 %0d expected %0d", result.n0, n0));
    check(longint'(result.n1) == n1, $sformatf("N1 %0d expected %0d", result.n1, n1));
    est = longint'(result.n0) * t0 - longint'(result.n1) * t1;
    check(est >= t && est - t < t0 - t1, $sformatf("estimate %0d for T=%0d", est, t));
  endtask

  // 1. Start and stop pins.
  task automatic measure_ext(longint t);
    longint t0, t1, n0, n1;
    t0 = period_of(sel_slow);
    t1 = period_of(sel_fast);
    if (!predict(t, t0, t1, n0, n1)) return;
    stop_src = 1'b0;
    clear_tdc();
    start = 1'b1;
    #(t) stop = 1'b1;
    wait_valid(t1 * (n1 + 20));
    check_result(t, t0, t1, n0, n1);
    start = 1'b0;
    stop  = 1'b0;
    n_ext++;
  endtask

  // 2. Trigger against the reference clock.
  task automatic measure_ref(longint delay);
    longint t0, t1, n0, n1, t_trig, t_fine, edges_before;
    t0 = period_of(sel_slow);
    t1 = period_of(sel_fast);
    stop_src = 1'b1;
    clear_tdc();
    #(delay);
    t_trig = $time - t_rel;
    edges_before = (t_trig + TREF / 2) / TREF;            // clk_ref rises at TREF/2 + k*TREF
    t_fine = TREF / 2 + edges_before * TREF - t_trig;
    if (t_fine == 0 || t_fine == TREF || !predict(t_fine, t0, t1, n0, n1)) return;
    start = 1'b1;
    wait_valid(t1 * (n1 + 20) + TREF);
    check_result(t_fine, t0, t1, n0, n1);
    check(longint'(coarse) == edges_before, $sformatf("coarse %0d expected %0d", coarse, edges_before));
    // trigger time from the two counts, to within one resolution step
    check((TREF / 2 + longint'(coarse) * TREF) -
          (longint'(result.n0) * t0 - longint'(result.n1) * t1) - t_trig <= 0 &&
          (TREF / 2 + longint'(coarse) * TREF) -
          (longint'(result.n0) * t0 - longint'(result.n1) * t1) - t_trig > -(t0 - t1),
          "trigger time from coarse and fine counts");
    start = 1'b0;
    n_ref_stop++;
  endtask

  // 3. Calibration with free-running oscillators.
  task automatic calibrate(int unsigned nref);
    longint t0, t1, len, lo, dt;
    t0 = period_of(sel_slow);
    t1 = period_of(sel_fast);
    free_run = 1'b1;
    clear_tdc();
    @(negedge clk_ref);
    cal_n_ref = 16'(nref);
    cal_go = 1'b1;
    @(negedge clk_ref);
    cal_go = 1'b0;
    fork
      wait (cal_done);
      #(longint'(nref + 20) * TREF);
    join_any
    disable fork;
    check(cal_done, "calibration completed");
    len = longint'(nref) * TREF;
    lo = len / t0;
    check(longint'(n_calib_slow) >= lo && longint'(n_calib_slow) <= lo + 1,
          $sformatf("N_calib slow %0d for %0d/%0d", n_calib_slow, len, t0));
    lo = len / t1;
    check(longint'(n_calib_fast) >= lo && longint'(n_calib_fast) <= lo + 1,
          $sformatf("N_calib fast %0d for %0d/%0d", n_calib_fast, len, t1));
    n_cal++;
    dt = t0 - t1;
    fork
      wait (beat_valid);
      #(t1 * (3 * t0 / dt + 20));
    join_any
    disable fork;
    check(beat_valid, "beat measured");
    check(longint'(beat) >= t0 / dt && longint'(beat) <= t0 / dt + 1,
          $sformatf("beat %0d expected T0/dt = %0d/%0d", beat, t0, dt));
    n_beat++;
    free_run = 1'b0;
  endtask


  // 5. Calibration sweep: every pair of three-inverter words, one record each.
  always @(posedge clk_ref) begin
    if (rec_valid) begin
      longint t0, t1, dt, len, lo, adt;
      n_rec++;
      t0  = period_of(rec.sel_slow);
      t1  = period_of(rec.sel_fast);
      dt  = t0 - t1;
      adt = dt < 0 ? -dt : dt;
      len = longint'(cal_n_ref) * TREF;
      lo  = len / t0;
      check(longint'(rec.n_calib_slow) >= lo && longint'(rec.n_calib_slow) <= lo + 1,
            "sweep record: slow period count");
      lo  = len / t1;
      check(longint'(rec.n_calib_fast) >= lo && longint'(rec.n_calib_fast) <= lo + 1,
            "sweep record: fast period count");
      if (dt == 0) check(!rec.beat_ok, "sweep record: equal periods never coincide");
      if (rec.beat_ok) begin
        n_rec_ok++;
        check(longint'(rec.beat) >= t0 / adt - 1 && longint'(rec.beat) <= t0 / adt + 1,
              $sformatf("sweep record %0d/%0d: beat %0d, T0/|dt| = %0d/%0d",
                        rec.sel_slow, rec.sel_fast, rec.beat, t0, adt));
        if (dt > 0 && dt >= 45 && dt <= 55) n_rec_50++;
      end else begin
        n_rec_timeout++;
        // a timeout is only acceptable when two beats take longer than the timeout
        check(adt == 0 || 2 * (t0 / adt) * t1 > (longint'(beat_timeout) - 40) * TREF,
              $sformatf("sweep record %0d/%0d: unexpected timeout", rec.sel_slow, rec.sel_fast));
      end
    end
  end

  task automatic sweep(int unsigned nref);
    cal_n_ref = 16'(nref);
    @(negedge clk_ref) sweep_go = 1'b1;
    @(negedge clk_ref) sweep_go = 1'b0;
    wait (sweep_done);
    check(n_rec == 56 * 56, $sformatf("sweep produced %0d records, expected 3136", n_rec));
  endtask

  // 6. Hybrid TDC: the interval from the tap that fired must be within dt of T.
  task automatic measure_hybrid(longint t);
    longint t0, t1, dt, est;
    int k;
    t0 = period_of(sel_slow);
    t1 = period_of(sel_fast);
    dt = t0 - t1;
    clear_tdc();
    h_start = 1'b1;
    #(t) h_stop = 1'b1;
    fork
      wait (h_valid);
      #(t1 * (TD / dt + 30));
    join_any
    disable fork;
    check(h_valid, "hybrid measurement completed");
    k = 0;
    for (int i = 3; i >= 0; i--) if (h_taps[i]) k = i;
    est = (longint'(h_result.n0) - (k > 0 ? 1 : 0)) * t0 + k * TD - longint'(h_result.n1) * t1;
    // exact edge coincidences aside, the estimate is within one step of T
    check(est - t > -2 && est - t < dt + 2, $sformatf("hybrid estimate %0d for T=%0d", est, t));
    check(longint'(h_result.n1) < TD / dt + 3, "hybrid coincidence within Td/dt periods");
    h_start = 1'b0;
    h_stop  = 1'b0;
    n_hybrid++;
  endtask

  initial begin
    #(10) rst_n = 1'b0;
    #(100);
    rst_n = 1'b1;
    t_rel = 0;   // clk_ref rises at TREF/2 + k*TREF from time 0
    clk_run = 1'b1;

    // Default selection (slow = 148, fast = 22).
    calibrate(100);
    for (int i = 0; i < 6; i++) measure_ext(longint'($urandom_range(0, 30000)));
    for (int i = 0; i < 6; i++) measure_ref(longint'($urandom_range(1000, 200000)));

    // Re-tune: a different pair of three-inverter words, slower one as slow.
    for (int p = 0; p < 3; p++) begin
      logic [N_CELLS-1:0] a, b;
      do a = N_CELLS'($urandom); while ($countones(a) != 3);
      do b = N_CELLS'($urandom); while ($countones(b) != 3 || period_of(b) == period_of(a));
      if (period_of(a) > period_of(b)) begin sel_slow = a; sel_fast = b; end
      else begin sel_slow = b; sel_fast = a; end
      calibrate(64);
      measure_ext(longint'($urandom_range(0, 20000)));
      measure_ref(longint'($urandom_range(1000, 100000)));
      n_tune++;
    end

    // Hybrid TDC with the default selection.
    sel_slow = SEL_SLOW_DEF;
    sel_fast = SEL_FAST_DEF;
    for (int i = 0; i < 8; i++) measure_hybrid(longint'($urandom_range(0, 30000)));

    // Full calibration sweep, N_ref = 8 reference periods per pair.
    sweep(8);
    $display("sweep: %0d records, %0d with a beat, %0d timeouts, %0d with dt in 45..55 ps",
             n_rec, n_rec_ok, n_rec_timeout, n_rec_50);

    // The vernier core still measures after the sweep.
    measure_ext(longint'($urandom_range(0, 20000)));

    check(n_ext > 0, "stop-pin measurement happened");
    check(n_hybrid > 0, "hybrid measurement happened");
    check(n_rec > 0, "calibration sweep happened");
    check(n_rec_timeout > 0, "sweep timeout happened");
    check(n_ref_stop > 0, "reference-clock measurement happened");
    check(n_cal > 0, "period calibration happened");
    check(n_beat > 0, "beat calibration happened");
    check(n_tune > 0, "re-tuning happened");
    $display("mechanisms: stop pin %0d, reference stop %0d, period calibration %0d, beat %0d, re-tuning %0d, hybrid %0d, sweep records %0d, sweep timeouts %0d",
             n_ext, n_ref_stop, n_cal, n_beat, n_tune, n_hybrid, n_rec, n_rec_timeout);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(64'd200_000_000_000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
