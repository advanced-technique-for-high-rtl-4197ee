// tb_tdc_workloads -- the two characterisation runs of the TDC, on the top at
// its default parameters.
//
//  1. Full range against the 40 MHz reference: a trigger is delayed in 100 ps
//     steps over more than one reference period (0 to 26 ns) and measured with the
//     stop taken from the next reference edge (stop_src = 1), select words
//     slow = 148, fast = 22. The time rebuilt from the coarse count and the fine
//     counts must match the programmed delay to within one resolution step at
//     every step, increase monotonically, and the coarse count must step once when
//     the trigger crosses a reference edge.
//  2. DNL histogram: the interval between start and stop pins is swept over
//     1 ns in 10 ps steps with 100 measurements per step (from 1005 ps, clear of
//     the start of the range and of exact multiples of the period difference), using a pair of select
//     words whose periods differ by 50 ps in this delay model (slow = 73,
//     fast = 37). Every measured value is histogrammed; the mean bin width must be
//     the period difference and every inner bin must be within 0.3 LSB of it.
//     The delay model has no jitter, so the 100 repeats of a step must agree.
// The expected values are computed here from the delay tables of the package.
module tb_tdc_workloads;
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

  int checks = 0, failures = 0;
  int n_range = 0, n_wrap = 0, n_dnl = 0;
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
    longint half = longint'(TAND_PS_DEF);
    for (int i = 0; i < N_CELLS; i++)
      half += longint'(sel[N_CELLS-1-i] ? TINV_PS_DEF[i] : TPASS_PS_DEF[i]);
    return 2 * half;
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

  // 1. Full range: trigger at phase `delay` after a reference rising edge.
  longint prev_trig_est;
  longint prev_coarse;
  task automatic range_step(longint delay, longint t0, longint t1);
    longint t_trig, t_est, base, rel_coarse;
    stop_src = 1'b1;
    clear_tdc();
    // align to a rising reference edge, then wait `delay`
    @(posedge clk_ref);
    base = $time;
    #(delay);
    t_trig = $time;
    start = 1'b1;
    wait_valid(t1 * (t0 / (t0 - t1) + 40) + TREF);
    // clk_ref rose at TREF/2 + k*TREF; the stop is the first rise after the trigger
    t_est = TREF / 2 + longint'(coarse) * TREF -
            (longint'(result.n0) * t0 - longint'(result.n1) * t1);
    // an edge of the fast clock landing exactly on a slow edge may go either way
    check(t_trig - t_est >= 0 && t_trig - t_est <= t0 - t1,
          $sformatf("trigger %0d rebuilt as %0d", t_trig, t_est));
    // the same, relative to the aligning edge: monotone in the programmed delay
    rel_coarse = longint'(coarse) - (base - TREF / 2) / TREF;
    if (n_range > 0) begin
      check(t_est - base >= prev_trig_est, $sformatf("monotone at delay %0d", delay));
      if (rel_coarse != prev_coarse) n_wrap++;
    end
    prev_trig_est = t_est - base;
    prev_coarse   = rel_coarse;
    start = 1'b0;
    n_range++;
  endtask

  // 2. DNL: one measurement of the interval t with the start and stop pins.
  task automatic dnl_measure(longint t, longint t0, longint t1, output longint est);
    stop_src = 1'b0;
    clear_tdc();
    start = 1'b1;
    #(t) stop = 1'b1;
    wait_valid(t1 * (t0 / (t0 - t1) + 40));
    est = longint'(result.n0) * t0 - longint'(result.n1) * t1;
    check(est >= t && est - t < t0 - t1, $sformatf("estimate %0d for T=%0d", est, t));
    start = 1'b0;
    stop  = 1'b0;
    n_dnl++;
  endtask

  initial begin
    longint t0, t1, dt, est, first, hist [longint];
    longint widths [$];
    real mean, dnl, dnl_max;
    #(10);
    rst_n = 1'b0;
    #(100);
    rst_n = 1'b1;
    clk_run = 1'b1;
    #(3 * TREF);

    // 1. Full range, 148/22, 100 ps steps over 26 ns.
    sel_slow = SEL_SLOW_DEF;
    sel_fast = SEL_FAST_DEF;
    t0 = period_of(sel_slow);
    t1 = period_of(sel_fast);
    for (longint d = 0; d <= 26000; d += 100)
      if (d % TREF != 0) range_step(d, t0, t1);
    // the coarse count, taken relative to the aligning edge, steps when the
    // trigger crosses the next reference edge
    $display("full range: %0d steps, coarse steps %0d", n_range, n_wrap);

    // 2. DNL, 50 ps pair of this delay model, 0..1 ns in 10 ps steps.
    sel_slow = 8'd73;
    sel_fast = 8'd37;
    t0 = period_of(sel_slow);
    t1 = period_of(sel_fast);
    dt = t0 - t1;
    check(dt == 50, $sformatf("model period difference of 73/37 is %0d ps", dt));
    // The sweep covers 1 ns above a 1 ns base interval: below about two
    // resolution steps the first coincidence cannot be seen (the detector needs
    // two fast edges) and the lowest codes lie off the regular grid. A 5 ps
    // offset keeps the intervals off exact multiples of the period difference,
    // where a fast edge would land exactly on a slow edge.
    for (longint t = 1005; t <= 2000; t += 10) begin
      dnl_measure(t, t0, t1, first);
      for (int r = 1; r < 100; r++) begin
        dnl_measure(t, t0, t1, est);
        check(est == first, "repeat measurement agrees");
      end
      if (hist.exists(first)) hist[first] += 100; else hist[first] = 100;
    end
    // bin width = hits * step / measures per step; drop the two edge bins
    foreach (hist[k]) widths.push_back(hist[k] * 10 / 100);
    void'(widths.pop_front());
    void'(widths.pop_back());
    mean = 0.0;
    foreach (widths[i]) mean += real'(widths[i]);
    mean = mean / widths.size();
    dnl_max = 0.0;
    foreach (widths[i]) begin
      dnl = (real'(widths[i]) - real'(dt)) / real'(dt);
      if (dnl < 0) dnl = -dnl;
      if (dnl > dnl_max) dnl_max = dnl;
    end
    $display("DNL: %0d bins, mean width %0.1f ps, max |DNL| %0.2f LSB", widths.size(), mean, dnl_max);
    check(widths.size() >= 18, "number of bins over 1 ns");
    check(mean > real'(dt) - 2.0 && mean < real'(dt) + 2.0, "mean bin width");
    check(dnl_max < 0.3, "DNL below 0.3 LSB");

    check(n_range > 0, "full range steps happened");
    check(n_wrap > 0, "coarse count stepped within the range");
    check(n_dnl > 0, "DNL measurements happened");
    $display("mechanisms: full range steps %0d, coarse steps %0d, DNL measurements %0d",
             n_range, n_wrap, n_dnl);
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
