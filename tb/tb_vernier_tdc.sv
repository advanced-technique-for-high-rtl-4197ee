// tb_vernier_tdc -- self-checking testbench of the vernier TDC core.
//
// For each measurement the testbench picks a time interval T, drives start and
// then stop T later, and waits for valid. The expected N0 and N1 are worked out
// here from the oscillator periods alone: T0 and T1 follow from the cell delay
// tables and the select words, the slow clock level is known at every fast edge,
// and the first high-to-low sample marks the coincidence. The latency (valid
// on the fast edge after the coincidence) and the interval bound
// N0*T0 - N1*T1 - dt < T <= N0*T0 - N1*T1 are checked too. Select words are the
// 50 ps example pair and random pairs of three-inverter words.
// Start/stop gating and the formula follow the reference design; the latch on
// the fast edge after the coincidence is this design's choice.
module tb_vernier_tdc;
  import tdc_pkg::*;
  timeunit 1ps; timeprecision 1ps;

  logic clear = 1'b0, start = 1'b0, stop = 1'b0, free_run = 1'b0;
  logic [N_CELLS-1:0] sel_slow = SEL_SLOW_DEF, sel_fast = SEL_FAST_DEF;
  logic slow_clk, fast_clk, phase, valid;
  tdc_result_t result;

  int checks = 0, failures = 0;

  vernier_tdc dut (.*);

  function automatic longint period_of(logic [N_CELLS-1:0] sel);
    longint half = TAND_PS_DEF;
    for (int i = 0; i < N_CELLS; i++)
      half += sel[N_CELLS-1-i] ? TINV_PS_DEF[i] : TPASS_PS_DEF[i];
    return 2 * half;
  endfunction

  // Expected outcome; returns 0 if some edge coincides exactly (ambiguous order).
  function automatic bit predict(longint t, longint t0, longint t1,
                                 output longint n0, output longint n1, output longint tlat);
    bit prev = 1'b0, cur;
    longint tf;
    for (longint j = 1; j < 100000; j++) begin
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

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic measure(longint t);
    longint t0, t1, n0, n1, tlat, t_start, t_valid, est;
    t0 = period_of(sel_slow);
    t1 = period_of(sel_fast);
    if (!predict(t, t0, t1, n0, n1, tlat)) return;
    clear = 1'b1;
    #(30000);
    clear = 1'b0;
    #(1000);
    t_start = $time;
    start = 1'b1;
    #(t) stop = 1'b1;
    fork
      begin wait (valid); t_valid = $time; end
      begin #(longint'(t1) * (n1 + 10) + 1000); t_valid = -1; end
    join_any
    disable fork;
    check("valid latency", t_valid - t_start, tlat);
    check("N0", longint'(result.n0), n0);
    check("N1", longint'(result.n1), n1);
    est = longint'(result.n0) * t0 - longint'(result.n1) * t1;
    checks++;
    if (!(est >= t && est - t < t0 - t1)) begin
      failures++;
      $display("FAIL interval T=%0d estimate=%0d dt=%0d", t, est, t0 - t1);
    end
    start = 1'b0;
    stop  = 1'b0;
  endtask

  function automatic logic [N_CELLS-1:0] rand_sel3();
    logic [N_CELLS-1:0] s;
    do s = N_CELLS'($urandom); while ($countones(s) != 3);
    return s;
  endfunction

  initial begin
    #(10) clear = 1'b1;   // an edge, so that the asynchronous clears act
    // 50 ps example pair first, over intervals up to three slow periods.
    for (int i = 0; i < 12; i++) measure(longint'($urandom_range(0, 28000)));
    measure(0);
    measure(25000);
    // Random selections, the faster ring always used as the fast oscillator.
    for (int p = 0; p < 10; p++) begin
      logic [N_CELLS-1:0] a, b;
      a = rand_sel3();
      b = rand_sel3();
      if (period_of(a) == period_of(b)) continue;
      if (period_of(a) > period_of(b)) begin sel_slow = a; sel_fast = b; end
      else begin sel_slow = b; sel_fast = a; end
      for (int i = 0; i < 3; i++) measure(longint'($urandom_range(0, 20000)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(64'd2_000_000_000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
