// tb_hybrid_tdc -- self-checking testbench of the hybrid (delay chain) TDC.
//
// For each interval T the expected outcome is worked out from the periods and
// the tap spacing alone: at every fast edge the level of every tap is known (the
// slow clock, idle high before start, delayed by k*Td), the first edge at which
// some tap goes from high to low is the coincidence, and the result is latched
// on the next fast edge. N0, N1 and the latched tap vector must match, the
// reconstructed interval (N0 - [k>0])*T0 + k*Td - N1*T1 must be within dt of T,
// and N1 must stay below Td/dt + 3, which is the point of the architecture.
// The architecture follows the reference design; the result formula, the latch
// timing and the default tap spacing checked here are this design's.
module tb_hybrid_tdc;
  import tdc_pkg::*;
  timeunit 1ps; timeprecision 1ps;

  localparam int unsigned NTAP = 4;
  localparam longint TD = 2320;

  logic clear = 1'b0, start = 1'b0, stop = 1'b0;
  logic [N_CELLS-1:0] sel_slow = SEL_SLOW_DEF, sel_fast = SEL_FAST_DEF;
  tdc_result_t result;
  logic [NTAP-1:0] taps;
  logic valid;
  int checks = 0, failures = 0, max_n1 = 0;

  hybrid_tdc #(.NTAP(NTAP), .TBUF_PS(TD)) dut (.*);

  function automatic longint period_of(logic [N_CELLS-1:0] sel);
    longint half = TAND_PS_DEF;
    for (int i = 0; i < N_CELLS; i++)
      half += sel[N_CELLS-1-i] ? TINV_PS_DEF[i] : TPASS_PS_DEF[i];
    return 2 * half;
  endfunction

  // Level of tap k at time t (start at 0); returns 2 on an exact edge.
  function automatic int tap_level(longint t, int k, longint t0);
    longint u = t - k * TD;
    if (u < 0) return 1;
    if (u % t0 == 0 || u % t0 == t0 / 2) return 2;
    return ((u % t0) < t0 / 2) ? 1 : 0;
  endfunction

  function automatic bit predict(longint t, longint t0, longint t1, output longint n0,
                                 output longint n1, output logic [NTAP-1:0] tv);
    logic [NTAP-1:0] prev = '0, cur;
    longint tf, tl;
    for (longint j = 1; j < 60000; j++) begin
      tf = t + j * t1;
      for (int k = 0; k < NTAP; k++) begin
        int l = tap_level(tf, k, t0);
        if (l == 2) return 1'b0;
        cur[k] = l[0];
      end
      tv = (j >= 2) ? (prev & ~cur) : '0;
      if (tv != '0) begin
        n1 = j;
        tl = t + (j + 1) * t1;
        if (tl % t0 == 0) return 1'b0;
        n0 = tl / t0;
        return 1'b1;
      end
      prev = cur;
    end
    return 1'b0;
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 50) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic measure(longint t);
    longint t0, t1, n0, n1, est, dt;
    logic [NTAP-1:0] tv;
    int k;
    t0 = period_of(sel_slow);
    t1 = period_of(sel_fast);
    dt = t0 - t1;
    if (!predict(t, t0, t1, n0, n1, tv)) return;
    clear = 1'b1;
    #(30000) clear = 1'b0;
    #(1000);
    start = 1'b1;
    #(t) stop = 1'b1;
    fork
      wait (valid);
      #(t1 * (n1 + 20));
    join_any
    disable fork;
    check(valid, "measurement completed");
    check(longint'(result.n0) == n0, $sformatf("N0 %0d expected %0d", result.n0, n0));
    check(longint'(result.n1) == n1, $sformatf("N1 %0d expected %0d", result.n1, n1));
    check(taps == tv, $sformatf("taps %b expected %b", taps, tv));
    k = 0;
    for (int i = NTAP - 1; i >= 0; i--) if (taps[i]) k = i;
    est = (longint'(result.n0) - (k > 0 ? 1 : 0)) * t0 + k * TD - longint'(result.n1) * t1;
    check(est >= t && est - t < dt, $sformatf("estimate %0d for T=%0d (tap %0d)", est, t, k));
    check(longint'(result.n1) < TD / dt + 3, "coincidence within Td/dt periods");
    if (int'(result.n1) > max_n1) max_n1 = int'(result.n1);
    start = 1'b0;
    stop  = 1'b0;
  endtask

  initial begin
    #(10) clear = 1'b1;
    for (int i = 0; i < 40; i++) measure(longint'($urandom_range(0, 30000)));
    // a second selection with a smaller step
    sel_slow = 8'b0000_0111;
    sel_fast = 8'b0000_1011;
    if (period_of(sel_slow) < period_of(sel_fast)) begin
      sel_slow = 8'b0000_1011;
      sel_fast = 8'b0000_0111;
    end
    for (int i = 0; i < 20; i++) measure(longint'($urandom_range(0, 30000)));
    $display("largest N1 %0d", max_n1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(64'd2_000_000_000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
