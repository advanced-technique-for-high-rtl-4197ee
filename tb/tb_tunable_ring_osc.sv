// tb_tunable_ring_osc -- closes the ring and checks its period for every select word.
//
// The expected period is 2 * (TAND + sum of the pass or invert delay of every
// stage), computed here from the delay tables. For each odd-weight select word the
// testbench enables the ring and checks: outClock rests high while disabled, the
// first rising edge comes exactly one period after the enable, and the next
// periods all have the expected length. An even-weight word must not oscillate.
// The structure and the odd-inverter rule follow the reference design; the
// delay tables and bit order are this design's model.
module tb_tunable_ring_osc;
  import tdc_pkg::*;
  timeunit 1ps; timeprecision 1ps;

  logic [N_CELLS-1:0] sel = SEL_SLOW_DEF;
  logic en = 1'b0, osc;
  int checks = 0, failures = 0;
  int unsigned edges = 0;
  longint last_rise = 0;
  longint rises [$];

  tunable_ring_osc dut (.sel(sel), .fbin(osc), .clockEnb(en), .outClock(osc));

  always @(posedge osc) begin
    edges++;
    rises.push_back($time);
  end

  function automatic longint period_of(logic [N_CELLS-1:0] s);
    longint half = TAND_PS_DEF;
    for (int i = 0; i < N_CELLS; i++)
      half += s[N_CELLS-1-i] ? TINV_PS_DEF[i] : TPASS_PS_DEF[i];
    return 2 * half;
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (sel=%0d)", what, sel);
    end
  endtask

  task automatic run(logic [N_CELLS-1:0] s);
    longint t_en, t;
    t = period_of(s);
    en = 1'b0;
    #(40000);
    sel = s;
    #(40000);
    if (^s) check(osc === 1'b1, "idle level");
    rises.delete();
    t_en = $time;
    en = 1'b1;
    #(t * 6 + 10);
    if (^s) begin
      check(rises.size() == 6, "number of periods");
      for (int k = 0; k < rises.size(); k++)
        check(rises[k] == t_en + (k + 1) * t, "rising edge position");
    end else begin
      check(rises.size() == 0, "even-weight word must not oscillate");
    end
    en = 1'b0;
  endtask

  initial begin
    run(SEL_SLOW_DEF);
    run(SEL_FAST_DEF);
    run(8'b1111_1111);
    run(8'b0000_0001);
    run(8'b1000_0000);
    run(8'b0000_0011);
    // Every one of the 128 odd-weight words.
    for (int w = 0; w < (1 << N_CELLS); w++)
      if (^N_CELLS'(w)) run(N_CELLS'(w));
    // Moving one inverter changes the period by the difference of the spreads.
    check(period_of(8'b1000_0000) - period_of(8'b0100_0000) ==
          2 * ((longint'(TPASS_PS_DEF[1]) - TINV_PS_DEF[1]) - (longint'(TPASS_PS_DEF[0]) - TINV_PS_DEF[0])),
          "moving inverter formula");
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
