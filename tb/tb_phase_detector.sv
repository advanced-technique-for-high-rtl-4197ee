// tb_phase_detector -- checks coincidence detection with two free-running clocks.
//
// The testbench generates a slow clock (period TS, high during the first half of
// each period) and a fast clock (period TF < TS) with a chosen initial offset.
// The slow level at every fast edge is known from the time alone; phase must be
// high after fast edge j exactly when the slow clock was high at edge j-1 and
// low at edge j, i.e. on the first fast edge ahead of a slow rising edge.
// Several period pairs and offsets are run, and clear is checked.
// The detection rule is the reference design's; the clear is this design's.
module tb_phase_detector;
  timeunit 1ps; timeprecision 1ps;

  logic fast_clk = 1'b0, slow_clk = 1'b1, clear = 1'b0, phase;
  int checks = 0, failures = 0;
  int detections = 0;

  phase_detector dut (.fast_clk(fast_clk), .slow_clk(slow_clk), .clear(clear), .phase(phase));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 50) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  function automatic bit slow_level(longint t, longint ts);
    return (t % ts) < ts / 2;
  endfunction

  task automatic run(longint ts, longint tf, longint off, int n_fast);
    longint t0, tj;
    bit prev, cur, exp;
    clear = 1'b1;
    #(100) clear = 1'b0;
    t0 = $time;
    fork
      // slow clock: rising at t0 + k*ts, high for the first half period
      begin
        for (int k = 0; k < n_fast * tf / ts + 2; k++) begin
          slow_clk = 1'b1; #(ts / 2);
          slow_clk = 1'b0; #(ts - ts / 2);
        end
      end
      // fast clock: rising at t0 + off + j*tf
      begin
        #(off);
        for (int j = 0; j < n_fast; j++) begin
          tj = off + j * tf;
          fast_clk = 1'b1;
          #(1);
          cur = slow_level(tj, ts);
          exp = (j >= 1) && prev && !cur;
          check(phase == exp, "phase output");
          if (phase) detections++;
          prev = cur;
          #(tf / 2 - 1);
          fast_clk = 1'b0;
          #(tf - tf / 2);
        end
      end
    join
    slow_clk = 1'b1;
  endtask

  initial begin
    run(10000, 9700, 3333, 200);
    run(9282, 8996, 1, 200);
    run(9282, 8996, 7001, 200);
    run(12000, 11950, 500, 700);
    check(detections >= 8, "coincidences were detected");
    // clear empties both flip-flops
    clear = 1'b1;
    #(10);
    check(phase == 1'b0, "phase low in clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(64'd100_000_000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
