// tb_calib_sweep -- checks the sweep order, the handshakes and the records.
//
// The testbench stands in for the TDC: on cal_go it answers with cal_done a few
// reference periods later, with period counts derived from the select words, and
// raises beat_valid (fast-domain flag, here driven asynchronously) after a delay
// that also depends on the words; equal words never give a beat, so the timeout
// must end those runs. The rings must be stopped (tdc_clear high, free_run low)
// whenever the select words change. Every one of the 56 x 56 three-inverter pairs
// must be reported once, in order, with the right contents.
// Sweeping all three-inverter pairs follows the reference design; the order,
// timeout and record format checked are this design's.
module tb_calib_sweep;
  import tdc_pkg::*;
  timeunit 1ps; timeprecision 1ps;

  localparam longint TREF = 25000;

  logic clk_ref = 1'b0, rst_n = 1'b1, go = 1'b0;
  logic [19:0] beat_timeout = 20'd40;
  logic [N_CELLS-1:0] sel_slow, sel_fast;
  logic tdc_clear, free_run, cal_go, cal_done = 1'b0, beat_valid = 1'b0;
  logic [CAL_W-1:0] n_calib_slow = '0, n_calib_fast = '0;
  logic [CNT_W-1:0] beat = '0;
  logic busy, done, rec_valid;
  sweep_rec_t rec;
  int checks = 0, failures = 0, records = 0, timeouts = 0;
  logic [N_CELLS-1:0] exp_s = '0, exp_f = '0;

  calib_sweep dut (.*);

  always #(TREF / 2) clk_ref = ~clk_ref;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 50) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  function automatic int unsigned beat_delay(logic [N_CELLS-1:0] s, logic [N_CELLS-1:0] f);
    return 3 + (int'(s) + 3 * int'(f)) % 17;
  endfunction

  // Next word with three ones after w (w itself excluded); 256 means none.
  function automatic int next3(int w);
    for (int v = w + 1; v < 256; v++) if ($countones(8'(v)) == 3) return v;
    return 256;
  endfunction

  // TDC stand-in: period calibration answers 5 reference periods after cal_go.
  always @(posedge clk_ref) begin
    if (cal_go) begin
      cal_done <= 1'b0;
      fork begin
        repeat (5) @(posedge clk_ref);
        n_calib_slow <= CAL_W'(1000 + sel_slow);
        n_calib_fast <= CAL_W'(2000 + sel_fast);
        cal_done <= 1'b1;
      end join_none
    end
  end

  // Beat counter stand-in: asynchronous flag, cleared while the rings are stopped.
  always @(posedge clk_ref) begin
    if (tdc_clear || !free_run) beat_valid <= 1'b0;
    if (cal_go && sel_slow != sel_fast) begin
      fork begin
        logic [N_CELLS-1:0] s, f;
        s = sel_slow;
        f = sel_fast;
        #(longint'(beat_delay(s, f)) * TREF + 7000);
        if (free_run && !tdc_clear) begin
          beat = CNT_W'(s) * 3 + CNT_W'(f);
          beat_valid = 1'b1;
        end
      end join_none
    end
  end

  // Select words may only change while the rings are stopped.
  logic [N_CELLS-1:0] last_s = '0, last_f = '0;
  always @(posedge clk_ref) begin
    if (rst_n && (sel_slow != last_s || sel_fast != last_f)) begin
      #(1);
      check(tdc_clear && !free_run, "select words change with the rings stopped");
    end
    last_s = sel_slow;
    last_f = sel_fast;
  end

  always @(posedge clk_ref) begin
    if (rec_valid) begin
      records++;
      check(rec.sel_slow == exp_s && rec.sel_fast == exp_f,
            $sformatf("pair %0d/%0d expected %0d/%0d", rec.sel_slow, rec.sel_fast, exp_s, exp_f));
      check(rec.n_calib_slow == CAL_W'(1000 + rec.sel_slow) &&
            rec.n_calib_fast == CAL_W'(2000 + rec.sel_fast), "period counts in record");
      if (rec.sel_slow == rec.sel_fast) begin
        timeouts++;
        check(!rec.beat_ok, "equal words end by timeout");
      end else begin
        check(rec.beat_ok && rec.beat == CNT_W'(rec.sel_slow) * 3 + CNT_W'(rec.sel_fast),
              "beat in record");
      end
      if (next3(int'(exp_f)) < 256) exp_f = 8'(next3(int'(exp_f)));
      else begin
        exp_s = 8'(next3(int'(exp_s)));
        exp_f = 8'(next3(-1));
      end
    end
  end

  initial begin
    exp_s = 8'(next3(-1));
    exp_f = 8'(next3(-1));
    #(10) rst_n = 1'b0;
    #(10) rst_n = 1'b1;
    @(negedge clk_ref) go = 1'b1;
    @(negedge clk_ref) go = 1'b0;
    check(busy, "busy after go");
    wait (done);
    check(records == 56 * 56, $sformatf("%0d records, expected 3136", records));
    check(timeouts == 56, "one timeout per equal pair");
    check(!busy, "idle after the sweep");
    $display("records %0d, timeouts %0d", records, timeouts);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(64'd20_000_000_000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
