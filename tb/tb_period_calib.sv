// tb_period_calib -- checks the oscillator period count against a reference clock.
//
// The reference clock (TREF) and a free-running "oscillator" are generated here,
// and the testbench records every oscillator rising edge it makes, so the number
// of them inside the window (e0, e0 + n_ref*TREF) -- e0 being the reference edge
// that samples go -- is known without looking at the block. n_calib must equal it, done must rise exactly
// (n_ref + SETTLE) reference periods after e0, and busy must cover the run.
module tb_period_calib;
  timeunit 1ps; timeprecision 1ps;

  localparam longint TREF = 25000;
  localparam int unsigned SETTLE = 4;

  logic clk_ref = 1'b0, rst_n = 1'b1, go = 1'b0, osc_clk = 1'b0;
  logic [15:0] n_ref = '0;
  logic busy, done;
  logic [23:0] n_calib;
  longint tosc = 9282, osc0 = 777;
  int checks = 0, failures = 0;

  period_calib #(.REF_W(16), .CAL_W(24), .SETTLE(SETTLE)) dut (.*);

  always #(TREF / 2) clk_ref = ~clk_ref;   // rising edges at TREF/2 + k*TREF

  initial begin
    #(osc0);
    forever begin
      osc_clk = 1'b1; #(tosc / 2);
      osc_clk = 1'b0; #(tosc - tosc / 2);
    end
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // Times of all oscillator rising edges, as generated above.
  longint osc_rises [$];
  always @(posedge osc_clk) osc_rises.push_back($time);

  // Oscillator rising edges strictly inside (a, b).
  function automatic longint edges_between(longint a, longint b);
    longint n = 0;
    foreach (osc_rises[i]) if (osc_rises[i] > a && osc_rises[i] < b) n++;
    return n;
  endfunction

  task automatic run(int unsigned n);
    longint e0, t_done, expv;
    @(negedge clk_ref);
    n_ref = 16'(n);
    go = 1'b1;
    @(posedge clk_ref);
    e0 = $time;
    #(1) go = 1'b0;
    check(busy, "busy during window");
    @(posedge done);
    t_done = $time;
    expv = edges_between(e0, e0 + longint'(n) * TREF);
    check(t_done == e0 + longint'(n + SETTLE) * TREF, "done latency");
    check(longint'(n_calib) == expv, $sformatf("n_calib %0d expected %0d", n_calib, expv));
    #(1);
    check(!busy, "idle after done");
    // T_osc estimate from the counts is within T_osc / N_calib of the truth
    check((longint'(n) * TREF) / longint'(n_calib) - tosc < tosc / longint'(n_calib) + 1,
          "period estimate error bound");
  endtask

  initial begin
    #(10) rst_n = 1'b0;
    #(10) rst_n = 1'b1;
    run(1);
    run(10);
    run(37);
    run(200);
    tosc = 8996;
    run(100);
    tosc = 12345;
    run(64);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(64'd1_000_000_000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
