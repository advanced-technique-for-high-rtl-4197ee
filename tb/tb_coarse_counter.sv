// tb_coarse_counter -- checks the coarse count held at the trigger and the stop
// generated on the next reference edge.
//
// Reference edges come at TREF/2 + k*TREF after reset release; the count at a
// trigger is the number of edges before it, and ref_stop must rise exactly on the
// first reference edge after the trigger.
module tb_coarse_counter;
  timeunit 1ps; timeprecision 1ps;

  localparam longint TREF = 25000;

  logic clk_ref = 1'b0, rst_n = 1'b1, clear = 1'b0, start = 1'b0;
  logic [15:0] count, coarse;
  logic ref_stop;
  longint t_rel;
  int checks = 0, failures = 0;

  coarse_counter #(.W(16)) dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    #(10) rst_n = 1'b0;
    clear = 1'b1;
    #(10);
    rst_n = 1'b1;
    t_rel = $time;
    fork
      forever #(TREF / 2) clk_ref = ~clk_ref;
    join_none
    for (int i = 0; i < 20; i++) begin
      longint wait_ps, t_trig, n_before, t_stop;
      clear = 1'b1;
      #(1000) clear = 1'b0;
      wait_ps = $urandom_range(1000, 200000);
      #(wait_ps);
      if ((($time - t_rel) % TREF) == TREF / 2) #(3);   // keep clear of an edge
      t_trig = $time;
      start = 1'b1;
      #(1);
      n_before = (t_trig - t_rel + TREF / 2) / TREF;
      check(longint'(coarse) == n_before, $sformatf("coarse %0d expected %0d", coarse, n_before));
      @(posedge ref_stop);
      t_stop = $time;
      check(t_stop == t_rel + TREF / 2 + n_before * TREF, "ref_stop on the next reference edge");
      start = 1'b0;
    end
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
