// tb_beat_calib -- checks the count of fast periods between two coincidences.
//
// The testbench clocks the block and raises phase for one period at fast edges it
// chooses. beat must equal the number of fast periods between the first two
// pulses after clear, beat_valid must rise on the second pulse's edge, and later
// pulses must not change the held result.
// The expected beat follows the calibration rule of the reference design (fast
// periods between coincidences); the one-shot protocol checked is this design's.
module tb_beat_calib;
  timeunit 1ps; timeprecision 1ps;

  logic fast_clk = 1'b0, clear = 1'b0, phase = 1'b0;
  logic [15:0] beat;
  logic beat_valid;
  int checks = 0, failures = 0;

  beat_calib #(.W(16)) dut (.*);

  task automatic tick(logic ph);
    phase = ph;
    #(450) fast_clk = 1'b1;
    #(450) fast_clk = 1'b0;
  endtask

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic run(int unsigned lead, int unsigned n);
    clear = 1'b1;
    #(10) clear = 1'b0;
    repeat (lead) tick(1'b0);
    tick(1'b1);                  // first coincidence
    repeat (n - 1) begin
      tick(1'b0);
      check(!beat_valid, "no result before the second coincidence");
    end
    tick(1'b1);                  // second coincidence, n periods later
    check(beat_valid, "beat_valid after the second coincidence");
    check(beat == 16'(n), $sformatf("beat %0d expected %0d", beat, n));
    repeat (5) tick(1'b0);
    tick(1'b1);                  // a third pulse must not disturb the result
    check(beat == 16'(n), "result held");
  endtask

  initial begin
    #(10);
    run(3, 2);
    run(0, 186);
    for (int i = 0; i < 8; i++) run($urandom_range(0, 50), $urandom_range(2, 400));
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
