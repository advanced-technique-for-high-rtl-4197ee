// tb_osc_counter -- checks edge counting, wrap-around and asynchronous clear.
//
// Each count must equal the number of rising edges applied since the last clear;
// the counter width and clear are this design's choices.
module tb_osc_counter;
  timeunit 1ps; timeprecision 1ps;

  logic clk = 1'b0, clear = 1'b0;
  logic [7:0] count;
  int checks = 0, failures = 0;

  osc_counter #(.W(8)) dut (.osc_clk(clk), .clear(clear), .count(count));

  task automatic pulses(int n);
    repeat (n) begin
      #(500) clk = 1'b1;
      #(500) clk = 1'b0;
    end
  endtask

  task automatic check(int exp);
    checks++;
    if (count != 8'(exp)) begin
      failures++;
      $display("FAIL count %0d expected %0d", count, exp);
    end
  endtask

  initial begin
    #(10) clear = 1'b1;
    #(10) clear = 1'b0;
    check(0);
    for (int r = 0; r < 10; r++) begin
      int n;
      n = $urandom_range(1, 300);
      pulses(n);
      check(n);
      clear = 1'b1;   // asynchronous: acts without a clock edge
      #(10);
      check(0);
      clear = 1'b0;
    end
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
