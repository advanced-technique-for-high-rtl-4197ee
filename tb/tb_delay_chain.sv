// tb_delay_chain -- checks that tap k follows the input k*TBUF_PS later.
//
// A random pulse train drives the chain; every input edge is recorded, and every
// tap must show the same edge exactly k*TBUF_PS later (checked one picosecond
// before and one after).
// The tap spacing is a parameter of this design; the reference gives no value.
module tb_delay_chain;
  timeunit 1ps; timeprecision 1ps;

  localparam int unsigned NTAP = 4, TB = 1500;

  logic din = 1'b0;
  logic [NTAP-1:0] tap;
  int checks = 0, failures = 0;

  delay_chain #(.NTAP(NTAP), .TBUF_PS(TB)) dut (.din(din), .tap(tap));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 50) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    #(10000);
    for (int e = 0; e < 30; e++) begin
      logic v;
      longint t0;
      v  = ~din;
      din = v;
      t0 = $time;
      for (int k = 1; k < NTAP; k++) begin
        #(t0 + k * TB - 1 - $time);
        check(tap[k] == ~v, $sformatf("tap %0d before its delay", k));
        #(2);
        check(tap[k] == v, $sformatf("tap %0d after its delay", k));
      end
      #(TB * NTAP + $urandom_range(0, 2000));
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
