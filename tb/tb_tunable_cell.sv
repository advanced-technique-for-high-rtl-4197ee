// tb_tunable_cell -- checks the function and the two delays of one oscillator stage.
//
// Every combination of input and select is applied; the output must keep its old
// value one picosecond before the delay of the new mode has elapsed and show
// in ^ sel when it has (TPASS_PS for sel = 0, TINV_PS for sel = 1).
// The truth table is the reference design's; the delay values are this design's
// model.
module tb_tunable_cell;
  timeunit 1ps; timeprecision 1ps;

  localparam int unsigned TP = 417, TI = 379;

  logic in = 1'b0, sel = 1'b0, out;
  int checks = 0, failures = 0;

  tunable_cell #(.TPASS_PS(TP), .TINV_PS(TI)) dut (.in(in), .sel(sel), .out(out));

  task automatic apply(logic i, logic s);
    logic old_out;
    int unsigned d;
    #(2000);
    old_out = out;
    in  = i;
    sel = s;
    d = s ? TI : TP;
    #(d - 1);
    checks++;
    if (out !== old_out) begin
      failures++;
      $display("FAIL early change in=%b sel=%b", i, s);
    end
    #(2);
    checks++;
    if (out !== (i ^ s)) begin
      failures++;
      $display("FAIL in=%b sel=%b out=%b after %0d ps", i, s, out, d);
    end
  endtask

  initial begin
    for (int r = 0; r < 4; r++)
      for (int k = 0; k < 4; k++) apply(k[0], k[1]);
    for (int r = 0; r < 20; r++) apply(1'($urandom), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(10_000_000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
