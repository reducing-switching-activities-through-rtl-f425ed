// tb_majority_voter: exhaustive check of the majority decision for the
// reference width N=8 (invert when more than 4 of 8 inputs are set) and for
// an odd width N=7 (more than 3.5, i.e. at least 4 of 7).
module tb_majority_voter;
  logic [7:0] ty8;
  logic [6:0] ty7;
  logic inv8, inv7;
  int checks = 0, failures = 0;

  majority_voter dut8 (.ty(ty8), .invert(inv8));
  majority_voter #(.N(7)) dut7 (.ty(ty7), .invert(inv7));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) begin
      ty8 = 8'(i);
      ty7 = 7'(i);
      #1;
      checks += 2;
      if (inv8 != ($countones(ty8) >= 5)) begin
        failures++;
        $display("FAIL N=8 ty=%b invert=%b", ty8, inv8);
      end
      if (inv7 != ($countones(ty7) >= 4)) begin
        failures++;
        $display("FAIL N=7 ty=%b invert=%b", ty7, inv7);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
