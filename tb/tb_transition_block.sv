// tb_transition_block: exhaustive check of the pair transition classifier.
// All 16 combinations of the new pair x and the previous pair y are applied
// and the one-hot output is compared with the reference table.
module tb_transition_block;
  import odd_invert_ref_pkg::*;

  logic [1:0] x, y;
  logic [3:0] ty;
  int checks = 0, failures = 0;

  transition_block dut (.x(x), .y(y), .ty(ty));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) begin
      {x, y} = 4'(i);
      #1;
      checks++;
      if (ty != 4'(1 << (ref_type(x, y) - 1))) begin
        failures++;
        $display("FAIL x=%b y=%b ty=%b expected type %0d", x, y, ty, ref_type(x, y));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
