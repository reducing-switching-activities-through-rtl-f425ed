// tb_odd_bit_inverter: checks all 256 data words of the 9-bit link with and
// without inversion: odd bits complemented, even bits kept, flag = decision.
module tb_odd_bit_inverter;
  logic [7:0] x;
  logic       inv;
  logic [8:0] z, exp_z;
  int checks = 0, failures = 0;

  odd_bit_inverter dut (.x(x), .invert(inv), .z(z));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 512; i++) begin
      {inv, x} = 9'(i);
      #1;
      exp_z[8] = inv;
      for (int b = 0; b < 8; b++) exp_z[b] = (inv && (b % 2 == 1)) ? ~x[b] : x[b];
      checks++;
      if (z != exp_z) begin
        failures++;
        $display("FAIL x=%b inv=%b z=%b expected %b", x, inv, z, exp_z);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
