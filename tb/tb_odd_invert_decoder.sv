// tb_odd_invert_decoder: random link flits (header and body, flag 0 and 1)
// into the decoder; checks the one-cycle latency, the restored data, the
// header pass-through and that the output holds while no flit arrives.
module tb_odd_invert_decoder;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_head = 0;
  logic [8:0] in_flit = '0;
  logic out_valid, out_head;
  logic [7:0] out_data;
  logic [7:0] exp_data = '0;
  logic exp_head;
  int checks = 0, failures = 0;

  odd_invert_decoder dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int n = 0; n < 2000; n++) begin
      in_valid <= ($urandom_range(0, 3) != 0);
      in_head  <= ($urandom_range(0, 4) == 0);
      in_flit  <= 9'($urandom);
      @(posedge clk);
      #1;
      if (in_valid) begin
        exp_head = in_head;
        exp_data = in_flit[7:0];
        if (!in_head && in_flit[8]) exp_data = exp_data ^ 8'b1010_1010;
      end
      checks++;
      if (out_valid != in_valid || (in_valid && (out_head != exp_head || out_data != exp_data))
          || (!in_valid && out_data != exp_data)) begin
        failures++;
        $display("FAIL flit=%b head=%b v=%b -> data=%b head=%b v=%b expected %b",
                 in_flit, in_head, in_valid, out_data, out_head, out_valid, exp_data);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
