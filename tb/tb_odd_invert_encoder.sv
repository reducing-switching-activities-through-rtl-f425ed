// tb_odd_invert_encoder: drives the same random stream of header and body
// flits, with idle cycles, into four encoders built for Type 1, 2, 3 and 4
// and compares each link word, one cycle after the flit, with the reference
// encoder fed by its own previous link word. Also checks that every encoder
// both inverted and did not invert at least once, that header flits go out
// unencoded, and that the link holds while idle.
module tb_odd_invert_encoder;
  import noc_enc_pkg::*;
  import odd_invert_ref_pkg::*;

  localparam int W = 9;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_head = 0;
  logic [W-2:0] in_data = '0;
  logic [3:0]   out_valid, out_head, inv_taken;
  logic [W-1:0] out_flit [4];
  logic [W-1:0] model [4];
  int inv_count [4];
  int plain_count [4];
  int head_count = 0;
  int checks = 0, failures = 0;

  odd_invert_encoder #(.W(W), .TYPE(TYPE1)) dut1 (.clk, .rst_n, .in_valid, .in_head, .in_data,
    .out_valid(out_valid[0]), .out_head(out_head[0]), .out_flit(out_flit[0]), .inv_taken(inv_taken[0]));
  odd_invert_encoder #(.W(W), .TYPE(TYPE2)) dut2 (.clk, .rst_n, .in_valid, .in_head, .in_data,
    .out_valid(out_valid[1]), .out_head(out_head[1]), .out_flit(out_flit[1]), .inv_taken(inv_taken[1]));
  odd_invert_encoder #(.W(W), .TYPE(TYPE3)) dut3 (.clk, .rst_n, .in_valid, .in_head, .in_data,
    .out_valid(out_valid[2]), .out_head(out_head[2]), .out_flit(out_flit[2]), .inv_taken(inv_taken[2]));
  odd_invert_encoder #(.W(W), .TYPE(TYPE4)) dut4 (.clk, .rst_n, .in_valid, .in_head, .in_data,
    .out_valid(out_valid[3]), .out_head(out_head[3]), .out_flit(out_flit[3]), .inv_taken(inv_taken[3]));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 4; t++) begin
      model[t] = '0;
      inv_count[t] = 0;
      plain_count[t] = 0;
    end
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int n = 0; n < 4000; n++) begin
      in_valid <= ($urandom_range(0, 4) != 0);
      in_head  <= ($urandom_range(0, 7) == 0);
      // mix of random words and words close to the last one
      in_data  <= ($urandom_range(0, 1) != 0) ? 8'($urandom) : in_data ^ 8'(1 << $urandom_range(0, 7));
      @(posedge clk);
      #1;
      if (in_valid && in_head) head_count++;
      for (int t = 0; t < 4; t++) begin
        logic [W-1:0] exp_flit;
        logic         exp_inv;
        if (in_valid) begin
          exp_flit = in_head ? W'({1'b0, in_data}) : W'(ref_encode(W, 64'(model[t]), 64'(in_data), t + 1));
          exp_inv  = exp_flit[W-1];
          model[t] = exp_flit;
          if (!in_head) begin
            if (exp_inv) inv_count[t]++;
            else plain_count[t]++;
          end
          checks++;
          if (out_valid[t] !== 1'b1 || out_head[t] != in_head || out_flit[t] != exp_flit
              || inv_taken[t] != exp_inv) begin
            failures++;
            $display("FAIL type %0d data=%b head=%b out=%b expected %b inv=%b",
                     t + 1, in_data, in_head, out_flit[t], exp_flit, inv_taken[t]);
          end
        end else begin
          checks++;
          if (out_valid[t] !== 1'b0 || out_flit[t] != model[t]) begin
            failures++;
            $display("FAIL type %0d idle: link changed to %b from %b", t + 1, out_flit[t], model[t]);
          end
        end
      end
    end
    for (int t = 0; t < 4; t++) begin
      $display("type %0d: %0d body flits inverted, %0d sent plain", t + 1, inv_count[t], plain_count[t]);
      checks++;
      if (inv_count[t] == 0 || plain_count[t] == 0) begin
        failures++;
        $display("FAIL type %0d never exercised both decisions", t + 1);
      end
    end
    checks++;
    if (head_count == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
