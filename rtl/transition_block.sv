// transition_block: classifies the transition made by one pair of adjacent
// link wires between the previous encoded flit (y) and the new flit (x).
//
// Bit 0 of each 2-bit input is the lower-indexed wire of the pair. The output
// is one-hot: ty[0] Type 1 (exactly one wire switches), ty[1] Type 2 (both
// switch in opposite directions, 01 <-> 10), ty[2] Type 3 (both switch in the
// same direction, 00 <-> 11), ty[3] Type 4 (no switching). The four-way
// split and the Type 1 / Type 2 cases follow the published truth table; for
// Types 3 and 4 the written definitions are followed (both wires switching
// together is Type 3, an unchanged pair is Type 4). Purely combinational.
module transition_block (
  input  logic [1:0] x,   // new pair X_i, X_i+1
  input  logic [1:0] y,   // previous encoded pair Y_i, Y_i+1
  output logic [3:0] ty   // one-hot type, bit n-1 = Type n
);

  logic [1:0] sw;  // which wires switch

  always_comb begin
    sw = x ^ y;
    ty = '0;
    unique case (sw)
      2'b00:        ty[3] = 1'b1;                 // no change
      2'b01, 2'b10: ty[0] = 1'b1;                 // one wire switches
      2'b11: begin
        if (x[0] != x[1]) ty[1] = 1'b1;           // 01 <-> 10, opposite
        else              ty[2] = 1'b1;           // 00 <-> 11, same way
      end
      default:      ty = '0;
    endcase
  end

endmodule
