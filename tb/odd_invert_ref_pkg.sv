// odd_invert_ref_pkg: reference model of odd-bit-inversion link coding, used
// by the testbenches to work out expected values independently of the RTL.
//
// ref_type() looks the pair transition up in a 16-entry table indexed by
// {x_hi, x_lo, y_hi, y_lo}; ref_encode() applies the majority rule to a whole
// flit; link_cost() counts the self transitions (wires that toggle) and the
// coupling transitions (Type 1 pairs weigh 1, Type 2 pairs weigh 2) between
// two link words.
package odd_invert_ref_pkg;

  // Type number (1..4) for index {x1, x0, y1, y0}.
  localparam int TYPE_TABLE [16] = '{
    4, 1, 1, 3,   // x=00 : y=00 01 10 11
    1, 4, 2, 1,   // x=01
    1, 2, 4, 1,   // x=10
    3, 1, 1, 4    // x=11
  };

  function automatic int ref_type(input logic [1:0] x, input logic [1:0] y);
    return TYPE_TABLE[{x, y}];
  endfunction

  // Encode one body flit. prev is the W-bit word the link carries now,
  // ty is the counted type 1..4. Returns the W-bit encoded flit.
  function automatic logic [63:0] ref_encode(input int w, input logic [63:0] prev,
                                             input logic [63:0] data, input int ty);
    logic [63:0] x, r;
    int cnt;
    x = data & ((64'd1 << (w - 1)) - 1);   // flag position 0
    cnt = 0;
    for (int i = 0; i < w - 1; i++)
      if (ref_type({x[i+1], x[i]}, {prev[i+1], prev[i]}) == ty) cnt++;
    r = x;
    if (2 * cnt > w - 1) begin
      for (int i = 1; i < w - 1; i += 2) r[i] = ~x[i];
      r[w-1] = 1'b1;
    end
    return r;
  endfunction

  function automatic int self_cost(input int w, input logic [63:0] a, input logic [63:0] b);
    int c = 0;
    for (int i = 0; i < w; i++) if (a[i] != b[i]) c++;
    return c;
  endfunction

  function automatic int coupling_cost(input int w, input logic [63:0] a, input logic [63:0] b);
    int c = 0;
    for (int i = 0; i < w - 1; i++) begin
      case (ref_type({b[i+1], b[i]}, {a[i+1], a[i]}))
        1: c += 1;
        2: c += 2;
        default: ;
      endcase
    end
    return c;
  endfunction

endpackage
