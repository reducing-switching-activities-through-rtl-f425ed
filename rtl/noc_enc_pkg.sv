// noc_enc_pkg: types and helpers shared by the odd-bit-inversion link encoder.
//
// trans_type_e names the four kinds of transition a pair of adjacent link
// wires can make between two consecutive flits (see transition_block). The
// encoder is built for one of them: it counts how many wire pairs make that
// kind of transition and inverts the odd bits of the flit when they are a
// majority. odd_mask() gives the mask of odd-indexed bits of a data word.
package noc_enc_pkg;

  // Type 1: one wire of the pair switches, the other holds.
  // Type 2: the wires switch in opposite directions (01 <-> 10).
  // Type 3: both wires switch in the same direction (00 <-> 11).
  // Type 4: neither wire switches.
  typedef enum logic [1:0] {
    TYPE1 = 2'd0,
    TYPE2 = 2'd1,
    TYPE3 = 2'd2,
    TYPE4 = 2'd3
  } trans_type_e;

  // Mask with a 1 in every odd bit position (1, 3, 5, ...) of an n-bit word.
  function automatic logic [63:0] odd_mask(input int unsigned n);
    logic [63:0] m;
    m = '0;
    for (int unsigned i = 1; i < n && i < 64; i += 2) m[i] = 1'b1;
    return m;
  endfunction

endpackage
