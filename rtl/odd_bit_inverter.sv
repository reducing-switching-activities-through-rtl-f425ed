// odd_bit_inverter: applies the encoder's decision to one flit.
//
// When `invert` is 1 the data bits with odd index (1, 3, 5, ...) are
// complemented and the even bits pass unchanged; the decision itself is
// written into the top bit, W-1, which tells the receiving interface that the
// flit must be re-inverted. When `invert` is 0 the data pass as they are with
// a 0 flag, so z[W-1] is the invert input wired straight through. Purely
// combinational. W is the link width including the flag.
module odd_bit_inverter
  import noc_enc_pkg::*;
#(
  parameter int unsigned W = 9
) (
  input  logic [W-2:0] x,       // data bits X_0 .. X_w-2
  input  logic         invert,  // majority voter decision
  output logic [W-1:0] z        // {flag, encoded data}
);

  localparam logic [W-2:0] ODD = (W-1)'(odd_mask(W - 1));

  assign z = {invert, x ^ (invert ? ODD : '0)};

endmodule
