// odd_invert_encoder: the link encoder E of a source network interface.
//
// Body flits are encoded by odd-bit inversion before they enter the network
// so that the link carries fewer wire transitions. The W-bit candidate flit
// X = {0, in_data} (flag position 0) is compared with the previous encoded
// flit Y that the link is still carrying. Each pair of adjacent wires
// (X_i X_i+1 against Y_i Y_i+1, i = 0 .. W-2, the flag position included)
// goes to a transition_block; the output for the transition type TYPE is
// collected into a (W-1)-bit vector, the majority_voter decides, and the
// odd_bit_inverter complements the odd data bits and sets the flag (bit W-1)
// when more than (W-1)/2 pairs made a TYPE transition. Header flits are not
// encoded: they go out as {0, in_data}.
//
// Timing: one cycle. The encoded flit is registered on a cycle with
// in_valid; the register is both the link driver and the feedback Y. While
// no flit is accepted the register holds, so the link wires stay still.
// Interface: a valid/head side-band travels with the flit, no back-pressure.
// The choice of TYPE and the comparison, voting and inversion follow the
// published encoder; the registering, side-band and reset to zero are this
// design's own choices.
module odd_invert_encoder
  import noc_enc_pkg::*;
#(
  parameter int unsigned W    = 9,       // link width, flag bit included
  parameter trans_type_e TYPE = TYPE1    // transition type that is counted
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic         in_head,
  input  logic [W-2:0] in_data,
  output logic         out_valid,
  output logic         out_head,
  output logic [W-1:0] out_flit,   // link wires; bit W-1 is the flag
  output logic         inv_taken   // flag of the flit on out_flit (body only)
);

  logic [W-1:0] x;         // candidate flit, flag position 0
  logic [W-2:0] t;         // per pair: selected type occurred
  logic         invert;
  logic [W-1:0] z;         // encoded body flit

  assign x = {1'b0, in_data};

  for (genvar i = 0; i < W - 1; i++) begin : g_pair
    logic [3:0] ty;
    transition_block u_ty (
      .x ({x[i+1], x[i]}),
      .y ({out_flit[i+1], out_flit[i]}),
      .ty(ty)
    );
    assign t[i] = ty[TYPE];
  end

  majority_voter #(.N(W - 1)) u_vote (
    .ty    (t),
    .invert(invert)
  );

  odd_bit_inverter #(.W(W)) u_inv (
    .x     (in_data),
    .invert(invert),
    .z     (z)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_head  <= 1'b0;
      out_flit  <= '0;
      inv_taken <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_head  <= in_head;
        out_flit  <= in_head ? x : z;
        inv_taken <= !in_head && invert;
      end
    end
  end

endmodule
