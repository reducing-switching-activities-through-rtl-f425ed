// odd_invert_decoder: the link decoder of a destination network interface.
//
// Undoes odd_invert_encoder end to end. A body flit whose flag (bit W-1) is
// 1 has its odd data bits (1, 3, 5, ...) complemented again, which restores
// the original data because odd-bit inversion is its own inverse; a body flit
// with flag 0 and every header flit pass unchanged. The flag is dropped.
//
// Timing: one cycle, output registered on a cycle with in_valid; the output
// holds between flits. Interface: valid/head side-band, no back-pressure.
// The decoder is this design's counterpart of the published encoder; its
// registering and reset to zero are this design's own choices.
module odd_invert_decoder
  import noc_enc_pkg::*;
#(
  parameter int unsigned W = 9    // link width, flag bit included
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic         in_head,
  input  logic [W-1:0] in_flit,
  output logic         out_valid,
  output logic         out_head,
  output logic [W-2:0] out_data
);

  localparam logic [W-2:0] ODD = (W-1)'(odd_mask(W - 1));

  logic flag;
  assign flag = in_flit[W-1] && !in_head;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_head  <= 1'b0;
      out_data  <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_head <= in_head;
        out_data <= in_flit[W-2:0] ^ (flag ? ODD : '0);
      end
    end
  end

endmodule
