// noc_path_model: behavioural stand-in for the network between two network
// interfaces, used only by testbenches. A wormhole-switched path delivers the
// flits of a packet in order and unchanged, so it is modelled as HOPS
// register stages (one per router/link hop) on the {valid, head, flit} word.
module noc_path_model #(
  parameter int unsigned WIDTH = 11,
  parameter int unsigned HOPS  = 3
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);
  logic [WIDTH-1:0] stage [HOPS];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < HOPS; i++) stage[i] <= '0;
    end else begin
      stage[0] <= d;
      for (int i = 1; i < HOPS; i++) stage[i] <= stage[i-1];
    end
  end

  assign q = stage[HOPS-1];
endmodule
