// majority_voter: decides whether the odd bits of a flit are to be inverted.
//
// Counts how many of the N pair classifiers report the transition type the
// encoder is built for and asserts `invert` when that count exceeds N/2,
// i.e. when 2*count > N (strict majority). N is w-1 for a w-bit link, eight
// for the 9-bit flits of the reference configuration. Built as a population
// count followed by a comparator; purely combinational.
module majority_voter #(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0] ty,      // one bit per wire pair: selected type seen
  output logic         invert   // 1 when more than half of the pairs are set
);

  localparam int unsigned CW = $clog2(N + 1);

  logic [CW-1:0] count;

  always_comb begin
    count = '0;
    for (int unsigned i = 0; i < N; i++) count = count + CW'(ty[i]);
  end

  assign invert = ({1'b0, count, 1'b0} > (CW + 2)'(N));

endmodule
