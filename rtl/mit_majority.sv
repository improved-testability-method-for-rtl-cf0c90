// mit_majority -- the majority operator '#' that turns the partial
// faulty/healthy flags produced by a unit's testing neighbours into the unit's
// final flag (rules (3) and (6)).
//
// votes[i] = 1 means "testing neighbour i considers this unit healthy".
// healthy = 1 when more than half of the N votes are 1. N must be odd, which
// the neighbour rules guarantee (3 voters in a 2-D mesh, 7 in a 3-D mesh).
// Purely combinational; no clock, no latency. The adder-tree form of the vote
// is this design's own choice: the text gives only the operator.
module mit_majority #(
  parameter int unsigned N = 3
) (
  input  logic [N-1:0] votes,
  output logic         healthy
);

  if (N % 2 == 0) begin : g_bad_n
    $error("mit_majority: N must be odd");
  end

  localparam int unsigned CW = $clog2(N + 1);

  logic [CW-1:0] ones;

  always_comb begin
    ones = '0;
    for (int unsigned i = 0; i < N; i++) ones = ones + CW'(votes[i]);
  end

  assign healthy = (ones > CW'(N / 2));

endmodule
