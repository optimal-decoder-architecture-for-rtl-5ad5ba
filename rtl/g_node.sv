// G node: approximate min-sum check message of the polar BP factor graph.
//
// Inputs and output are sign-magnitude LLRs. The output sign is Sa xor Sb;
// the output magnitude is the smaller of Ma and Mb. The magnitude
// comparator is approximate: it compares only the upper bits Ma[W-1:K] and
// Mb[W-1:K]. If Ma's upper bits are greater, the whole of Mb is passed
// (upper and lower bits alike); otherwise the whole of Ma is passed. The K
// lower bits are ignored by the comparison, which shortens the comparator;
// a wrong choice needs equal upper bits and Ma[K-1:0] > Mb[K-1:0], so for
// uniform inputs the error rate is (2**K - 1) / 2**(W+1).
//
// The structure (XOR for the sign, one comparator steering both the upper
// and the lower multiplexer) and the example K = 2 follow the published
// architecture; K = 0 gives an exact comparator. Combinational, no clock.
module g_node #(
  parameter int unsigned W = 64,  // magnitude width
  parameter int unsigned K = 2    // low bits left out of the comparison
) (
  input  logic         sa,
  input  logic [W-1:0] ma,
  input  logic         sb,
  input  logic [W-1:0] mb,
  output logic         ss,
  output logic [W-1:0] ms
);

  // synthesis-time check of the parameters
  if (K >= W) begin : g_bad_k
    $error("g_node: K must be smaller than W");
  end

  logic a_gt_b;  // comparator output, 1 selects b

  assign a_gt_b = ma[W-1:K] > mb[W-1:K];
  assign ms     = a_gt_b ? mb : ma;
  assign ss     = sa ^ sb;

endmodule
