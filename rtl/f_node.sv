// F node: sign-magnitude addition of two LLRs (the variable-node sum of the
// polar BP factor graph), built around a parallel-prefix adder.
//
// How it works: a magnitude comparator decides whether Mb > Ma. The result
// sign is the sign of the larger magnitude (Sb when Mb > Ma, else Sa). If
// the signs agree, both magnitudes go to the adder unchanged and the adder
// returns Ma + Mb. If they differ, the smaller magnitude is bit-inverted on
// its way to the adder and the adder's carry in is set, so the adder returns
// larger - smaller in two's complement, which is never negative: no second
// negation of the result is needed. The adder is a Kogge-Stone or a
// Brent-Kung adder, chosen by ADDER.
//
// Published: the two operand selectors (M or -M) feeding one Kogge-Stone or
// Brent-Kung adder, and the comparator choosing between Sa and Sb for the
// result sign. This design's own choices: which operand is negated (the
// smaller one, picked by the same comparator), negation by inversion plus
// carry in, and saturation of the magnitude to all ones when Ma + Mb does
// not fit in W bits. A zero result of opposite-sign inputs carries Sa.
// Combinational, no clock.
module f_node
  import bp_pkg::*;
#(
  parameter int unsigned W     = 64,
  parameter adder_e      ADDER = ADDER_KS
) (
  input  logic         sa,
  input  logic [W-1:0] ma,
  input  logic         sb,
  input  logic [W-1:0] mb,
  output logic         ss,
  output logic [W-1:0] ms
);

  logic         b_gt_a;    // comparator: 1 selects Sb
  logic         sub;       // signs differ: subtract
  logic [W-1:0] op_a, op_b;
  logic [W-1:0] sum;
  logic         cout;

  assign b_gt_a = mb > ma;
  assign sub    = sa ^ sb;

  // operand selectors: pass M or its inverse (with cin = 1 this is -M)
  assign op_a = (sub && b_gt_a)  ? ~ma : ma;
  assign op_b = (sub && !b_gt_a) ? ~mb : mb;

  if (ADDER == ADDER_BK) begin : g_bk
    bk_adder #(.W(W)) u_add (.a(op_a), .b(op_b), .cin(sub), .sum(sum), .cout(cout));
  end else begin : g_ks
    ks_adder #(.W(W)) u_add (.a(op_a), .b(op_b), .cin(sub), .sum(sum), .cout(cout));
  end

  // A carry out of a same-sign sum is an overflow; of a difference it is
  // the expected "no borrow" and is dropped.
  assign ms = (!sub && cout) ? '1 : sum;
  assign ss = b_gt_a ? sb : sa;

endmodule
