// Polar BP decoder node network: log2(N) cascaded stages of F/G butterflies.
//
// N sign-magnitude LLRs enter at the left of the factor graph; each of the
// M = log2(N) stages (see bp_stage) feeds every input pair (k, k+N/2)
// into one G node (approximate min-sum) and one F node (sign-magnitude sum
// on a parallel-prefix adder) and interleaves their results. The last
// stage's results are brought out split by node type: g_*[k] is the G
// output and f_*[k] the F output of butterfly k of the last stage. The
// whole network is combinational: its delay is M node delays, dominated in
// the F node by the prefix adder, which is why the adder choice (ADDER)
// sets the speed and size of the decoder.
//
// Default size follows the published chip: N = 8 inputs (three stages of
// 4 F and 4 G nodes), 64-bit magnitudes, Kogge-Stone adders; ADDER_BK gives
// the Brent-Kung version. The G node approximation K = 2 is the published
// example value. This is one pass over the graph, as in the published
// design; iteration, frozen-bit handling and hard decisions are not part
// of it. No clock.
module polar_decoder
  import bp_pkg::*;
#(
  parameter int unsigned N     = 8,
  parameter int unsigned W     = 64,
  parameter int unsigned K     = 2,
  parameter adder_e      ADDER = ADDER_KS
) (
  input  logic         in_sign [N],
  input  logic [W-1:0] in_mag  [N],
  output logic         f_sign  [N/2],
  output logic [W-1:0] f_mag   [N/2],
  output logic         g_sign  [N/2],
  output logic [W-1:0] g_mag   [N/2]
);

  localparam int unsigned M = $clog2(N);

  if (N < 2 || (1 << M) != N) begin : g_bad_n
    $error("polar_decoder: N must be a power of two, at least 2");
  end

  for (genvar s = 0; s < M; s++) begin : g_stage
    logic         st_sign [N];
    logic [W-1:0] st_mag  [N];
    if (s == 0) begin : g_first
      bp_stage #(.N(N), .W(W), .K(K), .ADDER(ADDER)) u_stage (
        .in_sign(in_sign), .in_mag(in_mag),
        .out_sign(st_sign), .out_mag(st_mag)
      );
    end else begin : g_next
      bp_stage #(.N(N), .W(W), .K(K), .ADDER(ADDER)) u_stage (
        .in_sign(g_stage[s-1].st_sign), .in_mag(g_stage[s-1].st_mag),
        .out_sign(st_sign), .out_mag(st_mag)
      );
    end
  end

  for (genvar k = 0; k < N/2; k++) begin : g_out
    assign g_sign[k] = g_stage[M-1].st_sign[2*k];
    assign g_mag[k]  = g_stage[M-1].st_mag[2*k];
    assign f_sign[k] = g_stage[M-1].st_sign[2*k+1];
    assign f_mag[k]  = g_stage[M-1].st_mag[2*k+1];
  end

endmodule
