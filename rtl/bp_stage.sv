// One stage of the polar BP factor graph: N/2 butterflies side by side.
//
// Butterfly k (k = 0 .. N/2-1) takes input k as operand a and input k+N/2
// as operand b (the perfect-shuffle wiring that every stage of the
// constant-geometry factor graph repeats). It drives output 2k with a G node
// (approximate min-sum) and output 2k+1 with an F node (sign-magnitude sum),
// both on the same pair of operands. Chaining log2(N) such stages reproduces
// the whole graph, since each stage applies the same shuffle.
//
// Data are sign-magnitude LLRs: in_sign/out_sign hold the signs, in_mag/
// out_mag the W-bit magnitudes. K is the G nodes' approximation, ADDER the
// F nodes' adder. Combinational, no clock.
module bp_stage
  import bp_pkg::*;
#(
  parameter int unsigned N     = 8,
  parameter int unsigned W     = 64,
  parameter int unsigned K     = 2,
  parameter adder_e      ADDER = ADDER_KS
) (
  input  logic         in_sign  [N],
  input  logic [W-1:0] in_mag   [N],
  output logic         out_sign [N],
  output logic [W-1:0] out_mag  [N]
);

  localparam int unsigned H = N / 2;

  for (genvar k = 0; k < H; k++) begin : g_bfly
    g_node #(.W(W), .K(K)) u_g (
      .sa(in_sign[k]),  .ma(in_mag[k]),
      .sb(in_sign[k+H]), .mb(in_mag[k+H]),
      .ss(out_sign[2*k]), .ms(out_mag[2*k])
    );
    f_node #(.W(W), .ADDER(ADDER)) u_f (
      .sa(in_sign[k]),  .ma(in_mag[k]),
      .sb(in_sign[k+H]), .mb(in_mag[k+H]),
      .ss(out_sign[2*k+1]), .ms(out_mag[2*k+1])
    );
  end

endmodule
