// Kogge-Stone parallel-prefix adder, W bits, with carry in and carry out.
//
// Three parts, as in the classic description of the adder:
//   pre-processing   g[i] = a[i] & b[i], p[i] = a[i] ^ b[i]; the carry in is
//                    folded into bit 0 (g[0] |= p[0] & cin)
//   carry generation $clog2(W) levels; at level l every bit i >= 2**l merges
//                    the group (g,p) of bit i - 2**l into its own, so after
//                    the last level g[i] is the carry out of bits i..0
//   post-processing  sum[i] = p[i] ^ c[i], with c[0] = cin, c[i+1] = g[i]
// Every bit has its carry after log2(W) prefix levels; the price is about
// W*log2(W) prefix cells. Purely combinational, no clock.
module ks_adder #(
  parameter int unsigned W = 64
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);

  localparam int unsigned L = (W > 1) ? $clog2(W) : 1;

  logic [W-1:0] p_bit;
  logic [W-1:0] g_pre;
  logic [W-1:0] g_cur, p_cur, g_nxt, p_nxt;

  assign p_bit = a ^ b;

  // pre-processing
  always_comb begin
    g_pre    = a & b;
    g_pre[0] = (a[0] & b[0]) | (p_bit[0] & cin);
  end

  // carry generation: level l reads only the results of level l-1
  always_comb begin
    g_cur = g_pre;
    p_cur = p_bit;
    g_nxt = g_pre;
    p_nxt = p_bit;
    for (int unsigned l = 0; l < L; l++) begin
      g_nxt = g_cur;
      p_nxt = p_cur;
      for (int unsigned i = (1 << l); i < W; i++) begin
        // black cell: (g,p)_i o (g,p)_{i-2**l}
        g_nxt[i] = g_cur[i] | (p_cur[i] & g_cur[i - (1 << l)]);
        p_nxt[i] = p_cur[i] & p_cur[i - (1 << l)];
      end
      g_cur = g_nxt;
      p_cur = p_nxt;
    end
  end

  // Carries: c[0] = cin, c[i+1] = group generate of bits i..0.
  logic [W:0] carry;
  assign carry = {g_cur, cin};
  assign sum   = p_bit ^ carry[W-1:0];
  assign cout  = carry[W];

endmodule
