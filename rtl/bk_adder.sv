// Brent-Kung parallel-prefix adder, W bits, with carry in and carry out.
//
// Same pre- and post-processing as the Kogge-Stone adder; the carry tree is
// built in two sweeps instead of a full prefix network:
//   up-sweep   at level l = 1..L every bit i with (i+1) a multiple of 2**l
//              merges bit i - 2**(l-1), giving the spans 1:0, 3:0, 7:0, ...
//   down-sweep at level l = L-1..1 every bit i >= 2**l with
//              (i+1) mod 2**l == 2**(l-1) merges bit i - 2**(l-1), filling in
//              the prefixes the up-sweep left open (11:0, then 5:0, 9:0, 13:0,
//              then every even bit)
// This needs about 2*W prefix cells against W*log2(W) for Kogge-Stone, at
// the cost of 2*log2(W)-1 levels of carry logic. The carry in is folded into
// bit 0 of the generate vector. Purely combinational, no clock.
module bk_adder #(
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
  logic [W-1:0] g_tree, p_tree;

  assign p_bit = a ^ b;

  always_comb begin
    g_pre    = a & b;
    g_pre[0] = (a[0] & b[0]) | (p_bit[0] & cin);
  end

  // Within one level no merged bit is also a source of that level, so the
  // cells of a level can be evaluated in place.
  always_comb begin
    g_tree = g_pre;
    p_tree = p_bit;
    // up-sweep
    for (int unsigned l = 1; l <= L; l++) begin
      for (int unsigned i = 0; i < W; i++) begin
        if (((i + 1) % (1 << l)) == 0) begin
          g_tree[i] = g_tree[i] | (p_tree[i] & g_tree[i - (1 << (l - 1))]);
          p_tree[i] = p_tree[i] & p_tree[i - (1 << (l - 1))];
        end
      end
    end
    // down-sweep
    for (int l = int'(L) - 1; l >= 1; l--) begin
      for (int unsigned i = 0; i < W; i++) begin
        if ((i >= (1 << l)) && (((i + 1) % (1 << l)) == (1 << (l - 1)))) begin
          g_tree[i] = g_tree[i] | (p_tree[i] & g_tree[i - (1 << (l - 1))]);
          p_tree[i] = p_tree[i] & p_tree[i - (1 << (l - 1))];
        end
      end
    end
  end

  logic [W:0] carry;
  assign carry = {g_tree, cin};
  assign sum   = p_bit ^ carry[W-1:0];
  assign cout  = carry[W];

endmodule
