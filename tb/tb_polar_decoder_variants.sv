// Testbench of the decoder's other configurations.
//
// u_bk8:   N = 8, 64-bit magnitudes, Brent-Kung adders (the second adder
//          choice of the design at full width).
// u_ks64, u_bk64: N = 64 LLRs (six stages of 32 F and 32 G nodes) with
//          8-bit magnitudes, i.e. a 1-5-3 fixed-point LLR: sign, 5 integer
//          bits and 3 fraction bits; built with each adder.
// All are compared with the reference network on random vectors of small,
// near-full-scale and uniform magnitudes; the mechanism counters of the
// reference must all be non-zero at the end.
// Combinational: outputs are sampled 1 ns after the inputs change.
module tb_polar_decoder_variants;
  import bp_pkg::*;
  import tb_bp_ref_pkg::*;

  int checks   = 0;
  int failures = 0;

  // N = 8, W = 64, Brent-Kung
  logic        s8_in [8], s8_f [4], s8_g [4];
  logic [63:0] m8_in [8], m8_f [4], m8_g [4];
  polar_decoder #(.ADDER(ADDER_BK)) u_bk8 (
    .in_sign(s8_in), .in_mag(m8_in),
    .f_sign(s8_f), .f_mag(m8_f), .g_sign(s8_g), .g_mag(m8_g)
  );

  // N = 64, W = 8, both adders
  logic       s64_in [64], sk_f [32], sk_g [32], sb_f [32], sb_g [32];
  logic [7:0] m64_in [64], mk_f [32], mk_g [32], mb_f [32], mb_g [32];
  polar_decoder #(.N(64), .W(8), .ADDER(ADDER_KS)) u_ks64 (
    .in_sign(s64_in), .in_mag(m64_in),
    .f_sign(sk_f), .f_mag(mk_f), .g_sign(sk_g), .g_mag(mk_g)
  );
  polar_decoder #(.N(64), .W(8), .ADDER(ADDER_BK)) u_bk64 (
    .in_sign(s64_in), .in_mag(m64_in),
    .f_sign(sb_f), .f_mag(mb_f), .g_sign(sb_g), .g_mag(mb_g)
  );

  task automatic cmp(string tag, int k, logic gs, logic [63:0] gm, llr_t r);
    checks++;
    if (gs !== r.s || gm !== r.m) begin
      failures++;
      if (failures < 10) $display("FAIL %s[%0d] got %0d:%h exp %0d:%h", tag, k, gs, gm, r.s, r.m);
    end
  endtask

  initial begin : watchdog
    #10ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    llr_t x8[], x64[], y[];
    x8  = new[8];
    x64 = new[64];
    for (int t = 0; t < 5000; t++) begin
      for (int i = 0; i < 8; i++) begin
        x8[i].s = 1'($urandom);
        x8[i].m = rand_mag(64, t % 3);
        s8_in[i] = x8[i].s;
        m8_in[i] = x8[i].m;
      end
      for (int i = 0; i < 64; i++) begin
        x64[i].s = 1'($urandom);
        x64[i].m = rand_mag(8, (t + i) % 3);
        s64_in[i] = x64[i].s;
        m64_in[i] = 8'(x64[i].m);
      end
      #1;
      ref_net(x8, y, 64, 2);
      for (int k = 0; k < 4; k++) begin
        cmp("bk8.g", k, s8_g[k], m8_g[k], y[2*k]);
        cmp("bk8.f", k, s8_f[k], m8_f[k], y[2*k+1]);
      end
      ref_net(x64, y, 8, 2);
      for (int k = 0; k < 32; k++) begin
        cmp("ks64.g", k, sk_g[k], 64'(mk_g[k]), y[2*k]);
        cmp("ks64.f", k, sk_f[k], 64'(mk_f[k]), y[2*k+1]);
        cmp("bk64.g", k, sb_g[k], 64'(mb_g[k]), y[2*k]);
        cmp("bk64.f", k, sb_f[k], 64'(mb_f[k]), y[2*k+1]);
      end
    end
    $display("mechanisms: add=%0d sub(a larger)=%0d sub(b larger)=%0d saturated=%0d G exact=%0d G approximate=%0d",
             n_f_add, n_f_sub_a, n_f_sub_b, n_f_sat, n_g_exact, n_g_wrong);
    checks++;
    if (n_f_add == 0 || n_f_sub_a == 0 || n_f_sub_b == 0 || n_f_sat == 0 ||
        n_g_exact == 0 || n_g_wrong == 0) begin
      failures++;
      $display("FAIL a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
