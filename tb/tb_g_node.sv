// Self-checking testbench of the G node (approximate min-sum).
//
// u_dut:   default G node (64-bit magnitudes, K = 2), random and directed
//          operands, checked against the selection rule of the reference.
// u_dut8:  8-bit, K = 2, every magnitude pair and sign pair. Beyond the
//          per-vector check it counts how often the node returns the larger
//          magnitude and compares that count with the closed form: a wrong
//          choice needs equal upper bits (2**(W-K) ways times 2**K squared
//          low pairs) and a larger low part of a, i.e.
//          2**(W-K) * 2**K * (2**K - 1) / 2 = 384 of the 65536 pairs.
// u_exact: 8-bit, K = 0, must always return the exact minimum.
// Combinational: outputs are sampled 1 ns after the inputs change.
module tb_g_node;
  import tb_bp_ref_pkg::*;

  int checks   = 0;
  int failures = 0;

  logic        sa, sb, ss;
  logic [63:0] ma, mb, ms;
  g_node u_dut (.sa(sa), .ma(ma), .sb(sb), .mb(mb), .ss(ss), .ms(ms));

  logic       sa8, sb8, ss8, sse;
  logic [7:0] ma8, mb8, ms8, mse;
  g_node #(.W(8), .K(2)) u_dut8  (.sa(sa8), .ma(ma8), .sb(sb8), .mb(mb8), .ss(ss8), .ms(ms8));
  g_node #(.W(8), .K(0)) u_exact (.sa(sa8), .ma(ma8), .sb(sb8), .mb(mb8), .ss(sse), .ms(mse));

  task automatic check64(llr_t a, llr_t b);
    llr_t r;
    sa = a.s; ma = a.m; sb = b.s; mb = b.m;
    #1;
    r = ref_g(a, b, 2);
    checks++;
    if (ss !== r.s || ms !== r.m) begin
      failures++;
      if (failures < 10) $display("FAIL a=%0d:%h b=%0d:%h got %0d:%h exp %0d:%h",
                                  a.s, a.m, b.s, b.m, ss, ms, r.s, r.m);
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
    int wrong8;
    llr_t a, b;
    // directed: upper bits equal, low bits decide (approximation visible)
    a.s = 0; a.m = 64'h1003; b.s = 1; b.m = 64'h1001; check64(a, b);
    a.s = 1; a.m = 64'h1001; b.s = 1; b.m = 64'h1003; check64(a, b);
    a.s = 0; a.m = 64'h1004; b.s = 0; b.m = 64'h1003; check64(a, b);
    a.s = 1; a.m = '1;       b.s = 0; b.m = 64'h0;    check64(a, b);
    for (int i = 0; i < 20000; i++) begin
      a.s = 1'($urandom); a.m = rand_mag(64, i % 3);
      b.s = 1'($urandom); b.m = rand_mag(64, i % 3);
      check64(a, b);
    end

    // exhaustive 8-bit
    wrong8 = 0;
    for (int s = 0; s < 4; s++) begin
      for (int x = 0; x < 256; x++) begin
        for (int y = 0; y < 256; y++) begin
          sa8 = s[0]; sb8 = s[1]; ma8 = 8'(x); mb8 = 8'(y);
          #1;
          checks++;
          if (ss8 !== (s[0] ^ s[1]) || ms8 !== (((x >> 2) > (y >> 2)) ? 8'(y) : 8'(x))) begin
            failures++;
            if (failures < 10) $display("FAIL K=2 x=%0d y=%0d got %0d", x, y, ms8);
          end
          if (s == 0 && ms8 != ((x < y) ? 8'(x) : 8'(y))) wrong8++;
          checks++;
          if (sse !== (s[0] ^ s[1]) || mse !== ((x < y) ? 8'(x) : 8'(y))) begin
            failures++;
            if (failures < 10) $display("FAIL K=0 x=%0d y=%0d got %0d", x, y, mse);
          end
        end
      end
    end
    checks++;
    if (wrong8 != 384) begin
      failures++;
      $display("FAIL approximate choices %0d, expected 384", wrong8);
    end
    $display("approximate comparator: %0d of 65536 pairs not the minimum", wrong8);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
