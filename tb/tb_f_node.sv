// Self-checking testbench of the F node (sign-magnitude sum).
//
// Four instances: 64-bit magnitudes with the Kogge-Stone adder (default)
// and with the Brent-Kung adder, driven with random and directed operands;
// 8-bit versions of both, driven with every magnitude pair and every sign
// pair. The reference is the signed integer sum, its magnitude clipped to
// all ones; the sign of a zero result is Sa. The test also counts that each
// path occurred: same-sign addition, subtraction with either operand the
// larger, and saturation. Combinational: outputs are sampled 1 ns after the
// inputs change.
module tb_f_node;
  import bp_pkg::*;
  import tb_bp_ref_pkg::*;

  int checks   = 0;
  int failures = 0;

  logic        sa, sb, ss_ks, ss_bk;
  logic [63:0] ma, mb, ms_ks, ms_bk;
  f_node u_dut (.sa(sa), .ma(ma), .sb(sb), .mb(mb), .ss(ss_ks), .ms(ms_ks));
  f_node #(.ADDER(ADDER_BK)) u_dut_bk (.sa(sa), .ma(ma), .sb(sb), .mb(mb), .ss(ss_bk), .ms(ms_bk));

  logic       sa8, sb8, ss8_ks, ss8_bk;
  logic [7:0] ma8, mb8, ms8_ks, ms8_bk;
  f_node #(.W(8), .ADDER(ADDER_KS)) u_dut8_ks (.sa(sa8), .ma(ma8), .sb(sb8), .mb(mb8), .ss(ss8_ks), .ms(ms8_ks));
  f_node #(.W(8), .ADDER(ADDER_BK)) u_dut8_bk (.sa(sa8), .ma(ma8), .sb(sb8), .mb(mb8), .ss(ss8_bk), .ms(ms8_bk));

  task automatic compare(string tag, logic gs, logic [63:0] gm, llr_t r, llr_t a, llr_t b);
    checks++;
    if (gs !== r.s || gm !== r.m) begin
      failures++;
      if (failures < 10) $display("FAIL %s a=%0d:%h b=%0d:%h got %0d:%h exp %0d:%h",
                                  tag, a.s, a.m, b.s, b.m, gs, gm, r.s, r.m);
    end
  endtask

  task automatic check64(llr_t a, llr_t b);
    llr_t r;
    sa = a.s; ma = a.m; sb = b.s; mb = b.m;
    #1;
    r = ref_f(a, b, 64);
    compare("KS64", ss_ks, ms_ks, r, a, b);
    compare("BK64", ss_bk, ms_bk, r, a, b);
  endtask

  initial begin : watchdog
    #10ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    llr_t a, b, r;
    a.s = 0; a.m = 64'd5;  b.s = 0; b.m = 64'd3;  check64(a, b);  // 8
    a.s = 0; a.m = 64'd5;  b.s = 1; b.m = 64'd3;  check64(a, b);  // +2
    a.s = 0; a.m = 64'd3;  b.s = 1; b.m = 64'd5;  check64(a, b);  // -2
    a.s = 1; a.m = 64'd7;  b.s = 0; b.m = 64'd7;  check64(a, b);  // zero
    a.s = 1; a.m = '1;     b.s = 1; b.m = 64'd1;  check64(a, b);  // saturates
    a.s = 0; a.m = '1;     b.s = 1; b.m = '1;     check64(a, b);
    for (int i = 0; i < 20000; i++) begin
      a.s = 1'($urandom); a.m = rand_mag(64, i % 3);
      b.s = 1'($urandom); b.m = rand_mag(64, i % 3);
      check64(a, b);
    end

    for (int s = 0; s < 4; s++) begin
      for (int x = 0; x < 256; x++) begin
        for (int y = 0; y < 256; y++) begin
          a.s = s[0]; a.m = 64'(x); b.s = s[1]; b.m = 64'(y);
          sa8 = a.s; ma8 = 8'(x); sb8 = b.s; mb8 = 8'(y);
          #1;
          r = ref_f(a, b, 8);
          compare("KS8", ss8_ks, 64'(ms8_ks), r, a, b);
          compare("BK8", ss8_bk, 64'(ms8_bk), r, a, b);
        end
      end
    end

    $display("paths: add=%0d sub(a larger)=%0d sub(b larger)=%0d saturated=%0d",
             n_f_add, n_f_sub_a, n_f_sub_b, n_f_sat);
    checks++;
    if (n_f_add == 0 || n_f_sub_a == 0 || n_f_sub_b == 0 || n_f_sat == 0) begin
      failures++;
      $display("FAIL a node path was never exercised");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
