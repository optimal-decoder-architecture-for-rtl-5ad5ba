// End-to-end testbench of the decoder network at its default size.
//
// The decoder (N = 8 LLRs, 64-bit magnitudes, K = 2, Kogge-Stone adders,
// all parameters at their defaults) is driven with LLR vectors of three
// kinds: small magnitudes (the G nodes' approximate comparison then often
// sees equal upper bits), magnitudes near full scale (F node sums
// saturate) and uniform ones, plus a few directed vectors. Each of the
// N/2 F outputs and N/2 G outputs is compared with the reference network.
// The run counts how often each node mechanism occurred inside the network
// (same-sign add, subtraction with either operand larger, saturation, an
// approximate G choice) and counts a failure for any that never occurred.
// Combinational: outputs are sampled 1 ns after the inputs change.
module tb_polar_decoder;
  import tb_bp_ref_pkg::*;

  localparam int N = 8;
  localparam int W = 64;

  int checks   = 0;
  int failures = 0;

  logic         in_sign [N];
  logic [W-1:0] in_mag  [N];
  logic         f_sign  [N/2], g_sign [N/2];
  logic [W-1:0] f_mag   [N/2], g_mag  [N/2];

  polar_decoder u_dut (
    .in_sign(in_sign), .in_mag(in_mag),
    .f_sign(f_sign), .f_mag(f_mag), .g_sign(g_sign), .g_mag(g_mag)
  );

  task automatic apply_and_check(llr_t x[]);
    llr_t y[];
    for (int i = 0; i < N; i++) begin
      in_sign[i] = x[i].s;
      in_mag[i]  = x[i].m;
    end
    #1;
    ref_net(x, y, W, 2);
    for (int k = 0; k < N / 2; k++) begin
      checks += 2;
      if (g_sign[k] !== y[2*k].s || g_mag[k] !== y[2*k].m) begin
        failures++;
        if (failures < 10) $display("FAIL g[%0d] got %0d:%h exp %0d:%h", k, g_sign[k], g_mag[k], y[2*k].s, y[2*k].m);
      end
      if (f_sign[k] !== y[2*k+1].s || f_mag[k] !== y[2*k+1].m) begin
        failures++;
        if (failures < 10) $display("FAIL f[%0d] got %0d:%h exp %0d:%h", k, f_sign[k], f_mag[k], y[2*k+1].s, y[2*k+1].m);
      end
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
    llr_t x[];
    x = new[N];
    // directed: all-zero, one strong LLR, alternating signs
    for (int i = 0; i < N; i++) begin x[i].s = 0; x[i].m = '0; end
    apply_and_check(x);
    x[3].m = 64'd100;
    apply_and_check(x);
    for (int i = 0; i < N; i++) begin x[i].s = i[0]; x[i].m = 64'(i + 1); end
    apply_and_check(x);
    for (int t = 0; t < 20000; t++) begin
      for (int i = 0; i < N; i++) begin
        x[i].s = 1'($urandom);
        x[i].m = rand_mag(W, t % 3);
      end
      apply_and_check(x);
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
