// Self-checking testbench of one factor-graph stage (bp_stage).
//
// The default stage (N = 8, 64-bit magnitudes, K = 2, Kogge-Stone) and a
// Brent-Kung stage are driven with the same random LLR vectors. Each output
// is compared with the reference stage: butterfly k reads inputs k and
// k+N/2, output 2k is the G result and output 2k+1 the F result. A wrong
// shuffle, a swapped node or a wrong operand order shows as a mismatch.
// Combinational: outputs are sampled 1 ns after the inputs change.
module tb_bp_stage;
  import bp_pkg::*;
  import tb_bp_ref_pkg::*;

  localparam int N = 8;
  localparam int W = 64;

  int checks   = 0;
  int failures = 0;

  logic         in_sign [N];
  logic [W-1:0] in_mag  [N];
  logic         ks_sign [N], bk_sign [N];
  logic [W-1:0] ks_mag  [N], bk_mag  [N];

  bp_stage u_dut (.in_sign(in_sign), .in_mag(in_mag), .out_sign(ks_sign), .out_mag(ks_mag));
  bp_stage #(.ADDER(ADDER_BK)) u_dut_bk (
    .in_sign(in_sign), .in_mag(in_mag), .out_sign(bk_sign), .out_mag(bk_mag)
  );

  initial begin : watchdog
    #10ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    llr_t x[], y[];
    x = new[N];
    for (int t = 0; t < 5000; t++) begin
      for (int i = 0; i < N; i++) begin
        x[i].s = 1'($urandom);
        x[i].m = rand_mag(W, (t + i) % 3);
        in_sign[i] = x[i].s;
        in_mag[i]  = x[i].m;
      end
      #1;
      ref_stage(x, y, W, 2);
      for (int i = 0; i < N; i++) begin
        checks++;
        if (ks_sign[i] !== y[i].s || ks_mag[i] !== y[i].m ||
            bk_sign[i] !== y[i].s || bk_mag[i] !== y[i].m) begin
          failures++;
          if (failures < 10) $display("FAIL vector %0d out %0d: KS %0d:%h BK %0d:%h exp %0d:%h",
                                      t, i, ks_sign[i], ks_mag[i], bk_sign[i], bk_mag[i], y[i].s, y[i].m);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
