// Self-checking testbench of the Kogge-Stone adder (ks_adder).
//
// Three instances: the default 64-bit adder, checked on corner cases (carry
// rippling across all bits, carry in, all ones) and random operands; an
// 8-bit adder checked exhaustively (all operand pairs, both carry-in
// values); and a 13-bit adder (a width that is not a power of two) checked
// on random operands. The reference is the plain integer sum {cout,sum} =
// a + b + cin. The adder is combinational: results are sampled 1 ns after
// the inputs change. A watchdog ends the run with a failure if it hangs.
module tb_ks_adder;

  int checks   = 0;
  int failures = 0;

  // default size
  logic [63:0] a64, b64, s64;
  logic        c64, co64;
  ks_adder u_dut64 (.a(a64), .b(b64), .cin(c64), .sum(s64), .cout(co64));

  // exhaustive small size
  logic [7:0] a8, b8, s8;
  logic       c8, co8;
  ks_adder #(.W(8)) u_dut8 (.a(a8), .b(b8), .cin(c8), .sum(s8), .cout(co8));

  // odd size
  logic [12:0] a13, b13, s13;
  logic        c13, co13;
  ks_adder #(.W(13)) u_dut13 (.a(a13), .b(b13), .cin(c13), .sum(s13), .cout(co13));

  task automatic check64(input logic [63:0] a, input logic [63:0] b, input logic c);
    logic [64:0] exp;
    a64 = a; b64 = b; c64 = c;
    #1;
    exp = {1'b0, a} + {1'b0, b} + 65'(c);
    checks++;
    if ({co64, s64} !== exp) begin
      failures++;
      if (failures < 10)
        $display("FAIL W=64 a=%h b=%h cin=%0d got %h exp %h", a, b, c, {co64, s64}, exp);
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
    // corner cases at the default size
    check64(64'h0, 64'h0, 1'b0);
    check64(64'h0, 64'h0, 1'b1);
    check64('1, 64'h0, 1'b1);          // carry through every bit
    check64('1, 64'h1, 1'b0);
    check64('1, '1, 1'b1);
    check64(64'h8000_0000_0000_0000, 64'h8000_0000_0000_0000, 1'b0);
    check64(64'h5555_5555_5555_5555, 64'hAAAA_AAAA_AAAA_AAAA, 1'b1);
    check64(64'h0000_0000_FFFF_FFFF, 64'h0000_0000_0000_0001, 1'b0);
    for (int i = 0; i < 64; i++) begin
      check64(64'(1) << i, (64'(1) << i) - 64'd1, 1'b1);  // carry chain of length i
    end
    for (int i = 0; i < 20000; i++) begin
      check64({$urandom, $urandom}, {$urandom, $urandom}, 1'($urandom));
    end

    // exhaustive 8-bit
    for (int c = 0; c < 2; c++) begin
      for (int a = 0; a < 256; a++) begin
        for (int b = 0; b < 256; b++) begin
          a8 = 8'(a); b8 = 8'(b); c8 = 1'(c);
          #1;
          checks++;
          if ({co8, s8} !== 9'(a + b + c)) begin
            failures++;
            if (failures < 10) $display("FAIL W=8 a=%0d b=%0d cin=%0d got %0d", a, b, c, {co8, s8});
          end
        end
      end
    end

    // random 13-bit
    for (int i = 0; i < 20000; i++) begin
      a13 = 13'($urandom); b13 = 13'($urandom); c13 = 1'($urandom);
      #1;
      checks++;
      if ({co13, s13} !== (14'(a13) + 14'(b13) + 14'(c13))) begin
        failures++;
        if (failures < 10) $display("FAIL W=13 a=%0d b=%0d cin=%0d got %0d", a13, b13, c13, {co13, s13});
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
