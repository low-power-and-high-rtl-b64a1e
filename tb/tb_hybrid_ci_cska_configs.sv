// Self-checking testbench for the hybrid CI_CSKA at configurations other than
// the default: an even stage count (final carry leaves an AOI gate and is
// re-inverted), a 64-bit adder with a 16-bit nucleus, a 2-bit block size and a
// nucleus at stage 2. Each instance gets random and full-carry-chain vectors
// and is compared with integer addition.
module tb_hybrid_ci_cska_configs;
  localparam int unsigned NVEC = 20000;

  logic clk;
  initial begin
    clk = 1'b0;
    forever #5 clk = ~clk;
  end

  int checks = 0, failures = 0;

  // 28 bits: 3 x 4 + 8 + 2 x 4, Q = 6 (even)
  logic [27:0] a28, b28, s28;  logic ci28, co28;
  // 64 bits: 4 x 4 + 16 + 8 x 4, Q = 13
  logic [63:0] a64, b64, s64;  logic ci64, co64;
  // 16 bits: 2 x 2 + 4 + 4 x 2, Q = 7
  logic [15:0] a16, b16, s16;  logic ci16, co16;
  // 20 bits: 1 x 4 + 8 + 2 x 4, nucleus at stage 2, Q = 4
  logic [19:0] a20, b20, s20;  logic ci20, co20;

  hybrid_ci_cska #(.WIDTH(28), .M(4), .MP(8),  .P(4)) u28 (.a(a28), .b(b28), .ci(ci28), .s(s28), .co(co28));
  hybrid_ci_cska #(.WIDTH(64), .M(4), .MP(16), .P(5)) u64 (.a(a64), .b(b64), .ci(ci64), .s(s64), .co(co64));
  hybrid_ci_cska #(.WIDTH(16), .M(2), .MP(4),  .P(3)) u16 (.a(a16), .b(b16), .ci(ci16), .s(s16), .co(co16));
  hybrid_ci_cska #(.WIDTH(20), .M(4), .MP(8),  .P(2)) u20 (.a(a20), .b(b20), .ci(ci20), .s(s20), .co(co20));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (NVEC + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int unsigned i = 0; i < NVEC; i++) begin
      logic [63:0] r1, r2;
      logic        c;
      r1 = {$urandom, $urandom};
      r2 = (i % 2 == 0) ? {$urandom, $urandom} : ~r1 ^ (64'(1) << ($urandom % 64));
      if (i < 4) begin r1 = '1; r2 = '0; end   // full carry chain
      c  = (i < 4) ? 1'b1 : 1'($urandom);
      a28 = r1[27:0]; b28 = r2[27:0]; ci28 = c;
      a64 = r1;       b64 = r2;       ci64 = c;
      a16 = r1[15:0]; b16 = r2[15:0]; ci16 = c;
      a20 = r1[19:0]; b20 = r2[19:0]; ci20 = c;
      @(negedge clk);
      check({co28, s28} == {1'b0, a28} + {1'b0, b28} + 29'(c), $sformatf("28b a=%h b=%h c=%b", a28, b28, c));
      check({co64, s64} == {1'b0, a64} + {1'b0, b64} + 65'(c), $sformatf("64b a=%h b=%h c=%b", a64, b64, c));
      check({co16, s16} == {1'b0, a16} + {1'b0, b16} + 17'(c), $sformatf("16b a=%h b=%h c=%b", a16, b16, c));
      check({co20, s20} == {1'b0, a20} + {1'b0, b20} + 21'(c), $sformatf("20b a=%h b=%h c=%b", a20, b20, c));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
