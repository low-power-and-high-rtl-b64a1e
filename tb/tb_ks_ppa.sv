// Self-checking testbench for ks_ppa: exhaustive over the two 8-bit operands
// and the incoming carry, with both carry polarities. The sum is compared with
// integer addition, g_grp with the carry-out of a + b alone (carry-in 0), and
// p_grp with (a ^ b) == all ones.
module tb_ks_ppa;
  localparam int unsigned MP = 8;

  logic clk;
  initial begin
    clk = 1'b0;
    forever #5 clk = ~clk;
  end

  int checks = 0, failures = 0;

  logic [MP-1:0] a, b, sum_t, sum_n;
  logic          c, g_t, p_t, g_n, p_n;

  ks_ppa #(.MP(MP), .CIN_INV(1'b0)) dut_t (.a(a), .b(b), .cin(c),  .sum(sum_t), .g_grp(g_t), .p_grp(p_t));
  ks_ppa #(.MP(MP), .CIN_INV(1'b1)) dut_n (.a(a), .b(b), .cin(~c), .sum(sum_n), .g_grp(g_n), .p_grp(p_n));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < (1 << (2*MP+1)); i++) begin
      logic [MP:0] exp, exp0;
      {c, a, b} = (2*MP+1)'(i);
      @(negedge clk);
      exp  = {1'b0, a} + {1'b0, b} + {{MP{1'b0}}, c};
      exp0 = {1'b0, a} + {1'b0, b};
      check(sum_t == exp[MP-1:0], $sformatf("sum a=%h b=%h c=%b got %h", a, b, c, sum_t));
      check(sum_n == exp[MP-1:0], $sformatf("sum(inv) a=%h b=%h c=%b got %h", a, b, c, sum_n));
      check(g_t == exp0[MP] && g_n == exp0[MP], $sformatf("G a=%h b=%h", a, b));
      check(p_t == ((a ^ b) == '1) && p_n == p_t, $sformatf("P a=%h b=%h", a, b));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
