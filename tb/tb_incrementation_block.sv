// Self-checking testbench for incrementation_block: exhaustive over z and the
// incoming carry, for a true-polarity and a complemented-polarity carry input.
// Expected sum: z plus the true carry, modulo 2^M.
module tb_incrementation_block;
  localparam int unsigned M = 4;

  logic clk;
  initial begin
    clk = 1'b0;
    forever #5 clk = ~clk;
  end

  int checks = 0, failures = 0;

  logic [M-1:0] z, sum_t, sum_n;
  logic         c;

  incrementation_block #(.M(M), .CIN_INV(1'b0)) dut_t (.z(z), .cin(c),  .sum(sum_t));
  incrementation_block #(.M(M), .CIN_INV(1'b1)) dut_n (.z(z), .cin(~c), .sum(sum_n));

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < (1 << (M+1)); i++) begin
      logic [M-1:0] exp;
      {c, z} = (M+1)'(i);
      @(negedge clk);
      exp = z + M'(c);
      checks += 2;
      if (sum_t !== exp) begin
        failures++;
        $display("FAIL true z=%h c=%b got %h exp %h", z, c, sum_t, exp);
      end
      if (sum_n !== exp) begin
        failures++;
        $display("FAIL inverted z=%h c=%b got %h exp %h", z, c, sum_n, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
