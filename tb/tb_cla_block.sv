// Self-checking testbench for cla_block: exhaustive over a, b and cin for the
// default 4-bit block, plus random vectors for an 8-bit block. Expected values
// come from plain integer addition; prop is checked against (a ^ b) == all ones.
module tb_cla_block;
  localparam int unsigned M  = 4;
  localparam int unsigned M8 = 8;

  logic clk;
  initial begin
    clk = 1'b0;
    forever #5 clk = ~clk;
  end

  int checks = 0, failures = 0;

  logic [M-1:0]  a, b, sum;
  logic          cin, cout, prop;
  logic [M8-1:0] a8, b8, sum8;
  logic          cin8, cout8, prop8;

  cla_block #(.M(M))  dut  (.a(a),  .b(b),  .cin(cin),  .sum(sum),  .cout(cout),  .prop(prop));
  cla_block #(.M(M8)) dut8 (.a(a8), .b(b8), .cin(cin8), .sum(sum8), .cout(cout8), .prop(prop8));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a8 = '0; b8 = '0; cin8 = 1'b0;
    for (int i = 0; i < (1 << (2*M+1)); i++) begin
      logic [M:0] exp;
      {cin, a, b} = (2*M+1)'(i);
      @(negedge clk);
      exp = {1'b0, a} + {1'b0, b} + {{M{1'b0}}, cin};
      check({cout, sum} == exp, $sformatf("M=4 a=%h b=%h cin=%b got %b%h exp %h", a, b, cin, cout, sum, exp));
      check(prop == ((a ^ b) == '1), $sformatf("M=4 prop a=%h b=%h", a, b));
    end
    for (int i = 0; i < 2000; i++) begin
      logic [M8:0] exp;
      a8 = M8'($urandom); b8 = (i % 4 == 0) ? ~a8 : M8'($urandom); cin8 = 1'($urandom);
      @(negedge clk);
      exp = {1'b0, a8} + {1'b0, b8} + {{M8{1'b0}}, cin8};
      check({cout8, sum8} == exp, $sformatf("M=8 a=%h b=%h cin=%b", a8, b8, cin8));
      check(prop8 == ((a8 ^ b8) == '1), $sformatf("M=8 prop a=%h b=%h", a8, b8));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
