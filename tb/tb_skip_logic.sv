// Self-checking testbench for skip_logic: both the AOI form (true carry in,
// complemented carry out) and the OAI form (complemented carry in, true carry
// out), exhaustive over the legal input combinations. The reference is the
// carry-skip rule carry_out = cblk | (prop & carry_in) on true carries; the
// combination prop = 1 with cblk = 1 cannot come from a block and is skipped.
module tb_skip_logic;
  logic clk;
  initial begin
    clk = 1'b0;
    forever #5 clk = ~clk;
  end

  int checks = 0, failures = 0;

  logic cin_a, cblk, prop, cout_a;
  logic cin_o, cout_o;

  skip_logic #(.OAI(1'b0)) dut_aoi (.cin(cin_a), .cblk(cblk), .prop(prop), .cout(cout_a));
  skip_logic #(.OAI(1'b1)) dut_oai (.cin(cin_o), .cblk(cblk), .prop(prop), .cout(cout_o));

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) begin
      logic c, exp;
      {c, cblk, prop} = 3'(i);
      if (prop && cblk) continue;
      cin_a = c;    // AOI stage receives the true carry
      cin_o = ~c;   // OAI stage receives the complemented carry
      @(negedge clk);
      exp = cblk | (prop & c);
      checks++;
      if (cout_a !== ~exp) begin
        failures++;
        $display("FAIL AOI c=%b cblk=%b prop=%b cout=%b", c, cblk, prop, cout_a);
      end
      checks++;
      if (cout_o !== exp) begin
        failures++;
        $display("FAIL OAI c=%b cblk=%b prop=%b cout=%b", c, cblk, prop, cout_o);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
