// End-to-end self-checking testbench for the hybrid CI_CSKA at its default
// configuration (32 bits, 4-bit CLA stages, 8-bit Kogge-Stone nucleus at
// stage 4, 7 stages). The adder is combinational; one vector is applied per
// clock and the outputs are compared half a clock later with a 33-bit integer
// sum computed here.
//
// Vectors: the operand pairs of the document's simulation waveform, directed
// corner cases (full carry chain, alternating patterns, all-zero, all-one),
// then random vectors biased towards long propagate runs.
//
// Mechanism coverage, derived from the operands and the reference carries
// (not from the adder's internals), counted and required at least once:
//   skip        a CLA stage (2..7, not the nucleus) with block propagate 1
//               receives carry 1 and passes it on by its skip gate
//   nskip       the same for the nucleus stage
//   generate    a CLA stage (2..7) produces a carry on its own (carry-in 0)
//   ngenerate   the nucleus produces a carry on its own
//   increment   a stage 2..7 incrementation block receives carry 1
//   ncarry      the nucleus postprocessing receives carry 1
//   fullchain   the adder carry-in travels through every stage to co
//   aoi_one/oai_one  a 1 carry leaves an even (AOI) / odd (OAI) stage
module tb_hybrid_ci_cska;
  localparam int unsigned WIDTH = 32;
  localparam int unsigned M     = 4;
  localparam int unsigned MP    = 8;
  localparam int unsigned P     = 4;
  localparam int unsigned Q     = 7;
  localparam int unsigned NVEC  = 200000;

  typedef enum int {
    EV_SKIP, EV_NSKIP, EV_GEN, EV_NGEN, EV_INC, EV_NCARRY, EV_FULLCHAIN,
    EV_AOI_ONE, EV_OAI_ONE, EV_COUNT
  } event_e;

  logic clk;
  initial begin
    clk = 1'b0;
    forever #5 clk = ~clk;
  end

  int checks = 0, failures = 0;
  int unsigned seen [EV_COUNT];

  logic [WIDTH-1:0] a, b, s;
  logic             ci, co;

  hybrid_ci_cska dut (.a(a), .b(b), .ci(ci), .s(s), .co(co));

  function automatic int unsigned stage_lsb(int unsigned j);
    return (j <= P) ? (j - 1) * M : (P - 1) * M + MP + (j - P - 1) * M;
  endfunction

  function automatic int unsigned stage_size(int unsigned j);
    return (j == P) ? MP : M;
  endfunction

  // Records which mechanisms the current vector exercises.
  function automatic void cover_vector(logic [WIDTH-1:0] x, logic [WIDTH-1:0] y, logic c);
    logic [WIDTH:0] full, carries;
    logic [WIDTH:0] xe, ye;
    xe = {1'b0, x};
    ye = {1'b0, y};
    full    = xe + ye + (WIDTH+1)'(c);
    carries = xe ^ ye ^ full;  // carries[k] = carry into bit k, carries[WIDTH] = co
    for (int unsigned j = 2; j <= Q; j++) begin
      int unsigned lsb, sz, msb;
      logic [WIDTH:0] blk;
      logic cin_j, cout_j, prop_j, gen_j;
      lsb    = stage_lsb(j);
      sz     = stage_size(j);
      msb    = lsb + sz;
      cin_j  = carries[lsb];
      cout_j = carries[msb];
      prop_j = 1'b1;
      for (int unsigned k = lsb; k < msb; k++) prop_j &= x[k] ^ y[k];
      blk    = ((xe >> lsb) & ((WIDTH+1)'(1) << sz) - 1) + ((ye >> lsb) & ((WIDTH+1)'(1) << sz) - 1);
      gen_j  = blk[sz];
      if (j == P) begin
        if (prop_j && cin_j) seen[EV_NSKIP]++;
        if (gen_j)           seen[EV_NGEN]++;
        if (cin_j)           seen[EV_NCARRY]++;
      end else begin
        if (prop_j && cin_j) seen[EV_SKIP]++;
        if (gen_j)           seen[EV_GEN]++;
        if (cin_j)           seen[EV_INC]++;
      end
      if (cout_j && (j % 2 == 0)) seen[EV_AOI_ONE]++;
      if (cout_j && (j % 2 == 1)) seen[EV_OAI_ONE]++;
    end
    if (c && ((x ^ y) == '1)) seen[EV_FULLCHAIN]++;
  endfunction

  task automatic apply(logic [WIDTH-1:0] x, logic [WIDTH-1:0] y, logic c);
    logic [WIDTH:0] exp;
    a = x; b = y; ci = c;
    @(negedge clk);
    exp = {1'b0, x} + {1'b0, y} + (WIDTH+1)'(c);
    checks++;
    if ({co, s} !== exp) begin
      failures++;
      if (failures < 10)
        $display("FAIL a=%h b=%h ci=%b got co=%b s=%h exp co=%b s=%h", x, y, c, co, s, exp[WIDTH], exp[WIDTH-1:0]);
    end
    cover_vector(x, y, c);
  endtask

  // Checks an expected result printed in the document's waveform.
  task automatic apply_printed(logic [WIDTH-1:0] x, logic [WIDTH-1:0] y, logic c,
                               logic [WIDTH-1:0] s_exp, logic co_exp);
    apply(x, y, c);
    checks++;
    if (s !== s_exp || co !== co_exp) begin
      failures++;
      $display("FAIL printed vector a=%h b=%h ci=%b: s=%h co=%b", x, y, c, s, co);
    end
  endtask

  function automatic logic [WIDTH-1:0] rand_word();
    return WIDTH'({$urandom, $urandom});
  endfunction

  initial begin
    repeat (NVEC + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (seen[i]) seen[i] = 0;
    a = '0; b = '0; ci = 1'b0;

    // operand pairs shown in the document's output waveform
    apply_printed(32'h00000000, 32'h00000000, 1'b0, 32'h00000000, 1'b0);
    apply_printed(32'ha0a0a0a0, 32'ha0a0a0a0, 1'b0, 32'h41414140, 1'b1);
    apply_printed(32'ha0a0a0a0, 32'h0a0a0a0a, 1'b1, 32'haaaaaaab, 1'b0);
    apply_printed(32'hffffffff, 32'h0a0a0a0a, 1'b0, 32'h0a0a0a09, 1'b1);

    // directed corner cases
    apply('1, '0, 1'b1);                 // carry through every stage
    apply('0, '1, 1'b1);
    apply('1, '1, 1'b1);
    apply('1, '1, 1'b0);
    apply(32'h55555555, 32'haaaaaaaa, 1'b1);
    apply(32'h0000000f, 32'h00000001, 1'b0);
    apply(32'h00000ff0, 32'h00000010, 1'b0);
    apply(32'h000ff000, 32'h00001000, 1'b0);
    for (int unsigned k = 0; k < WIDTH; k++) begin
      apply(WIDTH'(1) << k, (WIDTH'(1) << k) - 1, 1'b1);
      apply('1 >> k, WIDTH'(1), 1'b0);
    end

    // random vectors; every third pair has b close to ~a so that long
    // propagate runs, and hence skips, occur often
    for (int unsigned i = 0; i < NVEC; i++) begin
      logic [WIDTH-1:0] x, y;
      x = rand_word();
      case (i % 3)
        0: y = rand_word();
        1: y = ~x ^ (WIDTH'(1) << ($urandom % WIDTH));
        default: y = ~x & rand_word() | ~x;
      endcase
      apply(x, y, 1'($urandom));
    end

    for (int i = 0; i < EV_COUNT; i++) begin
      event_e e;
      e = event_e'(i);
      $display("mechanism %-14s seen %0d times", e.name(), seen[i]);
      checks++;
      if (seen[i] == 0) begin
        failures++;
        $display("FAIL mechanism %s never exercised", e.name());
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
