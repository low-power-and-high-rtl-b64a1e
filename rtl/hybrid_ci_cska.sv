// Hybrid CI_CSKA: a carry-skip adder built by concatenation and incrementation,
// with carry lookahead blocks in its stages and a Kogge-Stone parallel prefix
// adder in its middle ("nucleus") stage.
//
// The WIDTH-bit operands are split into Q stages, least significant first:
//   stage 1          M-bit CLA block with the adder carry-in; its carry-out
//                    goes straight to stage 2 and its sum is final.
//   stages 2..P-1    M-bit CLA block with carry-in 0 (intermediate sum Z and
//   and P+1..Q       block carry), an AOI or OAI skip logic forming the stage
//                    carry, and an incrementation block adding the carry of
//                    the previous stage to Z.
//   stage P          MP-bit Kogge-Stone adder (ks_ppa); its group generate and
//                    propagate feed the stage's skip logic, and the carry of
//                    stage P-1 enters its postprocessing.
// All blocks with carry-in 0 work in parallel; only the skip logic chain is
// serial, one compound gate per stage. The skip gates alternate AOI/OAI, so
// the inter-stage carry is true after odd stages and complemented after even
// stages; each block is told the polarity it receives (ci_cska_pkg).
//
// Interface: a, b, ci in; s, co out. co is returned in true polarity (inverted
// once more when Q is even). Fully combinational, no clock.
//
// Defaults: WIDTH = 32 as analysed in the document; one fixed CLA block size
// M = 4, an 8-bit nucleus and P = 4 (so Q = 7 and the nucleus is the central
// stage) are this design's choices, since the document gives no stage sizes.
// Constraint: WIDTH - MP - (P-1)*M must be a non-negative multiple of M.
module hybrid_ci_cska
  import ci_cska_pkg::*;
#(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned M     = 4,   // CLA block size (all CLA stages)
  parameter int unsigned MP    = 8,   // nucleus (prefix adder) size
  parameter int unsigned P     = 4    // nucleus stage number, >= 2
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             ci,
  output logic [WIDTH-1:0] s,
  output logic             co
);

  localparam int unsigned HIGH_BITS = WIDTH - MP - (P - 1) * M;
  localparam int unsigned Q         = P + HIGH_BITS / M;

  if (P < 2 || MP + (P - 1) * M > WIDTH || HIGH_BITS % M != 0 || (MP & (MP - 1)) != 0)
  begin : g_bad_params
    $error("hybrid_ci_cska: WIDTH=%0d cannot be split into CLA stages of %0d bits around a %0d-bit nucleus at stage %0d",
           WIDTH, M, MP, P);
  end

  // carry[j] leaves stage j (index 0 unused); complemented when j is even.
  logic [Q:0] carry;
  assign carry[0] = 1'b0;

  for (genvar j = 1; j <= Q; j++) begin : g_stage
    localparam int unsigned LSB = (j <= P) ? (j - 1) * M : (P - 1) * M + MP + (j - P - 1) * M;

    if (j == 1) begin : g_first
      logic prop_unused;  // stage 1 has no skip logic
      cla_block #(.M(M)) u_cla (
        .a   (a[LSB +: M]),
        .b   (b[LSB +: M]),
        .cin (ci),
        .sum (s[LSB +: M]),
        .cout(carry[1]),
        .prop(prop_unused)
      );
    end else if (j == P) begin : g_nucleus
      logic g_grp, p_grp;
      ks_ppa #(.MP(MP), .CIN_INV(carry_out_inverted(j - 1))) u_ppa (
        .a    (a[LSB +: MP]),
        .b    (b[LSB +: MP]),
        .cin  (carry[j-1]),
        .sum  (s[LSB +: MP]),
        .g_grp(g_grp),
        .p_grp(p_grp)
      );
      skip_logic #(.OAI(skip_is_oai(j))) u_skip (
        .cin (carry[j-1]),
        .cblk(g_grp),
        .prop(p_grp),
        .cout(carry[j])
      );
    end else begin : g_ci
      logic [M-1:0] z;
      logic         cblk, prop;
      cla_block #(.M(M)) u_cla (
        .a   (a[LSB +: M]),
        .b   (b[LSB +: M]),
        .cin (1'b0),
        .sum (z),
        .cout(cblk),
        .prop(prop)
      );
      skip_logic #(.OAI(skip_is_oai(j))) u_skip (
        .cin (carry[j-1]),
        .cblk(cblk),
        .prop(prop),
        .cout(carry[j])
      );
      incrementation_block #(.M(M), .CIN_INV(carry_out_inverted(j - 1))) u_inc (
        .z  (z),
        .cin(carry[j-1]),
        .sum(s[LSB +: M])
      );
    end
  end

  assign co = carry_out_inverted(Q) ? ~carry[Q] : carry[Q];

endmodule
