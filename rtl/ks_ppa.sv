// Modified Kogge-Stone parallel prefix adder of the CI_CSKA nucleus stage.
//
// Three parts, as in the nucleus of the hybrid adder:
//   preprocessing   bit generate g = a & b and propagate p = a ^ b;
//   prefix network  log2(MP) Kogge-Stone levels; at level l every bit i >= 2^l
//                   combines its group with the group 2^l bits below, so after
//                   the last level node i holds the generate/propagate of
//                   bits i..0 (the network's carry-in is 0);
//   postprocessing  sum[i] = p[i] ^ (G[i-1:0] | P[i-1:0] & c), where c is the
//                   carry from stage p-1, so that carry only enters at the
//                   last gate level.
// The group generate G_Mp (bits MP-1..0 with carry-in 0) and the group
// propagate go to the nucleus skip logic, which forms the stage carry.
//
// CIN_INV = 1 when the incoming carry is complemented (stage p-1 even).
// MP must be a power of two. Combinational.
//
// The document gives the three parts and the Kogge-Stone choice; placing the
// incoming carry in the postprocessing is this design's choice.
module ks_ppa
  import ci_cska_pkg::*;
#(
  parameter int unsigned MP      = 8,
  parameter bit          CIN_INV = 1'b0
) (
  input  logic [MP-1:0] a,
  input  logic [MP-1:0] b,
  input  logic          cin,    // carry from stage p-1
  output logic [MP-1:0] sum,
  output logic          g_grp,  // G_Mp: group generate, carry-in 0
  output logic          p_grp   // group propagate (skip select)
);

  localparam int unsigned LEVELS = $clog2(MP);

  gp_t  bitgp [MP];   // preprocessing output
  gp_t  pre   [MP];   // prefix network output: bits i..0
  logic c;

  // preprocessing
  for (genvar i = 0; i < MP; i++) begin : g_pre
    assign bitgp[i].g = a[i] & b[i];
    assign bitgp[i].p = a[i] ^ b[i];
  end

  // Kogge-Stone prefix network, one pass of the loop per level
  always_comb begin
    gp_t cur [MP];
    gp_t nxt [MP];
    cur = bitgp;
    for (int l = 0; l < LEVELS; l++) begin
      for (int i = 0; i < MP; i++) begin
        if (i >= (1 << l)) nxt[i] = gp_combine(cur[i], cur[i-(1<<l)]);
        else               nxt[i] = cur[i];
      end
      cur = nxt;
    end
    pre = cur;
  end

  // postprocessing
  assign c = CIN_INV ? ~cin : cin;
  assign sum[0] = bitgp[0].p ^ c;
  for (genvar i = 1; i < MP; i++) begin : g_post
    assign sum[i] = bitgp[i].p ^ (pre[i-1].g | (pre[i-1].p & c));
  end

  assign g_grp = pre[MP-1].g;
  assign p_grp = pre[MP-1].p;

endmodule
