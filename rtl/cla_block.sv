// M-bit carry lookahead adder block of the CI_CSKA.
//
// Every stage of the adder except the nucleus has one of these. In stage 1 the
// carry-in is the adder carry-in; in every other stage the carry-in is tied to
// 0, so the block produces its intermediate sum Z and its block carry at the
// same time as all other blocks (the "concatenation" half of the scheme), and
// the real incoming carry is applied later by the incrementation block.
//
// Inside: bit generate g = a & b and propagate p = a ^ b, then each internal
// carry is written out in flat (sum-of-products) lookahead form
//   c[i+1] = g[i] | p[i]g[i-1] | ... | p[i]..p[1]g[0] | p[i]..p[0]cin
// rather than rippled. The block propagate 'prop' (AND of all p) is the
// select signal of the stage's skip logic. Purely combinational.
//
// The document names the block a CLA and gives its role; the flat
// lookahead form and the port set are this design's choice.
module cla_block
  import ci_cska_pkg::*;
#(
  parameter int unsigned M = 4
) (
  input  logic [M-1:0] a,
  input  logic [M-1:0] b,
  input  logic         cin,
  output logic [M-1:0] sum,
  output logic         cout,
  output logic         prop
);

  logic [M-1:0] g, p;
  logic [M:0]   c;

  assign g = a & b;
  assign p = a ^ b;

  always_comb begin
    c[0] = cin;
    for (int i = 0; i < M; i++) begin
      logic term;
      logic run;
      // carry-in term propagated through bits 0..i
      run  = cin;
      for (int k = 0; k <= i; k++) run = run & p[k];
      term = run;
      // generate term of each bit k propagated through bits k+1..i
      for (int k = 0; k <= i; k++) begin
        logic t;
        t = g[k];
        for (int m = k + 1; m <= i; m++) t = t & p[m];
        term = term | t;
      end
      c[i+1] = term;
    end
  end

  assign sum  = p ^ c[M-1:0];
  assign cout = c[M];
  assign prop = &p;

endmodule
