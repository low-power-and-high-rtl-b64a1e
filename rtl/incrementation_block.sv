// Incrementation block of one CI_CSKA stage (stages 2..Q).
//
// The stage's CLA block has added its operands with carry-in 0, giving the
// intermediate sum Z. This block adds the real carry arriving from the
// previous stage's skip logic to Z:
//   s[i] = z[i] ^ (c & z[i-1] & ... & z[0])
// i.e. an incrementer that flips the low run of ones of Z and the first zero
// above it when the carry is 1. Its own carry-out is not formed: the stage
// carry comes from the skip logic.
//
// CIN_INV = 1 when the incoming carry is in complemented form (it comes from
// an AOI skip logic of an even stage). Combinational.
//
// The document gives the block's inputs and role; the AND-chain form is this
// design's choice.
module incrementation_block #(
  parameter int unsigned M       = 4,
  parameter bit          CIN_INV = 1'b0
) (
  input  logic [M-1:0] z,    // intermediate sum of the stage's CLA block
  input  logic         cin,  // carry from the previous stage's skip logic
  output logic [M-1:0] sum
);

  logic         c;
  logic [M-1:0] run;  // run[i] = c & z[i-1] & ... & z[0]

  assign c = CIN_INV ? ~cin : cin;

  always_comb begin
    logic r;
    r = c;
    for (int i = 0; i < M; i++) begin
      run[i] = r;
      r      = r & z[i];
    end
  end

  assign sum = z ^ run;

endmodule
