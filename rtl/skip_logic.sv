// Skip logic of one CI_CSKA stage: a single AOI or OAI compound gate in place
// of the 2:1 multiplexer of a conventional carry-skip adder.
//
// The stage carry-out is cblk | (prop & carry-in), where cblk is the carry of
// the stage's block computed with carry-in 0 and prop is the block propagate.
// (When prop is 1 the block carry is necessarily 0, so this OR equals the
// multiplexer of the conventional design.) A compound gate produces this
// function inverted, so the polarity of the carry flips at every stage:
//   OAI = 0 (AOI form): cin is the true carry,   cout = ~(cblk | (prop & cin))
//   OAI = 1 (OAI form): cin is the inverted carry,
//                       cout = ~(~cblk & (~prop | cin)), the true carry.
// The inverted operands ~cblk and ~prop of the OAI form stand for the
// complemented block outputs a transistor-level design takes directly.
// Combinational; the final stage carry comes from here, not from the
// incrementation block.
//
// The AOI/OAI choice and the alternation follow the document; port names and
// the parameter are this design's.
module skip_logic #(
  parameter bit OAI = 1'b0
) (
  input  logic cin,   // carry from the previous stage, in the polarity above
  input  logic cblk,  // block carry-out with block carry-in 0 (true polarity)
  input  logic prop,  // block propagate (skip select)
  output logic cout   // carry to the next stage, opposite polarity to cin
);

  if (OAI) begin : g_oai
    logic ncblk, nprop;
    assign ncblk = ~cblk;
    assign nprop = ~prop;
    assign cout  = ~((nprop | cin) & ncblk);
  end else begin : g_aoi
    assign cout  = ~((prop & cin) | cblk);
  end

endmodule
