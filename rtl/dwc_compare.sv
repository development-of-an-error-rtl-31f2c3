// dwc_compare: comparison tree of duplication with comparison.
//
// Each bit of a is XORed with the same bit of b and the XOR outputs are ORed
// together; fault is high when the two copies differ in any bit. The logic is
// purely combinational and sits after the stage registers it watches, in
// parallel with the stage logic, so it does not lengthen the stage's path.
//
// The XOR-then-OR structure and its placement follow the document; the width
// is set by the instantiating module.
module dwc_compare #(
  parameter int W = 8
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic         fault
);

  logic [W-1:0] diff;

  always_comb begin
    diff  = a ^ b;
    fault = |diff;
  end

endmodule
