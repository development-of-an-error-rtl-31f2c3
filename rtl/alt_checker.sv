// alt_checker: the alternative, detection-only mechanism.
//
// Compares the outputs of the two pipeline copies (everything they drive
// towards the memories and the register file) with one comparison tree and
// raises the sticky alt_fault flag at the edge after the first difference.
// It does not watch intermediate signals and does not recover: a detected
// fault, wherever it sits, is left to reconfiguration. mismatch is the
// unregistered comparator output. alt_fault clears only on reset
// (synchronous, active low).
//
// Watching only the pipeline outputs and detecting without recovery follow
// the document; the sticky flag is this design's own choice of interface.
module alt_checker #(
  parameter int W = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] out_a,
  input  logic [W-1:0] out_b,
  output logic         mismatch,
  output logic         alt_fault
);

  dwc_compare #(.W(W)) u_cmp (.a(out_a), .b(out_b), .fault(mismatch));

  always_ff @(posedge clk) begin
    if (!rst_n)        alt_fault <= 1'b0;
    else if (mismatch) alt_fault <= 1'b1;
  end

endmodule
