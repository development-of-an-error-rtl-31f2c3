// fault_pipe: pipelined fault signals and the rollback decision.
//
// A fault bit travels down the pipeline with each instruction. The fault of
// stage k is the fault bit the instruction brought into stage k ORed with that
// stage's comparator output, cmp[k]; it is registered into stage k+1 at the
// next advancing edge. Stage 0 (fetch) has no incoming fault register. When
// the write-back stage (stage NSTAGES-1) sees a fault, wb_fault goes high: it
// is used to cancel the register-file write of that instruction. If that
// instruction is not annulled, rollback goes high as well: every instruction
// in the pipeline is annulled and fetch restarts at the write-back
// instruction's address. rollback is only raised in a cycle the pipeline
// advances (hold low), so that it acts exactly once.
//
// The registers hold with hold and clear on reset (synchronous, active low).
// They are not cleared by a rollback: the annulled instructions keep their
// fault bits, which write-back ignores because they are annulled.
//
// The OR-and-register chain, the fetch stage generating no fault, the
// register-file write gating and the annul-all with a branch to the
// write-back instruction follow the document; the hold and reset behaviour are
// this design's own.
module fault_pipe #(
  parameter int NSTAGES = 7
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               hold,
  input  logic [NSTAGES-1:0] cmp,
  input  logic               wb_annul,
  output logic [NSTAGES-1:0] stage_fault,
  output logic               wb_fault,
  output logic               rollback
);

  logic [NSTAGES-1:0] freg;   // freg[k]: fault bit in stage k's input register

  always_comb begin
    stage_fault = freg | cmp;
    wb_fault    = stage_fault[NSTAGES-1];
    rollback    = wb_fault && !wb_annul && !hold;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      freg <= '0;
    end else if (!hold) begin
      freg <= {stage_fault[NSTAGES-2:0], 1'b0};
    end
  end

endmodule
