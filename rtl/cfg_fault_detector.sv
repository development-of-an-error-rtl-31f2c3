// cfg_fault_detector: tells a corrected user-bit fault from a persistent
// (configuration-memory) fault by looking again after the rollback.
//
// When the detector is idle and any stage comparator reports a mismatch, it
// records which stages mismatched and loads a down counter with CNT_INIT. The
// counter counts instruction cycles, i.e. cycles in which the pipeline
// advances (adv high), including the cycle of detection. After CNT_INIT such
// cycles the rolled-back instruction is again in the stage where it was seen
// failing, because it needs NSTAGES advances to reach write-back, restart at
// fetch and come back. In that cycle (counter at 0) the recorded stages are
// checked: a mismatch again sets the sticky perm_fault output and pulses
// perm_event; no mismatch pulses recovered. Mismatches seen while the counter
// runs do not restart it. The pulses are registered, one cycle after the
// check; perm_fault is cleared only by reset (synchronous, active low).
//
// The counter preset of 7, its decrement once per instruction cycle and the
// check of the same stage at 0 follow the document. Recording a mask when
// several stages mismatch in the same cycle, and checking only when idle, are
// this design's own choices.
module cfg_fault_detector #(
  parameter int NSTAGES  = 7,
  parameter int CNT_INIT = 7
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               adv,
  input  logic [NSTAGES-1:0] cmp,
  output logic               armed,
  output logic               recovered,
  output logic               perm_event,
  output logic               perm_fault
);

  localparam int CW = $clog2(CNT_INIT + 1);

  logic [CW-1:0]      cnt;
  logic [NSTAGES-1:0] mask;
  logic               check, again;

  always_comb begin
    check = armed && (cnt == '0);
    again = |(mask & cmp);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      armed      <= 1'b0;
      cnt        <= '0;
      mask       <= '0;
      recovered  <= 1'b0;
      perm_event <= 1'b0;
      perm_fault <= 1'b0;
    end else begin
      recovered  <= 1'b0;
      perm_event <= 1'b0;
      if (!armed) begin
        if (|cmp) begin
          armed <= 1'b1;
          mask  <= cmp;
          cnt   <= CW'(CNT_INIT) - CW'(adv);
        end
      end else if (check) begin
        armed <= 1'b0;
        if (again) begin
          perm_fault <= 1'b1;
          perm_event <= 1'b1;
        end else begin
          recovered  <= 1'b1;
        end
      end else begin
        cnt <= cnt - CW'(adv);
      end
    end
  end

endmodule
