// ft_iu: fault-tolerant integer unit for an FPGA soft processor.
//
// Two identical copies of the integer pipeline run in lock step on the same
// inputs. Only copy 1 drives the outside world (instruction and data memory,
// register file); copy 2 exists to be compared with it. The input register of
// every stage after fetch is compared bit for bit between the copies, giving
// one mismatch signal per stage. The register-file read request (addresses and
// enable) is folded into the decode stage's signal and the register-file write
// (address, data, enable) into the write-back stage's signal.
//
// Recovery: the per-stage mismatches are pipelined with the instructions
// (fault_pipe). When a faulty instruction that copy 1 holds as not annulled
// reaches write-back, its register write is suppressed, every
// instruction in both copies is annulled and both copies restart fetching at
// that instruction's address. The address is not taken from the faulty
// instruction itself, whose PC field may be the corrupted bit: restart_pc
// holds the next-instruction address of the last instruction that left
// write-back without a fault, which in a fault-free pipeline is the address
// of the instruction in write-back. A store is made only when the memory
// stage shows no fault; a store held back that way is made when its
// instruction runs again. A flipped user bit is overwritten as the
// instructions flow again, so the re-run is clean and the program continues,
// NSTAGES cycles later than it would have.
//
// Configuration faults: cfg_fault_detector looks at the stage that failed
// again exactly when the rolled-back instruction is back in it. A fault in
// the FPGA configuration memory is persistent and shows again, and
// perm_fault is raised for an external reconfiguration controller; a fault
// that has vanished was a user-bit upset and recovered pulses.
//
// Alternative mechanism: alt_checker compares only the outputs of the two
// copies and flags any difference, with no recovery. It runs beside the main
// mechanism on the same pipelines; its flag is a separate output. With
// MAIN_MECH = 0 the unit is built with the alternative mechanism alone: the
// stage comparison, rollback and persistence outputs are then constant 0.
// In that build nothing reads the stage registers the two pipelines export,
// so lint reports them (de1 to wr2) as unused signals; that is expected. The
// default build has no warning.
//
// Interface: imem_* and dmem_* are the cache ports of copy 1; both memories
// answer combinationally in the same cycle, and hold freezes both pipelines
// for a memory stall. rf_we/rf_waddr/rf_wdata show the register writes that
// are actually committed. checking is high while the persistence test waits
// for the rolled-back instruction; perm_event pulses each time that test finds
// the fault again (the trigger for a reconfiguration controller); alt_mismatch
// is the alternative checker's unregistered compare. Reset is synchronous,
// active low.
//
// From the document: the duplication with outputs from copy 1, the
// comparison of stage inputs, the one-fault-signal-per-stage design, the
// register-file read and write comparison trees, the pipelined fault signals,
// rollback to the write-back instruction, the preset-7 persistence counter and
// the output-only alternative checker. The pipeline itself, its ISA and the
// memory timing are this design's own (see int_pipeline), and so are three
// two additions that close holes of the plain scheme: the restart address
// from restart_pc instead of the write-back instruction's PC field, and the
// store gated by the memory stage's fault signal. restart_pc is a single
// register and is not checked. Not covered: an upset that sets an annul bit
// of copy 1, which makes that copy drop a valid instruction without a
// rollback. Rolling back whenever the copies disagree on the annul bit would
// cover it, but then an annul bit of copy 2 stuck at 0 rolls back forever
// without being found persistent.
module ft_iu
  import ft_pkg::*;
#(
  parameter int NSTAGES      = ft_pkg::N_STAGES,
  parameter int ROLLBACK_CNT = 7,
  parameter bit MAIN_MECH    = 1'b1
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               hold,
  output logic [XLEN-1:0]    imem_addr,
  input  logic [31:0]        imem_rdata,
  output logic [XLEN-1:0]    dmem_addr,
  output logic [XLEN-1:0]    dmem_wdata,
  output logic               dmem_we,
  output logic               dmem_re,
  input  logic [XLEN-1:0]    dmem_rdata,
  output logic               rf_we,
  output logic [RAW-1:0]     rf_waddr,
  output logic [XLEN-1:0]    rf_wdata,
  output logic [NSTAGES-1:0] stage_fault,
  output logic               rollback,
  output logic               recovered,
  output logic               checking,
  output logic               perm_event,
  output logic               perm_fault,
  output logic               alt_mismatch,
  output logic               alt_fault
);

  // The pipeline is built with exactly seven stages.
  initial assert (NSTAGES == ft_pkg::N_STAGES)
    else $error("ft_iu: NSTAGES must be %0d", ft_pkg::N_STAGES);

  pipe_out_t       po1, po2;
  de_t             de1, de2;
  ra_t             ra1, ra2;
  ex_t             ex1, ex2;
  me_t             me1, me2;
  wb_t             xc1, xc2, wr1, wr2;
  logic [XLEN-1:0] rf_rdata1, rf_rdata2;
  logic            wb_fault, annul_all;
  logic [XLEN-1:0] restart_pc;

  // ---------------- the two pipeline copies ----------------
  int_pipeline u_p1 (
    .clk, .rst_n, .hold, .annul_all, .rb_pc(restart_pc),
    .imem_rdata, .dmem_rdata, .rf_rdata1, .rf_rdata2,
    .po(po1), .de_q(de1), .ra_q(ra1), .ex_q(ex1),
    .me_q(me1), .xc_q(xc1), .wr_q(wr1)
  );

  int_pipeline u_p2 (
    .clk, .rst_n, .hold, .annul_all, .rb_pc(restart_pc),
    .imem_rdata, .dmem_rdata, .rf_rdata1, .rf_rdata2,
    .po(po2), .de_q(de2), .ra_q(ra2), .ex_q(ex2),
    .me_q(me2), .xc_q(xc2), .wr_q(wr2)
  );

  // ---------------- register file (driven by copy 1) ----------------
  regfile u_rf (
    .clk,
    .re(po1.rf_re), .raddr1(po1.rf_raddr1), .raddr2(po1.rf_raddr2),
    .rdata1(rf_rdata1), .rdata2(rf_rdata2),
    .we(rf_we), .waddr(po1.rf_waddr), .wdata(po1.rf_wdata)
  );

  // MAIN_MECH = 0 builds the alternative mechanism alone: no stage
  // comparison, no rollback, no persistence test.
  if (MAIN_MECH) begin : g_main
    // ---------------- per-stage comparison trees ----------------
    logic c_de, c_ra, c_ex, c_me, c_xc, c_wr, c_rfrd, c_rfwr;
    stage_vec_t         cmp;

    dwc_compare #(.W($bits(de_t))) u_c_de (.a(de1), .b(de2), .fault(c_de));
    dwc_compare #(.W($bits(ra_t))) u_c_ra (.a(ra1), .b(ra2), .fault(c_ra));
    dwc_compare #(.W($bits(ex_t))) u_c_ex (.a(ex1), .b(ex2), .fault(c_ex));
    dwc_compare #(.W($bits(me_t))) u_c_me (.a(me1), .b(me2), .fault(c_me));
    dwc_compare #(.W($bits(wb_t))) u_c_xc (.a(xc1), .b(xc2), .fault(c_xc));
    dwc_compare #(.W($bits(wb_t))) u_c_wr (.a(wr1), .b(wr2), .fault(c_wr));
    dwc_compare #(.W(2*RAW+1)) u_c_rfrd (
      .a({po1.rf_raddr1, po1.rf_raddr2, po1.rf_re}),
      .b({po2.rf_raddr1, po2.rf_raddr2, po2.rf_re}),
      .fault(c_rfrd)
    );
    dwc_compare #(.W(RAW+XLEN+1)) u_c_rfwr (
      .a({po1.rf_waddr, po1.rf_wdata, po1.rf_we}),
      .b({po2.rf_waddr, po2.rf_wdata, po2.rf_we}),
      .fault(c_rfwr)
    );

    always_comb begin
      cmp        = '0;
      cmp[ST_FE] = 1'b0;              // fetch input comes from the cache: not watched
      cmp[ST_DE] = c_de || c_rfrd;
      cmp[ST_RA] = c_ra;
      cmp[ST_EX] = c_ex;
      cmp[ST_ME] = c_me;
      cmp[ST_XC] = c_xc;
      cmp[ST_WR] = c_wr || c_rfwr;
    end

    // ---------------- pipelined fault signals and rollback ----------------
    fault_pipe #(.NSTAGES(NSTAGES)) u_fp (
      .clk, .rst_n, .hold, .cmp, .wb_annul(wr1.annul),
      .stage_fault, .wb_fault, .rollback(annul_all)
    );

    // Restart address: the successor of the last instruction that left
    // write-back with no fault. Annulled instructions do not move it.
    always_ff @(posedge clk) begin
      if (!rst_n)
        restart_pc <= '0;
      else if (!hold && !wb_fault && !wr1.annul)
        restart_pc <= wr1.npc;
    end

    // ---------------- configuration-fault detection ----------------
    cfg_fault_detector #(.NSTAGES(NSTAGES), .CNT_INIT(ROLLBACK_CNT)) u_cfd (
      .clk, .rst_n, .adv(!hold), .cmp,
      .armed(checking), .recovered, .perm_event, .perm_fault
    );
  end else begin : g_alt_only
    assign stage_fault = '0;
    assign wb_fault    = 1'b0;
    assign annul_all   = 1'b0;
    assign restart_pc  = '0;
    assign checking    = 1'b0;
    assign recovered   = 1'b0;
    assign perm_event  = 1'b0;
    assign perm_fault  = 1'b0;
  end

  assign rollback = annul_all;

  // ---------------- alternative mechanism: outputs only ----------------
  alt_checker #(.W($bits(pipe_out_t))) u_alt (
    .clk, .rst_n, .out_a(po1), .out_b(po2), .mismatch(alt_mismatch), .alt_fault
  );

  // ---------------- outside connections (copy 1 only) ----------------
  assign imem_addr  = po1.imem_addr;
  assign dmem_addr  = po1.dmem_addr;
  assign dmem_wdata = po1.dmem_wdata;
  assign dmem_we    = po1.dmem_we && !stage_fault[ST_ME];
  assign dmem_re    = po1.dmem_re;
  assign rf_we      = po1.rf_we && !wb_fault && !hold;
  assign rf_waddr   = po1.rf_waddr;
  assign rf_wdata   = po1.rf_wdata;

  // A rollback only happens in a cycle in which the pipelines advance.
  a_rb_pc : assert property (@(posedge clk) disable iff (!rst_n)
                             rollback |-> !hold);

endmodule
