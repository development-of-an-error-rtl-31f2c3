// tb_fault_campaign: fault-injection campaign on the fault-tolerant integer
// unit, classified the way the mechanism's evaluation classifies outcomes.
//
// Three systems run the same random program side by side, each with its own
// data memory: the unprotected original (one int_pipeline and its register
// file), ft_iu as built by default, and ft_iu built with the alternative
// mechanism alone (MAIN_MECH = 0). Each run injects one fault at the same
// place and cycle into all three: the same bit of the same stage input
// register (fetch PC, decode, register access, execute, memory, exception or
// write-back), in the original and in copy 1 or copy 2 of both ft_iu builds.
//   F type (user bit): the register bit is flipped once and stays flipped
//   until the pipeline next writes the register.
//   P type (configuration, modelled as stuck-at): from the injection cycle on,
//   the bit is forced to 0 or 1 every cycle for the rest of the run.
// A run ends when the final branch-to-self reaches write-back (at a falling
// edge, with every older instruction committed) or after 125 % of the
// fault-free run time. Each system's outcome is one character:
//   '0' finished with the right registers and data memory,
//   '1' finished with wrong state,
//   'C' did not finish in time,
//   'P' (ft_iu only) perm_fault was raised (default build) or alt_fault was
//   raised (alternative-only build).
// The outcomes are printed as tables of original against fault-tolerant
// outcome, once for each build. For the alternative-only build the end of
// the program is seen on either copy's write-back register; the original
// has one copy, so a stuck pc bit there can hide a finished run and count
// as 'C'.
//
// Self-checks: the fault-free runs must give '0' on both with no rollback and
// no alternative detection; a flip in copy 2 must end '0'; a stuck-at in copy
// 2 must end '0' or 'P'; any '1' or 'C' of ft_iu must have raised alt_fault;
// the alternative-only build must never end '1' or 'C' (no fault escapes it);
// a flip in copy 1 must end '0' unless it hit an annul bit, which the design
// does not cover. At least one flip must be
// recovered from that broke the original, and at least one stuck-at must be
// declared persistent.
module tb_fault_campaign;
  import ft_pkg::*;
  import tb_isa_pkg::*;

  localparam int N_PROGS        = 12;
  localparam int FAULTS_PER_PROG = 50;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic [31:0] imem [IMEM_WORDS];
  logic [31:0] dmem [DMEM_WORDS];    // ft_iu's data memory
  logic [31:0] odmem [DMEM_WORDS];   // the original's data memory

  // ---------------- ft_iu ----------------
  logic [31:0] imem_addr, imem_rdata, dmem_addr, dmem_wdata, dmem_rdata;
  logic dmem_we, dmem_re, rf_we;
  logic [RAW-1:0] rf_waddr;
  logic [31:0] rf_wdata;
  logic [N_STAGES-1:0] stage_fault;
  logic rollback, recovered, checking, perm_event, perm_fault, alt_mismatch, alt_fault;

  ft_iu dut (
    .clk, .rst_n, .hold(1'b0),
    .imem_addr, .imem_rdata,
    .dmem_addr, .dmem_wdata, .dmem_we, .dmem_re, .dmem_rdata,
    .rf_we, .rf_waddr, .rf_wdata,
    .stage_fault, .rollback, .recovered, .checking, .perm_event, .perm_fault,
    .alt_mismatch, .alt_fault
  );

  assign imem_rdata = imem[imem_addr[10:2]];
  assign dmem_rdata = dmem[dmem_addr[9:2]];
  always_ff @(posedge clk) if (dmem_we) dmem[dmem_addr[9:2]] <= dmem_wdata;

  // ---------------- the unprotected original ----------------
  pipe_out_t   opo;
  de_t         o_de;
  ra_t         o_ra;
  ex_t         o_ex;
  me_t         o_me;
  wb_t         o_xc, o_wr;
  logic [31:0] o_rd1, o_rd2;

  int_pipeline u_orig (
    .clk, .rst_n, .hold(1'b0), .annul_all(1'b0), .rb_pc(32'h0),
    .imem_rdata(imem[opo.imem_addr[10:2]]), .dmem_rdata(odmem[opo.dmem_addr[9:2]]),
    .rf_rdata1(o_rd1), .rf_rdata2(o_rd2),
    .po(opo), .de_q(o_de), .ra_q(o_ra), .ex_q(o_ex), .me_q(o_me), .xc_q(o_xc), .wr_q(o_wr)
  );

  regfile u_orf (
    .clk, .re(opo.rf_re), .raddr1(opo.rf_raddr1), .raddr2(opo.rf_raddr2),
    .rdata1(o_rd1), .rdata2(o_rd2),
    .we(opo.rf_we), .waddr(opo.rf_waddr), .wdata(opo.rf_wdata)
  );

  always_ff @(posedge clk) if (opo.dmem_we) odmem[opo.dmem_addr[9:2]] <= opo.dmem_wdata;

  // ---------------- ft_iu built with the alternative mechanism alone ----------------
  logic [31:0] admem [DMEM_WORDS];
  logic [31:0] a_imem_addr, a_dmem_addr, a_dmem_wdata;
  logic a_dmem_we, a_dmem_re, a_rf_we;
  logic [RAW-1:0] a_rf_waddr;
  logic [31:0] a_rf_wdata;
  logic [N_STAGES-1:0] a_stage_fault;
  logic a_rollback, a_recovered, a_checking, a_perm_event, a_perm_fault, a_alt_mismatch, a_alt_fault;

  ft_iu #(.MAIN_MECH(1'b0)) dut_alt (
    .clk, .rst_n, .hold(1'b0),
    .imem_addr(a_imem_addr), .imem_rdata(imem[a_imem_addr[10:2]]),
    .dmem_addr(a_dmem_addr), .dmem_wdata(a_dmem_wdata), .dmem_we(a_dmem_we), .dmem_re(a_dmem_re),
    .dmem_rdata(admem[a_dmem_addr[9:2]]),
    .rf_we(a_rf_we), .rf_waddr(a_rf_waddr), .rf_wdata(a_rf_wdata),
    .stage_fault(a_stage_fault), .rollback(a_rollback), .recovered(a_recovered),
    .checking(a_checking), .perm_event(a_perm_event), .perm_fault(a_perm_fault),
    .alt_mismatch(a_alt_mismatch), .alt_fault(a_alt_fault)
  );

  always_ff @(posedge clk) if (a_dmem_we) admem[a_dmem_addr[9:2]] <= a_dmem_wdata;

  task automatic fail(string msg);
    failures += 1;
    $display("FAIL: %s", msg);
  endtask

  // ---------------- fault injection ----------------
  // kind 0 flips bit b; kind 1 and 2 set it to 0 and 1. The value is forced
  // for one time unit and then released, so the register keeps it until it
  // is next written.
  `define TB_DEPOSIT(PATH, T) begin \
    T v_; \
    v_ = PATH; \
    if (kind == 0) v_[b] = ~v_[b]; else v_[b] = (kind == 2); \
    force PATH = v_; \
    #1 release PATH; \
  end

  // target 0: the original, 1: copy 1 of ft_iu, 2: copy 2, 3 and 4: copies 1
  // and 2 of the alternative-only build
  task automatic deposit(int target, int stage, int b, int kind);
    unique case (target * 8 + stage)
      0:  `TB_DEPOSIT(u_orig.fe_q, logic [31:0])
      1:  `TB_DEPOSIT(u_orig.de_q, de_t)
      2:  `TB_DEPOSIT(u_orig.ra_q, ra_t)
      3:  `TB_DEPOSIT(u_orig.ex_q, ex_t)
      4:  `TB_DEPOSIT(u_orig.me_q, me_t)
      5:  `TB_DEPOSIT(u_orig.xc_q, wb_t)
      6:  `TB_DEPOSIT(u_orig.wr_q, wb_t)
      8:  `TB_DEPOSIT(dut.u_p1.fe_q, logic [31:0])
      9:  `TB_DEPOSIT(dut.u_p1.de_q, de_t)
      10: `TB_DEPOSIT(dut.u_p1.ra_q, ra_t)
      11: `TB_DEPOSIT(dut.u_p1.ex_q, ex_t)
      12: `TB_DEPOSIT(dut.u_p1.me_q, me_t)
      13: `TB_DEPOSIT(dut.u_p1.xc_q, wb_t)
      14: `TB_DEPOSIT(dut.u_p1.wr_q, wb_t)
      16: `TB_DEPOSIT(dut.u_p2.fe_q, logic [31:0])
      17: `TB_DEPOSIT(dut.u_p2.de_q, de_t)
      18: `TB_DEPOSIT(dut.u_p2.ra_q, ra_t)
      19: `TB_DEPOSIT(dut.u_p2.ex_q, ex_t)
      20: `TB_DEPOSIT(dut.u_p2.me_q, me_t)
      21: `TB_DEPOSIT(dut.u_p2.xc_q, wb_t)
      22: `TB_DEPOSIT(dut.u_p2.wr_q, wb_t)
      24: `TB_DEPOSIT(dut_alt.u_p1.fe_q, logic [31:0])
      25: `TB_DEPOSIT(dut_alt.u_p1.de_q, de_t)
      26: `TB_DEPOSIT(dut_alt.u_p1.ra_q, ra_t)
      27: `TB_DEPOSIT(dut_alt.u_p1.ex_q, ex_t)
      28: `TB_DEPOSIT(dut_alt.u_p1.me_q, me_t)
      29: `TB_DEPOSIT(dut_alt.u_p1.xc_q, wb_t)
      30: `TB_DEPOSIT(dut_alt.u_p1.wr_q, wb_t)
      32: `TB_DEPOSIT(dut_alt.u_p2.fe_q, logic [31:0])
      33: `TB_DEPOSIT(dut_alt.u_p2.de_q, de_t)
      34: `TB_DEPOSIT(dut_alt.u_p2.ra_q, ra_t)
      35: `TB_DEPOSIT(dut_alt.u_p2.ex_q, ex_t)
      36: `TB_DEPOSIT(dut_alt.u_p2.me_q, me_t)
      37: `TB_DEPOSIT(dut_alt.u_p2.xc_q, wb_t)
      default: `TB_DEPOSIT(dut_alt.u_p2.wr_q, wb_t)
    endcase
  endtask

  function automatic int stage_bits(int stage);
    unique case (stage)
      0:       return XLEN;
      1:       return $bits(de_t);
      2:       return $bits(ra_t);
      3:       return $bits(ex_t);
      4:       return $bits(me_t);
      default: return $bits(wb_t);
    endcase
  endfunction

  // Bits of copy 1 the design does not cover: the annul bits (an instruction
  // that copy 1 wrongly annuls is dropped without a rollback).
  function automatic bit exposed(int stage, int b);
    return stage != 0 && b == stage_bits(stage) - 1;   // annul is the top bit
  endfunction

  // ---------------- outcome tables ----------------
  // idx: fault type (0 F, 1 P), mechanism (0 main, 1 alternative),
  // original outcome (0 '0', 1 '1' or 'C'), ft outcome (0 'P', 1 '0', 2 '1' or 'C')
  int tab [2][2][2][3];
  int n_runs [2];
  int n_recovered_bad = 0, n_perm_p = 0, n_exposed = 0, n_rollbacks = 0;

  function automatic int col(byte r);
    return (r == "P") ? 0 : (r == "0") ? 1 : 2;
  endfunction

  // Registers the program writes; the others keep whatever an earlier run
  // left in them and are not compared.
  bit written [NREG];

  // sys 0: the original, 1: ft_iu, 2: the alternative-only build
  function automatic bit state_ok(ref_model m, int sys);
    logic [31:0] r, d;
    for (int i = 1; i < NREG; i++) begin
      r = (sys == 0) ? u_orf.mem[i] : (sys == 1) ? dut.u_rf.mem[i] : dut_alt.u_rf.mem[i];
      if (written[i] && r != m.regs[i]) return 1'b0;
    end
    for (int i = 0; i < DMEM_WORDS; i++) begin
      d = (sys == 0) ? odmem[i] : (sys == 1) ? dmem[i] : admem[i];
      if (d != m.mem[i]) return 1'b0;
    end
    return 1'b1;
  endfunction

  // One run of the loaded program. ftype: -1 none, 0 F, 1 P.
  // Returns the cycle count of the fault-tolerant unit when it finished.
  task automatic run_once(ref_model m, int halt_idx, int limit, int ftype, int target,
                          int stage, int b, int kind, int t_inj,
                          output byte o_res, output byte f_res, output bit alt,
                          output byte a_res, output int rb, output int f_cyc);
    int  cyc;
    bit  o_done, f_done, a_done;
    @(negedge clk);
    rst_n = 1'b0;
    @(negedge clk);
    @(negedge clk);
    foreach (dmem[i]) dmem[i] = '0;
    foreach (odmem[i]) odmem[i] = '0;
    foreach (admem[i]) admem[i] = '0;
    rst_n = 1'b1;
    cyc = 0; o_done = 0; f_done = 0; a_done = 0; rb = 0; f_cyc = 0;
    o_res = "C"; f_res = "C"; a_res = "C";
    while (!(o_done && f_done && a_done) && cyc < limit) begin
      @(negedge clk);
      if (rollback) rb += 1;
      if (!o_done && o_wr.pc == 32'(4 * halt_idx) && !o_wr.annul) begin
        o_done = 1;
        o_res  = state_ok(m, 0) ? "0" : "1";
      end
      if (!f_done && perm_fault) begin
        f_done = 1;
        f_res  = "P";
        f_cyc  = cyc;
      end
      if (!f_done && dut.wr1.pc == 32'(4 * halt_idx) && !dut.wr1.annul && !rollback) begin
        f_done = 1;
        f_res  = state_ok(m, 1) ? "0" : "1";
        f_cyc  = cyc;
      end
      // the copies run in lockstep, so either one reaching the halt ends the
      // run: a stuck pc bit in one copy changes no output but hides its halt
      if (!a_done && ((dut_alt.wr1.pc == 32'(4 * halt_idx) && !dut_alt.wr1.annul) ||
                      (dut_alt.wr2.pc == 32'(4 * halt_idx) && !dut_alt.wr2.annul))) begin
        a_done = 1;
        a_res  = state_ok(m, 2) ? "0" : "1";
      end
      if ((ftype == 0 && cyc == t_inj) || (ftype == 1 && cyc >= t_inj)) begin
        deposit(0, stage, b, kind);
        deposit(target, stage, b, kind);
        deposit(target + 2, stage, b, kind);
      end
      cyc += 1;
    end
    alt = alt_fault;
    if (a_alt_fault) a_res = "P";
  endtask

  initial begin
    prog_gen  g;
    ref_model m;
    byte      o_res, f_res, a_res;
    bit       alt;
    int       rb, f_cyc, golden, limit, ftype, target, stage, b, kind, t_inj;
    int       orow, fcol, acol;
    foreach (tab[i, j, k, l]) tab[i][j][k][l] = 0;
    n_runs = '{0, 0};
    for (int p = 0; p < N_PROGS; p++) begin
      g = new();
      g.build(30);
      m = new();
      m.run(g.prog, g.halt_idx);
      foreach (imem[i]) imem[i] = g.prog[i];
      foreach (written[i]) written[i] = 1'b0;
      foreach (m.writes[i]) written[m.writes[i].rd] = 1'b1;

      // fault-free reference run
      run_once(m, g.halt_idx, 5000, -1, 0, 0, 0, 0, 0, o_res, f_res, alt, a_res, rb, golden);
      checks += 1;
      if (o_res != "0" || f_res != "0" || a_res != "0" || rb != 0 || alt)
        fail($sformatf("program %0d fault free: original %c, protected %c, alternative %c, %0d rollbacks, alt %0b",
                       p, o_res, f_res, a_res, rb, alt));
      limit = golden + golden / 4;

      for (int f = 0; f < FAULTS_PER_PROG; f++) begin
        ftype  = (f % 5 < 3) ? 0 : 1;          // 60 % flips, 40 % stuck-at
        target = 1 + int'($urandom % 2);
        stage  = int'($urandom % 7);
        b      = int'($urandom % stage_bits(stage));
        kind   = (ftype == 0) ? 0 : 1 + int'($urandom % 2);
        t_inj  = 8 + int'($urandom % (golden - 16));
        run_once(m, g.halt_idx, limit, ftype, target, stage, b, kind, t_inj,
                 o_res, f_res, alt, a_res, rb, f_cyc);
        n_runs[ftype] += 1;
        n_rollbacks += rb;
        orow = (o_res == "0") ? 0 : 1;
        fcol = col(f_res);
        acol = col(a_res);
        tab[ftype][0][orow][fcol] += 1;
        tab[ftype][1][orow][acol] += 1;
        if (ftype == 0 && o_res != "0" && f_res == "0") n_recovered_bad += 1;
        if (ftype == 1 && f_res == "P") n_perm_p += 1;

        checks += 2;
        if (a_res == "1" || a_res == "C")
          fail($sformatf("%s copy %0d stage %0d bit %0d: alternative-only build ends %c undetected",
                         ftype ? "stuck-at" : "flip", target, stage, b, a_res));
        if ((f_res == "1" || f_res == "C") && !alt)
          fail($sformatf("%s copy %0d stage %0d bit %0d: outcome %c without alt_fault",
                         ftype ? "stuck-at" : "flip", target, stage, b, f_res));
        if (ftype == 0 && (target == 2 || !exposed(stage, b))) begin
          checks += 1;
          if (f_res != "0")
            fail($sformatf("flip copy %0d stage %0d bit %0d at cycle %0d: outcome %c, %0d rollbacks",
                           target, stage, b, t_inj, f_res, rb));
        end else if (ftype == 0) begin
          n_exposed += 1;
        end
        if (ftype == 1 && target == 2) begin
          checks += 1;
          if (f_res != "0" && f_res != "P")
            fail($sformatf("stuck-at-%0d copy 2 stage %0d bit %0d: outcome %c",
                           kind - 1, stage, b, f_res));
        end
      end
    end

    for (int t = 0; t < 2; t++) begin
      for (int mech = 0; mech < 2; mech++) begin
        $display("%s faults, %s mechanism (%0d runs), original \\ fault tolerant:",
                 t ? "P type" : "F type", mech ? "alternative" : "main", n_runs[t]);
        $display("               P      0      1 and C");
        $display("  1 and C  %5.1f%% %5.1f%% %5.1f%%",
                 100.0 * tab[t][mech][1][0] / n_runs[t], 100.0 * tab[t][mech][1][1] / n_runs[t],
                 100.0 * tab[t][mech][1][2] / n_runs[t]);
        $display("  0        %5.1f%% %5.1f%% %5.1f%%",
                 100.0 * tab[t][mech][0][0] / n_runs[t], 100.0 * tab[t][mech][0][1] / n_runs[t],
                 100.0 * tab[t][mech][0][2] / n_runs[t]);
      end
    end
    $display("rollbacks %0d; flips that broke the original but were recovered %0d; stuck-at declared persistent %0d; flips on uncovered bits %0d",
             n_rollbacks, n_recovered_bad, n_perm_p, n_exposed);
    checks += 2;
    if (n_recovered_bad == 0) fail("no flip that broke the original was recovered");
    if (n_perm_p == 0)        fail("no stuck-at was declared persistent");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures += 1;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
