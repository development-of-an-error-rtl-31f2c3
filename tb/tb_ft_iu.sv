// tb_ft_iu: end-to-end test of the fault-tolerant integer unit.
//
// Random programs run on ft_iu with same-cycle instruction and data memory
// models and random stall (hold) cycles. Every committed register write is
// compared, in order, with the reference model, and its cycle with the
// reference cycle plus the stall cycles plus seven per rollback; the data
// memory is compared at the end.
//
// Phase 1, fault free: nothing may be detected and the timing is exact.
// Phase 2, transient faults: single bit flips in a stage input register of
// copy 2 (any stage after fetch) or in the write-back data of copy 1, one at
// a time, at random cycles. Each must be rolled back and reported as
// recovered, never as persistent, and the program must still give the right
// results, seven cycles later per rollback.
// Phase 3, persistent faults: a stuck-at on a copy-2 signal that stays until
// reset (an ALU output bit, an execute-stage result bit, a stage register bit). perm_fault must rise and
// so must the alternative checker's alt_fault.
// Each mechanism (stall, taken branch, rollback, gated register write,
// recovery, persistent detection, alternative detection) is counted, and one
// that never happened is a failure.
module tb_ft_iu;
  import ft_pkg::*;
  import tb_isa_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, hold = 1'b0;
  logic [31:0] imem_addr, imem_rdata, dmem_addr, dmem_wdata, dmem_rdata;
  logic dmem_we, dmem_re;
  logic rf_we;
  logic [RAW-1:0] rf_waddr;
  logic [31:0] rf_wdata;
  logic [N_STAGES-1:0] stage_fault;
  logic rollback, recovered, perm_fault, alt_fault;
  logic checking, perm_event, alt_mismatch;

  int checks = 0, failures = 0;
  longint cyc, holds;
  int rollbacks;
  int n_hold = 0, n_branch = 0, n_rollback = 0, n_gated = 0, n_recovered = 0;
  int n_perm = 0, n_alt = 0, n_inject = 0;

  logic [31:0] imem [IMEM_WORDS];
  logic [31:0] dmem [DMEM_WORDS];

  always #5 clk = ~clk;

  ft_iu dut (
    .clk, .rst_n, .hold,
    .imem_addr, .imem_rdata,
    .dmem_addr, .dmem_wdata, .dmem_we, .dmem_re, .dmem_rdata,
    .rf_we, .rf_waddr, .rf_wdata,
    .stage_fault, .rollback, .recovered, .checking, .perm_event, .perm_fault,
    .alt_mismatch, .alt_fault
  );

  assign imem_rdata = imem[imem_addr[10:2]];
  assign dmem_rdata = dmem[dmem_addr[9:2]];
  always_ff @(posedge clk) if (dmem_we) dmem[dmem_addr[9:2]] <= dmem_wdata;

  task automatic fail(string msg);
    failures += 1;
    $display("FAIL: %s", msg);
  endtask

  // ---------------- fault injection ----------------
  // Transient flip: the register takes the flipped value and keeps it until
  // the pipeline next writes it.
  de_t f_de; ra_t f_ra; ex_t f_ex; me_t f_me; wb_t f_wb;

  task automatic flip(int copy, int stage);
    int b;
    unique case (stage)
      1: begin f_de = dut.u_p2.de_q; b = $urandom % $bits(de_t); f_de[b] = ~f_de[b];
               force dut.u_p2.de_q = f_de; #1 release dut.u_p2.de_q; end
      2: begin f_ra = dut.u_p2.ra_q; b = $urandom % $bits(ra_t); f_ra[b] = ~f_ra[b];
               force dut.u_p2.ra_q = f_ra; #1 release dut.u_p2.ra_q; end
      3: begin f_ex = dut.u_p2.ex_q; b = $urandom % $bits(ex_t); f_ex[b] = ~f_ex[b];
               force dut.u_p2.ex_q = f_ex; #1 release dut.u_p2.ex_q; end
      4: begin f_me = dut.u_p2.me_q; b = $urandom % $bits(me_t); f_me[b] = ~f_me[b];
               force dut.u_p2.me_q = f_me; #1 release dut.u_p2.me_q; end
      5: if (copy == 1) begin
               f_wb = dut.u_p1.xc_q; b = $urandom % XLEN; f_wb.wb_data[b] = ~f_wb.wb_data[b];
               force dut.u_p1.xc_q = f_wb; #1 release dut.u_p1.xc_q;
         end else begin
               f_wb = dut.u_p2.xc_q; b = $urandom % $bits(wb_t); f_wb[b] = ~f_wb[b];
               force dut.u_p2.xc_q = f_wb; #1 release dut.u_p2.xc_q;
         end
      default: if (copy == 1) begin
               f_wb = dut.u_p1.wr_q; b = $urandom % XLEN; f_wb.wb_data[b] = ~f_wb.wb_data[b];
               force dut.u_p1.wr_q = f_wb; #1 release dut.u_p1.wr_q;
         end else begin
               f_wb = dut.u_p2.wr_q; b = $urandom % $bits(wb_t); f_wb[b] = ~f_wb[b];
               force dut.u_p2.wr_q = f_wb; #1 release dut.u_p2.wr_q;
         end
    endcase
    n_inject += 1;
  endtask

  // ---------------- one program ----------------
  // mode 0: fault free, 1: transient flips, 2: persistent stuck-at
  task automatic run_program(int items, int hold_pct, int mode, int stuck_kind);
    prog_gen  g;
    ref_model m;
    wr_rec_t  e;
    int       seen, idle, next_inject, limit;
    bit       perm_seen, alt_seen;
    int       n_pev;
    g = new();
    g.build(items);
    m = new();
    m.run(g.prog, g.halt_idx);
    foreach (imem[i]) imem[i] = g.prog[i];
    foreach (dmem[i]) dmem[i] = '0;
    @(negedge clk);
    rst_n = 1'b0; hold = 1'b0;
    @(negedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    cyc = 0; holds = 0; rollbacks = 0; seen = 0; idle = 0;
    perm_seen = 0; alt_seen = 0; n_pev = 0;
    next_inject = 40 + int'($urandom % 20);
    limit = (mode == 2) ? 600 : 20000;
    if (mode == 2) begin
      unique case (stuck_kind)
        0: force dut.u_p2.alu_res[0] = 1'b1;
        1: force dut.u_p2.me_d.result[3] = 1'b1;
        default: force dut.u_p2.xc_q.rd[0] = 1'b1;
      endcase
    end
    while (idle < 40 && cyc < limit) begin
      hold = ($urandom % 100) < hold_pct;
      if (mode == 1 && cyc == next_inject) begin
        flip((($urandom % 4) == 0) ? 1 : 2, 1 + int'($urandom % 6));
        next_inject += 25 + int'($urandom % 30);
      end
      #2;
      if (dut.wb_fault && dut.u_p1.po.rf_we) n_gated += 1;
      @(posedge clk);
      if (hold) begin holds += 1; n_hold += 1; end
      if (dut.u_p1.me_q.br_taken && !dut.u_p1.me_q.annul && !hold && !rollback) n_branch += 1;
      if (recovered) n_recovered += 1;
      if (perm_event) n_pev += 1;
      // perm_event and recovered end a persistence test: never both at once
      checks += 1;
      if (perm_event && recovered) fail("perm_event and recovered together");
      if (perm_fault && !perm_seen) begin perm_seen = 1; n_perm += 1; end
      if (alt_fault && !alt_seen) begin alt_seen = 1; n_alt += 1; end
      if (mode != 2 && rf_we) begin
        checks += 1;
        if (m.writes.size() == 0) begin
          fail($sformatf("extra write r%0d=%h at cycle %0d", rf_waddr, rf_wdata, cyc));
        end else begin
          e = m.writes.pop_front();
          if (rf_waddr != 5'(e.rd) || rf_wdata != e.data)
            fail($sformatf("write %0d: got r%0d=%h expected r%0d=%h", seen,
                           rf_waddr, rf_wdata, e.rd, e.data));
          checks += 1;
          if (cyc != e.cycle + holds + 7 * rollbacks)
            fail($sformatf("write %0d at cycle %0d, expected %0d", seen, cyc,
                           e.cycle + holds + 7 * rollbacks));
          seen += 1;
        end
      end
      if (rollback) begin rollbacks += 1; n_rollback += 1; end
      if (m.writes.size() == 0) idle += 1;
      cyc += 1;
      @(negedge clk);
    end
    if (mode == 2) begin
      release dut.u_p2.alu_res[0];
      release dut.u_p2.me_d.result[3];
      release dut.u_p2.xc_q.rd[0];
      checks += 3;
      if (n_pev == 0) fail($sformatf("stuck-at %0d gave no perm_event", stuck_kind));
      if (!perm_seen) fail($sformatf("stuck-at %0d not declared persistent", stuck_kind));
      if (!alt_seen)  fail($sformatf("stuck-at %0d not seen by the alternative checker", stuck_kind));
    end else begin
      checks += 2;
      if (m.writes.size() != 0) fail($sformatf("%0d writes missing", m.writes.size()));
      if (perm_seen) fail("transient fault declared persistent");
      checks += 1;
      if (n_pev != 0) fail("perm_event without a persistent fault");
      if (mode == 0) begin
        checks += 2;
        if (rollbacks != 0) fail("rollback without a fault");
        if (alt_seen) fail("alternative checker fired without a fault");
      end
      for (int i = 0; i < DMEM_WORDS; i++) begin
        checks += 1;
        if (dmem[i] !== m.mem[i]) fail($sformatf("dmem[%0d]=%h expected %h", i, dmem[i], m.mem[i]));
      end
    end
    $display("mode %0d: %0d writes, %0d cycles, %0d rollbacks, perm=%0b alt=%0b",
             mode, seen, cyc, rollbacks, perm_seen, alt_seen);
  endtask

  initial begin
    run_program(50, 0, 0, 0);
    run_program(60, 10, 0, 0);
    run_program(60, 0, 1, 0);
    run_program(80, 10, 1, 0);
    run_program(80, 15, 1, 0);
    run_program(40, 0, 2, 0);
    run_program(40, 10, 2, 1);
    run_program(40, 0, 2, 2);
    $display("injected %0d; holds %0d, branches %0d, rollbacks %0d, gated writes %0d, recovered %0d, persistent %0d, alternative %0d",
             n_inject, n_hold, n_branch, n_rollback, n_gated, n_recovered, n_perm, n_alt);
    checks += 7;
    if (n_hold == 0)      fail("no stall happened");
    if (n_branch == 0)    fail("no taken branch happened");
    if (n_rollback == 0)  fail("no rollback happened");
    if (n_gated == 0)     fail("no register write was gated");
    if (n_recovered == 0) fail("no recovery happened");
    if (n_perm == 0)      fail("no persistent fault was declared");
    if (n_alt == 0)       fail("the alternative checker never fired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures += 1;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
