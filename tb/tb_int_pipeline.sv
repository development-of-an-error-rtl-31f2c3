// tb_int_pipeline: runs random programs on one integer pipeline with its
// register file and same-cycle instruction and data memories.
//
// Every committed register write is compared, in order, with the reference
// model's list (register, value) and its cycle with the reference cycle plus
// the stall cycles so far plus seven per rollback. Random hold cycles freeze
// the pipeline. A few times per program the testbench requests a rollback
// while an instruction commits, as the fault-tolerance logic would: the write
// is dropped, everything is annulled, fetch restarts at that instruction, and
// the program must still produce the same results seven cycles later. After
// the last write the data memory is compared word for word.
module tb_int_pipeline;
  import ft_pkg::*;
  import tb_isa_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic hold = 1'b0;
  logic annul_all = 1'b0;
  logic [31:0] imem_rdata, dmem_rdata, rf_rdata1, rf_rdata2;
  pipe_out_t po;
  de_t de_q; ra_t ra_q; ex_t ex_q; me_t me_q; wb_t xc_q, wr_q;
  logic rf_we_g;

  int checks = 0, failures = 0;
  longint cyc = 0;
  longint holds = 0;
  int rollbacks = 0;
  int hold_events = 0, branch_flushes = 0, total_rollbacks = 0;

  logic [31:0] imem [IMEM_WORDS];
  logic [31:0] dmem [DMEM_WORDS];

  always #5 clk = ~clk;

  int_pipeline dut (
    .clk, .rst_n, .hold, .annul_all, .rb_pc(wr_q.pc),
    .imem_rdata, .dmem_rdata, .rf_rdata1, .rf_rdata2,
    .po, .de_q, .ra_q, .ex_q, .me_q, .xc_q, .wr_q
  );

  assign rf_we_g = po.rf_we && !hold && !annul_all;

  regfile u_rf (
    .clk, .re(po.rf_re), .raddr1(po.rf_raddr1), .raddr2(po.rf_raddr2),
    .rdata1(rf_rdata1), .rdata2(rf_rdata2),
    .we(rf_we_g), .waddr(po.rf_waddr), .wdata(po.rf_wdata)
  );

  assign imem_rdata = imem[po.imem_addr[10:2]];
  assign dmem_rdata = dmem[po.dmem_addr[9:2]];
  always_ff @(posedge clk) if (po.dmem_we) dmem[po.dmem_addr[9:2]] <= po.dmem_wdata;

  task automatic fail(string msg);
    failures += 1;
    $display("FAIL: %s", msg);
  endtask

  task automatic run_program(int items, int hold_pct, int rb_every);
    prog_gen  g;
    ref_model m;
    wr_rec_t  e;
    int       seen, idle;
    g = new();
    g.build(items);
    m = new();
    m.run(g.prog, g.halt_idx);
    foreach (imem[i]) imem[i] = g.prog[i];
    foreach (dmem[i]) dmem[i] = '0;
    @(negedge clk);
    rst_n = 1'b0; hold = 1'b0; annul_all = 1'b0;
    @(negedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    cyc = 0; holds = 0; rollbacks = 0; seen = 0; idle = 0;
    while (idle < 40) begin
      // decide this cycle's inputs just after the falling edge
      hold = ($urandom % 100) < hold_pct;
      annul_all = !hold && po.rf_we && (rb_every > 0) && (($urandom % rb_every) == 0)
                  && rollbacks < 4;
      @(posedge clk);
      if (hold) begin holds += 1; hold_events += 1; end
      if (me_q.br_taken && !me_q.annul && !hold && !annul_all) branch_flushes += 1;
      if (rf_we_g) begin
        checks += 1;
        if (m.writes.size() == 0) begin
          fail($sformatf("extra write r%0d=%h at cycle %0d", po.rf_waddr, po.rf_wdata, cyc));
        end else begin
          e = m.writes.pop_front();
          if (po.rf_waddr != 5'(e.rd) || po.rf_wdata != e.data)
            fail($sformatf("write %0d: got r%0d=%h expected r%0d=%h", seen,
                           po.rf_waddr, po.rf_wdata, e.rd, e.data));
          checks += 1;
          if (cyc != e.cycle + holds + 7 * rollbacks)
            fail($sformatf("write %0d at cycle %0d, expected %0d", seen, cyc,
                           e.cycle + holds + 7 * rollbacks));
          seen += 1;
        end
      end
      if (annul_all) begin rollbacks += 1; total_rollbacks += 1; end
      if (m.writes.size() == 0) idle += 1;
      cyc += 1;
      @(negedge clk);
    end
    for (int i = 0; i < DMEM_WORDS; i++) begin
      checks += 1;
      if (dmem[i] !== m.mem[i]) fail($sformatf("dmem[%0d]=%h expected %h", i, dmem[i], m.mem[i]));
    end
    $display("program: %0d writes, %0d taken branches, %0d stores, %0d loads, %0d rollbacks",
             seen, m.taken, m.stores, m.loads, rollbacks);
  endtask

  initial begin
    run_program(40, 0, 0);
    run_program(60, 15, 0);
    run_program(60, 10, 12);
    run_program(80, 20, 8);
    checks += 3;
    if (hold_events == 0) fail("no hold happened");
    if (branch_flushes == 0) fail("no taken branch happened");
    if (total_rollbacks == 0) fail("no rollback happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures += 1;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
