// int_pipeline: seven-stage in-order integer pipeline whose stage inputs are
// exported for duplication with comparison.
//
// Stages, each with its own input register (all but fetch's are outputs):
// fetch (PC), decode, register access, execute, memory, exception,
// write-back. Fetch presents the PC to the
// instruction memory, which answers in the same cycle. Decode turns the
// instruction into control signals, sign-extends the immediate and drives the
// register-file read addresses; the register file reads synchronously, so the
// operands arrive in register access. Execute holds the ALU, the zero test for
// branches and the branch-target adder. Memory drives the data memory (answer
// in the same cycle) and, for a taken branch, redirects fetch and annuls the
// four younger instructions; it also works out npc, the address of the next
// instruction on the program path, which the later registers carry. The
// exception stage only carries the instruction on (this ISA has no traps).
// Write-back drives the register-file write port.
//
// Every instruction carries an annul bit; an annulled instruction writes
// nothing. annul_all (the rollback request) annuls every instruction in the
// pipeline at the next edge and loads rb_pc into the PC; it takes priority
// over a branch. hold freezes every register (memory stall).
//
// There is no interlock and no forwarding: a result can be read by the fifth
// instruction after its producer (the register file writes first on a
// same-cycle read). The program must keep that distance.
//
// From the document: the seven stage names, the stage duties of the
// MIPS-like example (decode reads the register file and sign-extends, execute
// computes and tests for zero, memory accesses data, write-back writes the
// register file), the annul bit, the branch redirect taken from the
// memory-stage register (Figure 3.1) and the stage input registers being
// exported as outputs. The ISA, the widths, the branch handling in detail and
// the reset state are this design's own.
module int_pipeline
  import ft_pkg::*;
#(
  parameter logic [XLEN-1:0] RESET_PC = '0
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            hold,
  input  logic            annul_all,
  input  logic [XLEN-1:0] rb_pc,
  input  logic [31:0]     imem_rdata,
  input  logic [XLEN-1:0] dmem_rdata,
  input  logic [XLEN-1:0] rf_rdata1,
  input  logic [XLEN-1:0] rf_rdata2,
  output pipe_out_t       po,
  output de_t             de_q,
  output ra_t             ra_q,
  output ex_t             ex_q,
  output me_t             me_q,
  output wb_t             xc_q,
  output wb_t             wr_q
);

  de_t de_d;
  ra_t ra_d;
  ex_t ex_d;
  me_t me_d;
  wb_t xc_d, wr_d;
  logic [XLEN-1:0] fe_q, fe_d;   // fetch input register: the PC
  logic            br_redirect;
  logic            flush;          // annul the instructions younger than memory
  logic [XLEN-1:0] alu_res;

  // ---------------- fetch ----------------
  assign br_redirect = me_q.br_taken && !me_q.annul;
  assign flush       = annul_all || br_redirect;

  always_comb begin
    if (annul_all)        fe_d = rb_pc;
    else if (br_redirect) fe_d = me_q.br_target;
    else                  fe_d = fe_q + XLEN'(4);
  end

  always_comb begin
    de_d.annul = flush;
    de_d.pc    = fe_q;
    de_d.inst  = imem_rdata;
  end

  // ---------------- decode ----------------
  opcode_e op;
  logic [RAW-1:0] f_rd, f_rs1, f_rs2;
  always_comb begin
    op    = opcode_e'(de_q.inst[31:26]);
    f_rd  = de_q.inst[25:21];
    f_rs1 = de_q.inst[20:16];
    f_rs2 = de_q.inst[15:11];
  end

  always_comb begin
    ra_d       = '0;
    ra_d.annul = de_q.annul || flush;
    ra_d.pc    = de_q.pc;
    ra_d.rd    = f_rd;
    ra_d.imm   = {{(XLEN-16){de_q.inst[15]}}, de_q.inst[15:0]};
    ra_d.ctrl.alu_op = ALU_ADD;
    unique case (op)
      OP_ADD:  begin ra_d.ctrl.alu_op = ALU_ADD; ra_d.ctrl.rf_we = 1'b1; end
      OP_SUB:  begin ra_d.ctrl.alu_op = ALU_SUB; ra_d.ctrl.rf_we = 1'b1; end
      OP_AND:  begin ra_d.ctrl.alu_op = ALU_AND; ra_d.ctrl.rf_we = 1'b1; end
      OP_OR:   begin ra_d.ctrl.alu_op = ALU_OR;  ra_d.ctrl.rf_we = 1'b1; end
      OP_XOR:  begin ra_d.ctrl.alu_op = ALU_XOR; ra_d.ctrl.rf_we = 1'b1; end
      OP_SLL:  begin ra_d.ctrl.alu_op = ALU_SLL; ra_d.ctrl.rf_we = 1'b1; end
      OP_SRL:  begin ra_d.ctrl.alu_op = ALU_SRL; ra_d.ctrl.rf_we = 1'b1; end
      OP_ADDI: begin ra_d.ctrl.use_imm = 1'b1; ra_d.ctrl.rf_we = 1'b1; end
      OP_LUI:  begin
        ra_d.ctrl.alu_op  = ALU_PASS;
        ra_d.ctrl.use_imm = 1'b1;
        ra_d.ctrl.rf_we   = 1'b1;
        ra_d.imm          = {de_q.inst[15:0], 16'h0000};
      end
      OP_LD:   begin ra_d.ctrl.use_imm = 1'b1; ra_d.ctrl.rf_we = 1'b1; ra_d.ctrl.mem_rd = 1'b1; end
      OP_ST:   begin ra_d.ctrl.use_imm = 1'b1; ra_d.ctrl.mem_wr = 1'b1; end
      OP_BZ:   ra_d.ctrl.br_z  = 1'b1;
      OP_BNZ:  ra_d.ctrl.br_nz = 1'b1;
      default: ;
    endcase
  end

  // Register-file read request: the second port reads rd for a store.
  assign po.rf_raddr1 = f_rs1;
  assign po.rf_raddr2 = (op == OP_ST) ? f_rd : f_rs2;
  assign po.rf_re     = !hold;

  // ---------------- register access ----------------
  always_comb begin
    ex_d.annul   = ra_q.annul || flush;
    ex_d.pc      = ra_q.pc;
    ex_d.ctrl    = ra_q.ctrl;
    ex_d.rd      = ra_q.rd;
    ex_d.op_a    = rf_rdata1;
    ex_d.op_b    = ra_q.ctrl.use_imm ? ra_q.imm : rf_rdata2;
    ex_d.st_data = rf_rdata2;
    ex_d.imm     = ra_q.imm;
  end

  // ---------------- execute ----------------
  always_comb begin
    unique case (ex_q.ctrl.alu_op)
      ALU_ADD:  alu_res = ex_q.op_a + ex_q.op_b;
      ALU_SUB:  alu_res = ex_q.op_a - ex_q.op_b;
      ALU_AND:  alu_res = ex_q.op_a & ex_q.op_b;
      ALU_OR:   alu_res = ex_q.op_a | ex_q.op_b;
      ALU_XOR:  alu_res = ex_q.op_a ^ ex_q.op_b;
      ALU_SLL:  alu_res = ex_q.op_a << ex_q.op_b[4:0];
      ALU_SRL:  alu_res = ex_q.op_a >> ex_q.op_b[4:0];
      ALU_PASS: alu_res = ex_q.op_b;
      default:  alu_res = '0;
    endcase
  end

  always_comb begin
    me_d.annul     = ex_q.annul || flush;
    me_d.pc        = ex_q.pc;
    me_d.rf_we     = ex_q.ctrl.rf_we;
    me_d.mem_rd    = ex_q.ctrl.mem_rd;
    me_d.mem_wr    = ex_q.ctrl.mem_wr;
    me_d.rd        = ex_q.rd;
    me_d.result    = alu_res;
    me_d.st_data   = ex_q.st_data;
    me_d.br_taken  = (ex_q.ctrl.br_z  && (ex_q.op_a == '0)) ||
                     (ex_q.ctrl.br_nz && (ex_q.op_a != '0));
    me_d.br_target = ex_q.pc + {ex_q.imm[XLEN-3:0], 2'b00};
  end

  // ---------------- memory ----------------
  assign po.dmem_addr  = me_q.result;
  assign po.dmem_wdata = me_q.st_data;
  assign po.dmem_we    = me_q.mem_wr && !me_q.annul;
  assign po.dmem_re    = me_q.mem_rd && !me_q.annul;

  always_comb begin
    xc_d.annul   = me_q.annul || annul_all;
    xc_d.pc      = me_q.pc;
    xc_d.npc     = me_q.br_taken ? me_q.br_target : me_q.pc + XLEN'(4);
    xc_d.rf_we   = me_q.rf_we;
    xc_d.rd      = me_q.rd;
    xc_d.wb_data = me_q.mem_rd ? dmem_rdata : me_q.result;
  end

  // ---------------- exception ----------------
  always_comb begin
    wr_d       = xc_q;
    wr_d.annul = xc_q.annul || annul_all;
  end

  // ---------------- write-back ----------------
  assign po.rf_waddr  = wr_q.rd;
  assign po.rf_wdata  = wr_q.wb_data;
  assign po.rf_we     = wr_q.rf_we && !wr_q.annul && (wr_q.rd != '0);
  assign po.imem_addr = fe_q;

  // ---------------- stage registers ----------------
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      fe_q       <= RESET_PC;
      de_q       <= '0;
      ra_q       <= '0;
      ex_q       <= '0;
      me_q       <= '0;
      xc_q       <= '0;
      wr_q       <= '0;
      de_q.annul <= 1'b1;
      ra_q.annul <= 1'b1;
      ex_q.annul <= 1'b1;
      me_q.annul <= 1'b1;
      xc_q.annul <= 1'b1;
      wr_q.annul <= 1'b1;
    end else if (!hold) begin
      fe_q <= fe_d;
      de_q <= de_d;
      ra_q <= ra_d;
      ex_q <= ex_d;
      me_q <= me_d;
      xc_q <= xc_d;
      wr_q <= wr_d;
    end
  end

endmodule
