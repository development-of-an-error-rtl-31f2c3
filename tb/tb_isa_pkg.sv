// tb_isa_pkg: testbench helpers for the integer pipeline.
//
// enc_* build instruction words of the pipeline's small ISA (see ft_pkg).
// prog_gen writes a random program into an array: an initialisation of
// r1..r9 and r11, then random ALU, immediate, load, store, forward-branch
// and counted-loop items, then a branch-to-self that ends it. Every instruction is
// followed by four no-ops, the distance the pipeline needs between a
// producer and its consumer because it has no forwarding; only the four slots
// after a forward branch hold real instructions (a store and writes of r12,
// which nothing reads), executed only when the branch is not taken. ref_model
// executes the same program one instruction at a time and records, for every
// register write, the register, the value and the cycle in which the pipeline
// should commit it when nothing stalls (six cycles to fill the pipeline, one
// per instruction, four more per taken branch).
package tb_isa_pkg;
  import ft_pkg::*;

  localparam int IMEM_WORDS = 512;
  localparam int DMEM_WORDS = 256;
  localparam logic [31:0] DATA_BASE = 32'h0000_0400;

  function automatic logic [31:0] enc_r(opcode_e op, int rd, int rs1, int rs2);
    return {op, 5'(rd), 5'(rs1), 5'(rs2), 11'd0};
  endfunction

  function automatic logic [31:0] enc_i(opcode_e op, int rd, int rs1, int imm);
    return {op, 5'(rd), 5'(rs1), 16'(imm)};
  endfunction

  function automatic logic [31:0] enc_nop();
    return 32'h0;
  endfunction

  typedef struct {
    int          rd;
    logic [31:0] data;
    longint      cycle;   // commit cycle without stalls or rollbacks
  } wr_rec_t;

  class prog_gen;
    logic [31:0] prog [IMEM_WORDS];
    int          n;
    int          halt_idx;

    function new();
      foreach (prog[i]) prog[i] = enc_nop();
      n = 0;
    endfunction

    function void emit(logic [31:0] w);
      prog[n] = w;
      n += 1;
      repeat (4) begin
        prog[n] = enc_nop();
        n += 1;
      end
    endfunction

    function int rnd(int lo, int hi);
      return lo + int'($urandom % (hi - lo + 1));
    endfunction

    // items: number of random body items.
    function void build(int items);
      opcode_e alu [7] = '{OP_ADD, OP_SUB, OP_AND, OP_OR, OP_XOR, OP_SLL, OP_SRL};
      int k, sel, skip, top;
      emit(enc_i(OP_ADDI, 9, 0, int'(DATA_BASE)));
      for (int r = 1; r <= 8; r++) emit(enc_i(OP_ADDI, r, 0, rnd(-2000, 2000)));
      emit(enc_i(OP_ADDI, 11, 0, 0));
      k = 0;
      while (k < items && n < IMEM_WORDS - 60) begin
        sel = rnd(0, 9);
        case (sel)
          0, 1, 2: emit(enc_r(alu[rnd(0, 6)], rnd(1, 8), rnd(1, 8), rnd(1, 8)));
          3:       emit(enc_i(OP_ADDI, rnd(1, 8), rnd(0, 8), rnd(-300, 300)));
          4:       emit(enc_i(OP_LUI, rnd(1, 8), 0, rnd(0, 65535)));
          5:       emit(enc_i(OP_ST, rnd(1, 8), 9, 4 * rnd(0, 31)));
          6:       emit(enc_i(OP_LD, rnd(1, 8), 9, 4 * rnd(0, 31)));
          7: begin
            // forward branch over 1..2 items
            skip = rnd(1, 2);
            // the four slots after the branch hold real instructions (a store
            // and writes of r12, which nothing reads), executed only when the
            // branch is not taken
            prog[n]     = enc_i((rnd(0, 1) != 0) ? OP_BZ : OP_BNZ, 0, rnd(0, 8), 5 * (skip + 1));
            prog[n + 1] = enc_i(OP_ST, rnd(1, 8), 9, 4 * rnd(0, 31));
            prog[n + 2] = enc_r(alu[rnd(0, 6)], 12, rnd(1, 8), rnd(1, 8));
            prog[n + 3] = enc_i(OP_ADDI, 12, rnd(1, 8), rnd(1, 100));
            prog[n + 4] = enc_nop();
            n += 5;
            for (int s = 0; s < skip; s++)
              emit(enc_r(alu[rnd(0, 6)], rnd(1, 8), rnd(1, 8), rnd(1, 8)));
          end
          default: begin
            // counted loop: r10 counts down, r11 accumulates
            emit(enc_i(OP_ADDI, 10, 0, rnd(2, 4)));
            top = n;
            emit(enc_r(OP_ADD, 11, 11, 10));
            emit(enc_i(OP_ST, 11, 9, 4 * rnd(32, 40)));
            emit(enc_i(OP_ADDI, 10, 10, -1));
            emit(enc_i(OP_BNZ, 0, 10, top - n));
          end
        endcase
        k += 1;
      end
      halt_idx = n;
      prog[n] = enc_i(OP_BZ, 0, 0, 0);   // branch to itself
      n += 1;
    endfunction
  endclass

  class ref_model;
    logic [31:0] regs [NREG];
    logic [31:0] mem  [DMEM_WORDS];
    wr_rec_t     writes[$];
    int          taken;
    int          stores;
    int          loads;
    longint      last_cycle;

    function new();
      foreach (regs[i]) regs[i] = '0;
      foreach (mem[i])  mem[i]  = '0;
      taken = 0;
      stores = 0;
      loads = 0;
      last_cycle = 0;
    endfunction

    function automatic int widx(logic [31:0] addr);
      return int'(addr[9:2]) % DMEM_WORDS;
    endfunction

    // Runs until the branch-to-self at halt_idx.
    function void run(const ref logic [31:0] prog [IMEM_WORDS], int halt_idx);
      int          pc;
      longint      dyn;
      logic [31:0] w, a, b, res, imm;
      opcode_e     op;
      int          rd, rs1, rs2;
      bit          wr, jump;
      pc = 0;
      dyn = 0;
      while (pc != halt_idx) begin
        w   = prog[pc];
        op  = opcode_e'(w[31:26]);
        rd  = int'(w[25:21]);
        rs1 = int'(w[20:16]);
        rs2 = int'(w[15:11]);
        imm = {{16{w[15]}}, w[15:0]};
        a   = (rs1 == 0) ? 32'h0 : regs[rs1];
        b   = (rs2 == 0) ? 32'h0 : regs[rs2];
        wr  = 1'b1;
        jump = 1'b0;
        res = '0;
        case (op)
          OP_ADD:  res = a + b;
          OP_SUB:  res = a - b;
          OP_AND:  res = a & b;
          OP_OR:   res = a | b;
          OP_XOR:  res = a ^ b;
          OP_SLL:  res = a << b[4:0];
          OP_SRL:  res = a >> b[4:0];
          OP_ADDI: res = a + imm;
          OP_LUI:  res = {w[15:0], 16'h0};
          OP_LD:   begin res = mem[widx(a + imm)]; loads += 1; end
          OP_ST:   begin
            mem[widx(a + imm)] = (rd == 0) ? 32'h0 : regs[rd];
            stores += 1;
            wr = 1'b0;
          end
          OP_BZ:   begin wr = 1'b0; jump = (a == 0); end
          OP_BNZ:  begin wr = 1'b0; jump = (a != 0); end
          default: wr = 1'b0;
        endcase
        if (wr && rd != 0) begin
          regs[rd] = res;
          writes.push_back('{rd: rd, data: res, cycle: 6 + dyn + 4 * taken});
        end
        last_cycle = 6 + dyn + 4 * taken;
        dyn += 1;
        if (jump) begin
          taken += 1;
          pc = pc + int'($signed(w[15:0]));
        end else begin
          pc += 1;
        end
      end
    endfunction
  endclass

endpackage
