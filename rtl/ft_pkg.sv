// ft_pkg: types and constants shared by the fault-tolerant integer unit.
//
// The integer pipeline has seven stages, as in the LEON3 pipeline the
// mechanism was developed for: fetch, decode, register access, execute,
// memory, exception and write-back. Each stage's input register is a packed
// struct so that the duplicate pipeline's copy can be compared bit for bit.
//
// The instruction set is this design's own small 32-bit load/store ISA, not
// SPARC V8; it exists only so that the fault-tolerance mechanism can be run:
//   [31:26] opcode  [25:21] rd  [20:16] rs1  [15:11] rs2  [15:0] imm (signed)
//   ADD/SUB/AND/OR/XOR/SLL/SRL  rd = rs1 op rs2
//   ADDI                        rd = rs1 + imm
//   LUI                         rd = imm << 16
//   LD                          rd = mem[rs1 + imm]
//   ST                          mem[rs1 + imm] = rd
//   BZ / BNZ                    if (rs1 ==/!= 0) pc = pc + (imm << 2)
// Any other opcode is a no-operation. r0 reads as zero.
package ft_pkg;

  localparam int XLEN    = 32;
  localparam int NREG    = 32;
  localparam int RAW     = $clog2(NREG);
  localparam int N_STAGES = 7;

  // Stage index of each stage's input register.
  typedef enum logic [2:0] {
    ST_FE = 3'd0,
    ST_DE = 3'd1,
    ST_RA = 3'd2,
    ST_EX = 3'd3,
    ST_ME = 3'd4,
    ST_XC = 3'd5,
    ST_WR = 3'd6
  } stage_e;

  // One bit per stage, indexed by stage_e.
  typedef logic [N_STAGES-1:0] stage_vec_t;

  typedef enum logic [5:0] {
    OP_NOP  = 6'd0,
    OP_ADD  = 6'd1,
    OP_SUB  = 6'd2,
    OP_AND  = 6'd3,
    OP_OR   = 6'd4,
    OP_XOR  = 6'd5,
    OP_SLL  = 6'd6,
    OP_SRL  = 6'd7,
    OP_ADDI = 6'd8,
    OP_LD   = 6'd9,
    OP_ST   = 6'd10,
    OP_BZ   = 6'd11,
    OP_BNZ  = 6'd12,
    OP_LUI  = 6'd13
  } opcode_e;

  typedef enum logic [2:0] {
    ALU_ADD  = 3'd0,
    ALU_SUB  = 3'd1,
    ALU_AND  = 3'd2,
    ALU_OR   = 3'd3,
    ALU_XOR  = 3'd4,
    ALU_SLL  = 3'd5,
    ALU_SRL  = 3'd6,
    ALU_PASS = 3'd7   // result = operand b
  } alu_op_e;

  typedef struct packed {
    alu_op_e alu_op;
    logic    use_imm;
    logic    rf_we;
    logic    mem_rd;
    logic    mem_wr;
    logic    br_z;
    logic    br_nz;
  } ctrl_t;

  // Input register of the decode stage.
  typedef struct packed {
    logic            annul;
    logic [XLEN-1:0] pc;
    logic [31:0]     inst;
  } de_t;

  // Input register of the register-access stage.
  typedef struct packed {
    logic            annul;
    logic [XLEN-1:0] pc;
    ctrl_t           ctrl;
    logic [RAW-1:0]  rd;
    logic [XLEN-1:0] imm;
  } ra_t;

  // Input register of the execute stage.
  typedef struct packed {
    logic            annul;
    logic [XLEN-1:0] pc;
    ctrl_t           ctrl;
    logic [RAW-1:0]  rd;
    logic [XLEN-1:0] op_a;
    logic [XLEN-1:0] op_b;
    logic [XLEN-1:0] st_data;
    logic [XLEN-1:0] imm;
  } ex_t;

  // Input register of the memory stage.
  typedef struct packed {
    logic            annul;
    logic [XLEN-1:0] pc;
    logic            rf_we;
    logic            mem_rd;
    logic            mem_wr;
    logic [RAW-1:0]  rd;
    logic [XLEN-1:0] result;
    logic [XLEN-1:0] st_data;
    logic            br_taken;
    logic [XLEN-1:0] br_target;
  } me_t;

  // Input register of the exception and of the write-back stage. npc is the
  // address of the instruction that follows on the program path (the branch
  // target for a taken branch).
  typedef struct packed {
    logic            annul;
    logic [XLEN-1:0] pc;
    logic [XLEN-1:0] npc;
    logic            rf_we;
    logic [RAW-1:0]  rd;
    logic [XLEN-1:0] wb_data;
  } wb_t;

  // Everything the pipeline drives towards the register file and memories.
  typedef struct packed {
    logic [XLEN-1:0] imem_addr;
    logic [XLEN-1:0] dmem_addr;
    logic [XLEN-1:0] dmem_wdata;
    logic            dmem_we;
    logic            dmem_re;
    logic [RAW-1:0]  rf_raddr1;
    logic [RAW-1:0]  rf_raddr2;
    logic            rf_re;
    logic [RAW-1:0]  rf_waddr;
    logic [XLEN-1:0] rf_wdata;
    logic            rf_we;
  } pipe_out_t;

endpackage
