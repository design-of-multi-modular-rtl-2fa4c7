// mips_pkg: types and constants shared by the fault-tolerant MIPS system.
//
// The instruction formats follow the three 32-bit MIPS formats (R: op, rs, rt,
// rd, shamt, funct; I: op, rs, rt, imm16; J: op, addr26). The opcode and funct
// numbers are the standard MIPS-I encodings; which instructions the class-MIPS
// core implements is this design's choice (add/sub/logic/shift/compare,
// immediates, lw/sw, beq/bne, j/jal/jr).
//
// core_out_t is everything a core drives out of itself in one cycle that does
// not depend on the data-memory read data. It is the bundle the analysis unit
// compares between the two cores of a subsystem and the select-output module
// chooses between subsystems.
package mips_pkg;

  localparam int unsigned XLEN = 32;

  // Major opcodes (instr[31:26])
  localparam logic [5:0] OP_RTYPE = 6'h00;
  localparam logic [5:0] OP_J     = 6'h02;
  localparam logic [5:0] OP_JAL   = 6'h03;
  localparam logic [5:0] OP_BEQ   = 6'h04;
  localparam logic [5:0] OP_BNE   = 6'h05;
  localparam logic [5:0] OP_ADDI  = 6'h08;
  localparam logic [5:0] OP_ADDIU = 6'h09;
  localparam logic [5:0] OP_SLTI  = 6'h0A;
  localparam logic [5:0] OP_SLTIU = 6'h0B;
  localparam logic [5:0] OP_ANDI  = 6'h0C;
  localparam logic [5:0] OP_ORI   = 6'h0D;
  localparam logic [5:0] OP_XORI  = 6'h0E;
  localparam logic [5:0] OP_LUI   = 6'h0F;
  localparam logic [5:0] OP_LW    = 6'h23;
  localparam logic [5:0] OP_SW    = 6'h2B;

  // R-type function codes (instr[5:0])
  localparam logic [5:0] FN_SLL  = 6'h00;
  localparam logic [5:0] FN_SRL  = 6'h02;
  localparam logic [5:0] FN_SRA  = 6'h03;
  localparam logic [5:0] FN_SLLV = 6'h04;
  localparam logic [5:0] FN_SRLV = 6'h06;
  localparam logic [5:0] FN_SRAV = 6'h07;
  localparam logic [5:0] FN_JR   = 6'h08;
  localparam logic [5:0] FN_ADD  = 6'h20;
  localparam logic [5:0] FN_ADDU = 6'h21;
  localparam logic [5:0] FN_SUB  = 6'h22;
  localparam logic [5:0] FN_SUBU = 6'h23;
  localparam logic [5:0] FN_AND  = 6'h24;
  localparam logic [5:0] FN_OR   = 6'h25;
  localparam logic [5:0] FN_XOR  = 6'h26;
  localparam logic [5:0] FN_NOR  = 6'h27;
  localparam logic [5:0] FN_SLT  = 6'h2A;
  localparam logic [5:0] FN_SLTU = 6'h2B;

  typedef enum logic [3:0] {
    ALU_ADD, ALU_SUB, ALU_AND, ALU_OR, ALU_XOR, ALU_NOR,
    ALU_SLT, ALU_SLTU, ALU_SLL, ALU_SRL, ALU_SRA, ALU_LUI
  } alu_op_t;

  // Where the next PC comes from
  typedef enum logic [1:0] { PC_SEQ, PC_BRANCH, PC_JUMP, PC_JREG } pc_src_t;

  // Where the register-file write data comes from
  typedef enum logic [1:0] { WB_ALU, WB_MEM, WB_LINK } wb_src_t;

  // Control word produced by the control unit
  typedef struct packed {
    alu_op_t    alu_op;
    logic       alu_src_imm;  // ALU operand B is the extended immediate
    logic       imm_zero_ext; // zero- rather than sign-extend imm16
    logic       shift_var;    // shift amount from rs[4:0] instead of shamt
    logic       reg_we;
    logic [1:0] reg_dst;      // 0: rt, 1: rd, 2: r31
    wb_src_t    wb_src;
    logic       mem_we;
    logic       branch;       // conditional branch
    logic       branch_ne;    // bne rather than beq
    logic       jump;         // j / jal
    logic       jump_reg;     // jr
  } ctrl_t;

  // Everything a core drives out in one cycle except read-data-dependent values
  typedef struct packed {
    logic [XLEN-1:0] alu_result; // ALU result, also the data-memory byte address
    logic            mem_we;     // store this cycle
    logic [XLEN-1:0] mem_wdata;  // store data (rt)
    logic            reg_we;     // register write this cycle
    logic [4:0]      reg_waddr;  // destination register
    logic [XLEN-1:0] next_pc;    // program counter for the next instruction
  } core_out_t;

endpackage
