// mips_control: the control unit of one class-MIPS core.
//
// Combinational decoder from the instruction's op and funct fields to the
// control word ctrl_t (ALU operation, operand source, register destination and
// write enable, write-back source, store enable, branch/jump kind). Encodings
// are the standard MIPS-I ones; the set of decoded instructions is this
// design's choice. Anything not decoded executes as a no-op (no register or
// memory write, PC advances by 4).
module mips_control
  import mips_pkg::*;
(
  input  logic [5:0] op,
  input  logic [5:0] funct,
  output ctrl_t      ctrl
);

  always_comb begin
    ctrl = '{alu_op: ALU_ADD, reg_dst: 2'd0, wb_src: WB_ALU, default: '0};
    unique case (op)
      OP_RTYPE: begin
        ctrl.reg_dst = 2'd1;
        ctrl.reg_we  = 1'b1;
        unique case (funct)
          FN_SLL:  ctrl.alu_op = ALU_SLL;
          FN_SRL:  ctrl.alu_op = ALU_SRL;
          FN_SRA:  ctrl.alu_op = ALU_SRA;
          FN_SLLV: begin ctrl.alu_op = ALU_SLL; ctrl.shift_var = 1'b1; end
          FN_SRLV: begin ctrl.alu_op = ALU_SRL; ctrl.shift_var = 1'b1; end
          FN_SRAV: begin ctrl.alu_op = ALU_SRA; ctrl.shift_var = 1'b1; end
          FN_JR:   begin ctrl.jump_reg = 1'b1; ctrl.reg_we = 1'b0; end
          FN_ADD, FN_ADDU: ctrl.alu_op = ALU_ADD;
          FN_SUB, FN_SUBU: ctrl.alu_op = ALU_SUB;
          FN_AND:  ctrl.alu_op = ALU_AND;
          FN_OR:   ctrl.alu_op = ALU_OR;
          FN_XOR:  ctrl.alu_op = ALU_XOR;
          FN_NOR:  ctrl.alu_op = ALU_NOR;
          FN_SLT:  ctrl.alu_op = ALU_SLT;
          FN_SLTU: ctrl.alu_op = ALU_SLTU;
          default: ctrl.reg_we = 1'b0;
        endcase
      end
      OP_ADDI, OP_ADDIU: begin
        ctrl.alu_op = ALU_ADD; ctrl.alu_src_imm = 1'b1; ctrl.reg_we = 1'b1;
      end
      OP_SLTI: begin
        ctrl.alu_op = ALU_SLT; ctrl.alu_src_imm = 1'b1; ctrl.reg_we = 1'b1;
      end
      OP_SLTIU: begin
        ctrl.alu_op = ALU_SLTU; ctrl.alu_src_imm = 1'b1; ctrl.reg_we = 1'b1;
      end
      OP_ANDI: begin
        ctrl.alu_op = ALU_AND; ctrl.alu_src_imm = 1'b1; ctrl.imm_zero_ext = 1'b1; ctrl.reg_we = 1'b1;
      end
      OP_ORI: begin
        ctrl.alu_op = ALU_OR; ctrl.alu_src_imm = 1'b1; ctrl.imm_zero_ext = 1'b1; ctrl.reg_we = 1'b1;
      end
      OP_XORI: begin
        ctrl.alu_op = ALU_XOR; ctrl.alu_src_imm = 1'b1; ctrl.imm_zero_ext = 1'b1; ctrl.reg_we = 1'b1;
      end
      OP_LUI: begin
        ctrl.alu_op = ALU_LUI; ctrl.alu_src_imm = 1'b1; ctrl.imm_zero_ext = 1'b1; ctrl.reg_we = 1'b1;
      end
      OP_LW: begin
        ctrl.alu_op = ALU_ADD; ctrl.alu_src_imm = 1'b1; ctrl.reg_we = 1'b1; ctrl.wb_src = WB_MEM;
      end
      OP_SW: begin
        ctrl.alu_op = ALU_ADD; ctrl.alu_src_imm = 1'b1; ctrl.mem_we = 1'b1;
      end
      OP_BEQ: begin
        ctrl.alu_op = ALU_SUB; ctrl.branch = 1'b1;
      end
      OP_BNE: begin
        ctrl.alu_op = ALU_SUB; ctrl.branch = 1'b1; ctrl.branch_ne = 1'b1;
      end
      OP_J:   ctrl.jump = 1'b1;
      OP_JAL: begin
        ctrl.jump = 1'b1; ctrl.reg_we = 1'b1; ctrl.reg_dst = 2'd2; ctrl.wb_src = WB_LINK;
      end
      default: ;
    endcase
  end

endmodule
