// tb_mips_control: self-checking test of the class-MIPS control unit.
// For every opcode (and every funct under opcode 0) it compares the decoded
// control word with an expectation table written here from the MIPS-I
// instruction definitions.
module tb_mips_control;
  import mips_pkg::*;

  logic [5:0] op, funct;
  ctrl_t      ctrl, e;
  int checks = 0, failures = 0;

  mips_control dut (.op(op), .funct(funct), .ctrl(ctrl));

  function automatic ctrl_t expect_ctrl(logic [5:0] o, logic [5:0] f);
    ctrl_t c = '{alu_op: ALU_ADD, reg_dst: 2'd0, wb_src: WB_ALU, default: '0};
    if (o == 0) begin
      c.reg_dst = 1; c.reg_we = 1;
      case (f)
        'h00: c.alu_op = ALU_SLL;
        'h02: c.alu_op = ALU_SRL;
        'h03: c.alu_op = ALU_SRA;
        'h04: begin c.alu_op = ALU_SLL; c.shift_var = 1; end
        'h06: begin c.alu_op = ALU_SRL; c.shift_var = 1; end
        'h07: begin c.alu_op = ALU_SRA; c.shift_var = 1; end
        'h08: begin c.reg_we = 0; c.jump_reg = 1; end
        'h20, 'h21: ;
        'h22, 'h23: c.alu_op = ALU_SUB;
        'h24: c.alu_op = ALU_AND;
        'h25: c.alu_op = ALU_OR;
        'h26: c.alu_op = ALU_XOR;
        'h27: c.alu_op = ALU_NOR;
        'h2A: c.alu_op = ALU_SLT;
        'h2B: c.alu_op = ALU_SLTU;
        default: c.reg_we = 0;
      endcase
      return c;
    end
    case (o)
      'h08, 'h09: begin c.alu_src_imm = 1; c.reg_we = 1; end
      'h0A: begin c.alu_op = ALU_SLT;  c.alu_src_imm = 1; c.reg_we = 1; end
      'h0B: begin c.alu_op = ALU_SLTU; c.alu_src_imm = 1; c.reg_we = 1; end
      'h0C: begin c.alu_op = ALU_AND; c.alu_src_imm = 1; c.imm_zero_ext = 1; c.reg_we = 1; end
      'h0D: begin c.alu_op = ALU_OR;  c.alu_src_imm = 1; c.imm_zero_ext = 1; c.reg_we = 1; end
      'h0E: begin c.alu_op = ALU_XOR; c.alu_src_imm = 1; c.imm_zero_ext = 1; c.reg_we = 1; end
      'h0F: begin c.alu_op = ALU_LUI; c.alu_src_imm = 1; c.imm_zero_ext = 1; c.reg_we = 1; end
      'h23: begin c.alu_src_imm = 1; c.reg_we = 1; c.wb_src = WB_MEM; end
      'h2B: begin c.alu_src_imm = 1; c.mem_we = 1; end
      'h04: begin c.alu_op = ALU_SUB; c.branch = 1; end
      'h05: begin c.alu_op = ALU_SUB; c.branch = 1; c.branch_ne = 1; end
      'h02: c.jump = 1;
      'h03: begin c.jump = 1; c.reg_we = 1; c.reg_dst = 2; c.wb_src = WB_LINK; end
      default: ;
    endcase
    return c;
  endfunction

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int o = 0; o < 64; o++) begin
      for (int f = 0; f < 64; f++) begin
        op = 6'(o); funct = 6'(f);
        #1;
        e = expect_ctrl(op, funct);
        checks++;
        if (ctrl !== e) begin
          failures++;
          if (failures < 10) $display("op=%h funct=%h got %p exp %p", op, funct, ctrl, e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
