// tb_mips_alu: self-checking test of the class-MIPS ALU.
// Drives random operands (plus corner values) through every operation and
// compares the result and zero flag with a reference computed here.
module tb_mips_alu;
  import mips_pkg::*;

  logic [31:0] a, b, y, exp_y;
  logic [4:0]  shamt;
  alu_op_t     op;
  logic        zero;
  int checks = 0, failures = 0;

  mips_alu dut (.a(a), .b(b), .shamt(shamt), .op(op), .y(y), .zero(zero));

  function automatic logic [31:0] ref_alu(alu_op_t o, logic [31:0] x, logic [31:0] z, logic [4:0] s);
    longint sx, sz;
    sx = longint'($signed(x));
    sz = longint'($signed(z));
    case (o)
      ALU_ADD:  return 32'(x + z);
      ALU_SUB:  return 32'(x + ~z + 1);
      ALU_AND:  return x & z;
      ALU_OR:   return x | z;
      ALU_XOR:  return x ^ z;
      ALU_NOR:  return ~x & ~z;
      ALU_SLT:  return (sx < sz) ? 32'd1 : 32'd0;
      ALU_SLTU: return ({32'b0, x} < {32'b0, z}) ? 32'd1 : 32'd0;
      ALU_SLL:  return 32'(longint'(z) * (64'd1 << s));
      ALU_SRL:  return 32'(longint'(z) / (64'd1 << s));
      ALU_SRA:  begin
        logic [31:0] r = z;
        for (int i = 0; i < s; i++) r = {r[31], r[31:1]};
        return r;
      end
      ALU_LUI:  return {z[15:0], 16'h0};
      default:  return 32'h0;
    endcase
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic logic [31:0] corner [6] = '{32'h0, 32'h1, 32'hFFFF_FFFF, 32'h8000_0000, 32'h7FFF_FFFF, 32'h1234_5678};
    for (int n = 0; n < 2000; n++) begin
      for (int k = 0; k <= int'(ALU_LUI); k++) begin
        op = alu_op_t'(k);
        a = (n < 36) ? corner[n % 6] : $urandom;
        b = (n < 36) ? corner[n / 6] : $urandom;
        shamt = 5'($urandom);
        #1;
        exp_y = ref_alu(op, a, b, shamt);
        checks++;
        if (y !== exp_y || zero !== (exp_y == 0)) begin
          failures++;
          if (failures < 10) $display("ALU mismatch op=%s a=%h b=%h s=%0d y=%h exp=%h", op.name(), a, b, shamt, y, exp_y);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
