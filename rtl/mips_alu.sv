// mips_alu: the arithmetic-logic unit of one class-MIPS core.
//
// Purely combinational. It adds, subtracts, does bitwise AND/OR/XOR/NOR,
// signed and unsigned set-less-than, logical and arithmetic shifts and the
// load-upper-immediate move, as the ALU of the class-MIPS module must "add,
// subtract, shift, logic and non-logic". Addition and subtraction wrap modulo
// 2^XLEN; overflow traps are not implemented (this design's choice). `zero`
// flags an all-zero result and is used for beq/bne.
//
// Interface: a, b operands; shamt shift amount; op selects the operation;
// y result; zero flag. Result is valid in the same cycle.
module mips_alu
  import mips_pkg::*;
(
  input  logic [XLEN-1:0] a,
  input  logic [XLEN-1:0] b,
  input  logic [4:0]      shamt,
  input  alu_op_t         op,
  output logic [XLEN-1:0] y,
  output logic            zero
);

  always_comb begin
    unique case (op)
      ALU_ADD:  y = a + b;
      ALU_SUB:  y = a - b;
      ALU_AND:  y = a & b;
      ALU_OR:   y = a | b;
      ALU_XOR:  y = a ^ b;
      ALU_NOR:  y = ~(a | b);
      ALU_SLT:  y = XLEN'($signed(a) < $signed(b));
      ALU_SLTU: y = XLEN'(a < b);
      ALU_SLL:  y = b << shamt;
      ALU_SRL:  y = b >> shamt;
      ALU_SRA:  y = XLEN'($signed(b) >>> shamt);
      ALU_LUI:  y = {b[15:0], 16'h0000};
      default:  y = '0;
    endcase
  end

  assign zero = (y == '0);

endmodule
