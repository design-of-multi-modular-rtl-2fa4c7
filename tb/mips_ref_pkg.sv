// mips_ref_pkg: an instruction-level reference model of the class-MIPS core,
// written independently of the RTL for the testbenches. step() executes one
// instruction on a register array and returns the bundle the core is
// expected to drive (ALU result, store request, register write, next PC).
// It also provides an instruction generator and encoders for test programs.
package mips_ref_pkg;
  import mips_pkg::*;

  typedef logic [31:0] regs_t [32];

  function automatic logic [31:0] sext16(logic [15:0] v);
    return {{16{v[15]}}, v};
  endfunction

  function automatic logic [31:0] sra32(logic [31:0] v, int s);
    logic [31:0] r = v;
    for (int i = 0; i < s; i++) r = {r[31], r[31:1]};
    return r;
  endfunction

  // Execute instr at pc. Updates regs (using mem_rdata for lw).
  function automatic core_out_t step(ref regs_t regs, input logic [31:0] instr,
                                     input logic [31:0] pc, input logic [31:0] mem_rdata);
    core_out_t o;
    logic [5:0]  op    = instr[31:26];
    logic [5:0]  fn    = instr[5:0];
    int unsigned rs    = 32'(instr[25:21]);
    int unsigned rt    = 32'(instr[20:16]);
    int unsigned rd    = 32'(instr[15:11]);
    int unsigned sh    = 32'(instr[10:6]);
    logic [15:0] imm   = instr[15:0];
    logic [31:0] a     = regs[rs];
    logic [31:0] b     = regs[rt];
    logic [31:0] wb;
    logic [31:0] seq   = pc + 4;
    o = '0;
    o.next_pc   = seq;
    o.mem_wdata = b;
    o.reg_waddr = 5'(rt);
    wb = 0;
    if (op == 6'h00) begin
      o.reg_waddr = 5'(rd);
      o.reg_we = 1;
      case (fn)
        6'h00: o.alu_result = b << sh;
        6'h02: o.alu_result = b >> sh;
        6'h03: o.alu_result = sra32(b, sh);
        6'h04: o.alu_result = b << a[4:0];
        6'h06: o.alu_result = b >> a[4:0];
        6'h07: o.alu_result = sra32(b, int'(a[4:0]));
        6'h08: begin o.reg_we = 0; o.next_pc = a; o.alu_result = a + b; end
        6'h20, 6'h21: o.alu_result = a + b;
        6'h22, 6'h23: o.alu_result = a - b;
        6'h24: o.alu_result = a & b;
        6'h25: o.alu_result = a | b;
        6'h26: o.alu_result = a ^ b;
        6'h27: o.alu_result = ~(a | b);
        6'h2A: o.alu_result = {31'b0, $signed(a) < $signed(b)};
        6'h2B: o.alu_result = {31'b0, a < b};
        default: begin o.reg_we = 0; o.alu_result = a + b; end
      endcase
      wb = o.alu_result;
    end else begin
      case (op)
        6'h08, 6'h09: begin o.alu_result = a + sext16(imm); o.reg_we = 1; end
        6'h0A: begin o.alu_result = {31'b0, $signed(a) < $signed(sext16(imm))}; o.reg_we = 1; end
        6'h0B: begin o.alu_result = {31'b0, a < sext16(imm)}; o.reg_we = 1; end
        6'h0C: begin o.alu_result = a & {16'h0, imm}; o.reg_we = 1; end
        6'h0D: begin o.alu_result = a | {16'h0, imm}; o.reg_we = 1; end
        6'h0E: begin o.alu_result = a ^ {16'h0, imm}; o.reg_we = 1; end
        6'h0F: begin o.alu_result = {imm, 16'h0}; o.reg_we = 1; end
        6'h23: begin o.alu_result = a + sext16(imm); o.reg_we = 1; end
        6'h2B: begin o.alu_result = a + sext16(imm); o.mem_we = 1; end
        6'h04, 6'h05: begin
          o.alu_result = a - b;
          if ((a == b) == (op == 6'h04)) o.next_pc = seq + (sext16(imm) << 2);
        end
        6'h02: begin o.alu_result = a + b; o.next_pc = {seq[31:28], instr[25:0], 2'b00}; end
        6'h03: begin
          o.alu_result = a + b; o.next_pc = {seq[31:28], instr[25:0], 2'b00};
          o.reg_we = 1; o.reg_waddr = 5'd31;
        end
        default: o.alu_result = a + b;
      endcase
      wb = (op == 6'h23) ? mem_rdata : (op == 6'h03) ? seq : o.alu_result;
    end
    if (o.reg_we && o.reg_waddr != 0) regs[o.reg_waddr] = wb;
    return o;
  endfunction

  // Encoders
  function automatic logic [31:0] r_type(int fn, int rs, int rt, int rd, int sh = 0);
    return {6'h00, 5'(rs), 5'(rt), 5'(rd), 5'(sh), 6'(fn)};
  endfunction
  function automatic logic [31:0] i_type(int op, int rs, int rt, int imm);
    return {6'(op), 5'(rs), 5'(rt), 16'(imm)};
  endfunction
  function automatic logic [31:0] j_type(int op, int addr);
    return {6'(op), 26'(addr)};
  endfunction

  // A random instruction from the implemented set.
  function automatic logic [31:0] rand_instr();
    int fns [17] = '{'h00, 'h02, 'h03, 'h04, 'h06, 'h07, 'h08, 'h20, 'h21, 'h22, 'h23,
                     'h24, 'h25, 'h26, 'h27, 'h2A, 'h2B};
    int ops [17] = '{'h08, 'h09, 'h0A, 'h0B, 'h0C, 'h0D, 'h0E, 'h0F, 'h23, 'h2B,
                     'h04, 'h05, 'h02, 'h03, 'h00, 'h00, 'h3F};
    int op = ops[$urandom % 17];
    logic [31:0] w = $urandom;
    if (op == 'h00) return {6'h00, w[25:6], 6'(fns[$urandom % 17])};
    return {6'(op), w[25:0]};
  endfunction
endpackage
