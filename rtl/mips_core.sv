// mips_core: one "class MIPS" module - a single-cycle MIPS-style processor
// without memories.
//
// As in the document's block diagram it holds a control unit, a register file
// and an ALU: the instruction comes in, the control unit decodes it, the
// register file supplies rs/rt, and the ALU produces the result. The program
// counter and both memories live in the static logic outside the core, so the
// two cores of a subsystem (and both subsystems) see the same instruction and
// the same load data. Giving the core the current PC and having it return the
// next PC, the store request and the register write it makes is this design's
// choice: it lets the analysis unit compare everything a core decides.
//
// Timing: single cycle. `out` is combinational from instr, pc and the register
// file; the register file is written at the rising edge when en is high.
// mem_rdata only feeds the register write data, never `out`, so no
// combinational path runs from the memory read back into the comparison.
//
// Resynchronisation port: while sync_we is high the register-file write port
// is taken over and writes sync_wdata into register sync_addr; sync_rdata
// always shows register sync_addr. The static logic uses it to copy the
// register state of a healthy core into a freshly repaired one.
//
// fault_mask is XORed onto the ALU result. It is held at zero in normal use
// and is there to emulate an upset in the core's logic (fault injection).
module mips_core
  import mips_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            en,
  input  logic [31:0]     instr,
  input  logic [XLEN-1:0] pc,
  input  logic [XLEN-1:0] mem_rdata,
  input  logic [XLEN-1:0] fault_mask,
  input  logic            sync_we,
  input  logic [4:0]      sync_addr,
  input  logic [XLEN-1:0] sync_wdata,
  output logic [XLEN-1:0] sync_rdata,
  output core_out_t       out
);

  ctrl_t           ctrl;
  logic [4:0]      rs, rt, rd, shamt;
  logic [15:0]     imm;
  logic [XLEN-1:0] rs_val, rt_val, imm_ext, alu_b, alu_y, result, pc_plus4;
  logic [4:0]      shift_amt;
  logic            alu_zero, take_branch;
  logic [XLEN-1:0] wb_data;

  assign rs    = instr[25:21];
  assign rt    = instr[20:16];
  assign rd    = instr[15:11];
  assign shamt = instr[10:6];
  assign imm   = instr[15:0];

  mips_control u_ctrl (
    .op   (instr[31:26]),
    .funct(instr[5:0]),
    .ctrl (ctrl)
  );

  mips_regfile #(.XLEN(XLEN)) u_rf (
    .clk   (clk),
    .rst_n (rst_n),
    .raddr1(rs),
    .rdata1(rs_val),
    .raddr2(rt),
    .rdata2(rt_val),
    .raddr3(sync_addr),
    .rdata3(sync_rdata),
    .we    (sync_we || (en && out.reg_we)),
    .waddr (sync_we ? sync_addr : out.reg_waddr),
    .wdata (sync_we ? sync_wdata : wb_data)
  );

  assign imm_ext   = ctrl.imm_zero_ext ? XLEN'(imm) : XLEN'($signed(imm));
  assign alu_b     = ctrl.alu_src_imm ? imm_ext : rt_val;
  assign shift_amt = ctrl.shift_var ? rs_val[4:0] : shamt;

  mips_alu u_alu (
    .a    (rs_val),
    .b    (alu_b),
    .shamt(shift_amt),
    .op   (ctrl.alu_op),
    .y    (alu_y),
    .zero (alu_zero)
  );

  assign result      = alu_y ^ fault_mask;
  assign pc_plus4    = pc + XLEN'(4);
  assign take_branch = ctrl.branch && (alu_zero ^ ctrl.branch_ne);

  always_comb begin
    out.alu_result = result;
    out.mem_we     = ctrl.mem_we;
    out.mem_wdata  = rt_val;
    out.reg_we     = ctrl.reg_we;
    unique case (ctrl.reg_dst)
      2'd1:    out.reg_waddr = rd;
      2'd2:    out.reg_waddr = 5'd31;
      default: out.reg_waddr = rt;
    endcase
    if (ctrl.jump_reg)
      out.next_pc = rs_val;
    else if (ctrl.jump)
      out.next_pc = {pc_plus4[XLEN-1:28], instr[25:0], 2'b00};
    else if (take_branch)
      out.next_pc = pc_plus4 + (imm_ext << 2);
    else
      out.next_pc = pc_plus4;
  end

  always_comb begin
    unique case (ctrl.wb_src)
      WB_MEM:  wb_data = mem_rdata;
      WB_LINK: wb_data = pc_plus4;
      default: wb_data = result;
    endcase
  end

endmodule
