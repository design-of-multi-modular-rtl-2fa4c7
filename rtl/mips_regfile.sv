// mips_regfile: the register file of one class-MIPS core.
//
// 32 registers of XLEN bits, addressed by the 5-bit rs/rt/rd fields of the
// instruction formats. Two asynchronous read ports (rs, rt) and one write port
// written on the rising clock edge when `we` is high. A third asynchronous read
// port (raddr3) lets the static logic read the state out when a repaired
// subsystem is resynchronised. Register 0 always reads
// zero and ignores writes, as in MIPS. An active-low synchronous-deassert reset
// clears every register: the subsystem reset used after a partial
// reconfiguration therefore starts both cores of the repaired subsystem from
// the same, known state (this design's choice; the document does not describe
// the register file's reset).
module mips_regfile #(
  parameter int unsigned XLEN  = 32,
  parameter int unsigned NREGS = 32
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [$clog2(NREGS)-1:0] raddr1,
  output logic [XLEN-1:0]          rdata1,
  input  logic [$clog2(NREGS)-1:0] raddr2,
  output logic [XLEN-1:0]          rdata2,
  input  logic [$clog2(NREGS)-1:0] raddr3,
  output logic [XLEN-1:0]          rdata3,
  input  logic                     we,
  input  logic [$clog2(NREGS)-1:0] waddr,
  input  logic [XLEN-1:0]          wdata
);

  logic [XLEN-1:0] regs [NREGS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NREGS; i++) regs[i] <= '0;
    end else if (we && waddr != '0) begin
      regs[waddr] <= wdata;
    end
  end

  assign rdata1 = (raddr1 == '0) ? '0 : regs[raddr1];
  assign rdata2 = (raddr2 == '0) ? '0 : regs[raddr2];
  assign rdata3 = (raddr3 == '0) ? '0 : regs[raddr3];

endmodule
