// subsystem: one reconfigurable subsystem (System A or System B).
//
// Two identical class-MIPS cores run the same instruction stream in lockstep
// and feed an analysis unit, which reports whether they agreed and forwards
// the subsystem's output. In the FPGA prototype this whole module is one
// partial-reconfiguration region, so it can be rewritten without touching the
// other subsystem or the static logic. Here a reconfiguration is represented
// by holding rst_n low: the register files return to their reset state, as a
// freshly loaded region would.
//
// The resynchronisation port writes the same register into both cores
// (sync_we/sync_addr/sync_wdata) and reads core 0's copy (sync_rdata).
//
// Timing: out/err are combinational from instr, pc and the core state; the
// cores update their register files at the rising edge when en is high.
module subsystem
  import mips_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            en,
  input  logic [31:0]     instr,
  input  logic [XLEN-1:0] pc,
  input  logic [XLEN-1:0] mem_rdata,
  input  logic [XLEN-1:0] fault_mask [2],
  input  logic            sync_we,
  input  logic [4:0]      sync_addr,
  input  logic [XLEN-1:0] sync_wdata,
  output logic [XLEN-1:0] sync_rdata,
  output core_out_t       out,
  output logic            err
);

  core_out_t       core_out [2];
  logic [XLEN-1:0] core_sync_rdata [2];

  for (genvar i = 0; i < 2; i++) begin : g_core
    mips_core u_core (
      .clk       (clk),
      .rst_n     (rst_n),
      .en        (en),
      .instr     (instr),
      .pc        (pc),
      .mem_rdata (mem_rdata),
      .fault_mask(fault_mask[i]),
      .sync_we   (sync_we),
      .sync_addr (sync_addr),
      .sync_wdata(sync_wdata),
      .sync_rdata(core_sync_rdata[i]),
      .out       (core_out[i])
    );
  end

  assign sync_rdata = core_sync_rdata[0];

  analyze_unit u_analyze (
    .in0(core_out[0]),
    .in1(core_out[1]),
    .out(out),
    .err(err)
  );

endmodule
