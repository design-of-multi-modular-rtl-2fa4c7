// ft_mips_top: four-modular-redundant MIPS system with per-subsystem repair.
//
// Four identical single-cycle class-MIPS cores are grouped into two
// subsystems, A and B, of two cores each. Every subsystem compares its own two
// cores (analyze_unit); the output-error module turns the two comparison
// results into failure LEDs and a selection, and select_output passes the
// chosen subsystem's result on to the static logic: the shared program
// counter, the data memory, the data-collection buffer and the result LEDs.
// A failing subsystem is dropped in the same cycle its cores disagree, and it
// can be repaired on its own (reconfig_a / reconfig_b stand in for the host
// rewriting that subsystem's partial-reconfiguration region over ICAP, which
// returns it to its reset state) while the other keeps running. After the
// repair, resync_ctrl stalls the system for 31 cycles and copies the register
// state of the running subsystem into the repaired one, which then serves as
// the standby again.
//
// Interface:
//  - clk, rst_n (asynchronous active-low system reset; restarts the program
//    at PC 0 on both subsystems and clears all failure/stale flags).
//  - run: execute one instruction per clock while high.
//  - imem_we/addr/wdata, dmem_we/addr/wdata/rdata: host load/readback ports of
//    the two memories (use with run low).
//  - reconfig_a/b: hold the subsystem in its reset (reconfiguration) state.
//  - fault_mask[0..3]: XOR masks on the ALU results of cores A0, A1, B0, B1,
//    for fault injection; tie to zero in normal use.
//  - led_a/led_b: failure LEDs; led_d: result LEDs D4..D1 (bit 3..0).
//  - sel_b, sys_ok, pc: which subsystem drives the outputs, whether any
//    subsystem is usable, current PC.
//  - resync_busy: a repaired subsystem is being resynchronised (system
//    stalled).
//  - dc_rd_idx/dc_rd_entry/dc_count: data-collection readback.
// The memories, the PC and the collection buffer form the static logic; the
// two subsystem instances are the reconfigurable logic. Sizes of memories and
// buffer are this design's choices. Each subsystem's asynchronous reset is
// rst_n combined with its reconfig input, so rst_n also appears in logic
// (lint reports it as used both synchronously and asynchronously); this is
// intended.
module ft_mips_top
  import mips_pkg::*;
#(
  parameter int unsigned IM_DEPTH = 256,
  parameter int unsigned DM_DEPTH = 256,
  parameter int unsigned DC_DEPTH = 16
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        run,
  input  logic                        imem_we,
  input  logic [$clog2(IM_DEPTH)-1:0] imem_addr,
  input  logic [31:0]                 imem_wdata,
  input  logic                        dmem_we,
  input  logic [$clog2(DM_DEPTH)-1:0] dmem_addr,
  input  logic [XLEN-1:0]             dmem_wdata,
  output logic [XLEN-1:0]             dmem_rdata,
  input  logic                        reconfig_a,
  input  logic                        reconfig_b,
  input  logic [XLEN-1:0]             fault_mask [4],
  output logic                        led_a,
  output logic                        led_b,
  output logic [3:0]                  led_d,
  output logic                        sel_b,
  output logic                        sys_ok,
  output logic [XLEN-1:0]             pc,
  output logic                        resync_busy,
  input  logic [$clog2(DC_DEPTH)-1:0] dc_rd_idx,
  output logic [2*XLEN:0]             dc_rd_entry,
  output logic [15:0]                 dc_count
);

  logic [31:0]     instr;
  logic [XLEN-1:0] mem_rdata;
  core_out_t       out_a, out_b, out_sel;
  logic            err_a, err_b, commit;
  logic            rst_a_n, rst_b_n;
  logic [XLEN-1:0] mask_a [2];
  logic [XLEN-1:0] mask_b [2];
  logic            stale_a, stale_b, avail_a, avail_b;
  logic            sync_we_a, sync_we_b, done_a, done_b;
  logic [4:0]      sync_addr;
  logic [XLEN-1:0] sync_wdata, sync_rdata_a, sync_rdata_b;

  assign rst_a_n = rst_n && !reconfig_a;
  assign rst_b_n = rst_n && !reconfig_b;
  assign mask_a  = '{fault_mask[0], fault_mask[1]};
  assign mask_b  = '{fault_mask[2], fault_mask[3]};

  // ---------------- static logic ----------------
  fetch_pc #(.XLEN(XLEN)) u_pc (
    .clk    (clk),
    .rst_n  (rst_n),
    .commit (commit),
    .next_pc(out_sel.next_pc),
    .pc     (pc)
  );

  instr_mem #(.XLEN(XLEN), .DEPTH(IM_DEPTH)) u_imem (
    .clk       (clk),
    .pc        (pc),
    .instr     (instr),
    .host_we   (imem_we),
    .host_addr (imem_addr),
    .host_wdata(imem_wdata)
  );

  data_mem #(.XLEN(XLEN), .DEPTH(DM_DEPTH)) u_dmem (
    .clk       (clk),
    .cpu_addr  (out_sel.alu_result),
    .cpu_rdata (mem_rdata),
    .cpu_we    (commit && out_sel.mem_we),
    .cpu_wdata (out_sel.mem_wdata),
    .host_we   (dmem_we),
    .host_addr (dmem_addr),
    .host_wdata(dmem_wdata),
    .host_rdata(dmem_rdata)
  );

  // ---------------- reconfigurable logic ----------------
  subsystem u_sys_a (
    .clk       (clk),
    .rst_n     (rst_a_n),
    .en        (commit),
    .instr     (instr),
    .pc        (pc),
    .mem_rdata (mem_rdata),
    .fault_mask(mask_a),
    .sync_we   (sync_we_a),
    .sync_addr (sync_addr),
    .sync_wdata(sync_wdata),
    .sync_rdata(sync_rdata_a),
    .out       (out_a),
    .err       (err_a)
  );

  subsystem u_sys_b (
    .clk       (clk),
    .rst_n     (rst_b_n),
    .en        (commit),
    .instr     (instr),
    .pc        (pc),
    .mem_rdata (mem_rdata),
    .fault_mask(mask_b),
    .sync_we   (sync_we_b),
    .sync_addr (sync_addr),
    .sync_wdata(sync_wdata),
    .sync_rdata(sync_rdata_b),
    .out       (out_b),
    .err       (err_b)
  );

  // ---------------- fault analysis and output ----------------
  output_error u_oerr (
    .clk       (clk),
    .rst_n     (rst_n),
    .err_a     (err_a),
    .err_b     (err_b),
    .reconfig_a(reconfig_a),
    .reconfig_b(reconfig_b),
    .resync_done_a(done_a),
    .resync_done_b(done_b),
    .stale_a   (stale_a),
    .stale_b   (stale_b),
    .avail_a   (avail_a),
    .avail_b   (avail_b),
    .fail_led_a(led_a),
    .fail_led_b(led_b),
    .sel_b     (sel_b),
    .sys_ok    (sys_ok)
  );

  resync_ctrl #(.XLEN(XLEN)) u_resync (
    .clk          (clk),
    .rst_n        (rst_n),
    .stale_a      (stale_a),
    .stale_b      (stale_b),
    .reconfig_a   (reconfig_a),
    .reconfig_b   (reconfig_b),
    .avail_a      (avail_a),
    .avail_b      (avail_b),
    .rdata_a      (sync_rdata_a),
    .rdata_b      (sync_rdata_b),
    .busy         (resync_busy),
    .sync_addr    (sync_addr),
    .sync_wdata   (sync_wdata),
    .sync_we_a    (sync_we_a),
    .sync_we_b    (sync_we_b),
    .resync_done_a(done_a),
    .resync_done_b(done_b)
  );

  select_output u_sel (
    .clk   (clk),
    .rst_n (rst_n),
    .en    (run && !resync_busy),
    .sys_ok(sys_ok),
    .sel_b (sel_b),
    .out_a (out_a),
    .out_b (out_b),
    .out   (out_sel),
    .commit(commit),
    .led_d (led_d)
  );

  data_collection #(.XLEN(XLEN), .DEPTH(DC_DEPTH), .CW(16)) u_dc (
    .clk     (clk),
    .rst_n   (rst_n),
    .commit  (commit),
    .store   (out_sel.mem_we),
    .sel_b   (sel_b),
    .addr    (out_sel.alu_result),
    .data    (out_sel.mem_wdata),
    .rd_idx  (dc_rd_idx),
    .rd_entry(dc_rd_entry),
    .count   (dc_count)
  );

endmodule
