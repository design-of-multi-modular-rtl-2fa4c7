// resync_ctrl: copies the register state of the healthy subsystem into a
// freshly repaired one, so the repaired subsystem can serve as the standby
// again without restarting the program.
//
// After a partial reconfiguration a subsystem's register files are at their
// reset values (output_error marks it stale). As soon as the reconfiguration
// input has fallen and the other subsystem is usable, this controller runs
// one copy pass: for r = 1..31, one register per clock, it reads register r
// of the source subsystem (core 0's copy, through the register files' third
// read port) and writes it into both cores of the repaired subsystem. While
// it copies, `busy` stalls the whole system (no commit), so the source state
// and the shared PC and data memory stand still; the copy therefore takes 31
// stall cycles. On the last register it pulses resync_done_x, which clears
// the stale flag. If the source stops being usable, or the destination is
// reconfigured again, during the pass, the pass is abandoned and the
// subsystem stays stale. Only the register files need copying: the PC and
// both memories are shared static logic.
//
// The document says a repaired subsystem returns to working order but not
// how it regains the program state; this copy procedure is this design's.
module resync_ctrl #(
  parameter int unsigned XLEN = 32
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            stale_a,
  input  logic            stale_b,
  input  logic            reconfig_a,
  input  logic            reconfig_b,
  input  logic            avail_a,
  input  logic            avail_b,
  input  logic [XLEN-1:0] rdata_a,
  input  logic [XLEN-1:0] rdata_b,
  output logic            busy,
  output logic [4:0]      sync_addr,
  output logic [XLEN-1:0] sync_wdata,
  output logic            sync_we_a,
  output logic            sync_we_b,
  output logic            resync_done_a,
  output logic            resync_done_b
);

  typedef enum logic {S_IDLE, S_COPY} state_t;

  state_t state;
  logic   dst_b;     // destination is subsystem B (source A)
  logic   src_ok, dst_hold, last;

  assign busy       = (state == S_COPY);
  assign src_ok     = dst_b ? avail_a : avail_b;
  assign dst_hold   = dst_b ? reconfig_b : reconfig_a;
  assign last       = (sync_addr == 5'd31);
  assign sync_wdata = dst_b ? rdata_a : rdata_b;
  assign sync_we_a  = busy && !dst_b && src_ok && !dst_hold;
  assign sync_we_b  = busy &&  dst_b && src_ok && !dst_hold;

  assign resync_done_a = sync_we_a && last;
  assign resync_done_b = sync_we_b && last;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      dst_b     <= 1'b0;
      sync_addr <= 5'd1;
    end else begin
      unique case (state)
        S_IDLE: begin
          sync_addr <= 5'd1;
          if (stale_a && !reconfig_a && avail_b) begin
            state <= S_COPY;
            dst_b <= 1'b0;
          end else if (stale_b && !reconfig_b && avail_a) begin
            state <= S_COPY;
            dst_b <= 1'b1;
          end
        end
        S_COPY: begin
          if (!src_ok || dst_hold || last) state <= S_IDLE;
          sync_addr <= sync_addr + 5'd1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
