// output_error: the output-error module of the static logic.
//
// It has the two jobs the document gives it: drive a failure-detection signal
// per subsystem (the LEDs A and B) and decide, from those signals, which
// subsystem's output is used (the selection control for select_output).
//
// How it does that is this design's choice:
//  - fail_x is set by the subsystem's error flag and stays set until the
//    subsystem is reconfigured (reconfig_x high for at least one clock).
//  - A reconfigured subsystem comes back with its registers at reset values,
//    not with the program's state. It is marked stale_x and is not used again
//    until resync_ctrl has copied the register state into it (resync_done_x)
//    or the next system reset restarts the program on both subsystems.
//  - The active subsystem is kept while it is usable; when it is not and the
//    other one is, the selection switches to the other one in the same cycle
//    the error is seen (combinational path from err_x to sel_b), so a wrong
//    result is never committed. When neither is usable, sys_ok falls and the
//    system halts.
// After reset subsystem A is active. fail_led_x = fail_x | stale_x.
module output_error (
  input  logic clk,
  input  logic rst_n,
  input  logic err_a,
  input  logic err_b,
  input  logic reconfig_a,
  input  logic reconfig_b,
  input  logic resync_done_a,
  input  logic resync_done_b,
  output logic stale_a,
  output logic stale_b,
  output logic avail_a,
  output logic avail_b,
  output logic fail_led_a,
  output logic fail_led_b,
  output logic sel_b,
  output logic sys_ok
);

  logic fail_a, fail_b, active_b;

  assign avail_a = !(fail_a || err_a || stale_a || reconfig_a);
  assign avail_b = !(fail_b || err_b || stale_b || reconfig_b);

  always_comb begin
    if (!active_b) sel_b = !avail_a && avail_b;
    else           sel_b = !(avail_a && !avail_b);
    sys_ok = sel_b ? avail_b : avail_a;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fail_a   <= 1'b0;
      fail_b   <= 1'b0;
      stale_a  <= 1'b0;
      stale_b  <= 1'b0;
      active_b <= 1'b0;
    end else begin
      fail_a   <= reconfig_a ? 1'b0 : (fail_a || err_a);
      fail_b   <= reconfig_b ? 1'b0 : (fail_b || err_b);
      stale_a  <= (stale_a || reconfig_a) && !resync_done_a;
      stale_b  <= (stale_b || reconfig_b) && !resync_done_b;
      active_b <= sel_b;
    end
  end

  // A usable subsystem is never one that is disagreeing, stale or being
  // reconfigured in this cycle.
  a_selected_is_clean: assert property (@(posedge clk) disable iff (!rst_n)
    sys_ok |-> (sel_b ? !(err_b || stale_b || reconfig_b) : !(err_a || stale_a || reconfig_a)));

  assign fail_led_a = fail_a || stale_a;
  assign fail_led_b = fail_b || stale_b;

endmodule
