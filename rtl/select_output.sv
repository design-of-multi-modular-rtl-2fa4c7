// select_output: the data-output selection module of the static logic.
//
// A multiplexer that passes the output bundle of the subsystem named by the
// output-error module (sel_b = 0: System A, 1: System B) on to the shared PC,
// the data memory and the data-collection module. It also drives the four
// result LEDs D1..D4: they show bits 3..0 of the most recent store data that
// was committed (en and sys_ok high), held in a register cleared by reset.
// What the LEDs display is this design's choice; the block diagram only shows
// four LEDs fed from this module.
module select_output
  import mips_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      en,
  input  logic      sys_ok,
  input  logic      sel_b,
  input  core_out_t out_a,
  input  core_out_t out_b,
  output core_out_t out,
  output logic      commit,
  output logic [3:0] led_d
);

  assign out    = sel_b ? out_b : out_a;
  assign commit = en && sys_ok;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                    led_d <= '0;
    else if (commit && out.mem_we) led_d <= out.mem_wdata[3:0];
  end

endmodule
