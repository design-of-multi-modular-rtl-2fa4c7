// fetch_pc: the program counter shared by the four cores.
//
// Holds the byte address of the current instruction. Reset sets it to 0. At
// each rising edge with commit high (system running and an error-free
// subsystem selected) it loads the next PC computed by the selected
// subsystem; otherwise it holds, which halts the system. A single PC shared
// by all four cores, kept in the static logic, is this design's choice.
module fetch_pc #(
  parameter int unsigned XLEN = 32
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            commit,
  input  logic [XLEN-1:0] next_pc,
  output logic [XLEN-1:0] pc
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      pc <= '0;
    else if (commit) pc <= next_pc;
  end

endmodule
