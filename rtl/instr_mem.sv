// instr_mem: the instruction memory in the static logic.
//
// DEPTH words of 32 bits. The processor side reads asynchronously by byte
// address (the PC; the two low bits are ignored), which is what a
// single-cycle processor needs: the instruction is available in the cycle its
// PC is presented. The same instruction is broadcast to all four cores. The
// host side writes one word per clock (program loading), as the host computer
// feeds the memories in the block diagram. The size and the load port are this
// design's choices; the document does not give them. Contents are not reset.
module instr_mem #(
  parameter int unsigned XLEN  = 32,
  parameter int unsigned DEPTH = 256
) (
  input  logic                     clk,
  input  logic [XLEN-1:0]          pc,
  output logic [31:0]              instr,
  input  logic                     host_we,
  input  logic [$clog2(DEPTH)-1:0] host_addr,
  input  logic [31:0]              host_wdata
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic [31:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (host_we) mem[host_addr] <= host_wdata;
  end

  assign instr = mem[pc[AW+1:2]];

endmodule
