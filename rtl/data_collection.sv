// data_collection: the result-acquisition module.
//
// Records every result the system commits to the data memory so the host can
// read them back. Each committed store writes one entry {sel_b, address, data}
// into a circular buffer of DEPTH entries; `count` is the number of stores
// recorded since reset (saturating). The host reads entry rd_idx
// asynchronously. The entry format, the depth and the choice to log stores
// (rather than every ALU result) are this design's; the document only names an
// "acquisition module of results" fed by the select-output module and the
// host.
module data_collection #(
  parameter int unsigned XLEN  = 32,
  parameter int unsigned DEPTH = 16,
  parameter int unsigned CW    = 16
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     commit,
  input  logic                     store,
  input  logic                     sel_b,
  input  logic [XLEN-1:0]          addr,
  input  logic [XLEN-1:0]          data,
  input  logic [$clog2(DEPTH)-1:0] rd_idx,
  output logic [2*XLEN:0]          rd_entry,
  output logic [CW-1:0]            count
);

  localparam int unsigned IW = $clog2(DEPTH);

  logic [2*XLEN:0] log_mem [DEPTH];
  logic [IW-1:0]   wr_ptr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      count  <= '0;
      for (int i = 0; i < DEPTH; i++) log_mem[i] <= '0;
    end else if (commit && store) begin
      log_mem[wr_ptr] <= {sel_b, addr, data};
      wr_ptr          <= (wr_ptr == IW'(DEPTH - 1)) ? '0 : wr_ptr + 1'b1;
      if (count != '1) count <= count + 1'b1;
    end
  end

  assign rd_entry = log_mem[rd_idx];

endmodule
