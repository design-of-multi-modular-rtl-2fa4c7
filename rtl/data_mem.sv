// data_mem: the data memory in the static logic.
//
// DEPTH words of XLEN bits, word-addressed by byte address (low two bits
// ignored). The processor side reads asynchronously (single-cycle load) and
// writes at the rising edge when cpu_we is high; only the output chosen by the
// select-output module reaches this port, so a faulty subsystem never writes
// here. The host side has a write port (loading data, priority over the
// processor) and an asynchronous read port (reading results back). Size and
// host ports are this design's choices. Contents are not reset.
module data_mem #(
  parameter int unsigned XLEN  = 32,
  parameter int unsigned DEPTH = 256
) (
  input  logic                     clk,
  input  logic [XLEN-1:0]          cpu_addr,
  output logic [XLEN-1:0]          cpu_rdata,
  input  logic                     cpu_we,
  input  logic [XLEN-1:0]          cpu_wdata,
  input  logic                     host_we,
  input  logic [$clog2(DEPTH)-1:0] host_addr,
  input  logic [XLEN-1:0]          host_wdata,
  output logic [XLEN-1:0]          host_rdata
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic [XLEN-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (host_we)     mem[host_addr]           <= host_wdata;
    else if (cpu_we) mem[cpu_addr[AW+1:2]]    <= cpu_wdata;
  end

  assign cpu_rdata  = mem[cpu_addr[AW+1:2]];
  assign host_rdata = mem[host_addr];

endmodule
