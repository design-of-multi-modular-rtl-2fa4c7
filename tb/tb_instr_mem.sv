// tb_instr_mem: self-checking test of the instruction memory.
// Loads random words through the host port and reads them back through the
// PC port (byte address, low bits ignored), including after overwrites.
module tb_instr_mem;
  localparam int DEPTH = 256;
  logic        clk = 0, we = 0;
  logic [7:0]  addr;
  logic [31:0] wdata, pc, instr;
  logic [31:0] shadow [DEPTH];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  instr_mem #(.DEPTH(DEPTH)) dut (.clk(clk), .pc(pc), .instr(instr), .host_we(we),
                                  .host_addr(addr), .host_wdata(wdata));

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    pc = 0; addr = 0; wdata = 0;
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk); we = 1; addr = 8'(i); wdata = $urandom; shadow[i] = wdata;
    end
    @(negedge clk); we = 0;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      if (n % 7 == 0) begin
        we = 1; addr = 8'($urandom); wdata = $urandom;
        @(negedge clk); shadow[addr] = wdata; we = 0;
      end
      pc = {22'($urandom), 8'($urandom), 2'($urandom)};
      #1;
      checks++;
      if (instr !== shadow[pc[9:2]]) begin
        failures++;
        if (failures < 10) $display("pc=%h got %h exp %h", pc, instr, shadow[pc[9:2]]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
