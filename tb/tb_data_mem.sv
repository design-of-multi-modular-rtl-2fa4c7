// tb_data_mem: self-checking test of the data memory.
// Random mixes of processor stores, host writes (which win when both write)
// and reads on both read ports, compared with a shadow array.
module tb_data_mem;
  localparam int DEPTH = 256;
  logic        clk = 0, cwe = 0, hwe = 0;
  logic [31:0] caddr, crdata, cwdata, hwdata, hrdata;
  logic [7:0]  haddr;
  logic [31:0] shadow [DEPTH];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  data_mem #(.DEPTH(DEPTH)) dut (.clk(clk), .cpu_addr(caddr), .cpu_rdata(crdata), .cpu_we(cwe),
                                 .cpu_wdata(cwdata), .host_we(hwe), .host_addr(haddr),
                                 .host_wdata(hwdata), .host_rdata(hrdata));

  task automatic check(string w, logic [31:0] g, logic [31:0] e);
    checks++;
    if (g !== e) begin
      failures++;
      if (failures < 10) $display("%s got %h exp %h", w, g, e);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    caddr = 0; cwdata = 0; haddr = 0; hwdata = 0;
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk); hwe = 1; haddr = 8'(i); hwdata = $urandom; shadow[i] = hwdata;
    end
    @(negedge clk); hwe = 0;
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      cwe    = 1'($urandom);
      hwe    = ($urandom % 4) == 0;
      caddr  = {$urandom} & 32'h0000_03FF;
      haddr  = 8'($urandom);
      if (n % 5 == 0) haddr = caddr[9:2];
      cwdata = $urandom;
      hwdata = $urandom;
      #1;
      check("cpu read", crdata, shadow[caddr[9:2]]);
      check("host read", hrdata, shadow[haddr]);
      @(posedge clk);
      if (hwe) shadow[haddr] = hwdata;
      else if (cwe) shadow[caddr[9:2]] = cwdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
