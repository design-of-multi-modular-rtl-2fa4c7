// tb_mips_core: self-checking test of one class-MIPS core.
// Feeds a random stream of instructions from the implemented set, with random
// load data, and compares the core's output bundle every cycle with the
// reference model in mips_ref_pkg. Because the model and the core keep their
// own register files, any wrong register write shows up in later results.
// Also checks that a non-zero fault mask corrupts the ALU result and that
// en=0 leaves the registers unchanged. Finally the resynchronisation port:
// every register is overwritten through it and read back through it, and the
// random stream continues against the model loaded with the same values.
module tb_mips_core;
  import mips_pkg::*;
  import mips_ref_pkg::*;

  logic        clk = 0, rst_n = 0, en = 0;
  logic [31:0] instr, pc, rdata, mask;
  logic        sync_we = 0;
  logic [4:0]  sync_addr = 0;
  logic [31:0] sync_wdata = 0, sync_rdata;
  core_out_t   out, exp_o;
  regs_t       regs;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  mips_core dut (.clk(clk), .rst_n(rst_n), .en(en), .instr(instr), .pc(pc),
                 .mem_rdata(rdata), .fault_mask(mask), .sync_we(sync_we), .sync_addr(sync_addr),
                 .sync_wdata(sync_wdata), .sync_rdata(sync_rdata), .out(out));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    instr = 0; pc = 0; rdata = 0; mask = 0;
    for (int i = 0; i < 32; i++) regs[i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // The first 62 instructions load every register with lui/ori, then random
    for (int n = 0; n < 8000; n++) begin
      @(negedge clk);
      en    = 1;
      instr = (n < 62) ? ((n % 2 == 0) ? i_type('h0F, 0, n / 2 + 1, $urandom)
                                       : i_type('h0D, n / 2 + 1, n / 2 + 1, $urandom))
                       : rand_instr();
      pc    = {$urandom} & 32'h0FFF_FFFC;
      rdata = $urandom;
      mask  = 0;
      #1;
      exp_o = step(regs, instr, pc, rdata);
      checks++;
      if (out !== exp_o) begin
        failures++;
        if (failures < 10) $display("n=%0d instr=%h got %p exp %p", n, instr, out, exp_o);
      end
    end
    // fault injection corrupts the result
    @(negedge clk);
    instr = r_type('h20, 1, 2, 3); mask = 32'h0000_0100; #1;
    exp_o = step(regs, instr, pc, rdata);
    checks++;
    if (out.alu_result !== (exp_o.alu_result ^ 32'h100)) failures++;
    @(negedge clk);
    regs[3] = regs[3] ^ 32'h100;
    mask = 0;
    // en = 0: no register update
    en = 0; instr = i_type('h09, 0, 4, 'h5555); #1;
    @(negedge clk);
    en = 1; instr = r_type('h21, 4, 0, 5); #1;
    exp_o = step(regs, instr, pc, rdata);
    checks++;
    if (out !== exp_o) begin failures++; $display("en=0 wrote a register"); end
    // resynchronisation port
    for (int r = 1; r < 32; r++) begin
      @(negedge clk);
      en = 0; sync_we = 1; sync_addr = 5'(r); sync_wdata = $urandom;
      regs[r] = sync_wdata;
    end
    @(negedge clk);
    sync_we = 0;
    for (int r = 0; r < 32; r++) begin
      sync_addr = 5'(r); #1;
      checks++;
      if (sync_rdata !== regs[r]) begin failures++; $display("sync read r%0d", r); end
    end
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      en = 1; instr = rand_instr(); pc = {$urandom} & 32'h0FFF_FFFC; rdata = $urandom; #1;
      exp_o = step(regs, instr, pc, rdata);
      checks++;
      if (out !== exp_o) begin failures++; if (failures < 10) $display("after sync: instr=%h", instr); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
