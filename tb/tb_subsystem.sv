// tb_subsystem: self-checking test of one reconfigurable subsystem.
// Runs a random instruction stream through the two lockstep cores and checks
// the forwarded output against the reference model and that err stays low.
// Then it upsets one core (fault mask for one cycle), checks that err rises in
// that very cycle, repairs the subsystem by holding its reset (as a partial
// reconfiguration would) and checks that it runs cleanly again from the reset
// state. Done once for each core. Last, it repairs the subsystem again and
// reloads the register state through the resynchronisation port instead of
// restarting, and checks that it carries on in step with the model.
module tb_subsystem;
  import mips_pkg::*;
  import mips_ref_pkg::*;

  logic        clk = 0, rst_n = 0, en = 0;
  logic [31:0] instr, pc, rdata;
  logic [31:0] mask [2];
  logic        sync_we = 0;
  logic [4:0]  sync_addr = 0;
  logic [31:0] sync_wdata = 0, sync_rdata;
  core_out_t   out, exp_o;
  logic        err;
  regs_t       regs;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  subsystem dut (.clk(clk), .rst_n(rst_n), .en(en), .instr(instr), .pc(pc), .mem_rdata(rdata),
                 .fault_mask(mask), .sync_we(sync_we), .sync_addr(sync_addr), .sync_wdata(sync_wdata),
                 .sync_rdata(sync_rdata), .out(out), .err(err));

  task automatic run_clean(int cycles);
    for (int n = 0; n < cycles; n++) begin
      @(negedge clk);
      en    = 1;
      instr = (n < 62) ? ((n % 2 == 0) ? i_type('h0F, 0, n / 2 + 1, $urandom)
                                       : i_type('h0D, n / 2 + 1, n / 2 + 1, $urandom))
                       : rand_instr();
      pc    = {$urandom} & 32'h0FFF_FFFC;
      rdata = $urandom;
      #1;
      exp_o = step(regs, instr, pc, rdata);
      checks++;
      if (out !== exp_o || err !== 1'b0) begin
        failures++;
        if (failures < 10) $display("n=%0d instr=%h err=%b got %p exp %p", n, instr, err, out, exp_o);
      end
    end
  endtask

  task automatic repair();
    @(negedge clk);
    rst_n = 0; en = 0;
    @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 32; i++) regs[i] = 0;
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    instr = 0; pc = 0; rdata = 0; mask = '{0, 0};
    for (int i = 0; i < 32; i++) regs[i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 2; k++) begin
      run_clean(3000);
      @(negedge clk);
      instr = r_type('h21, 1, 2, 3);
      mask[k] = 32'(1) << ($urandom % 32);
      #1;
      checks++;
      if (err !== 1'b1) begin failures++; $display("fault in core %0d not detected", k); end
      @(negedge clk);
      mask[k] = 0;
      instr = r_type('h21, 3, 0, 4);   // reads the corrupted register
      #1;
      checks++;
      if (err !== 1'b1) begin failures++; $display("divergence of core %0d not detected", k); end
      repair();
    end
    run_clean(1000);
    // repair followed by resynchronisation: the model keeps its state
    @(negedge clk);
    rst_n = 0; en = 0;
    @(negedge clk);
    rst_n = 1;
    for (int r = 1; r < 32; r++) begin
      sync_we = 1; sync_addr = 5'(r); sync_wdata = regs[r];
      @(negedge clk);
    end
    sync_we = 0;
    for (int r = 0; r < 32; r++) begin
      sync_addr = 5'(r); #1;
      checks++;
      if (sync_rdata !== regs[r]) begin failures++; $display("resync r%0d", r); end
    end
    for (int n = 0; n < 1000; n++) begin
      @(negedge clk);
      en = 1; instr = rand_instr(); pc = {$urandom} & 32'h0FFF_FFFC; rdata = $urandom; #1;
      exp_o = step(regs, instr, pc, rdata);
      checks++;
      if (out !== exp_o || err !== 1'b0) begin failures++; if (failures < 10) $display("after resync: instr=%h", instr); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
