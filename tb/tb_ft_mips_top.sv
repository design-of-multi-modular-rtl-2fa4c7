// tb_ft_mips_top: end-to-end test of the fault-tolerant four-core system at
// its default sizes.
//
// The host port loads a program (a loop over two 16-word arrays that calls a
// subroutine per element and stores per-element results and a total) and
// random input data. Every cycle in which the system commits, the PC is
// compared with an instruction-level reference model that runs the same
// program on its own copy of the data memory; at the end the whole data
// memory, the result LEDs and the data-collection log are compared with the
// model. Four runs, each started by a system reset:
//   1. no faults;
//   2. an upset in core A1: the system must switch to subsystem B in the same
//      cycle; A is then repaired while B keeps running and resynchronised
//      from B (31 stall cycles); a later upset in B1 must switch back to A,
//      and the program must still finish correctly;
//   3. an upset in A, then one in B: the system must halt (no commits, PC
//      frozen) with both failure LEDs lit;
//   4. an upset in B0 while A is active: A must stay active and finish
//      correctly; B is repaired and resynchronised meanwhile;
//   5. after the system reset both subsystems are usable again and the run
//      is clean.
// Counted mechanisms: switch-over, resynchronisation, switch-back, standby failure, repair, double-failure halt, restart,
// branch taken, call/return, load, store. Each must occur at least once.
module tb_ft_mips_top;
  import mips_pkg::*;
  import mips_ref_pkg::*;

  localparam int HALT_PC = 17 * 4;

  logic        clk = 0, rst_n = 0, run = 0;
  logic        imem_we = 0, dmem_we = 0;
  logic [7:0]  imem_addr = 0, dmem_addr = 0;
  logic [31:0] imem_wdata = 0, dmem_wdata = 0, dmem_rdata;
  logic        reconfig_a = 0, reconfig_b = 0;
  logic [31:0] fault_mask [4];
  logic        led_a, led_b, sel_b, sys_ok;
  logic [3:0]  led_d;
  logic [31:0] pc;
  logic        resync_busy;
  logic [3:0]  dc_rd_idx = 0;
  logic [64:0] dc_rd_entry;
  logic [15:0] dc_count;

  logic [31:0] prog [32];
  logic [31:0] init_data [256];
  logic [31:0] mdmem [256];
  logic [31:0] mpc;
  regs_t       mregs;
  int checks = 0, failures = 0;
  int n_switch = 0, n_switch_back = 0, n_resync_cycles = 0, n_standby_fail = 0, n_repair = 0, n_halt = 0, n_restart = 0;
  int n_branch = 0, n_call = 0, n_return = 0, n_load = 0, n_store = 0;
  int n_model_stores;
  logic [31:0] last_store;
  logic [64:0] model_log [16];

  always #5 clk = ~clk;

  ft_mips_top dut (.*);

  task automatic check(string w, logic [63:0] got, logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("%s: got %h exp %h", w, got, exp);
    end
  endtask

  function automatic void build_program();
    for (int i = 0; i < 32; i++) prog[i] = 32'h0;
    prog[0]  = i_type('h09, 0, 2, 16);       // addiu $2, $0, 16      N
    prog[1]  = i_type('h09, 0, 3, 'h000);    // addiu $3, $0, a
    prog[2]  = i_type('h09, 0, 4, 'h040);    // addiu $4, $0, b
    prog[3]  = i_type('h09, 0, 5, 'h200);    // addiu $5, $0, c
    prog[4]  = r_type('h21, 0, 0, 6);        // addu  $6, $0, $0      sum
    prog[5]  = r_type('h21, 0, 0, 1);        // addu  $1, $0, $0      i
    prog[6]  = i_type('h23, 3, 7, 0);        // loop: lw $7, 0($3)
    prog[7]  = i_type('h23, 4, 8, 0);        // lw $8, 0($4)
    prog[8]  = j_type('h03, 20);             // jal f
    prog[9]  = i_type('h2B, 5, 9, 0);        // sw $9, 0($5)
    prog[10] = r_type('h21, 6, 9, 6);        // addu $6, $6, $9
    prog[11] = i_type('h09, 3, 3, 4);
    prog[12] = i_type('h09, 4, 4, 4);
    prog[13] = i_type('h09, 5, 5, 4);
    prog[14] = i_type('h09, 1, 1, 1);
    prog[15] = i_type('h05, 1, 2, -10);      // bne $1, $2, loop
    prog[16] = i_type('h2B, 0, 6, 'h3FC);    // sw $6, 0x3FC($0)
    prog[17] = j_type('h02, 17);             // halt: j halt
    prog[20] = r_type('h21, 7, 8, 9);        // f: addu $9, $7, $8
    prog[21] = r_type('h00, 0, 7, 11, 3);    // sll $11, $7, 3
    prog[22] = r_type('h26, 9, 11, 9);       // xor $9, $9, $11
    prog[23] = r_type('h2A, 7, 8, 12);       // slt $12, $7, $8
    prog[24] = r_type('h03, 0, 8, 13, 2);    // sra $13, $8, 2
    prog[25] = r_type('h23, 9, 13, 9);       // subu $9, $9, $13
    prog[26] = r_type('h25, 9, 12, 9);       // or $9, $9, $12
    prog[27] = i_type('h0C, 9, 14, 'hFF);    // andi $14, $9, 0xFF
    prog[28] = r_type('h21, 9, 14, 9);       // addu $9, $9, $14
    prog[29] = r_type('h08, 31, 0, 0);       // jr $31
  endfunction

  task automatic host_load();
    run = 0;
    for (int i = 0; i < 32; i++) begin
      @(negedge clk); imem_we = 1; imem_addr = 8'(i); imem_wdata = prog[i];
    end
    @(negedge clk); imem_we = 0;
    for (int i = 0; i < 256; i++) begin
      @(negedge clk); dmem_we = 1; dmem_addr = 8'(i); dmem_wdata = init_data[i];
    end
    @(negedge clk); dmem_we = 0;
  endtask

  task automatic system_reset();
    @(negedge clk);
    run = 0; rst_n = 0; reconfig_a = 0; reconfig_b = 0; fault_mask = '{default: 0};
    @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 32; i++) mregs[i] = 0;
    for (int i = 0; i < 256; i++) mdmem[i] = init_data[i];
    mpc = 0;
    n_model_stores = 0;
    for (int i = 0; i < 16; i++) model_log[i] = '0;
  endtask

  // Execute one instruction on the model. The load address is found first,
  // so that lw reads the model's data memory at the right word.
  function automatic void model_step(logic cur_sel_b);
    logic [31:0] instr = prog[mpc[6:2]];
    logic [31:0] addr;
    core_out_t e;
    regs_t probe = mregs;
    e = step(probe, instr, mpc, 32'h0);          // find the address first
    addr = e.alu_result;
    e = step(mregs, instr, mpc, mdmem[addr[9:2]]);
    if (instr[31:26] == 6'h05 && e.next_pc != mpc + 4) n_branch++;
    if (instr[31:26] == 6'h03) n_call++;
    if (instr[31:26] == 6'h00 && instr[5:0] == 6'h08) n_return++;
    if (instr[31:26] == 6'h23) n_load++;
    if (e.mem_we) begin
      mdmem[addr[9:2]] = e.mem_wdata;
      model_log[n_model_stores % 16] = {cur_sel_b, addr, e.mem_wdata};
      n_model_stores++;
      last_store = e.mem_wdata;
      n_store++;
    end
    mpc = e.next_pc;
  endfunction

  // Run for `cycles` clocks; apply a one-cycle fault mask to core `fcore` at
  // cycle `fcyc` (fcore < 0: none) and a second one at `fcyc2`.
  task automatic run_cycles(int cycles, int fcore = -1, int fcyc = -1,
                            int fcore2 = -1, int fcyc2 = -1, int rcyc = -1, bit rsub_b = 0);
    for (int c = 0; c < cycles; c++) begin
      @(negedge clk);
      run = 1;
      fault_mask = '{default: 0};
      reconfig_a = !rsub_b && (rcyc >= 0) && (c == rcyc || c == rcyc + 1);
      reconfig_b = rsub_b && (rcyc >= 0) && (c == rcyc || c == rcyc + 1);
      if (c == rcyc) n_repair++;
      if (fcore >= 0 && c == fcyc) fault_mask[fcore] = 32'h20;
      if (fcore2 >= 0 && c == fcyc2) fault_mask[fcore2] = 32'h400;
      #1;
      if (fcore >= 0 && c == fcyc && fcore < 2) begin
        check("switch to B in the fault cycle", 64'({sel_b, sys_ok}), 64'(2'b11));
        n_switch += (sel_b && sys_ok);
      end
      if (fcore >= 2 && c == fcyc) begin
        check("standby failure leaves A active", 64'({sel_b, sys_ok}), 64'(2'b01));
        n_standby_fail += (!sel_b && sys_ok);
      end
      if (fcore2 >= 0 && c == fcyc2) begin
        check("switch back to resynchronised A", 64'({sel_b, sys_ok}), 64'(2'b01));
        n_switch_back += (!sel_b && sys_ok);
      end
      if (resync_busy) n_resync_cycles++;
      if (sys_ok && !resync_busy) begin
        check("pc", 64'(pc), 64'(mpc));
        model_step(sel_b);
      end
      @(posedge clk);
    end
    @(negedge clk);
    run = 0; fault_mask = '{default: 0}; reconfig_a = 0; reconfig_b = 0;
  endtask

  task automatic check_results(string run_name, bit expect_b);
    @(negedge clk);
    check({run_name, ": pc at halt"}, 64'(pc), 64'(HALT_PC));
    for (int i = 0; i < 256; i++) begin
      dmem_addr = 8'(i);
      #1;
      check({run_name, ": data memory"}, 64'(dmem_rdata), 64'(mdmem[i]));
    end
    check({run_name, ": result LEDs"}, 64'(led_d), 64'(last_store[3:0]));
    check({run_name, ": store count"}, 64'(dc_count), 64'(n_model_stores));
    for (int i = 0; i < 16; i++) begin
      dc_rd_idx = 4'(i);
      #1;
      check({run_name, ": collection log"}, 64'(dc_rd_entry[63:0]), model_log[i][63:0]);
      check({run_name, ": log source"}, 64'(dc_rd_entry[64]), 64'(model_log[i][64]));
    end
    check({run_name, ": active subsystem"}, 64'(sel_b), 64'(expect_b));
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    fault_mask = '{default: 0};
    build_program();
    for (int i = 0; i < 256; i++) init_data[i] = $urandom;
    repeat (2) @(posedge clk);
    rst_n = 1;
    host_load();

    // 1. clean run
    system_reset();
    run_cycles(400);
    check_results("clean", 0);
    check("clean: LEDs A/B", 64'({led_a, led_b}), 64'(2'b00));

    // 2. upset in core A1 at cycle 100, repair of A at cycle 150 (A is then
    //    resynchronised from B), upset in B1 at cycle 250: back to A
    system_reset();
    n_restart++;
    run_cycles(450, 1, 100, 3, 250, 150);
    check_results("switch-over", 0);
    check("switch-over: LEDs A/B", 64'({led_a, led_b}), 64'(2'b01));
    check("switch-over: sys_ok", 64'(sys_ok), 64'(1));
    check("switch-over: one resync pass of 31 stall cycles", 64'(n_resync_cycles), 64'(31));

    // 3. upset in A0 at 50, then in B1 at 120: halt
    system_reset();
    n_restart++;
    run_cycles(120, 0, 50);
    begin
      logic [31:0] pc_before;
      @(negedge clk);
      run = 1; fault_mask[3] = 32'h1; #1;
      check("double failure: sys_ok low", 64'(sys_ok), 64'(0));
      pc_before = pc;
      @(negedge clk); fault_mask = '{default: 0};
      repeat (20) begin
        @(negedge clk);
        check("double failure: pc frozen", 64'(pc), 64'(pc_before));
      end
      check("double failure: LEDs A/B", 64'({led_a, led_b}), 64'(2'b11));
      check("double failure: no commits", 64'(dc_count), 64'(n_model_stores));
      if (!sys_ok && pc == pc_before) n_halt++;
      run = 0;
    end

    // 4. upset in the standby pair (B0) at 60, repair of B at 150 and its
    //    resynchronisation from A: A stays active throughout
    system_reset();
    n_restart++;
    run_cycles(400, 2, 60, -1, -1, 150, 1);
    check_results("standby failure", 0);
    check("standby failure: LEDs A/B after resync of B", 64'({led_a, led_b}), 64'(2'b00));

    // 5. restart after the system reset
    system_reset();
    n_restart++;
    check("restart: both usable", 64'({led_a, led_b, sys_ok}), 64'(3'b001));
    run_cycles(400);
    check_results("restart", 0);

    $display("mechanisms: switch=%0d resync_cycles=%0d switch_back=%0d standby_fail=%0d repair=%0d halt=%0d restart=%0d branch=%0d call=%0d return=%0d load=%0d store=%0d",
             n_switch, n_resync_cycles, n_switch_back, n_standby_fail, n_repair, n_halt, n_restart, n_branch, n_call, n_return, n_load, n_store);
    begin
      int counts [12];
      counts = '{n_switch, n_resync_cycles, n_switch_back, n_standby_fail, n_repair, n_halt, n_restart, n_branch, n_call, n_return, n_load, n_store};
      foreach (counts[k]) begin
        checks++;
        if (counts[k] == 0) begin failures++; $display("mechanism %0d never happened", k); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
