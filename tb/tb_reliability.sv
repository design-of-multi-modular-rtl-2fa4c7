// tb_reliability: randomized fault-and-repair campaign on the whole system,
// the simulated counterpart of a Markov reliability study over the repair
// rate mu.
//
// The system runs an endless program (the array loop of tb_ft_mips_top with
// its final jump sent back to address 0). Every cycle, each of the four cores
// suffers a one-cycle upset (a random XOR on its ALU result) with probability
// LAMBDA_PPM per million. The testbench also plays the host: for every
// subsystem whose failure LED is lit and that it has not repaired yet, it
// starts a repair (a two-cycle reconfiguration pulse) with probability mu per
// cycle. The hardware then resynchronises the repaired subsystem on its own.
// A trial ends early when the system halts (both subsystems unusable, the
// absorbing state of the Markov chain) and survives if it runs TRIAL_CYCLES
// cycles without halting. The fraction of surviving trials at each mu is the
// simulated reliability R(T).
//
// Checked in every trial: every committed PC matches an instruction-level
// reference model; after a surviving trial the whole data memory matches the
// model; once halted, the PC stays frozen. Across the sweep, survival with
// immediate repair (mu = 1) must be higher than with no repair (mu = 0), and
// survival must not rise when mu falls by more than the statistical slack.
// Here every upset is detected, because the ALU result is part of the
// compared bundle (coverage c = 1).
module tb_reliability;
  import mips_pkg::*;
  import mips_ref_pkg::*;

  localparam int LAMBDA_PPM   = 400;    // per core per cycle
  localparam int TRIAL_CYCLES = 2500;
  localparam int TRIALS       = 64;
  localparam int NMU          = 13;
  // repair probability per cycle, in parts per million
  localparam int MU_PPM [NMU] = '{1000000, 950000, 800000, 700000, 500000, 250000,
                                  150000, 100000, 10000, 5000, 1000, 100, 0};

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
  int n_upset = 0, n_switch = 0, n_repair = 0, n_resync = 0, n_halt = 0, n_survive = 0;
  int survived [NMU];
  longint state_cycles [3];

  always #5 clk = ~clk;

  ft_mips_top dut (.*);

  task automatic check(string w, logic [63:0] got, logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("%s: got %h exp %h", w, got, exp);
    end
  endtask

  function automatic bit chance(int ppm);
    return $urandom_range(999999) < ppm;
  endfunction

  function automatic void build_program();
    for (int i = 0; i < 32; i++) prog[i] = 32'h0;
    prog[0]  = i_type('h09, 0, 2, 16);       // addiu $2, $0, 16
    prog[1]  = i_type('h09, 0, 3, 'h000);    // addiu $3, $0, a
    prog[2]  = i_type('h09, 0, 4, 'h040);    // addiu $4, $0, b
    prog[3]  = i_type('h09, 0, 5, 'h200);    // addiu $5, $0, c
    prog[4]  = r_type('h21, 0, 0, 6);        // addu  $6, $0, $0
    prog[5]  = r_type('h21, 0, 0, 1);        // addu  $1, $0, $0
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
    prog[17] = i_type('h2B, 0, 6, 'h000);    // sw $6, 0($0): feeds the next pass
    prog[18] = j_type('h02, 0);              // j 0
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
  endtask

  // System reset, fresh data memory contents and model state for one trial.
  task automatic start_trial();
    @(negedge clk);
    run = 0; rst_n = 0; reconfig_a = 0; reconfig_b = 0; fault_mask = '{default: 0};
    @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 256; i++) init_data[i] = $urandom;
    for (int i = 0; i < 256; i++) begin
      @(negedge clk); dmem_we = 1; dmem_addr = 8'(i); dmem_wdata = init_data[i];
    end
    @(negedge clk); dmem_we = 0;
    for (int i = 0; i < 32; i++) mregs[i] = 0;
    for (int i = 0; i < 256; i++) mdmem[i] = init_data[i];
    mpc = 0;
  endtask

  function automatic void model_step();
    logic [31:0] instr = prog[mpc[6:2]];
    logic [31:0] addr;
    core_out_t e;
    regs_t probe = mregs;
    e = step(probe, instr, mpc, 32'h0);
    addr = e.alu_result;
    e = step(mregs, instr, mpc, mdmem[addr[9:2]]);
    if (e.mem_we) mdmem[addr[9:2]] = e.mem_wdata;
    mpc = e.next_pc;
  endfunction

  // One trial at repair probability mu_ppm; returns 1 if the system survived.
  task automatic trial(int mu_ppm, output bit ok);
    bit repaired [2];
    int pulse [2];
    bit prev_busy = 0, prev_sel_b = 0;
    logic [31:0] halt_pc;
    repaired = '{0, 0};
    pulse = '{0, 0};
    ok = 1;
    for (int c = 0; c < TRIAL_CYCLES; c++) begin
      @(negedge clk);
      run = 1;
      fault_mask = '{default: 0};
      for (int k = 0; k < 4; k++)
        if (chance(LAMBDA_PPM)) begin
          fault_mask[k] = $urandom | 32'h1;
          n_upset++;
        end
      // host: a finished resync pass lets the host look at the LEDs afresh
      if (prev_busy && !resync_busy) repaired = '{0, 0};
      if (!resync_busy) begin
        if (led_a && !repaired[0] && pulse[0] == 0 && chance(mu_ppm)) begin
          repaired[0] = 1; pulse[0] = 2; n_repair++;
        end
        if (led_b && !repaired[1] && pulse[1] == 0 && chance(mu_ppm)) begin
          repaired[1] = 1; pulse[1] = 2; n_repair++;
        end
      end
      reconfig_a = pulse[0] > 0;
      reconfig_b = pulse[1] > 0;
      if (pulse[0] > 0) pulse[0]--;
      if (pulse[1] > 0) pulse[1]--;
      #1;
      if (resync_busy && !prev_busy) n_resync++;
      if (sel_b != prev_sel_b && sys_ok) n_switch++;
      prev_busy = resync_busy;
      prev_sel_b = sel_b;
      state_cycles[sys_ok ? int'(led_a || led_b) : 2]++;
      if (!sys_ok) begin
        ok = 0;
        n_halt++;
        halt_pc = pc;
        repeat (3) begin
          @(negedge clk);
          check("halted: pc frozen", 64'(pc), 64'(halt_pc));
        end
        break;
      end
      if (!resync_busy) begin
        check("pc", 64'(pc), 64'(mpc));
        model_step();
      end
      @(posedge clk);
    end
    @(negedge clk);
    run = 0; fault_mask = '{default: 0}; reconfig_a = 0; reconfig_b = 0;
    if (ok) begin
      for (int i = 0; i < 256; i++) begin
        dmem_addr = 8'(i);
        #1;
        check("data memory after a surviving trial", 64'(dmem_rdata), 64'(mdmem[i]));
      end
    end
  endtask

  initial begin
    repeat (4_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    void'($urandom(32'd2024));
    fault_mask = '{default: 0};
    state_cycles = '{0, 0, 0};
    build_program();
    repeat (2) @(posedge clk);
    rst_n = 1;
    host_load();
    for (int m = 0; m < NMU; m++) begin
      survived[m] = 0;
      for (int t = 0; t < TRIALS; t++) begin
        bit ok;
        start_trial();
        trial(MU_PPM[m], ok);
        survived[m] += int'(ok);
      end
      n_survive += survived[m];
      $display("mu=%0d.%06d  R(%0d cycles) = %0d/%0d", MU_PPM[m] / 1000000, MU_PPM[m] % 1000000,
               TRIAL_CYCLES, survived[m], TRIALS);
    end
    $display("cycles with two/one/no usable subsystems: %0d/%0d/%0d", state_cycles[0], state_cycles[1], state_cycles[2]);
    $display("mechanisms: upset=%0d switch=%0d repair=%0d resync=%0d halt=%0d survive=%0d",
             n_upset, n_switch, n_repair, n_resync, n_halt, n_survive);
    check("repair raises survival", 64'(survived[0] > survived[NMU-1]), 64'(1));
    for (int m = 1; m < NMU; m++)
      check("survival does not rise as mu falls", 64'(survived[m] <= survived[m-1] + TRIALS / 4), 64'(1));
    begin
      int counts [6];
      counts = '{n_upset, n_switch, n_repair, n_resync, n_halt, n_survive};
      foreach (counts[k]) begin
        checks++;
        if (counts[k] == 0) begin failures++; $display("mechanism %0d never happened", k); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
