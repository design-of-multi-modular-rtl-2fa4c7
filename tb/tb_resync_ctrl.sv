// tb_resync_ctrl: self-checking test of the resynchronisation controller.
// The source subsystem's register file is modelled here as an array read at
// sync_addr. Checks: a full copy into A (addresses 1..31 in order, one per
// clock, data from B, busy for exactly 31 cycles, done on the last), a full
// copy into B, an abandoned pass when the source stops being usable, and no
// pass while the destination is still being reconfigured.
module tb_resync_ctrl;
  logic        clk = 0, rst_n = 0;
  logic        stale_a = 0, stale_b = 0, rc_a = 0, rc_b = 0, av_a = 1, av_b = 1;
  logic [31:0] rdata_a, rdata_b, wdata;
  logic        busy, we_a, we_b, done_a, done_b;
  logic [4:0]  addr;
  logic [31:0] src_a [32], src_b [32];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  assign rdata_a = src_a[addr];
  assign rdata_b = src_b[addr];

  resync_ctrl dut (.clk(clk), .rst_n(rst_n), .stale_a(stale_a), .stale_b(stale_b),
                   .reconfig_a(rc_a), .reconfig_b(rc_b), .avail_a(av_a), .avail_b(av_b),
                   .rdata_a(rdata_a), .rdata_b(rdata_b), .busy(busy), .sync_addr(addr),
                   .sync_wdata(wdata), .sync_we_a(we_a), .sync_we_b(we_b),
                   .resync_done_a(done_a), .resync_done_b(done_b));

  task automatic check(string w, logic [63:0] g, logic [63:0] e);
    checks++;
    if (g !== e) begin
      failures++;
      if (failures < 10) $display("%s: got %h exp %h", w, g, e);
    end
  endtask

  // Let a copy into `to_b` run and check every cycle of it.
  task automatic full_copy(bit to_b);
    int busy_cycles = 0;
    @(negedge clk);
    if (to_b) stale_b = 1; else stale_a = 1;
    @(negedge clk);   // controller has seen the stale flag at this edge
    for (int r = 1; r < 32; r++) begin
      #1;
      check("busy", 64'(busy), 1);
      check("addr", 64'(addr), 64'(r));
      check("we", 64'({we_a, we_b}), 64'(to_b ? 1 : 2));
      check("data", 64'(wdata), 64'(to_b ? src_a[r] : src_b[r]));
      check("done", 64'({done_a, done_b}), 64'((r == 31) ? (to_b ? 1 : 2) : 0));
      busy_cycles += busy;
      @(negedge clk);
      if (r == 31) begin stale_a = 0; stale_b = 0; end
    end
    #1;
    check("idle after copy", 64'(busy), 0);
    check("31 stall cycles", 64'(busy_cycles), 31);
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 32; i++) begin src_a[i] = $urandom; src_b[i] = $urandom; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (3) @(negedge clk);
    check("idle", 64'({busy, we_a, we_b}), 0);
    full_copy(0);
    full_copy(1);
    // abandoned pass: source (B) stops being usable half way
    @(negedge clk); stale_a = 1;
    @(negedge clk);
    repeat (10) @(negedge clk);
    av_b = 0; #1;
    check("no write without a usable source", 64'({we_a, we_b}), 0);
    @(negedge clk); #1;
    check("pass abandoned", 64'(busy), 0);
    check("no done", 64'({done_a, done_b}), 0);
    repeat (5) @(negedge clk);
    check("no new pass without source", 64'(busy), 0);
    // destination still under reconfiguration: no pass
    av_b = 1; rc_a = 1;
    repeat (5) @(negedge clk);
    #1; check("waits for reconfiguration to end", 64'(busy), 0);
    rc_a = 0;
    @(negedge clk); #1;
    check("starts after reconfiguration", 64'({busy, addr}), 64'({1'b1, 5'd1}));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
