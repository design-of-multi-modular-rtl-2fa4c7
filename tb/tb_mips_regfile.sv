// tb_mips_regfile: self-checking test of the 32x32 register file.
// Checks reset clearing, writes and reads on all three read ports, register 0 hard-wired
// to zero and write-enable gating, against a shadow array kept here.
module tb_mips_regfile;
  logic        clk = 0, rst_n = 0;
  logic [4:0]  ra1, ra2, ra3, wa;
  logic [31:0] rd1, rd2, rd3, wd;
  logic        we;
  logic [31:0] shadow [32];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  mips_regfile dut (.clk(clk), .rst_n(rst_n), .raddr1(ra1), .rdata1(rd1), .raddr2(ra2),
                    .rdata2(rd2), .raddr3(ra3), .rdata3(rd3), .we(we), .waddr(wa), .wdata(wd));

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("%s: got %h exp %h", what, got, exp);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; wa = 0; wd = 0; ra1 = 0; ra2 = 0; ra3 = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 32; i++) shadow[i] = 0;
    for (int i = 0; i < 32; i++) begin
      ra1 = 5'(i); ra2 = 5'(31 - i); #1;
      check("reset rd1", rd1, 0);
      check("reset rd2", rd2, 0);
    end
    for (int n = 0; n < 1500; n++) begin
      @(negedge clk);
      we = 1'($urandom);
      wa = 5'($urandom);
      wd = $urandom;
      ra1 = 5'($urandom);
      ra2 = 5'($urandom);
      ra3 = 5'($urandom);
      #1;
      check("rd3", rd3, shadow[ra3]);
      check("rd1", rd1, shadow[ra1]);
      check("rd2", rd2, shadow[ra2]);
      @(posedge clk);
      if (we && wa != 0) shadow[wa] = wd;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
