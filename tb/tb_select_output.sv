// tb_select_output: self-checking test of the output-selection module.
// Random bundles from both subsystems and random selections; checks the
// multiplexed output, the commit signal and the result-LED register.
module tb_select_output;
  import mips_pkg::*;
  logic clk = 0, rst_n = 0, en, ok, sel_b, commit;
  core_out_t a, b, o;
  logic [3:0] led, exp_led;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  select_output dut (.clk(clk), .rst_n(rst_n), .en(en), .sys_ok(ok), .sel_b(sel_b),
                     .out_a(a), .out_b(b), .out(o), .commit(commit), .led_d(led));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en = 0; ok = 0; sel_b = 0; a = '0; b = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    exp_led = 0;
    for (int n = 0; n < 3000; n++) begin
      core_out_t e;
      @(negedge clk);
      a = core_out_t'({$urandom, $urandom, $urandom, $urandom});
      b = core_out_t'({$urandom, $urandom, $urandom, $urandom});
      sel_b = 1'($urandom);
      en = ($urandom % 4) != 0;
      ok = ($urandom % 4) != 0;
      #1;
      e = sel_b ? b : a;
      checks++;
      if (o !== e || commit !== (en && ok) || led !== exp_led) begin
        failures++;
        if (failures < 10) $display("n=%0d sel_b=%b mismatch led=%h exp %h", n, sel_b, led, exp_led);
      end
      @(posedge clk);
      if (en && ok && e.mem_we) exp_led = e.mem_wdata[3:0];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
