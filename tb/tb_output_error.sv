// tb_output_error: self-checking test of the output-error module.
// A directed sequence (failure of A, switch to B, failure of B -> halt,
// repair of A -> stale until system reset, repair of B followed by its
// resynchronisation) with values worked out by hand,
// then random error/reconfiguration patterns against a behavioural model.
module tb_output_error;
  logic clk = 0, rst_n = 0;
  logic err_a = 0, err_b = 0, rc_a = 0, rc_b = 0;
  logic dn_a = 0, dn_b = 0;
  logic led_a, led_b, sel_b, sys_ok, stale_a, stale_b, avail_a, avail_b;
  int checks = 0, failures = 0;
  // model state
  bit m_fa, m_fb, m_sa, m_sb, m_act;

  always #5 clk = ~clk;

  output_error dut (.clk(clk), .rst_n(rst_n), .err_a(err_a), .err_b(err_b), .reconfig_a(rc_a),
                    .reconfig_b(rc_b), .resync_done_a(dn_a), .resync_done_b(dn_b),
                    .stale_a(stale_a), .stale_b(stale_b), .avail_a(avail_a), .avail_b(avail_b),
                    .fail_led_a(led_a), .fail_led_b(led_b), .sel_b(sel_b),
                    .sys_ok(sys_ok));

  task automatic expect4(string w, bit la, bit lb, bit sb, bit ok);
    checks++;
    if ({led_a, led_b, sel_b, sys_ok} !== {la, lb, sb, ok}) begin
      failures++;
      if (failures < 10)
        $display("%s: got led_a=%b led_b=%b sel_b=%b ok=%b exp %b%b%b%b", w, led_a, led_b, sel_b, sys_ok, la, lb, sb, ok);
    end
  endtask

  task automatic drive(bit ea, bit eb, bit ra, bit rb);
    @(negedge clk); err_a = ea; err_b = eb; rc_a = ra; rc_b = rb; #1;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    drive(0, 0, 0, 0); expect4("idle", 0, 0, 0, 1);
    drive(1, 0, 0, 0); expect4("A err same cycle", 0, 0, 1, 1);
    drive(0, 0, 0, 0); expect4("A failed, B active", 1, 0, 1, 1);
    drive(0, 0, 0, 0); expect4("stay on B", 1, 0, 1, 1);
    drive(0, 1, 0, 0); expect4("B err, none usable", 1, 0, 1, 0);
    drive(0, 0, 0, 0); expect4("both failed", 1, 1, 1, 0);
    drive(0, 0, 1, 0); expect4("repairing A", 1, 1, 1, 0);
    drive(0, 0, 0, 0); expect4("A repaired, stale", 1, 1, 1, 0);
    @(negedge clk); rst_n = 0; #1; expect4("system reset", 0, 0, 0, 1);
    rst_n = 1;
    drive(0, 1, 0, 0); expect4("B err while A active", 0, 0, 0, 1);
    drive(0, 0, 0, 0); expect4("B failed", 0, 1, 0, 1);
    drive(0, 0, 0, 1); expect4("repairing B", 0, 1, 0, 1);
    drive(0, 0, 0, 0); expect4("B stale", 0, 1, 0, 1);
    drive(1, 0, 0, 0); expect4("A err, B stale", 0, 1, 0, 0);
    @(negedge clk); err_a = 0; err_b = 0; rc_a = 0; rc_b = 0; rst_n = 0; #1; rst_n = 1;
    drive(0, 0, 0, 1); expect4("repairing B", 0, 0, 0, 1);
    drive(0, 0, 0, 0); expect4("B stale", 0, 1, 0, 1);
    dn_b = 1;
    drive(0, 0, 0, 0); expect4("B resync done", 0, 0, 0, 1);
    dn_b = 0;
    drive(0, 0, 0, 0); expect4("B usable again", 0, 0, 0, 1);
    drive(1, 0, 0, 0); expect4("A err, switch to resynced B", 0, 0, 1, 1);
    @(negedge clk); err_a = 0; err_b = 0; rc_a = 0; rc_b = 0; rst_n = 0; #1; rst_n = 1;
    m_fa = 0; m_fb = 0; m_sa = 0; m_sb = 0; m_act = 0;
    for (int n = 0; n < 3000; n++) begin
      bit ua, ub, sb, ok;
      if (n % 97 == 0) begin
        @(negedge clk); err_a = 0; err_b = 0; rc_a = 0; rc_b = 0; dn_a = 0; dn_b = 0;
        rst_n = 0; #1; rst_n = 1;
        m_fa = 0; m_fb = 0; m_sa = 0; m_sb = 0; m_act = 0;
      end
      drive(($urandom % 16) == 0, ($urandom % 16) == 0, ($urandom % 32) == 0, ($urandom % 32) == 0);
      dn_a = ($urandom % 8) == 0;
      dn_b = ($urandom % 8) == 0;
      ua = !(m_fa | err_a | m_sa | rc_a);
      ub = !(m_fb | err_b | m_sb | rc_b);
      // keep the active subsystem if usable, otherwise move to the other if usable
      if (m_act == 0) sb = (!ua && ub);
      else            sb = !(!ub && ua);
      ok = sb ? ub : ua;
      expect4("random", m_fa | m_sa, m_fb | m_sb, sb, ok);
      checks++;
      if ({stale_a, stale_b, avail_a, avail_b} !== {m_sa, m_sb, ua, ub}) begin
        failures++;
        if (failures < 10) $display("random: stale/avail mismatch");
      end
      @(posedge clk);
      m_fa = rc_a ? 0 : (m_fa | err_a);
      m_fb = rc_b ? 0 : (m_fb | err_b);
      m_sa = (m_sa | rc_a) & !dn_a;
      m_sb = (m_sb | rc_b) & !dn_b;
      m_act = sb;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
