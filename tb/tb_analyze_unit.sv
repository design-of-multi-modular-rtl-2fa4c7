// tb_analyze_unit: self-checking test of the analysis unit.
// Random pairs of core output bundles, equal or differing in one random bit;
// checks the error flag, the forwarded output when they agree and the null
// bundle when they do not.
module tb_analyze_unit;
  import mips_pkg::*;
  core_out_t a, b, o;
  logic err;
  int checks = 0, failures = 0;

  analyze_unit dut (.in0(a), .in1(b), .out(o), .err(err));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 4000; n++) begin
      int bitpos;
      bit differ;
      a = core_out_t'({$urandom, $urandom, $urandom, $urandom});
      b = a;
      differ = n[0];
      bitpos = $urandom % $bits(core_out_t);
      if (differ) b[bitpos] = ~b[bitpos];
      #1;
      checks++;
      if (err !== differ || o !== (differ ? core_out_t'('0) : a)) begin
        failures++;
        if (failures < 10) $display("n=%0d bit=%0d err=%b exp %b", n, bitpos, err, differ);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
