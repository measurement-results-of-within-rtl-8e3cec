// tb_lut4: checks the five-MUX4 LUT read path.  For random configurations
// and every input pattern the output must equal configuration entry
// {D,C,B,A}; the three measurement configurations are also checked against
// their intended truth functions (always true, follow B, follow A).
module tb_lut4;
  import lut_array_pkg::*;
  lut_cfg_t cfg;
  logic a, b, c, d, mout;
  int checks = 0, failures = 0;

  lut4 dut (.cfg(cfg), .a(a), .b(b), .c(c), .d(d), .mout(mout));

  task automatic check(input logic exp, input string what);
    checks++;
    if (mout !== exp) begin
      failures++;
      $display("FAIL %s cfg=%h dcba=%b%b%b%b mout=%b exp=%b", what, cfg, d, c, b, a, mout, exp);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 200; t++) begin
      cfg = lut_cfg_t'($urandom);
      for (int k = 0; k < 16; k++) begin
        {d, c, b, a} = 4'(k);
        #1;
        check(cfg[k], "random");
      end
    end
    for (int k = 0; k < 16; k++) begin
      {d, c, b, a} = 4'(k);
      cfg = CFG_ALWAYS;   #1; check(1'b1, "always");
      cfg = CFG_FOLLOW_B; #1; check(b,    "follow_b");
      cfg = CFG_FOLLOW_A; #1; check(a,    "follow_a");
      cfg = CFG_ZERO;     #1; check(1'b0, "zero");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
