// tb_logic_block: one logic block.  Each round shifts a random 16-bit
// configuration in through lin on clk_l (checking that lout returns the
// previous configuration bit by bit), then checks mout for all 16 input
// patterns against the configuration entry {D,C,B,A} (B is sin), that the
// SDFF captures mout when scan is low, shifts sin when scan is high and holds
// when enable is low, and that sout and dout agree.
module tb_logic_block;
  import lut_array_pkg::*;
  logic clk_l = 0, clk_s = 0, rst, scan, enable, lin, lout, a, sin, c, d, mout, sout, dout;
  lut_cfg_t cfg, prev_cfg;
  int checks = 0, failures = 0;

  logic_block dut (
    .clk_l(clk_l), .clk_s(clk_s), .rst(rst), .scan(scan), .enable(enable),
    .lin(lin), .lout(lout), .a(a), .sin(sin), .c(c), .d(d),
    .mout(mout), .sout(sout), .dout(dout)
  );

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s (cfg=%h dcba=%b%b%b%b mout=%b sout=%b)", what, cfg, d, c, sin, a, mout, sout);
    end
  endtask

  task automatic pulse_l();
    #2 clk_l = 1; #2 clk_l = 0; #1;
  endtask

  task automatic pulse_s();
    #2 clk_s = 1; #2 clk_s = 0; #1;
  endtask

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 0; scan = 0; enable = 0; lin = 0; a = 0; sin = 0; c = 0; d = 0;
    prev_cfg = '0;
    #1 rst = 1;  // rising edge of the asynchronous reset
    #4 rst = 0;
    check(sout == 1'b0 && lout == 1'b0, "reset");
    for (int r = 0; r < 40; r++) begin
      cfg = (r == 0) ? CFG_ALWAYS : (r == 1) ? CFG_FOLLOW_B : (r == 2) ? CFG_FOLLOW_A : lut_cfg_t'($urandom);
      // shift in, entry 15 first; lout must deliver the old contents, bit 15 first
      for (int k = 15; k >= 0; k--) begin
        check(lout == prev_cfg[k], "lout returns previous configuration");
        lin = cfg[k];
        pulse_l();
      end
      prev_cfg = cfg;
      // LUT function, and capture of mout into the SDFF
      for (int k = 0; k < 16; k++) begin
        {d, c, sin, a} = 4'(k);
        #1;
        check(mout == cfg[k], "mout = cfg[{D,C,B,A}]");
        scan = 0; enable = 1;
        pulse_s();
        check(sout == cfg[k] && dout == sout, "SDFF capture");
        // hold: enable low, flip the data input, no change expected
        enable = 0;
        {d, c, sin, a} = 4'(k) ^ 4'hF;
        pulse_s();
        check(sout == cfg[k], "SDFF hold");
        // shift: scan high loads sin
        enable = 1; scan = 1; sin = ~sout;
        pulse_s();
        check(sout == ~cfg[k], "SDFF shift");
        scan = 0;
      end
    end
    rst = 1; #1;
    check(sout == 1'b0 && lout == 1'b0 && dout == 1'b0, "async reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
