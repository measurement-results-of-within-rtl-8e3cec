// tb_lut_config_reg: shifts random bits through the 16-bit configuration
// register and compares cfg and lout with a reference queue after every
// clk_l edge; also checks the asynchronous reset.
module tb_lut_config_reg;
  import lut_array_pkg::*;
  logic clk_l = 0, rst, lin, lout;
  lut_cfg_t cfg, model;
  int checks = 0, failures = 0;

  lut_config_reg dut (.clk_l(clk_l), .rst(rst), .lin(lin), .lout(lout), .cfg(cfg));

  always #5 clk_l = ~clk_l;

  initial begin
    repeat (2000) @(posedge clk_l);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 0; lin = 0; model = '0;
    #1 rst = 1;  // rising edge of the asynchronous reset
    #11;
    checks++;
    if (cfg !== '0) begin failures++; $display("FAIL reset cfg=%h", cfg); end
    rst = 0;
    for (int t = 0; t < 500; t++) begin
      @(negedge clk_l);
      lin = 1'($urandom);
      @(posedge clk_l);
      model = {model[14:0], lin};
      #1;
      checks++;
      if (cfg !== model || lout !== model[15]) begin
        failures++;
        $display("FAIL shift %0d cfg=%h exp=%h lout=%b", t, cfg, model, lout);
      end
    end
    // asynchronous reset in the middle of a clock phase
    @(negedge clk_l);
    #2 rst = 1;
    #1;
    checks++;
    if (cfg !== '0 || lout !== 1'b0) begin failures++; $display("FAIL async reset cfg=%h", cfg); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
