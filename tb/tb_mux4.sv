// tb_mux4: exhaustive check of the 4-input multiplexer against y = d[sel]
// for all 64 combinations of data and select.
module tb_mux4;
  logic [3:0] d;
  logic [1:0] sel;
  logic       y;
  int checks = 0, failures = 0;

  mux4 dut (.d(d), .sel(sel), .y(y));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 64; i++) begin
      d   = i[3:0];
      sel = i[5:4];
      #1;
      checks++;
      if (y !== 1'((i[3:0] >> i[5:4]) & 1)) begin
        failures++;
        $display("FAIL mux4 d=%b sel=%0d y=%b", d, sel, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
