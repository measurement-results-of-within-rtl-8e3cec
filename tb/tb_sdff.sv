// tb_sdff: drives random enable/scan/d/sin values into the scan flip-flop and
// compares q with a reference after every clk_s edge (capture d, shift sin,
// hold when disabled), then checks the asynchronous reset.
module tb_sdff;
  logic clk_s = 0, rst, enable, scan, d, sin, q, model;
  int checks = 0, failures = 0;
  int n_capture = 0, n_shift = 0, n_hold = 0;

  sdff dut (.clk_s(clk_s), .rst(rst), .enable(enable), .scan(scan), .d(d), .sin(sin), .q(q));

  always #5 clk_s = ~clk_s;

  initial begin
    repeat (5000) @(posedge clk_s);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 0; enable = 0; scan = 0; d = 0; sin = 0; model = 0;
    #1 rst = 1;  // rising edge of the asynchronous reset
    #11 rst = 0;
    for (int t = 0; t < 1000; t++) begin
      @(negedge clk_s);
      {enable, scan, d, sin} = 4'($urandom);
      @(posedge clk_s);
      if (enable) begin
        model = scan ? sin : d;
        if (scan) n_shift++; else n_capture++;
      end else n_hold++;
      #1;
      checks++;
      if (q !== model) begin
        failures++;
        $display("FAIL t=%0d en=%b scan=%b d=%b sin=%b q=%b exp=%b", t, enable, scan, d, sin, q, model);
      end
    end
    // force a 1 in, then reset asynchronously
    @(negedge clk_s); enable = 1; scan = 0; d = 1;
    @(posedge clk_s); #1;
    @(negedge clk_s); #1 rst = 1; #1;
    checks++;
    if (q !== 1'b0) begin failures++; $display("FAIL async reset"); end
    checks++;
    if (n_capture == 0 || n_shift == 0 || n_hold == 0) begin failures++; $display("FAIL mode not exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
