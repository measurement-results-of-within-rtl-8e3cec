// tb_lut_array: end-to-end test of the LUT array, run at 4 x 8 LBs.
//
// 1. Placement: a single 1 is shifted through the scan chain; after every
//    clk_s pulse exactly one dout bit must be set, consecutive sites must be
//    grid neighbours, every site must be visited once, the chain must start
//    at site (0,0) and every aligned group of 16 chain positions must fill an
//    aligned 4x4 square (the measurement region).
// 2. Configuration chain: a random stream pushed into lin must come out of
//    lout exactly ROWS*COLS*16 clk_l pulses later.
// 3. Measurement, for every 4x4 region: the measurement configuration is
//    shifted in, clk_s is pulsed once (launch: only the region's first LB may
//    hold 1), with enable low (hold: nothing may change), then once more
//    (capture: with zero wire delay every LB the chain reaches holds 1).  The
//    LBs after the region are configured either off (the signal must stop at
//    the region's edge) or to follow A (the signal must run on to the end of
//    the array).  The result is read out serially with scan high and compared
//    with the expected bits and with dout.
// 4. The A chain end to end (a_in to mout_last) and the asynchronous reset.
// Each mechanism is counted; one that never occurs counts as a failure.
module tb_lut_array;
  localparam int unsigned ROWS = 4;
  localparam int unsigned COLS = 8;
  localparam int unsigned N    = ROWS * COLS;

  logic clk_l, clk_s, rst, scan, enable, lin, lout, sin, sout, a_in, mout_last, c, d;
  logic [N-1:0] dout;

  lut_array #(.ROWS(ROWS), .COLS(COLS)) dut (
    .clk_l(clk_l), .clk_s(clk_s), .rst(rst), .scan(scan), .enable(enable),
    .lin(lin), .lout(lout), .sin(sin), .sout(sout), .a_in(a_in), .mout_last(mout_last),
    .c(c), .d(d), .dout(dout)
  );

  lut_array_exerciser #(.ROWS(ROWS), .COLS(COLS)) u_test (
    .clk_l(clk_l), .clk_s(clk_s), .rst(rst), .scan(scan), .enable(enable),
    .lin(lin), .lout(lout), .sin(sin), .sout(sout), .a_in(a_in), .mout_last(mout_last),
    .c(c), .d(d), .dout(dout)
  );
endmodule
