// sdff: scan flip-flop of a logic block.
//
// On a rising edge of clk_s with enable high it loads either the LUT output
// (scan low: capture, used to sample how far the launched signal travelled)
// or the scan input sin (scan high: shift, used to read the captured bits out
// along the LB chain).  With enable low it holds.  rst clears it
// asynchronously (active high).  q drives both Dout and Sout of the logic
// block; Sout also feeds input B and the scan input of the next LB.
//
// Follows the document: the SDFF, its CLK_S, RST, scan and enable pins and
// the Sin/Sout chain.  Own choices: the meaning of enable (a clock enable
// for both modes), the polarity of scan and the asynchronous reset.
module sdff (
  input  logic clk_s,   // measurement / scan clock
  input  logic rst,     // asynchronous reset, active high
  input  logic enable,  // 1: load on the clock edge, 0: hold
  input  logic scan,    // 1: shift sin, 0: capture d
  input  logic d,       // functional data (LUT output Mout)
  input  logic sin,     // scan input (previous LB's Sout)
  output logic q        // Dout / Sout
);
  always_ff @(posedge clk_s or posedge rst) begin
    if (rst)         q <= 1'b0;
    else if (enable) q <= scan ? sin : d;
  end
endmodule
