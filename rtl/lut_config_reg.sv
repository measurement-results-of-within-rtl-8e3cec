// lut_config_reg: the 16 flip-flops that store one LUT configuration.
//
// The flip-flops form a shift register clocked by CLK_L: on every rising edge
// of clk_l, bit 0 takes lin, bit k takes bit k-1, and the old bit 15 leaves on
// lout towards the next logic block.  Chaining Lin to Lout through every
// logic block turns the configuration memory of the whole array into one long
// serial chain.  rst clears all bits asynchronously (active high).
//
// Follows the document: 16 flip-flops per LUT, a Lin/Lout chain, CLK_L and
// RST.  Own choices: shifting on every clk_l edge (no separate load enable is
// shown), asynchronous active-high reset, and the bit order above.
module lut_config_reg
  import lut_array_pkg::*;
(
  input  logic     clk_l,  // configuration clock
  input  logic     rst,    // asynchronous reset, active high
  input  logic     lin,    // serial configuration in (from the previous LB)
  output logic     lout,   // serial configuration out (to the next LB)
  output lut_cfg_t cfg     // stored configuration, entry k = output for {D,C,B,A}==k
);
  always_ff @(posedge clk_l or posedge rst) begin
    if (rst) cfg <= '0;
    else     cfg <= {cfg[LUT_SIZE-2:0], lin};
  end

  assign lout = cfg[LUT_SIZE-1];
endmodule
