// logic_block: one LB of the LUT array, a 4-input LUT plus a scan flip-flop.
//
// The 16 configuration flip-flops (lut_config_reg) are shifted in on clk_l
// through lin/lout.  The LUT read path (lut4, five MUX4s) produces mout from
// the inputs A, B, C, D; mout leaves for the next LB, where it is input A.
// The scan flip-flop (sdff) captures mout on clk_s, or shifts sin when scan
// is high; its output is sout/dout.  sin, the previous LB's Sout, is also
// this LB's input B.
//
// Timing: mout is combinational in A..D and the configuration; sout changes
// only on clk_s, lout only on clk_l.  For delay measurement the path timed is
// A -> first-level MUX4 -> second-level MUX4 -> mout.
//
// Follows the document: the parts of the LB and the A <- previous Mout and
// B <- previous Sout connections.  Own choices: C and D come in as ports (the
// array drives them in common), and dout is the same flip-flop as sout.
module logic_block
  import lut_array_pkg::*;
(
  input  logic clk_l,   // configuration clock
  input  logic clk_s,   // measurement / scan clock
  input  logic rst,     // asynchronous reset, active high
  input  logic scan,    // SDFF: 1 shift, 0 capture
  input  logic enable,  // SDFF clock enable
  input  logic lin,     // configuration chain in
  output logic lout,    // configuration chain out
  input  logic a,       // input A: previous LB's Mout
  input  logic sin,     // previous LB's Sout: scan in and input B
  input  logic c,       // input C
  input  logic d,       // input D
  output logic mout,    // LUT output, to the next LB's input A
  output logic sout,    // SDFF output, to the next LB's Sin / B
  output logic dout     // SDFF output to the outside of the LB
);
  lut_cfg_t cfg;

  lut_config_reg u_cfg (
    .clk_l(clk_l),
    .rst  (rst),
    .lin  (lin),
    .lout (lout),
    .cfg  (cfg)
  );

  lut4 u_lut (
    .cfg (cfg),
    .a   (a),
    .b   (sin),
    .c   (c),
    .d   (d),
    .mout(mout)
  );

  sdff u_sdff (
    .clk_s (clk_s),
    .rst   (rst),
    .enable(enable),
    .scan  (scan),
    .d     (mout),
    .sin   (sin),
    .q     (sout)
  );

  assign dout = sout;
endmodule
