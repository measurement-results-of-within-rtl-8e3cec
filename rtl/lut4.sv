// lut4: read path of a 4-input look-up table built from five MUX4s.
//
// Four first-level MUX4s each pick one of four configuration bits using the
// select pair {B,A}; the second-level MUX4 picks one of their outputs using
// {D,C}.  The result is mout = cfg[{D,C,B,A}].  A signal entering on A
// therefore passes through exactly two MUX4s before it leaves on Mout, which
// is the path the delay measurement times.  Purely combinational.
//
// Follows the document: five MUX4s, A and B on the first level, C and D on
// the second.  Own choice: which configuration bit sits on which mux input.
module lut4
  import lut_array_pkg::*;
(
  input  lut_cfg_t cfg,   // LUT contents
  input  logic     a,     // input A (previous LB's Mout on the measurement path)
  input  logic     b,     // input B (previous LB's Sout)
  input  logic     c,
  input  logic     d,
  output logic     mout   // LUT output
);
  logic [3:0] level1;

  for (genvar g = 0; g < 4; g++) begin : g_first
    mux4 u_mux (
      .d  (cfg[4*g +: 4]),
      .sel({b, a}),
      .y  (level1[g])
    );
  end

  mux4 u_mux_out (
    .d  (level1),
    .sel({d, c}),
    .y  (mout)
  );
endmodule
