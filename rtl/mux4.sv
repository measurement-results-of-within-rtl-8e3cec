// mux4: 4-input multiplexer, the building cell of the LUT read path.
// y = d[sel].  Purely combinational, no timing of its own beyond gate delay.
// The LUT of a logic block is built from five of these cells.
module mux4 (
  input  logic [3:0] d,    // data inputs
  input  logic [1:0] sel,  // select
  output logic       y
);
  always_comb begin
    unique case (sel)
      2'd0: y = d[0];
      2'd1: y = d[1];
      2'd2: y = d[2];
      default: y = d[3];
    endcase
  end
endmodule
