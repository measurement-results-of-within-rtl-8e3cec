// lut_array: the LUT array of the test chip, ROWS x COLS logic blocks
// (32 x 64 = 2,048 by default) chained in a fractal order.
//
// All LBs form one chain.  Along it, each LB's Mout drives the next LB's
// input A, its Sout drives the next LB's Sin (scan in) and input B, and its
// Lout drives the next LB's Lin (configuration in).  The chain visits the
// array sites along Hilbert curves, one ROWS x ROWS square after another, so
// any aligned run of 16 chain positions is a compact 4x4 square.  A delay
// measurement is then local to a square region rather than spread along a
// line, which is what the fractal layout is for.
//
// Measurement use:
//   1. Shift ROWS*COLS*16 configuration bits into lin on clk_l.  The bit
//      shifted in first ends in the last LB, bit 15.  LBs ahead of the region
//      are all-zero, the region's first LB is all-ones, its second follows B,
//      the rest follow A (see lut_array_pkg).
//   2. With scan low and enable high, give clk_s a first pulse: the first LB
//      of the region captures 1, and the 1 ripples along the Mout chain.
//   3. Give clk_s a second pulse after the interval being timed: every LB the
//      signal reached by then captures 1.
//   4. With scan high, clock the SDFF chain and read sout: the first bit read
//      is the last LB's, then the one before it, and so on.
// The count of ones is the number of LBs the signal passed in the interval.
//
// Ports: clocks clk_l/clk_s, asynchronous active-high rst, scan/enable for
// all SDFFs, the chain ends (lin/lout, sin/sout, a_in = input A of the first
// LB, mout_last = Mout of the last LB), c/d driven to every LB's inputs C/D,
// and dout, every LB's SDFF output indexed by site: dout[y*COLS + x].
//
// Follows the document: 2,048 LBs in a 32x64 array, the fractal chain, the
// LB-to-LB connections and the measurement procedure.  Own choices: the
// Hilbert curve as the fractal, common C/D inputs, and the port list.
module lut_array
  import lut_array_pkg::*;
#(
  parameter int unsigned ROWS = 32,  // power of two
  parameter int unsigned COLS = 64   // multiple of ROWS
) (
  input  logic                 clk_l,
  input  logic                 clk_s,
  input  logic                 rst,
  input  logic                 scan,
  input  logic                 enable,
  input  logic                 lin,
  output logic                 lout,
  input  logic                 sin,
  output logic                 sout,
  input  logic                 a_in,
  output logic                 mout_last,
  input  logic                 c,
  input  logic                 d,
  output logic [ROWS*COLS-1:0] dout
);
  localparam int unsigned N = ROWS * COLS;

  if ((ROWS & (ROWS - 1)) != 0 || ROWS == 0 || (COLS % ROWS) != 0) begin : g_bad_size
    $error("lut_array: ROWS must be a power of two and COLS a multiple of ROWS");
  end

  // chain nets: index i is the input side of chain position i
  logic [N:0] l_chain;
  logic [N:0] s_chain;
  logic [N:0] m_chain;

  assign l_chain[0] = lin;
  assign s_chain[0] = sin;
  assign m_chain[0] = a_in;

  for (genvar i = 0; i < N; i++) begin : g_lb
    localparam site_t SITE = hilbert_d2xy(ROWS, i);
    localparam int unsigned IDX = int'(SITE.y) * COLS + int'(SITE.x);

    logic dout_i;

    logic_block u_lb (
      .clk_l (clk_l),
      .clk_s (clk_s),
      .rst   (rst),
      .scan  (scan),
      .enable(enable),
      .lin   (l_chain[i]),
      .lout  (l_chain[i+1]),
      .a     (m_chain[i]),
      .sin   (s_chain[i]),
      .c     (c),
      .d     (d),
      .mout  (m_chain[i+1]),
      .sout  (s_chain[i+1]),
      .dout  (dout_i)
    );

    assign dout[IDX] = dout_i;
  end

  assign lout      = l_chain[N];
  assign sout      = s_chain[N];
  assign mout_last = m_chain[N];
endmodule
