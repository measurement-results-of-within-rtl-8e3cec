// lut_array_pkg: sizes, configuration words and the fractal placement function
// shared by the LUT array and its testbenches.
//
// A logic block (LB) holds a 4-input LUT, so its configuration is 16 bits.
// Entry k of the configuration is the LUT output for the input pattern
// {D,C,B,A} == k (A is the least significant select bit); this bit order is a
// choice of this design.  The three measurement configurations follow the
// measurement procedure: the first LB of a region is true for every input,
// the second follows input B (the previous LB's scan output) and every other
// LB follows input A (the previous LB's Mout).
//
// hilbert_d2xy maps a position along the LB chain to the (x,y) site of the
// LB in the array.  The array is laid out as side-by-side square Hilbert
// curves, so every aligned run of 4**k chain positions fills a 2**k x 2**k
// square; in particular every 16 consecutive LBs starting at a multiple of 16
// form a 4x4 square, the measurement region.  The use of the Hilbert curve
// for the fractal order is this design's reading of the fractal layout.
package lut_array_pkg;

  localparam int unsigned LUT_INPUTS = 4;
  localparam int unsigned LUT_SIZE   = 1 << LUT_INPUTS;  // 16 configuration flip-flops

  typedef logic [LUT_SIZE-1:0] lut_cfg_t;

  // Measurement configurations (entry k is the output for {D,C,B,A} == k).
  localparam lut_cfg_t CFG_ZERO   = 16'h0000;  // LB outside the region: always false
  localparam lut_cfg_t CFG_ALWAYS = 16'hFFFF;  // first LB: true for any input
  localparam lut_cfg_t CFG_FOLLOW_B = 16'hCCCC;  // second LB: true when B is true
  localparam lut_cfg_t CFG_FOLLOW_A = 16'hAAAA;  // other LBs: true when A is true

  typedef struct packed {
    logic [15:0] x;
    logic [15:0] y;
  } site_t;

  // Position d along a Hilbert curve filling an n x n square (n a power of
  // two) to its (x,y) site.  The curve starts at (0,0) and ends at (n-1,0),
  // so squares placed side by side along x join into one continuous chain.
  function automatic site_t hilbert_square_d2xy(int unsigned n, int unsigned d);
    int unsigned rx, ry, s, t, x, y, tmp;
    site_t site;
    t = d;
    x = 0;
    y = 0;
    for (s = 1; s < n; s = s * 2) begin
      rx = 1 & (t / 2);
      ry = 1 & (t ^ rx);
      if (ry == 0) begin
        if (rx == 1) begin
          x = s - 1 - x;
          y = s - 1 - y;
        end
        tmp = x;
        x = y;
        y = tmp;
      end
      x = x + s * rx;
      y = y + s * ry;
      t = t / 4;
    end
    site.x = 16'(x);
    site.y = 16'(y);
    return site;
  endfunction

  // Chain position d in an array of ROWS rows and COLS columns (COLS a
  // multiple of ROWS, ROWS a power of two): the chain fills one ROWS x ROWS
  // square after another from left to right.
  function automatic site_t hilbert_d2xy(int unsigned rows, int unsigned d);
    site_t site;
    int unsigned sq;
    sq   = d / (rows * rows);
    site = hilbert_square_d2xy(rows, d % (rows * rows));
    site.x = site.x + 16'(sq * rows);
    return site;
  endfunction

endpackage
