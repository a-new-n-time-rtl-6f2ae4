// Shared types and constants of the vector median filter.
//
// A pixel is a colour vector of three unsigned components (red, green,
// blue). The component width CW is this design's choice (8 bits, the usual
// true-colour pixel); the window size N = 9 (a 3x3 window) is the main
// configuration of the architecture. The width of a cumulative distance
// D_i is derived from N so that the largest possible D_i,
// (N-1) * 3 * (2^CW - 1)^2, is strictly below the all-ones value that the
// minimum-finding block uses as its "maximum" start value.
package vmf_pkg;

  // Colour component width in bits.
  localparam int unsigned CW = 8;

  // Default number of vectors per median: a 3x3 window.
  localparam int unsigned N_DEF = 9;

  // Width of one squared distance ||xi - xj||: 3 * (2^CW-1)^2 < 2^(2*CW+2).
  localparam int unsigned DIST1_W = 2 * CW + 2;

  typedef logic [CW-1:0] comp_t;

  // One colour vector x = (x_r, x_g, x_b).
  typedef struct packed {
    comp_t r;
    comp_t g;
    comp_t b;
  } rgb_t;

  // Per-clock control of every processing element.
  //   sr_shift : SR takes the vector of the previous PE (or the input)
  //   load     : MUX1 selects SR; RI and RJ take SR; D is cleared
  //   acc      : MUX1 selects RJ of the previous PE; D accumulates
  //   d2min    : MUX2 selects D; MIN takes the finished D_i
  typedef struct packed {
    logic sr_shift;
    logic load;
    logic acc;
    logic d2min;
  } pe_ctrl_t;

  // Bits needed for a cumulative distance D_i of an n-vector window, with
  // the all-ones value left unreachable.
  function automatic int unsigned dist_width(int unsigned n);
    longint unsigned cmax;
    longint unsigned dmax;
    cmax = (longint'(1) << CW) - 1;
    dmax = (longint'(n) - 1) * 3 * cmax * cmax;
    return $clog2(dmax + 2);
  endfunction

endpackage
