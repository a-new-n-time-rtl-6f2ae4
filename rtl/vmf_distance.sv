// Distance ALU of a processing element.
//
// Computes the distance between two colour vectors as the sum of the
// squared component differences, (ar-br)^2 + (ag-bg)^2 + (ab-bb)^2, exactly
// as the architecture defines it (no square root is taken). Purely
// combinational: the processing element registers its operands (RI, RJ) and
// the accumulated result (D), so this path sits between those registers.
//
// Ports: a, b - the two vectors; sqdist - the squared distance, DIST1_W bits,
// wide enough for three maximal squared differences.
module vmf_distance
  import vmf_pkg::*;
(
  input  rgb_t               a,
  input  rgb_t               b,
  output logic [DIST1_W-1:0] sqdist
);

  // Absolute difference of one component, CW bits.
  function automatic comp_t absdiff(comp_t x, comp_t y);
    return (x > y) ? comp_t'(x - y) : comp_t'(y - x);
  endfunction

  logic [2*CW-1:0] sq_r, sq_g, sq_b;

  always_comb begin
    sq_r = (2*CW)'(absdiff(a.r, b.r)) * (2*CW)'(absdiff(a.r, b.r));
    sq_g = (2*CW)'(absdiff(a.g, b.g)) * (2*CW)'(absdiff(a.g, b.g));
    sq_b = (2*CW)'(absdiff(a.b, b.b)) * (2*CW)'(absdiff(a.b, b.b));
    sqdist = DIST1_W'(sq_r) + DIST1_W'(sq_g) + DIST1_W'(sq_b);
  end

endmodule
