// Three-input majority gate, M(x, y, z) = xy + yz + zx.
//
// The output is 1 when at least two of the three inputs are 1. It is the only
// logic primitive of the carry path: every prefix operator is two of these
// gates, and the carry of every bit is one more. Purely combinational; its
// delay is the unit in which the adders' carry delay is counted.
module maj_gate (
  input  logic x,
  input  logic y,
  input  logic z,
  output logic m
);

  assign m = (x & y) | (y & z) | (z & x);

endmodule
