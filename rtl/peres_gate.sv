// peres_gate: the 3x3 reversible Peres gate, used as a half adder.
//
// Mapping (inputs X, Y, Z; outputs G, P, C):
//   G = X
//   P = X ^ Y
//   C = (X & Y) ^ Z
// With Z tied to 0, P is the half-adder sum and C its carry, both from one
// gate. With Z used as a running carry the C output merges a generate term
// into it. The mapping is a bijection on 3 bits.
//
// Port names X, Y, Z, P and C follow the design's half-adder drawing; the
// pass-through output G is named here. The equations are the standard Peres
// definition. Purely combinational, no clock.
module peres_gate (
  input  logic x,
  input  logic y,
  input  logic z,
  output logic g,
  output logic p,
  output logic c
);

  always_comb begin
    g = x;
    p = x ^ y;
    c = (x & y) ^ z;
  end

endmodule
