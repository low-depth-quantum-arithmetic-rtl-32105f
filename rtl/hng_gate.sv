// hng_gate: the 4x4 reversible HNG gate, the design's one-gate full adder.
//
// Mapping (inputs A, B, C, D; outputs P, Q, R, S):
//   P = A
//   Q = B
//   R = A ^ B ^ C
//   S = ((A ^ B) & C) ^ (A & B) ^ D
// With D tied to 0 and C used as carry-in, R is the sum bit and S the carry
// out of a full adder, so one gate level gives both results of a bit of
// addition. P and Q carry the operands through unchanged (garbage outputs
// in reversible terms). The mapping is a bijection on 4 bits.
//
// The design uses the HNG gate as its full adder and says it produces sum and
// carry at once; the gate equations are the standard HNG definition.
// Purely combinational, no clock.
module hng_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  input  logic d,
  output logic p,
  output logic q,
  output logic r,
  output logic s
);

  logic a_xor_b;

  always_comb begin
    a_xor_b = a ^ b;
    p = a;
    q = b;
    r = a_xor_b ^ c;
    s = (a_xor_b & c) ^ (a & b) ^ d;
  end

endmodule
