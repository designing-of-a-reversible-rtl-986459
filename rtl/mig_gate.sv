// mig_gate: 4x4 reversible, parity-preserving MIG gate.
//
// Maps (a, b, c, d) to
//   p = a
//   q = a ^ b
//   r = a&b ^ c
//   s = a&~b ^ d
// The mapping is one-to-one and the XOR of the outputs equals the XOR of the
// inputs, which is what makes a single flipped wire visible as a parity
// error.  Quantum cost 7, delay 7 unit gates.  Purely combinational.
// The mapping is the published MIG gate's; it is written as Boolean logic,
// not decomposed into quantum primitives.
module mig_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  input  logic d,
  output logic p,
  output logic q,
  output logic r,
  output logic s
);
  assign p = a;
  assign q = a ^ b;
  assign r = (a & b) ^ c;
  assign s = (a & ~b) ^ d;
endmodule
