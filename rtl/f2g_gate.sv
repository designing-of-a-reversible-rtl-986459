// f2g_gate: 3x3 reversible, parity-preserving Feynman double gate (F2G).
//
// Maps (a, b, c) to (a, a ^ b, a ^ c).  With b = c = 0 it makes two copies
// of a, which is how the multiplier fans a signal out without breaking
// reversibility.  Quantum cost 2, delay 2 unit gates.  Purely combinational.
// The mapping is the published F2G gate's, written as Boolean logic.
module f2g_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);
  assign p = a;
  assign q = a ^ b;
  assign r = a ^ c;
endmodule
