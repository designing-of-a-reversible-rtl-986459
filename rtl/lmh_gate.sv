// lmh_gate: 4x4 reversible, parity-preserving LMH gate.
//
// Maps (a, b, c, d) to
//   p = a
//   q = b ^ c
//   r = ~a&c ^ a&b            (a 2:1 multiplexer: a ? b : c)
//   s = ~a&c ^ a&b ^ d
// The XOR of the outputs equals the XOR of the inputs.  Quantum cost 6,
// delay 6 unit gates.  Purely combinational.  The mapping is the published
// LMH gate's, written as Boolean logic.
module lmh_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  input  logic d,
  output logic p,
  output logic q,
  output logic r,
  output logic s
);
  logic mux;
  assign mux = (~a & c) ^ (a & b);
  assign p   = a;
  assign q   = b ^ c;
  assign r   = mux;
  assign s   = mux ^ d;
endmodule
