// b_cell: add / subtract / skip cell of the Booth multiplier array.
//
// Computes, for partial-product bit a, multiplicand bit b and carry/borrow c:
//   z    = a ^ h&(b ^ c)
//   cout = (a ^ d)&(b ^ c) ^ b&c
// With h=1, d=0 it is a full adder (cout is the carry of a+b+c); with h=1,
// d=1 it is a full subtractor (z = a-b-c, cout is the borrow); with h=0 it
// passes a through (z = a) and the row skips.  The controls h and d and the
// multiplicand bit b are passed on to the neighbouring cells.
//
// Built from five parity-preserving reversible gates:
//   MIG  (b, c, 0, 0)          -> (b_out, b^c, b&c, garbage)
//   F2G  (a, 0, 0)             -> (a, garbage, a)
//   F2G  (d, a, 0)             -> (d_out, a^d, garbage)
//   LMH  (b^c, a^d, 0, b&c)    -> (b^c, garbage, garbage, cout)
//   LMH  (h, b^c, 0, a)        -> (h_out, garbage, garbage, z)
// The seven garbage outputs are brought out on g.  Which F2G copy of a feeds
// which gate is a choice of this design; the two copies are equal.  The
// equations and the five-gate netlist follow the published B cell.  With
// h=d=1 the equations define a subtractor (borrow out), and that is how the
// cell is used.  Quantum
// cost 23.  Purely combinational.
module b_cell (
  input  logic       a,      // partial-product bit from the row above
  input  logic       b,      // multiplicand bit
  input  logic       c,      // carry (add) or borrow (subtract) in
  input  logic       h,      // operate (1) or skip (0)
  input  logic       d,      // subtract (1) or add (0)
  output logic       b_out,  // multiplicand bit, to the next row
  output logic       h_out,  // h, to the next cell of the row
  output logic       d_out,  // d, to the next cell of the row
  output logic       z,      // result bit
  output logic       cout,   // carry or borrow out
  output logic [6:0] g       // garbage outputs
);
  logic bxc, bxc2, band, a1, a2, axd;

  mig_gate u_mig (
    .a(b), .b(c), .c(1'b0), .d(1'b0),
    .p(b_out), .q(bxc), .r(band), .s(g[0])
  );
  f2g_gate u_f2g_a (
    .a(a), .b(1'b0), .c(1'b0),
    .p(a1), .q(g[1]), .r(a2)
  );
  f2g_gate u_f2g_d (
    .a(d), .b(a1), .c(1'b0),
    .p(d_out), .q(axd), .r(g[2])
  );
  lmh_gate u_lmh_carry (
    .a(bxc), .b(axd), .c(1'b0), .d(band),
    .p(bxc2), .q(g[3]), .r(g[4]), .s(cout)
  );
  lmh_gate u_lmh_sum (
    .a(h), .b(bxc2), .c(1'b0), .d(a2),
    .p(h_out), .q(g[5]), .r(g[6]), .s(z)
  );
endmodule
