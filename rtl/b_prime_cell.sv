// b_prime_cell: reduced B cell that ends every row of the Booth array.
//
// The last cell of a row needs only its result bit, so it computes just
//   z = a ^ h&(b ^ c)
// and drops the carry, the pass-through of b and the controls.  The product
// therefore wraps modulo 2^(2n-1).
//
// Built from two parity-preserving reversible gates:
//   F2G (b, c, d)        -> (garbage, b^c, garbage)
//   LMH (h, b^c, 0, a)   -> (garbage, garbage, garbage, z)
// The five garbage outputs are brought out on g.  The d input only feeds the
// F2G gate: it does not change z.  Quantum cost 8.  Purely combinational.
// The two-gate netlist follows the published B' cell.
module b_prime_cell (
  input  logic       a,   // partial-product bit from the row above
  input  logic       b,   // multiplicand bit
  input  logic       c,   // carry or borrow from the previous cell
  input  logic       h,   // operate (1) or skip (0)
  input  logic       d,   // subtract (1) or add (0)
  output logic       z,   // result bit
  output logic [4:0] g    // garbage outputs
);
  logic bxc;

  f2g_gate u_f2g (
    .a(b), .b(c), .c(d),
    .p(g[0]), .q(bxc), .r(g[1])
  );
  lmh_gate u_lmh (
    .a(h), .b(bxc), .c(1'b0), .d(a),
    .p(g[2]), .q(g[3]), .r(g[4]), .s(z)
  );
endmodule
