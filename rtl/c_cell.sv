// c_cell: Booth recoding cell of one multiplier row.
//
// Looks at two adjacent multiplier bits x_i and x_(i-1) and produces the two
// row controls:
//   h = x_i ^ x_(i-1)      1: the row adds or subtracts, 0: the row skips
//   d = x_i & ~x_(i-1)     1: subtract (pair 10), 0: add (pair 01)
// It is a single MIG gate with inputs (x_i, x_(i-1), 0, 0); its outputs in
// order are (x_i, h, x_i & x_(i-1), d).  The first and third outputs are the
// cell's two garbage outputs, brought out on g[0] and g[1].  Quantum cost 7.
// Purely combinational.  The single-MIG netlist and its input order follow
// the published C cell.
module c_cell (
  input  logic       xi,    // multiplier bit x_i
  input  logic       xim1,  // multiplier bit x_(i-1), 0 for row 0
  output logic       h,
  output logic       d,
  output logic [1:0] g      // garbage outputs
);
  mig_gate u_mig (
    .a(xi), .b(xim1), .c(1'b0), .d(1'b0),
    .p(g[0]), .q(h), .r(g[1]), .s(d)
  );
endmodule
