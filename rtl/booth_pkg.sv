// booth_pkg: shared constants of the reversible fault-tolerant Booth multiplier.
//
// Holds the per-gate and per-cell cost figures of the reversible library
// (gate count, garbage outputs, quantum cost) and functions that derive the
// cost of a whole n x n multiplier from the cell counts of the array.  The
// closed forms of the whole multiplier are
//   gates   (15n^2 - 7n - 2)/2
//   garbage (21n^2 - 5n - 2)/2
//   quantum (69n^2 - 35n - 4)/2
// and the cell-count functions below reproduce them exactly.  The top level
// uses garbage_outputs() to size its garbage bus.  Nothing here is logic.
package booth_pkg;

  // Garbage outputs of each cell (outputs that carry no wanted value).
  localparam int unsigned F2G_GARBAGE    = 1;  // in the multiplier fan-out role
  localparam int unsigned C_GARBAGE      = 2;
  localparam int unsigned B_GARBAGE      = 7;
  localparam int unsigned BP_GARBAGE     = 5;

  // Reversible gates inside each cell.
  localparam int unsigned C_GATES        = 1;  // one MIG
  localparam int unsigned B_GATES        = 5;  // MIG, 2 x F2G, 2 x LMH
  localparam int unsigned BP_GATES       = 2;  // F2G, LMH

  // Quantum cost of the primitive gates and of the cells.
  localparam int unsigned MIG_QC         = 7;
  localparam int unsigned LMH_QC         = 6;
  localparam int unsigned F2G_QC         = 2;
  localparam int unsigned C_QC           = MIG_QC;
  localparam int unsigned B_QC           = MIG_QC + 2*F2G_QC + 2*LMH_QC;  // 23
  localparam int unsigned BP_QC          = F2G_QC + LMH_QC;               // 8

  // Cell counts of an n x n array.  Row i (0..n-1) covers product bits
  // i..2n-2: 2n-1-i cells, the last of which is a B' cell.
  function automatic int unsigned num_b_cells(int unsigned n);
    return (3*n*(n-1))/2;
  endfunction

  function automatic int unsigned num_bp_cells(int unsigned n);
    return n;
  endfunction

  function automatic int unsigned num_c_cells(int unsigned n);
    return n;
  endfunction

  function automatic int unsigned num_f2g_fanout(int unsigned n);
    return n - 1;
  endfunction

  function automatic int unsigned num_gates(int unsigned n);
    return B_GATES*num_b_cells(n) + BP_GATES*num_bp_cells(n)
         + C_GATES*num_c_cells(n) + num_f2g_fanout(n);
  endfunction

  function automatic int unsigned garbage_outputs(int unsigned n);
    return B_GARBAGE*num_b_cells(n) + BP_GARBAGE*num_bp_cells(n)
         + C_GARBAGE*num_c_cells(n) + F2G_GARBAGE*num_f2g_fanout(n);
  endfunction

  function automatic int unsigned quantum_cost(int unsigned n);
    return B_QC*num_b_cells(n) + BP_QC*num_bp_cells(n)
         + C_QC*num_c_cells(n) + F2G_QC*num_f2g_fanout(n);
  endfunction

endpackage
