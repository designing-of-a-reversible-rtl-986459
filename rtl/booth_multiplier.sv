// booth_multiplier: combinational n x n two's-complement multiplier built
// only from parity-preserving reversible gates (MIG, LMH, F2G).
//
// Radix-2 Booth recoding: row i looks at the multiplier pair (x_i, x_(i-1)),
// with x_(-1) = 0, and adds the multiplicand y (pair 01), subtracts it (pair
// 10) or leaves the running partial product alone (00, 11), all weighted by
// 2^i.  Summed over the rows this is x*y for a signed x.
//
// Structure (row i = 0 .. N-1, product column j):
//   * N-1 F2G gates copy x_0 .. x_(N-2) so each bit can feed two C cells.
//   * One c_cell per row turns (x_i, x_(i-1)) into h (operate) and d
//     (subtract); h and d ripple along the row through the cells.
//   * Row i has 2N-1-i cells covering columns i .. 2N-2: b_cells, then one
//     b_prime_cell in column 2N-2.  Carry (or borrow) ripples from column i
//     upwards, starting at 0.  The partial-product bit a of a cell comes from
//     the cell of the row above in the same column (0 for row 0).
//   * Row 0 takes y_j in column j, and y_(N-1) (the sign bit) in columns
//     N .. 2N-2.  Every b_cell passes its y bit diagonally to the next row,
//     one column to the left of the result weight, so row i sees y shifted
//     by i.  The sign copies of y_(N-1) are plain fan-out, not F2G gates.
//   * Row i's first cell yields product bit i; the last row yields bits
//     N-1 .. 2N-2.
// Totals: 3N(N-1)/2 b_cells, N b_prime_cells, N c_cells, N-1 F2G gates, i.e.
// (15N^2-7N-2)/2 gates, (21N^2-5N-2)/2 garbage outputs and quantum cost
// (69N^2-35N-4)/2.
//
// The product is 2N-1 bits wide, the full signed product modulo 2^(2N-1):
// exact for every operand pair except x = y = -2^(N-1), whose product
// 2^(2N-2) reads back as -2^(2N-2).  Operands are two's complement; an
// unsigned operand must fit in N-1 bits (most significant bit 0).
//
// Ports: x multiplier, y multiplicand, p product; garbage carries every
// garbage output of the gates (fan-out F2G, then C cells, then row by row
// the B cells followed by the B' cell); y_out carries the multiplicand bits
// that leave the last row's b_cells.  No clock: the result settles after
// the ripple through N rows.
//
// Default N = 16, the largest size the cost figures are given for; the
// gate-level structure, cell counts and cost formulas follow the source
// design.  Port order of the garbage bus and which F2G copy goes to which C
// cell are this design's own choices.
module booth_multiplier
  import booth_pkg::*;
#(
  parameter int unsigned N = 16
) (
  input  logic [N-1:0]                    x,        // multiplier (signed)
  input  logic [N-1:0]                    y,        // multiplicand (signed)
  output logic [2*N-2:0]                  p,        // product mod 2^(2N-1)
  output logic [garbage_outputs(N)-1:0]   garbage,  // reversible garbage
  output logic [N-2:0]                    y_out     // y bits out of last row
);
  localparam int unsigned COLS   = 2*N - 1;
  localparam int unsigned G_F2G  = 0;
  localparam int unsigned G_C    = G_F2G + F2G_GARBAGE*(N-1);
  localparam int unsigned G_ROWS = G_C + C_GARBAGE*N;

  // Garbage offset of row r: each row k above it holds 2N-2-k b_cells and one
  // b_prime_cell each.
  function automatic int unsigned row_gbase(int unsigned r);
    int unsigned acc;
    acc = G_ROWS;
    for (int unsigned k = 0; k < r; k++)
      acc += B_GARBAGE*(COLS-1-k) + BP_GARBAGE;
    return acc;
  endfunction

  if (N < 2) begin : g_bad_n
    $error("booth_multiplier: N must be at least 2");
  end

  // ---- multiplier fan-out and Booth recoding -----------------------------
  logic [N-1:0] x_row;    // x_i as seen by C cell i
  logic [N-1:0] x_prev;   // x_(i-1) as seen by C cell i
  logic [N-1:0] row_h, row_d;

  assign x_row[N-1] = x[N-1];
  assign x_prev[0]  = 1'b0;

  for (genvar i = 0; i < N-1; i++) begin : g_fanout
    f2g_gate u_f2g (
      .a(x[i]), .b(1'b0), .c(1'b0),
      .p(x_row[i]), .q(garbage[G_F2G + i]), .r(x_prev[i+1])
    );
  end

  for (genvar i = 0; i < N; i++) begin : g_ccell
    c_cell u_c (
      .xi(x_row[i]), .xim1(x_prev[i]),
      .h(row_h[i]), .d(row_d[i]),
      .g(garbage[G_C + C_GARBAGE*i +: C_GARBAGE])
    );
  end

  // ---- array rows --------------------------------------------------------
  // Inside row i, index k is the offset from the row's first column (j = i+k).
  for (genvar i = 0; i < N; i++) begin : g_row
    localparam int unsigned W  = COLS - i;      // cells in this row
    localparam int unsigned GB = row_gbase(i);

    logic [W-1:0] a_in, b_in, c_in, h_in, d_in, z;
    logic [W-2:0] b_pass, h_pass, d_pass, carry;

    for (genvar k = 0; k < W; k++) begin : g_links
      // partial product from the row above, same column
      if (i == 0) begin : g_a0
        assign a_in[k] = 1'b0;
      end else begin : g_an
        assign a_in[k] = g_row[i-1].z[k+1];
      end
      // multiplicand: external (sign-extended) for row 0, diagonal after
      if (i == 0 && k < N) begin : g_b0
        assign b_in[k] = y[k];
      end else if (i == 0) begin : g_bsign
        assign b_in[k] = y[N-1];
      end else begin : g_bn
        assign b_in[k] = g_row[i-1].b_pass[k];
      end
      // carry chain and row controls
      if (k == 0) begin : g_first
        assign c_in[k] = 1'b0;
        assign h_in[k] = row_h[i];
        assign d_in[k] = row_d[i];
      end else begin : g_next
        assign c_in[k] = carry[k-1];
        assign h_in[k] = h_pass[k-1];
        assign d_in[k] = d_pass[k-1];
      end
    end

    for (genvar k = 0; k < W-1; k++) begin : g_b
      b_cell u_b (
        .a(a_in[k]), .b(b_in[k]), .c(c_in[k]), .h(h_in[k]), .d(d_in[k]),
        .b_out(b_pass[k]), .h_out(h_pass[k]), .d_out(d_pass[k]),
        .z(z[k]), .cout(carry[k]),
        .g(garbage[GB + B_GARBAGE*k +: B_GARBAGE])
      );
    end

    b_prime_cell u_bp (
      .a(a_in[W-1]), .b(b_in[W-1]), .c(c_in[W-1]),
      .h(h_in[W-1]), .d(d_in[W-1]),
      .z(z[W-1]),
      .g(garbage[GB + B_GARBAGE*(W-1) +: BP_GARBAGE])
    );

    // product bits leaving this row
    if (i < N-1) begin : g_pbit
      assign p[i] = z[0];
    end else begin : g_plast
      assign p[2*N-2:N-1] = z;
      assign y_out        = b_pass;
    end
  end

endmodule
