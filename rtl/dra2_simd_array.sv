// dra2_simd_array: the N x M multiprocessor SIMD array of the DRA2 engine.
//
// Column c (0-based, c = 0 is the rightmost column j1) receives the label
// vector of the object that the L-matrix shift register currently presents at
// that column: at row step i, column c holds L_(i+c mod N). Row k (0-based) of
// the array computes new label l_ik:
//   * the Cell-A in column 0 broadcasts b_k = l_ik (its own object's label k)
//     right-to-left through the Cell-Bs of the row;
//   * every cell forms Out(c,k) = OR_p(l_cp & b_k & C(k,p)), using the same-
//     object matrix C_ii in column 0 and the different-object matrix C_ij in
//     all other columns;
//   * the row's outputs are ANDed (the outer product of the relaxation rule)
//     into new_row[k].
// Because column 0's C_ii is the identity in the usual set-up, the factor
// l_ik of the rule comes out of column 0 automatically.
// Combinational: new_row is valid one settling time after the inputs change.
module dra2_simd_array #(
  parameter int unsigned N = 8,   // objects (columns)
  parameter int unsigned M = 8    // labels (rows)
) (
  input  logic [N*M-1:0] l_win,   // column c = l_win[c*M +: M]
  input  logic [M*M-1:0] c_ii,    // row k = c_ii[k*M +: M]
  input  logic [M*M-1:0] c_ij,    // row k = c_ij[k*M +: M]
  output logic [M-1:0]   new_row  // new L_i, bit k = l_ik
);
  // b[k][c] is the broadcast entering column c of row k
  logic [N:0]   b      [M];
  logic [N-1:0] outs   [M];
  // vertical label wires leaving each row (passed down the column)
  logic [N*M-1:0] vl   [M+1];

  assign vl[0] = l_win;

  for (genvar k = 0; k < M; k++) begin : g_row
    assign b[k][0]    = 1'b0;              // Cell-A ignores its b input
    for (genvar c = 0; c < N; c++) begin : g_col
      if (c == 0) begin : g_a
        dra_cell #(.M(M), .K(k), .CELL_A(1'b1)) u_cell (
          .l_in (vl[k][c*M +: M]),
          .b_in (b[k][c]),
          .c_row(c_ii[k*M +: M]),
          .l_out(vl[k+1][c*M +: M]),
          .b_out(b[k][c+1]),
          .c_out(),
          .out  (outs[k][c])
        );
      end else begin : g_b
        // the C_ij row passes along the Cell-Bs as one net
        dra_cell #(.M(M), .K(k), .CELL_A(1'b0)) u_cell (
          .l_in (vl[k][c*M +: M]),
          .b_in (b[k][c]),
          .c_row(c_ij[k*M +: M]),
          .l_out(vl[k+1][c*M +: M]),
          .b_out(b[k][c+1]),
          .c_out(),
          .out  (outs[k][c])
        );
      end
    end
    assign new_row[k] = &outs[k];
  end
endmodule
