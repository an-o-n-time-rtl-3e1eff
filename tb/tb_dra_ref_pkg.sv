// tb_dra_ref_pkg: software reference for the discrete relaxation testbenches.
//
// relax() runs the relaxation rule sweep by sweep, object by object, with each
// new label vector used at once by the objects that follow (the same order the
// hardware uses):
//   L_i(k) <- AND_j OR_p ( L_j(p) & L_i(k) & C_ij(k,p) )
// and repeats sweeps until one changes nothing. It returns the number of
// sweeps, the unchanged last one included. Arrays are sized for up to 8
// objects and 8 labels; n and m give the sizes in use.
package tb_dra_ref_pkg;
  typedef bit lab_t  [8][8];          // L[i][k]
  typedef bit cmat_t [8][8][8][8];    // C[i][j][k][p]

  function automatic bit [7:0] relax_row(int n, int m, int i, const ref lab_t L,
                                         const ref cmat_t C);
    bit [7:0] nr;
    for (int k = 0; k < m; k++) begin
      bit acc = 1'b1;
      for (int j = 0; j < n; j++) begin
        bit s = 1'b0;
        for (int p = 0; p < m; p++) s |= L[j][p] & L[i][k] & C[i][j][k][p];
        acc &= s;
      end
      nr[k] = acc;
    end
    return nr;
  endfunction

  function automatic int relax(int n, int m, ref lab_t L, const ref cmat_t C);
    int  sweeps = 0;
    bit  changed;
    do begin
      changed = 1'b0;
      for (int i = 0; i < n; i++) begin
        bit [7:0] nr = relax_row(n, m, i, L, C);
        for (int k = 0; k < m; k++) begin
          if (L[i][k] != nr[k]) changed = 1'b1;
          L[i][k] = nr[k];
        end
      end
      sweeps++;
    end while (changed && sweeps < 1000);
    return sweeps;
  endfunction

  // Region colouring: C_ij(k,p) = Nei' for k == p and Nei for k != p when
  // i != j; the identity when i == j.
  function automatic void region_c(int n, int m, const ref bit nei[8][8], ref cmat_t C);
    for (int i = 0; i < 8; i++)
      for (int j = 0; j < 8; j++)
        for (int k = 0; k < 8; k++)
          for (int p = 0; p < 8; p++)
            if (i == j) C[i][j][k][p] = (k == p);
            else        C[i][j][k][p] = (k == p) ? !nei[i][j] : nei[i][j];
  endfunction
endpackage
