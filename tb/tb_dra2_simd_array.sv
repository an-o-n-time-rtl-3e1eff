// tb_dra2_simd_array: applies random label windows and compatibility matrices
// to the N x M array and compares new_row with the relaxation rule computed in
// software, column 0 using C_ii and the other columns C_ij.
module tb_dra2_simd_array;
  localparam int N = 8, M = 8;
  int checks = 0, failures = 0;
  logic [N*M-1:0] lw;
  logic [M*M-1:0] cii, cij;
  logic [M-1:0]   nr;

  dra2_simd_array #(.N(N), .M(M)) dut (.l_win(lw), .c_ii(cii), .c_ij(cij), .new_row(nr));

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int t = 0; t < 3000; t++) begin
      logic [M-1:0] exp_r;
      lw  = {$urandom, $urandom} | {$urandom, $urandom};   // dense labels
      cij = {$urandom, $urandom} | {$urandom, $urandom};
      cii = (t % 2) ? {$urandom, $urandom} : '0;
      if (t % 2 == 0) for (int k = 0; k < M; k++) cii[k*M + k] = 1'b1;
      #1;
      for (int k = 0; k < M; k++) begin
        bit acc;
        acc = 1'b1;
        for (int c = 0; c < N; c++) begin
          bit s;
          s = 1'b0;
          for (int p = 0; p < M; p++)
            s |= lw[c*M + p] & lw[k] & (c == 0 ? cii[k*M + p] : cij[k*M + p]);
          acc &= s;
        end
        exp_r[k] = acc;
      end
      checks++;
      if (nr !== exp_r) begin
        failures++;
        $display("FAIL t=%0d got %b exp %b", t, nr, exp_r);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
