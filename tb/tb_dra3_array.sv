// tb_dra3_array: loads a random C pattern into all N x M modules, then for
// random labelings and every wavefront column i (with the RAMs read at i)
// checks new_row against the software relaxation rule for object i and
// old_row against L_i.
module tb_dra3_array;
  import tb_dra_ref_pkg::*;
  localparam int N = 8, M = 8;
  int checks = 0, failures = 0;
  logic clk = 0, we = 0;
  logic [N*M-1:0] la = '0;
  logic [N-1:0] sn = '0;
  logic [2:0] ra = '0, ci = '0, cj = '0, ck = '0;
  logic [M-1:0] wd = '0, nr, orow;
  cmat_t C;
  lab_t L;

  dra3_array #(.N(N), .M(M)) dut (.clk, .l_all(la), .sn_en(sn), .raddr(ra), .c_we(we),
    .c_i(ci), .c_j(cj), .c_k(ck), .c_wdata(wd), .new_row(nr), .old_row(orow));
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++)
        for (int k = 0; k < M; k++) begin
          @(negedge clk);
          we = 1; ci = 3'(i); cj = 3'(j); ck = 3'(k);
          for (int p = 0; p < M; p++) begin
            C[i][j][k][p] = (i == j) ? (k == p) : (($urandom % 8) < 6);
            wd[p] = C[i][j][k][p];
          end
        end
    @(negedge clk); we = 0;
    for (int t = 0; t < 100; t++) begin
      for (int j = 0; j < N; j++)
        for (int p = 0; p < M; p++) begin
          L[j][p] = ($urandom % 8) != 0;
          la[j*M + p] = L[j][p];
        end
      for (int i = 0; i < N; i++) begin
        logic [7:0] e;
        sn = N'(1) << i; ra = 3'(i);
        #1;
        e = relax_row(N, M, i, L, C);
        checks++;
        if (nr !== e[M-1:0]) begin failures++; $display("FAIL new_row i=%0d %b exp %b", i, nr, e); end
        checks++;
        if (orow !== la[i*M +: M]) begin failures++; $display("FAIL old_row i=%0d", i); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
