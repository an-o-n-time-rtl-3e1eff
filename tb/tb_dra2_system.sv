// tb_dra2_system: end-to-end runs of the DRA2 engine.
//  * the three-region colouring example (N = M = 3: region 1 red, region 3
//    blue, neighbouring regions differ) must end with red, green, blue;
//  * random 8 x 8 problems (one C_ij for all pairs of different objects,
//    C_ii the identity or random) are compared bit for bit with the software
//    relaxation, including the number of iterations;
//  * the cycle count from the first load cycle to done must be
//    max(NM,MM) + 3 + iterations*N*M + 2 + N*M.
module tb_dra2_system;
  import tb_dra_ref_pkg::*;
  import dra_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // ---- 3 x 3 instance -------------------------------------------------
  logic s3 = 0, r3, lo3, lv3, d3, re3, ae3;
  logic [15:0] c3, it3;
  logic [8:0] lam3, cij3, cii3;
  dra_state_e st3;
  dra2_system #(.N(3), .M(3)) dut3 (.clk, .rst_n, .start(s3), .in_ready(r3), .in_cnt(c3),
    .lam_in(c3 < 9 ? lam3[c3] : 1'b0), .cij_in(c3 < 9 ? cij3[c3] : 1'b0),
    .cii_in(c3 < 9 ? cii3[c3] : 1'b0), .l_out(lo3), .l_out_valid(lv3), .done(d3),
    .iterations(it3), .state(st3), .row_eq(re3), .all_eq(ae3));

  // ---- 8 x 8 instance -------------------------------------------------
  localparam int N = 8, M = 8;
  logic s8 = 0, r8, lo8, lv8, d8, re8, ae8;
  logic [15:0] c8, it8;
  logic [63:0] lam8, cij8, cii8, got8;
  dra_state_e st8;
  dra2_system #(.N(N), .M(M)) dut8 (.clk, .rst_n, .start(s8), .in_ready(r8), .in_cnt(c8),
    .lam_in(c8 < 64 ? lam8[c8[5:0]] : 1'b0), .cij_in(c8 < 64 ? cij8[c8[5:0]] : 1'b0),
    .cii_in(c8 < 64 ? cii8[c8[5:0]] : 1'b0), .l_out(lo8), .l_out_valid(lv8), .done(d8),
    .iterations(it8), .state(st8), .row_eq(re8), .all_eq(ae8));

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    lab_t L; cmat_t C;
    bit [8:0] got3;
    int sweeps, cyc, nbit;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // region colouring: labels red, green, blue; every region neighbours the others
    lam3 = 9'b100_111_001;                  // L1 = red, L2 = any, L3 = blue
    cij3 = 9'b011_101_110;                  // C(k,p) = (k != p)
    cii3 = 9'b100_010_001;                  // identity
    @(negedge clk); s3 = 1; @(negedge clk); s3 = 0;
    nbit = 0;
    while (!d3) begin
      @(posedge clk);
      if (lv3) begin got3[nbit] = lo3; nbit++; end
    end
    chk(nbit == 9, "3x3 output length");
    chk(got3 == 9'b100_010_001, $sformatf("3x3 colouring result %b", got3));
    chk(it3 == 2, $sformatf("3x3 iterations %0d", it3));

    for (int t = 0; t < 12; t++) begin
      rst_n = 0; @(negedge clk); rst_n = 1;
      for (int k = 0; k < M; k++)
        for (int p = 0; p < M; p++) begin
          cij8[k*M + p] = (t % 3 == 0) ? (k != p) : (($urandom % 8) < 5);
          cii8[k*M + p] = (t % 4 == 3) ? ($urandom % 8) < 6 : (k == p);
        end
      for (int j = 0; j < N; j++)
        for (int p = 0; p < M; p++) lam8[j*M + p] = ($urandom % 8) < 6;
      for (int i = 0; i < N; i++)
        for (int j = 0; j < N; j++)
          for (int k = 0; k < M; k++)
            for (int p = 0; p < M; p++)
              C[i][j][k][p] = (i == j) ? cii8[k*M + p] : cij8[k*M + p];
      for (int j = 0; j < N; j++) for (int p = 0; p < M; p++) L[j][p] = lam8[j*M + p];
      sweeps = relax(N, M, L, C);
      @(negedge clk); s8 = 1; @(negedge clk); s8 = 0;
      cyc = 0; nbit = 0;
      // count from the first Input All cycle (this one) to the first done cycle
      while (!d8) begin
        @(posedge clk);
        if (lv8) begin got8[nbit] = lo8; nbit++; end
        @(negedge clk);
        cyc++;
      end
      chk(nbit == N*M, "output length");
      for (int j = 0; j < N; j++)
        for (int p = 0; p < M; p++)
          chk(got8[j*M + p] == L[j][p], $sformatf("run %0d label l_%0d%0d", t, j+1, p+1));
      chk(it8 == 16'(sweeps), $sformatf("run %0d iterations %0d exp %0d", t, it8, sweeps));
      chk(cyc == 64 + 3 + sweeps*N*M + 2 + N*M,
          $sformatf("run %0d latency %0d exp %0d", t, cyc, 64 + 3 + sweeps*N*M + 2 + N*M));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
