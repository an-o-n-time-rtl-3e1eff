// tb_dra_size_run: one engine at one size, run through a few complete problems.
//
// Helper for tb_dra_sizes. It instantiates dra2_system (DRA3 = 0) or
// dra3_system (DRA3 = 1) with N objects and M labels and gives the engine
// RUNS problems one after another. Each run gets a fresh reset, a full host
// load, relaxation and unload. The result is compared bit for bit with a
// software relaxation of any size, written here and independent of the
// engine. The number of load cycles (in_ready high), the number of
// iterations and the exact cycle count from the first load cycle to done are
// checked too:
//   DRA2: max(N*M, M*M) + 3 + iterations*N*M + 2 + N*M
//   DRA3: N + N*N*M + 3 + iterations*2*N + 2 + N
// Problems alternate between three kinds:
//   - colouring: every object neighbours every other, with a few objects
//     pinned to one colour;
//   - random: random compatibility, using DRA3's per-pair matrices;
//   - chain: C(k,p) = 1 only for p = k+1. Each pass strips the top label
//     from every object that has it, so the run takes several iterations.
// For DRA2 every pair of different objects uses the same C_ij, and C_ii is
// the identity.
// Ports: clk in; checks, failures and multi (runs that needed more than
// one iteration) out, valid once finished is 1.
module tb_dra_size_run #(
  parameter int N    = 16,
  parameter int M    = 16,
  parameter bit DRA3 = 1'b0,
  parameter int RUNS = 3
) (
  input  logic clk,
  output int   checks,
  output int   failures,
  output int   multi,
  output bit   finished
);
  import dra_pkg::*;

  logic        rst_n = 1'b0, start = 1'b0;
  logic        in_ready, done, row_eq, all_eq;
  logic [15:0] in_cnt, iterations;
  dra_state_e  state;

  bit L0 [N][M];                 // initial labeling
  bit C  [N][N][M][M];           // C[i][j][k][p]

  // ---- the engine ------------------------------------------------------
  logic         out_bit, out_bit_valid;
  logic [M-1:0] in_word, out_word;
  logic         out_word_valid;
  logic         lam_b, cij_b, cii_b;

  // host data for load cycle w
  always_comb begin
    int w;
    w = int'(in_cnt);
    lam_b = 1'b0; cij_b = 1'b0; cii_b = 1'b0; in_word = '0;
    if (w < N*M) lam_b = L0[w / M][w % M];
    if (w < M*M) begin
      cij_b = C[1][0][w / M][w % M];
      cii_b = C[0][0][w / M][w % M];
    end
    if (w < N) begin
      for (int p = 0; p < M; p++) in_word[p] = L0[w][p];
    end else if (w < N + N*N*M) begin
      for (int p = 0; p < M; p++)
        in_word[p] = C[(w-N) / (N*M)][((w-N) / M) % N][(w-N) % M][p];
    end
  end

  if (DRA3) begin : g_dra3
    dra3_system #(.N(N), .M(M)) dut (.clk, .rst_n, .start, .in_ready, .in_cnt,
      .in_data(in_word), .out_data(out_word), .out_valid(out_word_valid), .done,
      .iterations, .state, .row_eq, .all_eq);
    assign out_bit = 1'b0;
    assign out_bit_valid = 1'b0;
  end else begin : g_dra2
    dra2_system #(.N(N), .M(M)) dut (.clk, .rst_n, .start, .in_ready, .in_cnt,
      .lam_in(lam_b), .cij_in(cij_b), .cii_in(cii_b), .l_out(out_bit),
      .l_out_valid(out_bit_valid), .done, .iterations, .state, .row_eq, .all_eq);
    assign out_word = '0;
    assign out_word_valid = 1'b0;
  end

  // ---- reference ---------------------------------------------------------
  function automatic int relax(ref bit L [N][M]);
    int sweeps = 0;
    bit changed;
    bit nr [M];
    do begin
      changed = 1'b0;
      for (int i = 0; i < N; i++) begin
        for (int k = 0; k < M; k++) begin
          bit acc;
          acc = L[i][k];
          for (int j = 0; j < N && acc; j++) begin
            bit s;
            s = 1'b0;
            for (int p = 0; p < M; p++) s |= L[j][p] & C[i][j][k][p];
            acc &= s;
          end
          nr[k] = acc;
        end
        for (int k = 0; k < M; k++) begin
          if (L[i][k] != nr[k]) changed = 1'b1;
          L[i][k] = nr[k];
        end
      end
      sweeps++;
    end while (changed && sweeps < 100000);
    return sweeps;
  endfunction

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s N=%0d M=%0d: %s", DRA3 ? "DRA3" : "DRA2", N, M, what);
    end
  endtask

  initial begin
    bit L [N][M];
    bit got [N][M];
    int sweeps, cyc, nout, lat, kind, nload;
    checks = 0; failures = 0; multi = 0; finished = 1'b0;
    for (int t = 0; t < RUNS; t++) begin
      kind = t % 3;
      for (int i = 0; i < N; i++)
        for (int j = 0; j < N; j++)
          for (int k = 0; k < M; k++)
            for (int p = 0; p < M; p++)
              if (i == j && (kind != 1 || !DRA3))
                C[i][j][k][p] = (k == p);
              else if (kind == 0)
                C[i][j][k][p] = (k != p);
              else if (kind == 1)
                C[i][j][k][p] = (DRA3 || (i == 1 && j == 0)) ? (($urandom % 16) < 13) : 1'b0;
              else
                C[i][j][k][p] = (p == k + 1);
      if (!DRA3 && kind == 1)        // one shared C_ij for every pair i != j
        for (int i = 0; i < N; i++)
          for (int j = 0; j < N; j++)
            if (i != j) C[i][j] = C[1][0];
      for (int j = 0; j < N; j++)
        for (int p = 0; p < M; p++)
          L0[j][p] = (kind == 0) ? ((j % 5 == 0) ? (p == j % M) : 1'b1)
                   : (kind == 1) ? (($urandom % 8) < 7) : 1'b1;
      L = L0;
      sweeps = relax(L);
      if (sweeps > 1) multi++;

      @(negedge clk); rst_n = 1'b0;
      @(negedge clk); rst_n = 1'b1;
      @(negedge clk); start = 1'b1;
      @(negedge clk); start = 1'b0;
      cyc = 0; nout = 0; nload = 0;
      while (!done) begin
        @(posedge clk);
        if (in_ready) nload++;
        if (out_bit_valid) begin
          if (nout < N*M) got[nout / M][nout % M] = out_bit;
          nout++;
        end
        if (out_word_valid) begin
          if (nout < N) for (int p = 0; p < M; p++) got[nout][p] = out_word[p];
          nout++;
        end
        @(negedge clk);
        cyc++;
      end
      lat = DRA3 ? N + N*N*M : ((N*M > M*M) ? N*M : M*M);
      chk(nload == lat, $sformatf("run %0d load length %0d expected %0d", t, nload, lat));
      chk(nout == (DRA3 ? N : N*M), $sformatf("run %0d output length %0d", t, nout));
      for (int j = 0; j < N; j++)
        for (int p = 0; p < M; p++)
          chk(got[j][p] == L[j][p], $sformatf("run %0d label l_%0d,%0d", t, j+1, p+1));
      chk(iterations == 16'(sweeps),
          $sformatf("run %0d iterations %0d expected %0d", t, iterations, sweeps));
      lat = DRA3 ? N + N*N*M + 3 + sweeps*2*N + 2 + N
                 : ((N*M > M*M) ? N*M : M*M) + 3 + sweeps*N*M + 2 + N*M;
      chk(cyc == lat, $sformatf("run %0d latency %0d expected %0d", t, cyc, lat));
    end
    finished = 1'b1;
  end
endmodule
