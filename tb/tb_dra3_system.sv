// tb_dra3_system: end-to-end runs of the DRA3 engine at N = M = 8.
//  * region colouring with a random neighbour graph (a separate C_ij per
//    pair, all-ones for pairs that do not neighbour) and fully random
//    per-pair compatibility matrices, compared bit for bit with the software
//    relaxation, iteration count included;
//  * the three-region example on an N = M = 3 instance;
//  * the cycle count from the first load cycle to done must be
//    N + N*N*M + 3 + iterations*2*N + 2 + N.
module tb_dra3_system;
  import tb_dra_ref_pkg::*;
  import dra_pkg::*;
  localparam int N = 8, M = 8;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  lab_t L0;
  cmat_t C;

  // host word for load cycle w of an n x m problem
  function automatic logic [7:0] host_word(int n, int m, int w);
    logic [7:0] d = '0;
    if (w < n) begin
      for (int p = 0; p < m; p++) d[p] = L0[w][p];
    end else if (w < n + n*n*m) begin
      int x = w - n;
      int i = x / (n*m), j = (x / m) % n, k = x % m;
      for (int p = 0; p < m; p++) d[p] = C[i][j][k][p];
    end
    return d;
  endfunction

  logic s8 = 0, r8, ov8, d8, re8, ae8;
  logic [15:0] c8, it8;
  logic [M-1:0] din8, dout8;
  dra_state_e st8;
  assign din8 = host_word(N, M, int'(c8));
  dra3_system #(.N(N), .M(M)) dut8 (.clk, .rst_n, .start(s8), .in_ready(r8), .in_cnt(c8),
    .in_data(din8), .out_data(dout8), .out_valid(ov8), .done(d8), .iterations(it8),
    .state(st8), .row_eq(re8), .all_eq(ae8));

  logic s3 = 0, r3, ov3, d3, re3, ae3;
  logic [15:0] c3, it3;
  logic [2:0] din3, dout3;
  logic [7:0] hw3;
  dra_state_e st3;
  assign hw3  = host_word(3, 3, int'(c3));
  assign din3 = hw3[2:0];
  dra3_system #(.N(3), .M(3)) dut3 (.clk, .rst_n, .start(s3), .in_ready(r3), .in_cnt(c3),
    .in_data(din3), .out_data(dout3), .out_valid(ov3), .done(d3), .iterations(it3),
    .state(st3), .row_eq(re3), .all_eq(ae3));

  initial begin
    lab_t L;
    bit nei [8][8];
    int sweeps, cyc, nw;
    logic [7:0] got [8];
    repeat (2) @(negedge clk);
    rst_n = 1;

    // three-region example
    for (int i = 0; i < 8; i++) for (int j = 0; j < 8; j++) nei[i][j] = (i != j);
    region_c(3, 3, nei, C);
    L0 = '{default: '{default: 1'b0}};
    L0[0][0] = 1; L0[1] = '{1,1,1,0,0,0,0,0}; L0[2][2] = 1;
    @(negedge clk); s3 = 1; @(negedge clk); s3 = 0;
    nw = 0;
    while (!d3) begin
      @(posedge clk);
      if (ov3) begin got[nw] = 8'(dout3); nw++; end
    end
    chk(nw == 3 && got[0] == 8'b001 && got[1] == 8'b010 && got[2] == 8'b100,
        $sformatf("3x3 colouring %b %b %b", got[0], got[1], got[2]));
    chk(it3 == 2, "3x3 iterations");

    for (int t = 0; t < 12; t++) begin
      rst_n = 0; @(negedge clk); rst_n = 1;
      if (t % 2 == 0) begin
        for (int i = 0; i < N; i++)
          for (int j = i; j < N; j++) begin
            nei[i][j] = (i != j) && (($urandom % 4) != 0);
            nei[j][i] = nei[i][j];
          end
        region_c(N, M, nei, C);
      end else begin
        for (int i = 0; i < N; i++)
          for (int j = 0; j < N; j++)
            for (int k = 0; k < M; k++)
              for (int p = 0; p < M; p++)
                C[i][j][k][p] = (i == j) ? (k == p) : (($urandom % 8) < 5);
      end
      for (int j = 0; j < N; j++)
        for (int p = 0; p < M; p++) L0[j][p] = ($urandom % 8) < 6;
      L = L0;
      sweeps = relax(N, M, L, C);
      @(negedge clk); s8 = 1; @(negedge clk); s8 = 0;
      cyc = 0; nw = 0;
      while (!d8) begin
        @(posedge clk);
        if (ov8) begin got[nw] = dout8; nw++; end
        @(negedge clk);
        cyc++;
      end
      chk(nw == N, "output length");
      for (int j = 0; j < N; j++)
        for (int p = 0; p < M; p++)
          chk(got[j][p] == L[j][p], $sformatf("run %0d label l_%0d%0d", t, j+1, p+1));
      chk(it8 == 16'(sweeps), $sformatf("run %0d iterations %0d exp %0d", t, it8, sweeps));
      chk(cyc == N + N*N*M + 3 + sweeps*2*N + 2 + N,
          $sformatf("run %0d latency %0d exp %0d", t, cyc, N + N*N*M + 3 + sweeps*2*N + 2 + N));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
