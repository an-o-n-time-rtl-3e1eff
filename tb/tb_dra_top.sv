// tb_dra_top: end-to-end test of both engines in the top level, at the
// default size (8 objects, 8 labels), running side by side on the same
// problems.
// Problems: region colouring on the complete graph (every pair of regions
// neighbours, so one C_ij serves all pairs and both engines can run it) with
// random initial labelings and forced colours, random shared compatibility
// matrices, a "ladder" matrix (label k needs label k+1 in every other object)
// that peels one label per iteration off the first object, and an already
// consistent labeling (converges in one iteration).
// Each result is compared with the software relaxation, iteration count and
// latency included; DRA2 must take N*M cycles per iteration and DRA3 2*N.
// Mechanisms counted (each must occur): serial and word-wide loads, a row
// vector changed by the relaxation (row-eq = 0), a run of several iterations,
// a run that converges in its first iteration, the DRA3 wavefront wrapping
// round to column 0, the convergence exit and the unload of the result.
module tb_dra_top;
  import tb_dra_ref_pkg::*;
  import dra_pkg::*;
  localparam int N = 8, M = 8;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  lab_t L0;
  cmat_t C;
  logic [63:0] lam_v, cij_v, cii_v;

  function automatic logic [7:0] word3(int w);
    logic [7:0] d = '0;
    if (w < N) begin
      for (int p = 0; p < M; p++) d[p] = L0[w][p];
    end else if (w < N + N*N*M) begin
      int x = w - N;
      int i = x / (N*M), j = (x / M) % N, k = x % M;
      for (int p = 0; p < M; p++) d[p] = C[i][j][k][p];
    end
    return d;
  endfunction

  logic d2_start = 0, d2_rdy, d2_lo, d2_lv, d2_done, d2_req, d2_aeq;
  logic [15:0] d2_cnt, d2_it;
  dra_state_e d2_st;
  logic d3_start = 0, d3_rdy, d3_ov, d3_done, d3_req, d3_aeq;
  logic [15:0] d3_cnt, d3_it;
  logic [M-1:0] d3_din, d3_dout;
  dra_state_e d3_st;

  assign d3_din = word3(int'(d3_cnt));

  dra_top dut (
    .clk, .rst_n,
    .dra2_start(d2_start), .dra2_in_ready(d2_rdy), .dra2_in_cnt(d2_cnt),
    .dra2_lam_in(d2_cnt < 64 ? lam_v[d2_cnt[5:0]] : 1'b0),
    .dra2_cij_in(d2_cnt < 64 ? cij_v[d2_cnt[5:0]] : 1'b0),
    .dra2_cii_in(d2_cnt < 64 ? cii_v[d2_cnt[5:0]] : 1'b0),
    .dra2_l_out(d2_lo), .dra2_l_out_valid(d2_lv), .dra2_done(d2_done),
    .dra2_iterations(d2_it), .dra2_state(d2_st), .dra2_row_eq(d2_req), .dra2_all_eq(d2_aeq),
    .dra3_start(d3_start), .dra3_in_ready(d3_rdy), .dra3_in_cnt(d3_cnt),
    .dra3_in_data(d3_din), .dra3_out_data(d3_dout), .dra3_out_valid(d3_ov),
    .dra3_done(d3_done), .dra3_iterations(d3_it), .dra3_state(d3_st),
    .dra3_row_eq(d3_req), .dra3_all_eq(d3_aeq)
  );

  // mechanism counters
  int n_serial_load = 0, n_word_load = 0, n_row_changed2 = 0, n_row_changed3 = 0;
  int n_multi_iter = 0, n_single_iter = 0, n_wrap = 0, n_converge2 = 0, n_converge3 = 0;
  int n_unload2 = 0, n_unload3 = 0;
  int upd3 = 0;

  always @(posedge clk) if (rst_n) begin
    if (d2_st == ST_UPDATING && !d2_req) n_row_changed2++;
    if (d3_st == ST_UPDATING && !d3_req) n_row_changed3++;
    if (d2_st == ST_COMPLETION) n_converge2++;
    if (d3_st == ST_COMPLETION) n_converge3++;
    // the N+1-th row step of a run is the wavefront back on column 0
    if (d3_st == ST_ITER_ENTER) upd3 <= 0;
    if (d3_st == ST_UPDATING) begin
      upd3 <= upd3 + 1;
      if (upd3 % N == 0 && upd3 > 0) n_wrap++;
    end
  end

  initial begin
    lab_t L;
    bit nei [8][8];
    int sweeps, cyc2, cyc3, nb, nw, exp2, exp3;
    logic [63:0] got2;
    logic [7:0] got3 [8];
    repeat (2) @(negedge clk);

    for (int t = 0; t < 10; t++) begin
      rst_n = 0; @(negedge clk); rst_n = 1;
      // shared compatibility for different objects, identity for the same object
      for (int k = 0; k < M; k++)
        for (int p = 0; p < M; p++) begin
          if (t == 7) cij_v[k*M + p] = (p == k + 1);   // ladder: label k needs k+1 elsewhere
          else        cij_v[k*M + p] = (t % 2 == 0 || t == 9) ? (k != p) : (($urandom % 8) < 5);
          cii_v[k*M + p] = (k == p);
        end
      for (int i = 0; i < N; i++)
        for (int j = 0; j < N; j++)
          for (int k = 0; k < M; k++)
            for (int p = 0; p < M; p++)
              C[i][j][k][p] = (i == j) ? cii_v[k*M + p] : cij_v[k*M + p];
      if (t == 7) begin
        L0 = '{default: '{default: 1'b1}};
      end else if (t == 9) begin
        L0 = L;                               // previous result: already consistent
      end else begin
        for (int j = 0; j < N; j++)
          for (int p = 0; p < M; p++) L0[j][p] = ($urandom % 8) < 6;
        if (t % 2 == 0) begin                 // a few regions with a forced colour
          for (int p = 0; p < M; p++) begin
            L0[0][p] = (p == 0);
            L0[N-1][p] = (p == M-1);
          end
        end
      end
      for (int j = 0; j < N; j++) for (int p = 0; p < M; p++) lam_v[j*M + p] = L0[j][p];
      L = L0;
      sweeps = relax(N, M, L, C);
      if (sweeps > 1) n_multi_iter++; else n_single_iter++;
      exp2 = 64 + 3 + sweeps*N*M + 2 + N*M;
      exp3 = N + N*N*M + 3 + sweeps*2*N + 2 + N;

      @(negedge clk); d2_start = 1; d3_start = 1; @(negedge clk); d2_start = 0; d3_start = 0;
      cyc2 = 0; cyc3 = 0; nb = 0; nw = 0;
      while (!(d2_done && d3_done)) begin
        if (!d2_done) cyc2++;
        if (!d3_done) cyc3++;
        @(posedge clk);
        if (d2_lv) begin got2[nb] = d2_lo; nb++; end
        if (d3_ov) begin got3[nw] = d3_dout; nw++; end
        if (d2_rdy) n_serial_load++;
        if (d3_rdy) n_word_load++;
        @(negedge clk);
      end
      if (nb == N*M) n_unload2++;
      if (nw == N) n_unload3++;
      chk(nb == N*M && nw == N, $sformatf("run %0d output lengths %0d %0d", t, nb, nw));
      for (int j = 0; j < N; j++)
        for (int p = 0; p < M; p++) begin
          chk(got2[j*M + p] == L[j][p], $sformatf("run %0d DRA2 l_%0d%0d", t, j+1, p+1));
          chk(got3[j][p] == L[j][p], $sformatf("run %0d DRA3 l_%0d%0d", t, j+1, p+1));
        end
      chk(d2_it == 16'(sweeps) && d3_it == 16'(sweeps),
          $sformatf("run %0d iterations %0d %0d exp %0d", t, d2_it, d3_it, sweeps));
      chk(cyc2 == exp2, $sformatf("run %0d DRA2 latency %0d exp %0d", t, cyc2, exp2));
      chk(cyc3 == exp3, $sformatf("run %0d DRA3 latency %0d exp %0d", t, cyc3, exp3));
      $display("run %0d: %0d iterations, DRA2 %0d cycles, DRA3 %0d cycles", t, sweeps, cyc2, cyc3);
    end

    $display("mechanisms: serial-load cycles %0d, word-load cycles %0d, rows changed DRA2 %0d / DRA3 %0d",
             n_serial_load, n_word_load, n_row_changed2, n_row_changed3);
    $display("mechanisms: multi-iteration runs %0d, single-iteration runs %0d, wavefront wraps %0d",
             n_multi_iter, n_single_iter, n_wrap);
    $display("mechanisms: convergence exits DRA2 %0d / DRA3 %0d, unloads DRA2 %0d / DRA3 %0d",
             n_converge2, n_converge3, n_unload2, n_unload3);
    chk(n_serial_load > 0, "serial load happened");
    chk(n_word_load > 0, "word load happened");
    chk(n_row_changed2 > 0 && n_row_changed3 > 0, "row changed");
    chk(n_multi_iter > 0, "multi-iteration run");
    chk(n_single_iter > 0, "single-iteration run");
    chk(n_wrap > 0, "wavefront wrap");
    chk(n_converge2 == 10 && n_converge3 == 10, "convergence exits");
    chk(n_unload2 == 10 && n_unload3 == 10, "unloads");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
