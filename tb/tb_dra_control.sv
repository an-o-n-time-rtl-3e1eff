// tb_dra_control: the control module with N = M = STEP = 4. The testbench
// plays the datapath: in the first iteration row 1 changes, in the second
// none does. Checks: row-eq follows the vectors, the relaxation ends after
// exactly two iterations, the Updating cycles come every STEP cycles, and the
// cycle count from the first load cycle to done is
// IN_LEN + 3 + 2*N*STEP + 2 + OUT_LEN.
module tb_dra_control;
  import dra_pkg::*;
  localparam int N = 4, M = 4, STEP = 4, IN_LEN = 16, OUT_LEN = 16;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, start = 0;
  logic [M-1:0] nr, orow;
  dra_state_e st;
  logic [1:0] row;
  logic [15:0] io_cnt, iters;
  logic row_eq, all_eq, tag, done;
  int cyc = 0, first_load = -1, done_cyc = -1, upd = 0, last_upd = -1;

  dra_control #(.N(N), .M(M), .STEP(STEP), .IN_LEN(IN_LEN), .OUT_LEN(OUT_LEN)) dut (
    .clk, .rst_n, .start, .new_row(nr), .old_row(orow), .state(st), .row, .io_cnt,
    .row_eq, .all_eq, .tag, .iterations(iters), .done);
  always #5 clk = ~clk;

  assign orow = 4'b1010;
  assign nr   = (iters == 0 && row == 2'd1) ? 4'b0010 : 4'b1010;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  always @(negedge clk) if (rst_n) begin
    cyc++;
    if (st == ST_INPUT_ALL && first_load < 0) first_load = cyc;
    if (done && done_cyc < 0) done_cyc = cyc;
    if (st == ST_UPDATING) begin
      checks++;
      if (row_eq !== (nr == orow)) begin failures++; $display("FAIL row_eq"); end
      if (last_upd >= 0 && cyc - last_upd != STEP) begin
        checks++; failures++; $display("FAIL update spacing %0d", cyc - last_upd);
      end
      last_upd = cyc;
      upd++;
    end
  end

  initial begin
    @(negedge clk); rst_n = 1;
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    wait (done);
    repeat (2) @(negedge clk);
    checks++;
    if (iters != 2) begin failures++; $display("FAIL iterations %0d", iters); end
    checks++;
    if (upd != 2 * N) begin failures++; $display("FAIL updates %0d", upd); end
    checks++;
    if (done_cyc - first_load != IN_LEN + 3 + 2*N*STEP + 2 + OUT_LEN) begin
      failures++; $display("FAIL latency %0d", done_cyc - first_load);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
