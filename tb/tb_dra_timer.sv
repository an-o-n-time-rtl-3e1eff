// tb_dra_timer: with ROWS = STEP = 8 the tagged bit must fire on exactly every
// 64th running cycle, step_last on every 8th, the row index must follow, the
// count must hold while run is low and restart on clear; io_cnt counts while
// io_run is high and io_last flags io_len - 1.
module tb_dra_timer;
  localparam int ROWS = 8, STEP = 8;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, clear = 0, run = 0, io_run = 0;
  logic [15:0] io_len = 16'd20, io_cnt;
  logic [2:0] row, phase;
  logic step_last, tag, io_last;
  int n;

  dra_timer #(.ROWS(ROWS), .STEP(STEP), .IO_W(16)) dut (.clk, .rst_n, .clear, .run,
    .io_run, .io_len, .row, .phase, .step_last, .tag, .io_cnt, .io_last);
  always #5 clk = ~clk;

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s n=%0d row=%0d phase=%0d", what, n, row, phase); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    @(negedge clk); rst_n = 1; clear = 1;
    @(negedge clk); clear = 0; run = 1;
    for (n = 0; n < 3 * ROWS * STEP; n++) begin
      chk(tag == ((n % (ROWS*STEP)) == ROWS*STEP - 1), "tag");
      chk(step_last == ((n % STEP) == STEP - 1), "step_last");
      chk(row == 3'((n / STEP) % ROWS), "row");
      @(negedge clk);
      if (n == 100) begin
        run = 0;
        repeat (5) @(negedge clk);
        chk(row == 3'(((n + 1) / STEP) % ROWS), "hold");
        run = 1;
      end
    end
    clear = 1; @(negedge clk); clear = 0;
    chk(row == 0 && phase == 0, "clear");
    run = 0; io_run = 1;
    for (int c = 0; c < 20; c++) begin
      chk(io_cnt == 16'(c), "io_cnt");
      chk(io_last == (c == 19), "io_last");
      @(negedge clk);
    end
    io_run = 0; @(negedge clk);
    chk(io_cnt == 0, "io clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
