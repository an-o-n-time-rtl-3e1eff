// tb_dra_sizes: both engines at larger sizes than the 8 x 8 default.
//
// DRA2 was described as extendable to 16 and 32 objects, and DRA3 as the
// architecture for larger problems. This bench builds DRA2 with 16 objects x
// 8 labels and DRA3 with 16 objects x 16 labels. It runs each through
// complete problems (colouring, random and chain; see tb_dra_size_run).
// Every result, iteration count and cycle count is checked against a
// software relaxation. Both instances run at the same time on one clock.
// The 32-object sizes and DRA2 at 16 x 16 are not simulated here: the C++
// model Verilator generates for them takes too long, or too much memory, to
// compile.
// The bench fails if any check fails, or if no run at some size needed more
// than one iteration (then the iterative loop would not have been exercised
// there). A watchdog ends it after a fixed number of cycles.
module tb_dra_sizes;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  localparam int NI = 2;
  int checks [NI], failures [NI], multi [NI];
  bit finished [NI];

  tb_dra_size_run #(.N(16), .M(8), .DRA3(1'b0), .RUNS(3)) u_dra2_16
    (.clk, .checks(checks[0]), .failures(failures[0]), .multi(multi[0]), .finished(finished[0]));
  tb_dra_size_run #(.N(16), .M(16), .DRA3(1'b1), .RUNS(3)) u_dra3_16
    (.clk, .checks(checks[1]), .failures(failures[1]), .multi(multi[1]), .finished(finished[1]));

  function automatic void report(int extra);
    int c = 0, f = extra;
    for (int u = 0; u < NI; u++) begin
      c += checks[u];
      f += failures[u];
    end
    $display("TB_RESULT checks=%0d failures=%0d", c, f);
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    $display("FAIL watchdog");
    report(1);
    $finish;
  end

  initial begin
    int f;
    wait (finished[0] && finished[1]);
    f = 0;
    for (int u = 0; u < NI; u++) begin
      $display("instance %0d: checks %0d failures %0d multi-iteration runs %0d",
               u, checks[u], failures[u], multi[u]);
      if (multi[u] == 0) begin
        f++;
        $display("FAIL instance %0d never needed more than one iteration", u);
      end
    end
    report(f);
    $finish;
  end
endmodule
