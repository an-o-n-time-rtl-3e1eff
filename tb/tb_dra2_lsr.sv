// tb_dra2_lsr: serial load (l_11 first ends in bit 0), circular shifting by M
// places (next object into the window, old window to the top), the combined
// load-and-shift of a new row vector, and serial unload through sout.
module tb_dra2_lsr;
  localparam int N = 8, M = 8, NM = N*M;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, shift = 0, circ = 0, sin = 0, ldsh = 0, sout;
  logic [M-1:0] nrow, orow;
  logic [NM-1:0] la, model;

  dra2_lsr #(.N(N), .M(M)) dut (.clk, .rst_n, .shift, .circ, .sin, .load_shift(ldsh),
    .new_row(nrow), .l_all(la), .old_row(orow), .sout);
  always #5 clk = ~clk;

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s: %h model %h", what, la, model); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    @(negedge clk); rst_n = 1;
    model = {$urandom, $urandom};
    for (int b = 0; b < NM; b++) begin
      @(negedge clk); shift = 1; circ = 0; sin = model[b];
    end
    @(negedge clk); shift = 0;
    chk(la === model, "serial load");
    chk(orow === model[M-1:0], "window");
    for (int r = 0; r < 3 * N; r++) begin
      // one row step: load+shift then M-1 circular shifts
      nrow = M'($urandom);
      model[M-1:0] = nrow;
      @(negedge clk); ldsh = 1;
      @(negedge clk); ldsh = 0; shift = 1; circ = 1;
      model = {model[0], model[NM-1:1]};
      chk(la === model, "load_shift");
      repeat (M - 1) begin
        @(negedge clk);
        model = {model[0], model[NM-1:1]};
      end
      shift = 0;
      @(negedge clk);
      chk(la === model, "row step");
      chk(la[NM-1 -: M] === nrow, "updated row at top");
    end
    // serial unload, register unchanged afterwards
    for (int b = 0; b < NM; b++) begin
      checks++;
      if (sout !== model[b]) begin failures++; $display("FAIL unload bit %0d", b); end
      shift = 1; circ = 1;
      @(negedge clk);
    end
    shift = 0;
    chk(la === model, "after unload");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
