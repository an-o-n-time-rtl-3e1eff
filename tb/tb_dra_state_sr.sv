// tb_dra_state_sr: all_eq must rise only after N consecutive row-eq = 1
// shifts, fall after any 0 among the last N, hold while shift_en is low and
// drop on clear.
module tb_dra_state_sr;
  localparam int N = 8;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, clear = 0, sh = 0, req = 0, all_eq;
  bit hist[$];

  dra_state_sr #(.N(N)) dut (.clk, .rst_n, .clear, .shift_en(sh), .row_eq(req), .all_eq);
  always #5 clk = ~clk;

  function automatic bit model();
    if (hist.size() < N) return 1'b0;
    for (int i = hist.size() - N; i < hist.size(); i++) if (!hist[i]) return 1'b0;
    return 1'b1;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    @(negedge clk); rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      sh = ($urandom % 4) != 0;
      req = ($urandom % 8) != 0;
      clear = ($urandom % 97) == 0;
      @(negedge clk);
      if (clear) hist.delete();
      else if (sh) hist.push_back(req);
      checks++;
      if (all_eq !== model()) begin failures++; $display("FAIL t=%0d all_eq=%b", t, all_eq); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
