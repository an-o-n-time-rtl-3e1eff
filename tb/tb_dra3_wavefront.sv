// tb_dra3_wavefront: after clear the wavefront is on column 0; every advance
// moves it one column (j -> j+1 mod N), it holds without advance, and it wraps
// after N advances.
module tb_dra3_wavefront;
  localparam int N = 8;
  int checks = 0, failures = 0, pos = 0;
  logic clk = 0, rst_n = 0, clear = 0, adv = 0;
  logic [N-1:0] sel;

  dra3_wavefront #(.N(N)) dut (.clk, .rst_n, .clear, .advance(adv), .sel);
  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    @(negedge clk); rst_n = 1; clear = 1;
    @(negedge clk); clear = 0;
    for (int t = 0; t < 500; t++) begin
      checks++;
      if (sel !== N'(1) << pos) begin failures++; $display("FAIL sel %b pos %0d", sel, pos); end
      adv = 1'($urandom);
      clear = ($urandom % 50) == 0;
      @(negedge clk);
      if (clear) pos = 0;
      else if (adv) pos = (pos + 1) % N;
      clear = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
