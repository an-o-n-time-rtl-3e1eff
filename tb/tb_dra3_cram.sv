// tb_dra3_cram: writes random words to random addresses and checks the
// asynchronous whole-word read against a software copy.
module tb_dra3_cram;
  localparam int N = 8, M = 8;
  int checks = 0, failures = 0;
  logic clk = 0, we = 0;
  logic [2:0] wa, ra;
  logic [M-1:0] wd, rd;
  logic [M-1:0] model [N];

  dra3_cram #(.N(N), .M(M)) dut (.clk, .we, .waddr(wa), .wdata(wd), .raddr(ra), .rdata(rd));
  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int a = 0; a < N; a++) begin
      @(negedge clk); we = 1; wa = 3'(a); wd = M'($urandom); model[a] = wd;
    end
    for (int t = 0; t < 1000; t++) begin
      @(negedge clk);
      we = 1'($urandom); wa = 3'($urandom); wd = M'($urandom);
      if (we) model[wa] = wd;
      ra = 3'($urandom);
      @(posedge clk); #1;
      checks++;
      if (rd !== model[ra]) begin failures++; $display("FAIL addr %0d got %h exp %h", ra, rd, model[ra]); end
      we = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
