// tb_dra3_module: loads a module's C pattern, then checks for random label
// vectors, broadcast values and read addresses that out is
// OR_p(l_p & b & C_i(k,p)) and that the switching node drives l_k onto b_k
// only when closed.
module tb_dra3_module;
  localparam int N = 8, M = 8, K = 5;
  int checks = 0, failures = 0;
  logic clk = 0, b = 0, sn = 0, drv, we = 0, out;
  logic [M-1:0] l = '0, wd = '0;
  logic [2:0] ra = '0, wa = '0;
  logic [M-1:0] crow [N];

  dra3_module #(.N(N), .M(M), .K(K)) dut (.clk, .l_j(l), .b_k(b), .sn_en(sn), .b_drive(drv),
    .raddr(ra), .c_we(we), .c_waddr(wa), .c_wdata(wd), .out);
  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int a = 0; a < N; a++) begin
      @(negedge clk); we = 1; wa = 3'(a); wd = M'($urandom); crow[a] = wd;
    end
    @(negedge clk); we = 0;
    for (int t = 0; t < 2000; t++) begin
      bit e;
      e = 1'b0;
      l = M'($urandom); b = 1'($urandom); sn = 1'($urandom); ra = 3'($urandom);
      #1;
      for (int p = 0; p < M; p++) e |= l[p] & b & crow[ra][p];
      checks++;
      if (out !== e) begin failures++; $display("FAIL out"); end
      checks++;
      if (drv !== (sn & l[K])) begin failures++; $display("FAIL SN drive"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
