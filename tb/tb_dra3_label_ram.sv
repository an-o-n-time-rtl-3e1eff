// tb_dra3_label_ram: host loads, bus-switch writes through a random one-hot
// column select, host reads and the parallel column outputs, all against a
// software copy; also the priority of a bus-switch write over a load.
module tb_dra3_label_ram;
  localparam int N = 8, M = 8;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, bs_we = 0, ld_we = 0;
  logic [N-1:0] bs_en = '0;
  logic [M-1:0] bs_d = '0, ld_d = '0, rd_d;
  logic [2:0] ld_a = '0, rd_a = '0;
  logic [N*M-1:0] la;
  logic [M-1:0] model [N];

  dra3_label_ram #(.N(N), .M(M)) dut (.clk, .rst_n, .bs_we, .bs_en, .bs_data(bs_d), .ld_we,
    .ld_addr(ld_a), .ld_data(ld_d), .rd_addr(rd_a), .rd_data(rd_d), .l_all(la));
  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    @(negedge clk);
    checks++; if (la !== '0) failures++;
    rst_n = 1;
    for (int a = 0; a < N; a++) begin
      @(negedge clk); ld_we = 1; ld_a = 3'(a); ld_d = M'($urandom); model[a] = ld_d;
    end
    for (int t = 0; t < 1000; t++) begin
      int col;
      @(negedge clk);
      ld_we = 1'($urandom); ld_a = 3'($urandom); ld_d = M'($urandom);
      bs_we = 1'($urandom); col = $urandom % N; bs_en = N'(1) << col; bs_d = M'($urandom);
      if (ld_we && !(bs_we && col == ld_a)) model[ld_a] = ld_d;
      if (bs_we) model[col] = bs_d;
      rd_a = 3'($urandom);
      @(posedge clk); #1;
      for (int j = 0; j < N; j++) begin
        checks++;
        if (la[j*M +: M] !== model[j]) begin failures++; $display("FAIL word %0d", j); end
      end
      checks++;
      if (rd_d !== model[rd_a]) begin failures++; $display("FAIL read"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
