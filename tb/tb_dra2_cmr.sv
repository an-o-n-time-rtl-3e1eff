// tb_dra2_cmr: shifts random matrices in row-major order and checks every bit
// position, that the register holds while shift_en is low, and reset.
module tb_dra2_cmr;
  localparam int M = 8;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, en = 0, sin = 0;
  logic [M*M-1:0] cm, exp_m;

  dra2_cmr #(.M(M)) dut (.clk, .rst_n, .shift_en(en), .sin, .c_mat(cm));
  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    @(negedge clk); checks++; if (cm !== '0) failures++;
    rst_n = 1;
    for (int t = 0; t < 10; t++) begin
      exp_m = {$urandom, $urandom};
      for (int b = 0; b < M*M; b++) begin
        @(negedge clk); en = 1; sin = exp_m[b];   // C(1,1) first
      end
      @(negedge clk); en = 0; sin = 1'($urandom);
      checks++;
      if (cm !== exp_m) begin failures++; $display("FAIL load %h exp %h", cm, exp_m); end
      repeat (3) @(negedge clk);
      checks++;
      if (cm !== exp_m) begin failures++; $display("FAIL hold"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
