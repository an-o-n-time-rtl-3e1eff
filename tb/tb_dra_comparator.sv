// tb_dra_comparator: equal vectors, vectors differing in one random bit and
// random pairs, against a software equality test.
module tb_dra_comparator;
  localparam int M = 8;
  int checks = 0, failures = 0;
  logic [M-1:0] a, b;
  logic eq;

  dra_comparator #(.M(M)) dut (.new_row(a), .old_row(b), .row_eq(eq));

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int t = 0; t < 3000; t++) begin
      a = M'($urandom);
      case (t % 3)
        0: b = a;
        1: b = a ^ (M'(1) << ($urandom % M));
        default: b = M'($urandom);
      endcase
      #1;
      checks++;
      if (eq !== (a == b)) begin failures++; $display("FAIL %b %b -> %b", a, b, eq); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
