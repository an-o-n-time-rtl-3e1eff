// tb_dra_cell: checks Cell-A and Cell-B against OR_p(l_p & b & c_p) on random
// operands, the Cell-A broadcast b_out = l[K] and the Cell-B pass-through of b,
// l and the compatibility row.
module tb_dra_cell;
  localparam int M = 8;
  localparam int K = 3;
  int checks = 0, failures = 0;
  logic [M-1:0] l, c, la, lb, ca, cb;
  logic b, ba, bb, oa, ob;

  dra_cell #(.M(M), .K(K), .CELL_A(1'b1)) u_a (.l_in(l), .b_in(b), .c_row(c),
    .l_out(la), .b_out(ba), .c_out(ca), .out(oa));
  dra_cell #(.M(M), .K(K), .CELL_A(1'b0)) u_b (.l_in(l), .b_in(b), .c_row(c),
    .l_out(lb), .b_out(bb), .c_out(cb), .out(ob));

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s l=%b b=%b c=%b", what, l, b, c); end
  endtask

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int t = 0; t < 2000; t++) begin
      bit ea, eb;
      l = M'($urandom); c = M'($urandom); b = 1'($urandom);
      if (t % 4 == 0) l[K] = 1'b1;
      #1;
      ea = 1'b0; eb = 1'b0;
      for (int p = 0; p < M; p++) begin
        ea |= l[p] & l[K] & c[p];
        eb |= l[p] & b & c[p];
      end
      chk(oa == ea, "cell-A out");
      chk(ob == eb, "cell-B out");
      chk(ba == l[K], "cell-A b_out");
      chk(bb == b, "cell-B b_out");
      chk(la == l && lb == l && cb == c, "pass-through");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
