// dra3_wavefront: generator of the DRA3 architectural wavefront.
//
// A one-hot ring of N bits: bit j closes the switching nodes SN_jk and the bus
// switches BS_jk of column j. clear puts the wavefront on column 0 (object 1,
// the rightmost column); each advance moves it one column to the left
// (column j -> j+1 mod N), so over an iteration it visits every column once in
// index order j + t mod N. Because the C pattern is stored in plain index
// order in the modules' RAMs, moving the configuration replaces the skewed
// data movement of DRA2.
module dra3_wavefront #(
  parameter int unsigned N = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clear,
  input  logic         advance,
  output logic [N-1:0] sel
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       sel <= N'(1);
    else if (clear)   sel <= N'(1);
    else if (advance) sel <= {sel[N-2:0], sel[N-1]};
  end

  a_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot(sel));
endmodule
