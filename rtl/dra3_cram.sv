// dra3_cram: the row-readable parallel RAM inside one DRA3 module M_jk.
//
// N words of M bits. Word i holds row k of the compatibility matrix C_ij for
// the object i being relaxed: word[i][p] = C_ij(k,p). A whole word is read in
// one access (asynchronous read, raddr -> rdata) so that at row step i every
// module presents its C pattern at the same time. One synchronous write port
// fills it; the C pattern is stored in plain matrix index order, no
// pre-shuffling is needed. Contents are not reset (load before use).
module dra3_cram #(
  parameter int unsigned N = 8,
  parameter int unsigned M = 8
) (
  input  logic                 clk,
  input  logic                 we,
  input  logic [$clog2(N)-1:0] waddr,
  input  logic [M-1:0]         wdata,
  input  logic [$clog2(N)-1:0] raddr,
  output logic [M-1:0]         rdata
);
  logic [M-1:0] mem [N];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  assign rdata = mem[raddr];
endmodule
