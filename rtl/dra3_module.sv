// dra3_module: one DRA module M_jk of the DRA3 switch lattice.
//
// It holds a DRA-PE cell (the same cell as in DRA2, used as a Cell-B), its
// local row-readable RAM with the C pattern C_ij(k,:) for every i, and the
// switching node SN_jk. When SN_jk is closed (sn_en = 1: the architectural
// wavefront stands at this module's column) the module drives its vertical
// label wire l_jk onto the horizontal broadcast wire b_k; b_drive carries
// that contribution and is zero otherwise. The PE computes
//   out = OR_p ( l_jp AND b_k AND C_ij(k,p) )  with i = raddr.
// Combinational from l_j, b_k, sn_en and raddr; the RAM writes on clk.
module dra3_module #(
  parameter int unsigned N = 8,
  parameter int unsigned M = 8,
  parameter int unsigned K = 0    // row (label) index of this module, 0-based
) (
  input  logic                 clk,
  input  logic [M-1:0]         l_j,      // vertical wires of column j
  input  logic                 b_k,      // horizontal broadcast wire of row k
  input  logic                 sn_en,    // switching node SN_jk closed
  output logic                 b_drive,  // l_jk onto b_k through SN_jk
  input  logic [$clog2(N)-1:0] raddr,    // object i being relaxed
  input  logic                 c_we,
  input  logic [$clog2(N)-1:0] c_waddr,
  input  logic [M-1:0]         c_wdata,
  output logic                 out
);
  logic [M-1:0] c_row;

  dra3_cram #(.N(N), .M(M)) u_ram (
    .clk, .we(c_we), .waddr(c_waddr), .wdata(c_wdata),
    .raddr(raddr), .rdata(c_row)
  );

  dra_cell #(.M(M), .K(K), .CELL_A(1'b0)) u_pe (
    .l_in (l_j),
    .b_in (b_k),
    .c_row(c_row),
    .l_out(),
    .b_out(),
    .c_out(),
    .out  (out)
  );

  assign b_drive = sn_en & l_j[K];
endmodule
