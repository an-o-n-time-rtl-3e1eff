// dra3_array: the N x M DRA modules of the DRA3 engine on their switch
// lattice.
//
// Module M_jk sits at column j (object) and row k (label). Column j's M
// vertical wires carry L_j from the label RAM to every module of the column.
// Row k has one horizontal wire b_k; the switching nodes SN_jk of the column
// selected by the one-hot wavefront sn_en connect that column's l_jk to it, so
// b_k = l_ik for the object i being relaxed (the wire is modelled as the OR
// of the module contributions, only one of which can be non-zero). Every
// module then forms its inner sum with C_ij(k,:) read from its own RAM at
// address i (raddr), and the row's outputs are ANDed into new_row[k] = l_ik.
// old_row is the broadcast vector b itself, i.e. the L_i being replaced.
// C pattern loading: c_we writes c_wdata = C_ij(k,1..M) into module
// (c_j, c_k) at address c_i.
// Combinational apart from the RAM writes.
module dra3_array #(
  parameter int unsigned N = 8,
  parameter int unsigned M = 8
) (
  input  logic                 clk,
  input  logic [N*M-1:0]       l_all,    // column j = l_all[j*M +: M]
  input  logic [N-1:0]         sn_en,    // one-hot wavefront column
  input  logic [$clog2(N)-1:0] raddr,
  input  logic                 c_we,
  input  logic [$clog2(N)-1:0] c_i,
  input  logic [$clog2(N)-1:0] c_j,
  input  logic [$clog2(M)-1:0] c_k,
  input  logic [M-1:0]         c_wdata,
  output logic [M-1:0]         new_row,
  output logic [M-1:0]         old_row
);
  logic [N-1:0] drive [M];
  logic [N-1:0] outs  [M];
  logic [M-1:0] b;

  for (genvar k = 0; k < M; k++) begin : g_row
    assign b[k] = |drive[k];
    for (genvar j = 0; j < N; j++) begin : g_col
      dra3_module #(.N(N), .M(M), .K(k)) u_mod (
        .clk,
        .l_j    (l_all[j*M +: M]),
        .b_k    (b[k]),
        .sn_en  (sn_en[j]),
        .b_drive(drive[k][j]),
        .raddr  (raddr),
        .c_we   (c_we && c_j == $clog2(N)'(j) && c_k == $clog2(M)'(k)),
        .c_waddr(c_i),
        .c_wdata(c_wdata),
        .out    (outs[k][j])
      );
    end
    assign new_row[k] = &outs[k];
  end

  assign old_row = b;
endmodule
