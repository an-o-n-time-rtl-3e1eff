// dra2_cmr: Compatibility Matrix Register of the DRA2 engine.
//
// M shift registers of M bits each, chained into one serial path, hold one
// M x M label-pair compatibility matrix. The engine has two of them: one for
// the same-object matrix C_ii (feeding Cell-A) and one for the different-object
// matrix C_ij (feeding the Cell-Bs).
// Loading: while shift_en is high, one bit enters per clock at the top of the
// chain and everything moves one place towards bit 0, so after M*M clocks the
// first bit sent sits in C(1,1). Send the matrix in row-major order:
// C(1,1), C(1,2), ..., C(1,M), C(2,1), ..., C(M,M).
// The whole matrix is read in parallel on c_mat (row k at c_mat[k*M +: M],
// bit p of the row = C(k+1,p+1)). Reset clears it.
module dra2_cmr #(
  parameter int unsigned M = 8
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           shift_en,
  input  logic           sin,
  output logic [M*M-1:0] c_mat
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        c_mat <= '0;
    else if (shift_en) c_mat <= {sin, c_mat[M*M-1:1]};
  end
endmodule
