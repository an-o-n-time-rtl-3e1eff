// dra_comparator: M-bit equality comparator of the control module.
//
// Compares the newly computed label vector L_i (iteration n) with the vector
// it replaces (iteration n-1). row_eq = 1 when they are equal, that is when
// relaxing object i removed no label. Combinational.
module dra_comparator #(
  parameter int unsigned M = 8
) (
  input  logic [M-1:0] new_row,
  input  logic [M-1:0] old_row,
  output logic         row_eq
);
  assign row_eq = ~|(new_row ^ old_row);
endmodule
