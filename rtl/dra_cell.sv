// dra_cell: one DRA processing element (Cell-A or Cell-B of the SIMD array,
// and the PE inside every DRA3 module).
//
// It evaluates one inner sum of the relaxation rule
//     Out(j,k) = OR over p of ( l_jp AND b_k AND C(k,p) )
// where l_j is the label vector of the object seen by this column, b_k is the
// label bit l_ik of the object being relaxed (broadcast along row k) and C(k,:)
// is row k of the label-pair compatibility matrix for this column.
// The logic is written in the two-level NOR form the cell uses: each term is the
// NOR of the complemented operands, and the terms are combined by a NOR plus
// inverter.
//
// CELL_A = 1 makes the cell a Cell-A: it generates the row broadcast,
// b_out = l_j[K] (the label of its own object at this row's label index K).
// CELL_A = 0 makes a Cell-B, transparent to b: b_out = b_in.
// The vertical label wires and the compatibility row pass through the cell
// unchanged to the next cell, as in the array drawing.
// Purely combinational; no clock.
module dra_cell #(
  parameter int unsigned M      = 8,   // number of labels
  parameter int unsigned K      = 0,   // row (label) index of this cell, 0-based
  parameter bit          CELL_A = 1'b0
) (
  input  logic [M-1:0] l_in,     // vertical label wires l_j1..l_jm
  input  logic         b_in,     // horizontal broadcast b_k (unused by Cell-A)
  input  logic [M-1:0] c_row,    // C(k,1..m)
  output logic [M-1:0] l_out,    // vertical wires passed on
  output logic         b_out,    // horizontal broadcast passed on / generated
  output logic [M-1:0] c_out,    // compatibility row passed on
  output logic         out       // Out(j,k)
);
  logic         b;
  logic [M-1:0] term;   // first NOR level, one term per p

  assign b = CELL_A ? l_in[K] : b_in;

  always_comb begin
    for (int p = 0; p < M; p++)
      term[p] = ~(~l_in[p] | ~b | ~c_row[p]);
  end

  // second level: NOR of the terms, inverted
  assign out   = ~(~|term);
  assign b_out = b;
  assign l_out = l_in;
  assign c_out = c_row;
endmodule
