// dra2_lsr: L-matrix Shift Register of the DRA2 engine (the main pipelining
// channel).
//
// N*M bits hold the labeling matrix. Bit (j*M + p) is l_(j+1)(p+1) of the
// object currently presented at column j of the array, so bits [M-1:0] - the
// rightmost M-bit field, "the first 8-bit SR" - always hold the row vector
// being relaxed. All bits are broadcast to the array on l_all.
// Operations (one per clock, priority in this order):
//   * load_shift: replace the rightmost field with new_row, then shift the
//     whole register one place right (circularly). This folds the parallel
//     update of L_i into the first of the M shifts of a row step.
//   * shift with circ = 1: circular right shift by one; bit 0 re-enters at the
//     top. M such shifts bring the next object's vector into the window.
//   * shift with circ = 0: serial load, sin enters at the top. After N*M of
//     them the first bit sent (l_11) sits in bit 0. Send row-major.
// sout = bit 0 is the serial output; a circular shift sequence of N*M clocks
// delivers l_11, l_12, ..., l_NM and leaves the register unchanged.
module dra2_lsr #(
  parameter int unsigned N = 8,
  parameter int unsigned M = 8
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           shift,
  input  logic           circ,
  input  logic           sin,
  input  logic           load_shift,
  input  logic [M-1:0]   new_row,
  output logic [N*M-1:0] l_all,
  output logic [M-1:0]   old_row,
  output logic           sout
);
  logic [N*M-1:0] updated;

  assign updated = {l_all[N*M-1:M], new_row};
  assign old_row = l_all[M-1:0];
  assign sout    = l_all[0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)          l_all <= '0;
    else if (load_shift) l_all <= {updated[0], updated[N*M-1:1]};
    else if (shift)      l_all <= {(circ ? l_all[0] : sin), l_all[N*M-1:1]};
  end
endmodule
