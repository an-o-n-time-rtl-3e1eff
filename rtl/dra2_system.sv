// dra2_system: the DRA2 discrete relaxation engine, O(N*M) cycles per
// iteration.
//
// Blocks: two compatibility matrix registers (C_ij on the left for pairs of
// different objects, C_ii on the right for an object with itself), the N x M
// SIMD array, the N*M-bit L-matrix shift register (LSR) and the control
// module. The LSR rotates the labeling matrix past the array: at row step i
// the array's column c sees L_(i+c mod N), so column 0 always holds the object
// being relaxed. In the Updating cycle the array's output, the new L_i,
// replaces the LSR's rightmost field (which is compared with it first) and the
// register starts moving; M-1 Shifting cycles complete the M-place move that
// brings L_(i+1) into the window. An iteration is N*M cycles. Updated rows are
// used at once by later rows of the same iteration.
// Because the array has only one C_ij, every pair of different objects shares
// the same compatibility matrix (as in region colouring where all regions
// neighbour each other); the DRA3 engine lifts that restriction.
//
// Host interface (serial, one bit per clock): pulse start; while in_ready is
// high the host drives bit number in_cnt of each stream: lam_in carries the
// initial labeling row-major (l_11, l_12, ..., l_NM; the first N*M cycles),
// cij_in and cii_in the two matrices row-major (the first M*M cycles). The
// load lasts max(N*M, M*M) cycles. After convergence the result leaves on
// l_out, row-major, one bit per clock while l_out_valid is high, then done
// rises and stays high until reset. Total latency from start:
// max(NM,MM) + 3 + iterations*N*M + 2 + N*M cycles to the first done cycle.
module dra2_system
  import dra_pkg::*;
#(
  parameter int unsigned N = 8,
  parameter int unsigned M = 8
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  output logic        in_ready,
  output logic [15:0] in_cnt,
  input  logic        lam_in,
  input  logic        cij_in,
  input  logic        cii_in,
  output logic        l_out,
  output logic        l_out_valid,
  output logic        done,
  output logic [15:0] iterations,
  output dra_state_e  state,
  output logic        row_eq,
  output logic        all_eq
);
  localparam int unsigned NM     = N * M;
  localparam int unsigned MM     = M * M;
  localparam int unsigned IN_LEN = (NM > MM) ? NM : MM;

  logic [NM-1:0] l_all;
  logic [MM-1:0] c_ij, c_ii;
  logic [M-1:0]  new_row, old_row;
  logic sout;

  assign in_ready    = (state == ST_INPUT_ALL);
  assign l_out       = sout;
  assign l_out_valid = (state == ST_OUTPUT);

  dra2_cmr #(.M(M)) u_cmr_ij (
    .clk, .rst_n,
    .shift_en(in_ready && in_cnt < 16'(MM)),
    .sin     (cij_in),
    .c_mat   (c_ij)
  );

  dra2_cmr #(.M(M)) u_cmr_ii (
    .clk, .rst_n,
    .shift_en(in_ready && in_cnt < 16'(MM)),
    .sin     (cii_in),
    .c_mat   (c_ii)
  );

  dra2_lsr #(.N(N), .M(M)) u_lsr (
    .clk, .rst_n,
    .shift     ((in_ready && in_cnt < 16'(NM)) || state == ST_SHIFTING || state == ST_OUTPUT),
    .circ      (!in_ready),
    .sin       (lam_in),
    .load_shift(state == ST_UPDATING),
    .new_row   (new_row),
    .l_all     (l_all),
    .old_row   (old_row),
    .sout      (sout)
  );

  dra2_simd_array #(.N(N), .M(M)) u_msa (
    .l_win  (l_all),
    .c_ii   (c_ii),
    .c_ij   (c_ij),
    .new_row(new_row)
  );

  dra_control #(
    .N(N), .M(M), .STEP(M), .IN_LEN(IN_LEN), .OUT_LEN(NM), .IO_W(16)
  ) u_cm (
    .clk, .rst_n,
    .start     (start),
    .new_row   (new_row),
    .old_row   (old_row),
    .state     (state),
    .row       (),
    .io_cnt    (in_cnt),
    .row_eq    (row_eq),
    .all_eq    (all_eq),
    .tag       (),
    .iterations(iterations),
    .done      (done)
  );
endmodule
