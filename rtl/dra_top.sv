// dra_top: the two discrete relaxation engines side by side.
//
// dra2_* ports belong to the DRA2 engine (serial host interface, O(N*M)
// cycles per iteration, one shared compatibility matrix for all pairs of
// different objects); dra3_* ports belong to the DRA3 engine (word-wide host
// interface, O(N) cycles per iteration, a compatibility matrix per object
// pair). They share clock and reset and nothing else; see each engine for
// its protocol and timing.
module dra_top
  import dra_pkg::*;
#(
  parameter int unsigned N = 8,
  parameter int unsigned M = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  // DRA2 engine
  input  logic         dra2_start,
  output logic         dra2_in_ready,
  output logic [15:0]  dra2_in_cnt,
  input  logic         dra2_lam_in,
  input  logic         dra2_cij_in,
  input  logic         dra2_cii_in,
  output logic         dra2_l_out,
  output logic         dra2_l_out_valid,
  output logic         dra2_done,
  output logic [15:0]  dra2_iterations,
  output dra_state_e   dra2_state,
  output logic         dra2_row_eq,
  output logic         dra2_all_eq,
  // DRA3 engine
  input  logic         dra3_start,
  output logic         dra3_in_ready,
  output logic [15:0]  dra3_in_cnt,
  input  logic [M-1:0] dra3_in_data,
  output logic [M-1:0] dra3_out_data,
  output logic         dra3_out_valid,
  output logic         dra3_done,
  output logic [15:0]  dra3_iterations,
  output dra_state_e   dra3_state,
  output logic         dra3_row_eq,
  output logic         dra3_all_eq
);
  dra2_system #(.N(N), .M(M)) u_dra2 (
    .clk, .rst_n,
    .start      (dra2_start),
    .in_ready   (dra2_in_ready),
    .in_cnt     (dra2_in_cnt),
    .lam_in     (dra2_lam_in),
    .cij_in     (dra2_cij_in),
    .cii_in     (dra2_cii_in),
    .l_out      (dra2_l_out),
    .l_out_valid(dra2_l_out_valid),
    .done       (dra2_done),
    .iterations (dra2_iterations),
    .state      (dra2_state),
    .row_eq     (dra2_row_eq),
    .all_eq     (dra2_all_eq)
  );

  dra3_system #(.N(N), .M(M)) u_dra3 (
    .clk, .rst_n,
    .start     (dra3_start),
    .in_ready  (dra3_in_ready),
    .in_cnt    (dra3_in_cnt),
    .in_data   (dra3_in_data),
    .out_data  (dra3_out_data),
    .out_valid (dra3_out_valid),
    .done      (dra3_done),
    .iterations(dra3_iterations),
    .state     (dra3_state),
    .row_eq    (dra3_row_eq),
    .all_eq    (dra3_all_eq)
  );
endmodule
