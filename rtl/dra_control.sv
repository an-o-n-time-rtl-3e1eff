// dra_control: the Control Module shared by the DRA2 and DRA3 engines.
//
// It holds the four units of the control module: the M-bit comparator, the
// timer, the N-bit States register and the FSM, and wires them as the
// self-timed synchronisation scheme does: the comparator watches the new L_i
// against the old one during Updating, its row-eq goes into the States
// register, the States register's all-eq and the timer's tagged bit decide in
// Systolic Shifting whether another iteration follows.
//
// Parameters: STEP is the number of cycles of one row step (one Updating cycle
// plus STEP-1 Shifting cycles): M for DRA2, whose shift register moves M
// places per object, and 2 for DRA3, whose wavefront moves one column.
// IN_LEN / OUT_LEN are the lengths in cycles of the Input All and Output
// states. An iteration lasts N*STEP cycles.
// Outputs: the FSM state, the timer counts, row_eq / all_eq / tag for the
// datapath and for observation, a count of finished iterations and done
// (state Ending).
module dra_control
  import dra_pkg::*;
#(
  parameter int unsigned N       = 8,
  parameter int unsigned M       = 8,
  parameter int unsigned STEP    = 8,
  parameter int unsigned IN_LEN  = 64,
  parameter int unsigned OUT_LEN = 64,
  parameter int unsigned IO_W    = 16
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  logic [M-1:0]         new_row,
  input  logic [M-1:0]         old_row,
  output dra_state_e           state,
  output logic [$clog2(N)-1:0] row,
  output logic [IO_W-1:0]      io_cnt,
  output logic                 row_eq,
  output logic                 all_eq,
  output logic                 tag,
  output logic [15:0]          iterations,
  output logic                 done
);
  logic step_last, io_last, running, io_run;
  logic [$clog2(STEP)-1:0] phase;
  logic [IO_W-1:0] io_len;

  assign running = (state == ST_UPDATING) || (state == ST_SHIFTING);
  assign io_run  = (state == ST_INPUT_ALL) || (state == ST_OUTPUT);
  assign io_len  = (state == ST_OUTPUT) ? IO_W'(OUT_LEN) : IO_W'(IN_LEN);
  assign done    = (state == ST_ENDING);

  dra_comparator #(.M(M)) u_cmp (
    .new_row(new_row), .old_row(old_row), .row_eq(row_eq)
  );

  dra_timer #(.ROWS(N), .STEP(STEP), .IO_W(IO_W)) u_timer (
    .clk, .rst_n,
    .clear    (state == ST_ITER_ENTER),
    .run      (running),
    .io_run   (io_run),
    .io_len   (io_len),
    .row      (row),
    .phase    (phase),
    .step_last(step_last),
    .tag      (tag),
    .io_cnt   (io_cnt),
    .io_last  (io_last)
  );

  dra_state_sr #(.N(N)) u_states (
    .clk, .rst_n,
    .clear   (state == ST_ITER_ENTER),
    .shift_en(state == ST_UPDATING),
    .row_eq  (row_eq),
    .all_eq  (all_eq)
  );

  dra_fsm u_fsm (
    .clk, .rst_n,
    .start    (start),
    .load_done(io_last && state == ST_INPUT_ALL),
    .step_last(step_last && state == ST_SHIFTING),
    .tag      (tag),
    .all_eq   (all_eq),
    .out_done (io_last && state == ST_OUTPUT),
    .state    (state)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                                      iterations <= '0;
    else if (state == ST_ITER_ENTER)                 iterations <= '0;
    else if (state == ST_SHIFTING && step_last && tag) iterations <= iterations + 1'b1;
  end

  // The timer's phase is zero in every Updating cycle.
  a_update_phase: assert property (@(posedge clk) disable iff (!rst_n)
    state == ST_UPDATING |-> phase == '0);
endmodule
