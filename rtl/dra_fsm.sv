// dra_fsm: the controller's finite state machine.
//
// States and their 4-bit codes are those of the controller's state graph; the
// sequence is
//   Reset -> Input All -> Stop S2 -> Iteration Entrance -> Waiting
//   -> (Updating <-> Systolic Shifting)* -> Completion -> Waiting
//   -> Output -> Ending.
// Conditions (this design's choice; the graph gives none):
//   Reset       leaves on start;
//   Input All   leaves when load_done (last load cycle);
//   Updating    lasts one cycle;
//   Shifting    stays until step_last, then returns to Updating for the next
//               row step, or goes to Completion if this is the tagged last
//               cycle of an iteration (tag) and all_eq reports convergence;
//   Output      leaves when out_done (last unload cycle);
//   Ending      is held until reset;
//   every other state lasts one cycle.
module dra_fsm
  import dra_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  logic       load_done,
  input  logic       step_last,
  input  logic       tag,
  input  logic       all_eq,
  input  logic       out_done,
  output dra_state_e state
);
  dra_state_e nxt;

  always_comb begin
    nxt = state;
    unique case (state)
      ST_RESET:      if (start) nxt = ST_INPUT_ALL;
      ST_INPUT_ALL:  if (load_done) nxt = ST_STOP_S2;
      ST_STOP_S2:    nxt = ST_ITER_ENTER;
      ST_ITER_ENTER: nxt = ST_WAIT_PRE;
      ST_WAIT_PRE:   nxt = ST_UPDATING;
      ST_UPDATING:   nxt = ST_SHIFTING;
      ST_SHIFTING:   if (step_last) nxt = (tag && all_eq) ? ST_COMPLETION : ST_UPDATING;
      ST_COMPLETION: nxt = ST_WAIT_POST;
      ST_WAIT_POST:  nxt = ST_OUTPUT;
      ST_OUTPUT:     if (out_done) nxt = ST_ENDING;
      ST_ENDING:     nxt = ST_ENDING;
      default:       nxt = ST_RESET;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) state <= ST_RESET;
    else        state <= nxt;
  end
endmodule
