// dra_pkg: types shared by the discrete relaxation engines.
//
// The controller state encoding is the 4-bit code printed next to each state
// of the controller's state graph (Reset 0000 ... Ending 1000). The state names
// follow the same graph; the two "Waiting" states are told apart by the step
// they sit between (before the first update, after completion).
package dra_pkg;

  typedef enum logic [3:0] {
    ST_RESET      = 4'b0000,  // idle after reset, waits for start
    ST_INPUT_ALL  = 4'b0001,  // load initial labels and compatibility data
    ST_STOP_S2    = 4'b0010,  // stop the input shifting
    ST_ITER_ENTER = 4'b0011,  // clear timer and states register
    ST_WAIT_PRE   = 4'b1001,  // one cycle for the array to settle
    ST_UPDATING   = 4'b0100,  // write the new L_i, compare, record row-eq
    ST_SHIFTING   = 4'b0101,  // systolic shifting / wavefront advance
    ST_COMPLETION = 4'b0110,  // relaxation has converged
    ST_WAIT_POST  = 4'b1010,  // one cycle before the output phase
    ST_OUTPUT     = 4'b0111,  // unload the final labeling
    ST_ENDING     = 4'b1000   // done, held until reset
  } dra_state_e;

endpackage
