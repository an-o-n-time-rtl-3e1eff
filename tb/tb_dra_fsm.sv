// tb_dra_fsm: walks the controller through its whole state sequence and checks
// each state code: start, load, three set-up states, two row steps that do
// not converge (one tag without all-eq), a tagged cycle with all-eq,
// completion, output and the terminal Ending state.
module tb_dra_fsm;
  import dra_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, start = 0, load_done = 0, step_last = 0, tag = 0, all_eq = 0, out_done = 0;
  dra_state_e st;

  dra_fsm dut (.clk, .rst_n, .start, .load_done, .step_last, .tag, .all_eq, .out_done, .state(st));
  always #5 clk = ~clk;

  task automatic expect_st(dra_state_e e);
    checks++;
    if (st !== e) begin failures++; $display("FAIL state %b expected %b", st, e); end
  endtask

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    @(negedge clk); expect_st(ST_RESET);
    rst_n = 1;
    repeat (3) @(negedge clk);
    expect_st(ST_RESET);
    start = 1; @(negedge clk); start = 0;
    expect_st(ST_INPUT_ALL);
    repeat (4) @(negedge clk);
    expect_st(ST_INPUT_ALL);
    load_done = 1; @(negedge clk); load_done = 0;
    expect_st(ST_STOP_S2);    @(negedge clk);
    expect_st(ST_ITER_ENTER); @(negedge clk);
    expect_st(ST_WAIT_PRE);   @(negedge clk);
    // row step without tag
    expect_st(ST_UPDATING);   @(negedge clk);
    expect_st(ST_SHIFTING);   @(negedge clk);
    expect_st(ST_SHIFTING);   step_last = 1; @(negedge clk); step_last = 0;
    // tagged step, no convergence
    expect_st(ST_UPDATING);   @(negedge clk);
    expect_st(ST_SHIFTING);   step_last = 1; tag = 1; all_eq = 0; @(negedge clk);
    // all-eq without tag must not end the relaxation
    expect_st(ST_UPDATING);   tag = 0; step_last = 0; all_eq = 1; @(negedge clk);
    expect_st(ST_SHIFTING);   step_last = 1; @(negedge clk);
    expect_st(ST_UPDATING);   step_last = 0; @(negedge clk);
    expect_st(ST_SHIFTING);   step_last = 1; tag = 1; all_eq = 1; @(negedge clk);
    step_last = 0; tag = 0; all_eq = 0;
    expect_st(ST_COMPLETION); @(negedge clk);
    expect_st(ST_WAIT_POST);  @(negedge clk);
    expect_st(ST_OUTPUT);     @(negedge clk);
    expect_st(ST_OUTPUT);     out_done = 1; @(negedge clk); out_done = 0;
    expect_st(ST_ENDING);
    start = 1; repeat (3) @(negedge clk);
    expect_st(ST_ENDING);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
