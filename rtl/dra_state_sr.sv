// dra_state_sr: the States shift register of the control module.
//
// One bit per object. Each row step shifts the comparator's row-eq result in;
// after the N row steps of an iteration it holds the N results of that
// iteration, and all_eq = 1 when every row came out unchanged, i.e. L = L * P
// holds and the relaxation has converged. clear empties it (all zeros) at the
// start of the relaxation so that a stale result can never look like
// convergence.
module dra_state_sr #(
  parameter int unsigned N = 8
) (
  input  logic clk,
  input  logic rst_n,
  input  logic clear,
  input  logic shift_en,
  input  logic row_eq,
  output logic all_eq
);
  logic [N-1:0] sr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        sr <= '0;
    else if (clear)    sr <= '0;
    else if (shift_en) sr <= {row_eq, sr[N-1:1]};
  end

  assign all_eq = &sr;
endmodule
