// dra_timer: the controller's timer - systole pacer and tagged-bit generator.
//
// During the relaxation (run = 1) it counts clock cycles of an iteration as a
// row index (0..ROWS-1) and a phase within the row step (0..STEP-1):
//   step_last = last cycle of a row step,
//   tag       = the tagged bit: the last cycle of the ROWS*STEP-cycle
//               iteration, after which the first row (l_11) is presented
//               again. It aligns the convergence test with the iteration.
// clear (Iteration Entrance) sets both counters to zero.
// A second counter, io_cnt, counts cycles of the load and unload phases
// (io_run = 1) and is cleared whenever io_run is low; io_last flags
// io_cnt == io_len - 1.
module dra_timer #(
  parameter int unsigned ROWS = 8,
  parameter int unsigned STEP = 8,
  parameter int unsigned IO_W = 16
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    clear,
  input  logic                    run,
  input  logic                    io_run,
  input  logic [IO_W-1:0]         io_len,
  output logic [$clog2(ROWS)-1:0] row,
  output logic [$clog2(STEP)-1:0] phase,
  output logic                    step_last,
  output logic                    tag,
  output logic [IO_W-1:0]         io_cnt,
  output logic                    io_last
);
  assign step_last = (phase == $clog2(STEP)'(STEP - 1));
  assign tag       = step_last && (row == $clog2(ROWS)'(ROWS - 1));
  assign io_last   = (io_cnt == io_len - 1'b1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      row   <= '0;
      phase <= '0;
    end else if (clear) begin
      row   <= '0;
      phase <= '0;
    end else if (run) begin
      if (step_last) begin
        phase <= '0;
        row   <= tag ? '0 : row + 1'b1;
      end else begin
        phase <= phase + 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       io_cnt <= '0;
    else if (!io_run) io_cnt <= '0;
    else              io_cnt <= io_cnt + 1'b1;
  end
endmodule
