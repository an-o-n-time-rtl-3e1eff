// dra3_system: the DRA3 discrete relaxation engine, O(N) cycles per iteration.
//
// Blocks: the static label RAM (N words of M bits on the vertical broadcast
// wires), the N x M DRA modules on the switch lattice (each with a PE and a
// row-readable RAM holding its C pattern), the architectural wavefront
// generator that closes the SN and BS switches of one column at a time, and
// the same control module as DRA2. The data stay where they are; the
// configuration moves. At row step i (wavefront on column i, module RAMs read
// at address i) the array forms the new L_i; in the Updating cycle it is
// compared with the old L_i and written back through BS_i, in the following
// Shifting cycle the wavefront advances one column. An iteration takes 2*N
// cycles. Every object pair (i,j) has its own M x M compatibility matrix, so
// any discrete relaxation problem of this size can be run.
//
// Host interface (one M-bit word per clock): pulse start; while in_ready is
// high the host drives word number in_cnt on in_data:
//   words 0 .. N-1:            initial label vectors L_1 .. L_N
//                               (bit p of a word = label p+1),
//   word N + (i*N + j)*M + k:  row k of C_ij, bit p = C_ij(k+1,p+1),
//                               for i, j in 0..N-1 and k in 0..M-1.
// The load lasts N + N*N*M cycles. After convergence the final L_1 .. L_N
// leave on out_data, one per clock while out_valid is high; then done rises
// and stays high until reset. Latency from start to the first done cycle:
// N + N*N*M + 3 + iterations*2*N + 2 + N cycles.
module dra3_system
  import dra_pkg::*;
#(
  parameter int unsigned N = 8,
  parameter int unsigned M = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  output logic         in_ready,
  output logic [15:0]  in_cnt,
  input  logic [M-1:0] in_data,
  output logic [M-1:0] out_data,
  output logic         out_valid,
  output logic         done,
  output logic [15:0]  iterations,
  output dra_state_e   state,
  output logic         row_eq,
  output logic         all_eq
);
  localparam int unsigned IN_LEN = N + N * N * M;
  localparam int unsigned AW     = $clog2(N);
  localparam int unsigned KW     = $clog2(M);

  logic [N*M-1:0] l_all;
  logic [N-1:0]   sel;
  logic [M-1:0]   new_row, old_row;
  logic [AW-1:0]  row;
  logic [AW-1:0]  ci, cj;
  logic [KW-1:0]  ck;
  logic           c_phase;

  assign in_ready  = (state == ST_INPUT_ALL);
  assign out_valid = (state == ST_OUTPUT);
  assign c_phase   = in_ready && in_cnt >= 16'(N);

  // C pattern address counters, matrix index order (i, then j, then k)
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ci <= '0; cj <= '0; ck <= '0;
    end else if (!in_ready) begin
      ci <= '0; cj <= '0; ck <= '0;
    end else if (c_phase) begin
      if (ck == KW'(M - 1)) begin
        ck <= '0;
        if (cj == AW'(N - 1)) begin
          cj <= '0;
          ci <= ci + 1'b1;
        end else begin
          cj <= cj + 1'b1;
        end
      end else begin
        ck <= ck + 1'b1;
      end
    end
  end

  dra3_label_ram #(.N(N), .M(M)) u_lram (
    .clk, .rst_n,
    .bs_we  (state == ST_UPDATING),
    .bs_en  (sel),
    .bs_data(new_row),
    .ld_we  (in_ready && in_cnt < 16'(N)),
    .ld_addr(AW'(in_cnt)),
    .ld_data(in_data),
    .rd_addr(AW'(in_cnt)),
    .rd_data(out_data),
    .l_all  (l_all)
  );

  dra3_wavefront #(.N(N)) u_wave (
    .clk, .rst_n,
    .clear  (state == ST_ITER_ENTER),
    .advance(state == ST_SHIFTING),
    .sel    (sel)
  );

  dra3_array #(.N(N), .M(M)) u_array (
    .clk,
    .l_all  (l_all),
    .sn_en  (sel),
    .raddr  (row),
    .c_we   (c_phase),
    .c_i    (ci),
    .c_j    (cj),
    .c_k    (ck),
    .c_wdata(in_data),
    .new_row(new_row),
    .old_row(old_row)
  );

  dra_control #(
    .N(N), .M(M), .STEP(2), .IN_LEN(IN_LEN), .OUT_LEN(N), .IO_W(16)
  ) u_cm (
    .clk, .rst_n,
    .start     (start),
    .new_row   (new_row),
    .old_row   (old_row),
    .state     (state),
    .row       (row),
    .io_cnt    (in_cnt),
    .row_eq    (row_eq),
    .all_eq    (all_eq),
    .tag       (),
    .iterations(iterations),
    .done      (done)
  );

  // The wavefront and the timer's row index always name the same object.
  a_wave_row: assert property (@(posedge clk) disable iff (!rst_n)
    state == ST_UPDATING |-> sel == (N'(1) << row));
endmodule
