// dra3_label_ram: the static N*M-bit label memory of the DRA3 engine, which
// replaces DRA2's circulating shift register.
//
// Word j (M bits) is the current label vector L_j and is always driven onto
// the vertical broadcast wires of column j (l_all[j*M +: M]). Writes:
//   * bs_we with the one-hot bs_en: the bus switches BS_jk of the selected
//     column connect the array's output to that word, so the new L_i replaces
//     the old one;
//   * ld_we: host load of word ld_addr (Input All).
// rd_addr / rd_data is the host's read port (Output). Reset clears it.
module dra3_label_ram #(
  parameter int unsigned N = 8,
  parameter int unsigned M = 8
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 bs_we,
  input  logic [N-1:0]         bs_en,
  input  logic [M-1:0]         bs_data,
  input  logic                 ld_we,
  input  logic [$clog2(N)-1:0] ld_addr,
  input  logic [M-1:0]         ld_data,
  input  logic [$clog2(N)-1:0] rd_addr,
  output logic [M-1:0]         rd_data,
  output logic [N*M-1:0]       l_all
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) l_all <= '0;
    else begin
      for (int j = 0; j < N; j++) begin
        if (bs_we && bs_en[j])                    l_all[j*M +: M] <= bs_data;
        else if (ld_we && ld_addr == $clog2(N)'(j)) l_all[j*M +: M] <= ld_data;
      end
    end
  end

  assign rd_data = l_all[rd_addr*M +: M];
endmodule
