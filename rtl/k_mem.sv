// k_mem: the bank of reaction coefficients of a chemical engine.
//
// NR registers of KW bits, each an IEEE-754 single-precision reaction
// coefficient k_r in units of 1/s (scaled by the reactant concentrations
// according to the law of mass action). One synchronous write port for
// level-2 programming and one combinational read port used by the
// propensity unit. All coefficients reset to 0, which disables the
// reaction. The bank follows the reference design.
module k_mem
  import ca_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  wr_en,
  input  logic [$clog2(NR)-1:0] wr_r,
  input  logic [KW-1:0]         wr_data,
  input  logic [$clog2(NR)-1:0] rd_r,
  output logic [KW-1:0]         rd_data
);
  logic [KW-1:0] k_q [NR];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < NR; r++) k_q[r] <= '0;
    end else if (wr_en) begin
      k_q[wr_r] <= wr_data;
    end
  end

  assign rd_data = k_q[rd_r];
endmodule
