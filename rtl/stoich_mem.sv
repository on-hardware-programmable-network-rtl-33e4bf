// stoich_mem: one stoichiometric array (alpha-mem for reactants or
// beta-mem for products) of a chemical engine.
//
// The array is three-dimensional: reaction (NR) x reactant slot (NPSI, one
// per hardware logic slice, HLS) x order position (NALPHA). Each record
// holds a species address; 0 means empty. A species of order n in a
// reaction fills n order positions of one slot with its address, so that
// 2 S3 + S2 puts S3 in positions 0 and 1 of slot 0 and S2 in position 0 of
// slot 1. The organisation follows the reference design; record layout in
// the write command is this design's own.
// Interface: one synchronous write port (wr_*) used by level-2 programming,
// and two combinational row-read ports, each returning the NPSI records of
// one (reaction, order position) pair: port A serves the reaction
// execution logic, port B the propensity unit. All records reset to 0.
module stoich_mem
  import ca_pkg::*;
(
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       wr_en,
  input  logic [$clog2(NR)-1:0]      wr_r,
  input  logic [$clog2(NPSI)-1:0]    wr_h,
  input  logic [$clog2(NALPHA)-1:0]  wr_j,
  input  logic [SAW-1:0]             wr_data,
  input  logic [$clog2(NR)-1:0]      a_r,
  input  logic [$clog2(NALPHA)-1:0]  a_j,
  output logic [SAW-1:0]             a_row [NPSI],
  input  logic [$clog2(NR)-1:0]      b_r,
  input  logic [$clog2(NALPHA)-1:0]  b_j,
  output logic [SAW-1:0]             b_row [NPSI]
);
  logic [SAW-1:0] rec_q [NR][NPSI][NALPHA];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < NR; r++)
        for (int h = 0; h < NPSI; h++)
          for (int j = 0; j < NALPHA; j++)
            rec_q[r][h][j] <= '0;
    end else if (wr_en) begin
      rec_q[wr_r][wr_h][wr_j] <= wr_data;
    end
  end

  always_comb begin
    for (int h = 0; h < NPSI; h++) begin
      a_row[h] = rec_q[a_r][h][a_j];
      b_row[h] = rec_q[b_r][h][b_j];
    end
  end
endmodule
