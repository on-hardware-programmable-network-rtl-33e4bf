// react_exec: addressing logic that executes one reaction.
//
// On an exeReact pulse (start) for reaction r, a step-down counter walks
// the order positions NALPHA-1 .. 0. At each step the records of every
// reactant slot (alpha row) and product slot (beta row) are decoded: a
// nonzero address enables a one-molecule decrement (reactant) or increment
// (product) of that species in c-mem. All slots act in parallel, orders
// above one take successive steps, so 2 S3 + S2 -> ... is computed as
// (S3 + S2) + (S3). The whole execution takes NALPHA cycles; done pulses in
// the cycle after the last step, when c-mem already holds the result.
// dec_addr/inc_addr are the record contents passed straight to c-mem,
// whose per-species compare acts as the decoder; this module adds the
// step counter and the enables.
// This follows the hardware logic slices of the reference design; walking
// every order position (rather than only the filled ones) and updating
// reactants and products in the same steps are this design's choices.
module react_exec
  import ca_pkg::*;
(
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       start,
  input  logic [$clog2(NR)-1:0]      r,
  output logic                       busy,
  output logic                       done,
  // row read of alpha-mem and beta-mem
  output logic [$clog2(NR)-1:0]      row_r,
  output logic [$clog2(NALPHA)-1:0]  row_j,
  input  logic [SAW-1:0]             alpha_row [NPSI],
  input  logic [SAW-1:0]             beta_row  [NPSI],
  // c-mem update enables
  output logic [NPSI-1:0]            dec_en,
  output logic [SAW-1:0]             dec_addr [NPSI],
  output logic [NPSI-1:0]            inc_en,
  output logic [SAW-1:0]             inc_addr [NPSI]
);
  logic [$clog2(NR)-1:0]     r_q;
  logic [$clog2(NALPHA)-1:0] cnt_q;

  assign row_r = r_q;
  assign row_j = cnt_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; done <= 1'b0; r_q <= '0; cnt_q <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        busy  <= 1'b1;
        r_q   <= r;
        cnt_q <= $clog2(NALPHA)'(NALPHA - 1);
      end else if (busy) begin
        if (cnt_q == '0) begin
          busy <= 1'b0;
          done <= 1'b1;
        end else begin
          cnt_q <= cnt_q - 1'b1;
        end
      end
    end
  end

  always_comb begin
    for (int h = 0; h < NPSI; h++) begin
      dec_addr[h] = alpha_row[h];
      inc_addr[h] = beta_row[h];
      dec_en[h]   = busy && (alpha_row[h] != '0);
      inc_en[h]   = busy && (beta_row[h]  != '0);
    end
  end
endmodule
