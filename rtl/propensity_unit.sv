// propensity_unit: computes the propensity a_r = k_r * prod_s c_s^alpha_rs
// of one reaction (law of mass action).
//
// On start the accumulator is loaded with k_r (IEEE-754). The unit then
// walks the order positions j = 0 .. NALPHA-1 of reaction r in alpha-mem.
// For each position it takes the row of NPSI slot records, and for every
// nonzero record (lowest slot first) reads that species' concentration
// from c-mem, converts it to float and multiplies it into the accumulator
// with a single multiplier, one record per cycle. Since a species of order
// n fills n positions, its concentration is multiplied in n times.
// Timing: done pulses NALPHA + (filled records) + 1 cycles after start,
// with y valid (held until the next start): one cycle per order position
// and one per filled record. A zero coefficient ends the computation at
// once (done 1 cycle after start, y = 0); an empty reactant gives y = 0.
// The selection of concentrations through the slot records follows the
// reference design's multiplexer chain; a single multiplier in the
// sequential form is one of the two options the reference describes.
// Skipping empty records and zero coefficients is this design's choice. The reserved species 0
// reads 1, the multiplicative identity.
module propensity_unit
  import ca_pkg::*;
(
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       start,
  input  logic [$clog2(NR)-1:0]      r,
  output logic                       busy,
  output logic                       done,
  output logic [31:0]                y,
  // coefficient read
  output logic [$clog2(NR)-1:0]      k_r,
  input  logic [KW-1:0]              k_val,
  // alpha-mem row read
  output logic [$clog2(NR)-1:0]      row_r,
  output logic [$clog2(NALPHA)-1:0]  row_j,
  input  logic [SAW-1:0]             row [NPSI],
  // c-mem read
  output logic [SAW-1:0]             c_addr,
  input  logic [CW-1:0]              c_val
);
  typedef enum logic [1:0] {P_IDLE, P_ROW, P_MUL} pstate_e;

  pstate_e                   st_q;
  logic [$clog2(NR)-1:0]     r_q;
  logic [$clog2(NALPHA)-1:0] j_q;
  logic [NPSI-1:0]           mask_q;
  logic [31:0]               acc_q;
  logic [$clog2(NPSI)-1:0]   h_sel;
  logic [NPSI-1:0]           row_nz;
  logic [31:0]               c_f, prod;
  logic [31:0]               unused_u;

  assign k_r   = (st_q == P_IDLE) ? r : r_q;
  assign row_r = r_q;
  assign row_j = j_q;

  always_comb begin
    h_sel = '0;
    for (int h = NPSI - 1; h >= 0; h--) begin
      if (mask_q[h]) h_sel = $clog2(NPSI)'(h);
    end
    for (int h = 0; h < NPSI; h++) row_nz[h] = (row[h] != '0);
  end

  assign c_addr = row[h_sel];

  fp32_conv u_conv (.u_in(32'(c_val)), .f_out(c_f), .f_in(32'd0), .u_out(unused_u));
  fp32_mul  u_mul  (.a(acc_q), .b(c_f), .y(prod));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q <= P_IDLE; r_q <= '0; j_q <= '0; mask_q <= '0; acc_q <= '0;
      busy <= 1'b0; done <= 1'b0; y <= '0;
    end else begin
      done <= 1'b0;
      unique case (st_q)
        P_IDLE: if (start) begin
          r_q <= r;
          j_q <= '0;
          if (k_val[30:23] == 8'd0) begin
            // zero coefficient: the reaction is off
            y    <= '0;
            done <= 1'b1;
          end else begin
            acc_q <= k_val;
            busy  <= 1'b1;
            st_q  <= P_ROW;
          end
        end
        P_ROW: begin
          if (row_nz != '0) begin
            mask_q <= row_nz;
            st_q   <= P_MUL;
          end else if (j_q == $clog2(NALPHA)'(NALPHA - 1)) begin
            y    <= acc_q;
            done <= 1'b1;
            busy <= 1'b0;
            st_q <= P_IDLE;
          end else begin
            j_q <= j_q + 1'b1;
          end
        end
        P_MUL: begin
          acc_q         <= prod;
          mask_q[h_sel] <= 1'b0;
          if ((mask_q & ~(NPSI'(1) << h_sel)) == '0) begin
            if (j_q == $clog2(NALPHA)'(NALPHA - 1)) begin
              y    <= prod;
              done <= 1'b1;
              busy <= 1'b0;
              st_q <= P_IDLE;
            end else begin
              j_q  <= j_q + 1'b1;
              st_q <= P_ROW;
            end
          end
        end
        default: st_q <= P_IDLE;
      endcase
    end
  end
endmodule
