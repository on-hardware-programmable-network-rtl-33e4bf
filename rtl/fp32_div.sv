// fp32_div: sequential IEEE-754 single-precision divider, y = a / b.
//
// The reaction scheduler uses it for the reciprocal of a propensity
// (ticks-per-second / propensity = ticks until the reaction fires) and to
// rescale the remaining time of a reaction whose propensity changed. The
// mantissas are divided by restoring division, one quotient bit per clock:
// a pulse on `start` loads the operands, and `done` pulses 26 cycles later
// with `y` valid (and held until the next start). `busy` is high in
// between. As in fp32_mul, only normal numbers are handled, the quotient is
// truncated, overflow and division by zero saturate to the largest finite
// value and underflow flushes to zero. This is this design's own
// replacement for the vendor divider core of the reference platform.
module fp32_div (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic        busy,
  output logic        done,
  output logic [31:0] y
);
  localparam logic [31:0] FP_MAX = 32'h7F7F_FFFF;

  logic [24:0] rem_q;      // partial remainder
  logic [23:0] div_q;      // divisor mantissa
  logic [24:0] quo_q;      // quotient bits
  logic [4:0]  cnt_q;
  logic [9:0]  exp_q;      // ea - eb + 127, offset by +256 to stay positive
  logic        sign_q;
  logic        special_q;  // result already decided (zero or saturate)
  logic [24:0] rem_sub;
  logic        ge;
  logic [9:0]  exp_fin;
  logic [24:0] quo_fin;

  assign ge      = rem_q >= {1'b0, div_q};
  assign rem_sub = ge ? rem_q - {1'b0, div_q} : rem_q;
  assign quo_fin = {quo_q[23:0], ge};

  always_comb begin
    exp_fin = quo_fin[24] ? exp_q : exp_q - 10'd1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; done <= 1'b0; y <= '0;
      rem_q <= '0; div_q <= '0; quo_q <= '0; cnt_q <= '0;
      exp_q <= '0; sign_q <= 1'b0; special_q <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start) begin
        busy      <= 1'b1;
        sign_q    <= a[31] ^ b[31];
        rem_q     <= {1'b0, 1'b1, a[22:0]};
        div_q     <= {1'b1, b[22:0]};
        quo_q     <= '0;
        cnt_q     <= 5'd24;
        exp_q     <= 10'd256 + {2'b00, a[30:23]} - {2'b00, b[30:23]} + 10'd127;
        special_q <= 1'b0;
        if (a[30:23] == 8'd0) begin
          special_q <= 1'b1; y <= {a[31] ^ b[31], 31'd0};
        end else if (b[30:23] == 8'd0) begin
          special_q <= 1'b1; y <= {a[31] ^ b[31], FP_MAX[30:0]};
        end
      end else if (busy) begin
        rem_q <= {rem_sub[23:0], 1'b0};
        quo_q <= quo_fin;
        if (cnt_q == 5'd0) begin
          busy <= 1'b0;
          done <= 1'b1;
          if (!special_q) begin
            if (exp_fin <= 10'd256)      y <= {sign_q, 31'd0};
            else if (exp_fin >= 10'd511) y <= {sign_q, FP_MAX[30:0]};
            else if (quo_fin[24])        y <= {sign_q, 8'(exp_fin - 10'd256), quo_fin[23:1]};
            else                         y <= {sign_q, 8'(exp_fin - 10'd256), quo_fin[22:0]};
          end
        end else begin
          cnt_q <= cnt_q - 5'd1;
        end
      end
    end
  end
endmodule
