// fp32_mul: combinational IEEE-754 single-precision multiplier.
//
// Used by the reaction scheduler to build propensities (product of reactant
// concentrations and the reaction coefficient) and to rescale schedules.
// The reference platform uses a vendor floating-point core; this is a
// compact replacement of this design's own: normal numbers only, a zero
// exponent is read as zero (no subnormals, no NaN/Inf handling), the
// result is truncated towards zero, overflow saturates to the largest
// finite value and underflow flushes to zero. Purely combinational, so a
// product is available in the same cycle as its operands.
module fp32_mul (
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic [31:0] y
);
  logic        sign;
  logic [47:0] prod;
  logic [9:0]  exp_sum;   // signed-ish range: 0 .. 2*254, biased twice
  logic [9:0]  exp_res;
  logic [22:0] frac;

  always_comb begin
    sign    = a[31] ^ b[31];
    prod    = {1'b1, a[22:0]} * {1'b1, b[22:0]};
    exp_sum = {2'b00, a[30:23]} + {2'b00, b[30:23]};
    if (prod[47]) begin
      frac    = prod[46:24];
      exp_res = exp_sum + 10'd1;
    end else begin
      frac    = prod[45:23];
      exp_res = exp_sum;
    end
    if (a[30:23] == 8'd0 || b[30:23] == 8'd0) begin
      y = {sign, 31'd0};
    end else if (exp_res <= 10'd127) begin
      y = {sign, 31'd0};                       // underflow
    end else if (exp_res >= 10'd382) begin
      y = {sign, 8'hFE, 23'h7F_FFFF};          // overflow: largest finite
    end else begin
      y = {sign, 8'(exp_res - 10'd127), frac};
    end
  end
endmodule
