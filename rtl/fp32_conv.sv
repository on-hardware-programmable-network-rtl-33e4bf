// fp32_conv: conversions between unsigned integers and IEEE-754 singles.
//
// u_in -> f_out turns a 32-bit unsigned value (a concentration or a tick
// count) into a float, truncating bits below the 24-bit mantissa.
// f_in -> u_out turns a float into a 32-bit unsigned value, truncating the
// fraction; negative values and values below 1 give 0, values of 2^32 or
// more saturate to 32'hFFFF_FFFF. Both paths are combinational and
// independent. The conversion rules are this design's own choice.
// The sign bit of f_out is always 0, since the input is unsigned.
module fp32_conv (
  input  logic [31:0] u_in,
  output logic [31:0] f_out,
  input  logic [31:0] f_in,
  output logic [31:0] u_out
);
  logic [4:0]  msb;
  logic [31:0] norm;
  logic [7:0]  e;
  logic [55:0] shifted;

  // unsigned -> float
  always_comb begin
    msb = 5'd0;
    for (int i = 0; i < 32; i++) begin
      if (u_in[i]) msb = 5'(i);
    end
    norm = u_in << (5'd31 - msb);             // leading one at bit 31
    if (u_in == 32'd0) f_out = 32'd0;
    else               f_out = {1'b0, 8'(8'd127 + 8'(msb)), norm[30:8]};
  end

  // float -> unsigned
  always_comb begin
    e       = f_in[30:23];
    shifted = '0;
    if (f_in[31] || e < 8'd127) begin
      u_out = 32'd0;
    end else if (e >= 8'd159) begin
      u_out = 32'hFFFF_FFFF;
    end else begin
      // value = 1.frac * 2^(e-127), 0 <= e-127 <= 31
      shifted = {32'd0, 1'b1, f_in[22:0]} << (e - 8'd127);
      u_out   = shifted[54:23];
    end
  end
endmodule
