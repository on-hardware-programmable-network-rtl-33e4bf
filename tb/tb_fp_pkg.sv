// tb_fp_pkg: reference conversions between real (double) values and
// IEEE-754 single-precision bit patterns, for the testbenches. r2f
// truncates the mantissa towards zero like the design's float units and
// flushes values outside the normal range to zero or to the largest
// finite value; f2r is exact.
package tb_fp_pkg;
  function automatic logic [31:0] r2f(input real r);
    logic [63:0] d;
    int e;
    d = $realtobits(r);
    if (d[62:52] == 11'd0) return {d[63], 31'd0};
    e = int'(d[62:52]) - 1023 + 127;
    if (e <= 0)   return {d[63], 31'd0};
    if (e >= 255) return {d[63], 31'h7F7F_FFFF};
    return {d[63], 8'(e), d[51:29]};
  endfunction

  function automatic real f2r(input logic [31:0] f);
    logic [63:0] d;
    if (f[30:23] == 8'd0) return 0.0;
    d = {f[31], 11'(int'(f[30:23]) - 127 + 1023), f[22:0], 29'd0};
    return $bitstoreal(d);
  endfunction
endpackage
