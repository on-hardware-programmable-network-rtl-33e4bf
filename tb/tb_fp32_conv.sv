// tb_fp32_conv: self-checking test of the integer/float conversions.
// u_in -> f_out is compared with the simulator's own conversion for values
// that fit the 24-bit mantissa exactly, and checked by truncation for
// larger ones; f_in -> u_out is checked for exact integers, fractions,
// negative values and saturation.
module tb_fp32_conv;
  import tb_fp_pkg::*;
  logic [31:0] u_in, f_out, f_in, u_out;
  int checks = 0, failures = 0;

  fp32_conv dut (.u_in, .f_out, .f_in, .u_out);

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic chk(input logic [31:0] got, input logic [31:0] exp_v, input string what);
    checks++;
    if (got !== exp_v) begin failures++; $display("FAIL %s: got %h expected %h", what, got, exp_v); end
  endtask

  initial begin
    f_in = 0;
    u_in = 0; #1 chk(f_out, 32'h0, "u2f 0");
    u_in = 1; #1 chk(f_out, 32'h3F80_0000, "u2f 1");
    u_in = 500; #1 chk(f_out, r2f(500.0), "u2f 500");
    u_in = 65535; #1 chk(f_out, r2f(65535.0), "u2f 65535");
    u_in = 32'hFFFF_FFFF; #1 chk(f_out, 32'h4F7F_FFFF, "u2f max (truncated)");
    for (int i = 0; i < 1000; i++) begin
      u_in = $urandom_range(0, (1 << 24) - 1); #1
      chk(f_out, r2f(u_in), "u2f rnd");
    end
    f_in = r2f(16000.0); #1 chk(u_out, 16000, "f2u 16000");
    f_in = r2f(2.75); #1 chk(u_out, 2, "f2u 2.75");
    f_in = r2f(0.5); #1 chk(u_out, 0, "f2u 0.5");
    f_in = r2f(-5.0); #1 chk(u_out, 0, "f2u -5");
    f_in = r2f(1.0e12); #1 chk(u_out, 32'hFFFF_FFFF, "f2u sat");
    f_in = r2f(2147483648.0); #1 chk(u_out, 32'h8000_0000, "f2u 2^31");
    for (int i = 0; i < 1000; i++) begin
      logic [31:0] v;
      v = $urandom_range(0, (1 << 24) - 1);
      f_in = r2f(v); #1 chk(u_out, v, "f2u rnd");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
