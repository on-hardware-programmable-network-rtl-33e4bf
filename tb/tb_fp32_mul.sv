// tb_fp32_mul: self-checking test of the single-precision multiplier.
// Products of values that are exact in single precision are compared with
// the product worked out by the simulator in double precision and
// converted back with $realtobits; random operands are compared
// within one unit in the last place (the design truncates).
module tb_fp32_mul;
  import tb_fp_pkg::*;
  logic [31:0] a, b, y;
  int checks = 0, failures = 0;

  fp32_mul dut (.a, .b, .y);

  task automatic check_exact(input real x, input real z);
    logic [31:0] exp_bits;
    a = r2f(x); b = r2f(z);
    exp_bits = r2f(f2r(a) * f2r(b));
    #1;
    checks++;
    if (y !== exp_bits) begin
      failures++;
      $display("FAIL %f * %f: got %h expected %h", x, z, y, exp_bits);
    end
  endtask

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    check_exact(1.0, 1.0);
    check_exact(2.0, 3.0);
    check_exact(10.0, 500.0);
    check_exact(1.5, 1.5);
    check_exact(0.5, 0.25);
    check_exact(-3.0, 7.0);
    check_exact(20.0, 25000.0);
    check_exact(65535.0, 65535.0);
    check_exact(0.0, 123.0);
    // random operands, within 1 ulp (truncation)
    for (int i = 0; i < 2000; i++) begin
      real x, z;
      logic [31:0] e;
      int diff;
      x = real'($urandom_range(1, 65535)) / real'($urandom_range(1, 1000));
      z = real'($urandom_range(1, 65535)) * 0.001;
      a = r2f(x); b = r2f(z);
      e = r2f(f2r(a) * f2r(b));
      #1;
      diff = int'(e) - int'(y);
      checks++;
      if (diff < -1 || diff > 1) begin
        failures++;
        $display("FAIL rnd %h * %h: got %h expected %h", a, b, y, e);
      end
    end
    // overflow saturates
    a = 32'h7F00_0000; b = 32'h7F00_0000; #1; checks++;
    if (y !== 32'h7F7F_FFFF) begin failures++; $display("FAIL overflow %h", y); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
