// tb_fp32_div: self-checking test of the sequential single-precision
// divider. Quotients are compared with the simulator's own division (to
// within one unit in the last place, the design truncates), the latency
// from start to done is checked to be 26 cycles, and division by zero must
// saturate.
module tb_fp32_div;
  import tb_fp_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, busy, done;
  logic [31:0] a = 0, b = 0, y;
  int checks = 0, failures = 0;

  fp32_div dut (.clk, .rst_n, .start, .a, .b, .busy, .done, .y);
  always #5 clk = ~clk;

  initial begin
    #2_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic divide(input logic [31:0] x, input logic [31:0] z, output int lat);
    @(negedge clk); a = x; b = z; start = 1;
    @(negedge clk); start = 0; lat = 1;
    while (!done) begin @(negedge clk); lat++; end
  endtask

  task automatic check(input real x, input real z);
    logic [31:0] e; int lat, diff;
    e = r2f(f2r(r2f(x)) / f2r(r2f(z)));
    divide(r2f(x), r2f(z), lat);
    diff = int'(e) - int'(y);
    checks++;
    if (diff < -1 || diff > 1) begin
      failures++; $display("FAIL %f / %f: got %h expected %h", x, z, y, e);
    end
    checks++;
    if (lat != 26) begin failures++; $display("FAIL latency %0d", lat); end
  endtask

  initial begin
    repeat (3) @(negedge clk); rst_n = 1;
    check(1.0, 1.0);
    check(80.0e6, 5000.0);
    check(1.0, 3.0);
    check(7.0, 2.0);
    check(100.0, 0.125);
    check(3.0, 7.0);
    for (int i = 0; i < 300; i++)
      check(real'($urandom_range(1, 1 << 24)), real'($urandom_range(1, 65535)) * 0.01);
    begin
      int lat;
      divide(32'h3F80_0000, 32'h0, lat); checks++;
      if (y !== 32'h7F7F_FFFF) begin failures++; $display("FAIL div0 %h", y); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
