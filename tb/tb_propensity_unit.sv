// tb_propensity_unit: self-checking test of the propensity computation.
// The testbench serves the k, alpha-row and concentration reads from its
// own random arrays and recomputes a_r = k_r * prod c^alpha independently:
// the same sequence of single-precision products, each truncated, is
// evaluated in double precision (exact for a product of two singles) and
// truncated with tb_fp_pkg::r2f. It also checks the latency of
// 2*NALPHA + (filled records) + 1 cycles, a zero result when a reactant
// is empty, and k_r alone for a reaction without reactants.
module tb_propensity_unit;
  import ca_pkg::*;
  import tb_fp_pkg::*;
  localparam int RW = $clog2(NR), JW = $clog2(NALPHA);
  logic clk = 0, rst_n = 0, start = 0, busy, done;
  logic [RW-1:0] r = 0, k_r, row_r;
  logic [31:0] y;
  logic [KW-1:0] k_val;
  logic [JW-1:0] row_j;
  logic [SAW-1:0] row [NPSI];
  logic [SAW-1:0] c_addr;
  logic [CW-1:0] c_val;
  logic [SAW-1:0] am [NR][NPSI][NALPHA];
  logic [31:0] km [NR];
  logic [CW-1:0] cm [NS+1];
  int checks = 0, failures = 0;

  propensity_unit dut (.*);
  always #50 clk = ~clk;

  assign k_val = km[k_r];
  assign c_val = cm[c_addr];
  always_comb for (int h = 0; h < NPSI; h++) row[h] = am[row_r][h][row_j];

  initial begin
    #100_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic run_one(input int rr);
    logic [31:0] e; int nrec, lat;
    e = km[rr]; nrec = 0;
    for (int j = 0; j < NALPHA; j++)
      for (int h = 0; h < NPSI; h++)
        if (am[rr][h][j] != 0) begin
          e = r2f(f2r(e) * real'(cm[am[rr][h][j]]));
          nrec++;
        end
    r = RW'(rr);
    @(negedge clk); start = 1;
    @(negedge clk); start = 0; lat = 1;
    while (!done) begin @(negedge clk); lat++; end
    checks += 2;
    if (y !== e) begin failures++; $display("FAIL r%0d y=%h expected %h", rr, y, e); end
    if (lat != ((km[rr][30:23] == 0) ? 1 : NALPHA + nrec + 1)) begin failures++; $display("FAIL latency %0d nrec %0d", lat, nrec); end
  endtask

  initial begin
    cm[0] = 1;
    for (int s = 1; s <= NS; s++) cm[s] = CW'($urandom_range(0, 300));
    repeat (3) @(negedge clk); rst_n = 1;
    for (int n = 0; n < 100; n++) begin
      foreach (am[i, h, j]) am[i][h][j] = ($urandom_range(0, 5) == 0) ? SAW'($urandom_range(1, 20)) : '0;
      foreach (km[i]) km[i] = r2f(real'($urandom_range(1, 1000)) / 8.0);
      for (int s = 1; s <= 20; s++) cm[s] = CW'($urandom_range(1, 300));
      if (n % 10 == 3) cm[$urandom_range(1, 20)] = 0;
      run_one($urandom_range(0, NR - 1));
    end
    // Rnet1 r1: S + E with k1 = 1, c_S = 30, c_E = 25 -> 750
    foreach (am[i, h, j]) am[i][h][j] = '0;
    am[0][0][0] = 1; am[0][1][0] = 2; km[0] = r2f(1.0); cm[1] = 30; cm[2] = 25;
    run_one(0);
    checks++; if (f2r(y) != 750.0) begin failures++; $display("FAIL Rnet1 r1 %f", f2r(y)); end
    // 2 S3 + S2 with S3 = 4, S2 = 3, k = 0.5 -> 24
    foreach (am[i, h, j]) am[i][h][j] = '0;
    am[1][0][0] = 3; am[1][0][1] = 3; am[1][1][0] = 2; km[1] = r2f(0.5); cm[3] = 4; cm[2] = 3;
    run_one(1);
    checks++; if (f2r(y) != 24.0) begin failures++; $display("FAIL 2S3+S2 %f", f2r(y)); end
    // no reactants: k alone
    km[2] = r2f(7.0);
    run_one(2);
    checks++; if (f2r(y) != 7.0) begin failures++; $display("FAIL empty %f", f2r(y)); end
    // zero coefficient: off, fast path
    km[0] = 0;
    run_one(0);
    checks++; if (y != 0) begin failures++; $display("FAIL k=0 %h", y); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
