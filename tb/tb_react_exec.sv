// tb_react_exec: self-checking test of the reaction execution logic.
// The testbench holds random alpha/beta arrays and serves the row reads.
// For each execution it accumulates the decrements and increments the
// unit requests per species and compares them with the stoichiometric
// coefficients counted directly from the arrays (a species appearing n
// times among a reaction's reactant records must lose n molecules). The
// latency from start to done must be NALPHA cycles, and no enable may be
// active outside an execution.
module tb_react_exec;
  import ca_pkg::*;
  localparam int RW = $clog2(NR), JW = $clog2(NALPHA);
  logic clk = 0, rst_n = 0, start = 0, busy, done;
  logic [RW-1:0] r = 0, row_r;
  logic [JW-1:0] row_j;
  logic [SAW-1:0] alpha_row [NPSI], beta_row [NPSI];
  logic [NPSI-1:0] dec_en, inc_en;
  logic [SAW-1:0] dec_addr [NPSI], inc_addr [NPSI];
  logic [SAW-1:0] am [NR][NPSI][NALPHA];
  logic [SAW-1:0] bm [NR][NPSI][NALPHA];
  int net [NS+1];
  int checks = 0, failures = 0;

  react_exec dut (.*);
  always #50 clk = ~clk;

  always_comb begin
    for (int h = 0; h < NPSI; h++) begin
      alpha_row[h] = am[row_r][h][row_j];
      beta_row[h]  = bm[row_r][h][row_j];
    end
  end

  always @(posedge clk) begin
    for (int h = 0; h < NPSI; h++) begin
      if (dec_en[h]) net[dec_addr[h]] -= 1;
      if (inc_en[h]) net[inc_addr[h]] += 1;
    end
  end

  initial begin
    #100_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    foreach (am[i, h, j]) begin
      // sparse records: most empty, few species to force repeats
      am[i][h][j] = ($urandom_range(0, 2) == 0) ? SAW'($urandom_range(1, 5)) : '0;
      bm[i][h][j] = ($urandom_range(0, 2) == 0) ? SAW'($urandom_range(1, 5)) : '0;
    end
    repeat (3) @(negedge clk); rst_n = 1;
    for (int n = 0; n < 200; n++) begin
      int expn [NS+1];
      int lat;
      for (int s = 0; s <= NS; s++) begin net[s] = 0; expn[s] = 0; end
      r = RW'($urandom);
      foreach (am[i, h, j]) if (i == r) begin
        if (am[i][h][j] != 0) expn[am[i][h][j]] -= 1;
        if (bm[i][h][j] != 0) expn[bm[i][h][j]] += 1;
      end
      checks++;
      if (dec_en != 0 || inc_en != 0) begin failures++; $display("FAIL enable while idle"); end
      @(negedge clk); start = 1;
      @(negedge clk); start = 0; lat = 1;
      while (!done) begin @(negedge clk); lat++; end
      checks++;
      if (lat != NALPHA + 1) begin failures++; $display("FAIL latency %0d", lat); end
      for (int s = 1; s <= 5; s++) begin
        checks++;
        if (net[s] != expn[s]) begin failures++; $display("FAIL r%0d species %0d net %0d expected %0d", r, s, net[s], expn[s]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
