// tb_stoich_mem: self-checking test of a stoichiometric array. Random
// records are written and both row-read ports are compared with a shadow
// array over random (reaction, order) pairs; the reset state must be empty.
module tb_stoich_mem;
  import ca_pkg::*;
  localparam int RW = $clog2(NR), HW = $clog2(NPSI), JW = $clog2(NALPHA);
  logic clk = 0, rst_n = 0, wr_en = 0;
  logic [RW-1:0] wr_r = 0, a_r = 0, b_r = 0;
  logic [HW-1:0] wr_h = 0;
  logic [JW-1:0] wr_j = 0, a_j = 0, b_j = 0;
  logic [SAW-1:0] wr_data = 0;
  logic [SAW-1:0] a_row [NPSI], b_row [NPSI];
  logic [SAW-1:0] model [NR][NPSI][NALPHA];
  int checks = 0, failures = 0;

  stoich_mem dut (.*);
  always #50 clk = ~clk;

  initial begin
    #100_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic compare();
    for (int n = 0; n < 20; n++) begin
      a_r = RW'($urandom); a_j = JW'($urandom); b_r = RW'($urandom); b_j = JW'($urandom);
      #1;
      for (int h = 0; h < NPSI; h++) begin
        checks += 2;
        if (a_row[h] !== model[a_r][h][a_j]) begin failures++; $display("FAIL A r%0d h%0d j%0d", a_r, h, a_j); end
        if (b_row[h] !== model[b_r][h][b_j]) begin failures++; $display("FAIL B r%0d h%0d j%0d", b_r, h, b_j); end
      end
    end
  endtask

  initial begin
    foreach (model[r, h, j]) model[r][h][j] = '0;
    repeat (3) @(negedge clk); rst_n = 1;
    compare();
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      wr_en = 1; wr_r = RW'($urandom); wr_h = HW'($urandom); wr_j = JW'($urandom); wr_data = SAW'($urandom);
      model[wr_r][wr_h][wr_j] = wr_data;
      @(negedge clk); wr_en = 0;
      if (n % 50 == 0) compare();
    end
    compare();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
