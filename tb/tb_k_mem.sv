// tb_k_mem: self-checking test of the reaction-coefficient bank. Checks
// the zero reset state, then random writes against a shadow copy, and that
// a write only changes its own register.
module tb_k_mem;
  import ca_pkg::*;
  localparam int RW = $clog2(NR);
  logic clk = 0, rst_n = 0, wr_en = 0;
  logic [RW-1:0] wr_r = 0, rd_r = 0;
  logic [KW-1:0] wr_data = 0, rd_data;
  logic [KW-1:0] model [NR];
  int checks = 0, failures = 0;

  k_mem dut (.*);
  always #50 clk = ~clk;

  initial begin
    #100_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic compare();
    for (int r = 0; r < NR; r++) begin
      rd_r = RW'(r); #1; checks++;
      if (rd_data !== model[r]) begin failures++; $display("FAIL k[%0d]=%h expected %h", r, rd_data, model[r]); end
    end
  endtask

  initial begin
    foreach (model[r]) model[r] = '0;
    repeat (3) @(negedge clk); rst_n = 1;
    compare();
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      wr_en = 1; wr_r = RW'($urandom); wr_data = $urandom;
      model[wr_r] = wr_data;
      @(negedge clk); wr_en = 0;
      compare();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
