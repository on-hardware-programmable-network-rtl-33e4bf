// tb_conc_mem: self-checking test of c-mem. A shadow model in the
// testbench applies the same programming writes, reactant decrements,
// product increments, input batches and output batches with clamping, and
// every concentration is compared after each random cycle. Also checks
// that the reserved address 0 always reads 1.
module tb_conc_mem;
  import ca_pkg::*;
  logic clk = 0, rst_n = 0;
  logic wr_en = 0; logic [SAW-1:0] wr_addr = 0; logic [CW-1:0] wr_data = 0;
  logic [NPSI-1:0] dec_en = 0, inc_en = 0;
  logic [SAW-1:0] dec_addr [NPSI], inc_addr [NPSI];
  logic [N_IN-1:0] in_valid = 0; logic [SAW-1:0] in_addr [N_IN]; logic [CW-1:0] in_amt [N_IN];
  logic [N_OUT-1:0] out_en = 0; logic [SAW-1:0] out_addr [N_OUT]; logic [CW-1:0] out_amt [N_OUT];
  logic [N_OUT-1:0] out_fire;
  logic [SAW-1:0] rd_addr = 0, mon_addr = 0; logic [CW-1:0] rd_data, mon_data;
  logic ext_changed;
  int checks = 0, failures = 0;
  int model [NS+1];
  int fires = 0;

  conc_mem dut (.*);
  always #50 clk = ~clk;

  initial begin
    #100_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // species used: 1..6 so that collisions are frequent
  function automatic logic [SAW-1:0] rs();
    return SAW'($urandom_range(0, 6));
  endfunction

  initial begin
    for (int s = 0; s <= NS; s++) model[s] = 0;
    for (int h = 0; h < NPSI; h++) begin dec_addr[h] = 0; inc_addr[h] = 0; end
    for (int i = 0; i < N_IN; i++) begin in_addr[i] = 0; in_amt[i] = 0; end
    for (int i = 0; i < N_OUT; i++) begin out_addr[i] = 0; out_amt[i] = 0; end
    repeat (3) @(negedge clk); rst_n = 1;
    for (int s = 0; s <= NS; s++) begin
      rd_addr = SAW'(s); #1; checks++;
      if (rd_data !== ((s == 0) ? 16'd1 : 16'd0)) begin failures++; $display("FAIL reset %0d", s); end
    end
    for (int cyc = 0; cyc < 3000; cyc++) begin
      int d [NS+1];
      @(negedge clk);
      for (int s = 0; s <= NS; s++) d[s] = 0;
      wr_en = ($urandom_range(0, 9) == 0); wr_addr = rs(); wr_data = CW'($urandom_range(0, 40));
      if (cyc % 500 == 7) wr_data = 16'hFFF0;
      for (int h = 0; h < NPSI; h++) begin
        dec_en[h] = $urandom_range(0, 3) == 0; dec_addr[h] = rs();
        inc_en[h] = $urandom_range(0, 3) == 0; inc_addr[h] = rs();
        if (dec_en[h]) d[dec_addr[h]] -= 1;
        if (inc_en[h]) d[inc_addr[h]] += 1;
      end
      for (int i = 0; i < N_IN; i++) begin
        in_valid[i] = $urandom_range(0, 4) == 0; in_addr[i] = rs(); in_amt[i] = CW'($urandom_range(1, 8));
        if (in_valid[i]) d[in_addr[i]] += int'(in_amt[i]);
      end
      for (int i = 0; i < N_OUT; i++) begin
        out_en[i] = $urandom_range(0, 2) == 0; out_addr[i] = rs(); out_amt[i] = CW'($urandom_range(0, 6));
      end
      #1;
      for (int i = 0; i < N_OUT; i++) begin
        bit f;
        f = out_en[i] && out_amt[i] != 0 && out_addr[i] != 0 && model[out_addr[i]] >= int'(out_amt[i]);
        checks++;
        if (out_fire[i] !== f) begin failures++; $display("FAIL fire %0d cyc %0d", i, cyc); end
        if (f) begin d[out_addr[i]] -= int'(out_amt[i]); fires++; end
      end
      checks++;
      if (ext_changed !== (wr_en || |in_valid || |out_fire)) begin failures++; $display("FAIL ext_changed"); end
      for (int s = 1; s <= NS; s++) begin
        int n;
        n = model[s] + d[s];
        if (n < 0) n = 0;
        if (n > 65535) n = 65535;
        if (wr_en && wr_addr == SAW'(s)) n = int'(wr_data);
        model[s] = n;
      end
      @(posedge clk); #1;
      for (int s = 0; s <= 7; s++) begin
        rd_addr = SAW'(s); mon_addr = SAW'(s); #1; checks++;
        if (rd_data !== ((s == 0) ? 16'd1 : CW'(model[s])) || mon_data !== rd_data) begin
          failures++; $display("FAIL cyc %0d species %0d got %0d expected %0d", cyc, s, rd_data, model[s]);
        end
      end
    end
    checks++;
    if (fires == 0) begin failures++; $display("FAIL no output batch fired"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
