// tb_ac_module: self-checking test of one chemical engine running the
// pacer (S -> P) and the enzymatic rate controller (S + E -> ES,
// ES -> E + P), with level-2 programming done while the engine runs.
// Time base: tick_rate = 1e5 ticks per second.
// Phase 1, pacer, k0 = 10/s, c_S = 50: every firing moves one molecule
//   from S to P; the gap between firings must be at least
//   tick_rate / (k0 * c_S) ticks and at most 120 cycles more (execution
//   and re-evaluation); all 50 molecules must end up in P.
// Phase 2, reprogrammed live to the rate controller with e0 = 25, k1 = 1,
//   k2 = 20 (cap e0*k2 = 500 molecules/s = one per 200 ticks): input
//   events add 4 molecules of S every 100 cycles (4000/s, far above the
//   cap); output port 0 removes P in batches of 2. Checked every cycle:
//   c_E + c_ES = e0 (mass conservation) and
//   c_S + c_ES + c_P + 2 * batches = molecules added. The output rate
//   must stay at or below the cap and reach at least 75% of it.
// Phase 3, k2 is halved live: the output rate must drop accordingly.
module tb_ac_module;
  import ca_pkg::*;
  import tb_fp_pkg::*;
  logic clk = 0, rst_n = 0;
  cfg_req_t cfg;
  logic [N_IN-1:0] in_valid = 0; logic [SAW-1:0] in_addr [N_IN]; logic [CW-1:0] in_amt [N_IN];
  logic [N_OUT-1:0] out_en = 0; logic [SAW-1:0] out_addr [N_OUT]; logic [CW-1:0] out_amt [N_OUT];
  logic [N_OUT-1:0] out_fire;
  logic [SAW-1:0] mon_addr = 0; logic [CW-1:0] mon_data;
  logic fire, running, sched_busy, ev_fresh, ev_rescale, ev_disable, ev_wait;
  logic [$clog2(NR)-1:0] fire_r;
  int checks = 0, failures = 0;
  localparam logic [7:0] S = 1, P = 2, E = 3, ES = 4;

  ac_module dut (.*);
  always #50 clk = ~clk;

  initial begin
    #2_000_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic wr(input cfg_op_e op, input logic [7:0] i0, input logic [7:0] i1, input logic [31:0] d);
    @(negedge clk); cfg = '{valid: 1'b1, op: op, idx0: i0, idx1: i1, data: d};
    @(negedge clk); cfg = '0;
  endtask

  function automatic int c(input logic [7:0] s);
    return int'(dut.u_cmem.c_q[s]);
  endfunction

  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  int added = 0, batches = 0, fires = 0;
  always @(posedge clk) begin
    if (out_fire[0]) batches <= batches + 1;
    if (fire) fires <= fires + 1;
    if (in_valid[0]) added <= added + int'(in_amt[0]);
  end

  initial begin
    cfg = '0;
    for (int i = 0; i < N_IN; i++) begin in_addr[i] = 0; in_amt[i] = 0; end
    for (int i = 0; i < N_OUT; i++) begin out_addr[i] = 0; out_amt[i] = 0; end
    repeat (3) @(negedge clk); rst_n = 1;
    // ---- phase 1: pacer
    wr(CFG_TICKRATE, 0, 0, r2f(1.0e5));
    wr(CFG_WR_ALPHA, 0, 8'h00, 32'(S));
    wr(CFG_WR_BETA,  0, 8'h00, 32'(P));
    wr(CFG_WR_K,     0, 0, r2f(10.0));
    wr(CFG_WR_C,     S, 0, 50);
    wr(CFG_RUN,      0, 0, 1);
    begin
      longint last = cyc;
      for (int n = 50; n >= 1; n--) begin
        longint gap; int lo;
        @(posedge fire); gap = cyc - last; last = cyc;
        lo = int'(1.0e5 / (10.0 * n));
        chk(c(S) == n, $sformatf("c_S %0d before firing %0d", c(S), n));
        if (n < 50) chk(gap >= lo && gap <= lo + 120, $sformatf("gap %0d for c_S=%0d (min %0d)", gap, n, lo));
      end
    end
    repeat (20) @(negedge clk);
    chk(c(S) == 0 && c(P) == 50, $sformatf("pacer end S=%0d P=%0d", c(S), c(P)));
    mon_addr = P; #1 chk(mon_data == 50, "monitor read");
    // ---- phase 2: live reprogramming to the rate controller
    wr(CFG_WR_C, P, 0, 0);
    wr(CFG_WR_C, E, 0, 25);
    wr(CFG_WR_ALPHA, 0, 8'h10, 32'(E));      // r1: S + E -> ES
    wr(CFG_WR_BETA,  0, 8'h00, 32'(ES));
    wr(CFG_WR_K,     0, 0, r2f(1.0));
    wr(CFG_WR_ALPHA, 1, 8'h00, 32'(ES));     // r2: ES -> E + P
    wr(CFG_WR_BETA,  1, 8'h00, 32'(E));
    wr(CFG_WR_BETA,  1, 8'h10, 32'(P));
    wr(CFG_WR_K,     1, 0, r2f(20.0));
    in_addr[0] = S; in_amt[0] = 4;
    out_addr[0] = P; out_amt[0] = 2; out_en[0] = 1;
    begin
      int b0, b1, viol = 0, cons = 0;
      fork
        begin
          for (int n = 0; n < 1200; n++) begin
            repeat (99) @(negedge clk);
            in_valid[0] = 1; @(negedge clk); in_valid[0] = 0;
          end
        end
        begin
          for (int n = 0; n < 120000; n++) begin
            @(negedge clk);
            if (c(E) + c(ES) != 25) viol++;
            if (c(S) + c(ES) + c(P) + 2 * batches != added) cons++;
          end
        end
        begin
          repeat (20000) @(negedge clk);   // settle
          b0 = batches;
          repeat (80000) @(negedge clk);   // 0.8 s at 1e5 ticks/s -> cap 400 molecules
          b1 = batches;
        end
      join
      chk(viol == 0, $sformatf("E+ES conservation violated %0d cycles", viol));
      chk(cons == 0, $sformatf("S+ES+P+out conservation violated %0d cycles", cons));
      chk(2 * (b1 - b0) <= 400 + 4, $sformatf("rate above cap: %0d molecules in 0.8 s", 2 * (b1 - b0)));
      chk(2 * (b1 - b0) >= 300, $sformatf("rate far below cap: %0d molecules", 2 * (b1 - b0)));
      $display("phase 2: %0d molecules out in 0.8 s (cap 400), c_S=%0d", 2 * (b1 - b0), c(S));
    end
    // ---- phase 3: halve k2 live
    wr(CFG_WR_K, 1, 0, r2f(10.0));
    begin
      int b0, b1;
      fork
        begin
          for (int n = 0; n < 1000; n++) begin
            repeat (99) @(negedge clk);
            in_valid[0] = 1; @(negedge clk); in_valid[0] = 0;
          end
        end
        begin
          repeat (20000) @(negedge clk);
          b0 = batches;
          repeat (80000) @(negedge clk);
          b1 = batches;
        end
      join
      chk(2 * (b1 - b0) <= 200 + 4 && 2 * (b1 - b0) >= 150, $sformatf("halved cap: %0d molecules", 2 * (b1 - b0)));
      $display("phase 3: %0d molecules out in 0.8 s (cap 200)", 2 * (b1 - b0));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
