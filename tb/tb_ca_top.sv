// tb_ca_top: end-to-end test of the platform with two engines, at reduced
// serial timing (10 clock cycles per bit) and a time base of 1e6 ticks per
// second. The testbench plays the host: it programs the engines over the
// serial line only, drives packet-arrival events and counts transmission
// and drop events, and reads concentrations back over the serial line.
//  Engine 0 repeats the runtime-reprogramming experiment: the pacer
//  S -> P (k0 = 10/s) runs first; it is replaced while running by the
//  enzymatic rate controller (e0 = 25, k1 = 1, k2 = 20, cap 500/s) under
//  an arrival rate of 1000 molecules/s, so the output is capped; then k2
//  is raised to 60 (cap 1500/s) and the output must follow the arrivals;
//  finally c_S and k0-style coefficients are modified live.
//  Engine 1 runs the AQM network (S + E -> ES, ES -> E + P,
//  2 S -> S + D) under overload: transmissions stay below the cap and drop
//  events appear.
// Checked: conservation of molecules against the event counts in both
// engines, E + ES = e0, the rate cap and the pacing regime, monitor reads
// equal to the internal state, and that every mechanism occurred at least
// once (reaction firing, fresh schedule, rescale, disable, a due reaction
// waiting for the busy scheduler, input events, output batches, live
// reprogramming, monitor reads, periodic logging, second-order execution,
// drops).
module tb_ca_top;
  import ca_pkg::*;
  import tb_fp_pkg::*;
  localparam int CLK_HZ = 1_000_000, BAUD = 100_000, CPB = CLK_HZ / BAUD, NA = 2;
  localparam logic [7:0] S = 1, P = 2, E = 3, ES = 4, D = 5;
  logic clk = 0, rst_n = 0, uart_rxd = 1, uart_txd;
  logic [N_IN-1:0]  ext_in [NA];
  logic [N_OUT-1:0] ext_out [NA];
  logic [NA-1:0] fire, running;
  int checks = 0, failures = 0;
  byte unsigned reply [$];

  ca_top #(.CLK_HZ(CLK_HZ), .BAUD(BAUD), .N_AC(NA)) dut (.*);
  always #50 clk = ~clk;

  // ---------------- mechanism counters
  int n_fire [NA], n_fresh, n_rescale, n_disable, n_wait, n_in [NA], n_tx [NA], n_drop;
  int n_live_cfg, n_mon, n_second, n_log;
  logic [N_OUT-1:0] out_prev [NA];
  always @(posedge clk) begin
    for (int a = 0; a < NA; a++) begin
      if (fire[a]) n_fire[a]++;
      out_prev[a] <= ext_out[a];
      if (rst_n && ext_out[a][0] != out_prev[a][0]) n_tx[a]++;
    end
    if (rst_n && ext_out[1][1] != out_prev[1][1]) n_drop++;
    n_fresh   += int'(dut.g_ac[0].ev_fresh)   + int'(dut.g_ac[1].ev_fresh);
    n_rescale += int'(dut.g_ac[0].ev_rescale) + int'(dut.g_ac[1].ev_rescale);
    n_disable += int'(dut.g_ac[0].ev_disable) + int'(dut.g_ac[1].ev_disable);
    n_wait    += int'(dut.g_ac[0].ev_wait)    + int'(dut.g_ac[1].ev_wait);
    if (fire[1] && dut.g_ac[1].fire_r == 2) n_second++;
    for (int a = 0; a < NA; a++)
      if (dut.cfg[a].valid && running[a] && dut.cfg[a].op inside {CFG_WR_C, CFG_WR_K, CFG_WR_ALPHA, CFG_WR_BETA})
        n_live_cfg++;
  end

  function automatic int c(input int a, input logic [7:0] s);
    return (a == 0) ? int'(dut.g_ac[0].u_ac.u_cmem.c_q[s]) : int'(dut.g_ac[1].u_ac.u_cmem.c_q[s]);
  endfunction

  // ---------------- host serial line
  initial begin
    forever begin
      logic [7:0] b;
      @(negedge uart_txd);
      repeat (CPB + CPB / 2) @(posedge clk);
      for (int i = 0; i < 8; i++) begin b[i] = uart_txd; repeat (CPB) @(posedge clk); end
      reply.push_back(b);
    end
  end

  task automatic put(input logic [7:0] b);
    logic [9:0] f;
    f = {1'b1, b, 1'b0};
    for (int i = 0; i < 10; i++) begin uart_rxd = f[i]; repeat (CPB) @(negedge clk); end
  endtask
  task automatic put32(input logic [31:0] v);
    put(v[31:24]); put(v[23:16]); put(v[15:8]); put(v[7:0]);
  endtask
  task automatic wr_c(input int a, input logic [7:0] s, input logic [15:0] v);
    put({4'h1, 4'(a)}); put(s); put(v[15:8]); put(v[7:0]);
  endtask
  task automatic wr_k(input int a, input logic [7:0] r, input real k);
    put({4'h2, 4'(a)}); put(r); put32(r2f(k));
  endtask
  task automatic wr_alpha(input int a, input logic [7:0] r, input int slot, input int ord, input logic [7:0] s);
    put({4'h3, 4'(a)}); put(r); put({4'(slot), 4'(ord)}); put(s);
  endtask
  task automatic wr_beta(input int a, input logic [7:0] r, input int slot, input int ord, input logic [7:0] s);
    put({4'h4, 4'(a)}); put(r); put({4'(slot), 4'(ord)}); put(s);
  endtask
  task automatic map(input int a, input bit out, input int port, input logic [7:0] s, input logic [15:0] n);
    put({out ? 4'h7 : 4'h6, 4'(a)}); put(8'(port)); put(s); put(n[15:8]); put(n[7:0]);
  endtask
  task automatic read_c(input int a, input logic [7:0] s, output int v);
    reply.delete();
    put({4'h5, 4'(a)}); put(s);
    repeat (25 * CPB) @(negedge clk);
    v = (reply.size() == 2) ? int'({reply[0], reply[1]}) : -1;
    n_mon++;
  endtask

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // ---------------- traffic: arrival events (1 mol each) at a given period
  int arr_period [NA];
  initial begin
    forever begin
      @(negedge clk);
      for (int a = 0; a < NA; a++) begin
        if (arr_period[a] > 0 && ($urandom_range(1, arr_period[a]) == 1)) begin
          ext_in[a][0] = ~ext_in[a][0];
          n_in[a]++;
        end
      end
    end
  end

  initial begin
    #40_000_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int v, t0, tx0;
    for (int a = 0; a < NA; a++) begin
      ext_in[a] = '0; n_fire[a] = 0; n_in[a] = 0; n_tx[a] = 0; arr_period[a] = 0;
    end
    {n_fresh, n_rescale, n_disable, n_wait, n_drop, n_live_cfg, n_mon, n_second} = '0;
    repeat (3) @(negedge clk); rst_n = 1;
    repeat (5) @(negedge clk);

    // ===== engine 0: pacer (Rnet2)
    put(8'h80); put32(r2f(1.0e6));
    wr_alpha(0, 0, 0, 0, S); wr_beta(0, 0, 0, 0, P); wr_k(0, 0, 10.0);
    map(0, 0, 0, S, 1); map(0, 1, 0, P, 1);
    // ===== engine 1: AQM (Rnet3)
    put(8'h81); put32(r2f(1.0e6));
    wr_c(1, E, 25);
    wr_alpha(1, 0, 0, 0, S); wr_alpha(1, 0, 1, 0, E); wr_beta(1, 0, 0, 0, ES); wr_k(1, 0, 1.0);
    wr_alpha(1, 1, 0, 0, ES); wr_beta(1, 1, 0, 0, E); wr_beta(1, 1, 1, 0, P); wr_k(1, 1, 16.0);
    wr_alpha(1, 2, 0, 0, S); wr_alpha(1, 2, 0, 1, S); wr_beta(1, 2, 0, 0, S); wr_beta(1, 2, 1, 0, D);
    wr_k(1, 2, 0.001);
    map(1, 0, 0, S, 1); map(1, 1, 0, P, 1); map(1, 1, 1, D, 1);
    put(8'h90); put(8'h01); put(8'h91); put(8'h01);
    repeat (2 * CPB) @(negedge clk);
    chk(running == 2'b11, "engines not running");

    // pacer phase: 1000 mol/s arrivals for 0.5 s
    arr_period[0] = 1000; arr_period[1] = 500;    // engine 1 overloaded (2000/s vs cap 400/s)
    repeat (500_000) @(negedge clk);
    chk(c(0, S) + c(0, P) + n_tx[0] == n_in[0], "engine 0 conservation (pacer)");
    chk(c(0, S) > 40 && c(0, S) < 200, $sformatf("pacer backlog c_S=%0d (steady state ~100)", c(0, S)));

    // ===== live switch of engine 0 to the rate controller (Rnet1)
    // r0 is switched off (k = 0) while its records are rewritten
    wr_k(0, 0, 0.0);
    wr_c(0, E, 25);
    wr_alpha(0, 0, 1, 0, E); wr_beta(0, 0, 0, 0, ES);
    wr_alpha(0, 1, 0, 0, ES); wr_beta(0, 1, 0, 0, E); wr_beta(0, 1, 1, 0, P); wr_k(0, 1, 20.0);
    wr_k(0, 0, 1.0);
    repeat (300_000) @(negedge clk);
    t0 = n_tx[0];
    repeat (500_000) @(negedge clk);          // 0.5 s: cap 250 molecules
    chk(n_tx[0] - t0 <= 250 + 5 && n_tx[0] - t0 >= 180, $sformatf("capped output %0d in 0.5 s (cap 250)", n_tx[0] - t0));
    chk(c(0, E) + c(0, ES) == 25, "engine 0 E + ES");
    chk(c(0, S) + c(0, ES) + c(0, P) + n_tx[0] == n_in[0] + 0, "engine 0 conservation (controller)");

    // ===== raise k2 to 60: cap 1500/s above the 1000/s load -> pacing
    wr_k(0, 1, 60.0);
    repeat (1_500_000) @(negedge clk);         // let the backlog drain
    t0 = n_tx[0]; tx0 = n_in[0];
    repeat (500_000) @(negedge clk);
    chk((n_tx[0] - t0) > (n_in[0] - tx0) * 8 / 10 && (n_tx[0] - t0) < (n_in[0] - tx0) * 12 / 10,
        $sformatf("pacing: out %0d vs in %0d", n_tx[0] - t0, n_in[0] - tx0));

    // ===== live state modification: set c_S (as in the consistency experiment)
    arr_period[0] = 0;
    wr_c(0, S, 50);
    repeat (20_000) @(negedge clk);
    read_c(0, S, v);
    chk(v - c(0, S) <= 3 && v >= c(0, S), $sformatf("monitor S %0d vs %0d", v, c(0, S)));
    // drain: reactions become disabled when S runs out
    repeat (2_000_000) @(negedge clk);
    read_c(0, S, v);  chk(v == 0, $sformatf("engine 0 S drained: %0d", v));
    read_c(0, E, v);  chk(v >= 0 && v + c(0, ES) == 25, "monitor E");

    // ===== engine 1 checks
    arr_period[1] = 0;
    repeat (50_000) @(negedge clk);
    chk(c(1, E) + c(1, ES) == 25, "engine 1 E + ES");
    chk(c(1, S) + c(1, ES) + c(1, P) + c(1, D) + n_tx[1] + n_drop == n_in[1],
        $sformatf("engine 1 conservation S%0d ES%0d P%0d D%0d tx%0d drop%0d in%0d",
                  c(1, S), c(1, ES), c(1, P), c(1, D), n_tx[1], n_drop, n_in[1]));
    read_c(1, D, v); chk(v == c(1, D), "monitor D");
    // periodic logging of engine 1's D every 1 ms (1000 cycles here)
    reply.delete();
    put(8'hA1); put(D); put(8'h00); put(8'h01);
    repeat (3500) @(negedge clk);
    put(8'hA1); put(D); put(8'h00); put(8'h00);
    repeat (30 * CPB) @(negedge clk);
    n_log = reply.size() / 2;
    for (int i = 0; i + 1 < reply.size(); i += 2)
      chk(int'({reply[i], reply[i + 1]}) == c(1, D), $sformatf("log value %0d vs %0d",
          int'({reply[i], reply[i + 1]}), c(1, D)));

    // ===== mechanisms
    chk(n_fire[0] > 0 && n_fire[1] > 0, "reaction firing");
    chk(n_fresh > 0, "fresh schedule");
    chk(n_rescale > 0, "rescale");
    chk(n_disable > 0, "disable");
    chk(n_wait > 0, "due reaction waiting");
    chk(n_in[0] > 0 && n_in[1] > 0, "input events");
    chk(n_tx[0] > 0 && n_tx[1] > 0, "output batches");
    chk(n_live_cfg > 0, "live reprogramming");
    chk(n_mon > 0, "monitor reads");
    chk(n_second > 0, "second-order reaction");
    chk(n_drop > 0, "drops");
    chk(n_log >= 3, $sformatf("periodic logging: %0d frames", n_log));
    $display("mechanisms: fire %0d/%0d fresh %0d rescale %0d disable %0d wait %0d in %0d/%0d tx %0d/%0d live_cfg %0d mon %0d second %0d drop %0d log %0d",
             n_fire[0], n_fire[1], n_fresh, n_rescale, n_disable, n_wait, n_in[0], n_in[1],
             n_tx[0], n_tx[1], n_live_cfg, n_mon, n_second, n_drop, n_log);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
