// tb_workload_rates: runs the evaluated workloads on one chemical engine
// and checks them against their closed-form behaviour and against the
// event rates expected at an 80 MHz clock with one molecule per event.
// Part 1, pacer drain (S -> P, k = 10/s, c_S = 500 at t = 0, no input):
//   with a time base of 8e5 ticks per second (100x faster than real time
//   at 80 MHz) the departures must follow P(t) = 500 (1 - exp(-10 t))
//   within 3 molecules at t = 0.05, 0.1, 0.2 and 0.4 s.
// Part 2, one reaction at 200000 events per second, i.e. one event every
//   5 us (real time: 80e6 ticks
//   per second, one arrival every 400 cycles): pacer S -> P, k = 1e5/s.
//   The queue must settle near lambda/k = 2 and stay below 10, and the
//   departures must match the arrivals.
// Part 3, two reactions at 100000 events per second (one arrival every
//   800 cycles): rate controller S + E -> ES (k1 = 1), ES -> E + P
//   (k2 = 20), e0 = 25000. S must stay small (the scheduler keeps up with
//   every binding) and ES must follow the fluid model
//   lambda/k2 (1 - exp(-k2 t)) within 3 %; molecules are conserved.
// Part 4, live modification of the pacer under load (8e5 ticks per
//   second, 5000 arrivals per second, k0 = 10/s, queue settled at 500):
//   k0 is set to 20/s, and the departures in the next 20 ms must show the
//   step, lambda (1 + (1 - exp(-0.4)) / 0.4) * 0.02 = 182 within 8 %;
//   0.3 s later k0 goes back to 10/s together with c_S doubled, which
//   keeps the instantaneous rate, and the next 20 ms must again hold
//   lambda * 0.02 = 100 departures within 6 %.
// The event rates of parts 2 and 3 are those the reference platform
// reaches at 80 MHz (1.6 Gbps with one reaction, 800 Mbps with two, one
// molecule per kilobyte); the pass margins are this testbench's choice.
module tb_workload_rates;
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
  always #6.25 clk = ~clk;   // 80 MHz

  initial begin
    #60_000_000; failures++;
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

  int added = 0, departed = 0;
  always @(posedge clk) begin
    if (out_fire[0]) departed <= departed + int'(out_amt[0]);
    if (in_valid[0]) added <= added + int'(in_amt[0]);
  end

  task automatic arrivals(input int n, input int spacing);
    for (int i = 0; i < n; i++) begin
      repeat (spacing - 1) @(negedge clk);
      in_valid[0] = 1; @(negedge clk); in_valid[0] = 0;
    end
  endtask

  initial begin
    cfg = '0;
    for (int i = 0; i < N_IN; i++) begin in_addr[i] = 0; in_amt[i] = 0; end
    for (int i = 0; i < N_OUT; i++) begin out_addr[i] = 0; out_amt[i] = 0; end
    repeat (3) @(negedge clk); rst_n = 1;

    // ---- part 1: pacer drain
    wr(CFG_TICKRATE, 0, 0, r2f(8.0e5));
    wr(CFG_WR_ALPHA, 0, 8'h00, 32'(S));
    wr(CFG_WR_BETA,  0, 8'h00, 32'(P));
    wr(CFG_WR_K,     0, 0, r2f(10.0));
    wr(CFG_WR_C,     S, 0, 500);
    wr(CFG_RUN,      0, 0, 1);
    begin
      automatic real t_prev = 0.0;
      automatic real ts [4] = '{0.05, 0.1, 0.2, 0.4};
      foreach (ts[i]) begin
        int model;
        repeat (int'((ts[i] - t_prev) * 8.0e5)) @(negedge clk);
        t_prev = ts[i];
        model = int'(500.0 * (1.0 - $exp(-10.0 * ts[i])));
        chk(c(P) >= model - 3 && c(P) <= model + 3,
            $sformatf("drain t=%0.2f s: P=%0d model %0d", ts[i], c(P), model));
        chk(c(S) + c(P) == 500, "drain conservation");
      end
      $display("part 1: P(0.4 s) = %0d of 500", c(P));
    end

    // ---- part 2: one reaction, 200000 events/s in real time
    wr(CFG_RUN,      0, 0, 0);
    wr(CFG_WR_C,     S, 0, 0);
    wr(CFG_WR_C,     P, 0, 0);
    wr(CFG_TICKRATE, 0, 0, r2f(80.0e6));
    wr(CFG_WR_K,     0, 0, r2f(1.0e5));
    in_addr[0] = S; in_amt[0] = 1;
    out_addr[0] = P; out_amt[0] = 1; out_en[0] = 1;
    wr(CFG_RUN,      0, 0, 1);
    begin
      automatic int a0, d0, smax = 0;
      fork
        arrivals(3000, 400);
        begin
          repeat (200_000) @(negedge clk);     // settle
          a0 = added; d0 = departed;
          repeat (800_000) @(negedge clk) if (c(S) > smax) smax = c(S);
        end
      join
      chk(smax < 10, $sformatf("1-reaction queue peaked at %0d", smax));
      chk((departed - d0) >= (added - a0) - 10, $sformatf("1-reaction: %0d arrivals, %0d departures",
          added - a0, departed - d0));
      chk(added == departed + c(S) + c(P), "1-reaction conservation");
      $display("part 2: %0d arrivals, %0d departures in 10 ms, queue max %0d",
               added - a0, departed - d0, smax);
    end

    // ---- part 3: two reactions, 100000 events/s in real time
    wr(CFG_RUN,      0, 0, 0);
    wr(CFG_WR_K,     0, 0, 0);
    wr(CFG_WR_C,     S, 0, 0);
    wr(CFG_WR_C,     P, 0, 0);
    wr(CFG_WR_C,     E, 0, 25000);
    wr(CFG_WR_ALPHA, 0, 8'h10, 32'(E));      // r0: S + E -> ES
    wr(CFG_WR_BETA,  0, 8'h00, 32'(ES));
    wr(CFG_WR_ALPHA, 1, 8'h00, 32'(ES));     // r1: ES -> E + P
    wr(CFG_WR_BETA,  1, 8'h00, 32'(E));
    wr(CFG_WR_BETA,  1, 8'h10, 32'(P));
    wr(CFG_WR_K,     1, 0, r2f(20.0));
    wr(CFG_WR_K,     0, 0, r2f(1.0));
    begin
      automatic int a0, d0, smax = 0, viol = 0;
      a0 = added; d0 = departed;
      wr(CFG_RUN, 0, 0, 1);
      fork
        arrivals(1000, 800);
        repeat (800_000) @(negedge clk) begin
          if (c(S) > smax) smax = c(S);
          if (c(E) + c(ES) != 25000) viol++;
        end
      join
      begin
        automatic real lam = 1.0e5, t = 0.01, model;
        model = lam / 20.0 * (1.0 - $exp(-20.0 * t));
        chk($itor(c(ES)) > 0.97 * model && $itor(c(ES)) < 1.03 * model,
            $sformatf("ES = %0d, fluid model %0.1f", c(ES), model));
        $display("part 3: ES = %0d (model %0.1f), S max %0d, %0d departures",
                 c(ES), model, smax, departed - d0);
      end
      chk(smax < 10, $sformatf("2-reaction queue peaked at %0d", smax));
      chk(viol == 0, "E + ES conservation");
      chk((added - a0) == (departed - d0) + c(S) + c(ES) + c(P), "2-reaction conservation");
    end

    // ---- part 4: live modification of the pacer under load
    wr(CFG_RUN,      0, 0, 0);
    wr(CFG_WR_K,     1, 0, 0);
    wr(CFG_WR_K,     0, 0, 0);
    wr(CFG_WR_ALPHA, 0, 8'h10, 0);           // back to r0: S -> P
    wr(CFG_WR_BETA,  0, 8'h00, 32'(P));
    wr(CFG_WR_C,     S, 0, 500);
    wr(CFG_WR_C,     P, 0, 0);
    wr(CFG_WR_C,     ES, 0, 0);
    wr(CFG_TICKRATE, 0, 0, r2f(8.0e5));
    wr(CFG_WR_K,     0, 0, r2f(10.0));
    wr(CFG_RUN,      0, 0, 1);
    begin
      automatic int d0, w_before, w_step, w_keep;
      fork
        arrivals(5000, 160);                 // 5000 per second for 1 s
        begin
          repeat (320_000) @(negedge clk);   // 0.4 s settle
          d0 = departed; repeat (16_000) @(negedge clk); w_before = departed - d0;
          wr(CFG_WR_K, 0, 0, r2f(20.0));
          d0 = departed; repeat (16_000) @(negedge clk); w_step = departed - d0;
          repeat (224_000) @(negedge clk);   // rest of 0.3 s
          wr(CFG_WR_K, 0, 0, r2f(10.0));
          wr(CFG_WR_C, S, 0, 32'(2 * c(S)));
          d0 = departed; repeat (16_000) @(negedge clk); w_keep = departed - d0;
        end
      join
      chk(w_before >= 94 && w_before <= 106, $sformatf("before the change: %0d departures in 20 ms", w_before));
      chk(w_step >= 168 && w_step <= 197, $sformatf("after k0 = 20: %0d departures in 20 ms", w_step));
      chk(w_keep >= 94 && w_keep <= 106, $sformatf("after the rate-preserving change: %0d", w_keep));
      $display("part 4: 20 ms windows: %0d before, %0d after k0 step, %0d after rate-preserving change",
               w_before, w_step, w_keep);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
