// tb_loma_scheduler: self-checking test of the reaction scheduler with
// stand-in execution logic (done 9 cycles rem_a start) and a stand-in
// propensity unit (returns the testbench's table value 5 cycles rem_a
// start). With tick_rate = 1000 ticks/s it checks:
//   * a fresh schedule: rem = tick_rate / a (a = 10/s -> 100 ticks);
//   * periodic firing of a lone reaction at 100 ticks plus the fixed
//     overhead of one execution and one re-evaluation pass;
//   * rescaling: when a reaction's propensity doubles, its remaining time
//     halves (within the cycles the pass itself takes);
//   * disabling when the propensity drops to 0;
//   * two reactions due together fire lowest index first, the other waits;
//   * nothing fires or counts while run is low.
module tb_loma_scheduler;
  import ca_pkg::*;
  import tb_fp_pkg::*;
  localparam int RW = $clog2(NR);
  logic clk = 0, rst_n = 0, run = 0, dirty = 0;
  logic [31:0] tick_rate;
  logic exe_start, exe_done = 0, p_start, p_done = 0;
  logic [RW-1:0] exe_r, p_r;
  logic [31:0] p_y = 0;
  logic busy, ev_fresh, ev_rescale, ev_disable, ev_wait;
  logic [NR-1:0] en;
  logic [31:0] rem [NR];
  real pa [NR];
  int checks = 0, failures = 0;
  int fire_cnt [NR];
  longint cyc = 0, last_fire [NR], period [NR];
  int n_rescale = 0, n_disable = 0, n_wait = 0, n_fresh = 0;
  int fire_order [$];

  loma_scheduler dut (.*);
  always #50 clk = ~clk;

  // stand-ins
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (exe_start) begin
      fire_cnt[exe_r]++; fire_order.push_back(int'(exe_r));
      period[exe_r] = cyc - last_fire[exe_r]; last_fire[exe_r] = cyc;
      fork begin repeat (9) @(posedge clk); exe_done <= 1; @(posedge clk); exe_done <= 0; end join_none
    end
    if (p_start) begin
      automatic int rr = int'(p_r);
      fork begin repeat (5) @(posedge clk); p_y <= r2f(pa[rr]); p_done <= 1; @(posedge clk); p_done <= 0; end join_none
    end
    if (ev_rescale) n_rescale++;
    if (ev_disable) n_disable++;
    if (ev_wait) n_wait++;
    if (ev_fresh) n_fresh++;
  end

  initial begin
    #500_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic kick();
    @(negedge clk); dirty = 1; @(negedge clk); dirty = 0;
    @(negedge clk); while (busy) @(negedge clk);
  endtask

  initial begin
    int f0;
    foreach (pa[i]) begin pa[i] = 0.0; fire_cnt[i] = 0; last_fire[i] = 0; period[i] = 0; end
    tick_rate = r2f(1000.0);
    repeat (3) @(negedge clk); rst_n = 1;
    // stopped: dirty does nothing
    pa[0] = 10.0;
    kick();
    chk(en == 0, "scheduled while stopped");
    run = 1;
    kick();
    chk(en == NR'(1), "only reaction 0 enabled");
    chk(rem[0] <= 100 && rem[0] >= 100 - int'(NR) * 12, $sformatf("fresh rem %0d", rem[0]));
    // periodic firing
    repeat (2000) @(negedge clk);
    chk(fire_cnt[0] >= 10, $sformatf("fired %0d times", fire_cnt[0]));
    // period = 100 ticks + exec (~10) + one pass over NR reactions
    chk(period[0] >= 100 && period[0] <= 100 + 12 + int'(NR) * 40, $sformatf("period %0d", period[0]));
    begin
      longint p1;
      p1 = period[0];
      @(posedge exe_start); @(negedge clk);
      chk(period[0] == p1, $sformatf("period not constant %0d %0d", p1, period[0]));
    end
    // rescale reaction 1: 4/s -> rem 250, then double to 8/s
    pa[1] = 4.0;
    kick();
    chk(en[1] && rem[1] > 150 && rem[1] <= 250, $sformatf("r1 fresh rem %0d", rem[1]));
    begin
      int rem_b, rem_a, r0;
      r0 = n_rescale;
      repeat (20) @(negedge clk);
      while (busy) @(negedge clk);
      rem_b = int'(rem[1]);
      pa[1] = 8.0;
      kick();
      rem_a = int'(rem[1]);
      chk(n_rescale > r0, "no rescale event");
      chk(rem_a >= rem_b / 2 - int'(NR) * 40 && rem_a <= rem_b / 2 + 2, $sformatf("rescale %0d -> %0d", rem_b, rem_a));
    end
    // disable reaction 1
    begin
      int d0;
      d0 = n_disable;
      pa[1] = 0.0;
      kick();
      chk(!en[1] && n_disable > d0, "reaction 1 not disabled");
    end
    // two reactions due together: same propensity, same fresh time
    pa[0] = 0.0; kick();
    while (busy) @(negedge clk);
    fire_order.delete();
    pa[2] = 5.0; pa[3] = 5.0;
    run = 0; kick(); run = 1;
    @(negedge clk); dirty = 1; @(negedge clk); dirty = 0;
    repeat (600) @(negedge clk);
    chk(fire_order.size() >= 2 && fire_order[0] == 2 && fire_order[1] == 3,
        $sformatf("order %p", fire_order));
    chk(n_wait > 0, "no waiting due reaction seen");
    // stop: nothing fires
    run = 0;
    repeat (20) @(negedge clk);
    f0 = fire_cnt[2] + fire_cnt[3];
    repeat (2000) @(negedge clk);
    chk(fire_cnt[2] + fire_cnt[3] == f0, "fired while stopped");
    chk(n_fresh > 0, "no fresh schedule");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
