// ac_module: one chemical engine (artificial chemistry container).
//
// It holds the structural description of one chemical algorithm in
// runtime-writable memories -- c-mem (species concentrations), alpha-mem
// and beta-mem (stoichiometric records of reactants and products) and
// k-mem (reaction coefficients) -- and the logic that runs it: the
// reaction execution logic, the propensity unit and the reaction
// scheduler. Level-2 programming arrives as cfg_req_t writes (cfg): any
// memory may be rewritten while the engine runs, and the scheduler then
// re-evaluates all propensities, so a chemical algorithm can be replaced
// or tuned without stopping the service. CFG_TICKRATE sets the scheduler
// time base and CFG_RUN starts or stops time.
// External events come from the manager already mapped to species
// (in_*: add molecules; out_*: remove molecules and report out_fire).
// mon_addr/mon_data is a combinational concentration read for monitoring.
// fire/fire_r pulse when a reaction starts executing.
// The split into memories, addressing logic and scheduler follows the
// reference block diagram; the configuration encoding is this design's.
module ac_module
  import ca_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  cfg_req_t          cfg,
  input  logic [N_IN-1:0]   in_valid,
  input  logic [SAW-1:0]    in_addr  [N_IN],
  input  logic [CW-1:0]     in_amt   [N_IN],
  input  logic [N_OUT-1:0]  out_en,
  input  logic [SAW-1:0]    out_addr [N_OUT],
  input  logic [CW-1:0]     out_amt  [N_OUT],
  output logic [N_OUT-1:0]  out_fire,
  input  logic [SAW-1:0]    mon_addr,
  output logic [CW-1:0]     mon_data,
  output logic              fire,
  output logic [$clog2(NR)-1:0] fire_r,
  output logic              running,
  output logic              sched_busy,
  output logic              ev_fresh,
  output logic              ev_rescale,
  output logic              ev_disable,
  output logic              ev_wait
);
  localparam int unsigned RW = $clog2(NR);
  localparam int unsigned HW = $clog2(NPSI);
  localparam int unsigned JW = $clog2(NALPHA);

  // configuration decode
  logic        wr_c, wr_k, wr_a, wr_b, cfg_dirty;
  logic [31:0] tick_rate_q;
  logic        run_q;

  assign wr_c = cfg.valid && cfg.op == CFG_WR_C;
  assign wr_k = cfg.valid && cfg.op == CFG_WR_K;
  assign wr_a = cfg.valid && cfg.op == CFG_WR_ALPHA;
  assign wr_b = cfg.valid && cfg.op == CFG_WR_BETA;
  assign cfg_dirty = wr_k || wr_a || wr_b;   // c writes flag via c-mem

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tick_rate_q <= FP_80M;
      run_q       <= 1'b0;
    end else if (cfg.valid) begin
      if (cfg.op == CFG_TICKRATE) tick_rate_q <= cfg.data;
      if (cfg.op == CFG_RUN)      run_q       <= cfg.data[0];
    end
  end
  assign running = run_q;

  // interconnect
  logic [NPSI-1:0] dec_en, inc_en;
  logic [SAW-1:0]  dec_addr [NPSI];
  logic [SAW-1:0]  inc_addr [NPSI];
  logic [SAW-1:0]  alpha_row_x [NPSI];
  logic [SAW-1:0]  alpha_row_p [NPSI];
  logic [SAW-1:0]  beta_row_x  [NPSI];
  logic [SAW-1:0]  beta_row_unused [NPSI];
  logic [RW-1:0]   x_row_r, p_row_r, p_k_r;
  logic [JW-1:0]   x_row_j, p_row_j;
  logic [SAW-1:0]  p_c_addr;
  logic [CW-1:0]   p_c_val;
  logic [KW-1:0]   p_k_val;
  logic            ext_changed;
  logic            exe_start, exe_done, x_busy;
  logic [RW-1:0]   exe_r;
  logic            p_start, p_done, p_busy;
  logic [RW-1:0]   p_r;
  logic [31:0]     p_y;
  logic [NR-1:0]   sch_en;
  logic [31:0]     sch_rem [NR];

  conc_mem u_cmem (
    .clk, .rst_n,
    .wr_en(wr_c), .wr_addr(cfg.idx0), .wr_data(cfg.data[CW-1:0]),
    .dec_en, .dec_addr, .inc_en, .inc_addr,
    .in_valid, .in_addr, .in_amt,
    .out_en, .out_addr, .out_amt, .out_fire,
    .rd_addr(p_c_addr), .rd_data(p_c_val),
    .mon_addr, .mon_data,
    .ext_changed
  );

  stoich_mem u_alpha (
    .clk, .rst_n,
    .wr_en(wr_a), .wr_r(cfg.idx0[RW-1:0]), .wr_h(cfg.idx1[HW+3:4]), .wr_j(cfg.idx1[JW-1:0]),
    .wr_data(cfg.data[SAW-1:0]),
    .a_r(x_row_r), .a_j(x_row_j), .a_row(alpha_row_x),
    .b_r(p_row_r), .b_j(p_row_j), .b_row(alpha_row_p)
  );

  stoich_mem u_beta (
    .clk, .rst_n,
    .wr_en(wr_b), .wr_r(cfg.idx0[RW-1:0]), .wr_h(cfg.idx1[HW+3:4]), .wr_j(cfg.idx1[JW-1:0]),
    .wr_data(cfg.data[SAW-1:0]),
    .a_r(x_row_r), .a_j(x_row_j), .a_row(beta_row_x),
    .b_r(x_row_r), .b_j(x_row_j), .b_row(beta_row_unused)
  );

  k_mem u_kmem (
    .clk, .rst_n,
    .wr_en(wr_k), .wr_r(cfg.idx0[RW-1:0]), .wr_data(cfg.data),
    .rd_r(p_k_r), .rd_data(p_k_val)
  );

  react_exec u_exec (
    .clk, .rst_n, .start(exe_start), .r(exe_r), .busy(x_busy), .done(exe_done),
    .row_r(x_row_r), .row_j(x_row_j), .alpha_row(alpha_row_x), .beta_row(beta_row_x),
    .dec_en, .dec_addr, .inc_en, .inc_addr
  );

  propensity_unit u_prop (
    .clk, .rst_n, .start(p_start), .r(p_r), .busy(p_busy), .done(p_done), .y(p_y),
    .k_r(p_k_r), .k_val(p_k_val),
    .row_r(p_row_r), .row_j(p_row_j), .row(alpha_row_p),
    .c_addr(p_c_addr), .c_val(p_c_val)
  );

  loma_scheduler u_sched (
    .clk, .rst_n, .run(run_q), .tick_rate(tick_rate_q),
    .dirty(ext_changed || cfg_dirty),
    .exe_start, .exe_r, .exe_done,
    .p_start, .p_r, .p_done, .p_y,
    .busy(sched_busy), .en(sch_en), .rem(sch_rem),
    .ev_fresh, .ev_rescale, .ev_disable, .ev_wait
  );

  assign fire   = exe_start;
  assign fire_r = exe_r;

  // the execution logic and the propensity unit never run together
  assert property (@(posedge clk) disable iff (!rst_n) !(x_busy && p_busy));
endmodule
