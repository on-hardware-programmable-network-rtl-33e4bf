// loma_scheduler: the reaction scheduler (LoMA core) of a chemical engine.
//
// Every reaction r has a next-reaction time, kept as a down-counter rem[r]
// of clock ticks, an enable en[r] (propensity nonzero) and the propensity
// a[r] the counter was computed with. Enabled counters count down every
// cycle while `run` is set; a reaction whose counter reached 0 is due.
// The control sequence, one reaction at a time:
//   1. IDLE: if a reaction is due (lowest index first), pulse exe_start to
//      the execution logic and wait for exe_done. The fired reaction loses
//      its old schedule.
//   2. After a firing, or when `dirty` reports that events or programming
//      changed the state, recompute the propensity of every reaction with
//      the propensity unit, r = 0 .. NR-1.
//   3. For each reaction: a zero propensity disables it; an unchanged one
//      keeps its schedule; a reaction without a schedule gets
//      rem = tick_rate / a_new (the reciprocal of the propensity in ticks);
//      a reaction whose propensity changed is rescaled,
//      rem = rem * a_old / a_new, so that the progress it made is kept.
// tick_rate is the number of clock ticks per second (IEEE-754), so k in
// 1/s gives rates in molecules per second. Reactions that become due while
// the core is busy wait until it is idle again; the ticks a reaction spends
// overdue and then waiting for its new schedule are counted (lag) and
// taken off that schedule, so firing times stay anchored to the times the
// reactions were due and average rates are kept.
// Timing: a firing takes NALPHA cycles for the update, then per reaction
// the propensity (NALPHA + filled records + 1 cycles, 1 cycle for k = 0)
// and, where the schedule changes, one 26-cycle division.
// The recompute-and-rescale scheme follows the reference description
// (reciprocal of the new propensity, rescaling of dependent reactions).
// Deterministic reaction times (no random draw), re-evaluating every
// reaction rather than tracking dependencies, the lag compensation and the
// tick counter format are this design's own choices.
module loma_scheduler
  import ca_pkg::*;
(
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   run,
  input  logic [31:0]            tick_rate,
  input  logic                   dirty,
  // reaction execution logic
  output logic                   exe_start,
  output logic [$clog2(NR)-1:0]  exe_r,
  input  logic                   exe_done,
  // propensity unit
  output logic                   p_start,
  output logic [$clog2(NR)-1:0]  p_r,
  input  logic                   p_done,
  input  logic [31:0]            p_y,
  // status
  output logic                   busy,
  output logic [NR-1:0]          en,
  output logic [31:0]            rem [NR],
  output logic                   ev_fresh,    // a schedule computed from scratch
  output logic                   ev_rescale,  // a schedule rescaled
  output logic                   ev_disable,  // a reaction disabled (propensity 0)
  output logic                   ev_wait      // a due reaction waited for the busy core
);
  localparam int unsigned RW = $clog2(NR);

  typedef enum logic [2:0] {S_IDLE, S_EXEC, S_PROP, S_PWAIT, S_DWAIT} sstate_e;

  sstate_e       st_q;
  logic [RW-1:0] i_q;
  logic [31:0]   a_q [NR];
  logic          dirty_q;
  logic [31:0]   a_new_q;
  logic [NR-1:0] due;
  logic          any_due;
  logic [RW-1:0] due_r;
  logic [31:0]   rem_f, num_prod, num, rem_new;
  logic          div_start, div_busy, div_done;
  logic [31:0]   div_y;
  logic          have_sched;
  logic [31:0]   lag_q [NR];   // ticks a reaction has been overdue or unscheduled
  logic [NR-1:0] pend_q;       // fired, new schedule not yet written

  always_comb begin
    due_r = '0;
    for (int r = 0; r < NR; r++) due[r] = en[r] && (rem[r] == 32'd0);
    for (int r = NR - 1; r >= 0; r--) if (due[r]) due_r = RW'(r);
  end
  assign any_due = |due;

  // numerator of the division: from scratch or rescaled
  fp32_conv u_cvt_in  (.u_in(rem[i_q]), .f_out(rem_f), .f_in(div_y), .u_out(rem_new));
  fp32_mul  u_mul     (.a(rem_f), .b(a_q[i_q]), .y(num_prod));
  assign have_sched = en[i_q] && (a_q[i_q][30:23] != 8'd0);
  assign num        = have_sched ? num_prod : tick_rate;

  fp32_div u_div (
    .clk, .rst_n, .start(div_start), .a(num), .b(p_y),
    .busy(div_busy), .done(div_done), .y(div_y)
  );

  always_comb begin
    exe_start = 1'b0;
    exe_r     = due_r;
    p_start   = 1'b0;
    p_r       = i_q;
    div_start = 1'b0;
    if (st_q == S_IDLE && run && any_due) exe_start = 1'b1;
    if (st_q == S_PROP) p_start = 1'b1;
    if (st_q == S_PWAIT && p_done && p_y[30:23] != 8'd0 &&
        !(have_sched && p_y == a_q[i_q])) div_start = 1'b1;
  end

  assign busy = (st_q != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q <= S_IDLE; i_q <= '0; dirty_q <= 1'b0; a_new_q <= '0;
      en <= '0; pend_q <= '0;
      for (int r = 0; r < NR; r++) begin rem[r] <= '0; a_q[r] <= '0; lag_q[r] <= '0; end
      ev_fresh <= 1'b0; ev_rescale <= 1'b0; ev_disable <= 1'b0; ev_wait <= 1'b0;
    end else begin
      ev_fresh <= 1'b0; ev_rescale <= 1'b0; ev_disable <= 1'b0;
      ev_wait  <= busy && run && any_due;
      if (dirty) dirty_q <= 1'b1;
      // time advances
      if (run) begin
        for (int r = 0; r < NR; r++) begin
          if (en[r] && rem[r] != 32'd0) rem[r] <= rem[r] - 32'd1;
          if (pend_q[r] || (en[r] && rem[r] == 32'd0)) lag_q[r] <= lag_q[r] + 32'd1;
        end
      end
      unique case (st_q)
        S_IDLE: if (run) begin
          if (any_due) begin
            en[due_r]     <= 1'b0;       // fired: old schedule is void
            a_q[due_r]    <= '0;
            pend_q[due_r] <= 1'b1;
            st_q       <= S_EXEC;
          end else if (dirty_q || dirty) begin
            dirty_q <= 1'b0;
            i_q     <= '0;
            st_q    <= S_PROP;
          end
        end
        S_EXEC: if (exe_done) begin
          dirty_q <= 1'b0;
          i_q     <= '0;
          st_q    <= S_PROP;
        end
        S_PROP: st_q <= S_PWAIT;
        S_PWAIT: if (p_done) begin
          a_new_q <= p_y;
          if (p_y[30:23] == 8'd0) begin
            if (en[i_q] || pend_q[i_q]) ev_disable <= 1'b1;
            en[i_q]     <= 1'b0;
            a_q[i_q]    <= '0;
            rem[i_q]    <= '0;
            pend_q[i_q] <= 1'b0;
            lag_q[i_q]  <= '0;
            st_q     <= (i_q == RW'(NR - 1)) ? S_IDLE : S_PROP;
            i_q      <= i_q + 1'b1;
          end else if (have_sched && p_y == a_q[i_q]) begin
            st_q <= (i_q == RW'(NR - 1)) ? S_IDLE : S_PROP;
            i_q  <= i_q + 1'b1;
          end else begin
            if (have_sched) ev_rescale <= 1'b1;
            else            ev_fresh   <= 1'b1;
            st_q <= S_DWAIT;
          end
        end
        S_DWAIT: if (div_done) begin
          if (pend_q[i_q]) begin
            // new schedule counts from the time the reaction was due
            rem[i_q]    <= (rem_new > lag_q[i_q]) ? rem_new - lag_q[i_q] : 32'd0;
            lag_q[i_q]  <= '0;
            pend_q[i_q] <= 1'b0;
          end else begin
            rem[i_q] <= rem_new;
          end
          a_q[i_q] <= a_new_q;
          en[i_q]  <= 1'b1;
          st_q     <= (i_q == RW'(NR - 1)) ? S_IDLE : S_PROP;
          i_q      <= i_q + 1'b1;
        end
        default: st_q <= S_IDLE;
      endcase
    end
  end

  // a division is only started with a nonzero divisor
  assert property (@(posedge clk) disable iff (!rst_n) div_start |-> p_y[30:23] != 8'd0);
endmodule
