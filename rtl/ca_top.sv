// ca_top: the chemical middleware platform.
//
// A manager serves N_AC chemical engines (ac_module). The host programs
// and monitors the engines over one serial line (9600 baud by default)
// and exchanges events with them over plain wires: each engine has N_IN
// input lines, where every level change is one batch of molecules added
// to a mapped input species (for example bytes enqueued at a queue), and
// N_OUT output lines, which toggle once per batch of molecules of a mapped
// output species consumed (for example bytes allowed to leave the queue).
// A chemical algorithm -- a reaction network with its species, reactions
// and coefficients -- is loaded and changed at runtime by register writes
// only; the engines keep running while they are reprogrammed.
// Status outputs: fire pulses per engine when a reaction executes, and
// running shows whether the engine's time base is enabled.
// The structure (manager around engines, each engine with k, alpha, beta
// and c memories and one reaction scheduler) follows the reference
// platform, whose experiments use a single engine; N_AC = 1 is the default.
// rst_n is the asynchronous reset of every flip-flop; it also disables
// the handshake assertions in the engines during reset, which lint tools
// report as a net used both asynchronously and synchronously.
module ca_top
  import ca_pkg::*;
#(
  parameter int unsigned CLK_HZ = 80_000_000,
  parameter int unsigned BAUD   = 9600,
  parameter int unsigned N_AC   = 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              uart_rxd,
  output logic              uart_txd,
  input  logic [N_IN-1:0]   ext_in  [N_AC],
  output logic [N_OUT-1:0]  ext_out [N_AC],
  output logic [N_AC-1:0]   fire,
  output logic [N_AC-1:0]   running
);
  cfg_req_t          cfg      [N_AC];
  logic [N_IN-1:0]   in_valid [N_AC];
  logic [SAW-1:0]    in_addr  [N_AC][N_IN];
  logic [CW-1:0]     in_amt   [N_AC][N_IN];
  logic [N_OUT-1:0]  out_en   [N_AC];
  logic [SAW-1:0]    out_addr [N_AC][N_OUT];
  logic [CW-1:0]     out_amt  [N_AC][N_OUT];
  logic [N_OUT-1:0]  out_fire [N_AC];
  logic [SAW-1:0]    mon_addr [N_AC];
  logic [CW-1:0]     mon_data [N_AC];
  logic              cmd_done;

  manager #(.CLK_HZ(CLK_HZ), .BAUD(BAUD), .N_AC(N_AC)) u_mgr (
    .clk, .rst_n, .uart_rxd, .uart_txd, .ext_in, .ext_out,
    .cfg, .in_valid, .in_addr, .in_amt, .out_en, .out_addr, .out_amt, .out_fire,
    .mon_addr, .mon_data, .cmd_done
  );

  for (genvar a = 0; a < N_AC; a++) begin : g_ac
    logic [$clog2(NR)-1:0] fire_r;
    logic sched_busy, ev_fresh, ev_rescale, ev_disable, ev_wait;
    ac_module u_ac (
      .clk, .rst_n, .cfg(cfg[a]),
      .in_valid(in_valid[a]), .in_addr(in_addr[a]), .in_amt(in_amt[a]),
      .out_en(out_en[a]), .out_addr(out_addr[a]), .out_amt(out_amt[a]),
      .out_fire(out_fire[a]),
      .mon_addr(mon_addr[a]), .mon_data(mon_data[a]),
      .fire(fire[a]), .fire_r, .running(running[a]),
      .sched_busy, .ev_fresh, .ev_rescale, .ev_disable, .ev_wait
    );
  end
endmodule
