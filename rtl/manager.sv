// manager: host interface of the chemical middleware platform.
//
// Programming: commands arrive on a serial line (uart_rx). A command is a
// header byte {op[3:0], engine[3:0]} followed by a fixed number of payload
// bytes, multi-byte values most significant byte first:
//   op 1 write concentration  : species, value[15:8], value[7:0]
//   op 2 write coefficient    : reaction, k[31:24] .. k[7:0]   (IEEE-754)
//   op 3 write reactant record: reaction, {slot[3:0], order[3:0]}, species
//   op 4 write product record : same as op 3
//   op 5 read concentration   : species  -> reply value[15:8], value[7:0]
//   op 6 map input port       : port, species, molecules[15:8], [7:0]
//   op 7 map output port      : port, species, molecules[15:8], [7:0]
//   op 8 set tick rate        : ticks-per-second[31:24] .. [7:0] (IEEE-754)
//   op 9 run / stop           : flag (bit 0)
//   op A periodic logging     : species, period_ms[15:8], period_ms[7:0]
//                               (period 0 stops logging)
// Other op codes carry no payload and are ignored. Ops 1-4, 8 and 9 become
// one cfg_req_t pulse to the selected engine; ops 6 and 7 fill the manager's
// own event maps; op 5 reads c-mem and sends two bytes back on uart_tx
// (the host waits for the reply before the next read). Op A makes the
// manager send the selected species of the addressed engine every
// period_ms milliseconds (LOG_UNIT = CLK_HZ/1000 cycles) in the same
// two-byte format; a read waits until a log frame in progress is out,
// and the host should not interleave reads with logging if it cannot
// tell the replies apart.
// Events: each external input line is synchronised, and every change of
// its level is one event that adds the mapped number of molecules to the
// mapped species. Each output port removes its number of molecules from
// its species whenever enough are present, and toggles its line once per
// batch. A port mapped to species 0 or 0 molecules is off.
// The manager's role (programming, event-to-species mapping in batches,
// monitoring over a 9600-baud line) follows the reference platform; the
// command encoding and the toggle signalling are this design's own.
module manager
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
  input  logic [N_IN-1:0]   ext_in   [N_AC],
  output logic [N_OUT-1:0]  ext_out  [N_AC],
  // towards the chemical engines
  output cfg_req_t          cfg      [N_AC],
  output logic [N_IN-1:0]   in_valid [N_AC],
  output logic [SAW-1:0]    in_addr  [N_AC][N_IN],
  output logic [CW-1:0]     in_amt   [N_AC][N_IN],
  output logic [N_OUT-1:0]  out_en   [N_AC],
  output logic [SAW-1:0]    out_addr [N_AC][N_OUT],
  output logic [CW-1:0]     out_amt  [N_AC][N_OUT],
  input  logic [N_OUT-1:0]  out_fire [N_AC],
  output logic [SAW-1:0]    mon_addr [N_AC],
  input  logic [CW-1:0]     mon_data [N_AC],
  output logic              cmd_done        // one command decoded
);
  localparam int unsigned AW = (N_AC > 1) ? $clog2(N_AC) : 1;

  // ---------------- serial command parser
  logic       rx_valid;
  logic [7:0] rx_data;
  logic [7:0] hdr_q;
  logic [7:0] pl_q [5];
  logic [2:0] need_q, got_q;
  logic       in_cmd_q;
  logic       exec_q;        // command complete, execute this cycle
  logic [3:0] op;
  logic [AW-1:0] sel;

  uart_rx #(.CLK_HZ(CLK_HZ), .BAUD(BAUD)) u_rx (
    .clk, .rst_n, .rxd(uart_rxd), .valid(rx_valid), .data(rx_data)
  );

  function automatic logic [2:0] payload_len(input logic [3:0] o);
    case (o)
      4'h1, 4'h3, 4'h4, 4'hA: return 3'd3;
      4'h2:             return 3'd5;
      4'h5, 4'h9:       return 3'd1;
      4'h6, 4'h7, 4'h8: return 3'd4;
      default:          return 3'd0;
    endcase
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hdr_q <= '0; need_q <= '0; got_q <= '0; in_cmd_q <= 1'b0; exec_q <= 1'b0;
      for (int i = 0; i < 5; i++) pl_q[i] <= '0;
    end else begin
      exec_q <= 1'b0;
      if (rx_valid) begin
        if (!in_cmd_q) begin
          hdr_q <= rx_data;
          got_q <= '0;
          need_q <= payload_len(rx_data[7:4]);
          if (payload_len(rx_data[7:4]) == 3'd0) exec_q <= 1'b1;
          else                                   in_cmd_q <= 1'b1;
        end else begin
          pl_q[got_q] <= rx_data;
          got_q       <= got_q + 1'b1;
          if (got_q + 1'b1 == need_q) begin
            in_cmd_q <= 1'b0;
            exec_q   <= 1'b1;
          end
        end
      end
    end
  end

  assign op       = hdr_q[7:4];
  assign sel      = AW'(hdr_q[3:0]);
  assign cmd_done = exec_q;

  // ---------------- configuration requests
  cfg_req_t req;
  always_comb begin
    req = '0;
    unique case (op)
      4'h1: begin req.op = CFG_WR_C;     req.idx0 = pl_q[0]; req.data = {16'd0, pl_q[1], pl_q[2]}; end
      4'h2: begin req.op = CFG_WR_K;     req.idx0 = pl_q[0]; req.data = {pl_q[1], pl_q[2], pl_q[3], pl_q[4]}; end
      4'h3: begin req.op = CFG_WR_ALPHA; req.idx0 = pl_q[0]; req.idx1 = pl_q[1]; req.data = {24'd0, pl_q[2]}; end
      4'h4: begin req.op = CFG_WR_BETA;  req.idx0 = pl_q[0]; req.idx1 = pl_q[1]; req.data = {24'd0, pl_q[2]}; end
      4'h8: begin req.op = CFG_TICKRATE; req.data = {pl_q[0], pl_q[1], pl_q[2], pl_q[3]}; end
      4'h9: begin req.op = CFG_RUN;      req.data = {24'd0, pl_q[0]}; end
      default: req.op = CFG_NOP;
    endcase
    req.valid = exec_q && (req.op != CFG_NOP);
  end

  always_comb begin
    for (int a = 0; a < N_AC; a++) begin
      cfg[a]       = req;
      cfg[a].valid = req.valid && (sel == AW'(a));
    end
  end

  // ---------------- event maps
  logic [SAW-1:0]   imap_s_q [N_AC][N_IN];
  logic [CW-1:0]    imap_n_q [N_AC][N_IN];
  logic [SAW-1:0]   omap_s_q [N_AC][N_OUT];
  logic [CW-1:0]    omap_n_q [N_AC][N_OUT];
  logic [N_IN-1:0]  sync1_q  [N_AC];
  logic [N_IN-1:0]  sync2_q  [N_AC];
  logic [N_IN-1:0]  prev_q   [N_AC];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int a = 0; a < N_AC; a++) begin
        for (int i = 0; i < N_IN; i++)  begin imap_s_q[a][i] <= '0; imap_n_q[a][i] <= '0; end
        for (int i = 0; i < N_OUT; i++) begin omap_s_q[a][i] <= '0; omap_n_q[a][i] <= '0; end
        sync1_q[a] <= '0; sync2_q[a] <= '0; prev_q[a] <= '0; ext_out[a] <= '0;
      end
    end else begin
      for (int a = 0; a < N_AC; a++) begin
        sync1_q[a] <= ext_in[a];
        sync2_q[a] <= sync1_q[a];
        prev_q[a]  <= sync2_q[a];
        ext_out[a] <= ext_out[a] ^ out_fire[a];
      end
      if (exec_q && op == 4'h6 && pl_q[0] < 8'(N_IN)) begin
        imap_s_q[sel][pl_q[0][$clog2(N_IN)-1:0]] <= pl_q[1];
        imap_n_q[sel][pl_q[0][$clog2(N_IN)-1:0]] <= {pl_q[2], pl_q[3]};
      end
      if (exec_q && op == 4'h7 && pl_q[0] < 8'(N_OUT)) begin
        omap_s_q[sel][pl_q[0][$clog2(N_OUT)-1:0]] <= pl_q[1];
        omap_n_q[sel][pl_q[0][$clog2(N_OUT)-1:0]] <= {pl_q[2], pl_q[3]};
      end
    end
  end

  always_comb begin
    for (int a = 0; a < N_AC; a++) begin
      for (int i = 0; i < N_IN; i++) begin
        in_addr[a][i]  = imap_s_q[a][i];
        in_amt[a][i]   = imap_n_q[a][i];
        in_valid[a][i] = (sync2_q[a][i] != prev_q[a][i]) &&
                         (imap_s_q[a][i] != '0) && (imap_n_q[a][i] != '0);
      end
      for (int i = 0; i < N_OUT; i++) begin
        out_addr[a][i] = omap_s_q[a][i];
        out_amt[a][i]  = omap_n_q[a][i];
        out_en[a][i]   = (omap_s_q[a][i] != '0) && (omap_n_q[a][i] != '0);
      end
    end
  end

  // ---------------- monitoring: reads and periodic logging
  localparam int unsigned LOG_UNIT = (CLK_HZ / 1000 > 0) ? CLK_HZ / 1000 : 1;
  logic [7:0]  lo_q;
  logic        tx_busy, tx_send;
  logic [7:0]  tx_data;
  logic [1:0]  pend_q;       // bytes still to send
  logic [7:0]  mon_sp_q;
  logic [AW-1:0] rsel_q;     // engine whose value is being sent
  logic        rd_req_q;     // read command waiting for the transmitter
  logic [7:0]  rd_sp_q;
  logic [AW-1:0] rd_sel_q;
  logic [7:0]  log_sp_q;
  logic [AW-1:0] log_sel_q;
  logic [15:0] log_per_q, log_cnt_q;
  logic [31:0] unit_cnt_q;
  logic        log_due_q;

  always_comb begin
    for (int a = 0; a < N_AC; a++) mon_addr[a] = mon_sp_q;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pend_q <= '0; lo_q <= '0; tx_data <= '0; tx_send <= 1'b0; mon_sp_q <= '0;
      rsel_q <= '0; rd_req_q <= 1'b0; rd_sp_q <= '0; rd_sel_q <= '0;
      log_sp_q <= '0; log_sel_q <= '0; log_per_q <= '0; log_cnt_q <= '0;
      unit_cnt_q <= '0; log_due_q <= 1'b0;
    end else begin
      tx_send <= 1'b0;
      // logging time base
      if (exec_q && op == 4'hA) begin
        log_sp_q <= pl_q[0]; log_sel_q <= sel; log_per_q <= {pl_q[1], pl_q[2]};
        log_cnt_q <= '0; unit_cnt_q <= '0; log_due_q <= 1'b0;
      end else if (log_per_q != '0) begin
        if (unit_cnt_q == LOG_UNIT - 1) begin
          unit_cnt_q <= '0;
          if (log_cnt_q + 1'b1 == log_per_q) begin
            log_cnt_q <= '0;
            log_due_q <= 1'b1;
          end else begin
            log_cnt_q <= log_cnt_q + 1'b1;
          end
        end else begin
          unit_cnt_q <= unit_cnt_q + 1'b1;
        end
      end
      if (exec_q && op == 4'h5) begin
        rd_req_q <= 1'b1; rd_sp_q <= pl_q[0]; rd_sel_q <= sel;
      end
      // transmitter sequence, a read before a due log frame
      if (pend_q == 2'd0) begin
        if (rd_req_q) begin
          // species address reaches c-mem one cycle before it is sampled
          mon_sp_q <= rd_sp_q; rsel_q <= rd_sel_q; pend_q <= 2'd3; rd_req_q <= 1'b0;
        end else if (log_due_q && log_per_q != '0) begin
          mon_sp_q <= log_sp_q; rsel_q <= log_sel_q; pend_q <= 2'd3; log_due_q <= 1'b0;
        end
      end else if (pend_q == 2'd3) begin
        tx_data <= mon_data[rsel_q][15:8];
        lo_q    <= mon_data[rsel_q][7:0];
        tx_send <= 1'b1;
        pend_q  <= 2'd2;
      end else if (pend_q == 2'd2) begin
        if (!tx_busy && !tx_send) begin tx_data <= lo_q; tx_send <= 1'b1; pend_q <= 2'd1; end
      end else if (pend_q == 2'd1) begin
        if (!tx_busy && !tx_send) pend_q <= 2'd0;
      end
    end
  end

  uart_tx #(.CLK_HZ(CLK_HZ), .BAUD(BAUD)) u_tx (
    .clk, .rst_n, .send(tx_send), .data(tx_data), .busy(tx_busy), .txd(uart_txd)
  );
endmodule
