// tb_ca_top_full: the platform at its default parameters (80 MHz clock,
// 9600-baud serial line, one engine, reset time base 80e6 ticks per second,
// i.e. real time). The host programs the enzymatic rate controller
// S + E -> ES (k1 = 1), ES -> E + P (k2 = 20) with e0 = 25000 molecules,
// a rate cap of e0*k2 = 500000 molecules/s, maps input port 0 to S and
// output port 0 to P (one molecule per event each), starts the engine and
// offers 20000 arrival events per second for 50 ms. Below the cap the
// controller paces with a low-pass response of time constant 1/k2: the
// ES population must match the fluid model lambda/k2*(1 - exp(-k2 t)).
// Also checked: E + ES = e0, conservation S + ES + P + departures =
// arrivals, and a serial monitor read of E.
module tb_ca_top_full;
  import ca_pkg::*;
  import tb_fp_pkg::*;
  localparam int CPB = 80_000_000 / 9600;
  localparam logic [7:0] S = 1, P = 2, E = 3, ES = 4;
  logic clk = 0, rst_n = 0, uart_rxd = 1, uart_txd;
  logic [N_IN-1:0]  ext_in [1];
  logic [N_OUT-1:0] ext_out [1];
  logic [0:0] fire, running;
  int checks = 0, failures = 0;
  byte unsigned reply [$];
  int n_in = 0, n_tx = 0, n_fire = 0;
  logic out_prev = 0;

  ca_top dut (.*);
  always #6.25 clk = ~clk;   // 80 MHz

  always @(posedge clk) begin
    out_prev <= ext_out[0][0];
    if (rst_n && ext_out[0][0] != out_prev) n_tx++;
    if (fire[0]) n_fire++;
  end

  function automatic int c(input logic [7:0] s);
    return int'(dut.g_ac[0].u_ac.u_cmem.c_q[s]);
  endfunction

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
  task automatic rec(input logic [3:0] op, input logic [7:0] r, input int slot, input logic [7:0] s);
    put({op, 4'h0}); put(r); put({4'(slot), 4'h0}); put(s);
  endtask

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #1_000_000_000; failures++;    // 1 s of simulated time
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int v;
    ext_in[0] = '0;
    repeat (3) @(negedge clk); rst_n = 1;
    repeat (5) @(negedge clk);
    put(8'h10); put(E); put(8'h61); put(8'hA8);          // c_E = 25000
    rec(4'h3, 0, 0, S); rec(4'h3, 0, 1, E); rec(4'h4, 0, 0, ES);
    put(8'h20); put(8'd0); put32(r2f(1.0));
    rec(4'h3, 1, 0, ES); rec(4'h4, 1, 0, E); rec(4'h4, 1, 1, P);
    put(8'h20); put(8'd1); put32(r2f(20.0));
    put(8'h60); put(8'd0); put(S); put(8'h00); put(8'h01);
    put(8'h70); put(8'd0); put(P); put(8'h00); put(8'h01);
    put(8'h90); put(8'h01);
    repeat (2 * CPB) @(negedge clk);
    chk(running[0], "engine not running");
    // 20000 events/s = one per 4000 cycles, for 50 ms
    for (int n = 0; n < 1000; n++) begin
      repeat (4000) @(negedge clk);
      ext_in[0][0] = ~ext_in[0][0]; n_in++;
    end
    repeat (40_000) @(negedge clk);
    chk(c(E) + c(ES) == 25000, $sformatf("E + ES = %0d", c(E) + c(ES)));
    chk(c(S) + c(ES) + c(P) + n_tx == n_in, $sformatf("conservation S%0d ES%0d P%0d tx%0d in%0d", c(S), c(ES), c(P), n_tx, n_in));
    begin
      // fluid model with S ~ 0: dES/dt = lambda - k2*ES while arrivals last
      // (T = 50 ms), then ES decays for the 0.5 ms tail
      real es_pred;
      es_pred = (20000.0 / 20.0) * (1.0 - $exp(-20.0 * 0.05)) * $exp(-20.0 * 0.0005);
      chk(real'(c(ES)) > es_pred * 0.95 - 10 && real'(c(ES)) < es_pred * 1.05 + 10,
          $sformatf("ES %0d vs fluid model %0.1f", c(ES), es_pred));
      chk(n_tx > 0, "no departures");
    end
    chk(n_fire >= 2 * n_tx, "reaction firings");
    reply.delete();
    put(8'h50); put(E);
    repeat (25 * CPB) @(negedge clk);
    chk(reply.size() == 2, "monitor reply");
    if (reply.size() == 2) begin
      v = int'({reply[0], reply[1]});
      chk(v + c(ES) <= 25000 + 100 && v + c(ES) >= 25000 - 100, $sformatf("monitor E %0d", v));
    end
    $display("full size: %0d arrivals, %0d departures, %0d reaction firings", n_in, n_tx, n_fire);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
