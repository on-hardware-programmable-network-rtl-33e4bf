// tb_manager: self-checking test of the manager with two engines, at 10
// clock cycles per serial bit. The testbench acts as the host: it sends
// commands as serial frames and checks
//   * every configuration command yields exactly one cfg_req_t pulse, to
//     the addressed engine only, with the fields of the command;
//   * input/output maps appear on in_addr/in_amt and out_addr/out_amt/out_en;
//   * each level change of an external input is one in_valid pulse (and
//     none for an unmapped port);
//   * each out_fire pulse toggles the external output line once;
//   * a read command returns the concentration served by the testbench's
//     c-mem stand-in as two serial bytes, high byte first;
//   * unknown op codes are ignored without disturbing later commands;
//   * periodic logging (op A) sends the selected value every period
//     (1 ms = CLK_HZ/1000 cycles per unit), and period 0 stops it.
module tb_manager;
  import ca_pkg::*;
  localparam int CLK_HZ = 1_000_000, BAUD = 100_000, CPB = CLK_HZ / BAUD, NA = 2;
  logic clk = 0, rst_n = 0, uart_rxd = 1, uart_txd;
  logic [N_IN-1:0]  ext_in [NA];
  logic [N_OUT-1:0] ext_out [NA];
  cfg_req_t cfg [NA];
  logic [N_IN-1:0] in_valid [NA];
  logic [SAW-1:0] in_addr [NA][N_IN];
  logic [CW-1:0] in_amt [NA][N_IN];
  logic [N_OUT-1:0] out_en [NA];
  logic [SAW-1:0] out_addr [NA][N_OUT];
  logic [CW-1:0] out_amt [NA][N_OUT];
  logic [N_OUT-1:0] out_fire [NA];
  logic [SAW-1:0] mon_addr [NA];
  logic [CW-1:0] mon_data [NA];
  logic cmd_done;
  int checks = 0, failures = 0;
  cfg_req_t seen [$];
  int seen_ac [$];
  int in_pulses [NA][N_IN];
  byte unsigned reply [$];
  longint rtime [$];
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  manager #(.CLK_HZ(CLK_HZ), .BAUD(BAUD), .N_AC(NA)) dut (.*);
  always #50 clk = ~clk;

  // c-mem stand-in: concentration = 1000 + 7 * species, engine 1 adds 3
  always_comb for (int a = 0; a < NA; a++) mon_data[a] = CW'(1000 + 7 * int'(mon_addr[a]) + 3 * a);

  always @(posedge clk) begin
    for (int a = 0; a < NA; a++) begin
      if (cfg[a].valid) begin seen.push_back(cfg[a]); seen_ac.push_back(a); end
      for (int i = 0; i < N_IN; i++) if (in_valid[a][i]) in_pulses[a][i]++;
    end
  end

  // host receiver
  initial begin
    forever begin
      logic [7:0] b;
      @(negedge uart_txd);
      rtime.push_back(cyc);
      repeat (CPB + CPB / 2) @(posedge clk);
      for (int i = 0; i < 8; i++) begin b[i] = uart_txd; repeat (CPB) @(posedge clk); end
      reply.push_back(b);
    end
  end

  initial begin
    #200_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic put(input logic [7:0] b);
    logic [9:0] f;
    f = {1'b1, b, 1'b0};
    for (int i = 0; i < 10; i++) begin uart_rxd = f[i]; repeat (CPB) @(negedge clk); end
  endtask

  task automatic expect_cfg(input int ac, input cfg_op_e op, input logic [7:0] i0,
                            input logic [7:0] i1, input logic [31:0] d);
    repeat (5) @(negedge clk);
    chk(seen.size() == 1, $sformatf("cfg pulses %0d for op %s", seen.size(), op.name()));
    if (seen.size() == 1) begin
      chk(seen_ac[0] == ac, "wrong engine");
      chk(seen[0].op == op && seen[0].idx0 == i0 && seen[0].idx1 == i1 && seen[0].data == d,
          $sformatf("cfg fields %p", seen[0]));
    end
    seen.delete(); seen_ac.delete();
  endtask

  initial begin
    for (int a = 0; a < NA; a++) begin
      ext_in[a] = '0; out_fire[a] = '0;
      for (int i = 0; i < N_IN; i++) in_pulses[a][i] = 0;
    end
    repeat (3) @(negedge clk); rst_n = 1;
    repeat (5) @(negedge clk);
    // registers hold arbitrary values until the first clock edge in reset
    for (int a = 0; a < NA; a++) for (int i = 0; i < N_IN; i++) in_pulses[a][i] = 0;
    put(8'h10); put(8'h05); put(8'h12); put(8'h34);               // c write, engine 0
    expect_cfg(0, CFG_WR_C, 8'h05, 8'h00, 32'h1234);
    put(8'h21); put(8'h03); put(8'h41); put(8'h20); put(8'h00); put(8'h00);  // k, engine 1
    expect_cfg(1, CFG_WR_K, 8'h03, 8'h00, 32'h4120_0000);
    put(8'h30); put(8'h02); put(8'h31); put(8'h07);               // alpha record
    expect_cfg(0, CFG_WR_ALPHA, 8'h02, 8'h31, 32'h07);
    put(8'h41); put(8'h06); put(8'h70); put(8'h09);               // beta record, engine 1
    expect_cfg(1, CFG_WR_BETA, 8'h06, 8'h70, 32'h09);
    put(8'hF0);                                                     // unknown op
    put(8'h80); put(8'h47); put(8'hC3); put(8'h50); put(8'h00);    // tick rate
    expect_cfg(0, CFG_TICKRATE, 8'h00, 8'h00, 32'h47C3_5000);
    put(8'h90); put(8'h01);                                         // run
    expect_cfg(0, CFG_RUN, 8'h00, 8'h00, 32'h1);
    // maps (no cfg pulse)
    put(8'h60); put(8'h01); put(8'h0A); put(8'h00); put(8'h03);    // engine 0 in port 1 -> species 10, 3 mol
    put(8'h71); put(8'h02); put(8'h0B); put(8'h00); put(8'h05);    // engine 1 out port 2 -> species 11, 5 mol
    repeat (5) @(negedge clk);
    chk(seen.size() == 0, "map produced a cfg pulse");
    chk(in_addr[0][1] == 10 && in_amt[0][1] == 3, "input map");
    chk(out_addr[1][2] == 11 && out_amt[1][2] == 5 && out_en[1] == N_OUT'(4) && out_en[0] == 0, "output map");
    // input events: 6 level changes on mapped port, 3 on unmapped
    for (int n = 0; n < 6; n++) begin
      ext_in[0][1] = ~ext_in[0][1]; ext_in[0][2] = (n < 3) ? ~ext_in[0][2] : ext_in[0][2];
      repeat (4) @(negedge clk);
    end
    repeat (4) @(negedge clk);
    chk(in_pulses[0][1] == 6, $sformatf("input events %0d", in_pulses[0][1]));
    chk(in_pulses[0][2] == 0 && in_pulses[1][1] == 0, "events on unmapped port");
    // output toggles
    begin
      logic o0;
      o0 = ext_out[1][2];
      for (int n = 0; n < 5; n++) begin
        @(negedge clk); out_fire[1][2] = 1; @(negedge clk); out_fire[1][2] = 0;
      end
      @(negedge clk);
      chk(ext_out[1][2] == ~o0, "output toggles (odd count)");
    end
    // monitor read: engine 1, species 20 -> 1000 + 140 + 3 = 1143 = 0x0477
    reply.delete();
    put(8'h51); put(8'd20);
    repeat (30 * CPB) @(negedge clk);
    chk(reply.size() == 2, $sformatf("reply bytes %0d", reply.size()));
    if (reply.size() == 2) chk(reply[0] == 8'h04 && reply[1] == 8'h77, $sformatf("reply %h %h", reply[0], reply[1]));
    reply.delete();
    put(8'h50); put(8'd200);   // 1000 + 1400 = 2400 = 0x0960
    repeat (30 * CPB) @(negedge clk);
    chk(reply.size() == 2 && reply[0] == 8'h09 && reply[1] == 8'h60, "second reply");
    // periodic logging: engine 1, species 30 (1000 + 210 + 3 = 0x04BD), every 2 ms
    reply.delete(); rtime.delete();
    put(8'hA1); put(8'd30); put(8'h00); put(8'h02);
    repeat (7000) @(negedge clk);
    chk(reply.size() == 6, $sformatf("log bytes %0d, expected 6", reply.size()));
    for (int i = 0; i + 1 < reply.size(); i += 2)
      chk(reply[i] == 8'h04 && reply[i + 1] == 8'hBD, $sformatf("log frame %h %h", reply[i], reply[i + 1]));
    if (rtime.size() >= 5) chk(rtime[2] - rtime[0] == 2000 && rtime[4] - rtime[2] == 2000,
                               $sformatf("log period %0d cycles", rtime[2] - rtime[0]));
    put(8'hA1); put(8'd30); put(8'h00); put(8'h00);
    reply.delete();
    repeat (6000) @(negedge clk);
    chk(reply.size() <= 2, $sformatf("logging did not stop: %0d bytes", reply.size()));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
