// tb_uart: self-checking test of the serial transmitter and receiver at
// 10 clock cycles per bit. The transmitter's line is sampled by the
// testbench in the middle of every bit and compared with the 8N1 frame of
// the byte sent (start 0, LSB first, stop 1), including the frame length
// of 10 bit times; the receiver is fed frames generated by the testbench,
// including one with a broken stop bit that must be dropped.
module tb_uart;
  localparam int CLK_HZ = 1_000_000, BAUD = 100_000, CPB = CLK_HZ / BAUD;
  logic clk = 0, rst_n = 0, send = 0, busy, txd, rxd = 1, valid;
  logic [7:0] tdata = 0, rdata;
  int checks = 0, failures = 0;
  byte unsigned got [$];

  uart_tx #(.CLK_HZ(CLK_HZ), .BAUD(BAUD)) u_tx (.clk, .rst_n, .send, .data(tdata), .busy, .txd);
  uart_rx #(.CLK_HZ(CLK_HZ), .BAUD(BAUD)) u_rx (.clk, .rst_n, .rxd, .valid, .data(rdata));
  always #50 clk = ~clk;
  always @(posedge clk) if (valid) got.push_back(rdata);

  initial begin
    #100_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic tx_byte(input logic [7:0] b);
    logic [9:0] frame;
    int t0;
    frame = {1'b1, b, 1'b0};
    @(negedge clk); tdata = b; send = 1;
    @(negedge clk); send = 0;
    // wait for start bit edge
    t0 = 0;
    while (txd) begin @(negedge clk); t0++; if (t0 > 5) break; end
    repeat (CPB / 2) @(negedge clk);
    for (int i = 0; i < 10; i++) begin
      chk(txd == frame[i], $sformatf("tx byte %h bit %0d", b, i));
      if (i < 9) repeat (CPB) @(negedge clk);
    end
    while (busy) @(negedge clk);
  endtask

  task automatic rx_frame(input logic [7:0] b, input bit stop);
    logic [9:0] frame;
    frame = {stop, b, 1'b0};
    for (int i = 0; i < 10; i++) begin rxd = frame[i]; repeat (CPB) @(negedge clk); end
    rxd = 1; repeat (2 * CPB) @(negedge clk);
  endtask

  initial begin
    repeat (3) @(negedge clk); rst_n = 1;
    chk(txd == 1, "idle line high");
    tx_byte(8'h55); tx_byte(8'h00); tx_byte(8'hFF); tx_byte(8'hA3);
    for (int n = 0; n < 30; n++) tx_byte(8'($urandom));
    got.delete();
    rx_frame(8'h3C, 1); rx_frame(8'hC5, 1); rx_frame(8'h77, 0); rx_frame(8'h01, 1);
    chk(got.size() == 3, $sformatf("rx count %0d", got.size()));
    if (got.size() == 3) chk(got[0] == 8'h3C && got[1] == 8'hC5 && got[2] == 8'h01, "rx data");
    for (int n = 0; n < 30; n++) begin
      logic [7:0] b;
      b = 8'($urandom);
      got.delete();
      rx_frame(b, 1);
      chk(got.size() == 1 && got[0] == b, $sformatf("rx random %h", b));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
