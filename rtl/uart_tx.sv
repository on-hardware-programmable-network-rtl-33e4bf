// uart_tx: 8N1 serial transmitter of the monitoring channel.
//
// A pulse on `send` while `busy` is low latches `data` and shifts out a
// start bit, eight data bits LSB first and a stop bit, each CLKS_PER_BIT
// clock cycles long; `busy` stays high for the whole frame. The idle line
// is high. The default 80 MHz clock and 9600 baud match the reference
// platform; the frame format is this design's choice.
module uart_tx #(
  parameter int unsigned CLK_HZ = 80_000_000,
  parameter int unsigned BAUD   = 9600
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       send,
  input  logic [7:0] data,
  output logic       busy,
  output logic       txd
);
  localparam int unsigned CPB = CLK_HZ / BAUD;
  localparam int unsigned CW  = $clog2(CPB + 1);

  logic [9:0]    sh_q;
  logic [3:0]    n_q;
  logic [CW-1:0] cnt_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sh_q <= '1; n_q <= '0; cnt_q <= '0; busy <= 1'b0; txd <= 1'b1;
    end else if (!busy) begin
      txd <= 1'b1;
      if (send) begin
        sh_q  <= {1'b1, data, 1'b0};
        n_q   <= 4'd10;
        cnt_q <= '0;
        busy  <= 1'b1;
      end
    end else if (cnt_q != '0) begin
      cnt_q <= cnt_q - 1'b1;
    end else if (n_q == 4'd0) begin
      busy <= 1'b0;
      txd  <= 1'b1;
    end else begin
      txd   <= sh_q[0];
      sh_q  <= {1'b1, sh_q[9:1]};
      n_q   <= n_q - 1'b1;
      cnt_q <= CW'(CPB - 1);
    end
  end
endmodule
