// uart_rx: 8N1 serial receiver of the programming channel.
//
// The line is synchronised with two flip-flops. A falling edge starts a
// frame; the start bit is re-checked at its middle, then the eight data
// bits (LSB first) are sampled at their middles, CLKS_PER_BIT clock cycles
// apart, and the stop bit is required high. A good frame pulses `valid`
// for one cycle with the byte on `data`; a bad stop bit drops the byte.
// The default 80 MHz clock and 9600 baud match the reference platform;
// the frame format is this design's choice.
module uart_rx #(
  parameter int unsigned CLK_HZ = 80_000_000,
  parameter int unsigned BAUD   = 9600
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       rxd,
  output logic       valid,
  output logic [7:0] data
);
  localparam int unsigned CPB = CLK_HZ / BAUD;
  localparam int unsigned CW  = $clog2(CPB + 1);

  typedef enum logic [1:0] {R_IDLE, R_START, R_DATA, R_STOP} rstate_e;

  rstate_e        st_q;
  logic [1:0]     sync_q;
  logic [CW-1:0]  cnt_q;
  logic [2:0]     bit_q;
  logic [7:0]     sh_q;
  logic           rx;

  assign rx = sync_q[1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sync_q <= 2'b11; st_q <= R_IDLE; cnt_q <= '0; bit_q <= '0; sh_q <= '0;
      valid <= 1'b0; data <= '0;
    end else begin
      sync_q <= {sync_q[0], rxd};
      valid  <= 1'b0;
      unique case (st_q)
        R_IDLE: if (!rx) begin
          cnt_q <= CW'(CPB / 2);
          st_q  <= R_START;
        end
        R_START: if (cnt_q != '0) cnt_q <= cnt_q - 1'b1;
          else if (rx) st_q <= R_IDLE;                 // glitch
          else begin cnt_q <= CW'(CPB - 1); bit_q <= '0; st_q <= R_DATA; end
        R_DATA: if (cnt_q != '0) cnt_q <= cnt_q - 1'b1;
          else begin
            sh_q  <= {rx, sh_q[7:1]};
            cnt_q <= CW'(CPB - 1);
            if (bit_q == 3'd7) st_q <= R_STOP;
            bit_q <= bit_q + 1'b1;
          end
        R_STOP: if (cnt_q != '0) cnt_q <= cnt_q - 1'b1;
          else begin
            if (rx) begin valid <= 1'b1; data <= sh_q; end
            st_q <= R_IDLE;
          end
        default: st_q <= R_IDLE;
      endcase
    end
  end
endmodule
