// uart: serial communication interface (8 data bits, no parity, 1 stop bit).
//
// Transmitter: tx_we with tx_data starts a frame when tx_busy is low
// (a write while busy is ignored); the line sends a start bit, eight data
// bits LSB first and a stop bit, each DIV = CLK_HZ / BAUD clock cycles long.
// Receiver: rx is synchronised by two flip-flops; a falling edge starts a
// frame, each bit is sampled in its middle, and after a valid stop bit the
// byte appears on rx_data with rx_valid set until rx_ack. A new byte
// overwrites an unacknowledged one. Idle line level is 1. The frame format,
// baud rate and register behaviour are this design's choices: the system
// only needs a serial link to report results.
module uart #(
  parameter int CLK_HZ = 12_000_000,
  parameter int BAUD   = 115_200
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       tx_we,
  input  logic [7:0] tx_data,
  output logic       tx_busy,
  output logic       tx,
  input  logic       rx,
  output logic       rx_valid,
  output logic [7:0] rx_data,
  input  logic       rx_ack
);
  localparam int DIV = (CLK_HZ / BAUD) < 2 ? 2 : CLK_HZ / BAUD;
  localparam int CW  = $clog2(DIV + 1);

  // ------------------------------------------------------------ transmitter
  logic [CW-1:0] tx_cnt;
  logic [3:0]    tx_bit;     // bits still to send, 0 = idle
  logic [9:0]    tx_shift;

  assign tx_busy = (tx_bit != 4'd0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tx_cnt   <= '0;
      tx_bit   <= '0;
      tx_shift <= '1;
      tx       <= 1'b1;
    end else if (!tx_busy) begin
      tx <= 1'b1;
      if (tx_we) begin
        tx_shift <= {1'b1, tx_data, 1'b0};
        tx_bit   <= 4'd10;
        tx_cnt   <= '0;
      end
    end else begin
      tx <= tx_shift[0];
      if (tx_cnt == CW'(DIV - 1)) begin
        tx_cnt   <= '0;
        tx_shift <= {1'b1, tx_shift[9:1]};
        tx_bit   <= tx_bit - 4'd1;
      end else begin
        tx_cnt <= tx_cnt + 1'b1;
      end
    end
  end

  // --------------------------------------------------------------- receiver
  logic          rx_m, rx_s;
  logic [CW-1:0] rx_cnt;
  logic [3:0]    rx_bit;     // 0 idle, 1 start, 2..9 data, 10 stop
  logic [7:0]    rx_shift;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rx_m     <= 1'b1;
      rx_s     <= 1'b1;
      rx_cnt   <= '0;
      rx_bit   <= '0;
      rx_shift <= '0;
      rx_valid <= 1'b0;
      rx_data  <= '0;
    end else begin
      rx_m <= rx;
      rx_s <= rx_m;
      if (rx_ack) rx_valid <= 1'b0;
      if (rx_bit == 4'd0) begin
        if (!rx_s) begin
          rx_bit <= 4'd1;
          rx_cnt <= CW'(DIV / 2);
        end
      end else if (rx_cnt == CW'(DIV - 1)) begin
        rx_cnt <= '0;
        unique case (rx_bit)
          4'd1:    rx_bit <= rx_s ? 4'd0 : 4'd2;   // false start
          4'd10: begin
            rx_bit <= 4'd0;
            if (rx_s) begin
              rx_data  <= rx_shift;
              rx_valid <= 1'b1;
            end
          end
          default: begin
            rx_shift <= {rx_s, rx_shift[7:1]};
            rx_bit   <= rx_bit + 4'd1;
          end
        endcase
      end else begin
        rx_cnt <= rx_cnt + 1'b1;
      end
    end
  end
endmodule
