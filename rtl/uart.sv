// uart: serial port shared unchanged by the server and the client.
//
// 8 data bits, no parity, one stop bit (8N1), LSB first, idle high. The bit
// period is a run-time input in system clock cycles (baud_div), so the baud
// rate delivered by the BOOTP configuration can be applied without
// resynthesis; e.g. 4800 baud at 50 MHz is baud_div = 10417.
//
// Transmitter: a byte is taken when tx_valid && tx_ready; tx_ready is low
// while a character (10 bit periods) is being sent.
// Receiver: the rxd input is synchronised by two flip-flops; a falling edge
// starts a character, each bit is sampled in the middle of its period, and
// rx_valid pulses for one cycle with the byte once the stop bit has been
// sampled. A low stop bit raises rx_frame_err instead of rx_valid.
//
// The source design names the UART and its configurable baud rate; the frame
// format, mid-bit sampling and handshake are this design's choices.
module uart (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [15:0] baud_div,
  // transmit
  input  logic [7:0]  tx_data,
  input  logic        tx_valid,
  output logic        tx_ready,
  output logic        txd,
  // receive
  input  logic        rxd,
  output logic [7:0]  rx_data,
  output logic        rx_valid,
  output logic        rx_frame_err
);

  // ---------------- transmitter ----------------
  logic [9:0]  tx_shift;
  logic [3:0]  tx_bits;
  logic [15:0] tx_cnt;

  assign tx_ready = (tx_bits == 4'd0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tx_shift <= '1;
      tx_bits  <= '0;
      tx_cnt   <= '0;
      txd      <= 1'b1;
    end else if (tx_bits == 4'd0) begin
      txd <= 1'b1;
      if (tx_valid) begin
        tx_shift <= {1'b1, tx_data, 1'b0};
        tx_bits  <= 4'd10;
        tx_cnt   <= '0;
      end
    end else begin
      txd <= tx_shift[0];
      if (tx_cnt == baud_div - 16'd1) begin
        tx_cnt   <= '0;
        tx_shift <= {1'b1, tx_shift[9:1]};
        tx_bits  <= tx_bits - 4'd1;
      end else begin
        tx_cnt <= tx_cnt + 16'd1;
      end
    end
  end

  // ---------------- receiver ----------------
  logic [1:0]  rx_sync;
  logic        rx_in;
  logic        rx_busy;
  logic [3:0]  rx_bit;      // 0 = start bit, 1..8 data, 9 stop
  logic [15:0] rx_cnt;
  logic [7:0]  rx_shift;

  assign rx_in = rx_sync[1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rx_sync      <= 2'b11;
      rx_busy      <= 1'b0;
      rx_bit       <= '0;
      rx_cnt       <= '0;
      rx_shift     <= '0;
      rx_data      <= '0;
      rx_valid     <= 1'b0;
      rx_frame_err <= 1'b0;
    end else begin
      rx_sync      <= {rx_sync[0], rxd};
      rx_valid     <= 1'b0;
      rx_frame_err <= 1'b0;
      if (!rx_busy) begin
        if (!rx_in) begin
          rx_busy <= 1'b1;
          rx_bit  <= '0;
          rx_cnt  <= baud_div >> 1;   // first sample at mid start bit
        end
      end else if (rx_cnt == 16'd0) begin
        rx_cnt <= baud_div - 16'd1;
        if (rx_bit == 4'd0) begin
          if (rx_in) rx_busy <= 1'b0;          // glitch, not a start bit
          else       rx_bit  <= 4'd1;
        end else if (rx_bit <= 4'd8) begin
          rx_shift <= {rx_in, rx_shift[7:1]};
          rx_bit   <= rx_bit + 4'd1;
        end else begin
          rx_busy <= 1'b0;
          if (rx_in) begin
            rx_data  <= rx_shift;
            rx_valid <= 1'b1;
          end else begin
            rx_frame_err <= 1'b1;
          end
        end
      end else begin
        rx_cnt <= rx_cnt - 16'd1;
      end
    end
  end

endmodule
