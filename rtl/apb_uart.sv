// UART (8 data bits, no parity, 1 stop bit) on the APB bus.
//
// Transmit: a write to DATA fills a one-byte buffer; the byte moves into
// the shift register as soon as the transmitter is free, which raises the
// transmit interrupt (buffer empty again). The frame is a 0 start bit, the
// 8 data bits LSB first and a 1 stop bit, each BAUDDIV clocks long.
// Receive: the rxd input is synchronised by two flip-flops. A falling edge
// starts a frame; the start bit is checked half a bit later and then every
// bit is sampled in its middle, BAUDDIV clocks apart. A good stop bit
// stores the byte in DATA and raises the receive interrupt; a byte that
// arrives while DATA is still full sets the receive overrun flag.
// clk_req is high while a byte is buffered or shifted out and while the
// receiver is enabled (it must watch the line), so the block's clock may be
// gated off only when the UART is truly idle.
//
// Registers:
//   0x00 DATA       write: byte to send, read: last byte received
//   0x04 STATE      [0] TX buffer full, [1] RX buffer full,
//                   [2] TX overrun, [3] RX overrun (write 1 to clear)
//   0x08 CTRL       [0] TX enable, [1] RX enable,
//                   [2] TX interrupt enable, [3] RX interrupt enable
//   0x0C INTSTATUS  [0] TX interrupt, [1] RX interrupt (write 1 to clear)
//   0x10 BAUDDIV    clocks per bit, at least 2
// APB3 slave with no wait states. The design names a UART peripheral with
// an input and an output; the frame format, registers and sampling are this
// design's own.
module apb_uart
  import bt_soc_pkg::*;
(
  input  logic     pclk,
  input  logic     presetn,
  input  logic     psel,
  input  apb_req_t req,
  output apb_rsp_t rsp,
  input  logic     rxd,
  output logic     txd,
  output logic     irq,
  output logic     clk_req
);
  logic        wr, rd;
  logic [9:0]  word;
  assign wr   = psel & req.penable & req.pwrite;
  assign rd   = psel & req.penable & ~req.pwrite;
  assign word = req.paddr[11:2];

  logic [3:0]  ctrl_q;
  logic [19:0] baud_q;
  logic [1:0]  int_q;
  logic        tx_ovr_q, rx_ovr_q;

  // transmitter
  logic [7:0]  tx_buf_q;
  logic        tx_full_q;
  logic [8:0]  tx_shift_q;   // data bits then stop bit
  logic [3:0]  tx_bits_q;    // bits still to send incl. the current one, 0 = idle
  logic [19:0] tx_cnt_q;
  logic        txd_q;

  // receiver
  logic [1:0]  rx_sync_q;
  logic        rx_prev_q;
  logic [3:0]  rx_bit_q;     // 0 = idle, 1 = start, 2..9 = data, 10 = stop
  logic [19:0] rx_cnt_q;
  logic [7:0]  rx_shift_q;
  logic [7:0]  rx_data_q;
  logic        rx_full_q;

  logic tx_load;
  assign tx_load = tx_full_q && (tx_bits_q == 4'd0) && ctrl_q[0];

  always_ff @(posedge pclk or negedge presetn) begin
    if (!presetn) begin
      ctrl_q     <= '0;
      baud_q     <= 20'd16;
      int_q      <= '0;
      tx_ovr_q   <= 1'b0;
      rx_ovr_q   <= 1'b0;
      tx_buf_q   <= '0;
      tx_full_q  <= 1'b0;
      tx_shift_q <= '1;
      tx_bits_q  <= '0;
      tx_cnt_q   <= '0;
      txd_q      <= 1'b1;
      rx_sync_q  <= 2'b11;
      rx_prev_q  <= 1'b1;
      rx_bit_q   <= '0;
      rx_cnt_q   <= '0;
      rx_shift_q <= '0;
      rx_data_q  <= '0;
      rx_full_q  <= 1'b0;
    end else begin
      // ---------------- transmit
      if (tx_load) begin
        tx_full_q  <= 1'b0;
        tx_shift_q <= {1'b1, tx_buf_q};
        tx_bits_q  <= 4'd10;
        tx_cnt_q   <= baud_q - 20'd1;
        txd_q      <= 1'b0;             // start bit
        int_q[0]   <= 1'b1;
      end else if (tx_bits_q != 4'd0) begin
        if (tx_cnt_q == 20'd0) begin
          tx_bits_q <= tx_bits_q - 4'd1;
          if (tx_bits_q != 4'd1) begin
            txd_q      <= tx_shift_q[0];
            tx_shift_q <= {1'b1, tx_shift_q[8:1]};
            tx_cnt_q   <= baud_q - 20'd1;
          end else begin
            txd_q <= 1'b1;
          end
        end else begin
          tx_cnt_q <= tx_cnt_q - 20'd1;
        end
      end

      // ---------------- receive
      rx_sync_q <= {rx_sync_q[0], rxd};
      rx_prev_q <= rx_sync_q[1];
      if (!ctrl_q[1]) begin
        rx_bit_q <= '0;
      end else if (rx_bit_q == 4'd0) begin
        if (rx_prev_q && !rx_sync_q[1]) begin
          rx_bit_q <= 4'd1;
          rx_cnt_q <= {1'b0, baud_q[19:1]} - 20'd1;
        end
      end else if (rx_cnt_q != 20'd0) begin
        rx_cnt_q <= rx_cnt_q - 20'd1;
      end else begin
        rx_cnt_q <= baud_q - 20'd1;
        if (rx_bit_q == 4'd1) begin
          rx_bit_q <= rx_sync_q[1] ? 4'd0 : 4'd2;   // false start: back to idle
        end else if (rx_bit_q <= 4'd9) begin
          rx_shift_q <= {rx_sync_q[1], rx_shift_q[7:1]};
          rx_bit_q   <= rx_bit_q + 4'd1;
        end else begin
          rx_bit_q <= 4'd0;
          if (rx_sync_q[1]) begin
            if (rx_full_q) rx_ovr_q <= 1'b1;
            rx_data_q <= rx_shift_q;
            rx_full_q <= 1'b1;
            int_q[1]  <= 1'b1;
          end
        end
      end

      // ---------------- registers
      if (rd && word == 10'h0) rx_full_q <= 1'b0;
      if (wr) begin
        unique case (word)
          10'h0: begin
            if (tx_full_q && !tx_load) tx_ovr_q <= 1'b1;
            tx_buf_q  <= req.pwdata[7:0];
            tx_full_q <= 1'b1;
          end
          10'h1: begin
            if (req.pwdata[2]) tx_ovr_q <= 1'b0;
            if (req.pwdata[3]) rx_ovr_q <= 1'b0;
          end
          10'h2: ctrl_q <= req.pwdata[3:0];
          10'h3: int_q  <= int_q & ~req.pwdata[1:0];
          10'h4: baud_q <= (req.pwdata[19:0] < 20'd2) ? 20'd2 : req.pwdata[19:0];
          default: ;
        endcase
      end
    end
  end

  always_comb begin
    unique case (word)
      10'h0:   rsp.prdata = {24'd0, rx_data_q};
      10'h1:   rsp.prdata = {28'd0, rx_ovr_q, tx_ovr_q, rx_full_q, tx_full_q};
      10'h2:   rsp.prdata = {28'd0, ctrl_q};
      10'h3:   rsp.prdata = {30'd0, int_q};
      10'h4:   rsp.prdata = {12'd0, baud_q};
      default: rsp.prdata = '0;
    endcase
  end
  assign rsp.pready  = 1'b1;
  assign rsp.pslverr = 1'b0;
  assign txd         = txd_q;
  assign irq         = (int_q[0] & ctrl_q[2]) | (int_q[1] & ctrl_q[3]);
  assign clk_req     = tx_full_q | (tx_bits_q != 4'd0) | ctrl_q[1];
endmodule
