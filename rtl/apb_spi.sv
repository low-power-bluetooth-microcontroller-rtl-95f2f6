// SPI master (mode 0, 8-bit frames, MSB first) on the APB bus.
//
// Writing DATA while the master is idle and enabled starts a frame: MOSI
// shows bit 7 at once, SCLK (idle low) then toggles every CLKDIV + 1 clocks;
// MISO is sampled on each rising SCLK edge and MOSI moves to the next bit on
// each falling edge. After 8 SCLK periods the received byte is in DATA, the
// done flag is set and, if enabled, the interrupt is raised. SS is the
// active-low slave select, driven from CTRL[1] by software so that it can
// span several frames.
// clk_req is high during a frame, so the block's clock may be gated off
// whenever no frame is running and the bus does not select it.
//
// Registers:
//   0x00 DATA    write: byte to send (starts a frame), read: byte received
//   0x04 STATUS  [0] busy, [1] done (write 1 to bit 1 to clear)
//   0x08 CTRL    [0] enable, [1] slave select active, [2] interrupt enable
//   0x0C CLKDIV  SCLK half period minus one, in clocks
// APB3 slave with no wait states. The design shows an SPI peripheral with
// MISO, MOSI, SS and SCLK pins; master role, mode 0, frame size and the
// registers are this design's own choices.
module apb_spi
  import bt_soc_pkg::*;
(
  input  logic     pclk,
  input  logic     presetn,
  input  logic     psel,
  input  apb_req_t req,
  output apb_rsp_t rsp,
  input  logic     miso,
  output logic     mosi,
  output logic     sclk,
  output logic     ss_n,
  output logic     irq,
  output logic     clk_req
);
  logic        wr;
  logic [9:0]  word;
  assign wr   = psel & req.penable & req.pwrite;
  assign word = req.paddr[11:2];

  logic [2:0]  ctrl_q;
  logic [15:0] div_q, cnt_q;
  logic        busy_q, done_q, sclk_q;
  logic [7:0]  tx_q, rx_q;
  logic [3:0]  edges_q;      // SCLK edges still to produce

  always_ff @(posedge pclk or negedge presetn) begin
    if (!presetn) begin
      ctrl_q  <= '0;
      div_q   <= 16'd3;
      cnt_q   <= '0;
      busy_q  <= 1'b0;
      done_q  <= 1'b0;
      sclk_q  <= 1'b0;
      tx_q    <= '0;
      rx_q    <= '0;
      edges_q <= '0;
    end else begin
      if (busy_q) begin
        if (cnt_q != 16'd0) begin
          cnt_q <= cnt_q - 16'd1;
        end else begin
          cnt_q   <= div_q;
          sclk_q  <= ~sclk_q;
          edges_q <= edges_q - 4'd1;
          if (!sclk_q) rx_q <= {rx_q[6:0], miso};      // rising edge: sample
          else         tx_q <= {tx_q[6:0], 1'b0};      // falling edge: shift
          if (edges_q == 4'd1) begin
            busy_q <= 1'b0;
            done_q <= 1'b1;
          end
        end
      end
      if (wr) begin
        unique case (word)
          10'h0: if (!busy_q && ctrl_q[0]) begin
                   tx_q    <= req.pwdata[7:0];
                   busy_q  <= 1'b1;
                   edges_q <= 4'd0;          // 16 edges: wraps from 0
                   cnt_q   <= div_q;
                   sclk_q  <= 1'b0;
                 end
          10'h1: if (req.pwdata[1]) done_q <= 1'b0;
          10'h2: ctrl_q <= req.pwdata[2:0];
          10'h3: div_q  <= req.pwdata[15:0];
          default: ;
        endcase
      end
    end
  end

  always_comb begin
    unique case (word)
      10'h0:   rsp.prdata = {24'd0, rx_q};
      10'h1:   rsp.prdata = {30'd0, done_q, busy_q};
      10'h2:   rsp.prdata = {29'd0, ctrl_q};
      10'h3:   rsp.prdata = {16'd0, div_q};
      default: rsp.prdata = '0;
    endcase
  end
  assign rsp.pready  = 1'b1;
  assign rsp.pslverr = 1'b0;
  assign mosi        = tx_q[7];
  assign sclk        = sclk_q;
  assign ss_n        = ~ctrl_q[1];
  assign irq         = done_q & ctrl_q[2];
  assign clk_req     = busy_q;
endmodule
