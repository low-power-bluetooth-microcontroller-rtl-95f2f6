// Watchdog timer on the APB bus.
//
// While the interrupt enable is set the counter decrements once per clock.
// When it reaches 0 it reloads from LOAD and raises the interrupt. If the
// interrupt is still pending the next time the counter reaches 0, and the
// reset enable is set, the watchdog asserts reset_req (held until the
// block itself is reset). Software keeps the watchdog quiet by writing
// INTCLR, which clears the interrupt and reloads the counter.
// clk_req is high while the counter runs, so the clock may be gated off
// whenever clk_req and PSEL are both low.
//
// Registers:
//   0x00 LOAD     reload value, a write also loads the counter
//   0x04 VALUE    current count (read only)
//   0x08 CTRL     [0] interrupt and counter enable, [1] reset enable
//   0x0C INTCLR   write: clear interrupt and reload
//   0x10 RIS      [0] raw interrupt
//   0x14 MIS      [0] interrupt (same as RIS while enabled)
// APB3 slave with no wait states. The design names a watchdog peripheral;
// its registers and the two-timeout reset rule are this design's own.
module apb_watchdog
  import bt_soc_pkg::*;
(
  input  logic     pclk,
  input  logic     presetn,
  input  logic     psel,
  input  apb_req_t req,
  output apb_rsp_t rsp,
  output logic     irq,
  output logic     reset_req,
  output logic     clk_req
);
  logic [31:0] load_q, value_q;
  logic        inten_q, resen_q, ris_q, rst_q;
  logic        wr;
  logic [9:0]  word;

  assign wr   = psel & req.penable & req.pwrite;
  assign word = req.paddr[11:2];

  always_ff @(posedge pclk or negedge presetn) begin
    if (!presetn) begin
      load_q  <= 32'hFFFF_FFFF;
      value_q <= 32'hFFFF_FFFF;
      inten_q <= 1'b0;
      resen_q <= 1'b0;
      ris_q   <= 1'b0;
      rst_q   <= 1'b0;
    end else begin
      if (inten_q) begin
        if (value_q == 32'd0) begin
          value_q <= load_q;
          ris_q   <= 1'b1;
          if (ris_q && resen_q) rst_q <= 1'b1;
        end else begin
          value_q <= value_q - 32'd1;
        end
      end
      if (wr) begin
        unique case (word)
          10'h0: begin load_q <= req.pwdata; value_q <= req.pwdata; end
          10'h2: begin inten_q <= req.pwdata[0]; resen_q <= req.pwdata[1]; end
          10'h3: begin ris_q <= 1'b0; value_q <= load_q; end
          default: ;
        endcase
      end
    end
  end

  always_comb begin
    unique case (word)
      10'h0:   rsp.prdata = load_q;
      10'h1:   rsp.prdata = value_q;
      10'h2:   rsp.prdata = {30'd0, resen_q, inten_q};
      10'h4:   rsp.prdata = {31'd0, ris_q};
      10'h5:   rsp.prdata = {31'd0, ris_q & inten_q};
      default: rsp.prdata = '0;
    endcase
  end
  assign rsp.pready  = 1'b1;
  assign rsp.pslverr = 1'b0;
  assign irq         = ris_q & inten_q;
  assign reset_req   = rst_q;
  assign clk_req     = inten_q;
endmodule
