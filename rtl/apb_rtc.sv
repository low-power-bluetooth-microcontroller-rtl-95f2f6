// Real-time clock on the APB bus.
//
// A prescaler divides the clock down to a seconds tick: it counts
// PRESCALE + 1 clocks per tick. While the RTC is started, each tick
// increments the 32-bit seconds counter DR. When the counter steps onto
// the value in MR the match interrupt flag is set; it drives irq when its
// mask bit is set and is cleared through ICR. Writing LR loads the counter
// and restarts the prescaler. clk_req is high while the RTC runs, since the
// counter must see every clock; once stopped, its clock may be gated off.
//
// Registers:
//   0x00 DR        current count (read only)
//   0x04 MR        match value
//   0x08 LR        load value, a write loads DR
//   0x0C CR        [0] start
//   0x10 IMSC      [0] interrupt mask (1 = enabled)
//   0x14 RIS       [0] raw match flag
//   0x18 MIS       [0] masked match flag
//   0x1C ICR       write 1 to bit 0: clear the match flag
//   0x20 PRESCALE  clocks per tick minus one
// The reset value of PRESCALE gives a 1 s tick at the 16 MHz system clock.
// APB3 slave with no wait states. The design names an RTC peripheral; the
// prescaler, registers and match interrupt are this design's own.
module apb_rtc
  import bt_soc_pkg::*;
#(
  parameter logic [31:0] PRESCALE_RESET = 32'd15_999_999
) (
  input  logic     pclk,
  input  logic     presetn,
  input  logic     psel,
  input  apb_req_t req,
  output apb_rsp_t rsp,
  output logic     irq,
  output logic     clk_req
);
  logic        wr;
  logic [9:0]  word;
  assign wr   = psel & req.penable & req.pwrite;
  assign word = req.paddr[11:2];

  logic [31:0] dr_q, mr_q, lr_q, pre_q, div_q;
  logic        start_q, imsc_q, ris_q;

  always_ff @(posedge pclk or negedge presetn) begin
    if (!presetn) begin
      dr_q    <= '0;
      mr_q    <= '0;
      lr_q    <= '0;
      pre_q   <= '0;
      div_q   <= PRESCALE_RESET;
      start_q <= 1'b0;
      imsc_q  <= 1'b0;
      ris_q   <= 1'b0;
    end else begin
      if (start_q) begin
        if (pre_q >= div_q) begin
          pre_q <= '0;
          dr_q  <= dr_q + 32'd1;
          if (dr_q + 32'd1 == mr_q) ris_q <= 1'b1;
        end else begin
          pre_q <= pre_q + 32'd1;
        end
      end
      if (wr) begin
        unique case (word)
          10'h1: mr_q  <= req.pwdata;
          10'h2: begin lr_q <= req.pwdata; dr_q <= req.pwdata; pre_q <= '0; end
          10'h3: start_q <= req.pwdata[0];
          10'h4: imsc_q  <= req.pwdata[0];
          10'h7: if (req.pwdata[0]) ris_q <= 1'b0;
          10'h8: div_q   <= req.pwdata;
          default: ;
        endcase
      end
    end
  end

  always_comb begin
    unique case (word)
      10'h0:   rsp.prdata = dr_q;
      10'h1:   rsp.prdata = mr_q;
      10'h2:   rsp.prdata = lr_q;
      10'h3:   rsp.prdata = {31'd0, start_q};
      10'h4:   rsp.prdata = {31'd0, imsc_q};
      10'h5:   rsp.prdata = {31'd0, ris_q};
      10'h6:   rsp.prdata = {31'd0, ris_q & imsc_q};
      10'h8:   rsp.prdata = div_q;
      default: rsp.prdata = '0;
    endcase
  end
  assign rsp.pready  = 1'b1;
  assign rsp.pslverr = 1'b0;
  assign irq         = ris_q & imsc_q;
  assign clk_req     = start_q;
endmodule
