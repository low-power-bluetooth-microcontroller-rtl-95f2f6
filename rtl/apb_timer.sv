// 32-bit down-counting timer on the APB bus.
//
// While enabled, VALUE decrements once per clock; when it is 0 it reloads
// from RELOAD instead and sets the interrupt flag, so the interrupt period
// is RELOAD + 1 clocks. The flag drives irq when the interrupt enable is
// set and is cleared by writing 1 to INTSTATUS. A write to VALUE takes
// precedence over counting. clk_req is high while the counter runs: the
// clock of this block may be gated off whenever clk_req and PSEL are both
// low, as nothing inside changes then.
//
// Registers (offsets in the 4 KB slot):
//   0x00 CTRL       [0] enable, [3] interrupt enable
//   0x04 VALUE      current count (read/write)
//   0x08 RELOAD     reload value
//   0x0C INTSTATUS  [0] interrupt flag, write 1 to clear
// APB3 slave with no wait states; registers are written at the end of the
// access phase. The design names a timer peripheral on the APB bus; its
// register set and counting rule are this design's own.
module apb_timer
  import bt_soc_pkg::*;
(
  input  logic     pclk,
  input  logic     presetn,
  input  logic     psel,
  input  apb_req_t req,
  output apb_rsp_t rsp,
  output logic     irq,
  output logic     clk_req
);
  logic        en_q, inten_q, flag_q;
  logic [31:0] value_q, reload_q;
  logic        wr;
  logic [9:0]  word;

  assign wr   = psel & req.penable & req.pwrite;
  assign word = req.paddr[11:2];

  always_ff @(posedge pclk or negedge presetn) begin
    if (!presetn) begin
      en_q     <= 1'b0;
      inten_q  <= 1'b0;
      flag_q   <= 1'b0;
      value_q  <= '0;
      reload_q <= '0;
    end else begin
      if (en_q) begin
        if (value_q == 32'd0) begin
          value_q <= reload_q;
          flag_q  <= 1'b1;
        end else begin
          value_q <= value_q - 32'd1;
        end
      end
      if (wr) begin
        unique case (word)
          10'h0: begin en_q <= req.pwdata[0]; inten_q <= req.pwdata[3]; end
          10'h1: value_q  <= req.pwdata;
          10'h2: reload_q <= req.pwdata;
          10'h3: if (req.pwdata[0]) flag_q <= 1'b0;
          default: ;
        endcase
      end
    end
  end

  always_comb begin
    unique case (word)
      10'h0:   rsp.prdata = {28'd0, inten_q, 2'b00, en_q};
      10'h1:   rsp.prdata = value_q;
      10'h2:   rsp.prdata = reload_q;
      10'h3:   rsp.prdata = {31'd0, flag_q};
      default: rsp.prdata = '0;
    endcase
  end
  assign rsp.pready  = 1'b1;
  assign rsp.pslverr = 1'b0;
  assign irq         = flag_q & inten_q;
  assign clk_req     = en_q;
endmodule
