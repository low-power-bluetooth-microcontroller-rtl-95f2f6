// Dual 32-bit down-counting timer on the APB bus.
//
// Two independent channels share one APB slot. Each channel counts down
// once per clock while enabled. At 0 it raises its raw interrupt flag and
// either reloads from LOAD (periodic mode) or stops by clearing its enable
// (one-shot mode). Writing LOAD also loads the counter. The masked flag
// drives the channel's interrupt; irq is the OR of both channels.
// clk_req is high while either channel runs, so the clock of this block may
// be gated off whenever clk_req and PSEL are both low.
//
// Registers, channel n at offset 0x20*n:
//   +0x00 LOAD    reload value, a write also loads VALUE
//   +0x04 VALUE   current count (read only)
//   +0x08 CTRL    [0] enable, [1] one-shot, [2] interrupt enable
//   +0x0C INTCLR  write: clear the raw interrupt flag
//   +0x10 RIS     [0] raw interrupt flag
//   +0x14 MIS     [0] masked interrupt flag
// APB3 slave with no wait states. The design names a dual timer on the APB
// bus; its registers and counting rule are this design's own.
module apb_dualtimer
  import bt_soc_pkg::*;
(
  input  logic       pclk,
  input  logic       presetn,
  input  logic       psel,
  input  apb_req_t   req,
  output apb_rsp_t   rsp,
  output logic [1:0] irq_ch,
  output logic       irq,
  output logic       clk_req
);
  logic [31:0] load_q  [2];
  logic [31:0] value_q [2];
  logic [1:0]  en_q, oneshot_q, inten_q, ris_q;
  logic        wr;
  logic        ch;
  logic [2:0]  reg_idx;

  assign wr      = psel & req.penable & req.pwrite;
  assign ch      = req.paddr[5];
  assign reg_idx = req.paddr[4:2];

  for (genvar n = 0; n < 2; n++) begin : g_ch
    logic sel_me;
    assign sel_me = wr && (req.paddr[11:6] == 6'd0) && (ch == n[0]);

    always_ff @(posedge pclk or negedge presetn) begin
      if (!presetn) begin
        load_q[n]    <= '0;
        value_q[n]   <= '0;
        en_q[n]      <= 1'b0;
        oneshot_q[n] <= 1'b0;
        inten_q[n]   <= 1'b0;
        ris_q[n]     <= 1'b0;
      end else begin
        if (en_q[n]) begin
          if (value_q[n] == 32'd0) begin
            ris_q[n] <= 1'b1;
            if (oneshot_q[n]) en_q[n]    <= 1'b0;
            else              value_q[n] <= load_q[n];
          end else begin
            value_q[n] <= value_q[n] - 32'd1;
          end
        end
        if (sel_me) begin
          unique case (reg_idx)
            3'd0: begin load_q[n] <= req.pwdata; value_q[n] <= req.pwdata; end
            3'd2: begin
              en_q[n]      <= req.pwdata[0];
              oneshot_q[n] <= req.pwdata[1];
              inten_q[n]   <= req.pwdata[2];
            end
            3'd3: ris_q[n] <= 1'b0;
            default: ;
          endcase
        end
      end
    end
  end

  always_comb begin
    rsp.prdata = '0;
    if (req.paddr[11:6] == 6'd0) begin
      unique case (reg_idx)
        3'd0: rsp.prdata = load_q[ch];
        3'd1: rsp.prdata = value_q[ch];
        3'd2: rsp.prdata = {29'd0, inten_q[ch], oneshot_q[ch], en_q[ch]};
        3'd4: rsp.prdata = {31'd0, ris_q[ch]};
        3'd5: rsp.prdata = {31'd0, ris_q[ch] & inten_q[ch]};
        default: ;
      endcase
    end
  end
  assign rsp.pready  = 1'b1;
  assign rsp.pslverr = 1'b0;
  assign irq_ch      = ris_q & inten_q;
  assign irq         = |irq_ch;
  assign clk_req     = |en_q;
endmodule
