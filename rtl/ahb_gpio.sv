// 32-bit general-purpose I/O port as an AHB-Lite slave.
//
// Each of the 32 pins has an output value bit and an output enable bit; the
// pad itself (a tri-state buffer per pin) sits outside, driven by gpio_out
// and gpio_oe, and returns the pin level on gpio_in. The input levels pass
// through a two-flop synchroniser on the free-running clock hclk_sync so
// that they are current even while the register clock is gated off. The
// registers run on hclk, which may be gated: it only has to run while the
// port is accessed.
//
// Registers (word offsets from the GPIO base):
//   0x00 DATA      read: synchronised pin levels, write: output value
//   0x04 DATAOUT   read/write: output value
//   0x10 OUTENSET  read: output enables, write 1: set enable bits
//   0x14 OUTENCLR  read: output enables, write 1: clear enable bits
// Address and write flag are registered in the address phase; the access
// completes in the data phase with no wait states. The design shows a
// 32-bit GPIO on the AHB-Lite bus; the register set is this design's own.
module ahb_gpio
  import bt_soc_pkg::*;
(
  input  logic        hclk,
  input  logic        hclk_sync,
  input  logic        hresetn,
  input  logic        hsel,
  input  logic        hready,
  input  ahb_req_t    ahb_req,
  output ahb_rsp_t    ahb_rsp,
  input  logic [31:0] gpio_in,
  output logic [31:0] gpio_out,
  output logic [31:0] gpio_oe,
  output logic        busy
);
  logic [31:0] sync1, sync2;
  logic [3:0]  reg_q;        // word offset [5:2] of the data phase
  logic        rd_q, wr_q;

  always_ff @(posedge hclk_sync or negedge hresetn) begin
    if (!hresetn) begin
      sync1 <= '0;
      sync2 <= '0;
    end else begin
      sync1 <= gpio_in;
      sync2 <= sync1;
    end
  end

  always_ff @(posedge hclk or negedge hresetn) begin
    if (!hresetn) begin
      reg_q <= '0;
      rd_q  <= 1'b0;
      wr_q  <= 1'b0;
    end else if (hready) begin
      rd_q  <= hsel & ahb_req.htrans[1] & ~ahb_req.hwrite;
      wr_q  <= hsel & ahb_req.htrans[1] &  ahb_req.hwrite;
      reg_q <= ahb_req.haddr[5:2];
    end
  end

  always_ff @(posedge hclk or negedge hresetn) begin
    if (!hresetn) begin
      gpio_out <= '0;
      gpio_oe  <= '0;
    end else if (wr_q) begin
      unique case (reg_q)
        4'h0, 4'h1: gpio_out <= ahb_req.hwdata;
        4'h4:       gpio_oe  <= gpio_oe |  ahb_req.hwdata;
        4'h5:       gpio_oe  <= gpio_oe & ~ahb_req.hwdata;
        default: ;
      endcase
    end
  end

  always_comb begin
    ahb_rsp.hrdata = '0;
    if (rd_q) begin
      unique case (reg_q)
        4'h0:       ahb_rsp.hrdata = sync2;
        4'h1:       ahb_rsp.hrdata = gpio_out;
        4'h4, 4'h5: ahb_rsp.hrdata = gpio_oe;
        default: ;
      endcase
    end
  end
  assign ahb_rsp.hreadyout = 1'b1;
  assign ahb_rsp.hresp     = 1'b0;
  assign busy              = rd_q | wr_q;
endmodule
