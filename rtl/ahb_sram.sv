// On-chip SRAM as an AHB-Lite slave.
//
// A word-wide array of 2**(ADDR_WIDTH-2) 32-bit words. In the address phase
// of a selected NONSEQ/SEQ transfer the word address, the write flag and
// the byte lanes (from HSIZE and HADDR[1:0]) are registered. In the data
// phase a write stores HWDATA in those lanes at the clock edge that ends the
// phase, and a read returns the addressed word. The slave never inserts
// wait states and always answers OKAY. A read right after a write to the
// same word sees the new data, since the read is taken from the array
// after the write edge. The design shows an SRAM model on the AHB-Lite bus
// without its size or timing; the 16 KB size, zero wait states and the
// byte-lane write are this design's own choices.
module ahb_sram
  import bt_soc_pkg::*;
#(
  parameter int unsigned ADDR_WIDTH = 14     // bytes = 2**ADDR_WIDTH
) (
  input  logic     hclk,
  input  logic     hresetn,
  input  logic     hsel,
  input  logic     hready,
  input  ahb_req_t ahb_req,
  output ahb_rsp_t ahb_rsp,
  output logic     busy          // a data-phase write is pending
);
  localparam int unsigned WORDS = 2 ** (ADDR_WIDTH - 2);

  logic [31:0]           mem [WORDS];
  logic [ADDR_WIDTH-3:0] waddr_q;
  logic                  wr_q;
  logic [3:0]            lanes_q;
  logic [3:0]            lanes;

  always_comb begin
    unique case (ahb_req.hsize[1:0])
      2'b00:   lanes = 4'b0001 << ahb_req.haddr[1:0];
      2'b01:   lanes = ahb_req.haddr[1] ? 4'b1100 : 4'b0011;
      default: lanes = 4'b1111;
    endcase
  end

  always_ff @(posedge hclk or negedge hresetn) begin
    if (!hresetn) begin
      waddr_q <= '0;
      wr_q    <= 1'b0;
      lanes_q <= '0;
    end else if (hready) begin
      wr_q <= hsel & ahb_req.htrans[1] & ahb_req.hwrite;
      if (hsel && ahb_req.htrans[1]) begin
        waddr_q <= ahb_req.haddr[ADDR_WIDTH-1:2];
        lanes_q <= lanes;
      end
    end
  end

  always_ff @(posedge hclk) begin
    if (wr_q) begin
      for (int b = 0; b < 4; b++)
        if (lanes_q[b]) mem[waddr_q][8*b +: 8] <= ahb_req.hwdata[8*b +: 8];
    end
  end

  assign ahb_rsp.hrdata    = mem[waddr_q];
  assign ahb_rsp.hreadyout = 1'b1;
  assign ahb_rsp.hresp     = 1'b0;
  assign busy              = wr_q;
endmodule
