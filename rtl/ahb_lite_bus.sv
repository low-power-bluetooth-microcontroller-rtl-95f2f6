// AHB-Lite system bus: address decoder, slave response multiplexer and
// default slave.
//
// One master (the processor) reaches three slaves. The decoder looks at
// HADDR[31:16] in the address phase: 0x0000 selects the SRAM, 0x4000 the
// AHB-to-APB bridge and 0x4001 the GPIO. Any other address goes to the
// built-in default slave, which answers a NONSEQ or SEQ transfer with the
// two-cycle AHB ERROR response and an IDLE or BUSY one with OKAY.
// The slave that owns the data phase is registered whenever HREADY is high,
// and its HRDATA, HREADYOUT and HRESP are returned to the master; HREADY is
// fed back to every slave. The design names the AHB-Lite bus but not its
// map; the map and the default slave are this design's own choices.
//
// Ports: m_req / m_rsp: master side. hsel[i], s_rsp[i]: slave i, in the
// order SRAM, BRIDGE, GPIO. hready: the bus HREADY to all slaves.
module ahb_lite_bus
  import bt_soc_pkg::*;
(
  input  logic      hclk,
  input  logic      hresetn,
  input  ahb_req_t  m_req,
  output ahb_rsp_t  m_rsp,
  output logic      hready,
  output logic [2:0] hsel,       // {GPIO, BRIDGE, SRAM}
  input  ahb_rsp_t  s_rsp [3]
);
  localparam int unsigned S_SRAM = 0, S_APB = 1, S_GPIO = 2, S_DEF = 3;

  logic [15:0] region;
  logic [3:0]  sel_a;        // address-phase selection, one-hot incl. default
  logic [3:0]  sel_d;        // data-phase owner
  logic [1:0]  def_err;      // default slave error response, cycle 1 / 2

  assign region = m_req.haddr[31:16];

  always_comb begin
    sel_a = '0;
    unique case (region)
      AHB_SRAM_BASE: sel_a[S_SRAM] = 1'b1;
      AHB_APB_BASE:  sel_a[S_APB]  = 1'b1;
      AHB_GPIO_BASE: sel_a[S_GPIO] = 1'b1;
      default:       sel_a[S_DEF]  = 1'b1;
    endcase
  end
  assign hsel = sel_a[2:0];

  always_ff @(posedge hclk or negedge hresetn) begin
    if (!hresetn) begin
      sel_d   <= 4'b0001;
      def_err <= '0;
    end else begin
      if (hready) sel_d <= sel_a;
      // default slave: ERROR for an active transfer, first cycle not ready
      if (hready && sel_a[S_DEF] && m_req.htrans[1]) def_err <= 2'b01;
      else if (def_err == 2'b01)                    def_err <= 2'b10;
      else                                          def_err <= 2'b00;
    end
  end

  always_comb begin
    m_rsp = '{hrdata: '0, hreadyout: 1'b1, hresp: 1'b0};
    if (sel_d[S_SRAM])      m_rsp = s_rsp[S_SRAM];
    else if (sel_d[S_APB])  m_rsp = s_rsp[S_APB];
    else if (sel_d[S_GPIO]) m_rsp = s_rsp[S_GPIO];
    else begin
      m_rsp.hreadyout = (def_err != 2'b01);
      m_rsp.hresp     = (def_err != 2'b00);
    end
  end
  assign hready = m_rsp.hreadyout;
endmodule
