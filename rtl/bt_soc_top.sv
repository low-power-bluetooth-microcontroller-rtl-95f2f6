// Soft core of the low-power Bluetooth microcontroller.
//
// The processor (an ARM Cortex-M0 with its wake-up interrupt controller,
// outside this module) masters a 32-bit AHB-Lite bus that holds the SRAM,
// the 32-bit GPIO port and the AHB-to-APB bridge. Behind the bridge an APB
// bus carries the timer, dual timer, UART, watchdog, SPI and RTC, plus two
// slots brought out as ports for the Bluetooth (BLE) unit and the TDSP
// peripheral, which live outside this module.
//
// Power is saved in two ways. First, clock gating: every block has its own
// latch-and-AND clock gate and gets a clock edge only when it has work. A
// bus slave's clock runs while it is addressed or finishing a data phase;
// an APB peripheral's clock runs on APB clock cycles (pclken) while it is
// selected or reports internal activity on its clk_req output (a counter
// running, a byte in flight); the processor clock cpu_hclk stops while the
// processor reports sleeping and restarts when an interrupt is pending.
// Only the AHB decoder, the GPIO input synchroniser and the APB clock
// divider run on the free clock. Second, the bridge's state machine uses
// Gray-coded states so that a transfer flips one state bit per step.
//
// APB clock: pclken is high on one HCLK cycle out of apb_clk_div + 1; the
// bridge advances its APB phases and the peripherals are clocked only on
// those cycles, so the APB bus runs at HCLK / (apb_clk_div + 1).
//
// Memory map: SRAM at 0x0000_0000 (16 KB, mirrored in the first 64 KB),
// APB at 0x4000_0000 with 4 KB slots (timer, dual timer, UART, watchdog,
// SPI, RTC, BLE, TDSP in that order), GPIO at 0x4001_0000. Other addresses
// and empty slots give an AHB ERROR response.
// irq: [0] timer, [1] dual timer, [2] UART, [3] watchdog, [4] SPI, [5] RTC,
//      [6] BLE, [7] TDSP.
// The block structure follows the design; the memory map, the clock
// enable conditions and the APB divider are this design's own choices.
module bt_soc_top
  import bt_soc_pkg::*;
#(
  parameter int unsigned SRAM_ADDR_WIDTH = 14,
  parameter logic [31:0] RTC_PRESCALE    = 32'd15_999_999
) (
  input  logic        hclk,
  input  logic        hresetn,
  // processor: AHB-Lite master port, sleep status and clock
  input  logic [31:0] haddr,
  input  logic [1:0]  htrans,
  input  logic        hwrite,
  input  logic [2:0]  hsize,
  input  logic [31:0] hwdata,
  output logic [31:0] hrdata,
  output logic        hready,
  output logic        hresp,
  input  logic        cpu_sleeping,
  output logic        cpu_hclk,
  output logic [7:0]  irq,
  output logic        wdog_reset_req,
  // APB clock divider
  input  logic [2:0]  apb_clk_div,
  // GPIO pads
  input  logic [31:0] gpio_in,
  output logic [31:0] gpio_out,
  output logic [31:0] gpio_oe,
  // UART
  input  logic        uart_rxd,
  output logic        uart_txd,
  // SPI
  input  logic        spi_miso,
  output logic        spi_mosi,
  output logic        spi_sclk,
  output logic        spi_ss_n,
  // shared APB request for the external BLE and TDSP slots
  output logic [15:0] ext_paddr,
  output logic        ext_pwrite,
  output logic        ext_penable,
  output logic [31:0] ext_pwdata,
  // BLE slot
  output logic        ble_pclk,
  output logic        ble_psel,
  input  logic [31:0] ble_prdata,
  input  logic        ble_pready,
  input  logic        ble_pslverr,
  input  logic        ble_clk_req,
  input  logic        ble_irq,
  // TDSP slot
  output logic        tdsp_pclk,
  output logic        tdsp_psel,
  input  logic [31:0] tdsp_prdata,
  input  logic        tdsp_pready,
  input  logic        tdsp_pslverr,
  input  logic        tdsp_clk_req,
  input  logic        tdsp_irq
);
  // ------------------------------------------------------------ AHB-Lite
  ahb_req_t   ahb_req;
  ahb_rsp_t   m_rsp;
  ahb_rsp_t   s_rsp [3];
  logic [2:0] hsel;
  logic       bus_hready;

  assign ahb_req = '{haddr: haddr, htrans: htrans_e'(htrans), hwrite: hwrite,
                     hsize: hsize, hwdata: hwdata};

  ahb_lite_bus u_ahb (
    .hclk, .hresetn, .m_req(ahb_req), .m_rsp, .hready(bus_hready), .hsel, .s_rsp
  );
  assign hrdata = m_rsp.hrdata;
  assign hready = bus_hready;
  assign hresp  = m_rsp.hresp;

  logic addr_phase;
  assign addr_phase = bus_hready & htrans[1];

  // ------------------------------------------------------------ APB clock enable
  logic [2:0] pdiv_q;
  logic       pclken;
  always_ff @(posedge hclk or negedge hresetn) begin
    if (!hresetn)             pdiv_q <= '0;
    else if (pdiv_q >= apb_clk_div) pdiv_q <= '0;
    else                      pdiv_q <= pdiv_q + 3'd1;
  end
  assign pclken = (pdiv_q >= apb_clk_div);

  // ------------------------------------------------------------ SRAM
  logic sram_clk, sram_busy;
  clock_gate u_cg_sram (.clk(hclk), .en((hsel[0] & addr_phase) | sram_busy), .gclk(sram_clk));
  ahb_sram #(.ADDR_WIDTH(SRAM_ADDR_WIDTH)) u_sram (
    .hclk(sram_clk), .hresetn, .hsel(hsel[0]), .hready(bus_hready), .ahb_req,
    .ahb_rsp(s_rsp[0]), .busy(sram_busy)
  );

  // ------------------------------------------------------------ GPIO
  logic gpio_clk, gpio_busy;
  clock_gate u_cg_gpio (.clk(hclk), .en((hsel[2] & addr_phase) | gpio_busy), .gclk(gpio_clk));
  ahb_gpio u_gpio (
    .hclk(gpio_clk), .hclk_sync(hclk), .hresetn, .hsel(hsel[2]), .hready(bus_hready),
    .ahb_req, .ahb_rsp(s_rsp[2]), .gpio_in, .gpio_out, .gpio_oe, .busy(gpio_busy)
  );

  // ------------------------------------------------------------ bridge
  logic          bridge_clk, bridge_busy, psel;
  apb_req_t      apb_req;
  apb_rsp_t      apb_rsp;
  bridge_state_e bridge_state;
  clock_gate u_cg_bridge (.clk(hclk), .en((hsel[1] & addr_phase) | bridge_busy),
                          .gclk(bridge_clk));
  ahb_apb_bridge u_bridge (
    .hclk(bridge_clk), .hresetn, .hsel(hsel[1]), .hready(bus_hready), .ahb_req,
    .ahb_rsp(s_rsp[1]), .pclken, .psel, .apb_req, .apb_rsp, .busy(bridge_busy),
    .state(bridge_state)
  );

  // ------------------------------------------------------------ APB bus
  logic [APB_SLOTS-1:0] psel_slot, slot_clk_req, slot_clk;
  apb_rsp_t             slot_rsp [APB_SLOTS];

  apb_bus #(.NSLOTS(APB_SLOTS)) u_apb (
    .psel, .req(apb_req), .rsp(apb_rsp), .slot_present({APB_SLOTS{1'b1}}),
    .psel_slot, .slot_rsp
  );

  for (genvar i = 0; i < APB_SLOTS; i++) begin : g_pclk
    clock_gate u_cg (.clk(hclk), .en(pclken & (psel_slot[i] | slot_clk_req[i])),
                     .gclk(slot_clk[i]));
  end

  logic [1:0] dt_irq_ch;

  apb_timer u_timer (
    .pclk(slot_clk[SLOT_TIMER]), .presetn(hresetn), .psel(psel_slot[SLOT_TIMER]),
    .req(apb_req), .rsp(slot_rsp[SLOT_TIMER]), .irq(irq[0]),
    .clk_req(slot_clk_req[SLOT_TIMER])
  );
  apb_dualtimer u_dualtimer (
    .pclk(slot_clk[SLOT_DUALTMR]), .presetn(hresetn), .psel(psel_slot[SLOT_DUALTMR]),
    .req(apb_req), .rsp(slot_rsp[SLOT_DUALTMR]), .irq_ch(dt_irq_ch), .irq(irq[1]),
    .clk_req(slot_clk_req[SLOT_DUALTMR])
  );
  apb_uart u_uart (
    .pclk(slot_clk[SLOT_UART]), .presetn(hresetn), .psel(psel_slot[SLOT_UART]),
    .req(apb_req), .rsp(slot_rsp[SLOT_UART]), .rxd(uart_rxd), .txd(uart_txd),
    .irq(irq[2]), .clk_req(slot_clk_req[SLOT_UART])
  );
  apb_watchdog u_wdog (
    .pclk(slot_clk[SLOT_WATCHDOG]), .presetn(hresetn), .psel(psel_slot[SLOT_WATCHDOG]),
    .req(apb_req), .rsp(slot_rsp[SLOT_WATCHDOG]), .irq(irq[3]),
    .reset_req(wdog_reset_req), .clk_req(slot_clk_req[SLOT_WATCHDOG])
  );
  apb_spi u_spi (
    .pclk(slot_clk[SLOT_SPI]), .presetn(hresetn), .psel(psel_slot[SLOT_SPI]),
    .req(apb_req), .rsp(slot_rsp[SLOT_SPI]), .miso(spi_miso), .mosi(spi_mosi),
    .sclk(spi_sclk), .ss_n(spi_ss_n), .irq(irq[4]), .clk_req(slot_clk_req[SLOT_SPI])
  );
  apb_rtc #(.PRESCALE_RESET(RTC_PRESCALE)) u_rtc (
    .pclk(slot_clk[SLOT_RTC]), .presetn(hresetn), .psel(psel_slot[SLOT_RTC]),
    .req(apb_req), .rsp(slot_rsp[SLOT_RTC]), .irq(irq[5]),
    .clk_req(slot_clk_req[SLOT_RTC])
  );

  // external slots
  assign ext_paddr   = apb_req.paddr;
  assign ext_pwrite  = apb_req.pwrite;
  assign ext_penable = apb_req.penable;
  assign ext_pwdata  = apb_req.pwdata;

  assign ble_pclk                = slot_clk[SLOT_BLE];
  assign ble_psel                = psel_slot[SLOT_BLE];
  assign slot_clk_req[SLOT_BLE]  = ble_clk_req;
  assign slot_rsp[SLOT_BLE]      = '{prdata: ble_prdata, pready: ble_pready,
                                     pslverr: ble_pslverr};
  assign irq[6]                  = ble_irq;

  assign tdsp_pclk               = slot_clk[SLOT_TDSP];
  assign tdsp_psel               = psel_slot[SLOT_TDSP];
  assign slot_clk_req[SLOT_TDSP] = tdsp_clk_req;
  assign slot_rsp[SLOT_TDSP]     = '{prdata: tdsp_prdata, pready: tdsp_pready,
                                     pslverr: tdsp_pslverr};
  assign irq[7]                  = tdsp_irq;

  // ------------------------------------------------------------ processor clock
  clock_gate u_cg_cpu (.clk(hclk), .en(~cpu_sleeping | (|irq)), .gclk(cpu_hclk));
endmodule
