// Shared types and constants of the low-power Bluetooth microcontroller SoC.
//
// The SoC has a 32-bit AHB-Lite system bus (processor, SRAM, GPIO and the
// bridge) and a 32-bit APB peripheral bus behind the bridge. The bus
// signals are bundled into request and response structs so that every
// slave has the same port shape. The bridge FSM states carry Gray codes:
// the seven states take rows 0 to 6 of the 3-bit reflected Gray sequence
// 000, 001, 011, 010, 110, 111, 101 in the order of a normal transfer, so
// each step of a transfer without error changes one state bit.
// The memory map and register offsets are this design's own choice.
package bt_soc_pkg;

  // ---------------------------------------------------------------- AHB-Lite
  typedef enum logic [1:0] {
    HTRANS_IDLE   = 2'b00,
    HTRANS_BUSY   = 2'b01,
    HTRANS_NONSEQ = 2'b10,
    HTRANS_SEQ    = 2'b11
  } htrans_e;

  typedef struct packed {
    logic [31:0] haddr;
    htrans_e     htrans;
    logic        hwrite;
    logic [2:0]  hsize;
    logic [31:0] hwdata;
  } ahb_req_t;

  typedef struct packed {
    logic [31:0] hrdata;
    logic        hreadyout;
    logic        hresp;      // 1 = ERROR
  } ahb_rsp_t;

  // ---------------------------------------------------------------- APB
  typedef struct packed {
    logic [15:0] paddr;      // offset inside the 64 KB APB region
    logic        pwrite;
    logic        penable;
    logic [31:0] pwdata;
  } apb_req_t;

  typedef struct packed {
    logic [31:0] prdata;
    logic        pready;
    logic        pslverr;
  } apb_rsp_t;

  // ---------------------------------------------------------------- memory map
  // AHB-Lite, decoded on HADDR[31:16]
  localparam logic [15:0] AHB_SRAM_BASE = 16'h0000;   // 0x0000_0000, 64 KB window
  localparam logic [15:0] AHB_APB_BASE  = 16'h4000;   // 0x4000_0000, 64 KB
  localparam logic [15:0] AHB_GPIO_BASE = 16'h4001;   // 0x4001_0000

  // APB slots, 4 KB each, decoded on PADDR[15:12]
  localparam int unsigned APB_SLOTS = 8;
  localparam int unsigned SLOT_TIMER    = 0;
  localparam int unsigned SLOT_DUALTMR  = 1;
  localparam int unsigned SLOT_UART     = 2;
  localparam int unsigned SLOT_WATCHDOG = 3;
  localparam int unsigned SLOT_SPI      = 4;
  localparam int unsigned SLOT_RTC      = 5;
  localparam int unsigned SLOT_BLE      = 6;
  localparam int unsigned SLOT_TDSP     = 7;

  // ---------------------------------------------------------------- bridge FSM
  typedef enum logic [2:0] {
    ST_IDLE       = 3'b000,
    ST_WAIT       = 3'b001,
    ST_TRNF_1     = 3'b011,
    ST_TRNF_2     = 3'b010,
    ST_TRNF_OK    = 3'b110,
    ST_TRNF_ERR_1 = 3'b111,
    ST_TRNF_ERR_2 = 3'b101
  } bridge_state_e;

endpackage
