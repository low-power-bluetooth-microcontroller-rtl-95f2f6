// Workload testbench: the four operating scenarios used to judge the power
// of the microcontroller - a Bluetooth transmission, a sleep period, a timer
// run and a UART transfer - each run on the full core at its default
// parameters, with an AHB-Lite master model in place of the processor.
//
// Power itself cannot be simulated at register level, so each scenario
// measures the switching that the two low-power techniques act on:
//   * for every gated clock (the eleven blocks and the processor), the number
//     of clock pulses that reach the block against the number of cycles of
//     the free-running clock; the fraction saved is the clock-gating gain.
//   * the number of bridge state-register bit toggles with the Gray code that
//     the bridge uses, against the toggles the same state sequence would
//     cost with plain binary codes 0..6 in the same state order.
// Checks per scenario: the data path works (bytes sent arrive, timer
// interrupts come at the programmed period), the blocks that the scenario
// does not use receive no clock pulse over a quiet window, the processor
// clock is stopped in sleep, and the Gray code never toggles more bits than
// binary codes would.
//
// The BLE radio is not part of the core: a small model on its APB slot
// queues bytes written to its TX register and, on a start command, sends
// them out on an 8-bit transmit bus, one byte per clock, requesting its
// clock only while it sends. Its register layout is this testbench's own.
module tb_power_workloads;
  import bt_soc_pkg::*;
  logic hclk = 1'b0, hresetn = 1'b1;
  always #5 hclk = ~hclk;
  int cyc = 0;
  always @(posedge hclk) cyc++;

  logic [31:0] haddr, hwdata, hrdata;
  logic [1:0]  htrans;
  logic        hwrite, hready, hresp;
  logic [2:0]  hsize;
  logic        cpu_sleeping = 1'b0, cpu_hclk, wdog_reset_req;
  logic [7:0]  irq;
  logic [2:0]  apb_clk_div = 3'd0;
  logic [31:0] gpio_out, gpio_oe;
  logic        uart_txd, spi_mosi, spi_sclk, spi_ss_n;
  logic [15:0] ext_paddr;
  logic        ext_pwrite, ext_penable;
  logic [31:0] ext_pwdata;
  logic        ble_pclk, ble_psel, tdsp_pclk, tdsp_psel;
  logic [31:0] ble_prdata;
  logic        ble_clk_req, ble_irq;

  bt_soc_top dut (
    .hclk, .hresetn, .haddr, .htrans, .hwrite, .hsize, .hwdata, .hrdata, .hready, .hresp,
    .cpu_sleeping, .cpu_hclk, .irq, .wdog_reset_req, .apb_clk_div,
    .gpio_in(32'h0), .gpio_out, .gpio_oe,
    .uart_rxd(uart_txd), .uart_txd,
    .spi_miso(spi_mosi), .spi_mosi, .spi_sclk, .spi_ss_n,
    .ext_paddr, .ext_pwrite, .ext_penable, .ext_pwdata,
    .ble_pclk, .ble_psel, .ble_prdata, .ble_pready(1'b1), .ble_pslverr(1'b0),
    .ble_clk_req, .ble_irq,
    .tdsp_pclk, .tdsp_psel, .tdsp_prdata(32'h0), .tdsp_pready(1'b1), .tdsp_pslverr(1'b0),
    .tdsp_clk_req(1'b0), .tdsp_irq(1'b0)
  );

  ahb_master_bfm bfm (.clk(hclk), .haddr, .htrans, .hwrite, .hsize, .hwdata, .hrdata,
                      .hready, .hresp);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  // ------------------------------------------------------------ BLE transmitter model
  // 0x000 TXDATA (write queues a byte), 0x004 STATUS [4:0] bytes queued,
  // 0x008 SENT (bytes shifted out), 0x00C CTRL (write 1: send the queue,
  // write 0: clear the interrupt). One byte leaves per clock while sending;
  // the interrupt rises when the queue is empty. The clock is requested only
  // while sending.
  logic [7:0] ble_q [16];
  logic [3:0] ble_wr = '0, ble_rd = '0;
  logic [4:0] ble_cnt = '0;
  logic [31:0] ble_sent = '0;
  logic [7:0] ble_tx_bus = '0;
  logic        ble_tx_valid = 1'b0, ble_irq_q = 1'b0, ble_go = 1'b0;
  logic [7:0] ble_air [$];
  assign ble_clk_req = ble_go;
  assign ble_irq     = ble_irq_q;
  always_comb begin
    case (ext_paddr[11:0])
      12'h004: ble_prdata = {27'd0, ble_cnt};
      12'h008: ble_prdata = ble_sent;
      default: ble_prdata = '0;
    endcase
  end
  always @(posedge ble_pclk) begin
    logic push, pop, ctrl;
    push = ble_psel && ext_penable && ext_pwrite && ext_paddr[11:0] == 12'h000;
    ctrl = ble_psel && ext_penable && ext_pwrite && ext_paddr[11:0] == 12'h00C;
    pop  = ble_go && ble_cnt != 0;
    ble_tx_valid <= pop;
    if (pop) begin
      ble_tx_bus <= ble_q[ble_rd];
      ble_air.push_back(ble_q[ble_rd]);
      ble_rd     <= ble_rd + 4'd1;
      ble_sent   <= ble_sent + 32'd1;
    end
    if (push) begin
      ble_q[ble_wr] <= ext_pwdata[7:0];
      ble_wr        <= ble_wr + 4'd1;
    end
    ble_cnt <= ble_cnt + 5'(push) - 5'(pop);
    if (ble_go && ble_cnt == 5'd0) begin
      ble_go    <= 1'b0;
      ble_irq_q <= 1'b1;
    end
    if (ctrl) begin
      ble_go    <= ext_pwdata[0];
      ble_irq_q <= 1'b0;
    end
  end

  // ------------------------------------------------------------ activity counters
  localparam int NCLK = 12;
  string clk_name [NCLK] = '{"sram", "gpio", "bridge", "timer", "dualtimer", "uart",
                             "watchdog", "spi", "rtc", "ble", "tdsp", "cpu"};
  int pulses [NCLK];
  int cycles = 0;
  int gray_toggles = 0, bin_toggles = 0;
  logic [NCLK-1:0] gclks;
  assign gclks = {cpu_hclk, dut.slot_clk, dut.bridge_clk, dut.gpio_clk, dut.sram_clk};

  // rising edges of each gated clock, sampled just after the free clock rises
  always @(posedge hclk) begin
    #1;
    cycles++;
    for (int k = 0; k < NCLK; k++) if (gclks[k]) pulses[k]++;
  end

  // binary reference code of a state: its position in the transfer order
  function automatic logic [2:0] bin_code(bridge_state_e s);
    case (s)
      ST_IDLE:       return 3'd0;
      ST_WAIT:       return 3'd1;
      ST_TRNF_1:     return 3'd2;
      ST_TRNF_2:     return 3'd3;
      ST_TRNF_OK:    return 3'd4;
      ST_TRNF_ERR_1: return 3'd5;
      default:       return 3'd6;
    endcase
  endfunction
  bridge_state_e st_prev = ST_IDLE;
  always @(posedge hclk) begin
    bridge_state_e st;
    #1;
    st = dut.u_bridge.state_q;
    gray_toggles += $countones(3'(st) ^ 3'(st_prev));
    bin_toggles  += $countones(bin_code(st) ^ bin_code(st_prev));
    st_prev = st;
  end

  task automatic clear_counters();
    cycles = 0; gray_toggles = 0; bin_toggles = 0;
    for (int k = 0; k < NCLK; k++) pulses[k] = 0;
  endtask

  task automatic report(string test);
    int total_on;
    total_on = 0;
    for (int k = 0; k < NCLK; k++) total_on += pulses[k];
    $display("---- %s: %0d cycles", test, cycles);
    for (int k = 0; k < NCLK; k++)
      $display("  %-10s clock pulses %6d of %6d (%0d%% gated off)", clk_name[k], pulses[k],
               cycles, cycles == 0 ? 0 : 100 - (100 * pulses[k]) / cycles);
    $display("  all block clocks: %0d pulses of %0d ungated (%0d%% saved)", total_on,
             NCLK * cycles, 100 - (100 * total_on) / (NCLK * cycles));
    $display("  bridge state bit toggles: Gray %0d, binary %0d", gray_toggles, bin_toggles);
    check(total_on < NCLK * cycles, {test, ": clock gating removes pulses"});
    check(gray_toggles <= bin_toggles, {test, ": Gray code toggles no more bits than binary"});
  endtask

  // quiet window inside a scenario: the listed clocks must not pulse at all
  task automatic quiet_window(int n, logic [NCLK-1:0] may_run, string test);
    int prior [NCLK];
    for (int k = 0; k < NCLK; k++) prior[k] = pulses[k];
    repeat (n) @(negedge hclk);
    for (int k = 0; k < NCLK; k++)
      if (!may_run[k])
        check(pulses[k] == prior[k], $sformatf("%s: %s clock idle", test, clk_name[k]));
  endtask

  // ------------------------------------------------------------ helpers
  localparam logic [31:0] APB = 32'h4000_0000;
  function automatic logic [31:0] slot(int s, logic [11:0] off);
    return APB + 32'(s) * 32'h1000 + 32'(off);
  endfunction
  task automatic wr(logic [31:0] a, logic [31:0] d);
    logic e;
    bfm.write(a, d, e);
    check(!e, $sformatf("write %h OKAY", a));
  endtask
  task automatic rd(logic [31:0] a, output logic [31:0] d);
    logic e;
    bfm.read(a, d, e);
    check(!e, $sformatf("read %h OKAY", a));
  endtask
  task automatic wait_irq(int k);
    while (irq[k]) @(negedge hclk);
    while (!irq[k]) @(negedge hclk);
  endtask

  localparam int CPU = 11, TIMER = 3, UART = 5, BLE = 9, RTC = 8;

  initial begin
    logic [31:0] d;
    logic [7:0]  pkt [12];
    int t0, t1;
    #1 hresetn = 1'b0;
    repeat (3) @(negedge hclk);
    hresetn = 1'b1;
    repeat (2) @(negedge hclk);

    // ---------------------------------------------- Bluetooth transmit test
    // firmware builds a 12-byte packet in SRAM, then copies it to the radio
    clear_counters();
    foreach (pkt[i]) pkt[i] = 8'($urandom);
    for (int i = 0; i < 12; i++) wr(32'h0000_0200 + 32'(4 * i), {24'd0, pkt[i]});
    for (int i = 0; i < 12; i++) begin
      rd(32'h0000_0200 + 32'(4 * i), d);
      wr(slot(SLOT_BLE, 12'h000), d);
    end
    rd(slot(SLOT_BLE, 12'h004), d);
    check(d == 32'd12, $sformatf("BLE bytes queued %0d, exp 12", d));
    wr(slot(SLOT_BLE, 12'h00C), 32'h1);
    wait_irq(6);
    wr(slot(SLOT_BLE, 12'h00C), 32'h0);
    rd(slot(SLOT_BLE, 12'h008), d);
    check(d == 32'd12, $sformatf("BLE bytes sent %0d, exp 12", d));
    check(ble_air.size() == 12, "12 bytes on the transmit bus");
    for (int i = 0; i < 12 && i < ble_air.size(); i++)
      check(ble_air[i] == pkt[i], $sformatf("BLE byte %0d", i));
    quiet_window(50, '0 | (NCLK'(1) << CPU), "BLE test");
    report("Bluetooth transmit test");

    // ---------------------------------------------- sleep test
    clear_counters();
    cpu_sleeping = 1'b1;
    quiet_window(400, '0, "sleep test");
    check(pulses[CPU] == 0, "processor clock stopped for the whole sleep");
    report("sleep test");
    cpu_sleeping = 1'b0;
    repeat (2) @(negedge hclk);

    // ---------------------------------------------- timer test
    // periodic timer, period 50 clocks; processor sleeps between interrupts
    clear_counters();
    wr(slot(SLOT_TIMER, 12'h008), 32'd49);
    wr(slot(SLOT_TIMER, 12'h004), 32'd49);
    wr(slot(SLOT_TIMER, 12'h000), 32'h9);
    for (int n = 0; n < 6; n++) begin
      cpu_sleeping = 1'b1;
      wait_irq(0);
      t1 = cyc;
      cpu_sleeping = 1'b0;
      if (n > 0) check(t1 - t0 == 50, $sformatf("timer period %0d, exp 50", t1 - t0));
      t0 = t1;
      wr(slot(SLOT_TIMER, 12'h00C), 32'h1);
    end
    cpu_sleeping = 1'b1;
    quiet_window(30, (NCLK'(1) << TIMER), "timer test");
    cpu_sleeping = 1'b0;
    wr(slot(SLOT_TIMER, 12'h000), 32'h0);
    wr(slot(SLOT_TIMER, 12'h00C), 32'h1);
    report("timer test");

    // ---------------------------------------------- UART test
    // eight bytes sent in loop-back at 16 clocks per bit, each read back
    clear_counters();
    wr(slot(SLOT_UART, 12'h010), 32'd16);
    wr(slot(SLOT_UART, 12'h008), 32'hB);
    for (int i = 0; i < 8; i++) begin
      wr(slot(SLOT_UART, 12'h000), 32'(8'h30 + i));
      wait_irq(2);
      rd(slot(SLOT_UART, 12'h000), d);
      check(d == 32'(8'h30 + i), $sformatf("UART byte %0d", i));
      wr(slot(SLOT_UART, 12'h00C), 32'h3);
    end
    cpu_sleeping = 1'b1;
    quiet_window(30, (NCLK'(1) << UART), "UART test");
    cpu_sleeping = 1'b0;
    wr(slot(SLOT_UART, 12'h008), 32'h0);
    report("UART test");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (40000) @(posedge hclk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
