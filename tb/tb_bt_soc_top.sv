// End-to-end testbench of the microcontroller soft core, at the default
// parameters.
//
// An AHB-Lite master model stands in for the processor and runs a short
// firmware-like sequence: SRAM and GPIO accesses, every APB peripheral
// (timer, dual timer, UART in loop-back, SPI in loop-back, watchdog, RTC),
// register models on the BLE and TDSP slots (the BLE model adds a PREADY
// wait state and answers one address with PSLVERR), an unmapped address,
// back-to-back APB transfers, a slower APB clock, and a sleep period of the
// processor ended by an interrupt.
//
// Each mechanism of the design is counted and must happen at least once:
// each block clock both running and gated off, the processor clock stopped
// in sleep and restarted by an interrupt, the bridge WAIT and access-phase
// hold loops, the ERROR responses, back-to-back bridge transfers and the
// Gray-coded one-bit state steps. Functional results are compared with
// values computed here.
module tb_bt_soc_top;
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
  logic [31:0] gpio_in = '0, gpio_out, gpio_oe;
  logic        uart_txd, spi_mosi, spi_sclk, spi_ss_n;
  logic [15:0] ext_paddr;
  logic        ext_pwrite, ext_penable;
  logic [31:0] ext_pwdata;
  logic        ble_pclk, ble_psel, tdsp_pclk, tdsp_psel;
  logic [31:0] ble_prdata, tdsp_prdata;
  logic        ble_pready, ble_pslverr, tdsp_pready, tdsp_pslverr;
  logic        ble_irq = 1'b0;

  bt_soc_top dut (
    .hclk, .hresetn, .haddr, .htrans, .hwrite, .hsize, .hwdata, .hrdata, .hready, .hresp,
    .cpu_sleeping, .cpu_hclk, .irq, .wdog_reset_req, .apb_clk_div,
    .gpio_in, .gpio_out, .gpio_oe,
    .uart_rxd(uart_txd), .uart_txd,
    .spi_miso(spi_mosi), .spi_mosi, .spi_sclk, .spi_ss_n,
    .ext_paddr, .ext_pwrite, .ext_penable, .ext_pwdata,
    .ble_pclk, .ble_psel, .ble_prdata, .ble_pready, .ble_pslverr, .ble_clk_req(1'b0),
    .ble_irq,
    .tdsp_pclk, .tdsp_psel, .tdsp_prdata, .tdsp_pready, .tdsp_pslverr,
    .tdsp_clk_req(1'b0), .tdsp_irq(1'b0)
  );

  ahb_master_bfm bfm (.clk(hclk), .haddr, .htrans, .hwrite, .hsize, .hwdata, .hrdata,
                      .hready, .hresp);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  // ------------------------------------------------------------ BLE / TDSP slot models
  // BLE: 4 registers on its own gated clock, one PREADY wait state,
  // PSLVERR at offset 0xFFC. TDSP: 4 registers, no wait state.
  logic [31:0] ble_regs [4], tdsp_regs [4];
  logic        ble_wait_done = 1'b0;
  assign ble_pready  = ble_wait_done;
  assign ble_pslverr = (ext_paddr[11:0] == 12'hFFC);
  assign ble_prdata  = ble_regs[ext_paddr[3:2]];
  always @(posedge ble_pclk) begin
    if (ble_psel && ext_penable) begin
      ble_wait_done <= ~ble_wait_done;
      if (ble_wait_done && ext_pwrite && !ble_pslverr) ble_regs[ext_paddr[3:2]] <= ext_pwdata;
    end
  end
  assign tdsp_pready  = 1'b1;
  assign tdsp_pslverr = 1'b0;
  assign tdsp_prdata  = tdsp_regs[ext_paddr[3:2]];
  always @(posedge tdsp_pclk)
    if (tdsp_psel && ext_penable && ext_pwrite) tdsp_regs[ext_paddr[3:2]] <= ext_pwdata;

  // ------------------------------------------------------------ mechanism counters
  localparam int NCLK = 12;
  string clk_name [NCLK] = '{"sram", "gpio", "bridge", "timer", "dualtimer", "uart",
                             "watchdog", "spi", "rtc", "ble", "tdsp", "cpu"};
  int clk_on [NCLK], clk_off [NCLK];
  logic [NCLK-1:0] gclks;
  assign gclks = {cpu_hclk, dut.slot_clk, dut.bridge_clk, dut.gpio_clk, dut.sram_clk};
  always @(posedge hclk) begin
    #1;
    if (hresetn)
      for (int k = 0; k < NCLK; k++) if (gclks[k]) clk_on[k]++; else clk_off[k]++;
  end

  int n_wait_loop = 0, n_access_hold = 0, n_back_to_back = 0, n_gray_steps = 0;
  int n_apb_err = 0, n_ahb_err = 0, n_cpu_asleep = 0, n_wakeup = 0;
  bridge_state_e st_prev = ST_IDLE;
  logic cpu_was_off = 1'b0;
  always @(posedge hclk) begin
    bridge_state_e st;
    st = dut.u_bridge.state_q;
    if (hresetn) begin
      if (st_prev == ST_WAIT && st == ST_WAIT) n_wait_loop++;
      if (st_prev == ST_TRNF_2 && st == ST_TRNF_2) n_access_hold++;
      if (st_prev == ST_TRNF_OK && st == ST_TRNF_1) n_back_to_back++;
      if (st_prev == ST_TRNF_ERR_1) n_apb_err++;
      if (st != st_prev && st != ST_TRNF_ERR_1 &&
          st_prev inside {ST_IDLE, ST_WAIT, ST_TRNF_1, ST_TRNF_2}) begin
        check($countones(st ^ st_prev) == 1, "one state bit per step of a transfer");
        n_gray_steps++;
      end
    end
    st_prev = st;
  end
  always @(posedge hclk) begin
    #1;
    if (cpu_sleeping && !cpu_hclk) begin n_cpu_asleep++; cpu_was_off = 1'b1; end
    if (cpu_sleeping && cpu_hclk && cpu_was_off) begin n_wakeup++; cpu_was_off = 1'b0; end
  end

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
  task automatic rd_check(logic [31:0] a, logic [31:0] exp, string what);
    logic [31:0] d;
    rd(a, d);
    check(d == exp, $sformatf("%s: %h exp %h", what, d, exp));
  endtask

  // waits, polling at falling edges, for a rising edge of irq[k]
  task automatic wait_irq(int k);
    while (irq[k]) @(negedge hclk);
    while (!irq[k]) @(negedge hclk);
  endtask

  // ------------------------------------------------------------ firmware sequence
  initial begin
    logic [31:0] d, r0, r1, mem_ref [32];
    logic e, e0, e1;
    int t0, t1;
    // a falling reset edge resets the flip-flops whose clocks are gated off
    #1 hresetn = 1'b0;
    repeat (3) @(negedge hclk);
    hresetn = 1'b1;
    repeat (2) @(negedge hclk);

    // SRAM
    for (int k = 0; k < 32; k++) begin mem_ref[k] = $urandom; wr(32'(4 * k), mem_ref[k]); end
    for (int k = 0; k < 32; k++) rd_check(32'(4 * k), mem_ref[k], "SRAM read");
    bfm.pair(1'b1, 32'h100, 32'h600D_F00D, 1'b0, 32'h100, 0, r0, e0, r1, e1);
    check(r1 == 32'h600D_F00D && !e0 && !e1, "SRAM write then read back to back");

    // GPIO
    wr(32'h4001_0000, 32'hA5A5_0F0F);
    wr(32'h4001_0010, 32'hFFFF_0000);
    check(gpio_out == 32'hA5A5_0F0F && gpio_oe == 32'hFFFF_0000, "GPIO pins driven");
    gpio_in = 32'h1234_ABCD;
    repeat (3) @(negedge hclk);
    rd_check(32'h4001_0000, 32'h1234_ABCD, "GPIO pins read");

    // unmapped AHB address: ERROR from the default slave
    bfm.read(32'h8000_0000, d, e);
    check(e, "unmapped address gives ERROR");
    if (e) n_ahb_err++;

    // timer at full APB rate: interrupt every RELOAD + 1 = 10 clocks
    wr(slot(SLOT_TIMER, 12'h008), 32'd9);
    wr(slot(SLOT_TIMER, 12'h004), 32'd9);
    wr(slot(SLOT_TIMER, 12'h000), 32'h9);
    wait_irq(0); t0 = cyc;
    wr(slot(SLOT_TIMER, 12'h00C), 32'h1);
    wait_irq(0); t1 = cyc;
    check(t1 - t0 == 10, $sformatf("timer period %0d clocks, exp 10", t1 - t0));
    wr(slot(SLOT_TIMER, 12'h00C), 32'h1);

    // half-rate APB clock: the timer counts on APB clock cycles only
    apb_clk_div = 3'd1;
    wait_irq(0); t0 = cyc;
    wr(slot(SLOT_TIMER, 12'h00C), 32'h1);
    wait_irq(0); t1 = cyc;
    check(t1 - t0 == 20, $sformatf("timer period at half APB rate %0d, exp 20", t1 - t0));
    wr(slot(SLOT_TIMER, 12'h000), 32'h0);
    wr(slot(SLOT_TIMER, 12'h00C), 32'h1);
    rd_check(slot(SLOT_TIMER, 12'h008), 32'd9, "timer RELOAD through slow APB");

    // back-to-back APB transfers, one into an empty register of the timer
    bfm.pair(1'b1, slot(SLOT_TIMER, 12'h008), 32'd77, 1'b0, slot(SLOT_TIMER, 12'h008), 0,
             r0, e0, r1, e1);
    check(r1 == 32'd77, "back-to-back APB write then read");
    apb_clk_div = 3'd0;
    bfm.pair(1'b1, slot(SLOT_TDSP, 12'h004), 32'hD5D5, 1'b0, slot(SLOT_TDSP, 12'h004), 0,
             r0, e0, r1, e1);
    check(r1 == 32'hD5D5, "back-to-back at full rate");

    // dual timer, channel 0 one-shot
    wr(slot(SLOT_DUALTMR, 12'h000), 32'd5);
    wr(slot(SLOT_DUALTMR, 12'h008), 32'h7);
    wait_irq(1);
    rd_check(slot(SLOT_DUALTMR, 12'h008), 32'h6, "one-shot stopped itself");
    wr(slot(SLOT_DUALTMR, 12'h00C), 32'h1);
    check(irq[1] == 1'b0, "dual timer interrupt cleared");

    // UART loop-back
    wr(slot(SLOT_UART, 12'h010), 32'd4);
    wr(slot(SLOT_UART, 12'h008), 32'hB);        // TX, RX, RX irq
    wr(slot(SLOT_UART, 12'h000), 32'hC5);
    wait_irq(2);
    rd_check(slot(SLOT_UART, 12'h000), 32'hC5, "UART loop-back byte");
    wr(slot(SLOT_UART, 12'h00C), 32'h3);
    wr(slot(SLOT_UART, 12'h008), 32'h0);

    // SPI loop-back
    wr(slot(SLOT_SPI, 12'h00C), 32'd1);
    wr(slot(SLOT_SPI, 12'h008), 32'h7);
    check(spi_ss_n == 1'b0, "SPI slave select");
    wr(slot(SLOT_SPI, 12'h000), 32'h3A);
    wait_irq(4);
    rd_check(slot(SLOT_SPI, 12'h000), 32'h3A, "SPI loop-back byte");
    wr(slot(SLOT_SPI, 12'h004), 32'h2);
    wr(slot(SLOT_SPI, 12'h008), 32'h0);

    // watchdog: interrupt, then serviced and stopped
    wr(slot(SLOT_WATCHDOG, 12'h000), 32'd12);
    wr(slot(SLOT_WATCHDOG, 12'h008), 32'h1);
    wait_irq(3);
    rd_check(slot(SLOT_WATCHDOG, 12'h010), 32'h1, "watchdog raw interrupt");
    wr(slot(SLOT_WATCHDOG, 12'h008), 32'h0);
    wr(slot(SLOT_WATCHDOG, 12'h00C), 32'h1);
    check(wdog_reset_req == 1'b0, "no watchdog reset");

    // RTC with a short prescaler
    rd_check(slot(SLOT_RTC, 12'h020), 32'd15_999_999, "RTC default prescaler");
    wr(slot(SLOT_RTC, 12'h020), 32'd3);
    wr(slot(SLOT_RTC, 12'h008), 32'd0);
    wr(slot(SLOT_RTC, 12'h004), 32'd3);
    wr(slot(SLOT_RTC, 12'h010), 32'd1);
    wr(slot(SLOT_RTC, 12'h00C), 32'd1);
    wait_irq(5);
    rd_check(slot(SLOT_RTC, 12'h000), 32'd3, "RTC match count");
    wr(slot(SLOT_RTC, 12'h00C), 32'd0);
    wr(slot(SLOT_RTC, 12'h01C), 32'd1);

    // BLE slot: wait state, PSLVERR -> AHB ERROR
    wr(slot(SLOT_BLE, 12'h008), 32'hB1E0_0008);
    rd_check(slot(SLOT_BLE, 12'h008), 32'hB1E0_0008, "BLE register through the bridge");
    bfm.write(slot(SLOT_BLE, 12'hFFC), 32'h1, e);
    check(e, "PSLVERR gives AHB ERROR");
    bfm.pair(1'b1, slot(SLOT_BLE, 12'hFFC), 32'h1, 1'b0, slot(SLOT_BLE, 12'h008), 0,
             r0, e0, r1, e1);
    check(e0 && !e1 && r1 == 32'hB1E0_0008, "transfer right after an ERROR");

    // everything idle: processor sleeps, clocks stop, BLE interrupt wakes it
    check(irq == 8'h0, "no interrupt pending before sleep");
    cpu_sleeping = 1'b1;
    repeat (20) @(negedge hclk);
    check(cpu_hclk == 1'b0 && n_cpu_asleep >= 19, "processor clock stopped in sleep");
    ble_irq = 1'b1;
    repeat (3) @(negedge hclk);
    check(n_wakeup == 1, "interrupt restarts the processor clock");
    cpu_sleeping = 1'b0;
    ble_irq = 1'b0;
    repeat (5) @(negedge hclk);

    // ---------------------------------------------------------------- coverage
    for (int k = 0; k < NCLK; k++) begin
      $display("clock %-10s on %6d  gated off %6d", clk_name[k], clk_on[k], clk_off[k]);
      check(clk_on[k] > 0 && clk_off[k] > 0, $sformatf("%s clock both running and gated", clk_name[k]));
    end
    $display("bridge WAIT loops %0d, access holds %0d, back-to-back %0d, APB errors %0d, gray steps %0d",
             n_wait_loop, n_access_hold, n_back_to_back, n_apb_err, n_gray_steps);
    $display("AHB default-slave errors %0d, processor sleep cycles %0d, wake-ups %0d",
             n_ahb_err, n_cpu_asleep, n_wakeup);
    check(n_wait_loop > 0, "bridge waited for the APB clock");
    check(n_access_hold > 0, "bridge held the access phase for PREADY");
    check(n_back_to_back > 0, "bridge ran back-to-back transfers");
    check(n_apb_err > 0, "bridge gave a PSLVERR ERROR response");
    check(n_gray_steps > 0, "Gray-coded steps seen");
    check(n_ahb_err > 0, "default slave ERROR");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (50000) @(posedge hclk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
