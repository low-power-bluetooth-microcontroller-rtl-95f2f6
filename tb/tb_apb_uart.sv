// Self-checking testbench for the APB UART.
// The transmitter's line is decoded by the testbench at mid-bit and
// compared with the byte written (start bit, 8 data bits LSB first, stop
// bit, each BAUDDIV clocks). The receiver is fed frames built by the
// testbench, then through a loop-back of txd. Checks also the STATE and
// INTSTATUS flags, the receive overrun flag, interrupt masking and clk_req.
module tb_apb_uart;
  import bt_soc_pkg::*;
  localparam int BAUD = 6;
  logic clk = 1'b0, rstn = 1'b0;
  always #5 clk = ~clk;

  logic psel, irq, clk_req, txd, rxd, tb_rxd = 1'b1, loopback = 1'b0;
  apb_req_t req;
  apb_rsp_t rsp;
  assign rxd = loopback ? txd : tb_rxd;
  apb_uart dut (.pclk(clk), .presetn(rstn), .psel, .req, .rsp, .rxd, .txd, .irq, .clk_req);
  apb_master_bfm bfm (.clk, .psel, .req, .rsp);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  // line decoder: waits for a start bit and samples each bit in its middle
  task automatic decode_tx(output logic [7:0] b, output bit frame_ok);
    @(negedge txd);
    repeat (BAUD / 2) @(posedge clk);
    frame_ok = (txd == 1'b0);
    for (int k = 0; k < 8; k++) begin
      repeat (BAUD) @(posedge clk);
      b[k] = txd;
    end
    repeat (BAUD) @(posedge clk);
    frame_ok &= (txd == 1'b1);
  endtask

  task automatic send_rx(input logic [7:0] b);
    logic [9:0] f = {1'b1, b, 1'b0};
    for (int k = 0; k < 10; k++) begin
      tb_rxd = f[k];
      repeat (BAUD) @(posedge clk);
    end
  endtask

  initial begin
    logic [31:0] d;
    logic [7:0]  got;
    bit          ok;
    repeat (2) @(negedge clk);
    rstn = 1'b1;
    check(clk_req == 1'b0 && txd == 1'b1, "idle after reset");
    bfm.write(16'h010, BAUD);
    bfm.read (16'h010, d); check(d == BAUD, "BAUDDIV read-back");
    bfm.write(16'h008, 32'h5);            // TX enable, TX irq enable
    // transmit two bytes, the second buffered behind the first
    fork
      begin
        decode_tx(got, ok); check(ok && got == 8'hA5, $sformatf("TX byte 1 %h", got));
        decode_tx(got, ok); check(ok && got == 8'h3C, $sformatf("TX byte 2 %h", got));
      end
      begin
        bfm.write(16'h000, 32'hA5);
        check(clk_req == 1'b1, "clock requested while sending");
        bfm.write(16'h000, 32'h3C);
        bfm.read(16'h004, d); check(d[0] == 1'b1, "TX buffer full while first byte shifts");
      end
    join
    check(irq == 1'b1, "TX interrupt");
    bfm.read(16'h00C, d); check(d[0] == 1'b1, "TX INTSTATUS");
    bfm.write(16'h00C, 32'h1);
    check(irq == 1'b0, "TX interrupt cleared");
    repeat (2) @(negedge clk);
    check(clk_req == 1'b0, "idle again: no clock request");
    // receive a frame from the line
    bfm.write(16'h008, 32'hA);            // RX enable, RX irq enable
    check(clk_req == 1'b1, "receiver enabled: clock requested");
    send_rx(8'h96);
    repeat (2) @(negedge clk);
    check(irq == 1'b1, "RX interrupt");
    bfm.read(16'h004, d); check(d[1] == 1'b1, "RX buffer full");
    bfm.read(16'h000, d); check(d[7:0] == 8'h96, $sformatf("RX byte %h", d[7:0]));
    bfm.read(16'h004, d); check(d[1] == 1'b0, "RX buffer emptied by read");
    bfm.write(16'h00C, 32'h2);
    // overrun: two frames without reading
    send_rx(8'h11);
    send_rx(8'h22);
    repeat (2) @(negedge clk);
    bfm.read(16'h004, d); check(d[3] == 1'b1, "RX overrun");
    bfm.read(16'h000, d); check(d[7:0] == 8'h22, "newest byte kept");
    bfm.write(16'h004, 32'h8);
    bfm.read(16'h004, d); check(d[3] == 1'b0, "overrun cleared");
    // loop-back
    loopback = 1'b1;
    bfm.write(16'h008, 32'hB);
    bfm.write(16'h000, 32'h5A);
    repeat (12 * BAUD) @(negedge clk);
    bfm.read(16'h000, d); check(d[7:0] == 8'h5A, $sformatf("loop-back byte %h", d[7:0]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
