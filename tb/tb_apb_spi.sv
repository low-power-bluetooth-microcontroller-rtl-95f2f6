// Self-checking testbench for the APB SPI master.
// A mode-0 SPI slave model in the testbench shifts MOSI in on rising SCLK
// and presents its own byte on MISO, MSB first. Checks the bytes exchanged
// both ways, 8 SCLK pulses per frame, the SCLK half period of CLKDIV + 1
// clocks, slave select, the done flag and interrupt, busy and clk_req.
module tb_apb_spi;
  import bt_soc_pkg::*;
  logic clk = 1'b0, rstn = 1'b0;
  always #5 clk = ~clk;
  int cyc = 0;
  always @(posedge clk) cyc++;

  logic psel, irq, clk_req, miso, mosi, sclk, ss_n;
  apb_req_t req;
  apb_rsp_t rsp;
  apb_spi dut (.pclk(clk), .presetn(rstn), .psel, .req, .rsp, .miso, .mosi, .sclk, .ss_n,
               .irq, .clk_req);
  apb_master_bfm bfm (.clk, .psel, .req, .rsp);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  // slave model
  logic [7:0] slv_tx, slv_rx;
  int         rises = 0, last_rise = 0, half = 0;
  int         last_edge = 0;
  assign miso = slv_tx[7];
  always @(posedge sclk) begin
    slv_rx <= {slv_rx[6:0], mosi};
    rises++;
  end
  always @(negedge sclk) slv_tx <= {slv_tx[6:0], 1'b0};
  always @(sclk) begin
    half = cyc - last_edge;
    last_edge = cyc;
  end

  initial begin
    logic [31:0] d;
    repeat (2) @(negedge clk);
    rstn = 1'b1;
    check(sclk == 1'b0 && ss_n == 1'b1, "idle levels");
    bfm.write(16'h00C, 32'd2);             // half period 3 clocks
    bfm.write(16'h008, 32'h7);             // enable, SS active, irq enable
    check(ss_n == 1'b0, "slave select asserted");
    slv_tx = 8'hC3;
    rises = 0;
    bfm.write(16'h000, 32'h5A);
    check(clk_req == 1'b1, "clock requested during frame");
    bfm.read(16'h004, d); check(d[0] == 1'b1, "busy");
    @(posedge irq);
    check(rises == 8, $sformatf("%0d SCLK pulses, exp 8", rises));
    check(half == 3, $sformatf("SCLK half period %0d, exp 3", half));
    check(slv_rx == 8'h5A, $sformatf("slave got %h", slv_rx));
    bfm.read(16'h000, d); check(d[7:0] == 8'hC3, $sformatf("master got %h", d[7:0]));
    bfm.read(16'h004, d); check(d[1:0] == 2'b10, "done, not busy");
    check(clk_req == 1'b0, "no clock request after frame");
    bfm.write(16'h004, 32'h2);
    check(irq == 1'b0, "done cleared");
    // second frame at a faster clock
    bfm.write(16'h00C, 32'd0);
    slv_tx = 8'h0F;
    rises = 0;
    bfm.write(16'h000, 32'hE1);
    @(posedge irq);
    check(rises == 8 && half == 1, "fast frame timing");
    check(slv_rx == 8'hE1, "slave got second byte");
    bfm.read(16'h000, d); check(d[7:0] == 8'h0F, "master got second byte");
    bfm.write(16'h008, 32'h1);
    check(ss_n == 1'b1, "slave select released");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
