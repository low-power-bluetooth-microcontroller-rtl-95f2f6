// Self-checking testbench for the APB watchdog.
// With LOAD = 5 the interrupt comes LOAD + 1 clocks after enabling; when
// serviced through INTCLR no reset request appears; when left pending the
// reset request follows LOAD + 1 clocks after the interrupt.
module tb_apb_watchdog;
  import bt_soc_pkg::*;
  logic clk = 1'b0, rstn = 1'b0;
  always #5 clk = ~clk;
  int cyc = 0;
  always @(posedge clk) cyc++;

  logic psel, irq, reset_req, clk_req;
  apb_req_t req;
  apb_rsp_t rsp;
  apb_watchdog dut (.pclk(clk), .presetn(rstn), .psel, .req, .rsp, .irq, .reset_req, .clk_req);
  apb_master_bfm bfm (.clk, .psel, .req, .rsp);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  initial begin
    logic [31:0] d;
    int t0, t1;
    repeat (2) @(negedge clk);
    rstn = 1'b1;
    bfm.write(16'h000, 32'd20);
    bfm.read (16'h004, d); check(d == 32'd20, "LOAD loads the counter");
    check(clk_req == 1'b0, "disabled: no clock request");
    // serviced: INTCLR before each timeout, no interrupt, no reset
    bfm.write(16'h008, 32'h3);
    for (int k = 0; k < 8; k++) bfm.write(16'h00C, 32'h1);
    check(irq == 1'b0 && reset_req == 1'b0, "serviced watchdog stays quiet");
    // interrupt then reset
    bfm.write(16'h000, 32'd5);
    t0 = cyc;
    @(posedge irq); t1 = cyc;
    check(t1 - t0 == 6, $sformatf("interrupt %0d clocks after load, exp 6", t1 - t0));
    bfm.read(16'h010, d); check(d == 32'd1, "RIS");
    @(posedge reset_req);
    check(cyc - t1 == 6, $sformatf("reset %0d clocks after interrupt, exp 6", cyc - t1));
    // without reset enable: no reset request after a fresh start
    rstn = 1'b0; @(negedge clk); rstn = 1'b1;
    check(reset_req == 1'b0, "reset clears request");
    bfm.write(16'h000, 32'd3);
    bfm.write(16'h008, 32'h1);
    repeat (30) @(negedge clk);
    check(irq == 1'b1, "interrupt pending");
    check(reset_req == 1'b0, "no reset without reset enable");
    bfm.write(16'h00C, 32'h1);
    check(irq == 1'b0, "INTCLR clears the interrupt");
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
