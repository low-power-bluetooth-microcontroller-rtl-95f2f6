// Self-checking testbench for the APB dual timer.
// Channel 0 runs periodic with LOAD = 4 (interrupt every 5 clocks);
// channel 1 runs one-shot with LOAD = 7 and must fire once and stop.
// Also checks RIS/MIS, INTCLR, read-back, independence of the channels
// and clk_req.
module tb_apb_dualtimer;
  import bt_soc_pkg::*;
  logic clk = 1'b0, rstn = 1'b0;
  always #5 clk = ~clk;
  int cyc = 0;
  always @(posedge clk) cyc++;

  logic psel, irq, clk_req;
  logic [1:0] irq_ch;
  apb_req_t req;
  apb_rsp_t rsp;
  apb_dualtimer dut (.pclk(clk), .presetn(rstn), .psel, .req, .rsp, .irq_ch, .irq, .clk_req);
  apb_master_bfm bfm (.clk, .psel, .req, .rsp);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  int ch1_rises = 0;
  always @(posedge irq_ch[1]) ch1_rises++;

  initial begin
    logic [31:0] d;
    int t0, t1, start1;
    repeat (2) @(negedge clk);
    rstn = 1'b1;
    bfm.write(16'h000, 32'd4);
    bfm.write(16'h020, 32'd7);
    bfm.read (16'h000, d); check(d == 32'd4, "ch0 LOAD");
    bfm.read (16'h024, d); check(d == 32'd7, "ch1 VALUE loaded by LOAD");
    check(clk_req == 1'b0, "idle: no clock request");
    // channel 1 one-shot
    bfm.write(16'h028, 32'h7);   // enable, one-shot, irq enable
    start1 = cyc;
    @(posedge irq_ch[1]);
    check(cyc - start1 >= 8 && cyc - start1 <= 10, $sformatf("one-shot fires after %0d", cyc - start1));
    bfm.read(16'h028, d); check(d[0] == 1'b0, "one-shot clears its enable");
    bfm.read(16'h024, d); check(d == 32'd0, "one-shot stays at 0");
    bfm.read(16'h030, d); check(d == 32'd1, "ch1 RIS");
    bfm.read(16'h034, d); check(d == 32'd1, "ch1 MIS");
    bfm.write(16'h02C, 32'h1);
    check(irq_ch[1] == 1'b0, "ch1 INTCLR");
    check(clk_req == 1'b0, "stopped: no clock request");
    // channel 0 periodic
    bfm.write(16'h008, 32'h5);   // enable, periodic, irq enable
    check(clk_req == 1'b1, "running: clock request");
    @(posedge irq_ch[0]); t0 = cyc;
    bfm.write(16'h00C, 32'h1);
    @(posedge irq_ch[0]); t1 = cyc;
    check(t1 - t0 == 5, $sformatf("periodic interval %0d, exp 5", t1 - t0));
    bfm.write(16'h00C, 32'h1);
    @(posedge irq_ch[0]); t0 = cyc;
    check(t0 - t1 == 5, "periodic interval again");
    check(irq == 1'b1, "combined irq");
    bfm.read(16'h014, d); check(d == 32'd1, "ch0 MIS");
    bfm.write(16'h008, 32'h1);   // mask
    bfm.read(16'h014, d); check(d == 32'd0, "ch0 masked");
    bfm.read(16'h010, d); check(d == 32'd1, "ch0 RIS still set");
    check(ch1_rises == 1, "one-shot fired exactly once");
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
