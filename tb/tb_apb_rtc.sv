// Self-checking testbench for the APB real-time clock.
// Uses the default prescaler reset value (checked by read-back: 1 s at
// 16 MHz), then sets PRESCALE = 3 so that the count advances once every
// 4 clocks. Checks the load, the count rate, the match interrupt, masking,
// clearing and clk_req.
module tb_apb_rtc;
  import bt_soc_pkg::*;
  logic clk = 1'b0, rstn = 1'b0;
  always #5 clk = ~clk;
  int cyc = 0;
  always @(posedge clk) cyc++;

  logic psel, irq, clk_req;
  apb_req_t req;
  apb_rsp_t rsp;
  apb_rtc dut (.pclk(clk), .presetn(rstn), .psel, .req, .rsp, .irq, .clk_req);
  apb_master_bfm bfm (.clk, .psel, .req, .rsp);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  initial begin
    logic [31:0] d, d0;
    int t0, t1;
    repeat (2) @(negedge clk);
    rstn = 1'b1;
    bfm.read(16'h020, d); check(d == 32'd15_999_999, "1 s prescaler at 16 MHz after reset");
    bfm.write(16'h020, 32'd3);
    bfm.write(16'h008, 32'd100);
    bfm.read (16'h000, d); check(d == 32'd100, "LR loads DR");
    bfm.write(16'h004, 32'd105);
    bfm.write(16'h010, 32'd1);
    check(clk_req == 1'b0, "stopped: no clock request");
    bfm.write(16'h00C, 32'd1);
    t0 = cyc;
    check(clk_req == 1'b1, "running: clock requested");
    @(posedge irq);
    check(cyc - t0 >= 19 && cyc - t0 <= 21, $sformatf("match after %0d clocks, exp 20", cyc - t0));
    bfm.read(16'h000, d); check(d == 32'd105, $sformatf("DR at match %0d", d));
    bfm.read(16'h014, d); check(d == 32'd1, "RIS");
    bfm.write(16'h010, 32'd0);
    bfm.read(16'h018, d); check(d == 32'd0, "MIS masked");
    check(irq == 1'b0, "irq masked");
    bfm.write(16'h01C, 32'd1);
    bfm.read(16'h014, d); check(d == 32'd0, "ICR clears RIS");
    bfm.read(16'h000, d0); t0 = cyc;
    repeat (40) @(negedge clk);
    bfm.read(16'h000, d); t1 = cyc;
    check(int'(d - d0) >= (t1 - t0) / 4 - 1 && int'(d - d0) <= (t1 - t0) / 4 + 1,
          $sformatf("DR rate: %0d in %0d clocks", d - d0, t1 - t0));
    bfm.write(16'h00C, 32'd0);
    bfm.read(16'h000, d);
    repeat (20) @(negedge clk);
    bfm.read(16'h000, t0); check(32'(t0) == d, "stopped RTC holds");
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
