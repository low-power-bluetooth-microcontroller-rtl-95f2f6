// Self-checking testbench for the APB timer.
// Checks register read-back, the count-down rate (one per clock), the
// interrupt period of RELOAD + 1 clocks, interrupt masking and clearing,
// holding the count while disabled, and clk_req.
module tb_apb_timer;
  import bt_soc_pkg::*;
  logic clk = 1'b0, rstn = 1'b0;
  always #5 clk = ~clk;
  int cyc = 0;
  always @(posedge clk) cyc++;

  logic psel, irq, clk_req;
  apb_req_t req;
  apb_rsp_t rsp;
  apb_timer dut (.pclk(clk), .presetn(rstn), .psel, .req, .rsp, .irq, .clk_req);
  apb_master_bfm bfm (.clk, .psel, .req, .rsp);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  initial begin
    logic [31:0] d, d2;
    int c1, c2, rise [$];
    repeat (2) @(negedge clk);
    rstn = 1'b1;
    check(clk_req == 1'b0, "no clock request after reset");
    bfm.write(16'h008, 32'd9);
    bfm.read (16'h008, d);  check(d == 32'd9, "RELOAD read-back");
    bfm.write(16'h004, 32'd1000);
    bfm.read (16'h004, d);  check(d == 32'd1000, "VALUE holds while disabled");
    // run: VALUE decrements once per clock
    bfm.write(16'h000, 32'h1);
    check(clk_req == 1'b1, "clock requested while running");
    bfm.read(16'h004, d);  c1 = cyc;
    bfm.read(16'h004, d2); c2 = cyc;
    check(d - d2 == 32'(c2 - c1), $sformatf("count rate: %0d in %0d cycles", d - d2, c2 - c1));
    check(irq == 1'b0, "irq masked");
    // interrupt period
    bfm.write(16'h004, 32'd9);
    bfm.write(16'h000, 32'h9);
    for (int k = 0; k < 4; k++) begin
      @(posedge irq);
      rise.push_back(cyc);
      bfm.write(16'h00C, 32'h1);
      check(irq == 1'b0, "INTSTATUS write clears irq");
    end
    for (int k = 1; k < 4; k++)
      check(rise[k] - rise[k-1] == 10, $sformatf("irq period %0d, exp 10", rise[k] - rise[k-1]));
    // flag visible in INTSTATUS
    @(posedge irq);
    bfm.read(16'h00C, d); check(d == 32'h1, "INTSTATUS set");
    bfm.write(16'h000, 32'h0);
    bfm.write(16'h00C, 32'h1);
    bfm.read(16'h004, d); repeat (5) @(negedge clk);
    bfm.read(16'h004, d2); check(d == d2, "count holds when disabled");
    check(clk_req == 1'b0, "no clock request when stopped");
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
