// Self-checking testbench for the AHB-Lite GPIO.
// Checks DATA/DATAOUT writes reaching gpio_out, OUTENSET/OUTENCLR on
// gpio_oe, and pin levels read back through the two-flop synchroniser
// (visible two clocks after a change), with no wait states.
module tb_ahb_gpio;
  import bt_soc_pkg::*;
  logic clk = 1'b0, rstn = 1'b0;
  always #5 clk = ~clk;

  logic [31:0] haddr, hwdata, gpio_in, gpio_out, gpio_oe;
  logic [1:0]  htrans;
  logic        hwrite, busy;
  logic [2:0]  hsize;
  ahb_req_t    req;
  ahb_rsp_t    rsp;
  assign req = '{haddr: haddr, htrans: htrans_e'(htrans), hwrite: hwrite, hsize: hsize, hwdata: hwdata};

  ahb_gpio dut (.hclk(clk), .hclk_sync(clk), .hresetn(rstn), .hsel(1'b1), .hready(rsp.hreadyout),
                .ahb_req(req), .ahb_rsp(rsp), .gpio_in, .gpio_out, .gpio_oe, .busy);
  ahb_master_bfm bfm (.clk, .haddr, .htrans, .hwrite, .hsize, .hwdata, .hrdata(rsp.hrdata),
                      .hready(rsp.hreadyout), .hresp(rsp.hresp));

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  initial begin
    logic [31:0] d, oe;
    logic e;
    gpio_in = 32'h0;
    repeat (2) @(negedge clk);
    rstn = 1'b1;
    check(gpio_oe == 0 && gpio_out == 0, "reset state");
    oe = 0;
    for (int k = 0; k < 20; k++) begin
      automatic logic [31:0] v = $urandom, s = $urandom, c = $urandom;
      bfm.write(32'h4001_0000 + ((k % 2) ? 32'h4 : 32'h0), v, e);
      check(gpio_out == v && !e, "DATA/DATAOUT drives pins");
      bfm.read(32'h4001_0004, d, e); check(d == v, "DATAOUT read-back");
      bfm.write(32'h4001_0010, s, e); oe |= s;
      check(gpio_oe == oe, "OUTENSET");
      bfm.write(32'h4001_0014, c, e); oe &= ~c;
      check(gpio_oe == oe, "OUTENCLR");
      bfm.read(32'h4001_0010, d, e); check(d == oe, "OUTEN read-back");
      gpio_in = $urandom;
      @(negedge clk); @(negedge clk);
      bfm.read(32'h4001_0000, d, e);
      check(d == gpio_in && bfm.last_cycles == 1, $sformatf("pin read %h exp %h", d, gpio_in));
    end
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
