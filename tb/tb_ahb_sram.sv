// Self-checking testbench for the AHB-Lite SRAM.
// Random word, halfword and byte writes are mirrored in a reference array
// and read back; back-to-back write-then-read of the same word checks that
// a read right after a write sees the new data. Every data phase must take
// one cycle (no wait states) and answer OKAY.
module tb_ahb_sram;
  import bt_soc_pkg::*;
  logic clk = 1'b0, rstn = 1'b0;
  always #5 clk = ~clk;

  logic [31:0] haddr, hwdata, hrdata;
  logic [1:0]  htrans;
  logic        hwrite, busy;
  logic [2:0]  hsize;
  ahb_req_t    req;
  ahb_rsp_t    rsp;
  assign req = '{haddr: haddr, htrans: htrans_e'(htrans), hwrite: hwrite, hsize: hsize, hwdata: hwdata};

  ahb_sram dut (.hclk(clk), .hresetn(rstn), .hsel(1'b1), .hready(rsp.hreadyout), .ahb_req(req),
                .ahb_rsp(rsp), .busy);
  ahb_master_bfm bfm (.clk, .haddr, .htrans, .hwrite, .hsize, .hwdata, .hrdata(rsp.hrdata),
                      .hready(rsp.hreadyout), .hresp(rsp.hresp));

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  logic [31:0] ref_mem [64];

  task automatic ref_write(logic [31:0] a, logic [31:0] d, logic [2:0] sz);
    for (int b = 0; b < 4; b++) begin
      bit hit = (sz == 3'd2) || (sz == 3'd1 && (b / 2) == a[1]) || (sz == 3'd0 && b == a[1:0]);
      if (hit) ref_mem[a[7:2]][8*b +: 8] = d[8*b +: 8];
    end
  endtask

  initial begin
    logic [31:0] d, r0, r1;
    logic e, e0, e1;
    repeat (2) @(negedge clk);
    rstn = 1'b1;
    @(negedge clk);
    for (int k = 0; k < 64; k++) begin
      ref_mem[k] = $urandom;
      bfm.write({24'd0, 6'(k), 2'b00}, ref_mem[k], e);
      check(!e && bfm.last_cycles == 1, "word write, one cycle, OKAY");
    end
    for (int k = 0; k < 200; k++) begin
      automatic logic [31:0] a = {24'd0, 6'($urandom_range(0, 63)), 2'($urandom_range(0, 3))};
      automatic logic [2:0]  sz = 3'($urandom_range(0, 2));
      automatic logic [31:0] v = $urandom;
      if (sz == 3'd1) a[0] = 1'b0;
      if (sz == 3'd2) a[1:0] = 2'b00;
      // write lanes carry the data in their own byte positions
      bfm.write_sz(a, v, sz);
      ref_write(a, v, sz);
      bfm.read({a[31:2], 2'b00}, d, e);
      check(!e && d == ref_mem[a[7:2]], $sformatf("read %h exp %h", d, ref_mem[a[7:2]]));
      check(bfm.last_cycles == 1, "read in one cycle");
    end
    for (int k = 0; k < 20; k++) begin
      automatic logic [31:0] a = {24'd0, 6'($urandom_range(0, 63)), 2'b00};
      automatic logic [31:0] v = $urandom;
      bfm.pair(1'b1, a, v, 1'b0, a, 0, r0, e0, r1, e1);
      ref_mem[a[7:2]] = v;
      check(r1 == v, "read right after write sees new data");
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
