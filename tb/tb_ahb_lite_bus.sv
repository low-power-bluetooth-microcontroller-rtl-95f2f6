// Self-checking testbench for the AHB-Lite decoder and multiplexer.
// Three slave models answer with their own read data; slave 1 inserts two
// wait states. Checks that HSEL follows the address map, that the data
// phase returns the data of the slave addressed in the preceding address
// phase (also back to back across slaves), that wait states reach the
// master, and that unmapped addresses get the two-cycle ERROR response.
module tb_ahb_lite_bus;
  import bt_soc_pkg::*;
  logic clk = 1'b0, rstn = 1'b0;
  always #5 clk = ~clk;

  logic [31:0] haddr, hwdata;
  logic [1:0]  htrans;
  logic        hwrite, hready;
  logic [2:0]  hsize, hsel;
  ahb_req_t    req;
  ahb_rsp_t    m_rsp;
  ahb_rsp_t    s_rsp [3];
  assign req = '{haddr: haddr, htrans: htrans_e'(htrans), hwrite: hwrite, hsize: hsize, hwdata: hwdata};

  ahb_lite_bus dut (.hclk(clk), .hresetn(rstn), .m_req(req), .m_rsp, .hready, .hsel, .s_rsp);
  ahb_master_bfm bfm (.clk, .haddr, .htrans, .hwrite, .hsize, .hwdata, .hrdata(m_rsp.hrdata),
                      .hready(hready), .hresp(m_rsp.hresp));

  // slave models: data = {slave, low address bits}
  logic [15:0] a_q [3];
  logic [2:0]  act_q;
  int          ws [3] = '{0, 2, 0};
  int          wcnt [3];
  for (genvar s = 0; s < 3; s++) begin : g_s
    always @(posedge clk) begin
      if (hready) begin
        act_q[s] <= hsel[s] & htrans[1];
        a_q[s]   <= haddr[15:0];
        wcnt[s]  <= 0;
      end else wcnt[s] <= wcnt[s] + 1;
    end
    assign s_rsp[s].hreadyout = !act_q[s] || (wcnt[s] >= ws[s]);
    assign s_rsp[s].hresp     = 1'b0;
    assign s_rsp[s].hrdata    = {16'(s + 1), a_q[s]};
  end

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  function automatic int exp_slave(logic [31:0] a);
    case (a[31:16])
      16'h0000: return 0;
      16'h4000: return 1;
      16'h4001: return 2;
      default:  return 3;
    endcase
  endfunction

  initial begin
    logic [31:0] d, r0, r1;
    logic e, e0, e1;
    automatic logic [31:0] addrs [6] = '{32'h0000_0010, 32'h4000_2004, 32'h4001_0008,
                               32'h2000_0000, 32'h5000_0000, 32'h4002_0000};
    act_q = '0;
    repeat (2) @(negedge clk);
    rstn = 1'b1;
    @(negedge clk);
    for (int r = 0; r < 40; r++) begin
      automatic logic [31:0] a = addrs[$urandom_range(0, 5)];
      automatic int s = exp_slave(a);
      haddr = a; #1;
      check(hsel == ((s < 3) ? 3'(1 << s) : 3'b000), $sformatf("HSEL for %h", a));
      bfm.read(a, d, e);
      if (s == 3) check(e, $sformatf("ERROR for unmapped %h", a));
      else begin
        check(!e && d == {16'(s + 1), a[15:0]}, $sformatf("data from slave %0d", s));
        check(bfm.last_cycles == 1 + ws[s], $sformatf("data phase %0d cycles", bfm.last_cycles));
      end
    end
    for (int r = 0; r < 30; r++) begin
      automatic logic [31:0] a0 = addrs[$urandom_range(0, 5)], a1 = addrs[$urandom_range(0, 5)];
      automatic int s0 = exp_slave(a0), s1 = exp_slave(a1);
      bfm.pair(1'b0, a0, 0, 1'b0, a1, 0, r0, e0, r1, e1);
      check((s0 == 3) ? e0 : (!e0 && r0 == {16'(s0 + 1), a0[15:0]}), "pipelined first");
      check((s1 == 3) ? e1 : (!e1 && r1 == {16'(s1 + 1), a1[15:0]}), "pipelined second");
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
