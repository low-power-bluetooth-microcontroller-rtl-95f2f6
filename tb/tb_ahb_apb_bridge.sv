// Self-checking testbench for the AHB-Lite to APB bridge.
//
// An AHB master process issues single and back-to-back (pipelined)
// transfers; an APB slave model answers with a configurable number of wait
// states and with PSLVERR for addresses in 0xF000-0xFFFF. The APB clock
// enable runs at full rate, at one cycle in three, or at random. Checks:
// read data against a reference copy of the slave memory, the two-cycle
// ERROR response, the data-phase length of an isolated transfer (4 cycles
// at full APB rate, 3 for a back-to-back one), APB protocol stability, the
// Gray coding of the normal state path, and that every arc of the state
// diagram was taken at least once.
module tb_ahb_apb_bridge;
  import bt_soc_pkg::*;

  logic clk = 1'b0, rstn = 1'b0;
  always #5 clk = ~clk;

  logic          hsel;
  ahb_req_t      ahb_req;
  ahb_rsp_t      ahb_rsp;
  logic          pclken, psel, busy;
  apb_req_t      apb_req;
  apb_rsp_t      apb_rsp;
  bridge_state_e state;

  ahb_apb_bridge dut (
    .hclk(clk), .hresetn(rstn), .hsel, .hready(ahb_rsp.hreadyout), .ahb_req, .ahb_rsp,
    .pclken, .psel, .apb_req, .apb_rsp, .busy, .state
  );

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  // ---------------------------------------------------------------- pclken
  int pmode = 0;    // 0: always, 1: one in three, 2: random
  int pcnt  = 0;
  always_ff @(posedge clk) pcnt <= pcnt + 1;
  always_comb begin
    unique case (pmode)
      0:       pclken = 1'b1;
      1:       pclken = (pcnt % 3 == 0);
      default: pclken = rand_bit;
    endcase
  end
  logic rand_bit = 1'b1;
  always @(negedge clk) rand_bit = 1'($urandom_range(0, 1));

  // ---------------------------------------------------------------- APB slave model
  logic [31:0] smem [16];
  int          wait_states = 0;
  int          ws_cnt = 0;
  assign apb_rsp.pready  = (ws_cnt >= wait_states);
  assign apb_rsp.pslverr = apb_rsp.pready && (apb_req.paddr[15:12] == 4'hF);
  assign apb_rsp.prdata  = apb_rsp.pready ? smem[apb_req.paddr[5:2]] : 32'hDEAD_BEEF;

  logic [15:0] setup_addr;
  logic        setup_write;
  always @(posedge clk) begin
    if (pclken && psel) begin
      if (!apb_req.penable) begin
        setup_addr  <= apb_req.paddr;
        setup_write <= apb_req.pwrite;
        ws_cnt      <= 0;
      end else begin
        check(apb_req.paddr == setup_addr && apb_req.pwrite == setup_write,
              "APB address/direction stable from setup to access");
        if (apb_rsp.pready) begin
          if (apb_req.pwrite && !apb_rsp.pslverr) smem[apb_req.paddr[5:2]] <= apb_req.pwdata;
          ws_cnt <= 0;
        end else ws_cnt <= ws_cnt + 1;
      end
    end
  end

  // ---------------------------------------------------------------- arc coverage
  int arc [bridge_state_e][bridge_state_e];
  bridge_state_e prev_state = ST_IDLE;
  always @(posedge clk) begin
    if (rstn) begin
      arc[prev_state][state] = arc[prev_state][state] + 1;
      if (prev_state != state && state != ST_TRNF_ERR_1 &&
          prev_state inside {ST_IDLE, ST_WAIT, ST_TRNF_1, ST_TRNF_2})
        check($countones(prev_state ^ state) == 1, "Gray step on the transfer path");
    end
    prev_state = state;
  end

  // ---------------------------------------------------------------- AHB master
  typedef struct { logic write; logic [15:0] addr; logic [31:0] data; } xfer_t;
  logic [31:0] ref_mem [16];
  int          last_lat;

  // Runs the transfers back to back. Drives at negedge, looks at HREADY at
  // negedge (stable), so the DUT samples at posedge without races.
  task automatic run(xfer_t q[$], bit pipelined);
    int i = 0;
    int lat;
    bit err_seen;
    while (i < q.size()) begin
      // address phase of q[i]
      hsel = 1'b1;
      ahb_req.htrans = HTRANS_NONSEQ;
      ahb_req.haddr  = {16'h4000, q[i].addr};
      ahb_req.hwrite = q[i].write;
      ahb_req.hsize  = 3'b010;
      while (!ahb_rsp.hreadyout) @(negedge clk);
      @(negedge clk);   // address sampled at the posedge in between
      // data phase: next address (if pipelined) or idle
      if (pipelined && i + 1 < q.size()) begin
        ahb_req.haddr  = {16'h4000, q[i+1].addr};
        ahb_req.hwrite = q[i+1].write;
      end else begin
        hsel = 1'b0;
        ahb_req.htrans = HTRANS_IDLE;
      end
      ahb_req.hwdata = q[i].data;
      lat = 1;
      err_seen = 1'b0;
      while (!ahb_rsp.hreadyout) begin
        if (ahb_rsp.hresp) err_seen = 1'b1;
        @(negedge clk);
        lat++;
      end
      last_lat = lat;
      if (q[i].addr[15:12] == 4'hF) begin
        check(err_seen && ahb_rsp.hresp, "two-cycle ERROR response for PSLVERR");
      end else begin
        check(!ahb_rsp.hresp && !err_seen, "OKAY response");
        if (q[i].write) ref_mem[q[i].addr[5:2]] = q[i].data;
        else check(ahb_rsp.hrdata == ref_mem[q[i].addr[5:2]],
                   $sformatf("read data %h exp %h", ahb_rsp.hrdata, ref_mem[q[i].addr[5:2]]));
      end
      if (pipelined && i + 1 < q.size()) begin
        // the next address phase completes at this same posedge
        i++;
        ahb_req.hwdata = q[i].data;
        @(negedge clk);
        lat = 1;
        err_seen = 1'b0;
        // treat as continuing data phase of q[i]
        while (!ahb_rsp.hreadyout) begin
          if (ahb_rsp.hresp) err_seen = 1'b1;
          @(negedge clk);
          lat++;
        end
        last_lat = lat;
        if (q[i].addr[15:12] == 4'hF) check(err_seen && ahb_rsp.hresp, "pipelined ERROR");
        else begin
          check(!ahb_rsp.hresp && !err_seen, "pipelined OKAY");
          if (q[i].write) ref_mem[q[i].addr[5:2]] = q[i].data;
          else check(ahb_rsp.hrdata == ref_mem[q[i].addr[5:2]], "pipelined read data");
        end
        hsel = 1'b0;
        ahb_req.htrans = HTRANS_IDLE;
      end
      i++;
    end
    hsel = 1'b0;
    ahb_req.htrans = HTRANS_IDLE;
    @(negedge clk);
  endtask

  function automatic xfer_t mk(logic w, logic [15:0] a, logic [31:0] d);
    xfer_t x; x.write = w; x.addr = a; x.data = d; return x;
  endfunction

  initial begin
    xfer_t q[$];
    for (int k = 0; k < 16; k++) begin smem[k] = 32'(k) * 32'h0101_0101; ref_mem[k] = smem[k]; end
    hsel = 1'b0;
    ahb_req = '0;
    repeat (3) @(negedge clk);
    rstn = 1'b1;
    @(negedge clk);

    // isolated transfers at full APB rate: latency check
    run('{mk(1, 16'h0004, 32'hCAFE_0001)}, 0);
    check(last_lat == 4, $sformatf("isolated write data phase %0d cycles, exp 4", last_lat));
    run('{mk(0, 16'h0004, 0)}, 0);
    check(last_lat == 4, $sformatf("isolated read data phase %0d cycles, exp 4", last_lat));
    run('{mk(1, 16'hF000, 32'h1)}, 0);

    // back-to-back at full rate: second transfer goes OK -> TRNF_1
    run('{mk(1, 16'h0008, 32'hA5A5_0008), mk(0, 16'h0008, 0)}, 1);
    check(last_lat == 3, $sformatf("back-to-back data phase %0d cycles, exp 3", last_lat));
    run('{mk(1, 16'hF004, 32'h2), mk(0, 16'h0004, 0)}, 1);        // ERR_2 -> TRNF_1

    // slow APB clock: WAIT and TRNF loops, OK/ERR_2 -> WAIT
    pmode = 1;
    run('{mk(1, 16'h000C, 32'h1234_5678), mk(0, 16'h000C, 0)}, 1);
    run('{mk(0, 16'hF008, 0), mk(1, 16'h0010, 32'h7777_0010)}, 1);
    run('{mk(0, 16'h0010, 0)}, 0);

    // wait states and random APB enables, random traffic
    pmode = 2;
    for (int r = 0; r < 60; r++) begin
      wait_states = $urandom_range(0, 2);
      q = {};
      for (int k = 0; k < 3; k++)
        q.push_back(mk(1'($urandom_range(0, 1)),
                       ($urandom_range(0, 7) == 0) ? 16'hF000 : {10'd0, 4'($urandom_range(0, 15)), 2'b00},
                       $urandom));
      run(q, 1'($urandom_range(0, 1)));
    end
    pmode = 0;
    wait_states = 0;
    run('{mk(0, 16'h0000, 0)}, 0);

    // every arc of the state diagram taken
    begin
      automatic bridge_state_e arcs [15][2] = '{
        '{ST_IDLE, ST_WAIT}, '{ST_WAIT, ST_WAIT}, '{ST_WAIT, ST_TRNF_1},
        '{ST_TRNF_1, ST_TRNF_1}, '{ST_TRNF_1, ST_TRNF_2}, '{ST_TRNF_2, ST_TRNF_2},
        '{ST_TRNF_2, ST_TRNF_ERR_1}, '{ST_TRNF_2, ST_TRNF_OK}, '{ST_TRNF_ERR_1, ST_TRNF_ERR_2},
        '{ST_TRNF_ERR_2, ST_IDLE}, '{ST_TRNF_ERR_2, ST_WAIT}, '{ST_TRNF_ERR_2, ST_TRNF_1},
        '{ST_TRNF_OK, ST_IDLE}, '{ST_TRNF_OK, ST_WAIT}, '{ST_TRNF_OK, ST_TRNF_1}};
      foreach (arcs[a]) begin
        automatic int n = 0;
        if (arc.exists(arcs[a][0]) && arc[arcs[a][0]].exists(arcs[a][1])) n = arc[arcs[a][0]][arcs[a][1]];
        $display("arc %s -> %s : %0d", arcs[a][0].name(), arcs[a][1].name(), n);
        check(n > 0, $sformatf("arc %s -> %s taken", arcs[a][0].name(), arcs[a][1].name()));
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
