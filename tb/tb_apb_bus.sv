// Self-checking testbench for the APB slot decoder.
// For every value of PADDR[15:12] and both PSEL levels it checks that PSEL
// reaches exactly the addressed slot, that the slot's response comes back,
// and that an absent slot or an address beyond the last slot answers at
// once with PSLVERR. Runs with 6 slots so that out-of-range slots exist.
module tb_apb_bus;
  import bt_soc_pkg::*;
  localparam int N = 6;
  logic           psel;
  apb_req_t       req;
  apb_rsp_t       rsp;
  logic [N-1:0]   present, psel_slot;
  apb_rsp_t       slot_rsp [N];

  apb_bus #(.NSLOTS(N)) dut (.psel, .req, .rsp, .slot_present(present), .psel_slot, .slot_rsp);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    req = '0;
    for (int s = 0; s < N; s++)
      slot_rsp[s] = '{prdata: 32'h1000 + 32'(s), pready: 1'(s % 2), pslverr: 1'b0};
    present = 6'b101111;
    for (int p = 0; p < 2; p++) begin
      for (int a = 0; a < 16; a++) begin
        psel = 1'(p);
        req.paddr = {4'(a), 12'h0A4};
        #1;
        if (a < N && present[a]) begin
          check(psel_slot == (N'(p) << a), $sformatf("psel to slot %0d", a));
          check(rsp.prdata == 32'h1000 + 32'(a) && rsp.pready == 1'(a % 2) && !rsp.pslverr,
                $sformatf("response of slot %0d", a));
        end else begin
          check(psel_slot == '0, $sformatf("no psel for empty slot %0d", a));
          check(rsp.pready && rsp.pslverr, $sformatf("error for empty slot %0d", a));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
