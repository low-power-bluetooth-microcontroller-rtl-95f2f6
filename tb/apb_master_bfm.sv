// APB master bus-functional model for the peripheral testbenches.
//
// write() and read() perform one APB transfer: a setup phase, then an
// access phase that lasts until PREADY. Signals change at the falling clock
// edge so the slave samples them cleanly at the rising edge. read() returns
// PRDATA as seen in the last access-phase cycle. Both tasks return at a
// falling edge with PSEL low.
module apb_master_bfm
  import bt_soc_pkg::*;
(
  input  logic     clk,
  output logic     psel,
  output apb_req_t req,
  input  apb_rsp_t rsp
);
  initial begin
    psel = 1'b0;
    req  = '0;
  end

  task automatic write(input logic [15:0] addr, input logic [31:0] data);
    @(negedge clk);
    psel = 1'b1; req.penable = 1'b0; req.pwrite = 1'b1; req.paddr = addr; req.pwdata = data;
    @(negedge clk);
    req.penable = 1'b1;
    while (!rsp.pready) @(negedge clk);
    @(negedge clk);
    psel = 1'b0; req.penable = 1'b0;
  endtask

  task automatic read(input logic [15:0] addr, output logic [31:0] data);
    @(negedge clk);
    psel = 1'b1; req.penable = 1'b0; req.pwrite = 1'b0; req.paddr = addr;
    @(negedge clk);
    req.penable = 1'b1;
    while (!rsp.pready) @(negedge clk);
    data = rsp.prdata;
    @(negedge clk);
    psel = 1'b0; req.penable = 1'b0;
  endtask
endmodule
