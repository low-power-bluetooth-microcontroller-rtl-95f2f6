// AHB-Lite master bus-functional model for the testbenches.
//
// write() and read() perform one single transfer (NONSEQ address phase, then
// the data phase until HREADY). pair() performs two transfers back to back,
// the second address phase overlapping the first data phase. Signals change
// at the falling clock edge; HREADY, HRDATA and HRESP are looked at in the
// falling-edge half of the cycle, where they are stable. Each data phase
// returns its read data, its ERROR flag and its length in cycles.
module ahb_master_bfm (
  input  logic        clk,
  output logic [31:0] haddr,
  output logic [1:0]  htrans,
  output logic        hwrite,
  output logic [2:0]  hsize,
  output logic [31:0] hwdata,
  input  logic [31:0] hrdata,
  input  logic        hready,
  input  logic        hresp
);
  initial begin
    haddr = '0; htrans = 2'b00; hwrite = 1'b0; hsize = 3'b010; hwdata = '0;
  end

  // cycles of the last data phase, including the ready cycle
  int last_cycles;

  task automatic addr_phase(input logic w, input logic [31:0] a, input logic [2:0] sz);
    haddr = a; htrans = 2'b10; hwrite = w; hsize = sz;
    while (!hready) @(negedge clk);
  endtask

  task automatic data_phase(input logic [31:0] wd, output logic [31:0] rd, output logic err);
    hwdata = wd;
    last_cycles = 1;
    err = 1'b0;
    while (!hready) begin
      if (hresp) err = 1'b1;
      @(negedge clk);
      last_cycles++;
    end
    if (hresp) err = 1'b1;
    rd = hrdata;
  endtask

  task automatic idle();
    htrans = 2'b00;
  endtask

  task automatic xfer(input logic w, input logic [31:0] a, input logic [31:0] wd,
                      input logic [2:0] sz, output logic [31:0] rd, output logic err);
    addr_phase(w, a, sz);
    @(negedge clk);
    idle();
    data_phase(wd, rd, err);
    @(negedge clk);
  endtask

  task automatic write(input logic [31:0] a, input logic [31:0] wd, output logic err);
    logic [31:0] rd;
    xfer(1'b1, a, wd, 3'b010, rd, err);
  endtask

  task automatic write_sz(input logic [31:0] a, input logic [31:0] wd, input logic [2:0] sz);
    logic [31:0] rd;
    logic err;
    xfer(1'b1, a, wd, sz, rd, err);
  endtask

  task automatic read(input logic [31:0] a, output logic [31:0] rd, output logic err);
    xfer(1'b0, a, '0, 3'b010, rd, err);
  endtask

  // two transfers back to back; returns read data and error of both
  task automatic pair(input logic w0, input logic [31:0] a0, input logic [31:0] d0,
                      input logic w1, input logic [31:0] a1, input logic [31:0] d1,
                      output logic [31:0] r0, output logic e0,
                      output logic [31:0] r1, output logic e1);
    addr_phase(w0, a0, 3'b010);
    @(negedge clk);
    haddr = a1; htrans = 2'b10; hwrite = w1;
    data_phase(d0, r0, e0);
    @(negedge clk);
    idle();
    data_phase(d1, r1, e1);
    @(negedge clk);
  endtask
endmodule
