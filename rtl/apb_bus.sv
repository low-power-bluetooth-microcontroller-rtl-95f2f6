// APB peripheral bus: slot decoder and response multiplexer.
//
// The bridge's single PSEL is steered to one of NSLOTS peripherals by
// PADDR[15:12], giving each a 4 KB window. The selected slot's PRDATA,
// PREADY and PSLVERR are returned to the bridge. A slot whose slot_present
// bit is 0 has no peripheral: it answers at once with PREADY = 1 and
// PSLVERR = 1, so a stray access ends in an AHB ERROR response. The slot
// size and the error for empty slots are this design's own choices; the
// design only shows the peripherals sharing one APB bus.
module apb_bus
  import bt_soc_pkg::*;
#(
  parameter int unsigned NSLOTS = APB_SLOTS
) (
  input  logic              psel,
  input  apb_req_t          req,
  output apb_rsp_t          rsp,
  input  logic [NSLOTS-1:0] slot_present,
  output logic [NSLOTS-1:0] psel_slot,
  input  apb_rsp_t          slot_rsp [NSLOTS]
);
  localparam int unsigned SW = (NSLOTS > 1) ? $clog2(NSLOTS) : 1;
  logic [3:0]    slot;
  logic [SW-1:0] idx;
  assign slot = req.paddr[15:12];
  assign idx  = slot[SW-1:0];

  always_comb begin
    psel_slot = '0;
    rsp       = '{prdata: '0, pready: 1'b1, pslverr: 1'b1};
    if (32'(slot) < NSLOTS) begin
      if (slot_present[idx]) begin
        psel_slot[idx] = psel;
        rsp            = slot_rsp[idx];
      end
    end
  end
endmodule
