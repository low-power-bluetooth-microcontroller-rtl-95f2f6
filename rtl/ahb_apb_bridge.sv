// AHB-Lite to APB bridge with a Gray-coded state machine.
//
// The bridge is an AHB-Lite slave that turns each selected AHB transfer into
// one APB transfer. Its controller has seven states: ST_IDLE, ST_WAIT (an
// AHB transfer is held, waiting for the APB clock enable), ST_TRNF_1 (APB
// setup phase), ST_TRNF_2 (APB access phase), ST_TRNF_OK (transfer done),
// and ST_TRNF_ERR_1 / ST_TRNF_ERR_2 (the two cycles of an AHB ERROR response
// after PSLVERR). The state register uses Gray codes (see bt_soc_pkg) so the
// normal path IDLE -> WAIT -> TRNF_1 -> TRNF_2 -> TRNF_OK toggles one state
// bit per step.
//
// Transitions: IDLE goes to WAIT on a selected transfer. WAIT, TRNF_1 and
// TRNF_2 advance only on cycles with pclken = 1, the APB clock enable, which
// lets the APB run slower than HCLK. TRNF_2 leaves when the slave is ready,
// to TRNF_OK if PSLVERR = 0, else to TRNF_ERR_1, which always goes on to
// TRNF_ERR_2. TRNF_OK and TRNF_ERR_2 drive HREADYOUT high and so can accept
// the next AHB transfer: to TRNF_1 at once if pclken = 1, to WAIT if not,
// or back to IDLE if none is selected.
//
// Timing: the AHB address is registered on acceptance. PWDATA follows
// HWDATA, which the master holds for the whole data phase because HREADYOUT
// stays low until TRNF_OK. Read data is registered at the end of the access
// phase and returned in TRNF_OK. A transfer takes at least 4 HCLK cycles
// from the address phase to HREADYOUT (accept, WAIT, TRNF_1, TRNF_2) plus
// the OK cycle. PREADY wait states of the APB slave extend TRNF_2.
// What the states are and how they connect follows the design; the
// PREADY hold in TRNF_2, the data timing and the Gray code order are this
// design's own choices.
module ahb_apb_bridge
  import bt_soc_pkg::*;
(
  input  logic          hclk,
  input  logic          hresetn,
  // AHB-Lite slave
  input  logic          hsel,
  input  logic          hready,
  input  ahb_req_t      ahb_req,
  output ahb_rsp_t      ahb_rsp,
  // APB clock enable: 1 on HCLK cycles that end with a PCLK edge
  input  logic          pclken,
  // APB master
  output logic          psel,
  output apb_req_t      apb_req,
  input  apb_rsp_t      apb_rsp,
  // status, for clock gating and observation
  output logic          busy,
  output bridge_state_e state
);
  bridge_state_e state_q, state_d;
  logic [15:0]   addr_q;
  logic          write_q;
  logic [31:0]   rdata_q;

  logic accept;     // a new AHB transfer is taken this cycle
  assign accept = hsel & hready & ahb_req.htrans[1];

  always_comb begin
    state_d = state_q;
    unique case (state_q)
      ST_IDLE:       if (accept) state_d = ST_WAIT;
      ST_WAIT:       if (pclken) state_d = ST_TRNF_1;
      ST_TRNF_1:     if (pclken) state_d = ST_TRNF_2;
      ST_TRNF_2:     if (pclken && apb_rsp.pready)
                       state_d = apb_rsp.pslverr ? ST_TRNF_ERR_1 : ST_TRNF_OK;
      ST_TRNF_ERR_1: state_d = ST_TRNF_ERR_2;
      ST_TRNF_OK,
      ST_TRNF_ERR_2: begin
        if (!accept)     state_d = ST_IDLE;
        else if (pclken) state_d = ST_TRNF_1;
        else             state_d = ST_WAIT;
      end
      default:       state_d = ST_IDLE;
    endcase
  end

  always_ff @(posedge hclk or negedge hresetn) begin
    if (!hresetn) begin
      state_q <= ST_IDLE;
      addr_q  <= '0;
      write_q <= 1'b0;
      rdata_q <= '0;
    end else begin
      state_q <= state_d;
      if (accept && (state_q == ST_IDLE || state_q == ST_TRNF_OK ||
                     state_q == ST_TRNF_ERR_2)) begin
        addr_q  <= ahb_req.haddr[15:0];
        write_q <= ahb_req.hwrite;
      end
      if (state_q == ST_TRNF_2 && pclken && apb_rsp.pready)
        rdata_q <= apb_rsp.prdata;
    end
  end

  // APB outputs
  assign psel            = (state_q == ST_TRNF_1) || (state_q == ST_TRNF_2);
  assign apb_req.penable = (state_q == ST_TRNF_2);
  assign apb_req.paddr   = {addr_q[15:2], 2'b00};
  assign apb_req.pwrite  = write_q;
  assign apb_req.pwdata  = ahb_req.hwdata;

  // AHB outputs
  assign ahb_rsp.hreadyout = (state_q == ST_IDLE) || (state_q == ST_TRNF_OK) ||
                             (state_q == ST_TRNF_ERR_2);
  assign ahb_rsp.hresp     = (state_q == ST_TRNF_ERR_1) || (state_q == ST_TRNF_ERR_2);
  assign ahb_rsp.hrdata    = rdata_q;

  assign busy  = (state_q != ST_IDLE);
  assign state = state_q;

  // Gray coding: every step of a transfer without error flips one state bit.
  a_gray_step: assert property (@(posedge hclk) disable iff (!hresetn)
    (state_q inside {ST_IDLE, ST_WAIT, ST_TRNF_1, ST_TRNF_2} && state_d != state_q &&
     state_d != ST_TRNF_ERR_1)
    |-> $countones(state_q ^ state_d) == 1);
  // PENABLE only ever follows a setup phase with PSEL high.
  a_apb_setup: assert property (@(posedge hclk) disable iff (!hresetn)
    $rose(apb_req.penable) |-> $past(psel && !apb_req.penable));
endmodule
