// apb_master: the bus-master half of an APB bridge, a three-state machine
// IDLE -> SETUP -> ACCESS.
//
// Requests arrive on a valid/ready port (req_valid, req, req_ready); each
// one becomes one APB transfer. From IDLE an accepted request moves the bus
// to SETUP: psel rises and paddr, pwrite and pwdata are driven. SETUP always
// lasts one cycle and is followed by ACCESS, where penable rises with
// everything else held. ACCESS repeats while the slave holds pready low. On
// the edge where pready is high the transfer completes: the response (rsp,
// with prdata for a read) is registered and rsp_valid pulses for one cycle
// after that edge. If another request is waiting at that edge (req_ready is
// high in a completing ACCESS cycle) the bus goes straight back to SETUP,
// otherwise to IDLE with psel and penable low. Address, direction and write
// data are held after a transfer ends.
//
// Follows the document: the three states, what psel and penable are in each,
// the one-cycle SETUP, and ACCESS going to SETUP or IDLE depending on whether
// another transfer is wanted. Own choices: the request/response port, and
// staying in ACCESS while pready is low (the APB wait state).
module apb_master
  import apb_pkg::*;
(
  input  logic     pclk,
  input  logic     presetn,
  // request / response port
  input  logic     req_valid,
  input  apb_req_t req,
  output logic     req_ready,
  output logic     rsp_valid,
  output apb_rsp_t rsp,
  // APB
  output logic     psel,
  output logic     penable,
  output logic     pwrite,
  output addr_t    paddr,
  output data_t    pwdata,
  input  logic     pready,
  input  data_t    prdata,
  // current bus state, for observation
  output apb_state_e state
);

  apb_state_e state_q, state_d;
  apb_req_t   cur_q;
  logic       done;

  assign done      = (state_q == APB_ACCESS) && pready;
  assign req_ready = (state_q == APB_IDLE) || done;

  always_comb begin
    state_d = state_q;
    unique case (state_q)
      APB_IDLE:   if (req_valid) state_d = APB_SETUP;
      APB_SETUP:  state_d = APB_ACCESS;
      APB_ACCESS: if (pready)    state_d = req_valid ? APB_SETUP : APB_IDLE;
      default:    state_d = APB_IDLE;
    endcase
  end

  always_ff @(posedge pclk or negedge presetn) begin
    if (!presetn) begin
      state_q   <= APB_IDLE;
      cur_q     <= '0;
      rsp_valid <= 1'b0;
      rsp       <= '0;
    end else begin
      state_q   <= state_d;
      rsp_valid <= done;
      if (req_valid && req_ready) cur_q <= req;
      if (done) begin
        rsp.write <= cur_q.write;
        rsp.addr  <= cur_q.addr;
        rsp.rdata <= cur_q.write ? '0 : prdata;
      end
    end
  end

  assign psel    = (state_q != APB_IDLE);
  assign penable = (state_q == APB_ACCESS);
  assign pwrite  = cur_q.write;
  assign paddr   = cur_q.addr;
  assign pwdata  = cur_q.wdata;
  assign state   = state_q;

endmodule
