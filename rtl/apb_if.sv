// apb_if: the APB signal bundle between one master (the bridge) and one
// slave, with the bus rules written as assertions.
//
// Signals follow the APB signal list: psel, penable, pwrite, 32-bit paddr
// and pwdata from the master, pready and 32-bit prdata from the slave, all
// sampled on the rising edge of pclk, reset by the active-low presetn.
//
// The assertions check the three-state bus protocol: penable is only high
// while psel is; a SETUP cycle is always followed by an ACCESS cycle with
// address, direction and write data unchanged; an ACCESS cycle without pready
// is repeated with everything held; a completed ACCESS is followed by
// penable low (IDLE, or SETUP of the next transfer).
interface apb_if
  import apb_pkg::*;
(
  input logic pclk,
  input logic presetn
);

  logic  psel;
  logic  penable;
  logic  pwrite;
  addr_t paddr;
  data_t pwdata;
  logic  pready;
  data_t prdata;

  modport master  (input pclk, presetn, pready, prdata,
                   output psel, penable, pwrite, paddr, pwdata);
  modport slave   (input pclk, presetn, psel, penable, pwrite, paddr, pwdata,
                   output pready, prdata);
  modport monitor (input pclk, presetn, psel, penable, pwrite, paddr, pwdata,
                   pready, prdata);

  a_enable_needs_sel: assert property (@(posedge pclk) disable iff (!presetn)
    penable |-> psel);

  a_setup_then_access: assert property (@(posedge pclk) disable iff (!presetn)
    (psel && !penable) |=> (psel && penable && $stable(paddr) && $stable(pwrite)
                            && $stable(pwdata)));

  a_wait_holds: assert property (@(posedge pclk) disable iff (!presetn)
    (psel && penable && !pready) |=> (psel && penable && $stable(paddr)
                                      && $stable(pwrite) && $stable(pwdata)));

  a_access_ends: assert property (@(posedge pclk) disable iff (!presetn)
    (psel && penable && pready) |=> !penable);

endinterface
