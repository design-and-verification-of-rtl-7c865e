// apb_system: an APB bus with its master and one memory slave.
//
// The master (apb_master, the APB-facing half of a bridge) turns each request
// on the req port into one IDLE/SETUP/ACCESS transfer; the slave (apb_slave)
// answers it from its word memory, adding transmit_delay wait states to each
// ACCESS. The bus between the two is an apb_if instance, so the protocol
// assertions watch every transfer. The high-performance bus that would feed
// the bridge is not part of the design: its side of the bridge is the req /
// rsp port, brought out as top-level ports. The APB signals and the bus
// state are brought out too, for observation.
//
// Timing with transmit_delay = 0: a request accepted at edge E puts the bus
// in SETUP after E, in ACCESS after E+1, completes at E+2 and shows rsp_valid
// after E+2; back-to-back requests give one transfer every two cycles. Each
// wait state adds one cycle.
module apb_system
  import apb_pkg::*;
#(
  parameter int unsigned DEPTH = 256
) (
  input  logic       pclk,
  input  logic       presetn,
  input  delay_t     transmit_delay,
  input  logic       req_valid,
  input  apb_req_t   req,
  output logic       req_ready,
  output logic       rsp_valid,
  output apb_rsp_t   rsp,
  output logic       psel,
  output logic       penable,
  output logic       pready,
  output apb_state_e state
);

  apb_if bus (.pclk(pclk), .presetn(presetn));

  apb_master u_master (
    .pclk      (pclk),
    .presetn   (presetn),
    .req_valid (req_valid),
    .req       (req),
    .req_ready (req_ready),
    .rsp_valid (rsp_valid),
    .rsp       (rsp),
    .psel      (bus.psel),
    .penable   (bus.penable),
    .pwrite    (bus.pwrite),
    .paddr     (bus.paddr),
    .pwdata    (bus.pwdata),
    .pready    (bus.pready),
    .prdata    (bus.prdata),
    .state     (state)
  );

  apb_slave #(.DEPTH(DEPTH)) u_slave (
    .pclk           (pclk),
    .presetn        (presetn),
    .psel           (bus.psel),
    .penable        (bus.penable),
    .pwrite         (bus.pwrite),
    .paddr          (bus.paddr),
    .pwdata         (bus.pwdata),
    .transmit_delay (transmit_delay),
    .pready         (bus.pready),
    .prdata         (bus.prdata)
  );

  assign psel    = bus.psel;
  assign penable = bus.penable;
  assign pready  = bus.pready;

endmodule
