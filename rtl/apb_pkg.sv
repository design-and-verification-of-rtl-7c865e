// apb_pkg: widths, phase encoding and request/response types shared by the
// APB master, slave, memory and top level.
//
// The bus is 32 bits wide for both address and data, as in the APB signal
// list. The three bus phases IDLE, SETUP and ACCESS are encoded as an enum.
// The request/response structs describe the simple transfer port through
// which a bridge (or a test) hands one read or write to the APB master; that
// port is this design's own choice, since the high-performance side of the
// bridge is not part of the design.
package apb_pkg;

  localparam int unsigned ADDR_W  = 32;
  localparam int unsigned DATA_W  = 32;
  localparam int unsigned DELAY_W = 3;   // width of the wait-state setting

  typedef logic [ADDR_W-1:0]  addr_t;
  typedef logic [DATA_W-1:0]  data_t;
  typedef logic [DELAY_W-1:0] delay_t;

  // Operating states of the bus.
  typedef enum logic [1:0] {
    APB_IDLE   = 2'd0,
    APB_SETUP  = 2'd1,
    APB_ACCESS = 2'd2
  } apb_state_e;

  // One transfer handed to the master.
  typedef struct packed {
    logic  write;
    addr_t addr;
    data_t wdata;
  } apb_req_t;

  // Completion of one transfer, returned by the master.
  typedef struct packed {
    logic  write;
    addr_t addr;
    data_t rdata;
  } apb_rsp_t;

endpackage
