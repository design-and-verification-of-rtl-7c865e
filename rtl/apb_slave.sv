// apb_slave: APB slave interface in front of a word memory (apb_mem).
//
// The bridge drives psel, penable, pwrite, paddr and pwdata; the slave
// answers with pready and prdata. A transfer is a SETUP cycle (psel high,
// penable low) followed by one or more ACCESS cycles (psel and penable high);
// it completes on the rising edge at which pready is high in ACCESS.
//
// Wait states: at the end of SETUP the slave samples transmit_delay, the
// number of ACCESS cycles it keeps pready low. With transmit_delay = 0 pready
// rises together with penable, which is the zero-wait write and read cycle
// (address and control set up at T1, penable and pready high from T2, the
// transfer done at T3). pready is a register and drops again after the edge
// that completes the transfer.
//
// Memory side: a write raises wr for the completing ACCESS cycle, with
// addr_wr = paddr and din = pwdata, so the word is stored exactly once. A
// read raises rd from SETUP onward with addr_rd = paddr; the memory reads
// synchronously, so dout, and with it prdata, is valid from the first ACCESS
// cycle. PADDR is a word address.
//
// Follows the document: the port list, the 32-bit buses, the active-low
// reset, the memory signal names WR/RD/ADDR_WR/ADDR_RD/DIN/DOUT, PWRITE
// selecting WR or RD, and a 3-bit TRANSMIT_DELAY setting. Own choices: what
// TRANSMIT_DELAY counts (ACCESS wait cycles), writing only on completion,
// the synchronous memory read, and the memory depth.
module apb_slave
  import apb_pkg::*;
#(
  parameter int unsigned DEPTH = 256
) (
  input  logic   pclk,
  input  logic   presetn,
  input  logic   psel,
  input  logic   penable,
  input  logic   pwrite,
  input  addr_t  paddr,
  input  data_t  pwdata,
  input  delay_t transmit_delay,
  output logic   pready,
  output data_t  prdata
);

  // Memory-side strobes, named as on the memory.
  logic  wr, rd;
  addr_t addr_wr, addr_rd;
  data_t din, dout;

  logic   setup_phase, access_phase;
  delay_t wait_cnt;

  assign setup_phase  = psel && !penable;
  assign access_phase = psel &&  penable;

  // Wait-state counter and pready register.
  always_ff @(posedge pclk or negedge presetn) begin
    if (!presetn) begin
      pready   <= 1'b0;
      wait_cnt <= '0;
    end else if (setup_phase) begin
      pready   <= (transmit_delay == '0);
      wait_cnt <= transmit_delay;
    end else if (access_phase && !pready) begin
      wait_cnt <= wait_cnt - 1'b1;
      pready   <= (wait_cnt == delay_t'(1));
    end else begin
      pready   <= 1'b0;
    end
  end

  assign wr      = access_phase && pready && pwrite;
  assign addr_wr = paddr;
  assign din     = pwdata;
  assign rd      = psel && !pwrite;
  assign addr_rd = paddr;
  assign prdata  = dout;

  apb_mem #(.DEPTH(DEPTH)) u_mem (
    .clk     (pclk),
    .rst_n   (presetn),
    .wr      (wr),
    .addr_wr (addr_wr),
    .din     (din),
    .rd      (rd),
    .addr_rd (addr_rd),
    .dout    (dout)
  );

  // pready is only ever high while the slave is selected and enabled.
  a_pready_in_access: assert property (@(posedge pclk) disable iff (!presetn)
    pready |-> access_phase);

endmodule
