// apb_mem: the word memory that sits behind the APB slave.
//
// It has a write port (wr, addr_wr, din) and a read port (rd, addr_rd, dout),
// the signal names used for the memory in the slave's waveforms. A write
// stores din at addr_wr on the rising clock edge when wr is high. A read is
// synchronous: on the rising edge when rd is high, dout is loaded with the
// word at addr_rd, so the data is there one cycle after rd. When rd is low
// dout holds its last value. The ports carry full 32-bit addresses; the
// memory uses the low $clog2(DEPTH) bits of each, so higher addresses alias.
//
// The depth, the synchronous read and the aliasing are this design's own
// choices: the memory's size and timing are not specified. The array is not
// reset (like an SRAM); dout is reset to zero.
module apb_mem
  import apb_pkg::*;
#(
  parameter int unsigned DEPTH = 256
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  wr,
  input  addr_t addr_wr,
  input  data_t din,
  input  logic  rd,
  input  addr_t addr_rd,
  output data_t dout
);

  localparam int unsigned IDX_W = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  data_t mem [DEPTH];

  wire [IDX_W-1:0] wr_idx = addr_wr[IDX_W-1:0];
  wire [IDX_W-1:0] rd_idx = addr_rd[IDX_W-1:0];

  always_ff @(posedge clk) begin
    if (wr) mem[wr_idx] <= din;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  dout <= '0;
    else if (rd) dout <= mem[rd_idx];
  end

endmodule
