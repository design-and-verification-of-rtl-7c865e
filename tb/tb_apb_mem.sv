// tb_apb_mem: self-checking test of the slave's word memory.
//
// Writes random words to random addresses while keeping a reference copy,
// then reads them back and checks that dout carries the word one clock after
// rd, that dout holds while rd is low, that a simultaneous write and read of
// different words do not disturb each other, and that addresses alias
// modulo DEPTH.
module tb_apb_mem;
  import apb_pkg::*;

  localparam int unsigned DEPTH = 256;   // the memory's default depth

  logic  clk = 1'b0, rst_n = 1'b0;
  logic  wr = 1'b0, rd = 1'b0;
  addr_t addr_wr = '0, addr_rd = '0;
  data_t din = '0, dout;

  int checks = 0, failures = 0;
  data_t ref_mem [DEPTH];
  bit    written [DEPTH];

  apb_mem dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic do_write(input addr_t a, input data_t d);
    @(negedge clk);
    wr = 1'b1; addr_wr = a; din = d;
    @(negedge clk);
    wr = 1'b0;
    ref_mem[a % DEPTH] = d;
    written[a % DEPTH] = 1'b1;
  endtask

  task automatic do_read(input addr_t a, output data_t d);
    @(negedge clk);
    rd = 1'b1; addr_rd = a;
    @(negedge clk);
    rd = 1'b0;
    d = dout;
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    data_t d, held;
    addr_t a;
    foreach (written[i]) written[i] = 1'b0;
    repeat (2) @(negedge clk);
    check(dout == '0, "dout after reset");
    rst_n = 1'b1;

    // Random writes, then read back every written word.
    for (int i = 0; i < 400; i++) do_write(addr_t'($urandom_range(DEPTH-1)), $urandom);
    for (int i = 0; i < DEPTH; i++) begin
      if (written[i]) begin
        do_read(addr_t'(i), d);
        check(d == ref_mem[i], $sformatf("read back addr %0d: %h vs %h", i, d, ref_mem[i]));
      end
    end

    // dout holds while rd is low, even if addr_rd moves.
    do_read(addr_t'(5), held);
    for (int i = 0; i < 4; i++) begin
      @(negedge clk);
      addr_rd = addr_t'(i + 100);
      check(dout == held, "dout holds while rd low");
    end

    // One-cycle latency: right after the edge that samples rd, dout is new.
    do_write(addr_t'(7), 32'h1234_5678);
    do_write(addr_t'(8), 32'h9abc_def0);
    @(negedge clk);
    rd = 1'b1; addr_rd = addr_t'(7);
    @(negedge clk);
    check(dout == 32'h1234_5678, "latency addr 7");
    addr_rd = addr_t'(8);
    @(negedge clk);
    check(dout == 32'h9abc_def0, "latency addr 8");
    rd = 1'b0;

    // Write and read in the same cycle to different addresses.
    @(negedge clk);
    wr = 1'b1; addr_wr = addr_t'(9); din = 32'hcafe_f00d;
    rd = 1'b1; addr_rd = addr_t'(7);
    @(negedge clk);
    wr = 1'b0; rd = 1'b0;
    check(dout == 32'h1234_5678, "read during write");
    do_read(addr_t'(9), d);
    check(d == 32'hcafe_f00d, "write during read stored");

    // Aliasing: address + DEPTH hits the same word.
    a = addr_t'(DEPTH + 9);
    do_read(a, d);
    check(d == 32'hcafe_f00d, "alias modulo DEPTH");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
