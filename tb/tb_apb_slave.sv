// tb_apb_slave: self-checking test of the APB slave and its memory.
//
// The testbench acts as the bus master. It replays the directed write/read
// sequence of the reference simulation (address 1 <- cccccccc, 2 <- 00001111,
// 3 <- 10101010, 2 <- 11110000, each read back) and the 000000aa/000000cc
// pair, then random writes and reads against a reference memory with every
// wait-state setting 0..7. For each transfer it checks that pready is low in
// SETUP, stays low for exactly transmit_delay ACCESS cycles and then rises
// (so a transfer takes 2 + transmit_delay cycles), that prdata carries the
// stored word when pready is high, and that each write strobes the memory
// exactly once.
module tb_apb_slave;
  import apb_pkg::*;

  localparam int unsigned DEPTH = 256;   // the slave's default depth

  logic   pclk = 1'b0, presetn = 1'b0;
  logic   psel = 1'b0, penable = 1'b0, pwrite = 1'b0;
  addr_t  paddr = '0;
  data_t  pwdata = '0;
  delay_t transmit_delay = '0;
  logic   pready;
  data_t  prdata;

  int checks = 0, failures = 0;
  int wr_pulses = 0;
  data_t ref_mem [DEPTH];
  bit    written [DEPTH];

  apb_slave dut (.*);

  always #5 pclk = ~pclk;

  always @(posedge pclk) if (dut.wr) wr_pulses++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // One APB transfer; signals change just after a rising edge.
  task automatic xfer(input bit wr, input addr_t a, input data_t d,
                      input delay_t dly, output data_t rdata);
    int waits, pulses_before;
    pulses_before = wr_pulses;
    transmit_delay = dly;
    // SETUP
    psel = 1'b1; penable = 1'b0; pwrite = wr; paddr = a; pwdata = d;
    #1 check(!pready, "pready low in SETUP");
    @(posedge pclk); #1;
    // ACCESS
    penable = 1'b1;
    waits = 0;
    while (!pready) begin
      waits++;
      if (waits > 20) break;
      @(posedge pclk); #1;
    end
    check(waits == int'(dly), $sformatf("wait states %0d, expected %0d", waits, dly));
    rdata = prdata;
    @(posedge pclk); #1;
    psel = 1'b0; penable = 1'b0;
    check(wr_pulses - pulses_before == (wr ? 1 : 0),
          $sformatf("memory write strobes %0d", wr_pulses - pulses_before));
  endtask

  task automatic wr_word(input addr_t a, input data_t d, input delay_t dly);
    data_t dummy;
    xfer(1'b1, a, d, dly, dummy);
    ref_mem[a % DEPTH] = d;
    written[a % DEPTH] = 1'b1;
  endtask

  task automatic rd_word(input addr_t a, input data_t exp, input delay_t dly);
    data_t got;
    xfer(1'b0, a, '0, dly, got);
    check(got == exp, $sformatf("read addr %h: got %h expected %h", a, got, exp));
  endtask

  initial begin : watchdog
    repeat (50000) @(posedge pclk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    addr_t a;
    time   cyc0;
    foreach (written[i]) written[i] = 1'b0;
    repeat (3) @(posedge pclk);
    #1 check(!pready && prdata == '0, "outputs after reset");
    presetn = 1'b1;
    @(posedge pclk); #1;

    // Directed sequence of the reference simulation (zero wait states).
    wr_word(32'h1, 32'hcccc_cccc, 3'd0); rd_word(32'h1, 32'hcccc_cccc, 3'd0);
    wr_word(32'h2, 32'h0000_1111, 3'd0); rd_word(32'h2, 32'h0000_1111, 3'd0);
    wr_word(32'h3, 32'h1010_1010, 3'd0); rd_word(32'h3, 32'h1010_1010, 3'd0);
    wr_word(32'h2, 32'h1111_0000, 3'd0); rd_word(32'h2, 32'h1111_0000, 3'd0);
    rd_word(32'h1, 32'hcccc_cccc, 3'd0);
    // Write/read pair with one wait state.
    wr_word(32'h1, 32'h0000_00aa, 3'd1); rd_word(32'h1, 32'h0000_00aa, 3'd1);
    wr_word(32'h2, 32'h0000_00cc, 3'd1); rd_word(32'h2, 32'h0000_00cc, 3'd1);

    // Zero-wait transfer takes exactly two cycles from SETUP to completion.
    cyc0 = $time;
    wr_word(32'h10, 32'h5555_aaaa, 3'd0);
    check(($time - cyc0) == 20, $sformatf("zero-wait write took %0t", $time - cyc0));

    // Random traffic with every wait-state setting.
    for (int i = 0; i < 300; i++) begin
      a = addr_t'($urandom_range(DEPTH-1));
      if ($urandom_range(1) == 0 || !written[a])
        wr_word(a, $urandom, delay_t'($urandom_range(7)));
      else
        rd_word(a, ref_mem[a], delay_t'($urandom_range(7)));
    end

    // Read back everything written.
    for (int i = 0; i < DEPTH; i++)
      if (written[i]) rd_word(addr_t'(i), ref_mem[i], delay_t'(i % 8));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
