// tb_apb_system: end-to-end test of the APB system at its default size.
//
// Requests enter through the bridge-side port and travel over the APB bus to
// the memory slave. The test first replays the directed sequence of the
// reference simulation (1 <- cccccccc, 2 <- 00001111, 3 <- 10101010,
// 2 <- 11110000, each read back) and the 000000aa / 000000cc write-read pair,
// then runs random reads and writes over the whole memory with random
// wait-state settings, random gaps and back-to-back runs, and finally reads
// every written word back. Read data is compared with a reference memory;
// each response must arrive 3 + transmit_delay cycles after its request was
// accepted; a run of zero-wait back-to-back transfers must sustain one
// transfer per two cycles. It counts writes, reads, zero-wait transfers,
// wait cycles, ACCESS -> SETUP and ACCESS -> IDLE transitions, and counts a
// failure for any of these that never happened.
module tb_apb_system;
  import apb_pkg::*;

  localparam int unsigned DEPTH = 256;   // the top's default depth

  logic       pclk = 1'b0, presetn = 1'b0;
  delay_t     transmit_delay = '0;
  logic       req_valid = 1'b0;
  apb_req_t   req = '0;
  logic       req_ready, rsp_valid, psel, penable, pready;
  apb_rsp_t   rsp;
  apb_state_e state;

  int checks = 0, failures = 0;
  int n_wr = 0, n_rd = 0, n_zero = 0, n_wait = 0, n_b2b = 0, n_idle = 0;
  longint cycle = 0;

  apb_system dut (.*);

  always #5 pclk = ~pclk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0d %s", cycle, what);
    end
  endtask

  // ---------------- scoreboard ----------------
  typedef struct {
    apb_req_t r;
    data_t    exp;
    longint   acc_cycle;
  } item_t;
  item_t  inflight [$];
  int     dly_q [$];
  data_t  ref_mem [DEPTH];
  bit     written [DEPTH];
  int     cur_wait;
  longint first_rsp, last_rsp;
  int     rsp_count;

  always @(posedge pclk) begin
    cycle++;
    if (presetn) begin
      if (state == APB_SETUP) begin
        dly_q.push_back(int'(transmit_delay));
        cur_wait = 0;
      end
      if (state == APB_ACCESS) begin
        if (!pready) begin
          n_wait++;
          cur_wait++;
        end else begin
          if (cur_wait == 0) n_zero++;
          if (req_valid) n_b2b++; else n_idle++;
        end
      end
      if (rsp_valid) begin
        check(inflight.size() > 0 && dly_q.size() > 0, "response without request");
        if (inflight.size() > 0 && dly_q.size() > 0) begin
          item_t it;
          int    d;
          it = inflight.pop_front();
          d  = dly_q.pop_front();
          check(rsp.write == it.r.write && rsp.addr == it.r.addr, "response header");
          if (!it.r.write)
            check(rsp.rdata == it.exp,
                  $sformatf("read %h: got %h expected %h", it.r.addr, rsp.rdata, it.exp));
          check(int'(cycle - it.acc_cycle) == 3 + d,
                $sformatf("latency %0d expected %0d", cycle - it.acc_cycle, 3 + d));
          if (rsp_count == 0) first_rsp = cycle;
          last_rsp = cycle;
          rsp_count++;
        end
      end
      if (req_valid && req_ready) begin
        item_t it;
        int    i;
        i = int'(req.addr % DEPTH);
        it.r = req;
        it.acc_cycle = cycle;
        it.exp = ref_mem[i];
        if (req.write) begin
          ref_mem[i] = req.wdata;
          written[i] = 1'b1;
          n_wr++;
        end else n_rd++;
        inflight.push_back(it);
      end
    end
  end

  // ---------------- stimulus ----------------
  // Present one request and hold it until the system accepts it.
  task automatic issue(input bit wr, input addr_t a, input data_t d);
    @(negedge pclk);
    req_valid = 1'b1;
    req.write = wr;
    req.addr  = a;
    req.wdata = d;
    do @(posedge pclk); while (!req_ready);
    @(negedge pclk);
    req_valid = 1'b0;
  endtask

  // Back-to-back request stream: the next request is placed right after
  // the edge that accepted the previous one.
  task automatic stream(input int n, input bit rand_gap);
    for (int k = 0; k < n; k++) begin
      addr_t a;
      bit    w;
      a = addr_t'($urandom_range(DEPTH - 1));
      if ($urandom_range(3) == 0) a = a + addr_t'(DEPTH);   // upper address bits ignored
      w = ($urandom_range(1) == 1) || !written[a % DEPTH];
      if (rand_gap && $urandom_range(4) == 0) begin
        req_valid = 1'b0;
        repeat ($urandom_range(1, 3)) @(negedge pclk);
      end
      if (rand_gap) transmit_delay = delay_t'($urandom_range(7));
      req_valid = 1'b1;
      req.write = w;
      req.addr  = a;
      req.wdata = $urandom;
      do @(posedge pclk); while (!req_ready);
      @(negedge pclk);
    end
    req_valid = 1'b0;
  endtask

  task automatic drain();
    while (inflight.size() != 0) @(posedge pclk);
    @(negedge pclk);
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge pclk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int  thr_n;
    foreach (written[i]) begin
      written[i] = 1'b0;
      ref_mem[i] = '0;
    end
    rsp_count = 0;
    repeat (3) @(posedge pclk);
    #1 check(state == APB_IDLE && !psel && !penable && !pready && !rsp_valid,
             "idle after reset");
    presetn = 1'b1;

    // Directed sequence, zero wait states. Reads are checked against the
    // reference memory, which by then holds the written words.
    transmit_delay = 3'd0;
    issue(1'b1, 32'h1, 32'hcccc_cccc); issue(1'b0, 32'h1, '0);
    issue(1'b1, 32'h2, 32'h0000_1111); issue(1'b0, 32'h2, '0);
    issue(1'b1, 32'h3, 32'h1010_1010); issue(1'b0, 32'h3, '0);
    issue(1'b1, 32'h2, 32'h1111_0000); issue(1'b0, 32'h2, '0);
    drain();
    check(ref_mem[1] == 32'hcccc_cccc && ref_mem[2] == 32'h1111_0000 &&
          ref_mem[3] == 32'h1010_1010, "directed sequence reference");
    // 000000aa / 000000cc pair with one wait state.
    transmit_delay = 3'd1;
    issue(1'b1, 32'h1, 32'h0000_00aa); issue(1'b0, 32'h1, '0);
    issue(1'b1, 32'h2, 32'h0000_00cc); issue(1'b0, 32'h2, '0);
    drain();

    // Throughput: zero-wait back-to-back, one transfer per two cycles.
    transmit_delay = 3'd0;
    thr_n = 32;
    rsp_count = 0;
    stream(thr_n, 1'b0);
    drain();
    check(int'(last_rsp - first_rsp) == 2 * (thr_n - 1),
          $sformatf("%0d back-to-back transfers spanned %0d cycles", thr_n,
                    last_rsp - first_rsp));

    // Random traffic.
    stream(3000, 1'b1);
    drain();

    // Read every written word back.
    for (int i = 0; i < int'(DEPTH); i++)
      if (written[i]) begin
        transmit_delay = delay_t'(i % 8);
        issue(1'b0, addr_t'(i), '0);
      end
    drain();

    repeat (5) @(posedge pclk);
    check(inflight.size() == 0 && dly_q.size() == 0, "nothing left in flight");
    check(n_wr > 0,   $sformatf("writes %0d", n_wr));
    check(n_rd > 0,   $sformatf("reads %0d", n_rd));
    check(n_zero > 0, $sformatf("zero-wait transfers %0d", n_zero));
    check(n_wait > 0, $sformatf("wait cycles %0d", n_wait));
    check(n_b2b > 0,  $sformatf("ACCESS->SETUP %0d", n_b2b));
    check(n_idle > 0, $sformatf("ACCESS->IDLE %0d", n_idle));
    $display("writes=%0d reads=%0d zero-wait=%0d wait-cycles=%0d access->setup=%0d access->idle=%0d",
             n_wr, n_rd, n_zero, n_wait, n_b2b, n_idle);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
