// tb_apb_master: self-checking test of the APB master state machine.
//
// A behavioural slave in the testbench answers each transfer after a random
// number of wait states (0..3) from a small reference memory. A random
// request stream, with gaps and back-to-back runs, is fed to the master.
// Every cycle the testbench checks psel/penable against the reported state,
// that SETUP lasts exactly one cycle and is followed by ACCESS, that ACCESS
// repeats while pready is low, that address, direction and data match the
// accepted request, that each response arrives 3 + waits cycles after its
// request was accepted, and that read data matches. It counts how often the
// bus went ACCESS -> SETUP directly, ACCESS -> IDLE, and waited, and fails
// if any of these never happened.
module tb_apb_master;
  import apb_pkg::*;

  logic       pclk = 1'b0, presetn = 1'b0;
  logic       req_valid = 1'b0;
  apb_req_t   req = '0;
  logic       req_ready, rsp_valid;
  apb_rsp_t   rsp;
  logic       psel, penable, pwrite;
  addr_t      paddr;
  data_t      pwdata;
  logic       pready;
  data_t      prdata;
  apb_state_e state;

  int checks = 0, failures = 0;
  int n_b2b = 0, n_idle = 0, n_wait = 0, n_rd = 0, n_wr = 0;
  longint cycle = 0;

  apb_master dut (.*);

  always #5 pclk = ~pclk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0d %s", cycle, what);
    end
  endtask

  // ---------------- behavioural slave ----------------
  data_t slv_mem [16];
  int    slv_wait, slv_cnt;
  assign pready = psel && penable && (slv_cnt == slv_wait);
  assign prdata = (psel && !pwrite) ? slv_mem[paddr[3:0]] : '0;

  always @(posedge pclk) begin
    if (psel && !penable) begin
      slv_wait <= $urandom_range(3);
      slv_cnt  <= 0;
    end else if (psel && penable) begin
      if (pready) begin
        if (pwrite) slv_mem[paddr[3:0]] <= pwdata;
      end else begin
        slv_cnt <= slv_cnt + 1;
      end
    end
  end

  // ---------------- scoreboard ----------------
  typedef struct {
    apb_req_t r;
    data_t    exp;
    longint   acc_cycle;
  } item_t;
  item_t  pend [$];   // accepted, transfer not yet finished
  item_t  done_q [$]; // finished on the bus, response not yet seen
  int     waits_q [$];
  data_t  ref_mem [16];
  apb_state_e prev_state = APB_IDLE;
  int     cur_waits;
  apb_req_t on_bus;

  always @(posedge pclk) begin
    cycle++;
    if (presetn) begin
      // state encodes psel/penable
      unique case (state)
        APB_IDLE:   check(!psel && !penable, "IDLE outputs");
        APB_SETUP:  check( psel && !penable, "SETUP outputs");
        APB_ACCESS: check( psel &&  penable, "ACCESS outputs");
        default:    check(1'b0, "bad state");
      endcase
      if (prev_state == APB_SETUP) check(state == APB_ACCESS, "SETUP -> ACCESS");
      if (state == APB_SETUP) begin
        check(pend.size() > 0, "SETUP without request");
        if (pend.size() > 0) begin
          on_bus = pend[0].r;
          check(pwrite == on_bus.write && paddr == on_bus.addr &&
                (!on_bus.write || pwdata == on_bus.wdata), "SETUP carries request");
        end
        cur_waits = 0;
      end
      if (state == APB_ACCESS) begin
        check(pwrite == on_bus.write && paddr == on_bus.addr, "ACCESS holds request");
        if (!pready) begin
          cur_waits++;
          n_wait++;
        end else begin
          done_q.push_back(pend.pop_front());
          waits_q.push_back(cur_waits);
          if (req_valid) n_b2b++; else n_idle++;
        end
      end
      // responses
      if (rsp_valid) begin
        check(done_q.size() > 0, "response without transfer");
        if (done_q.size() > 0) begin
          item_t it;
          int    w;
          it = done_q.pop_front();
          w  = waits_q.pop_front();
          check(rsp.write == it.r.write && rsp.addr == it.r.addr, "response header");
          if (!it.r.write)
            check(rsp.rdata == it.exp, $sformatf("read data %h expected %h", rsp.rdata, it.exp));
          check(int'(cycle - it.acc_cycle) == 3 + w,
                $sformatf("latency %0d, expected %0d", cycle - it.acc_cycle, 3 + w));
        end
      end
      // acceptance
      if (req_valid && req_ready) begin
        item_t it;
        it.r = req;
        it.acc_cycle = cycle;
        it.exp = ref_mem[req.addr[3:0]];
        if (req.write) begin
          ref_mem[req.addr[3:0]] = req.wdata;
          n_wr++;
        end else n_rd++;
        pend.push_back(it);
      end
      prev_state = state;
    end
  end

  initial begin : watchdog
    repeat (20000) @(posedge pclk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- stimulus ----------------
  initial begin
    int sent;
    sent = 0;
    for (int i = 0; i < 16; i++) begin
      slv_mem[i] = '0;
      ref_mem[i] = '0;
    end
    slv_wait = 0; slv_cnt = 0;
    repeat (3) @(posedge pclk);
    #1 check(!psel && !penable && !rsp_valid && state == APB_IDLE, "reset state");
    presetn = 1'b1;
    while (sent < 600) begin
      @(negedge pclk);
      if (!req_valid || (req_valid && req_ready_seen)) begin
        if ($urandom_range(3) == 0) begin
          req_valid = 1'b0;
        end else begin
          req_valid = 1'b1;
          req.write = ($urandom_range(1) == 1);
          req.addr  = addr_t'($urandom_range(15));
          req.wdata = $urandom;
          sent++;
        end
      end
    end
    @(negedge pclk);
    while (!(req_valid && req_ready_seen)) @(negedge pclk);
    req_valid = 1'b0;
    repeat (20) @(posedge pclk);
    check(pend.size() == 0 && done_q.size() == 0, "all transfers completed");
    check(n_b2b > 0,  $sformatf("back-to-back ACCESS->SETUP seen %0d times", n_b2b));
    check(n_idle > 0, $sformatf("ACCESS->IDLE seen %0d times", n_idle));
    check(n_wait > 0, $sformatf("wait cycles seen %0d", n_wait));
    check(n_rd > 0 && n_wr > 0, "reads and writes issued");
    $display("back-to-back=%0d to-idle=%0d wait-cycles=%0d reads=%0d writes=%0d",
             n_b2b, n_idle, n_wait, n_rd, n_wr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // req_ready as sampled at the last rising edge
  logic req_ready_seen = 1'b0;
  always @(posedge pclk) req_ready_seen <= req_ready;

endmodule
