// End-to-end testbench for hie_top at its default parameters (64-entry
// transaction buffer, 1500-cycle timeout, 16-entry queue and range table,
// 128-entry trace buffer). It stands in for a small system: a memory region
// answering in about 40 cycles, a UART in about 300, a GPIO block in about
// 100, and an error device that answers every request with an error.
//
//   1. learning: mixed random traffic, with a few memory responses made
//      10-30 times slower than usual (delay anomalies);
//   2. scattered bursts: back-to-back responses from random pages with random
//      latencies, which make the range table insert, split, merge and evict,
//      and overflow the queue in front of it;
//   3. a burst of 65 outstanding requests: the transaction buffer fills, the
//      65th request is not tracked and its response is unmatched;
//   4. the UART stops answering (non-responsive peripheral): the engine must
//      raise the deadlock interrupt TIMEOUT cycles after the first unanswered
//      UART request, record exactly that request last, and freeze the trace.
//
// Checked throughout: transaction-buffer occupancy against the number of
// requests in flight, no deadlock before the bug, every error response
// recorded, every delay record one of the deliberately slowed transactions,
// interrupt timing and the frozen trace. Each mechanism is counted and one
// that never happened counts as a failure.
module tb_hie_top;
  import hie_pkg::*;
  localparam int TIMEOUT = 1500, XB = 64;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic req_valid, rsp_valid, irq_deadlock, irq_delay, irq_clear, tb_halted;
  req_t req;
  rsp_t rsp;
  logic [6:0] tb_rd_addr, tb_wr_ptr;
  trace_t tb_rd_data;
  logic [7:0] tb_n_rec;
  logic [3:0] ret_rd_idx;
  ret_entry_t ret_rd_entry;
  logic [4:0] ret_n_valid;
  logic xb_req_drop, xb_rsp_unmatched, q_overflow;
  logic [6:0] xb_occupancy;
  logic [4:0] q_count;
  logic ev_insert, ev_update, ev_split, ev_merge, ev_evict, ev_period;

  hie_top dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s at cycle %0d", msg, cyc);
    end
  endtask

  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism counters
  int c_insert = 0, c_update = 0, c_split = 0, c_merge = 0, c_evict = 0, c_period = 0;
  int c_qovf = 0, c_drop = 0, c_unmatched = 0;
  always @(posedge clk) if (rst_n) begin
    c_insert += int'(ev_insert); c_update += int'(ev_update); c_split += int'(ev_split);
    c_merge += int'(ev_merge); c_evict += int'(ev_evict); c_period += int'(ev_period);
    c_qovf += int'(q_overflow); c_drop += int'(xb_req_drop); c_unmatched += int'(xb_rsp_unmatched);
  end

  // ---------------------------------------------------------- system model
  localparam longint MEM_BASE = 48'h0000_8000_0000, UART = 48'h0000_1000_0000,
                     GPIO = 48'h0000_1001_2000, ERRDEV = 48'h0000_3000_0000;
  typedef struct {
    bit     busy, tracked, err, slow;
    longint issue, due;
    req_t   r;
  } flight_t;
  flight_t fl [256];
  int in_flight = 0;       // tracked by the engine
  bit uart_dead = 0;
  longint bug_issue = -1;
  int bug_src = -1;
  req_t bug_req;

  typedef struct { logic [7:0] src; page_t pg; anom_e kind; } exp_t;
  exp_t err_exp [$];
  exp_t slow_exp [$];

  // choose a free source id
  function automatic int free_src();
    int s = int'($urandom_range(255));
    for (int k = 0; k < 256; k++) if (!fl[(s + k) % 256].busy) return (s + k) % 256;
    return -1;
  endfunction

  // issue a request in the current cycle (inputs set after the falling edge)
  task automatic issue(input longint addr, input logic [2:0] opc, input longint latency,
                       input bit err, input bit slow);
    int s = free_src();
    if (s < 0) return;
    req_valid   = 1;
    req.opcode  = opc;
    req.source  = 8'(s);
    req.address = 48'(addr);
    req.mask    = 4'($urandom);
    req.size    = 3'd2;
    req.param   = 3'd0;
    fl[s].busy    = 1;
    fl[s].issue   = cyc;
    fl[s].due     = (latency < 0) ? -1 : cyc + latency;
    fl[s].err     = err;
    fl[s].slow    = slow;
    fl[s].r       = req;
    fl[s].tracked = (in_flight < XB);
    if (fl[s].tracked) in_flight++;
    if (latency < 0 && bug_issue < 0) begin
      bug_issue = cyc; bug_src = s; bug_req = req;
    end
  endtask

  function automatic logic [2:0] rsp_opc(input logic [2:0] a);
    return (a == 3'd4) ? 3'd1 : (a <= 3'd1) ? 3'd0 : (a == 3'd5) ? 3'd2 : 3'd1;
  endfunction

  // answer the oldest due request, if any
  task automatic respond();
    int best = -1;
    for (int s = 0; s < 256; s++)
      if (fl[s].busy && fl[s].due >= 0 && fl[s].due <= cyc && !(req_valid && int'(req.source) == s) &&
          (best < 0 || fl[s].due < fl[best].due)) best = s;
    if (best < 0) return;
    rsp_valid  = 1;
    rsp.opcode = rsp_opc(fl[best].r.opcode);
    rsp.source = 8'(best);
    rsp.error  = fl[best].err;
    if (fl[best].tracked) begin
      in_flight--;
      if (fl[best].err) err_exp.push_back('{8'(best), fl[best].r.address[47:12], ANOM_RESP_ERROR});
      if (fl[best].slow) slow_exp.push_back('{8'(best), fl[best].r.address[47:12], ANOM_DELAY});
    end
    fl[best].busy = 0;
  endtask

  function automatic longint jit(input longint base, input int j);
    return base - j + longint'($urandom_range(2 * j));
  endfunction

  // one cycle of ordinary traffic; p_req in percent
  int uart_count = 0;
  localparam int UART_BUG_AFTER = 700;
  task automatic traffic(input int p_req);
    int r;
    if ($urandom_range(99) >= p_req) return;
    r = int'($urandom_range(99));
    if (r < 60) begin
      bit slow = ($urandom_range(99) < 2);
      issue(MEM_BASE + (longint'($urandom_range(32'hFFFF)) << 12) + 64 * longint'($urandom_range(63)),
            ($urandom_range(1) == 0) ? 3'd4 : 3'd0,
            slow ? 700 + longint'($urandom_range(700)) : jit(40, 6), 0, slow);
    end else if (r < 85) begin
      if (uart_dead || uart_count >= UART_BUG_AFTER) begin
        issue(UART + 4 * longint'($urandom_range(7)), 3'd0, -1, 0, 0);
        uart_dead = 1;
      end else begin
        issue(UART + 4 * longint'($urandom_range(7)), ($urandom_range(1) == 0) ? 3'd4 : 3'd0,
              jit(300, 30), 0, 0);
        uart_count++;
      end
    end else if (r < 99) begin
      issue(GPIO + 4 * longint'($urandom_range(15)), ($urandom_range(2) == 0) ? 3'd2 : 3'd4,
            jit(100, 10), 0, 0);
    end else begin
      issue(ERRDEV + (longint'($urandom_range(255)) << 12), 3'd4, jit(20, 2), 1, 0);
    end
  endtask

  task automatic idle_inputs();
    req_valid = 0; rsp_valid = 0; req = '0; rsp = '0;
  endtask

  // occupancy is compared before this cycle's request and response take effect
  int occ_before;

  initial begin
    idle_inputs();
    irq_clear = 0; tb_rd_addr = '0; ret_rd_idx = '0;
    for (int s = 0; s < 256; s++) fl[s].busy = 0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;

    // ---------------- 1. learning traffic
    for (int n = 0; n < 6000; n++) begin
      occ_before = in_flight;
      idle_inputs();
      traffic(35);
      respond();
      #4;
      check(int'(xb_occupancy) == occ_before, "occupancy matches requests in flight");
      check(!irq_deadlock, "no deadlock before the bug");
      @(negedge clk);
    end

    // ---------------- 2. scattered bursts
    for (int b = 0; b < 12; b++) begin
      for (int n = 0; n < 48; n++) begin
        occ_before = in_flight;
        idle_inputs();
        issue((longint'($urandom) << 12) ^ (longint'($urandom_range(15)) << 44), 3'd4,
              200 + longint'($urandom_range(200)), 0, 0);
        respond();
        #4;
        check(int'(xb_occupancy) == occ_before, "occupancy in bursts");
        @(negedge clk);
      end
      for (int n = 0; n < 600; n++) begin
        occ_before = in_flight;
        idle_inputs();
        respond();
        #4;
        check(int'(xb_occupancy) == occ_before, "occupancy while draining");
        check(!irq_deadlock, "no deadlock before the bug");
        @(negedge clk);
      end
    end

    // ---------------- 3. fill the transaction buffer
    for (int n = 0; n < XB + 1; n++) begin
      bit expect_drop;
      occ_before = in_flight;
      expect_drop = (in_flight >= XB);
      idle_inputs();
      issue(GPIO + 4 * longint'(n % 16), 3'd4, 300, 0, 0);
      #4;
      check(xb_req_drop == expect_drop, "request dropped exactly when full");
      @(negedge clk);
    end
    for (int n = 0; n < 800; n++) begin
      idle_inputs();
      respond();
      @(negedge clk);
    end
    check(in_flight == 0 && xb_occupancy == 0, "buffer drained");

    // ---------------- 4. the UART stops answering
    for (int n = 0; n < 20000 && !irq_deadlock; n++) begin
      idle_inputs();
      traffic(35);
      respond();
      @(negedge clk);
    end
    idle_inputs();
    check(irq_deadlock && tb_halted, "deadlock interrupt and halted trace");
    begin
      longint detect;
      detect = cyc;
      // the interrupt is visible one cycle after the timed-out entry is written
      check(bug_issue >= 0 && detect - bug_issue >= TIMEOUT && detect - bug_issue <= TIMEOUT + 6,
            "deadlock detected TIMEOUT cycles after the lost request");
      $display("lost UART request at cycle %0d, deadlock interrupt at cycle %0d", bug_issue, detect);
    end
    begin
      logic [6:0] frozen;
      frozen = tb_wr_ptr;
      for (int n = 0; n < 500; n++) begin
        idle_inputs();
        traffic(35);
        respond();
        @(negedge clk);
      end
      idle_inputs();
      check(tb_wr_ptr == frozen, "trace frozen after deadlock");
      // the last record is the lost UART request
      tb_rd_addr = frozen - 1'b1;
      @(negedge clk);
      @(negedge clk);
      check(tb_rd_data.kind == ANOM_DEADLOCK && int'(tb_rd_data.source) == bug_src &&
            tb_rd_data.page == bug_req.address[47:12] && tb_rd_data.opcode == bug_req.opcode,
            "deadlock record is the lost UART request");
    end

    // ---------------- trace contents
    begin
      int n_err = 0, n_delay = 0, n_dead = 0;
      check(int'(tb_n_rec) < 128, "trace did not wrap");
      for (int i = 0; i < int'(tb_n_rec); i++) begin
        tb_rd_addr = 7'(i);
        @(negedge clk);
        @(negedge clk);
        case (tb_rd_data.kind)
          ANOM_RESP_ERROR: begin
            int f[$];
            f = err_exp.find_first_index(x) with (x.src == tb_rd_data.source && x.pg == tb_rd_data.page);
            check(f.size() > 0, "error record matches an error response");
            if (f.size() > 0) err_exp.delete(f[0]);
            n_err++;
          end
          ANOM_DELAY: begin
            int f[$];
            f = slow_exp.find_first_index(x) with (x.src == tb_rd_data.source && x.pg == tb_rd_data.page);
            check(f.size() > 0, "delay record is a slowed transaction");
            n_delay++;
          end
          ANOM_DEADLOCK: n_dead++;
          default: check(0, "record kind");
        endcase
      end
      $display("trace: %0d error, %0d delay, %0d deadlock records", n_err, n_delay, n_dead);
      check(n_dead == 1, "exactly one deadlock record");
      check(n_err > 0 && err_exp.size() == 0, "every error response recorded");
      check(n_delay > 0 && irq_delay, "delay anomalies recorded and signalled");
    end

    $display("insert=%0d update=%0d split=%0d merge=%0d evict=%0d periodic=%0d queue_overflow=%0d xb_drop=%0d unmatched=%0d",
             c_insert, c_update, c_split, c_merge, c_evict, c_period, c_qovf, c_drop, c_unmatched);
    check(c_insert > 0, "insert happened");
    check(c_update > 0, "update happened");
    check(c_split > 0, "split happened");
    check(c_merge > 0, "merge happened");
    check(c_evict > 0, "evict happened");
    check(c_period > 0, "periodic update happened");
    check(c_qovf > 0, "queue overflow happened");
    check(c_drop > 0, "transaction buffer full happened");
    check(c_unmatched > 0, "unmatched response happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
