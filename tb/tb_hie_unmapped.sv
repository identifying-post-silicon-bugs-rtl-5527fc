// Workload testbench for hie_top at its default parameters: a request to an
// address that no device decodes. It stands in for a four-core system whose
// cores (8 source IDs each) read and write a DRAM region (about 40 cycles)
// and a boot ROM (about 15 cycles) and poll a timer block (about 120 cycles).
// After a warm-up, one core issues a single read to a hole in the memory map.
// The interconnect silently drops it, so it is never answered, while all other
// requests keep being answered normally.
//
// Checked: the range table learns the three regions (each covered by an
// updated range whose read bounds hold the device latency), no anomaly is raised
// during the warm-up, the deadlock interrupt arrives TIMEOUT cycles after the
// lost request, the deadlock record is exactly that request (source, page,
// opcode, mask, size), it is the only deadlock record, the trace stays frozen
// while traffic goes on, and irq_clear clears the interrupt but not the halt.
module tb_hie_unmapped;
  import hie_pkg::*;
  localparam int TIMEOUT = 1500;

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
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s at cycle %0d", msg, cyc);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int c_update = 0, c_period = 0;
  always @(posedge clk) if (rst_n) begin
    c_update += int'(ev_update);
    c_period += int'(ev_period);
  end

  // ---------------------------------------------------------- system model
  localparam longint DRAM = 48'h0000_8000_0000, ROM = 48'h0000_0001_0000,
                     TIMER = 48'h0000_0200_0000, HOLE = 48'h0000_5000_0000;
  localparam int DRAM_LAT = 40, ROM_LAT = 15, TIMER_LAT = 120;

  typedef struct {
    bit     busy;
    longint due;
    req_t   r;
  } flight_t;
  flight_t fl [32];        // 4 cores x 8 source IDs

  longint lost_issue = -1;
  req_t   lost_req;

  task automatic idle_inputs();
    req_valid = 0; rsp_valid = 0; req = '0; rsp = '0;
  endtask

  task automatic issue_to(input int s, input longint addr, input logic [2:0] opc,
                          input longint latency);
    req_valid   = 1;
    req.opcode  = opc;
    req.source  = 8'(s);
    req.address = 48'(addr);
    req.mask    = 4'hF;
    req.size    = 3'd3;
    req.param   = 3'd0;
    fl[s].busy  = 1;
    fl[s].due   = (latency < 0) ? -1 : cyc + latency;
    fl[s].r     = req;
  endtask

  function automatic longint jit(input int base, input int j);
    return longint'(base - j) + longint'($urandom_range(2 * j));
  endfunction

  // one cycle of normal traffic from a random free source
  task automatic traffic(input int p_req);
    int s, r;
    if ($urandom_range(99) >= p_req) return;
    s = int'($urandom_range(31));
    if (fl[s].busy) return;
    r = int'($urandom_range(99));
    if (r < 70)
      issue_to(s, DRAM + (longint'($urandom_range(32'h3FFF)) << 12) + 8 * longint'($urandom_range(511)),
               ($urandom_range(2) == 0) ? A_PUT_FULL : A_GET, jit(DRAM_LAT, 4));
    else if (r < 85)
      issue_to(s, ROM + 8 * longint'($urandom_range(1023)), A_GET, jit(ROM_LAT, 2));
    else
      issue_to(s, TIMER + 8 * longint'($urandom_range(7)), A_GET, jit(TIMER_LAT, 10));
  endtask

  // answer the oldest due request
  task automatic respond();
    int best = -1;
    for (int s = 0; s < 32; s++)
      if (fl[s].busy && fl[s].due >= 0 && fl[s].due <= cyc && !(req_valid && int'(req.source) == s) &&
          (best < 0 || fl[s].due < fl[best].due)) best = s;
    if (best < 0) return;
    rsp_valid  = 1;
    rsp.opcode = (fl[best].r.opcode == A_GET) ? D_ACCESS_ACK_DATA : D_ACCESS_ACK;
    rsp.source = 8'(best);
    rsp.error  = 1'b0;
    fl[best].busy = 0;
  endtask

  // a device is learned when a periodically updated range covers its page and
  // the device latency lies within that range's read bounds
  task automatic learned(input longint addr, input int lat, output bit ok);
    page_t pg = page_t'(addr >> 12);
    ok = 0;
    for (int i = 0; i < 16; i++) begin
      ret_rd_idx = 4'(i);
      #1;
      if (ret_rd_entry.valid && ret_rd_entry.start_pg <= pg && pg <= ret_rd_entry.end_pg)
        ok = ret_rd_entry.updated &&
             longint'(ret_rd_entry.st[CMD_READ].avg) - lat <= longint'(ret_rd_entry.st[CMD_READ].variance) &&
             lat - longint'(ret_rd_entry.st[CMD_READ].avg) <= longint'(ret_rd_entry.st[CMD_READ].variance);
    end
  endtask

  initial begin
    idle_inputs();
    irq_clear = 0; tb_rd_addr = '0; ret_rd_idx = '0;
    for (int s = 0; s < 32; s++) fl[s].busy = 0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;

    // ---------------- warm-up
    for (int n = 0; n < 15000; n++) begin
      idle_inputs();
      traffic(40);
      respond();
      @(negedge clk);
    end
    idle_inputs();
    check(!irq_deadlock && !irq_delay && tb_n_rec == 0, "no anomaly during warm-up");
    check(c_period > 0 && c_update > 0, "range table updated its averages");
    begin
      bit ok;
      learned(DRAM + 48'h100_0000, DRAM_LAT, ok);
      check(ok, "DRAM latency learned");
      learned(ROM, ROM_LAT, ok);
      check(ok, "ROM latency learned");
      learned(TIMER, TIMER_LAT, ok);
      check(ok, "timer latency learned");
      $display("learned %0d ranges", ret_n_valid);
    end
    @(negedge clk);

    // ---------------- the request to the hole
    begin
      int s = -1;
      while (s < 0) begin
        idle_inputs();
        respond();
        for (int k = 0; k < 32; k++)
          if (!fl[k].busy && !(rsp_valid && int'(rsp.source) == k)) s = k;
        if (s >= 0) begin
          issue_to(s, HOLE + 48'h40, A_GET, -1);
          lost_issue = cyc;
          lost_req = req;
        end
        @(negedge clk);
      end
    end
    for (int n = 0; n < 3 * TIMEOUT && !irq_deadlock; n++) begin
      idle_inputs();
      traffic(40);
      respond();
      @(negedge clk);
    end
    idle_inputs();
    check(irq_deadlock && tb_halted, "deadlock interrupt and halted trace");
    check(cyc - lost_issue >= TIMEOUT && cyc - lost_issue <= TIMEOUT + 3,
          "deadlock detected TIMEOUT cycles after the lost request");
    $display("lost request at cycle %0d, deadlock interrupt at cycle %0d", lost_issue, cyc);

    begin
      logic [6:0] frozen;
      frozen = tb_wr_ptr;
      for (int n = 0; n < 2000; n++) begin
        idle_inputs();
        traffic(40);
        respond();
        @(negedge clk);
      end
      idle_inputs();
      check(tb_wr_ptr == frozen, "trace frozen after deadlock");
      check(tb_n_rec == 1, "only the lost request recorded");
      tb_rd_addr = frozen - 1'b1;
      @(negedge clk);
      @(negedge clk);
      check(tb_rd_data.kind == ANOM_DEADLOCK, "record kind is deadlock");
      check(tb_rd_data.source == lost_req.source, "record source");
      check(tb_rd_data.page == lost_req.address[47:12], "record page is the hole");
      check(tb_rd_data.opcode == A_GET && tb_rd_data.cmd == CMD_READ, "record opcode and class");
      check(tb_rd_data.mask == lost_req.mask && tb_rd_data.size == lost_req.size,
            "record mask and size");
    end

    irq_clear = 1;
    @(negedge clk);
    irq_clear = 0;
    check(!irq_deadlock && tb_halted, "irq_clear clears the interrupt, not the halt");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
