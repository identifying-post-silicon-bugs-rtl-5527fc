// Testbench for hie_ret at its default parameters (16 entries, update period
// 16, LRU thresholds 25/100, anomaly multiplier 12).
//
// A reference model of the range-table algorithm, written here from the
// algorithm's description (insert, update, split, merge cases 1-3, evict,
// LRU ageing, periodic update with the shift-based square), processes the same
// transactions. After every transaction the whole table is read through the
// debug port and compared with the model as a set of ranges with all their
// statistics, and every delay anomaly the model predicts must appear on the
// anomaly output. The busy time of each operation is measured: 3 cycles for
// update and split, 18 for insert, 48 more when a merge follows.
//
// Traffic: a synthetic memory map (a fast memory region, a slow peripheral
// region, a medium region) with latency jitter, rare very slow responses,
// and bursts to random pages with random latencies that fill the table and
// force merges and evictions.
//
// A last phase holds anom_ready low in most cycles, as the trace buffer does
// while its other port writes: a waiting delay record must stay unchanged,
// keep new transactions out and be taken exactly once.
//
// A second instance with all initial values zero replays the two-transaction
// fragmentation example: a read of page 0x80000 taking 60 cycles creates
// [0x80000, last page]; a write to page 0x82001 taking 21 cycles then splits
// it into [0x80000, 0x82000] (LRU 1) and [0x82001, last page] (LRU 0).
module tb_hie_ret;
  import hie_pkg::*;
  localparam int N = 16, PERIOD = 16, LMIN = 25, LMAX = 100, MULT = 12;
  localparam int IAVG = 40, IVAR = 40;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid, in_ready, anom_valid, anom_ready;
  xact_t in_xact;
  trace_t anom_rec;
  logic ev_insert, ev_update, ev_split, ev_merge, ev_evict, ev_period;
  logic [3:0] rd_idx;
  ret_entry_t rd_entry;
  logic [4:0] n_valid;

  hie_ret dut (
    .clk, .rst_n, .in_valid, .in_xact, .in_ready, .anom_valid, .anom_rec, .anom_ready,
    .ev_insert, .ev_update, .ev_split, .ev_merge, .ev_evict, .ev_period,
    .rd_idx, .rd_entry, .n_valid
  );

  // zero-initialised instance for the fragmentation example
  logic z_valid, z_ready, z_anom_valid;
  xact_t z_xact;
  trace_t z_anom_rec;
  logic [3:0] z_idx;
  ret_entry_t z_entry;
  logic [4:0] z_n;
  logic z_e0, z_e1, z_e2, z_e3, z_e4, z_e5;
  hie_ret #(.INIT_AVG_RD(0), .INIT_AVG_WR(0), .INIT_AVG_MISC(0),
            .INIT_VAR_RD(0), .INIT_VAR_WR(0), .INIT_VAR_MISC(0)) dut_z (
    .clk, .rst_n, .in_valid(z_valid), .in_xact(z_xact), .in_ready(z_ready),
    .anom_valid(z_anom_valid), .anom_rec(z_anom_rec), .anom_ready(1'b1),
    .ev_insert(z_e0), .ev_update(z_e1), .ev_split(z_e2), .ev_merge(z_e3), .ev_evict(z_e4),
    .ev_period(z_e5), .rd_idx(z_idx), .rd_entry(z_entry), .n_valid(z_n)
  );

  int checks = 0, failures = 0;
  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", msg, $time);
    end
  endtask

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ reference
  typedef struct {
    longint s, e;
    bit     upd;
    longint lru;
    longint avg[3], vr[3], sum[3], esq[3], cnt[3];
  } ment_t;
  ment_t m [$];
  localparam longint MAXPG = (longint'(1) << 36) - 1;

  int n_ins = 0, n_upd = 0, n_split = 0, n_merge = 0, n_evict = 0, n_period = 0, n_anom = 0, n_stall = 0;

  function automatic longint sq_ref(input longint e);
    longint b = 0, v = e;
    while (v > 0) begin v = v / 2; b++; end
    return e * (longint'(1) << b);
  endfunction

  function automatic ment_t fresh(input longint s, input longint e, input int c, input longint t);
    ment_t n;
    n.s = s; n.e = e; n.upd = 0; n.lru = 0;
    for (int k = 0; k < 3; k++) begin
      n.avg[k] = IAVG; n.vr[k] = IVAR; n.sum[k] = 0; n.esq[k] = 0; n.cnt[k] = 0;
    end
    n.avg[c] = t; n.sum[c] = t; n.cnt[c] = 1;
    return n;
  endfunction

  function automatic longint adiff(input longint a, input longint b);
    return a > b ? a - b : b - a;
  endfunction

  function automatic void age_all();
    foreach (m[i]) m[i].lru++;
  endfunction

  // sort the model ascending by start page
  function automatic void msort();
    m.sort(x) with (x.s);
  endfunction

  // returns: 0 update, 1 split, 2 insert; sets anom; merged/evicted counts
  function automatic int model_step(input longint p, input int c, input longint t,
                                    output bit anom, output int merges, output bit evicted);
    int h = -1, kind;
    anom = 0; merges = 0; evicted = 0;
    foreach (m[i]) if (p >= m[i].s && p <= m[i].e) h = i;
    if (h < 0) begin
      longint e = MAXPG;
      foreach (m[i]) if (m[i].s > p && m[i].s - 1 < e) e = m[i].s - 1;
      age_all();
      m.push_back(fresh(p, e, c, t));
      kind = 2;
    end else if (adiff(t, m[h].avg[c]) <= m[h].vr[c]) begin
      ment_t x;
      longint sq;
      age_all();
      x = m[h];
      sq = sq_ref(adiff(t, x.avg[c]));
      x.lru = 0;
      if (x.cnt[c] + 1 == PERIOD) begin
        longint v = (x.esq[c] + sq) / PERIOD;
        x.avg[c] = (x.sum[c] + t) / PERIOD;
        x.vr[c]  = v > IVAR ? v : IVAR;
        x.sum[c] = 0; x.esq[c] = 0; x.cnt[c] = 0; x.upd = 1;
        n_period++;
      end else begin
        x.sum[c] += t; x.esq[c] += sq; x.cnt[c]++;
      end
      m[h] = x;
      kind = 0;
    end else begin
      anom = t > MULT * m[h].avg[c];
      age_all();
      if (p == m[h].s) begin
        m[h] = fresh(m[h].s, m[h].e, c, t);
      end else begin
        ment_t x;
        x = m[h];
        m.push_back(fresh(p, x.e, c, t));
        x.e = p - 1;
        m[h] = x;
      end
      kind = 1;
    end
    if (m.size() == N && !(kind == 1 && p == m[h].s)) begin
      int base = 0, mx = 0;
      int k = 1;
      msort();
      while (k < m.size()) begin
        bit c1 = 1, ok;
        ment_t xb, xc;
        xb = m[base];
        xc = m[k];
        for (int q = 0; q < 3; q++) begin
          longint d = adiff(xb.avg[q], xc.avg[q]);
          if (!(d <= xb.vr[q] || d <= xc.vr[q])) c1 = 0;
        end
        ok = c1 || (m[k].lru > LMIN && !m[k].upd) || (m[k].lru > LMAX);
        if (ok) begin
          xb.e = xc.e;
          m[base] = xb;
          m.delete(k);
          merges++;
        end else begin
          base = k;
          if (m[k].lru > m[mx].lru) mx = k;
          k++;
        end
      end
      if (merges == 0) begin
        m.delete(mx);
        evicted = 1;
      end
    end
    return kind;
  endfunction

  // ------------------------------------------------------------ compare
  task automatic compare_table(input string tag);
    int found = 0;
    check(int'(n_valid) == m.size(), {tag, ": entry count"});
    for (int i = 0; i < N; i++) begin
      rd_idx = 4'(i);
      #0.1;
      if (rd_entry.valid) begin
        int j = -1;
        foreach (m[k]) if (m[k].s == longint'(rd_entry.start_pg)) j = k;
        if (j < 0) begin
          check(0, {tag, ": unexpected range"});
        end else begin
          bit ok = 1;
          found++;
          ok &= (m[j].e == longint'(rd_entry.end_pg));
          ok &= (m[j].upd == rd_entry.updated);
          ok &= (m[j].lru == longint'(rd_entry.lru));
          for (int q = 0; q < 3; q++) begin
            ok &= (m[j].avg[q] == longint'(rd_entry.st[q].avg));
            ok &= (m[j].vr[q]  == longint'(rd_entry.st[q].variance));
            ok &= (m[j].sum[q] == longint'(rd_entry.st[q].sum));
            ok &= (m[j].esq[q] == longint'(rd_entry.st[q].errsq));
            ok &= (m[j].cnt[q] == longint'(rd_entry.st[q].cnt));
          end
          check(ok, {tag, ": entry fields"});
          if (!ok && failures < 20)
            $display("  dut [%h,%h] lru %0d rd avg %0d var %0d cnt %0d | model [%h,%h] lru %0d avg %0d var %0d cnt %0d",
                     rd_entry.start_pg, rd_entry.end_pg, rd_entry.lru, rd_entry.st[0].avg,
                     rd_entry.st[0].variance, rd_entry.st[0].cnt, m[j].s, m[j].e, m[j].lru,
                     m[j].avg[0], m[j].vr[0], m[j].cnt[0]);
        end
      end
    end
    check(found == m.size(), {tag, ": all model ranges present"});
  endtask

  // send one transaction, measure busy cycles, watch the anomaly output
  task automatic send(input longint p, input int c, input longint t);
    int kind, merges, busy;
    bit anom, evicted, saw_anom;
    trace_t arec;
    @(negedge clk);
    while (!in_ready) @(negedge clk);
    in_valid = 1;
    in_xact = '0;
    in_xact.page = page_t'(p);
    in_xact.cmd = cmd_e'(c);
    in_xact.rtime = rtime_t'(t);
    in_xact.source = 8'($urandom);
    in_xact.opcode = 3'($urandom);
    kind = model_step(p, c, t, anom, merges, evicted);
    @(negedge clk);
    in_valid = 0;
    busy = 0;
    saw_anom = 0;
    while (!in_ready) begin
      if (anom_valid) begin saw_anom = 1; arec = anom_rec; end
      busy++;
      @(negedge clk);
      if (busy > 200) break;
    end
    if (anom_valid) begin saw_anom = 1; arec = anom_rec; end
    check(saw_anom == anom, "delay anomaly flagged as predicted");
    if (saw_anom) begin
      check(arec.kind == ANOM_DELAY && arec.page == page_t'(p) && arec.cmd == cmd_e'(c), "anomaly record");
      n_anom++;
    end
    case (kind)
      0: n_upd++;
      1: n_split++;
      default: n_ins++;
    endcase
    n_merge += merges;
    n_evict += int'(evicted);
    begin
      int exp_busy = (kind == 2) ? 18 : 3;
      if (merges > 0 || evicted) exp_busy += 48;
      check(busy == exp_busy, "operation latency");
      if (busy != exp_busy && failures < 20) $display("  kind %0d busy %0d expected %0d", kind, busy, exp_busy);
    end
    compare_table("table");
  endtask

  // as send, with anom_ready low in about 60% of the cycles: a waiting delay
  // record must stay on the output unchanged, block new transactions and be
  // taken exactly once
  task automatic send_bp(input longint p, input int c, input longint t);
    int kind, merges, busy, taken;
    bit anom, evicted;
    trace_t arec, held;
    bit holding;
    @(negedge clk);
    anom_ready = ($urandom_range(99) >= 60);
    #1;
    while (!in_ready) begin
      @(negedge clk);
      anom_ready = ($urandom_range(99) >= 60);
      #1;
    end
    in_valid = 1;
    in_xact = '0;
    in_xact.page = page_t'(p);
    in_xact.cmd = cmd_e'(c);
    in_xact.rtime = rtime_t'(t);
    in_xact.source = 8'($urandom);
    in_xact.opcode = 3'($urandom);
    kind = model_step(p, c, t, anom, merges, evicted);
    @(negedge clk);
    in_valid = 0;
    busy = 0;
    taken = 0;
    holding = 0;
    for (int k = 0; k < 1000; k++) begin
      anom_ready = ($urandom_range(99) >= 60);
      #1;
      if (holding) check(anom_valid && anom_rec == held, "waiting record held unchanged");
      holding = anom_valid && !anom_ready;
      held = anom_rec;
      if (anom_valid && !anom_ready) check(!in_ready, "no new transaction while a record waits");
      if (anom_valid && anom_ready) begin taken++; arec = anom_rec; end
      if (in_ready) break;
      busy++;
      @(negedge clk);
    end
    check(taken == int'(anom), "delay record taken exactly once");
    if (taken > 0) begin
      check(arec.kind == ANOM_DELAY && arec.page == page_t'(p) && arec.cmd == cmd_e'(c), "anomaly record");
      n_anom++;
      n_stall += busy - ((kind == 2) ? 18 : 3) - ((merges > 0 || evicted) ? 48 : 0);
    end
    case (kind)
      0: n_upd++;
      1: n_split++;
      default: n_ins++;
    endcase
    n_merge += merges;
    n_evict += int'(evicted);
    begin
      int exp_busy = (kind == 2) ? 18 : 3;
      if (merges > 0 || evicted) exp_busy += 48;
      if (anom) check(busy >= exp_busy, "operation latency with a waiting record");
      else      check(busy == exp_busy, "operation latency");
    end
    compare_table("table under backpressure");
  endtask

  // ------------------------------------------------------------ stimulus
  function automatic longint lat(input longint base, input int jit);
    return base - jit + longint'($urandom_range(2 * jit));
  endfunction

  initial begin
    in_valid = 0; in_xact = '0; anom_ready = 1; rd_idx = '0;
    z_valid = 0; z_xact = '0; z_idx = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // fragmentation example on the zero-initialised instance
    @(negedge clk);
    z_valid = 1; z_xact.page = 36'h80000; z_xact.cmd = CMD_READ; z_xact.rtime = 13'd60;
    @(negedge clk);
    z_valid = 0;
    while (!z_ready) @(negedge clk);
    z_valid = 1; z_xact.page = 36'h82001; z_xact.cmd = CMD_WRITE; z_xact.rtime = 13'd21;
    @(negedge clk);
    z_valid = 0;
    while (!z_ready) @(negedge clk);
    check(z_n == 5'd2, "example: two ranges");
    for (int i = 0; i < 2; i++) begin
      z_idx = 4'(i);
      #0.1;
      if (z_entry.start_pg == 36'h80000)
        check(z_entry.end_pg == 36'h82000 && z_entry.lru == 1 && z_entry.st[0].avg == 60 &&
              z_entry.st[0].sum == 60 && z_entry.st[0].cnt == 1 && z_entry.st[1].avg == 0, "example: lower range");
      else
        check(z_entry.start_pg == 36'h82001 && z_entry.end_pg == 36'hFFFFFFFFF && z_entry.lru == 0 &&
              z_entry.st[1].avg == 21 && z_entry.st[1].cnt == 1 && z_entry.st[0].avg == 0, "example: upper range");
    end

    // learning traffic on the main instance
    for (int n = 0; n < 3000; n++) begin
      int r, c;
      longint p, t;
      r = int'($urandom_range(99));
      c = int'($urandom_range(2));
      if ((n / 400) % 3 == 2 && r < 50) begin
        // burst to random pages with random latencies
        p = longint'({$urandom, 4'($urandom)});
        t = longint'($urandom_range(3000));
      end else if (r < 60) begin
        p = longint'($urandom_range(32'h0FFFF));        // memory
        t = lat(40, 6);
      end else if (r < 80) begin
        p = 36'h10000 + longint'($urandom_range(15));    // slow peripheral
        t = lat(300, 30);
      end else if (r < 97) begin
        p = 36'h20000 + longint'($urandom_range(255));   // medium device
        t = lat(120, 10);
      end else begin
        p = longint'($urandom_range(32'h0FFFF));        // very slow memory response
        t = 4000 + longint'($urandom_range(3000));
      end
      send(p, c, t);
    end

    // trace-buffer backpressure: memory traffic with many very slow responses
    for (int n = 0; n < 600; n++) begin
      longint p;
      p = longint'($urandom_range(32'h0FFFF));
      if ($urandom_range(99) < 25) send_bp(p, int'($urandom_range(2)), 4000 + longint'($urandom_range(3000)));
      else                         send_bp(p, int'($urandom_range(2)), lat(40, 6));
    end
    anom_ready = 1;

    $display("inserts=%0d updates=%0d splits=%0d merges=%0d evicts=%0d periodic=%0d anomalies=%0d stalled=%0d",
             n_ins, n_upd, n_split, n_merge, n_evict, n_period, n_anom, n_stall);
    check(n_ins > 0 && n_upd > 0 && n_split > 0 && n_merge > 0 && n_evict > 0 &&
          n_period > 0 && n_anom > 0, "every operation exercised");
    check(n_stall > 0, "a delay record waited for the trace buffer");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
