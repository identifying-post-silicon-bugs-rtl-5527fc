// hie_ret: range entry table (stage 1 and 2 of the introspection engine).
//
// The table learns the memory map of the system from the traffic it sees. Each
// entry covers a range of 4 KB pages and keeps, separately for read, write and
// miscellaneous commands, an average response time, an allowed deviation
// ("variance"), and running sums used for the periodic update. Ranges never
// overlap. For every completed transaction (page P, command c, response time t):
//
//   miss   -> INSERT: sort the table, find the lowest start page above P and
//             create [P, that start - 1] (or up to the last page). The new
//             entry gets the initial averages and variances; command c takes t.
//   hit, |t - avg| <= variance -> UPDATE: add t to the sum, the approximate
//             squared error to the error sum, count it. After UPDATE_PERIOD
//             counted transactions the average becomes sum / UPDATE_PERIOD and
//             the variance errsum / UPDATE_PERIOD (not below the initial
//             variance), the sums restart and the entry is marked updated.
//   hit, outside the variance -> SPLIT: the entry is cut at P; [P, end] is a new
//             entry initialised as by an insert. If t > AVG_ANOM_MULT * avg the
//             transaction is reported as a delay anomaly.
//
// Every insert, update or split resets the LRU counter of the entry it creates
// or uses and increments that of every other valid entry. Whenever an
// operation leaves the table full, a MERGE runs: the table is sorted, then
// walked from the lowest range upwards, two cycles per entry, testing each
// entry against the range below it. It is merged into it (the lower range is
// stretched over it and it is invalidated) if all three averages lie within
// either entry's variance (case 1), if its LRU count is above LRU_THRESH_MIN
// and it has never been updated (case 2), or if its LRU count is above
// LRU_THRESH_MAX (case 3). If nothing merged, the entry with the largest LRU
// count is EVICTED. A free entry therefore always exists for the next
// transaction.
//
// Sorting: hie_sort_rank gives each valid entry's rank in one cycle, so N
// cycles fill the index table (one entry ID per sorted position).
//
// Interface: in_valid/in_xact/in_ready take one transaction (first-word
// fall-through queue in front; accepted when in_valid && in_ready). Delay
// anomalies leave on anom_valid/anom_rec and are held until anom_ready. The
// ev_* outputs pulse once per operation (ev_merge once per merged entry).
// rd_idx/rd_entry read any entry combinationally for debug and test.
//
// Timing (N = 16): update and split take 3 cycles (lookup, decide, write),
// insert N + 2 cycles (18), a merge N + 2 cycles per further entry + 2
// (48 when the table is full).
//
// Follows the design: the operations, their conditions, the field widths of
// the debug-capable implementation (13-bit averages, 32-bit variance/error
// sums and LRU, 5-bit counts), the shift-based square, LRU_THRESH_MIN 25,
// LRU_THRESH_MAX 100, UPDATE_PERIOD 16, 16 entries. Own choices: the initial
// averages and variances (not given as numbers), AVG_ANOM_MULT = 12 (the
// design names 11 or 12 as best), the variance floor, the variance used
// directly as a bound on the latency distance, the sums holding only in-bound
// transactions, the case-2/3 LRU test applied to the upper entry of a pair,
// and re-initialising an entry in place when a split would cut at its first
// page.
module hie_ret
  import hie_pkg::*;
#(
  parameter int unsigned ENTRIES        = 16,
  parameter int unsigned UPDATE_PERIOD  = 16,
  parameter int unsigned LRU_THRESH_MIN = 25,
  parameter int unsigned LRU_THRESH_MAX = 100,
  parameter int unsigned AVG_ANOM_MULT  = 12,
  parameter int unsigned INIT_AVG_RD    = 40,
  parameter int unsigned INIT_AVG_WR    = 40,
  parameter int unsigned INIT_AVG_MISC  = 40,
  parameter int unsigned INIT_VAR_RD    = 40,
  parameter int unsigned INIT_VAR_WR    = 40,
  parameter int unsigned INIT_VAR_MISC  = 40
) (
  input  logic       clk,
  input  logic       rst_n,
  // completed transactions from the queue
  input  logic       in_valid,
  input  xact_t      in_xact,
  output logic       in_ready,
  // delay anomalies towards the trace buffer
  output logic       anom_valid,
  output trace_t     anom_rec,
  input  logic       anom_ready,
  // operation events
  output logic       ev_insert,
  output logic       ev_update,
  output logic       ev_split,
  output logic       ev_merge,
  output logic       ev_evict,
  output logic       ev_period,
  // debug read port
  input  logic [$clog2(ENTRIES)-1:0] rd_idx,
  output ret_entry_t rd_entry,
  output logic [$clog2(ENTRIES+1)-1:0] n_valid
);

  localparam int unsigned IDX_W = $clog2(ENTRIES);
  localparam int unsigned CNT_W = $clog2(ENTRIES + 1);
  localparam int unsigned SHIFT = $clog2(UPDATE_PERIOD);

  typedef enum logic [3:0] {
    S_IDLE, S_LOOKUP, S_DECIDE, S_APPLY,
    S_SORT, S_INSERT,
    S_MINIT, S_MCMP, S_MWR, S_EVICT
  } state_e;

  typedef enum logic [1:0] { OP_UPDATE, OP_SPLIT, OP_REINIT } op_e;

  state_e     state_q;
  logic       sort_for_merge_q;
  ret_entry_t ent_q [ENTRIES];
  logic [IDX_W-1:0] idx_tbl_q [ENTRIES];

  xact_t      cur_q;         // transaction being processed
  logic [IDX_W-1:0] hit_idx_q;
  op_e        op_q;
  logic       anom_q;        // split transaction is a delay anomaly
  rtime_t     err_q;         // |t - avg| of the hit entry

  logic [IDX_W-1:0] sort_k_q;   // entry being ranked
  logic [CNT_W-1:0] pos_q;      // merge walk position in the index table
  logic [CNT_W-1:0] nv_q;       // valid entries when the sort finished
  logic [IDX_W-1:0] base_q;     // lower entry of the pair under test
  logic             mok_q;      // the pair may merge
  logic             merged_any_q;
  logic [IDX_W-1:0] lru_max_idx_q;
  logic [RET_LRU_W-1:0] lru_max_q;

  logic       anom_valid_q;
  trace_t     anom_rec_q;

  // ------------------------------------------------------------ helpers
  logic [ENTRIES-1:0] valid_vec;
  page_t              start_vec [ENTRIES];
  always_comb begin
    for (int i = 0; i < ENTRIES; i++) begin
      valid_vec[i] = ent_q[i].valid;
      start_vec[i] = ent_q[i].start_pg;
    end
  end

  always_comb begin
    n_valid = '0;
    for (int i = 0; i < ENTRIES; i++) n_valid += CNT_W'(valid_vec[i]);
  end

  // Free entry for insert / split (lowest free index).
  logic [IDX_W-1:0] free_idx;
  always_comb begin
    free_idx = '0;
    for (int i = ENTRIES - 1; i >= 0; i--) if (!valid_vec[i]) free_idx = IDX_W'(i);
  end

  function automatic rtime_t init_avg(input int unsigned c);
    case (c)
      0:       return rtime_t'(INIT_AVG_RD);
      1:       return rtime_t'(INIT_AVG_WR);
      default: return rtime_t'(INIT_AVG_MISC);
    endcase
  endfunction

  function automatic logic [RET_VAR_W-1:0] init_var(input int unsigned c);
    case (c)
      0:       return RET_VAR_W'(INIT_VAR_RD);
      1:       return RET_VAR_W'(INIT_VAR_WR);
      default: return RET_VAR_W'(INIT_VAR_MISC);
    endcase
  endfunction

  // A fresh entry [s, e] whose command c has seen one response time t.
  function automatic ret_entry_t new_entry(input page_t s, input page_t e,
                                           input cmd_e c, input rtime_t t);
    ret_entry_t n;
    n.start_pg = s;
    n.end_pg   = e;
    n.valid    = 1'b1;
    n.updated  = 1'b0;
    n.lru      = '0;
    for (int k = 0; k < 3; k++) begin
      n.st[k].avg      = init_avg(k);
      n.st[k].variance = init_var(k);
      n.st[k].sum      = '0;
      n.st[k].errsq    = '0;
      n.st[k].cnt      = '0;
    end
    n.st[c].avg = t;
    n.st[c].sum = RET_SUM_W'(t);
    n.st[c].cnt = RET_CNT_W'(1);
    return n;
  endfunction

  function automatic rtime_t absdiff(input rtime_t a, input rtime_t b);
    return (a > b) ? a - b : b - a;
  endfunction

  // ------------------------------------------------------------- lookup
  logic [ENTRIES-1:0] hit_vec;
  logic               hit_any;
  logic [IDX_W-1:0]   hit_idx;
  always_comb begin
    hit_any = 1'b0;
    hit_idx = '0;
    for (int i = ENTRIES - 1; i >= 0; i--) begin
      hit_vec[i] = ent_q[i].valid && (cur_q.page >= ent_q[i].start_pg) &&
                   (cur_q.page <= ent_q[i].end_pg);
      if (hit_vec[i]) begin
        hit_any = 1'b1;
        hit_idx = IDX_W'(i);
      end
    end
  end

  // ------------------------------------------------------------- decide
  ret_entry_t he;
  rtime_t     d_err;
  logic       d_inb, d_anom;
  assign he     = ent_q[hit_idx_q];
  assign d_err  = absdiff(cur_q.rtime, he.st[cur_q.cmd].avg);
  assign d_inb  = RET_VAR_W'(d_err) <= he.st[cur_q.cmd].variance;
  assign d_anom = 32'(cur_q.rtime) > AVG_ANOM_MULT * 32'(he.st[cur_q.cmd].avg);

  // Squared error of the update
  logic [RET_ERR_W-1:0] sq;
  hie_sq_approx #(.IN_W(TIME_W), .OUT_W(RET_ERR_W)) u_sq (.err(err_q), .sq(sq));

  // --------------------------------------------------------------- sort
  logic [CNT_W-1:0] rank;
  hie_sort_rank #(.N(ENTRIES)) u_rank (
    .end_page  (ent_q[sort_k_q].end_pg),
    .start_page(start_vec),
    .valid     (valid_vec),
    .rank      (rank)
  );

  // Insert: first sorted entry that starts above the transaction page.
  page_t find_end;
  always_comb begin
    find_end = '1;
    for (int p = ENTRIES - 1; p >= 0; p--) begin
      if (CNT_W'(p) < n_valid && ent_q[idx_tbl_q[p]].start_pg > cur_q.page)
        find_end = ent_q[idx_tbl_q[p]].start_pg - 1'b1;
    end
  end

  // --------------------------------------------------------------- merge
  ret_entry_t mb, mc;
  logic [IDX_W-1:0] cand_idx;
  logic             m_case1, m_case2, m_case3;
  assign cand_idx = idx_tbl_q[pos_q[IDX_W-1:0]];
  assign mb = ent_q[base_q];
  assign mc = ent_q[cand_idx];
  always_comb begin
    m_case1 = 1'b1;
    for (int k = 0; k < 3; k++) begin
      if (!(RET_VAR_W'(absdiff(mb.st[k].avg, mc.st[k].avg)) <= mb.st[k].variance ||
            RET_VAR_W'(absdiff(mb.st[k].avg, mc.st[k].avg)) <= mc.st[k].variance))
        m_case1 = 1'b0;
    end
    m_case2 = (mc.lru > RET_LRU_W'(LRU_THRESH_MIN)) && !mc.updated;
    m_case3 = mc.lru > RET_LRU_W'(LRU_THRESH_MAX);
  end

  // ------------------------------------------------------------- outputs
  assign in_ready   = (state_q == S_IDLE) && (!anom_valid_q || anom_ready);
  assign anom_valid = anom_valid_q;
  assign anom_rec   = anom_rec_q;
  assign rd_entry   = ent_q[rd_idx];

  // LRU bookkeeping: 'used' is reset, every other valid entry ages.
  function automatic logic [RET_LRU_W-1:0] aged(input logic [RET_LRU_W-1:0] l);
    return (l == '1) ? l : l + 1'b1;
  endfunction

  // --------------------------------------------------------------- FSM
  always_ff @(posedge clk) begin
    ev_insert <= 1'b0;
    ev_update <= 1'b0;
    ev_split  <= 1'b0;
    ev_merge  <= 1'b0;
    ev_evict  <= 1'b0;
    ev_period <= 1'b0;
    if (!rst_n) begin
      state_q          <= S_IDLE;
      sort_for_merge_q <= 1'b0;
      anom_valid_q     <= 1'b0;
      anom_rec_q       <= '0;
      cur_q            <= '0;
      hit_idx_q        <= '0;
      op_q             <= OP_UPDATE;
      anom_q           <= 1'b0;
      err_q            <= '0;
      sort_k_q         <= '0;
      pos_q            <= '0;
      nv_q             <= '0;
      base_q           <= '0;
      mok_q            <= 1'b0;
      merged_any_q     <= 1'b0;
      lru_max_idx_q    <= '0;
      lru_max_q        <= '0;
      for (int i = 0; i < ENTRIES; i++) begin
        ent_q[i]     <= '0;
        idx_tbl_q[i] <= '0;
      end
    end else begin
      if (anom_valid_q && anom_ready) anom_valid_q <= 1'b0;

      unique case (state_q)
        S_IDLE: begin
          if (in_valid && in_ready) begin
            cur_q   <= in_xact;
            state_q <= S_LOOKUP;
          end
        end

        // cycle 1: parallel range compare
        S_LOOKUP: begin
          hit_idx_q <= hit_idx;
          if (hit_any) begin
            state_q <= S_DECIDE;
          end else begin
            sort_for_merge_q <= 1'b0;
            sort_k_q         <= '0;
            state_q          <= S_SORT;
          end
        end

        // cycle 2: bound test against the hit entry
        S_DECIDE: begin
          err_q  <= d_err;
          anom_q <= d_anom;
          if (d_inb)                          op_q <= OP_UPDATE;
          else if (cur_q.page == he.start_pg) op_q <= OP_REINIT;
          else                                op_q <= OP_SPLIT;
          state_q <= S_APPLY;
        end

        // cycle 3: write back
        S_APPLY: begin
          for (int i = 0; i < ENTRIES; i++)
            if (ent_q[i].valid) ent_q[i].lru <= aged(ent_q[i].lru);
          unique case (op_q)
            OP_UPDATE: begin
              ev_update <= 1'b1;
              ent_q[hit_idx_q].lru <= '0;
              if (32'(he.st[cur_q.cmd].cnt) + 1 == UPDATE_PERIOD) begin
                ev_period <= 1'b1;
                ent_q[hit_idx_q].updated                <= 1'b1;
                ent_q[hit_idx_q].st[cur_q.cmd].avg      <=
                  rtime_t'((he.st[cur_q.cmd].sum + RET_SUM_W'(cur_q.rtime)) >> SHIFT);
                ent_q[hit_idx_q].st[cur_q.cmd].variance <=
                  ((he.st[cur_q.cmd].errsq + sq) >> SHIFT) > init_var(32'(cur_q.cmd)) ?
                  ((he.st[cur_q.cmd].errsq + sq) >> SHIFT) : init_var(32'(cur_q.cmd));
                ent_q[hit_idx_q].st[cur_q.cmd].sum      <= '0;
                ent_q[hit_idx_q].st[cur_q.cmd].errsq    <= '0;
                ent_q[hit_idx_q].st[cur_q.cmd].cnt      <= '0;
              end else begin
                ent_q[hit_idx_q].st[cur_q.cmd].sum   <= he.st[cur_q.cmd].sum + RET_SUM_W'(cur_q.rtime);
                ent_q[hit_idx_q].st[cur_q.cmd].errsq <= he.st[cur_q.cmd].errsq + sq;
                ent_q[hit_idx_q].st[cur_q.cmd].cnt   <= he.st[cur_q.cmd].cnt + 1'b1;
              end
            end
            OP_SPLIT: begin
              ev_split <= 1'b1;
              ent_q[hit_idx_q].end_pg <= cur_q.page - 1'b1;
              ent_q[free_idx] <= new_entry(cur_q.page, he.end_pg, cur_q.cmd, cur_q.rtime);
            end
            default: begin  // OP_REINIT: cut point is the entry's first page
              ev_split <= 1'b1;
              ent_q[hit_idx_q] <= new_entry(he.start_pg, he.end_pg, cur_q.cmd, cur_q.rtime);
            end
          endcase
          if (op_q != OP_UPDATE && anom_q) begin
            anom_valid_q <= 1'b1;
            anom_rec_q   <= to_trace(cur_q, ANOM_DELAY);
          end
          // the split consumes a free entry: merge if that fills the table
          if (op_q == OP_SPLIT && 32'(n_valid) + 1 == ENTRIES) begin
            sort_for_merge_q <= 1'b1;
            sort_k_q         <= '0;
            state_q          <= S_SORT;
          end else begin
            state_q <= S_IDLE;
          end
        end

        // one entry ranked per cycle into the index table
        S_SORT: begin
          if (valid_vec[sort_k_q] && rank != '0)
            idx_tbl_q[IDX_W'(rank - 1'b1)] <= sort_k_q;
          if (32'(sort_k_q) == ENTRIES - 1) begin
            nv_q <= n_valid;
            if (sort_for_merge_q) begin
              state_q <= S_MINIT;
            end else begin
              state_q <= S_INSERT;
            end
          end
          sort_k_q <= sort_k_q + 1'b1;
        end

        // insert: the range ends just below the next start page found
        S_INSERT: begin
          ev_insert <= 1'b1;
          for (int i = 0; i < ENTRIES; i++)
            if (ent_q[i].valid) ent_q[i].lru <= aged(ent_q[i].lru);
          ent_q[free_idx] <= new_entry(cur_q.page, find_end, cur_q.cmd, cur_q.rtime);
          if (32'(n_valid) + 1 == ENTRIES) begin
            sort_for_merge_q <= 1'b1;
            sort_k_q         <= '0;
            state_q          <= S_SORT;
          end else begin
            state_q <= S_IDLE;
          end
        end

        // merge walk set-up: the lowest range is the first base
        S_MINIT: begin
          base_q        <= idx_tbl_q[0];
          lru_max_idx_q <= idx_tbl_q[0];
          lru_max_q     <= ent_q[idx_tbl_q[0]].lru;
          pos_q         <= CNT_W'(1);
          merged_any_q  <= 1'b0;
          state_q       <= (nv_q > CNT_W'(1)) ? S_MCMP : S_EVICT;
        end

        // merge walk, first cycle: test the candidate against the base
        S_MCMP: begin
          mok_q   <= m_case1 || m_case2 || m_case3;
          state_q <= S_MWR;
        end

        // merge walk, second cycle: merge the candidate or make it the base
        S_MWR: begin
          if (mok_q) begin
            ev_merge              <= 1'b1;
            merged_any_q          <= 1'b1;
            ent_q[base_q].end_pg  <= mc.end_pg;
            ent_q[cand_idx].valid <= 1'b0;
          end else begin
            base_q <= cand_idx;
            if (mc.lru > lru_max_q) begin
              lru_max_q     <= mc.lru;
              lru_max_idx_q <= cand_idx;
            end
          end
          pos_q   <= pos_q + 1'b1;
          state_q <= (pos_q + 1'b1 >= nv_q) ? S_EVICT : S_MCMP;
        end

        S_EVICT: begin
          if (!merged_any_q) begin
            ev_evict                    <= 1'b1;
            ent_q[lru_max_idx_q].valid  <= 1'b0;
          end
          state_q <= S_IDLE;
        end

        default: state_q <= S_IDLE;
      endcase
    end
  end

  // Ranges never overlap.
  a_single_hit: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(hit_vec));

endmodule
