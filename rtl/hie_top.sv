// hie_top: hardware introspection engine.
//
// The engine sits beside a system bus, snoops every request and response, and
// looks for transactions that hint at a lock-up. It needs no programming: it
// learns from the traffic itself how fast each part of the address map
// normally answers.
//
//   stage 0  hie_xb         transaction buffer: matches responses to requests
//                           and measures each response time; requests that
//                           are never answered time out (deadlock), responses
//                           with an error flag are reported as such.
//   queue    hie_fifo       holds completed transactions while stage 1 is busy.
//   stage 1  hie_ret        range entry table: learns address ranges and their
//                           read / write / misc latency statistics, flags
//                           responses far slower than their range's average.
//   stage 2  hie_trace_buf  records the anomalous transactions, raises the
//                           deadlock and delay interrupts, freezes on deadlock.
//
// Interface: req_valid/req and rsp_valid/rsp are copies of the bus's request
// and response channels (one beat of each per cycle at most, the engine never
// back-pressures the bus). The trace buffer is read through tb_rd_addr /
// tb_rd_data (one cycle latency), the range table through ret_rd_idx /
// ret_rd_entry (combinational). Status outputs report lost requests
// (transaction buffer full), lost completions (queue full) and the range-table
// operations as one-cycle pulses.
//
// The three-block structure, the queue between stages 0 and 1 and all default
// sizes follow the design (64-entry transaction buffer, 1500-cycle timeout,
// 16-entry queue and range table, 128-entry trace buffer). Only the range
// table's initial averages and variances and AVG_ANOM_MULT are this
// implementation's numbers.
module hie_top
  import hie_pkg::*;
#(
  parameter int unsigned XB_ENTRIES     = 64,
  parameter int unsigned TIMEOUT        = 1500,
  parameter int unsigned QUEUE_DEPTH    = 16,
  parameter int unsigned RET_ENTRIES    = 16,
  parameter int unsigned UPDATE_PERIOD  = 16,
  parameter int unsigned LRU_THRESH_MIN = 25,
  parameter int unsigned LRU_THRESH_MAX = 100,
  parameter int unsigned AVG_ANOM_MULT  = 12,
  parameter int unsigned INIT_AVG       = 40,
  parameter int unsigned INIT_VAR       = 40,
  parameter int unsigned TB_DEPTH       = 128
) (
  input  logic       clk,
  input  logic       rst_n,
  // snooped bus
  input  logic       req_valid,
  input  req_t       req,
  input  logic       rsp_valid,
  input  rsp_t       rsp,
  // interrupts and trace buffer access
  output logic       irq_deadlock,
  output logic       irq_delay,
  input  logic       irq_clear,
  output logic       tb_halted,
  input  logic [$clog2(TB_DEPTH)-1:0]   tb_rd_addr,
  output trace_t     tb_rd_data,
  output logic [$clog2(TB_DEPTH)-1:0]   tb_wr_ptr,
  output logic [$clog2(TB_DEPTH+1)-1:0] tb_n_rec,
  // range entry table access
  input  logic [$clog2(RET_ENTRIES)-1:0]   ret_rd_idx,
  output ret_entry_t ret_rd_entry,
  output logic [$clog2(RET_ENTRIES+1)-1:0] ret_n_valid,
  // status
  output logic       xb_req_drop,
  output logic       xb_rsp_unmatched,
  output logic [$clog2(XB_ENTRIES+1)-1:0]  xb_occupancy,
  output logic       q_overflow,
  output logic [$clog2(QUEUE_DEPTH+1)-1:0] q_count,
  output logic       ev_insert,
  output logic       ev_update,
  output logic       ev_split,
  output logic       ev_merge,
  output logic       ev_evict,
  output logic       ev_period
);

  // stage 0
  logic   xb_ret_valid;
  xact_t  xb_ret_xact;
  logic   xb_tb_valid;
  trace_t xb_tb_rec;

  hie_xb #(.ENTRIES(XB_ENTRIES), .TIMEOUT(TIMEOUT)) u_xb (
    .clk, .rst_n,
    .req_valid, .req, .rsp_valid, .rsp,
    .ret_valid    (xb_ret_valid),
    .ret_xact     (xb_ret_xact),
    .tb_valid     (xb_tb_valid),
    .tb_rec       (xb_tb_rec),
    .req_drop     (xb_req_drop),
    .rsp_unmatched(xb_rsp_unmatched),
    .occupancy    (xb_occupancy)
  );

  // queue between stage 0 and stage 1
  logic  q_empty, q_full, q_pop;
  logic [$bits(xact_t)-1:0] q_rdata;
  logic  ret_in_ready;

  hie_fifo #(.DEPTH(QUEUE_DEPTH), .WIDTH($bits(xact_t))) u_queue (
    .clk, .rst_n,
    .push    (xb_ret_valid),
    .wdata   (xb_ret_xact),
    .pop     (q_pop),
    .rdata   (q_rdata),
    .empty   (q_empty),
    .full    (q_full),
    .overflow(q_overflow),
    .count   (q_count)
  );

  assign q_pop = !q_empty && ret_in_ready;

  // stage 1
  logic   ret_anom_valid, ret_anom_ready;
  trace_t ret_anom_rec;

  hie_ret #(
    .ENTRIES       (RET_ENTRIES),
    .UPDATE_PERIOD (UPDATE_PERIOD),
    .LRU_THRESH_MIN(LRU_THRESH_MIN),
    .LRU_THRESH_MAX(LRU_THRESH_MAX),
    .AVG_ANOM_MULT (AVG_ANOM_MULT),
    .INIT_AVG_RD   (INIT_AVG), .INIT_AVG_WR(INIT_AVG), .INIT_AVG_MISC(INIT_AVG),
    .INIT_VAR_RD   (INIT_VAR), .INIT_VAR_WR(INIT_VAR), .INIT_VAR_MISC(INIT_VAR)
  ) u_ret (
    .clk, .rst_n,
    .in_valid  (!q_empty),
    .in_xact   (xact_t'(q_rdata)),
    .in_ready  (ret_in_ready),
    .anom_valid(ret_anom_valid),
    .anom_rec  (ret_anom_rec),
    .anom_ready(ret_anom_ready),
    .ev_insert, .ev_update, .ev_split, .ev_merge, .ev_evict, .ev_period,
    .rd_idx    (ret_rd_idx),
    .rd_entry  (ret_rd_entry),
    .n_valid   (ret_n_valid)
  );

  // stage 2
  hie_trace_buf #(.DEPTH(TB_DEPTH)) u_tb (
    .clk, .rst_n,
    .a_valid     (xb_tb_valid),
    .a_rec       (xb_tb_rec),
    .b_valid     (ret_anom_valid),
    .b_rec       (ret_anom_rec),
    .b_ready     (ret_anom_ready),
    .irq_clear,
    .irq_deadlock,
    .irq_delay,
    .halted      (tb_halted),
    .rd_addr     (tb_rd_addr),
    .rd_data     (tb_rd_data),
    .wr_ptr      (tb_wr_ptr),
    .n_rec       (tb_n_rec)
  );

  // full queue only means lost completions, never a stalled bus
  a_q_full_drop: assert property (@(posedge clk) disable iff (!rst_n)
                                  (xb_ret_valid && q_full && !q_pop) |-> q_overflow);

endmodule
