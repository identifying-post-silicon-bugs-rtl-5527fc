// hie_xb: transaction buffer (stage 0 of the introspection engine).
//
// Every snooped request is written into a free entry together with a tag made
// of the response opcode it expects and its source ID (11 bits). Each valid
// entry owns a cycle counter that starts when the entry is filled and stops
// (saturates) at its maximum. A snooped response is compared with the tags of
// all valid entries in parallel; the matching entry is freed and, with its
// counter value as the response time, sent either to the range entry table
// queue (normal response) or to the trace buffer (response with an error
// flag). An entry whose counter reaches TIMEOUT is freed and sent to the trace
// buffer as a deadlock. If a response matches an entry in the same cycle its
// counter reaches TIMEOUT, the match wins and the transaction goes to the RET.
//
// Interface: one request and one response can be observed per cycle
// (req_valid/req, rsp_valid/rsp). Outputs are registered-free single-cycle
// pulses: ret_valid/ret_xact towards the queue and tb_valid/tb_rec towards the
// trace buffer, which always accepts them. Requests arriving while every entry
// is busy are not tracked and raise req_drop for one cycle.
//
// Timing: a response seen k cycles after its request reports a response time
// of k. At most one timeout is reported per cycle (lowest entry index first),
// and none in a cycle where an erroneous response already uses the trace-buffer
// path; a waiting timed-out entry is reported in a later cycle.
//
// Following the design: tag = response opcode + source, parallel tag compare,
// per-entry counters compared against a TIMEOUT value, match-wins rule, new
// requests placed in the highest-numbered free entry, 64 entries, TIMEOUT
// 1500, 13-bit timers. Own choices: TileLink opcode pairing (see hie_pkg), the
// address kept as its 36-bit page number, lowest-index-first timeout order,
// dropping requests when full.
module hie_xb
  import hie_pkg::*;
#(
  parameter int unsigned ENTRIES = 64,
  parameter int unsigned TIMEOUT = 1500
) (
  input  logic   clk,
  input  logic   rst_n,
  // snooped bus
  input  logic   req_valid,
  input  req_t   req,
  input  logic   rsp_valid,
  input  rsp_t   rsp,
  // completed transaction towards the RET queue
  output logic   ret_valid,
  output xact_t  ret_xact,
  // anomalous transaction towards the trace buffer
  output logic   tb_valid,
  output trace_t tb_rec,
  // status
  output logic   req_drop,
  output logic   rsp_unmatched,
  output logic [$clog2(ENTRIES+1)-1:0] occupancy
);

  localparam int unsigned IDX_W = (ENTRIES > 1) ? $clog2(ENTRIES) : 1;

  typedef struct packed {
    logic [OPC_W-1:0]   opcode;
    logic [OPC_W-1:0]   rsp_opcode;   // expected response opcode (tag part)
    logic [SRC_W-1:0]   source;
    page_t              page;
    logic [MASK_W-1:0]  mask;
    logic [SIZE_W-1:0]  size;
    logic [PARAM_W-1:0] param;
    cmd_e               cmd;
  } entry_t;

  logic   [ENTRIES-1:0] valid_q;
  entry_t               ent_q   [ENTRIES];
  rtime_t               timer_q [ENTRIES];

  // ---------------------------------------------------------------- lookup
  logic [TAG_W-1:0]    rsp_tag;
  logic [ENTRIES-1:0]  hit_vec;
  logic [ENTRIES-1:0]  to_vec;
  logic                hit_any, to_any, free_any;
  logic [IDX_W-1:0]    hit_idx, to_idx, free_idx;

  assign rsp_tag = {fold_rsp(rsp.opcode), rsp.source};

  always_comb begin
    for (int i = 0; i < ENTRIES; i++) begin
      hit_vec[i] = rsp_valid && valid_q[i] &&
                   ({ent_q[i].rsp_opcode, ent_q[i].source} == rsp_tag);
      to_vec[i]  = valid_q[i] && (32'(timer_q[i]) >= TIMEOUT);
    end
  end

  // Matching entry: lowest index (tags are unique while a source is in flight).
  always_comb begin
    hit_any = 1'b0;
    hit_idx = '0;
    for (int i = ENTRIES - 1; i >= 0; i--) begin
      if (hit_vec[i]) begin
        hit_any = 1'b1;
        hit_idx = IDX_W'(i);
      end
    end
  end

  // Ordering logic: timed-out entry with the lowest index that is not being
  // matched by a response in this cycle.
  always_comb begin
    to_any = 1'b0;
    to_idx = '0;
    for (int i = ENTRIES - 1; i >= 0; i--) begin
      if (to_vec[i] && !(hit_any && hit_idx == IDX_W'(i))) begin
        to_any = 1'b1;
        to_idx = IDX_W'(i);
      end
    end
  end

  // Highest-numbered free entry receives a new request.
  always_comb begin
    free_any = 1'b0;
    free_idx = '0;
    for (int i = 0; i < ENTRIES; i++) begin
      if (!valid_q[i]) begin
        free_any = 1'b1;
        free_idx = IDX_W'(i);
      end
    end
  end

  // --------------------------------------------------------------- outputs
  entry_t hit_e, to_e;
  xact_t  hit_x, to_x;
  logic   err_to_tb, to_fire;

  assign hit_e = ent_q[hit_idx];
  assign to_e  = ent_q[to_idx];

  always_comb begin
    hit_x.opcode = hit_e.opcode;
    hit_x.source = hit_e.source;
    hit_x.page   = hit_e.page;
    hit_x.mask   = hit_e.mask;
    hit_x.size   = hit_e.size;
    hit_x.param  = hit_e.param;
    hit_x.rtime  = timer_q[hit_idx];
    hit_x.cmd    = hit_e.cmd;
    to_x.opcode  = to_e.opcode;
    to_x.source  = to_e.source;
    to_x.page    = to_e.page;
    to_x.mask    = to_e.mask;
    to_x.size    = to_e.size;
    to_x.param   = to_e.param;
    to_x.rtime   = timer_q[to_idx];
    to_x.cmd     = to_e.cmd;
  end

  assign err_to_tb = hit_any && rsp.error;
  assign to_fire   = to_any && !err_to_tb;

  assign ret_valid = hit_any && !rsp.error;
  assign ret_xact  = hit_x;
  assign tb_valid  = err_to_tb || to_fire;
  assign tb_rec    = err_to_tb ? to_trace(hit_x, ANOM_RESP_ERROR)
                               : to_trace(to_x, ANOM_DEADLOCK);

  assign req_drop      = req_valid && !free_any;
  assign rsp_unmatched = rsp_valid && !hit_any;

  always_comb begin
    occupancy = '0;
    for (int i = 0; i < ENTRIES; i++) occupancy += $bits(occupancy)'(valid_q[i]);
  end

  // ----------------------------------------------------------------- state
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      valid_q <= '0;
      for (int i = 0; i < ENTRIES; i++) begin
        timer_q[i] <= '0;
        ent_q[i]   <= '0;
      end
    end else begin
      for (int i = 0; i < ENTRIES; i++) begin
        if (!valid_q[i])            timer_q[i] <= '0;
        else if (timer_q[i] != '1)  timer_q[i] <= timer_q[i] + 1'b1;
      end
      if (hit_any) begin
        valid_q[hit_idx] <= 1'b0;
        timer_q[hit_idx] <= '0;
      end
      if (to_fire) begin
        valid_q[to_idx] <= 1'b0;
        timer_q[to_idx] <= '0;
      end
      if (req_valid && free_any) begin
        valid_q[free_idx]           <= 1'b1;
        timer_q[free_idx]           <= rtime_t'(1);
        ent_q[free_idx].opcode      <= req.opcode;
        ent_q[free_idx].rsp_opcode  <= expected_rsp(req.opcode);
        ent_q[free_idx].source      <= req.source;
        ent_q[free_idx].page        <= req.address[ADDR_W-1 -: PAGE_W];
        ent_q[free_idx].mask        <= req.mask;
        ent_q[free_idx].size        <= req.size;
        ent_q[free_idx].param       <= req.param;
        ent_q[free_idx].cmd         <= cmd_of(req.opcode);
      end
    end
  end

  // A source may have only one request of a given kind in flight.
  a_one_match: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(hit_vec));

endmodule
