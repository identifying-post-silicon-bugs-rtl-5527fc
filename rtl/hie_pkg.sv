// hie_pkg: types and constants shared by the hardware introspection engine (HIE).
//
// The HIE snoops a TileLink-style bus: requests travel on channel A, responses on
// channel D. Field widths follow the transaction-buffer entry of the design
// (valid 1, opcode 3, source 8, page address 36, mask 4, size 3, param 3,
// timer 13, command type 2). The opcode encodings are the standard TileLink
// ones; which request opcode expects which response opcode, and how opcodes are
// grouped into read / write / miscellaneous commands, is spelled out here.
package hie_pkg;

  localparam int unsigned ADDR_W   = 48;          // full bus address width
  localparam int unsigned PAGE_W   = 36;          // 4 KB page number (ADDR_W - 12)
  localparam int unsigned OPC_W    = 3;
  localparam int unsigned SRC_W    = 8;
  localparam int unsigned MASK_W   = 4;
  localparam int unsigned SIZE_W   = 3;
  localparam int unsigned PARAM_W  = 3;
  localparam int unsigned TIME_W   = 13;          // response-time counter width
  localparam int unsigned TAG_W    = OPC_W + SRC_W; // 11-bit response tag

  typedef logic [PAGE_W-1:0] page_t;
  typedef logic [TIME_W-1:0] rtime_t;

  // Range entry table field widths: 13-bit averages, 32-bit variance and
  // squared-error sums, a 17-bit running sum (16 response times of 13 bits),
  // 5-bit counts and a 32-bit LRU counter.
  localparam int unsigned RET_VAR_W = 32;
  localparam int unsigned RET_SUM_W = 17;
  localparam int unsigned RET_ERR_W = 32;
  localparam int unsigned RET_CNT_W = 5;
  localparam int unsigned RET_LRU_W = 32;

  // Per-command statistics of one range.
  typedef struct packed {
    rtime_t                 avg;       // current average response time
    logic [RET_VAR_W-1:0]   variance;  // allowed distance from the average
    logic [RET_SUM_W-1:0]   sum;       // running sum since the last update
    logic [RET_ERR_W-1:0]   errsq;     // running sum of squared errors
    logic [RET_CNT_W-1:0]   cnt;       // transactions since the last update
  } ret_stat_t;

  // One range entry table entry; st[] is indexed by cmd_e.
  typedef struct packed {
    page_t                  start_pg;
    page_t                  end_pg;
    logic                   valid;
    logic                   updated;   // has been through a periodic update
    logic [RET_LRU_W-1:0]   lru;       // accesses since this entry was last used
    ret_stat_t [2:0]        st;
  } ret_entry_t;

  // Command classes tracked by the range entry table.
  typedef enum logic [1:0] {
    CMD_READ  = 2'd0,
    CMD_WRITE = 2'd1,
    CMD_MISC  = 2'd2
  } cmd_e;

  // TileLink channel A opcodes.
  localparam logic [2:0] A_PUT_FULL    = 3'd0;
  localparam logic [2:0] A_PUT_PARTIAL = 3'd1;
  localparam logic [2:0] A_ARITHMETIC  = 3'd2;
  localparam logic [2:0] A_LOGICAL     = 3'd3;
  localparam logic [2:0] A_GET         = 3'd4;
  localparam logic [2:0] A_INTENT      = 3'd5;
  localparam logic [2:0] A_ACQUIRE     = 3'd6;

  // TileLink channel D opcodes.
  localparam logic [2:0] D_ACCESS_ACK      = 3'd0;
  localparam logic [2:0] D_ACCESS_ACK_DATA = 3'd1;
  localparam logic [2:0] D_HINT_ACK        = 3'd2;
  localparam logic [2:0] D_GRANT           = 3'd4;
  localparam logic [2:0] D_GRANT_DATA      = 3'd5;
  localparam logic [2:0] D_RELEASE_ACK     = 3'd6;

  // Kind of anomaly recorded in the trace buffer.
  typedef enum logic [1:0] {
    ANOM_RESP_ERROR = 2'd0,   // response came back with an error flag
    ANOM_DEADLOCK   = 2'd1,   // request timed out in the transaction buffer
    ANOM_DELAY      = 2'd2    // response far slower than its range average
  } anom_e;

  // A snooped request (channel A beat).
  typedef struct packed {
    logic [OPC_W-1:0]   opcode;
    logic [PARAM_W-1:0] param;
    logic [SIZE_W-1:0]  size;
    logic [SRC_W-1:0]   source;
    logic [ADDR_W-1:0]  address;
    logic [MASK_W-1:0]  mask;
  } req_t;

  // A snooped response (channel D beat). error = denied or corrupt.
  typedef struct packed {
    logic [OPC_W-1:0] opcode;
    logic [SRC_W-1:0] source;
    logic             error;
  } rsp_t;

  // Transaction record as it leaves the transaction buffer (72 bits): the
  // payload of the stage-0 to stage-1 queue.
  typedef struct packed {
    logic [OPC_W-1:0]   opcode;
    logic [SRC_W-1:0]   source;
    page_t              page;
    logic [MASK_W-1:0]  mask;
    logic [SIZE_W-1:0]  size;
    logic [PARAM_W-1:0] param;
    rtime_t             rtime;
    cmd_e               cmd;
  } xact_t;

  // Trace buffer record: a transaction without its timer and valid bit (59 bits)
  // plus the kind of anomaly.
  typedef struct packed {
    anom_e              kind;
    logic [OPC_W-1:0]   opcode;
    logic [SRC_W-1:0]   source;
    page_t              page;
    logic [MASK_W-1:0]  mask;
    logic [SIZE_W-1:0]  size;
    logic [PARAM_W-1:0] param;
    cmd_e               cmd;
  } trace_t;

  // Response opcode a request opcode is answered with. Grant and GrantData are
  // folded into one value so that either answers an Acquire.
  function automatic logic [OPC_W-1:0] expected_rsp(input logic [OPC_W-1:0] a_opc);
    unique case (a_opc)
      A_PUT_FULL, A_PUT_PARTIAL:          return D_ACCESS_ACK;
      A_ARITHMETIC, A_LOGICAL, A_GET:     return D_ACCESS_ACK_DATA;
      A_INTENT:                           return D_HINT_ACK;
      A_ACQUIRE:                          return D_GRANT_DATA;
      default:                            return D_RELEASE_ACK;
    endcase
  endfunction

  function automatic logic [OPC_W-1:0] fold_rsp(input logic [OPC_W-1:0] d_opc);
    return (d_opc == D_GRANT) ? D_GRANT_DATA : d_opc;
  endfunction

  // Read = Get, write = PutFull/PutPartial, everything else is miscellaneous.
  function automatic cmd_e cmd_of(input logic [OPC_W-1:0] a_opc);
    if (a_opc == A_GET)                                   return CMD_READ;
    else if (a_opc == A_PUT_FULL || a_opc == A_PUT_PARTIAL) return CMD_WRITE;
    else                                                  return CMD_MISC;
  endfunction

  function automatic trace_t to_trace(input xact_t x, input anom_e kind);
    trace_t t;
    t.kind   = kind;
    t.opcode = x.opcode;
    t.source = x.source;
    t.page   = x.page;
    t.mask   = x.mask;
    t.size   = x.size;
    t.param  = x.param;
    t.cmd    = x.cmd;
    return t;
  endfunction

endpackage
