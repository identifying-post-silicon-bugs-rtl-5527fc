// Testbench for hie_xb at its default size (64 entries, 1500-cycle timeout).
//
// Phase 1: random traffic. Requests with free source IDs and a mix of read,
// write and other opcodes are answered after 1..400 cycles, a few with the
// error flag, a few never. A scoreboard remembers each request's issue cycle:
// a normal response must come out on the RET path in the same cycle with the
// request's fields and response time = cycles since the request; an erroneous
// one on the trace path; a never-answered one must be reported as a deadlock
// between TIMEOUT and TIMEOUT + 4 cycles after it was issued.
// Phase 2: 64 requests fill the buffer, the 65th is dropped, all 64 time out.
// Phase 3: a response arriving exactly when the counter reaches TIMEOUT goes to
// the RET path, not the trace path.
module tb_hie_xb;
  import hie_pkg::*;
  localparam int ENTRIES = 64, TIMEOUT = 1500;
  logic clk = 0, rst_n = 0;
  logic req_valid, rsp_valid, ret_valid, tb_valid, req_drop, rsp_unmatched;
  req_t req;
  rsp_t rsp;
  xact_t ret_xact;
  trace_t tb_rec;
  logic [6:0] occupancy;

  hie_xb #(.ENTRIES(ENTRIES), .TIMEOUT(TIMEOUT)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  typedef struct {
    bit      busy;
    longint  issue;
    longint  answer;      // planned response cycle, -1 = never
    bit      err;
    req_t    r;
  } outst_t;
  outst_t ot [256];
  int deadlocks = 0, errors_seen = 0, normals = 0, exact_to = 0;

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 15) $display("FAIL %s at cycle %0d", msg, cyc);
    end
  endtask

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference pairing of request and response opcodes (TileLink)
  function automatic logic [2:0] rsp_for(input logic [2:0] a);
    case (a)
      3'd0, 3'd1: return 3'd0;          // Put -> AccessAck
      3'd2, 3'd3, 3'd4: return 3'd1;    // Arith/Logic/Get -> AccessAckData
      3'd5: return 3'd2;                // Intent -> HintAck
      default: return 3'd5;
    endcase
  endfunction
  function automatic cmd_e cmd_ref(input logic [2:0] a);
    return (a == 3'd4) ? CMD_READ : (a <= 3'd1) ? CMD_WRITE : CMD_MISC;
  endfunction

  function automatic bit same_fields(input req_t r, input logic [2:0] opc, input logic [7:0] src,
                                     input page_t pg, input logic [3:0] m, input logic [2:0] sz,
                                     input logic [2:0] pr, input cmd_e c);
    return opc == r.opcode && src == r.source && pg == r.address[47:12] && m == r.mask &&
           sz == r.size && pr == r.param && c == cmd_ref(r.opcode);
  endfunction

  // outputs are sampled just before each rising edge
  task automatic sample(input int rsp_src);
    #4;
    if (rsp_src >= 0) begin
      if (ot[rsp_src].err) begin
        check(tb_valid && tb_rec.kind == ANOM_RESP_ERROR && !ret_valid, "error response to trace");
        check(same_fields(ot[rsp_src].r, tb_rec.opcode, tb_rec.source, tb_rec.page, tb_rec.mask,
                          tb_rec.size, tb_rec.param, tb_rec.cmd), "error record fields");
        errors_seen++;
      end else begin
        check(ret_valid, "response matched");
        check(ret_xact.rtime == rtime_t'(cyc - ot[rsp_src].issue), "response time");
        check(same_fields(ot[rsp_src].r, ret_xact.opcode, ret_xact.source, ret_xact.page,
                          ret_xact.mask, ret_xact.size, ret_xact.param, ret_xact.cmd), "ret fields");
        normals++;
      end
      ot[rsp_src].busy = 0;
    end else begin
      check(!ret_valid, "no spurious match");
    end
    if (tb_valid && tb_rec.kind == ANOM_DEADLOCK) begin
      int s;
      s = int'(tb_rec.source);
      check(ot[s].busy && ot[s].answer < 0 || ot[s].busy && ot[s].answer > cyc, "deadlock of an outstanding request");
      check(cyc - ot[s].issue >= TIMEOUT && cyc - ot[s].issue <= TIMEOUT + 4, "timeout latency");
      if (cyc - ot[s].issue == TIMEOUT) exact_to++;
      ot[s].busy = 0;
      deadlocks++;
    end
  endtask

  task automatic idle_inputs();
    req_valid = 0; rsp_valid = 0; req = '0; rsp = '0;
  endtask

  initial begin
    idle_inputs();
    for (int i = 0; i < 256; i++) ot[i].busy = 0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;

    // ---------------- phase 1: random traffic
    for (int n = 0; n < 8000; n++) begin
      int rs;
      idle_inputs();
      rs = -1;
      if (n < 6000 && $urandom_range(99) < 30) begin
        int s;
        s = int'($urandom_range(255));
        if (!ot[s].busy && occupancy < 7'(ENTRIES)) begin
          logic [2:0] opcs [6] = '{3'd0, 3'd1, 3'd2, 3'd3, 3'd4, 3'd5};
          req_valid = 1;
          req.opcode  = opcs[$urandom_range(5)];
          req.source  = 8'(s);
          req.address = {16'($urandom), $urandom};
          req.mask    = 4'($urandom);
          req.size    = 3'($urandom);
          req.param   = 3'($urandom);
          ot[s].busy   = 1;
          ot[s].issue  = cyc;
          ot[s].r      = req;
          ot[s].err    = ($urandom_range(99) < 5);
          ot[s].answer = ($urandom_range(99) < 4) ? -1 : cyc + 1 + longint'($urandom_range(399));
        end
      end
      for (int s = 0; s < 256; s++) begin
        if (rs < 0 && ot[s].busy && ot[s].answer >= 0 && ot[s].answer <= cyc &&
            !(req_valid && int'(req.source) == s)) begin
          rs = s;
          rsp_valid    = 1;
          rsp.opcode   = rsp_for(ot[s].r.opcode);
          rsp.source   = 8'(s);
          rsp.error    = ot[s].err;
        end
      end
      sample(rs);
      @(negedge clk);
    end
    idle_inputs();
    for (int s = 0; s < 256; s++)
      check(!ot[s].busy || ot[s].answer >= 0, "never-answered request left behind");
    check(deadlocks > 0 && errors_seen > 0 && normals > 0 && exact_to > 0, "phase 1 covered all paths");

    // drain anything left
    for (int s = 0; s < 256; s++) ot[s].busy = 0;
    rst_n = 0;
    @(negedge clk);
    rst_n = 1;

    // ---------------- phase 2: fill, drop, mass timeout
    deadlocks = 0;
    for (int s = 0; s < ENTRIES + 1; s++) begin
      idle_inputs();
      req_valid = 1;
      req.opcode = 3'd4; req.source = 8'(s); req.address = 48'(s) << 12;
      #4;
      if (s == ENTRIES) check(req_drop, "request dropped when full");
      else begin
        check(!req_drop, "request accepted");
        ot[s].busy = 1; ot[s].issue = cyc; ot[s].answer = -1; ot[s].err = 0; ot[s].r = req;
      end
      @(negedge clk);
    end
    idle_inputs();
    check(occupancy == 7'(ENTRIES), "buffer full");
    for (int n = 0; n < TIMEOUT + 100; n++) begin
      sample(-1);
      @(negedge clk);
    end
    check(deadlocks == ENTRIES, "every entry timed out");
    check(occupancy == 0, "buffer empty after timeouts");

    // ---------------- phase 3: response exactly at the timeout
    idle_inputs();
    req_valid = 1; req.opcode = 3'd0; req.source = 8'd7; req.address = 48'h1234_5678_9000;
    ot[7].busy = 1; ot[7].issue = cyc; ot[7].answer = cyc + TIMEOUT; ot[7].err = 0; ot[7].r = req;
    #4;
    @(negedge clk);
    idle_inputs();
    while (cyc < ot[7].answer) @(negedge clk);
    rsp_valid = 1; rsp.opcode = 3'd0; rsp.source = 8'd7; rsp.error = 0;
    #4;
    check(ret_valid && ret_xact.rtime == rtime_t'(TIMEOUT) && !tb_valid, "match wins over timeout");
    @(negedge clk);
    idle_inputs();

    $display("deadlocks=%0d errors=%0d normals=%0d", deadlocks, errors_seen, normals);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
