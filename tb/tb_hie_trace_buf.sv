// Testbench for hie_trace_buf at its default depth of 128. Phase 1 writes
// response-error and delay records from both ports (with collisions, where
// port A must win and port B must see b_ready low), more than 128 of them so
// the buffer wraps, and checks contents through the read port, the record
// count and the interrupts (delay raises irq_delay, response error raises
// nothing). Phase 2 writes a deadlock record: irq_deadlock must rise, the
// buffer must halt, and later records must not change it.
module tb_hie_trace_buf;
  import hie_pkg::*;
  localparam int DEPTH = 128;
  logic clk = 0, rst_n = 0;
  logic a_valid, b_valid, b_ready, irq_clear, irq_deadlock, irq_delay, halted;
  trace_t a_rec, b_rec, rd_data;
  logic [6:0] rd_addr, wr_ptr;
  logic [7:0] n_rec;
  int checks = 0, failures = 0;
  trace_t model [DEPTH];
  int mptr = 0, mcount = 0;
  bit saw_delay = 0;

  hie_trace_buf #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", msg, $time);
    end
  endtask

  function automatic trace_t rnd_rec(input anom_e k);
    trace_t r;
    r = trace_t'({$urandom, $urandom});
    r.kind = k;
    return r;
  endfunction

  task automatic read_all();
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      rd_addr = 7'(i);
      @(negedge clk);
      if (i < mcount) check(rd_data == model[i], "stored record");
    end
  endtask

  initial begin
    a_valid = 0; b_valid = 0; irq_clear = 0; rd_addr = '0;
    a_rec = '0; b_rec = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // phase 1
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      a_valid = ($urandom_range(2) == 0);
      b_valid = ($urandom_range(1) == 0);
      a_rec   = rnd_rec(ANOM_RESP_ERROR);
      b_rec   = rnd_rec(ANOM_DELAY);
      #1;
      check(b_ready == !a_valid, "port A has priority");
      @(posedge clk);
      if (a_valid || b_valid) begin
        model[mptr] = a_valid ? a_rec : b_rec;
        if (!a_valid) saw_delay = 1;
        mptr = (mptr + 1) % DEPTH;
        if (mcount < DEPTH) mcount++;
      end
      #1;
      check(irq_delay == saw_delay, "delay interrupt");
      check(!irq_deadlock && !halted, "no deadlock yet");
    end
    @(negedge clk);
    a_valid = 0; b_valid = 0;
    check(int'(n_rec) == mcount && int'(wr_ptr) == mptr, "count and pointer");
    check(mcount == DEPTH, "buffer wrapped");
    read_all();
    irq_clear = 1;
    @(negedge clk);
    irq_clear = 0;
    check(!irq_delay, "interrupt cleared");
    // a response error alone raises no interrupt
    a_valid = 1; a_rec = rnd_rec(ANOM_RESP_ERROR);
    @(negedge clk);
    a_valid = 0;
    model[mptr] = a_rec; mptr = (mptr + 1) % DEPTH;
    check(!irq_delay && !irq_deadlock, "response error raises nothing");
    // phase 2: deadlock halts the buffer
    a_valid = 1; a_rec = rnd_rec(ANOM_DEADLOCK);
    @(negedge clk);
    model[mptr] = a_rec; mptr = (mptr + 1) % DEPTH;
    check(irq_deadlock && halted, "deadlock interrupt and halt");
    for (int n = 0; n < 50; n++) begin
      a_valid = ($urandom_range(1) == 0); a_rec = rnd_rec(ANOM_RESP_ERROR);
      b_valid = 1; b_rec = rnd_rec(ANOM_DELAY);
      @(negedge clk);
    end
    a_valid = 0; b_valid = 0;
    check(int'(wr_ptr) == mptr, "pointer frozen after deadlock");
    check(!irq_delay, "no delay interrupt while halted");
    read_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
