// Testbench for hie_fifo at its default 16 x 72 size. Random pushes and pops
// are compared against a queue model: data order, empty/full flags, count,
// and the overflow pulse when a push meets a full queue without a pop. Phases
// with heavy push or heavy pop bias make the queue fill and drain.
module tb_hie_fifo;
  localparam int DEPTH = 16, WIDTH = 72;
  logic clk = 0, rst_n = 0;
  logic push, pop, empty, full, overflow;
  logic [WIDTH-1:0] wdata, rdata;
  logic [4:0] count;
  int checks = 0, failures = 0, overflows = 0, fulls = 0;
  logic [WIDTH-1:0] model [$];

  hie_fifo #(.DEPTH(DEPTH), .WIDTH(WIDTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
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

  initial begin
    push = 0; pop = 0; wdata = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 6000; cyc++) begin
      int bias;
      bias = ((cyc / 500) % 2 == 0) ? 80 : 20;
      @(negedge clk);
      push  = ($urandom_range(99) < bias);
      pop   = ($urandom_range(99) < 100 - bias);
      wdata = {$urandom, $urandom, 8'($urandom)};
      #1;
      check(empty == (model.size() == 0), "empty flag");
      check(full == (model.size() == DEPTH), "full flag");
      check(int'(count) == model.size(), "count");
      if (model.size() > 0) check(rdata == model[0], "data order");
      check(overflow == (push && model.size() == DEPTH && !pop), "overflow pulse");
      if (full) fulls++;
      if (overflow) overflows++;
      @(posedge clk);
      if (pop && model.size() > 0) void'(model.pop_front());
      if (push && (model.size() < DEPTH)) model.push_back(wdata);
      else if (push && pop) model.push_back(wdata);
    end
    check(fulls > 0 && overflows > 0, "queue filled and overflowed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
