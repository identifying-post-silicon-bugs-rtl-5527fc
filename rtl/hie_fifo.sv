// hie_fifo: synchronous first-in first-out queue between pipeline stages.
//
// In the introspection engine it carries completed transactions from the
// transaction buffer (stage 0) to the range entry table (stage 1), so that
// responses keep being accepted while the table is busy with a multi-cycle
// operation such as an insert or a merge. Storage is a circular array with
// read and write pointers and an occupancy counter.
//
// Interface: push/wdata write when not full; a push while full is discarded
// and reported on overflow for one cycle (the snooped bus cannot be stalled,
// so the transaction is lost). pop/rdata follow first-word fall-through: rdata
// shows the oldest entry whenever empty is low, and pop removes it. A push and
// a pop in the same cycle are both performed.
//
// The 16-entry depth is the one the design needed to catch a non-responsive
// peripheral when memory and peripheral traffic were both snooped; the
// fall-through interface and the drop-on-overflow behaviour are choices of
// this implementation.
module hie_fifo #(
  parameter int unsigned DEPTH = 16,
  parameter int unsigned WIDTH = 72
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             push,
  input  logic [WIDTH-1:0] wdata,
  input  logic             pop,
  output logic [WIDTH-1:0] rdata,
  output logic             empty,
  output logic             full,
  output logic             overflow,
  output logic [$clog2(DEPTH+1)-1:0] count
);

  localparam int unsigned PTR_W = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [PTR_W-1:0] wr_ptr, rd_ptr;
  logic             do_push, do_pop;

  assign empty    = (count == '0);
  assign full     = (32'(count) == DEPTH);
  assign do_pop   = pop && !empty;
  assign do_push  = push && (!full || do_pop);
  assign overflow = push && !do_push;
  assign rdata    = mem[rd_ptr];

  function automatic logic [PTR_W-1:0] next_ptr(input logic [PTR_W-1:0] p);
    return (32'(p) == DEPTH - 1) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
    end else begin
      if (do_push) wr_ptr <= next_ptr(wr_ptr);
      if (do_pop)  rd_ptr <= next_ptr(rd_ptr);
      count <= count + $bits(count)'(do_push) - $bits(count)'(do_pop);
    end
  end

  always_ff @(posedge clk) begin
    if (do_push) mem[wr_ptr] <= wdata;
  end

  a_count_bound: assert property (@(posedge clk) disable iff (!rst_n) 32'(count) <= DEPTH);

endmodule
