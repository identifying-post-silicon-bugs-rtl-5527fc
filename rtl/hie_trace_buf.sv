// hie_trace_buf: trace buffer of anomalous transactions.
//
// A circular store of DEPTH records. Records come from two places: the
// transaction buffer (timed-out requests, reported as deadlocks, and responses
// that carried an error) and the range entry table (responses far slower than
// their range's average). Each record is the transaction's opcode, source,
// page address, mask, size, param and command type, plus the kind of anomaly.
// When the oldest record would be overwritten the buffer wraps around.
//
// Interrupts: writing a deadlock record raises irq_deadlock, writing a delay
// record raises irq_delay; a response-error record raises nothing. Both are
// sticky until irq_clear. After a deadlock record has been written the buffer
// stops recording (halted) so that later traffic cannot overwrite the
// transaction that locked up; only reset restarts it. Delay records do not
// halt it.
//
// Interface: port A (a_valid/a_rec) is the transaction-buffer side and is
// always accepted; port B (b_valid/b_rec/b_ready) is the range-table side and
// waits while port A writes. While halted both ports are accepted and dropped.
// rd_addr/rd_data read the store with one cycle of latency (block-RAM style);
// wr_ptr is the next slot to be written and n_rec the number of valid records.
//
// From the design: the three anomaly kinds, the two interrupts, halting on a
// deadlock only, 128 entries. Own choices: the kind field in each record, the
// priority of port A, sticky interrupts with a clear input, the read port
// (the design brought the record fields out to its top level instead).
module hie_trace_buf
  import hie_pkg::*;
#(
  parameter int unsigned DEPTH = 128
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   a_valid,
  input  trace_t a_rec,
  input  logic   b_valid,
  input  trace_t b_rec,
  output logic   b_ready,
  input  logic   irq_clear,
  output logic   irq_deadlock,
  output logic   irq_delay,
  output logic   halted,
  input  logic [$clog2(DEPTH)-1:0] rd_addr,
  output trace_t rd_data,
  output logic [$clog2(DEPTH)-1:0] wr_ptr,
  output logic [$clog2(DEPTH+1)-1:0] n_rec
);

  trace_t mem [DEPTH];
  logic   we;
  trace_t wrec;

  assign b_ready = !a_valid;
  assign we      = !halted && (a_valid || b_valid);
  assign wrec    = a_valid ? a_rec : b_rec;

  always_ff @(posedge clk) begin
    if (we) mem[wr_ptr] <= wrec;
    rd_data <= mem[rd_addr];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wr_ptr       <= '0;
      n_rec        <= '0;
      halted       <= 1'b0;
      irq_deadlock <= 1'b0;
      irq_delay    <= 1'b0;
    end else begin
      if (irq_clear) begin
        irq_deadlock <= 1'b0;
        irq_delay    <= 1'b0;
      end
      if (we) begin
        wr_ptr <= wr_ptr + 1'b1;
        if (32'(n_rec) < DEPTH) n_rec <= n_rec + 1'b1;
        if (wrec.kind == ANOM_DEADLOCK) begin
          halted       <= 1'b1;
          irq_deadlock <= 1'b1;
        end
        if (wrec.kind == ANOM_DELAY) irq_delay <= 1'b1;
      end
    end
  end

  // The write pointer wraps naturally, so the depth must be a power of two.
  if ((DEPTH & (DEPTH - 1)) != 0) begin : g_depth_check
    $error("hie_trace_buf: DEPTH must be a power of two");
  end

endmodule
