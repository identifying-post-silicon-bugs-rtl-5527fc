// hie_sort_rank: rank of one range-table entry among all valid entries.
//
// The range entry table orders its entries without an O(n^2) sort: one entry
// at a time is "analysed", its end address is compared with the start address
// of every entry by N comparators, and an adder counts the comparators that
// are true. Because table ranges never overlap, that count is the number of
// valid entries that begin at or below the analysed range, so count - 1 is the
// analysed entry's position in ascending address order; the table stores the
// entry's ID at that position of its index table. Stepping through the N
// entries once therefore fills the index table in N cycles.
//
// Interface: combinational. end_page is the analysed entry's end address,
// start_page/valid describe all entries, rank is the adder output (1..N for a
// valid analysed entry). Addresses are 4 KB page numbers, so the comparison is
// end >= start, which at byte level is the end-address > start-address test of
// the design; invalid entries are masked out here.
module hie_sort_rank
  import hie_pkg::*;
#(
  parameter int unsigned N = 16
) (
  input  page_t                   end_page,
  input  page_t                   start_page [N],
  input  logic  [N-1:0]           valid,
  output logic  [$clog2(N+1)-1:0] rank
);

  logic [N-1:0] gt;

  always_comb begin
    for (int j = 0; j < N; j++) gt[j] = valid[j] && (end_page >= start_page[j]);
  end

  always_comb begin
    rank = '0;
    for (int j = 0; j < N; j++) rank += $bits(rank)'(gt[j]);
  end

endmodule
