// Testbench for hie_sort_rank. First the four-entry example of the sort logic:
// analysed end page 0x85000 against start pages 0x80000, 0x82001, 0x80011 and
// 0x85001 gives a count of 3 (index-table slot 2). Then random tables of 16
// non-overlapping ranges scattered over random slots, some slots invalid: every
// valid entry's rank - 1 must equal its position in ascending address order,
// which the testbench knows from how it generated the ranges.
module tb_hie_sort_rank;
  import hie_pkg::*;
  localparam int N = 16;

  page_t       end4, start4 [4];
  logic [3:0]  valid4;
  logic [2:0]  rank4;

  page_t       endn, startn [N];
  logic [N-1:0] validn;
  logic [4:0]  rankn;

  int checks = 0, failures = 0;

  hie_sort_rank #(.N(4)) dut4 (.end_page(end4), .start_page(start4), .valid(valid4), .rank(rank4));
  hie_sort_rank #(.N(N)) dutn (.end_page(endn), .start_page(startn), .valid(validn), .rank(rankn));

  page_t ends [N];
  int    pos_of_slot [N];

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    start4[0] = 36'h80000; start4[1] = 36'h82001; start4[2] = 36'h80011; start4[3] = 36'h85001;
    end4 = 36'h85000; valid4 = 4'hF;
    #1;
    checks++;
    if (rank4 != 3'd3) begin failures++; $display("FAIL example rank %0d", rank4); end
    valid4 = 4'b1110;
    #1;
    checks++;
    if (rank4 != 3'd2) begin failures++; $display("FAIL masked example rank %0d", rank4); end

    for (int trial = 0; trial < 200; trial++) begin
      int nv;
      int perm [N];
      page_t cur;
      nv  = 1 + int'($urandom_range(N - 1));
      for (int i = 0; i < N; i++) perm[i] = i;
      for (int i = N - 1; i > 0; i--) begin
        int j, t;
        j = int'($urandom_range(i));
        t = perm[i]; perm[i] = perm[j]; perm[j] = t;
      end
      cur    = page_t'($urandom_range(1000));
      validn = '0;
      for (int i = 0; i < N; i++) begin
        startn[i] = page_t'($urandom);
        ends[i]   = startn[i];
        pos_of_slot[i] = -1;
      end
      // ascending ranges; the k-th range goes to slot perm[k]
      for (int k = 0; k < nv; k++) begin
        page_t len;
        len = page_t'($urandom_range(3));           // single-page ranges too
        startn[perm[k]] = cur;
        ends[perm[k]]   = cur + len;
        validn[perm[k]] = 1'b1;
        pos_of_slot[perm[k]] = k;
        cur = cur + len + 1 + page_t'($urandom_range(5));
      end
      for (int i = 0; i < N; i++) begin
        if (validn[i]) begin
          endn = ends[i];
          #1;
          checks++;
          if (int'(rankn) - 1 != pos_of_slot[i]) begin
            failures++;
            if (failures < 10) $display("FAIL trial %0d slot %0d rank %0d pos %0d", trial, i, rankn, pos_of_slot[i]);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
