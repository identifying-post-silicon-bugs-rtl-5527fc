// Testbench for hie_sq_approx: exhaustive over all 13-bit errors. The
// reference shifts the error by the number of bits needed to hold it, computed
// here by repeated halving, and also checks the result stays between the true
// square and twice the true square. Includes the worked example 30 -> 960.
module tb_hie_sq_approx;
  logic [12:0] err;
  logic [31:0] sq;
  int checks = 0, failures = 0;

  hie_sq_approx #(.IN_W(13), .OUT_W(32)) dut (.err(err), .sq(sq));

  function automatic int bits_needed(input int v);
    int n = 0;
    while (v > 0) begin
      v = v / 2;
      n++;
    end
    return n;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int e = 0; e < 8192; e++) begin
      longint exp_sq, tru;
      err = 13'(e);
      #1;
      exp_sq = longint'(e) * (longint'(1) << bits_needed(e));
      tru    = longint'(e) * longint'(e);
      checks++;
      if (longint'(sq) != exp_sq || longint'(sq) < tru || longint'(sq) > 2 * tru) begin
        failures++;
        if (failures < 10) $display("FAIL err=%0d sq=%0d expected %0d", e, sq, exp_sq);
      end
    end
    err = 13'd30;
    #1;
    checks++;
    if (sq != 32'd960) begin
      failures++;
      $display("FAIL example: 30 -> %0d", sq);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
