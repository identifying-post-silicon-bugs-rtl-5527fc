// hie_sq_approx: multiplier-free approximation of the square of an error.
//
// The error value is shifted left by the base-2 logarithm of the next power of
// two above it, i.e. by its bit length: err << bitlen(err). For an error of 30
// (bit length 5) the result is 960, close to 900; for a power of two 2^k the
// result is 2^(2k+1), twice the true square. The result never falls below the
// true square and never exceeds twice it, which is accurate enough for the
// range entry table's variance bookkeeping.
//
// Interface: purely combinational, err in, sq out. The shift-instead-of-
// multiply idea and the worked example come from the design; the choice of
// bit length for exact powers of two is this implementation's reading.
module hie_sq_approx #(
  parameter int unsigned IN_W  = 13,
  parameter int unsigned OUT_W = 32
) (
  input  logic [IN_W-1:0]  err,
  output logic [OUT_W-1:0] sq
);

  logic [$clog2(IN_W+1)-1:0] blen;

  // Bit length = index of the highest set bit + 1 (0 for an error of 0).
  always_comb begin
    blen = '0;
    for (int i = 0; i < IN_W; i++) begin
      if (err[i]) blen = $bits(blen)'(i + 1);
    end
  end

  assign sq = OUT_W'(err) << blen;

endmodule
