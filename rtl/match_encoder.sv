// match_encoder: matchline encoder of a CAM array.
//
// Takes the W matchlines of the array (bit i high when word i matches the
// search word) and returns the index of the lowest-numbered matching word,
// as the encoder at the right of a CAM array does. It also reports whether
// any word matched (hit) and whether more than one did (multi). The multi
// flag is the "refresh bit" the error-tolerant controller watches for.
// Lowest index wins, which is the usual priority rule for routing tables
// stored longest prefix first; the priority rule is this design's choice.
//
// Purely combinational.
module match_encoder #(
  parameter int unsigned W  = 4,
  localparam int unsigned AW = (W > 1) ? $clog2(W) : 1
) (
  input  logic [W-1:0]  ml,
  output logic [AW-1:0] addr,
  output logic          hit,
  output logic          multi
);

  always_comb begin
    addr = '0;
    for (int i = W - 1; i >= 0; i--)
      if (ml[i]) addr = AW'(i);
  end

  assign hit   = |ml;
  // more than one bit set: clearing the lowest set bit leaves something
  assign multi = |(ml & (ml - W'(1)));

endmodule
