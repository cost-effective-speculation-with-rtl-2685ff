// hist_fold: XOR-folds the youngest LEN bits of the global history into W
// bits (history bit i lands in result bit i mod W). Each result bit is the
// XOR reduction of the history under a constant mask, so the fold is a
// plain XOR tree with no state. Used for the TAGE index and tag hashes;
// the folding scheme is this design's own (the source does not give its
// hash functions).
module hist_fold
  import omni_pkg::*;
#(
  parameter int unsigned LEN = 16,
  parameter int unsigned W   = 16
) (
  input  logic [HIST_MAX-1:0] h,
  output logic [W-1:0]        f
);
  for (genvar b = 0; b < W; b++) begin : g_bit
    localparam logic [HIST_MAX-1:0] MASK = fold_mask(LEN, W, b);
    assign f[b] = ^(h & MASK);
  end
endmodule
