// tage_bimodal: tagless base predictor of the TAGE predictor.
//
// A table of 2-bit saturating counters indexed by the fetch block address
// only; one bank per instruction slot so that one row read gives a counter
// for every instruction of the block. A counter at 2 or 3 predicts taken.
// Size follows the source (16K entries = 8 banks x 2048 rows); banking by
// slot, the reset sweep and the reset value (weakly not taken, 01) are this
// design's own.
//
// Interface and timing: rd_row -> rd_ctr[] and ur_row/ur_bank -> ur_ctr are
// combinational reads; a write (we) and a row clear (clr_en) take effect at
// the clock edge, the clear winning.
module tage_bimodal
  import omni_pkg::*;
#(
  parameter int unsigned ROWS  = 2048,
  parameter int unsigned BANKS = SLOTS,
  localparam int unsigned RW   = $clog2(ROWS),
  localparam int unsigned BW   = $clog2(BANKS)
) (
  input  logic          clk,
  input  logic [RW-1:0] rd_row,
  output logic [1:0]    rd_ctr [BANKS],
  input  logic [RW-1:0] ur_row,
  input  logic [BW-1:0] ur_bank,
  output logic [1:0]    ur_ctr,
  input  logic          we,
  input  logic [RW-1:0] w_row,
  input  logic [BW-1:0] w_bank,
  input  logic [1:0]    w_ctr,
  input  logic          clr_en,
  input  logic [RW-1:0] clr_row
);

  logic [1:0] mem [BANKS][ROWS];

  always_comb begin
    for (int b = 0; b < BANKS; b++) rd_ctr[b] = mem[b][rd_row];
    ur_ctr = mem[ur_bank][ur_row];
  end

  always_ff @(posedge clk) begin
    if (we) mem[w_bank][w_row] <= w_ctr;
    if (clr_en)
      for (int b = 0; b < BANKS; b++) mem[b][clr_row] <= 2'b01;
  end

endmodule
