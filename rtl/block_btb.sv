// block_btb: 2-way set-associative, block-organised branch target buffer.
//
// The BTB is split into one bank per instruction slot. The high-order bits
// of the fetch block address pick one row, read in every bank, and the
// slot number picks the bank, so one access delivers the two ways of a set
// for each of the 8 instructions of the block. Besides caching the targets
// of direct branches, these words serve indirect jumps: the entry in the
// jump's own slot is its A0 entry, and the entries of the other slots,
// tagged with the jump's own tag, are its A1 entries. A second, separate
// access (A2) reads one set at an index hashed from the jump's PC and a
// fixed-length global history, to reach jumps with many targets.
//
// Entry: valid, 1-bit hysteresis, 20-bit tag (PC hash plus slot offset),
// 46-bit word target (68 bits). 8K entries = 8 banks x 512 rows x 2 ways,
// as in the source's large configuration; the entry layout, the A2 hash and
// the reset sweep are this design's own.
//
// Interface and timing: all reads are combinational (lookup lk_*, A2 a2_*,
// update ur_*); one entry write per clock (we). After reset a sweep clears
// all valid bits; ready is low for ROWS cycles.
module block_btb
  import omni_pkg::*;
#(
  parameter int unsigned ROWS = 512,
  parameter int unsigned WAYS = 2,
  localparam int unsigned RW  = $clog2(ROWS)
) (
  input  logic                clk,
  input  logic                rst_n,
  output logic                ready,
  // fetch-time block access (A0/A1)
  input  logic [PC_W-1:0]     lk_blk,
  output btb_entry_t          lk_ent [SLOTS][WAYS],
  // second access (A2)
  input  logic [PC_W-1:0]     a2_pc,
  input  logic [HIST_MAX-1:0] a2_ghist,
  output btb_entry_t          a2_ent [WAYS],
  // update-side reads
  input  logic [PC_W-1:0]     ur_pc,
  input  logic [HIST_MAX-1:0] ur_ghist,
  output btb_entry_t          ur_ent [SLOTS][WAYS],
  output btb_entry_t          ur_a2_ent [WAYS],
  output logic [SLOT_W-1:0]   ur_a2_bank,
  output logic [RW-1:0]       ur_a2_row,
  output logic [RW-1:0]       ur_row,
  // write
  input  logic                we,
  input  logic [SLOT_W-1:0]   w_bank,
  input  logic [RW-1:0]       w_row,
  input  logic [$clog2(WAYS)-1:0] w_way,
  input  btb_entry_t          w_ent
);

  btb_entry_t mem [SLOTS][ROWS][WAYS];

  logic [RW:0] init_cnt;
  logic        init_busy;
  assign ready = !init_busy;

  logic [15:0]       a2h, ura2h;
  logic [RW-1:0]     lk_row, a2_row;
  logic [SLOT_W-1:0] a2_bank;

  assign lk_row     = lk_blk[RW+4:5];
  assign ur_row     = ur_pc[RW+4:5];
  assign a2h        = a2_hash(a2_pc, a2_ghist);
  assign ura2h      = a2_hash(ur_pc, ur_ghist);
  assign a2_bank    = a2h[SLOT_W-1:0];
  assign a2_row     = a2h[SLOT_W +: RW];
  assign ur_a2_bank = ura2h[SLOT_W-1:0];
  assign ur_a2_row  = ura2h[SLOT_W +: RW];

  always_comb begin
    for (int s = 0; s < SLOTS; s++)
      for (int w = 0; w < WAYS; w++) begin
        lk_ent[s][w] = mem[s][lk_row][w];
        ur_ent[s][w] = mem[s][ur_row][w];
      end
    for (int w = 0; w < WAYS; w++) begin
      a2_ent[w]    = mem[a2_bank][a2_row][w];
      ur_a2_ent[w] = mem[ur_a2_bank][ur_a2_row][w];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      init_cnt  <= '0;
      init_busy <= 1'b1;
    end else if (init_busy) begin
      init_cnt <= init_cnt + 1'b1;
      if (init_cnt == (RW+1)'(ROWS - 1)) init_busy <= 1'b0;
    end
  end

  always_ff @(posedge clk) begin
    if (init_busy) begin
      for (int s = 0; s < SLOTS; s++)
        for (int w = 0; w < WAYS; w++) mem[s][init_cnt[RW-1:0]][w].valid <= 1'b0;
    end else if (we) begin
      mem[w_bank][w_row][w_way] <= w_ent;
    end
  end

endmodule
