// tage_tagged_table: one partially tagged TAGE component.
//
// Each entry holds a 2-bit useful counter u, a partial tag and a 3-bit
// field ctr. The component is split into one bank per instruction slot of
// the fetch block, so a single row index read in all banks delivers one
// entry per instruction, as in the EV8-style banked predictor the design
// follows. Sizes follow the source (1280 entries = 8 banks x 160 rows,
// 10-bit tags); the banking by slot, the reset sweep and the aging port are
// this design's own.
//
// Interface and timing:
//   rd_row -> rd_ent[]   combinational read of one row in all banks (lookup)
//   ur_row/ur_bank -> ur_ent  combinational read of one entry (update)
//   we/w_row/w_bank/w_ent     write at the clock edge
//   clr_en/clr_row            clear a whole row (reset sweep), highest priority
//   age_en/age_row/age_msb    clear the u MSB or LSB of a whole row; a write
//                             in the same cycle and row takes precedence
module tage_tagged_table
  import omni_pkg::*;
#(
  parameter int unsigned ROWS  = 160,
  parameter int unsigned BANKS = SLOTS,
  localparam int unsigned RW   = $clog2(ROWS),
  localparam int unsigned BW   = $clog2(BANKS)
) (
  input  logic              clk,
  input  logic [RW-1:0]     rd_row,
  output tage_entry_t       rd_ent [BANKS],
  input  logic [RW-1:0]     ur_row,
  input  logic [BW-1:0]     ur_bank,
  output tage_entry_t       ur_ent,
  input  logic              we,
  input  logic [RW-1:0]     w_row,
  input  logic [BW-1:0]     w_bank,
  input  tage_entry_t       w_ent,
  input  logic              clr_en,
  input  logic [RW-1:0]     clr_row,
  input  logic              age_en,
  input  logic [RW-1:0]     age_row,
  input  logic              age_msb
);

  tage_entry_t mem [BANKS][ROWS];

  always_comb begin
    for (int b = 0; b < BANKS; b++) rd_ent[b] = mem[b][rd_row];
    ur_ent = mem[ur_bank][ur_row];
  end

  always_ff @(posedge clk) begin
    if (age_en)
      for (int b = 0; b < BANKS; b++) begin
        if (age_msb) mem[b][age_row].u[1] <= 1'b0;
        else         mem[b][age_row].u[0] <= 1'b0;
      end
    if (we) mem[w_bank][w_row] <= w_ent;
    if (clr_en)
      for (int b = 0; b < BANKS; b++) mem[b][clr_row] <= '0;
  end

endmodule
