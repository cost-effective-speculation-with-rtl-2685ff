// tage_predictor: the 1+12 component TAGE predictor read once per fetch block.
//
// A tagless bimodal base table and NTAB partially tagged components indexed
// with hashes of the block address and geometrically longer global
// histories. All components are banked by instruction slot: one row per
// component is computed from the block address and the history (shared by
// the 8 slots), and each slot compares its own tag, computed from its own
// PC. Per slot, the longest matching component is the provider, the next
// one (or the bimodal table) the alternate; a newly allocated provider
// (weak ctr, u = 0) gives way to the alternate when the 4-bit USE_ALT_ON_NA
// counter is at 8 or more. The provider's raw 3-bit field and u are also
// output because the omnipredictor reads that field as a store distance or
// a BTB pointer for non-branches. Lookup is combinational (the top registers
// the result).
//
// The update side reads one slot's entries in every component for a
// resolved instruction (ur_*), and takes back per-component writes, a
// bimodal write and a USE_ALT_ON_NA write from omni_update, all applied to
// the same locations at the clock edge. Useful counters age gracefully: after
// U_PERIOD updates, every row is swept, clearing the u MSB of all entries on
// one sweep and the LSB on the next. After reset, a sweep clears the tables
// and ready stays low until it ends (BIM_ROWS cycles).
//
// From the source: 1+12 components, 16K bimodal and 15K tagged entries,
// 2-bit u, 3-bit ctr, 10-bit tags, provider/alternate, reset every 512K
// updates. Own choices: history lengths, hashes, the use-alternate rule and
// the alternating MSB/LSB aging (taken from common TAGE practice).
module tage_predictor
  import omni_pkg::*;
#(
  parameter int unsigned TAG_ROWS = 160,      // 1280 entries per component / 8 banks
  parameter int unsigned BIM_ROWS = 2048,     // 16K entries / 8 banks
  parameter int unsigned U_PERIOD = 524288,   // updates between u agings
  localparam int unsigned TRW = $clog2(TAG_ROWS),
  localparam int unsigned BRW = $clog2(BIM_ROWS)
) (
  input  logic                clk,
  input  logic                rst_n,
  output logic                ready,
  // lookup
  input  logic [PC_W-1:0]     lk_blk,
  input  logic [HIST_MAX-1:0] lk_ghist,
  output slot_pred_t          lk_pred [SLOTS],
  // update read
  input  logic [PC_W-1:0]     ur_pc,
  input  logic [HIST_MAX-1:0] ur_ghist,
  output tage_entry_t         ur_ent  [NTAB],
  output logic [TAG_W-1:0]    ur_tag  [NTAB],
  output logic [1:0]          ur_bim,
  output logic [3:0]          ur_use_alt,
  // update write
  input  logic                upd_tick,        // one update applied this cycle
  input  logic [NTAB-1:0]     tw_en,
  input  tage_entry_t         tw_ent  [NTAB],
  input  logic                bw_en,
  input  logic [1:0]          bw_ctr,
  input  logic                ua_we,
  input  logic [3:0]          ua_val,
  // status
  output logic                aging            // an aging sweep is running
);

  localparam int unsigned INIT_ROWS = (BIM_ROWS > TAG_ROWS) ? BIM_ROWS : TAG_ROWS;

  // ---- reset sweep and u aging ----
  logic [$clog2(INIT_ROWS+1)-1:0] init_cnt;
  logic                           init_busy;
  logic [$clog2(U_PERIOD+1)-1:0]  upd_cnt;
  logic [TRW-1:0]                 age_row;
  logic                           age_msb;
  logic [3:0]                     use_alt;

  assign ready = !init_busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      init_cnt  <= '0;
      init_busy <= 1'b1;
      upd_cnt   <= '0;
      aging     <= 1'b0;
      age_row   <= '0;
      age_msb   <= 1'b1;
      use_alt   <= 4'd8;
    end else begin
      if (init_busy) begin
        init_cnt <= init_cnt + 1'b1;
        if (32'(init_cnt) == INIT_ROWS - 1) init_busy <= 1'b0;
      end
      if (ua_we) use_alt <= ua_val;
      if (aging) begin
        age_row <= age_row + 1'b1;
        if (age_row == TRW'(TAG_ROWS - 1)) begin
          aging   <= 1'b0;
          age_row <= '0;
          age_msb <= !age_msb;
        end
      end
      if (upd_tick) begin
        if (32'(upd_cnt) == U_PERIOD - 1) begin
          upd_cnt <= '0;
          aging   <= 1'b1;
        end else begin
          upd_cnt <= upd_cnt + 1'b1;
        end
      end
    end
  end

  assign ur_use_alt = use_alt;

  // ---- indices ----
  logic [TRW-1:0] lk_row [NTAB];
  logic [TRW-1:0] ur_row [NTAB];
  logic [BRW-1:0] lk_brow, ur_brow;
  logic [PC_W-1:0] ur_blk;
  logic [SLOT_W-1:0] ur_slot;

  assign ur_blk  = {ur_pc[PC_W-1:5], 5'b0};
  assign ur_slot = ur_pc[4:2];
  assign lk_brow = lk_blk[BRW+4:5];
  assign ur_brow = ur_blk[BRW+4:5];

  logic [15:0]      lk_f16 [NTAB], ur_f16 [NTAB];
  logic [TAG_W-1:0] lk_f10 [NTAB], ur_f10 [NTAB];
  logic [TAG_W-2:0] lk_f9  [NTAB], ur_f9  [NTAB];

  for (genvar t = 0; t < NTAB; t++) begin : g_hash
    hist_fold #(.LEN(HIST_LEN[t]), .W(16))      u_lk16 (.h(lk_ghist), .f(lk_f16[t]));
    hist_fold #(.LEN(HIST_LEN[t]), .W(TAG_W))   u_lk10 (.h(lk_ghist), .f(lk_f10[t]));
    hist_fold #(.LEN(HIST_LEN[t]), .W(TAG_W-1)) u_lk9  (.h(lk_ghist), .f(lk_f9[t]));
    hist_fold #(.LEN(HIST_LEN[t]), .W(16))      u_ur16 (.h(ur_ghist), .f(ur_f16[t]));
    hist_fold #(.LEN(HIST_LEN[t]), .W(TAG_W))   u_ur10 (.h(ur_ghist), .f(ur_f10[t]));
    hist_fold #(.LEN(HIST_LEN[t]), .W(TAG_W-1)) u_ur9  (.h(ur_ghist), .f(ur_f9[t]));
    assign lk_row[t] = TRW'(tage_row_hash(lk_blk, lk_f16[t], t) % TAG_ROWS);
    assign ur_row[t] = TRW'(tage_row_hash(ur_blk, ur_f16[t], t) % TAG_ROWS);
    assign ur_tag[t] = tage_tag_hash(ur_pc, ur_f10[t], ur_f9[t]);
  end

  // ---- storage ----
  tage_entry_t lk_ent [NTAB][SLOTS];
  logic [1:0]  lk_bim [SLOTS];

  for (genvar t = 0; t < NTAB; t++) begin : g_tab
    tage_tagged_table #(.ROWS(TAG_ROWS)) u_tab (
      .clk     (clk),
      .rd_row  (lk_row[t]),
      .rd_ent  (lk_ent[t]),
      .ur_row  (ur_row[t]),
      .ur_bank (ur_slot),
      .ur_ent  (ur_ent[t]),
      .we      (tw_en[t] && !init_busy),
      .w_row   (ur_row[t]),
      .w_bank  (ur_slot),
      .w_ent   (tw_ent[t]),
      .clr_en  (init_busy && 32'(init_cnt) < TAG_ROWS),
      .clr_row (TRW'(init_cnt)),
      .age_en  (aging),
      .age_row (age_row),
      .age_msb (age_msb)
    );
  end

  tage_bimodal #(.ROWS(BIM_ROWS)) u_bim (
    .clk     (clk),
    .rd_row  (lk_brow),
    .rd_ctr  (lk_bim),
    .ur_row  (ur_brow),
    .ur_bank (ur_slot),
    .ur_ctr  (ur_bim),
    .we      (bw_en && !init_busy),
    .w_row   (ur_brow),
    .w_bank  (ur_slot),
    .w_ctr   (bw_ctr),
    .clr_en  (init_busy),
    .clr_row (BRW'(init_cnt))
  );

  // ---- per-slot provider / alternate selection ----
  always_comb begin
    for (int s = 0; s < SLOTS; s++) begin
      logic [PC_W-1:0] spc;
      logic            phit, ahit;
      logic [3:0]      pidx, aidx;
      logic            pdir, adir, weak_new;
      tage_entry_t     pe, ae;
      spc  = {lk_blk[PC_W-1:5], SLOT_W'(s), 2'b00};
      phit = 1'b0; ahit = 1'b0; pidx = '0; aidx = '0;
      for (int t = 0; t < NTAB; t++)
        if (lk_ent[t][s].tag == tage_tag_hash(spc, lk_f10[t], lk_f9[t])) begin
          if (phit) begin ahit = 1'b1; aidx = pidx; end
          phit = 1'b1; pidx = 4'(t);
        end
      pe = lk_ent[pidx][s];
      ae = lk_ent[aidx][s];
      pdir = !pe.ctr[CTR_W-1];
      adir = ahit ? !ae.ctr[CTR_W-1] : lk_bim[s][1];
      weak_new = (pe.ctr == 3'b000 || pe.ctr == 3'b111) && pe.u == '0;
      lk_pred[s].hit      = phit;
      lk_pred[s].provider = pidx;
      lk_pred[s].field    = phit ? pe.ctr : '0;
      lk_pred[s].u        = phit ? pe.u : '0;
      lk_pred[s].dir      = !phit ? lk_bim[s][1] : (weak_new && use_alt[3]) ? adir : pdir;
    end
  end

endmodule
