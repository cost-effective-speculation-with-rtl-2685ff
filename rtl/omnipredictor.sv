// omnipredictor: unified conditional-branch, memory-dependence and
// indirect-target predictor for an 8-wide fetch front end.
//
// One TAGE predictor and one block BTB are read for the whole fetch block,
// one prediction and one BTB set per instruction word, before the block is
// decoded. After decode each word's TAGE result is read according to the
// instruction's type (omni_interpret): a direction for conditional
// branches, a distance to the producing store for loads, a pointer to one
// of the block's BTB target words for indirect jumps (or a request for a
// second, history-hashed BTB access, A2). No separate memory dependence or
// indirect target tables exist. Around that core sit the pieces of the
// front end the predictions feed: the global history, the return address
// stack, the next block address selection, and the FIFO of recently
// dispatched stores that turns a predicted distance into a store queue
// identifier.
//
// Pipeline and timing:
//   cycle F  fetch_valid/fetch_pc: TAGE and BTB are read with the current
//            global history; the results are registered.
//   cycle D  dec_valid/dec_itype give the types of that block (the cycle
//            after F, or later: the registered results wait). The per-slot
//            verdicts, next_pc and the block's history snapshot d_ghist are
//            valid combinationally; the block's conditional outcomes enter
//            the history and calls/returns move the RAS at the clock edge.
//   cycle D+1 if the block ends in an indirect jump whose field is 111, the
//            A2 BTB set is read: a2_done, a2_hit, a2_target.
//   Dispatch: st_push at store dispatch, st_issue at store issue,
//            ld_dist -> ld_dep_valid/ld_sqid combinational for a load.
//   Update:  upd_valid/upd, one resolved instruction per cycle, carrying
//            the d_ghist of its block; writes land at the clock edge.
// After reset, ready stays low while the tables are cleared (2048 cycles
// at the default sizes); lookups and updates must wait for it.
//
// Sizes follow the source's main (large) configuration: 8-wide fetch,
// TAGE 1+12 with 16K bimodal and 15K tagged entries, a 2-way 8K-entry BTB,
// a 32-entry RAS, a 7-entry store FIFO, u reset every 512K updates. The
// two-stage F/D timing, the port format and the history management are
// this design's own.
module omnipredictor
  import omni_pkg::*;
#(
  parameter int unsigned TAG_ROWS  = 160,     // 1280-entry tagged components
  parameter int unsigned BIM_ROWS  = 2048,    // 16K-entry bimodal
  parameter int unsigned BTB_ROWS  = 512,     // 8K-entry 2-way BTB
  parameter int unsigned RAS_DEPTH = 32,
  parameter int unsigned U_PERIOD  = 524288,
  localparam int unsigned WAYS     = 2
) (
  input  logic                clk,
  input  logic                rst_n,
  output logic                ready,
  // fetch
  input  logic                fetch_valid,
  input  logic [PC_W-1:0]     fetch_pc,
  // decode
  input  logic                dec_valid,
  input  itype_e              dec_itype [SLOTS],
  output logic                d_dir [SLOTS],
  output mdp_kind_e           d_mdp_kind [SLOTS],
  output logic [2:0]          d_mdp_dist [SLOTS],
  output logic                d_tgt_valid [SLOTS],
  output logic [PC_W-1:0]     d_tgt [SLOTS],
  output logic [1:0]          d_ind_src [SLOTS],
  output logic [PC_W-1:0]     d_next_pc,
  output logic                d_exit_taken,
  output logic [SLOT_W-1:0]   d_exit_slot,
  output logic                d_tgt_miss,
  output logic                d_a2_wait,
  output logic [HIST_MAX-1:0] d_ghist,
  // second BTB access
  output logic                a2_done,
  output logic                a2_hit,
  output logic [PC_W-1:0]     a2_target,
  // history repair
  input  logic                hist_restore,
  input  logic [HIST_MAX-1:0] hist_restore_val,
  // store FIFO
  input  logic                mem_flush,
  input  logic                st_push,
  input  logic [SQID_W-1:0]   st_push_sqid,
  input  logic                st_issue,
  input  logic [SQID_W-1:0]   st_issue_sqid,
  input  logic [2:0]          ld_dist,
  output logic                ld_dep_valid,
  output logic [SQID_W-1:0]   ld_sqid,
  output logic [SFIFO_N-1:0]  st_fifo_valid,   // which FIFO positions hold an unissued store
  // update
  input  logic                upd_valid,
  input  upd_t                upd,
  output logic                u_cond_mispred,
  output logic                u_tage_alloc,
  output logic                u_mdp_ureset,
  output logic [2:0]          u_ind_case,
  output logic                u_a2_write,
  output logic                u_aging
);

  localparam int unsigned BRW = $clog2(BTB_ROWS);

  logic tage_ready, btb_ready;
  assign ready = tage_ready && btb_ready;

  // ---------------------------------------------------------------- history
  logic [HIST_MAX-1:0] ghist;
  logic [SLOTS-1:0]    cmask, ctaken;

  // ---------------------------------------------------------------- TAGE
  slot_pred_t       lk_pred [SLOTS];
  tage_entry_t      ur_ent  [NTAB];
  logic [TAG_W-1:0] ur_tag  [NTAB];
  logic [1:0]       ur_bim;
  logic [3:0]       ur_use_alt;
  logic             upd_tick;
  logic [NTAB-1:0]  tw_en;
  tage_entry_t      tw_ent  [NTAB];
  logic             bw_en, ua_we;
  logic [1:0]       bw_ctr;
  logic [3:0]       ua_val;

  tage_predictor #(.TAG_ROWS(TAG_ROWS), .BIM_ROWS(BIM_ROWS), .U_PERIOD(U_PERIOD)) u_tage (
    .clk, .rst_n, .ready(tage_ready),
    .lk_blk({fetch_pc[PC_W-1:5], 5'b0}), .lk_ghist(ghist), .lk_pred,
    .ur_pc(upd.pc), .ur_ghist(upd.ghist), .ur_ent, .ur_tag, .ur_bim, .ur_use_alt,
    .upd_tick, .tw_en, .tw_ent, .bw_en, .bw_ctr, .ua_we, .ua_val,
    .aging(u_aging)
  );

  // ---------------------------------------------------------------- BTB
  btb_entry_t        lk_btb [SLOTS][WAYS];
  btb_entry_t        a2_ent [WAYS];
  btb_entry_t        ub_ent [SLOTS][WAYS];
  btb_entry_t        ub_a2_ent [WAYS];
  logic [SLOT_W-1:0] ub_a2_bank, bt_bank;
  logic [BRW-1:0]    ub_a2_row, ub_row, bt_row;
  logic              bt_we;
  logic              bt_way;
  btb_entry_t        bt_ent;
  logic [PC_W-1:0]   a2_pc_q;
  logic [HIST_MAX-1:0] a2_hist_q;
  logic              a2_pend_q;

  block_btb #(.ROWS(BTB_ROWS), .WAYS(WAYS)) u_btb (
    .clk, .rst_n, .ready(btb_ready),
    .lk_blk({fetch_pc[PC_W-1:5], 5'b0}), .lk_ent(lk_btb),
    .a2_pc(a2_pc_q), .a2_ghist(a2_hist_q), .a2_ent,
    .ur_pc(upd.pc), .ur_ghist(upd.ghist), .ur_ent(ub_ent), .ur_a2_ent(ub_a2_ent),
    .ur_a2_bank(ub_a2_bank), .ur_a2_row(ub_a2_row), .ur_row(ub_row),
    .we(bt_we), .w_bank(bt_bank), .w_row(bt_row), .w_way(bt_way), .w_ent(bt_ent)
  );

  // ---------------------------------------------------------------- F/D register
  logic [PC_W-1:0]   f_pc_q;
  slot_pred_t        f_pred_q [SLOTS];
  btb_entry_t        f_btb_q  [SLOTS][WAYS];
  logic [HIST_MAX-1:0] f_hist_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      f_pc_q   <= '0;
      f_hist_q <= '0;
      for (int s = 0; s < SLOTS; s++) begin
        f_pred_q[s] <= '0;
        for (int w = 0; w < WAYS; w++) f_btb_q[s][w] <= '0;
      end
    end else if (fetch_valid && ready) begin
      f_pc_q   <= fetch_pc;
      f_hist_q <= ghist;
      f_pred_q <= lk_pred;
      f_btb_q  <= lk_btb;
    end
  end

  // ---------------------------------------------------------------- decode stage
  logic [PC_W-1:0] blk_d;
  logic            ind_a2 [SLOTS];
  logic            ras_push, ras_pop, ras_valid;
  logic [PC_W-1:0] ras_push_addr, ras_top;

  assign blk_d   = {f_pc_q[PC_W-1:5], 5'b0};
  assign d_ghist = f_hist_q;

  omni_interpret #(.WAYS(WAYS)) u_interp (
    .blk(blk_d), .itype(dec_itype), .pred(f_pred_q), .btb(f_btb_q),
    .dir(d_dir), .mdp_kind(d_mdp_kind), .mdp_dist(d_mdp_dist),
    .tgt_valid(d_tgt_valid), .tgt(d_tgt), .ind_src(d_ind_src), .a2_req(ind_a2)
  );

  block_addr_select u_sel (
    .blk(blk_d), .start_slot(f_pc_q[4:2]), .itype(dec_itype), .dir(d_dir),
    .tgt_valid(d_tgt_valid), .tgt(d_tgt), .a2_req(ind_a2),
    .ras_valid, .ras_top,
    .next_pc(d_next_pc), .exit_taken(d_exit_taken), .exit_slot(d_exit_slot),
    .tgt_miss(d_tgt_miss), .a2_wait(d_a2_wait),
    .ras_push, .ras_push_addr, .ras_pop,
    .cond_mask(cmask), .cond_taken(ctaken)
  );

  ras #(.DEPTH(RAS_DEPTH)) u_ras (
    .clk, .rst_n,
    .push(dec_valid && ras_push), .push_addr(ras_push_addr),
    .pop(dec_valid && ras_pop), .top_valid(ras_valid), .top(ras_top)
  );

  global_history u_hist (
    .clk, .rst_n, .push(dec_valid), .mask(cmask), .taken(ctaken),
    .restore(hist_restore), .restore_hist(hist_restore_val), .hist(ghist)
  );

  // ---------------------------------------------------------------- A2 access
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a2_pend_q <= 1'b0;
      a2_pc_q   <= '0;
      a2_hist_q <= '0;
    end else begin
      a2_pend_q <= dec_valid && d_a2_wait;
      if (dec_valid && d_a2_wait) begin
        a2_pc_q   <= {blk_d[PC_W-1:5], d_exit_slot, 2'b00};
        a2_hist_q <= f_hist_q;
      end
    end
  end

  always_comb begin
    logic [BTB_TAG_W-1:0] t;
    t         = btb_tag(a2_pc_q);
    a2_done   = a2_pend_q;
    a2_hit    = 1'b0;
    a2_target = '0;
    for (int w = 0; w < WAYS; w++)
      if (a2_ent[w].valid && a2_ent[w].tag == t && !a2_hit) begin
        a2_hit    = a2_pend_q;
        a2_target = {a2_ent[w].target, 2'b00};
      end
  end

  // ---------------------------------------------------------------- store FIFO
  store_dist_fifo u_sfifo (
    .clk, .rst_n, .flush(mem_flush),
    .push(st_push), .push_sqid(st_push_sqid),
    .inv(st_issue), .inv_sqid(st_issue_sqid),
    .ld_dist, .ld_dep_valid, .ld_sqid, .valid_vec(st_fifo_valid)
  );

  // ---------------------------------------------------------------- update
  omni_update #(.BTB_ROWS(BTB_ROWS), .WAYS(WAYS)) u_upd (
    .clk, .rst_n, .upd_valid(upd_valid && ready), .upd,
    .ur_ent, .ur_tag, .ur_bim, .ur_use_alt,
    .ub_ent, .ub_a2_ent, .ub_a2_bank, .ub_a2_row, .ub_row,
    .upd_tick, .tw_en, .tw_ent, .bw_en, .bw_ctr, .ua_we, .ua_val,
    .bt_we, .bt_bank, .bt_row, .bt_way, .bt_ent,
    .cond_mispred(u_cond_mispred), .tage_alloc(u_tage_alloc), .mdp_ureset(u_mdp_ureset),
    .ind_case(u_ind_case), .a2_write(u_a2_write)
  );

endmodule
