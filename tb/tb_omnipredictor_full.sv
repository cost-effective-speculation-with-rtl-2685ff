// tb_omnipredictor_full: the end-to-end test of tb_omnipredictor run on the
// omnipredictor at its default (source) sizes, parameters untouched. The
// u aging period of 512K updates is far beyond the run, so aging is the
// one mechanism not required here; tb_omnipredictor covers it.
//
//
// The program (4-byte instructions, 32-byte fetch blocks):
//   A  store; load that reads that store (distance 0); load that reads an
//      old store (beyond the 7-entry FIFO) on about one visit in four and
//      the cache otherwise; conditional branch taken every third visit
//      (back to A); indirect jump to B or C, alternating with the phase
//   B  direct call to D; D: conditional (never taken) and return to B+4;
//      B+4: direct jump back to A
//   C  four conditional branches, each taken to the next instruction,
//      spelling a 4-bit index j = (visit count mod 16); then a direct jump
//      to F
//   F  an indirect jump in its last slot to E_j: sixteen targets, more than
//      the 7 x 2 A0/A1 entries of the block hold, so some must go through
//      the A2 access; on about one visit in 20 it goes instead to a
//      target never seen before, so that A2 entries also mispredict
//   E_j direct jump back to A
// Each fetch block goes through fetch (F), decode (D), the A2 read when
// requested, the dispatch of its memory operations to the store FIFO and
// one update per resolved instruction carrying the block's history. The
// reference history is restored after every block.
//
// Checked: every prediction against the actual outcome where the design
// promises one (a direct target after a BTB hit, a return from the RAS, a
// load's store queue id for a distance, an A0/A1/A2 target once the update
// has written it), the one-cycle A2 latency and, after training, the
// accuracy of conditional, indirect and load predictions. Counted, and
// required at least once: conditional mispredictions, TAGE allocations,
// distance and wait-all load verdicts, violations, the 1/256 u reset, A0,
// A1 and A2 target hits, A2 requests and A2 BTB writes, each indirect
// update case, RAS returns, BTB direct hits and (when EXPECT_AGING) a u
// aging sweep.
module tb_omnipredictor_full;
  import omni_pkg::*;

  localparam bit EXPECT_AGING = 0;   // 512K updates between agings: not reached
  localparam int NBLOCKS      = 6000;

  logic clk = 0, rst_n = 0, ready;
  logic fetch_valid = 0, dec_valid = 0;
  logic [PC_W-1:0] fetch_pc = '0;
  itype_e dec_itype [SLOTS];
  logic d_dir [SLOTS];
  mdp_kind_e d_mdp_kind [SLOTS];
  logic [2:0] d_mdp_dist [SLOTS];
  logic d_tgt_valid [SLOTS];
  logic [PC_W-1:0] d_tgt [SLOTS];
  logic [1:0] d_ind_src [SLOTS];
  logic [PC_W-1:0] d_next_pc, a2_target;
  logic d_exit_taken, d_tgt_miss, d_a2_wait, a2_done, a2_hit;
  logic [SLOT_W-1:0] d_exit_slot;
  logic [HIST_MAX-1:0] d_ghist, hist_restore_val = '0;
  logic hist_restore = 0, mem_flush = 0, st_push = 0, st_issue = 0;
  logic [SQID_W-1:0] st_push_sqid = '0, st_issue_sqid = '0, ld_sqid;
  logic [2:0] ld_dist = '0;
  logic ld_dep_valid;
  logic [SFIFO_N-1:0] st_fifo_valid;
  logic upd_valid = 0;
  upd_t upd = '0;
  logic u_cond_mispred, u_tage_alloc, u_mdp_ureset, u_a2_write, u_aging;
  logic [2:0] u_ind_case;

  omnipredictor dut (.*);

  always #5 clk = !clk;

  int checks = 0, failures = 0;
  longint cycles = 0;
  always @(posedge clk) cycles++;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic ck(input logic c, input string msg);
    checks++;
    if (!c) begin
      failures++;
      if (failures < 20) $display("FAIL %s", msg);
    end
  endtask

  // ------------------------------------------------------------ program
  localparam logic [PC_W-1:0] A = 48'h0000_1000_0000;
  localparam logic [PC_W-1:0] B = 48'h0000_2000_0000;
  localparam logic [PC_W-1:0] C = 48'h0000_3000_0000;
  localparam logic [PC_W-1:0] D = 48'h0000_4000_0000;
  localparam logic [PC_W-1:0] E = 48'h0000_5000_0000;
  localparam logic [PC_W-1:0] F = 48'h0000_6000_0040;

  int visit_a = 0, visit_c = 0, cur_j = 0, fresh = -1;
  bit old_dep;                // A's second load reads an old store this visit

  function automatic itype_e ptype(input logic [PC_W-1:0] blk, input int s);
    if (blk == A) case (s) 0: return IT_STORE; 1, 2: return IT_LOAD; 3: return IT_COND; 5: return IT_IND; default: return IT_OTHER; endcase
    if (blk == B) case (s) 0: return IT_CALL; 1: return IT_JUMP; default: return IT_OTHER; endcase
    if (blk == D) case (s) 0: return IT_COND; 1: return IT_RET; default: return IT_OTHER; endcase
    if (blk == C) case (s) 0, 1, 2, 3: return IT_COND; 4: return IT_JUMP; default: return IT_OTHER; endcase
    if (blk == F) return (s == 7) ? IT_IND : IT_OTHER;
    if (blk[PC_W-1:16] == E[PC_W-1:16]) return (s == 0) ? IT_JUMP : IT_OTHER;
    return IT_OTHER;
  endfunction

  // ------------------------------------------------------------ state
  logic [HIST_MAX-1:0] ref_hist = '0;
  int sq_next = 0;
  logic [SQID_W-1:0] last_store;
  logic [PC_W-1:0] ras_model [$];

  // counters
  int n_cond = 0, n_cond_ok = 0, n_cond_late = 0, n_cond_late_ok = 0;
  int n_mispred = 0, n_alloc = 0, n_dist = 0, n_all = 0, n_viol = 0, n_ureset = 0, n_fwd = 0;
  int n_a0 = 0, n_a1 = 0, n_a2req = 0, n_a2hit = 0, n_a2wr = 0, n_ret = 0, n_btb = 0, n_aging = 0;
  int n_ind = 0, n_ind_ok = 0, n_ind_late = 0, n_ind_late_ok = 0, n_ld0_late = 0, n_ld0_late_ok = 0;
  int n_case [8];

  always @(posedge clk) if (u_aging && !$past(u_aging)) n_aging++;

  typedef struct {
    itype_e t; logic [PC_W-1:0] pc; logic taken; logic [PC_W-1:0] tgt;
    mdp_event_e mev; logic [2:0] mdist;
  } rec_t;

  task automatic send_update(input rec_t r, input logic [HIST_MAX-1:0] h);
    upd_valid = 1;
    upd = '{itype: r.t, pc: r.pc, ghist: h, taken: r.taken, target: r.tgt, mev: r.mev, mdist: r.mdist};
    #1;
    if (u_cond_mispred) n_mispred++;
    if (u_tage_alloc) n_alloc++;
    if (u_mdp_ureset) n_ureset++;
    if (u_a2_write) n_a2wr++;
    n_case[u_ind_case]++;
    @(negedge clk);
    upd_valid = 0;
  endtask

  // one fetch block starting at pc; returns the actual next pc
  task automatic run_block(input logic [PC_W-1:0] pc, output logic [PC_W-1:0] next);
    logic [PC_W-1:0] blk;
    logic [HIST_MAX-1:0] h;
    rec_t recs [$];
    bit exited, late, a2_pending;
    int s0, ind_slot;
    logic [PC_W-1:0] ind_tgt;
    blk = {pc[PC_W-1:5], 5'b0};
    s0 = int'(pc[4:2]);
    late = visit_a > NBLOCKS / 4;
    // ---- fetch
    fetch_valid = 1; fetch_pc = pc;
    @(negedge clk);
    fetch_valid = 0;
    // ---- decode, the next cycle
    for (int s = 0; s < SLOTS; s++) dec_itype[s] = ptype(blk, s);
    dec_valid = 1;
    #1;
    h = d_ghist;
    exited = 0; next = blk + 32; a2_pending = 0; ind_slot = -1; ind_tgt = '0;
    for (int s = s0; s < SLOTS && !exited; s++) begin
      rec_t r;
      logic [PC_W-1:0] spc;
      spc = blk | PC_W'(s * 4);
      r = '{t: dec_itype[s], pc: spc, taken: 0, tgt: '0, mev: MEV_NONE, mdist: '0};
      case (dec_itype[s])
        IT_COND: begin
          if (blk == A) r.taken = (visit_a % 3) == 2;
          else if (blk == C) r.taken = cur_j[s];
          else r.taken = 0;
          r.tgt = (blk == A) ? A : spc + 4;
          n_cond++; if (d_dir[s] == r.taken) n_cond_ok++;
          if (late) begin n_cond_late++; if (d_dir[s] == r.taken) n_cond_late_ok++; end
          ref_hist = {ref_hist[HIST_MAX-2:0], r.taken};
          if (r.taken) begin
            exited = 1; next = r.tgt;
            if (d_tgt_valid[s]) begin n_btb++; ck(d_tgt[s] == r.tgt, "cond BTB target"); end
          end
          recs.push_back(r);
        end
        IT_JUMP, IT_CALL: begin
          r.tgt = (blk == B && s == 0) ? D : (blk == C) ? F : A;
          exited = 1; next = r.tgt;
          if (d_tgt_valid[s]) begin n_btb++; ck(d_tgt[s] == r.tgt, "direct BTB target"); end
          if (dec_itype[s] == IT_CALL) ras_model.push_back(spc + 4);
          recs.push_back(r);
        end
        IT_RET: begin
          exited = 1; next = ras_model.pop_back();
          if (d_exit_taken && d_exit_slot == SLOT_W'(s)) begin
            n_ret++;
            ck(d_next_pc == next, "return address from RAS");
          end
        end
        IT_IND: begin
          if (blk == A) r.tgt = (visit_a % 3 == 0) ? B : C;
          else r.tgt = (fresh >= 0) ? E + PC_W'(32'h8000 + fresh * 256) : E + PC_W'(cur_j * 256);
          exited = 1; next = r.tgt;
          n_ind++;
          ind_slot = s; ind_tgt = r.tgt;
          if (d_ind_src[s] == 1) begin n_a0++; end
          if (d_ind_src[s] == 2) begin n_a1++; end
          if (d_ind_src[s] == 3 && d_exit_taken && d_exit_slot == SLOT_W'(s)) begin
            n_a2req++; a2_pending = 1; ck(d_a2_wait, "A2 wait raised");
          end
          if (d_tgt_valid[s] && d_tgt[s] == r.tgt) n_ind_ok++;
          if (late) begin n_ind_late++; if (d_tgt_valid[s] && d_tgt[s] == r.tgt) n_ind_late_ok++; end
          recs.push_back(r);
        end
        IT_LOAD, IT_STORE: recs.push_back(r);
        default: ;
      endcase
    end
    // the A2 access follows the predicted exit, which may lie past the
    // actual one after a conditional misprediction
    if (d_a2_wait) ck(d_ind_src[d_exit_slot] == 2'd3, "A2 wait only for an A2 indirect jump");
    if (d_a2_wait && !a2_pending) n_a2req++;
    a2_pending = d_a2_wait;
    @(negedge clk);
    dec_valid = 0;
    // ---- A2 result, one cycle after decode; history repair
    hist_restore = 1; hist_restore_val = ref_hist;
    #1;
    if (a2_pending) begin
      ck(a2_done, "A2 result one cycle after decode");
      if (a2_hit) begin
        n_a2hit++;
        if (ind_slot >= 0 && a2_target == ind_tgt) n_ind_ok++;
        if (ind_slot >= 0 && late && a2_target == ind_tgt) n_ind_late_ok++;
      end
    end else begin
      ck(!a2_done, "no A2 result without request");
    end
    @(negedge clk);
    hist_restore = 0;
    // ---- dispatch memory operations in order, one per cycle
    foreach (recs[i]) begin
      if (recs[i].t == IT_STORE) begin
        st_push = 1; st_push_sqid = SQID_W'(sq_next); last_store = SQID_W'(sq_next);
        sq_next = (sq_next + 1) % 48;
        @(negedge clk);
        st_push = 0;
      end else if (recs[i].t == IT_LOAD) begin
        int s;
        bit dep, dep_old, pred_dep;
        s = int'(recs[i].pc[4:2]);
        dep     = (s == 1);
        dep_old = (s == 2) && old_dep;
        pred_dep = d_mdp_kind[s] != MDP_NONE;
        if (d_mdp_kind[s] == MDP_DIST) begin
          n_dist++;
          ld_dist = d_mdp_dist[s]; #1;
          if (dep && d_mdp_dist[s] == 0)
            ck(ld_dep_valid && ld_sqid == last_store, "distance 0 names the last store");
        end
        if (d_mdp_kind[s] == MDP_ALL) n_all++;
        if (s == 1 && late) begin n_ld0_late++; if (d_mdp_kind[s] == MDP_DIST && d_mdp_dist[s] == 0) n_ld0_late_ok++; end
        if ((dep || dep_old) && !pred_dep) begin
          recs[i].mev = MEV_VIOLATION; recs[i].mdist = dep ? 3'd0 : 3'd7; n_viol++;
        end else if ((dep || dep_old) && pred_dep) begin
          recs[i].mev = MEV_FORWARDED; n_fwd++;
        end else if (pred_dep) begin
          recs[i].mev = MEV_FROMCACHE;
        end
        @(negedge clk);
      end
    end
    // stores issue
    st_issue = 1; st_issue_sqid = last_store; @(negedge clk); st_issue = 0;
    // ---- updates
    foreach (recs[i])
      if (recs[i].t != IT_STORE && !(recs[i].t == IT_LOAD && recs[i].mev == MEV_NONE))
        send_update(recs[i], h);
  endtask

  initial begin
    logic [PC_W-1:0] pc, nx;
    int lat;
    foreach (n_case[i]) n_case[i] = 0;
    for (int s = 0; s < SLOTS; s++) dec_itype[s] = IT_OTHER;
    repeat (3) @(negedge clk);
    rst_n = 1;
    lat = 0;
    while (!ready) begin @(negedge clk); lat++; end
    ck(lat >= 2047 && lat <= 2049, $sformatf("tables cleared in %0d cycles", lat));
    pc = A;
    while (visit_a < NBLOCKS) begin
      if (pc == A) begin
        visit_a++;
        old_dep = ($urandom % 4) == 0;
      end
      if (pc == C) begin
        cur_j = visit_c % 16;
        fresh = (($urandom % 20) == 0) ? int'($urandom % 64) : -1;
        visit_c++;
      end
      run_block(pc, nx);
      pc = nx;
    end
    $display("blocks: A visits %0d, C visits %0d, cycles %0d", visit_a, visit_c, cycles);
    $display("cond: %0d/%0d correct (late %0d/%0d), mispred updates %0d, allocations %0d",
             n_cond_ok, n_cond, n_cond_late_ok, n_cond_late, n_mispred, n_alloc);
    $display("indirect: %0d/%0d correct (late %0d/%0d); A0 %0d A1 %0d A2 req %0d hit %0d, A2 writes %0d",
             n_ind_ok, n_ind, n_ind_late_ok, n_ind_late, n_a0, n_a1, n_a2req, n_a2hit, n_a2wr);
    $display("update cases: okA0 %0d okA1 %0d okA2 %0d c1 %0d c2 %0d c3 %0d c45 %0d",
             n_case[1], n_case[2], n_case[3], n_case[4], n_case[5], n_case[6], n_case[7]);
    $display("loads: dist %0d all %0d viol %0d fwd %0d ureset %0d; dist-0 load late %0d/%0d",
             n_dist, n_all, n_viol, n_fwd, n_ureset, n_ld0_late_ok, n_ld0_late);
    $display("returns %0d, BTB direct hits %0d, aging sweeps %0d", n_ret, n_btb, n_aging);
    ck(n_mispred > 0, "conditional mispredictions happened");
    ck(n_alloc > 0, "TAGE allocations happened");
    ck(n_cond_late_ok * 100 >= n_cond_late * 95, "trained conditional accuracy >= 95%");
    ck(n_dist > 0 && n_all > 0 && n_viol > 0 && n_fwd > 0, "distance, wait-all, violation, forwarded");
    ck(n_ureset > 0, "1/256 u reset happened");
    ck(n_ld0_late_ok * 100 >= n_ld0_late * 95, "dependent load linked to its store >= 95%");
    ck(n_a0 > 0 && n_a1 > 0, "A0 and A1 targets used");
    ck(n_a2req > 0 && n_a2hit > 0 && n_a2wr > 0, "A2 requested, hit and written");
    for (int i = 1; i <= 7; i++) ck(n_case[i] > 0, $sformatf("indirect update case %0d happened", i));
    ck(n_ind_late_ok * 100 >= n_ind_late * 80, "trained indirect accuracy >= 80%");
    ck(n_ret > 0 && n_btb > 0, "RAS and BTB used");
    if (EXPECT_AGING) ck(n_aging > 0, "u aging sweep happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
