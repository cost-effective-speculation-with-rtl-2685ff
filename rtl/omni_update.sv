// omni_update: training logic of the omnipredictor.
//
// For each resolved instruction (one per cycle) this block looks at the
// TAGE entries of the instruction's slot in every component, the bimodal
// counter and the BTB sets of the instruction's block (all read
// combinationally by the storage blocks from the same packet) and decides
// the writes, applied at the next clock edge:
//
// Conditional branch (basic TAGE): the provider counter moves toward the
// outcome; a new provider (u = 0) also trains the alternate; u moves up or
// down when provider and alternate disagree; USE_ALT_ON_NA learns whether
// new entries should give way to the alternate; on a wrong final
// prediction an entry is allocated in a longer-history component whose
// u = 0 (the first candidate, or the second when the random bit is set),
// or, failing that, the u of all longer components decays. A taken branch
// writes its target into its own BTB entry.
//
// Load (MDP-TAGE, tagged components only): on a memory order violation the
// provider's field is set to the observed store distance, or, with no hit,
// an entry is allocated holding it (111 = "all older stores"). A predicted
// dependence whose data came from the cache resets the provider's u with
// probability 1/256; one whose data was forwarded by a store raises u.
//
// Indirect jump (TAGE-IT-BTB): the prediction is recomputed (A0 / A1 / A2).
// If right, the BTB entry's hysteresis is set, and for A1/A2 the provider's
// u raised. If wrong, the five cases of the scheme apply:
//   1 no TAGE hit, no A0 entry          -> allocate the A0 BTB entry
//   2 an A1 entry has tag and target    -> point TAGE at it (allocate, and
//     but TAGE missed or points elsewhere  fix the provider on a hit)
//   3 otherwise, no A2 lookup           -> allocate A0 if absent, else an A1
//                                          entry holding the same target,
//                                          else any A1 entry not owned by
//                                          the jump (invalid first, then
//                                          weak), else the A2 entry;
//                                          point TAGE at it if not A0
//   4/5 A2 lookup missed or mispredicted -> take a free A1 entry and point
//                                          the provider and a new entry at
//                                          it, else rewrite the A2 entry
//
// A 16-bit LFSR supplies the random choices. The cases and the 1/256
// probability follow the source; how ties, victims and "free" are resolved
// is this design's own. ind_case and the other status outputs report which
// rule fired, for counting.
module omni_update
  import omni_pkg::*;
#(
  parameter int unsigned BTB_ROWS = 512,
  parameter int unsigned WAYS     = 2,
  localparam int unsigned RW      = $clog2(BTB_ROWS)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              upd_valid,
  input  upd_t              upd,
  // TAGE read data
  input  tage_entry_t       ur_ent [NTAB],
  input  logic [TAG_W-1:0]  ur_tag [NTAB],
  input  logic [1:0]        ur_bim,
  input  logic [3:0]        ur_use_alt,
  // BTB read data
  input  btb_entry_t        ub_ent [SLOTS][WAYS],
  input  btb_entry_t        ub_a2_ent [WAYS],
  input  logic [SLOT_W-1:0] ub_a2_bank,
  input  logic [RW-1:0]     ub_a2_row,
  input  logic [RW-1:0]     ub_row,
  // TAGE writes
  output logic              upd_tick,
  output logic [NTAB-1:0]   tw_en,
  output tage_entry_t       tw_ent [NTAB],
  output logic              bw_en,
  output logic [1:0]        bw_ctr,
  output logic              ua_we,
  output logic [3:0]        ua_val,
  // BTB write
  output logic              bt_we,
  output logic [SLOT_W-1:0] bt_bank,
  output logic [RW-1:0]     bt_row,
  output logic [$clog2(WAYS)-1:0] bt_way,
  output btb_entry_t        bt_ent,
  // status
  output logic              cond_mispred,    // final TAGE direction was wrong
  output logic              tage_alloc,      // a tagged entry was allocated
  output logic              mdp_ureset,      // 1/256 u reset of an MDP entry fired
  output logic [2:0]        ind_case,        // 0 n/a, 1 ok-A0, 2 ok-A1, 3 ok-A2, 4..7 cases 1,2,3,4/5
  output logic              a2_write         // an A2 BTB entry was written
);

  localparam int unsigned WW   = $clog2(WAYS);
  localparam int unsigned NPTR = 7;   // pointer values 000..110 reach A0/A1 entries

  logic [15:0] lfsr;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) lfsr <= 16'hACE1;
    else if (upd_valid) lfsr <= {lfsr[14:0], lfsr[15] ^ lfsr[13] ^ lfsr[12] ^ lfsr[10]};

  function automatic logic [2:0] sinc(logic [2:0] c);
    return (c == 3'b011) ? c : c + 3'd1;
  endfunction
  function automatic logic [2:0] sdec(logic [2:0] c);
    return (c == 3'b100) ? c : c - 3'd1;
  endfunction
  function automatic logic [1:0] uinc(logic [1:0] u);
    return (u == 2'b11) ? u : u + 2'd1;
  endfunction
  function automatic logic [1:0] udec(logic [1:0] u);
    return (u == 2'b00) ? u : u - 2'd1;
  endfunction

  always_comb begin
    logic        hit, ahit;
    logic [3:0]  p, a;
    tage_entry_t pe, ae;
    logic [3:0]  c0, c1;
    int unsigned nfound;
    logic        alloc_ok;
    logic [3:0]  alloc_t;
    logic        want_alloc;
    logic [2:0]  alloc_ctr;
    logic [SLOT_W-1:0]    s0;
    logic [BTB_TAG_W-1:0] btag;
    logic [TGT_W-1:0]     T;

    upd_tick     = upd_valid;
    tw_en        = '0;
    for (int t = 0; t < NTAB; t++) tw_ent[t] = ur_ent[t];
    bw_en        = 1'b0;
    bw_ctr       = ur_bim;
    ua_we        = 1'b0;
    ua_val       = ur_use_alt;
    bt_we        = 1'b0;
    bt_bank      = '0;
    bt_row       = ub_row;
    bt_way       = '0;
    bt_ent       = '0;
    cond_mispred = 1'b0;
    tage_alloc   = 1'b0;
    mdp_ureset   = 1'b0;
    ind_case     = 3'd0;
    a2_write     = 1'b0;
    want_alloc   = 1'b0;
    alloc_ctr    = '0;

    s0   = upd.pc[4:2];
    btag = btb_tag(upd.pc);
    T    = upd.target[PC_W-1:2];

    // provider and alternate
    hit = 1'b0; ahit = 1'b0; p = '0; a = '0;
    for (int t = 0; t < NTAB; t++)
      if (ur_ent[t].tag == ur_tag[t]) begin
        if (hit) begin ahit = 1'b1; a = p; end
        hit = 1'b1; p = 4'(t);
      end
    pe = ur_ent[p];
    ae = ur_ent[a];

    // allocation candidates: longer than the provider, u == 0
    nfound = 0; c0 = '0; c1 = '0;
    for (int t = 0; t < NTAB; t++)
      if ((!hit || 4'(t) > p) && ur_ent[t].u == '0) begin
        if (nfound == 0) c0 = 4'(t);
        else if (nfound == 1) c1 = 4'(t);
        nfound++;
      end
    alloc_ok = nfound != 0;
    alloc_t  = (nfound > 1 && lfsr[0]) ? c1 : c0;

    if (upd_valid) begin
      unique case (upd.itype)
        // ------------------------------------------------------------ branch
        IT_COND: begin
          logic pdir, adir, weak_new, fdir;
          pdir     = !pe.ctr[2];
          adir     = ahit ? !ae.ctr[2] : ur_bim[1];
          weak_new = (pe.ctr == 3'b000 || pe.ctr == 3'b111) && pe.u == '0;
          fdir     = !hit ? ur_bim[1] : (weak_new && ur_use_alt[3]) ? adir : pdir;
          cond_mispred = fdir != upd.taken;
          if (hit && weak_new && pdir != adir) begin
            ua_we  = 1'b1;
            ua_val = (adir == upd.taken) ? ((ur_use_alt == 4'hF) ? ur_use_alt : ur_use_alt + 4'd1)
                                         : ((ur_use_alt == 4'h0) ? ur_use_alt : ur_use_alt - 4'd1);
          end
          if (hit) begin
            tw_en[p]      = 1'b1;
            tw_ent[p].ctr = upd.taken ? sinc(pe.ctr) : sdec(pe.ctr);
            if (pdir != adir) tw_ent[p].u = (pdir == upd.taken) ? uinc(pe.u) : udec(pe.u);
            if (pe.u == '0) begin
              if (ahit) begin
                tw_en[a]      = 1'b1;
                tw_ent[a].ctr = upd.taken ? sinc(ae.ctr) : sdec(ae.ctr);
              end else begin
                bw_en  = 1'b1;
                bw_ctr = upd.taken ? ((ur_bim == 2'b11) ? ur_bim : ur_bim + 2'd1)
                                   : ((ur_bim == 2'b00) ? ur_bim : ur_bim - 2'd1);
              end
            end
          end else begin
            bw_en  = 1'b1;
            bw_ctr = upd.taken ? ((ur_bim == 2'b11) ? ur_bim : ur_bim + 2'd1)
                               : ((ur_bim == 2'b00) ? ur_bim : ur_bim - 2'd1);
          end
          if (cond_mispred && (!hit || p < 4'(NTAB - 1))) begin
            want_alloc = 1'b1;
            alloc_ctr  = upd.taken ? 3'b000 : 3'b111;
          end
        end
        // ------------------------------------------------------------ load
        IT_LOAD: begin
          unique case (upd.mev)
            MEV_VIOLATION: begin
              if (hit) begin
                tw_en[p]      = 1'b1;
                tw_ent[p].ctr = upd.mdist;
              end else begin
                want_alloc = 1'b1;
                alloc_ctr  = upd.mdist;
              end
            end
            MEV_FORWARDED: if (hit) begin
              tw_en[p]    = 1'b1;
              tw_ent[p].u = uinc(pe.u);
            end
            MEV_FROMCACHE: if (hit && lfsr[15:8] == 8'd0) begin
              tw_en[p]    = 1'b1;
              tw_ent[p].u = '0;
              mdp_ureset  = 1'b1;
            end
            default: ;
          endcase
        end
        // ------------------------------------------------------------ indirect
        IT_IND, IT_INDCALL: begin
          logic              own [NPTR][WAYS];
          logic              pv, correct, own0, mfound, a2own, chose, chose_a0, chose_a2;
          logic [TGT_W-1:0]  ptgt;
          logic [2:0]        pp, mp, cp, ptr;
          logic [WW-1:0]     pw, cw, a2w;
          logic [SLOT_W-1:0] s;
          // ownership of the A0/A1 entries, pointer p maps to slot p ^ s0
          own0 = 1'b0; mfound = 1'b0; mp = '0;
          for (int q = 0; q < NPTR; q++)
            for (int w = 0; w < WAYS; w++) begin
              s = SLOT_W'(q) ^ s0;
              own[q][w] = ub_ent[s][w].valid && ub_ent[s][w].tag == btag;
              if (own[q][w] && q == 0) own0 = 1'b1;
              if (own[q][w] && ub_ent[s][w].target == T && !mfound) begin
                mfound = 1'b1; mp = 3'(q);
              end
            end
          a2own = 1'b0; a2w = '0;
          for (int w = 0; w < WAYS; w++)
            if (ub_a2_ent[w].valid && ub_a2_ent[w].tag == btag && !a2own) begin
              a2own = 1'b1; a2w = WW'(w);
            end
          // recompute the prediction
          pv = 1'b0; ptgt = '0; pp = '0; pw = '0;
          if (!hit || pe.ctr != FIELD_ALL) begin
            pp = hit ? pe.ctr : 3'd0;
            for (int w = 0; w < WAYS; w++)
              if (own[pp][w] && !pv) begin
                pv = 1'b1; pw = WW'(w); ptgt = ub_ent[pp ^ s0][w].target;
              end
          end else if (a2own) begin
            pv = 1'b1; pw = a2w; ptgt = ub_a2_ent[a2w].target;
          end
          correct = pv && ptgt == T;

          if (correct) begin
            bt_we   = 1'b1;
            bt_way  = pw;
            if (hit && pe.ctr == FIELD_ALL) begin
              bt_bank = ub_a2_bank; bt_row = ub_a2_row;
              bt_ent  = ub_a2_ent[pw];
              ind_case = 3'd3;
            end else begin
              bt_bank = pp ^ s0;
              bt_ent  = ub_ent[pp ^ s0][pw];
              ind_case = hit ? 3'd2 : 3'd1;
            end
            bt_ent.hyst = 1'b1;
            if (hit) begin
              tw_en[p]    = 1'b1;
              tw_ent[p].u = uinc(pe.u);
            end
          end else if (mfound && (!hit || pe.ctr != mp)) begin
            // case 2
            ind_case   = 3'd5;
            want_alloc = 1'b1;
            alloc_ctr  = mp;
            if (hit) begin tw_en[p] = 1'b1; tw_ent[p].ctr = mp; end
          end else if (!hit && !own0) begin
            // case 1
            ind_case = 3'd4;
            bt_we    = 1'b1;
            bt_bank  = s0;
            bt_way   = '0;
            for (int w = WAYS - 1; w >= 0; w--)
              if (!ub_ent[s0][w].valid || !ub_ent[s0][w].hyst) bt_way = WW'(w);
            bt_ent = '{valid: 1'b1, hyst: 1'b0, tag: btag, target: T};
          end else begin
            // cases 3 and 4/5: look for an entry to take over
            chose = 1'b0; chose_a0 = 1'b0; chose_a2 = 1'b0; cp = '0; cw = '0;
            if (!hit || pe.ctr != FIELD_ALL) begin
              ind_case = 3'd6;
              if (!own0) begin
                chose = 1'b1; chose_a0 = 1'b1; cp = '0;
                for (int w = WAYS - 1; w >= 0; w--)
                  if (!ub_ent[s0][w].valid || !ub_ent[s0][w].hyst) cw = WW'(w);
              end
              // an A1 entry of another owner holding the same target
              for (int q = 1; q < NPTR; q++)
                for (int w = 0; w < WAYS; w++)
                  if (!chose && !own[q][w] && ub_ent[SLOT_W'(q) ^ s0][w].valid &&
                      ub_ent[SLOT_W'(q) ^ s0][w].target == T) begin
                    chose = 1'b1; cp = 3'(q); cw = WW'(w);
                  end
            end else begin
              ind_case = 3'd7;
            end
            // any A1 entry not owned by the jump: invalid first, then weak
            for (int q = 1; q < NPTR; q++)
              for (int w = 0; w < WAYS; w++)
                if (!chose && !own[q][w] && !ub_ent[SLOT_W'(q) ^ s0][w].valid) begin
                  chose = 1'b1; cp = 3'(q); cw = WW'(w);
                end
            for (int q = 1; q < NPTR; q++)
              for (int w = 0; w < WAYS; w++)
                if (!chose && !own[q][w] && !ub_ent[SLOT_W'(q) ^ s0][w].hyst) begin
                  chose = 1'b1; cp = 3'(q); cw = WW'(w);
                end
            for (int q = 1; q < NPTR; q++)
              for (int w = 0; w < WAYS; w++)
                if (!chose && ind_case == 3'd6 && !own[q][w]) begin
                  chose = 1'b1; cp = 3'(q); cw = WW'(w);
                end
            if (!chose) begin
              chose_a2 = 1'b1;
              cw = a2own ? a2w : WW'(lfsr[1]);
              if (!a2own)
                for (int w = WAYS - 1; w >= 0; w--)
                  if (!ub_a2_ent[w].valid || !ub_a2_ent[w].hyst) cw = WW'(w);
            end
            bt_we  = 1'b1;
            bt_way = cw;
            bt_ent = '{valid: 1'b1, hyst: 1'b0, tag: btag, target: T};
            if (chose_a2) begin
              bt_bank  = ub_a2_bank;
              bt_row   = ub_a2_row;
              a2_write = 1'b1;
            end else begin
              bt_bank = SLOT_W'(cp) ^ s0;
            end
            ptr = chose_a2 ? FIELD_ALL : cp;
            if (hit) begin tw_en[p] = 1'b1; tw_ent[p].ctr = ptr; end
            // case 4/5 keeps the provider pointing at A2 when only A2 is written
            if (!chose_a0 && !(ind_case == 3'd7 && chose_a2)) begin
              want_alloc = 1'b1;
              alloc_ctr  = ptr;
            end
          end
        end
        default: ;
      endcase

      // ------------------------------------------------------------ direct targets
      if ((upd.itype == IT_COND && upd.taken) || upd.itype == IT_JUMP || upd.itype == IT_CALL) begin
        logic ownf;
        logic [WW-1:0] ow;
        ownf = 1'b0; ow = '0;
        for (int w = 0; w < WAYS; w++)
          if (ub_ent[s0][w].valid && ub_ent[s0][w].tag == btag && !ownf) begin
            ownf = 1'b1; ow = WW'(w);
          end
        bt_bank = s0;
        bt_row  = ub_row;
        if (ownf) begin
          bt_way = ow;
          if (ub_ent[s0][ow].target == T) begin
            bt_we  = !ub_ent[s0][ow].hyst;
            bt_ent = ub_ent[s0][ow];
            bt_ent.hyst = 1'b1;
          end else begin
            bt_we  = 1'b1;
            bt_ent = '{valid: 1'b1, hyst: 1'b0, tag: btag, target: T};
          end
        end else begin
          bt_we  = 1'b1;
          bt_way = WW'(lfsr[1]);
          for (int w = WAYS - 1; w >= 0; w--)
            if (!ub_ent[s0][w].valid || !ub_ent[s0][w].hyst) bt_way = WW'(w);
          bt_ent = '{valid: 1'b1, hyst: 1'b0, tag: btag, target: T};
        end
      end

      // ------------------------------------------------------------ allocation
      if (want_alloc) begin
        if (alloc_ok) begin
          tage_alloc       = 1'b1;
          tw_en[alloc_t]   = 1'b1;
          tw_ent[alloc_t]  = '{u: '0, tag: ur_tag[alloc_t], ctr: alloc_ctr};
        end else begin
          for (int t = 0; t < NTAB; t++)
            if (!hit || 4'(t) > p) begin
              tw_en[t]    = 1'b1;
              tw_ent[t].u = udec(ur_ent[t].u);
            end
        end
      end
    end
  end

endmodule
