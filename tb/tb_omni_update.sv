// tb_omni_update: self-checking test of the predictor training rules, with
// hand-built TAGE and BTB contents: conditional branch training,
// allocation and u decay; MDP allocation on a violation, distance
// correction, and the 1/256 u reset (its rate over many updates); and each
// indirect-target scenario: correct A0 / A1 / A2, and mispredict cases 1,
// 2, 3 and 4/5 with the BTB and TAGE writes each one requires.
module tb_omni_update;
  import omni_pkg::*;
  logic clk = 0, rst_n = 0, upd_valid = 0;
  upd_t upd;
  tage_entry_t ur_ent [NTAB];
  logic [TAG_W-1:0] ur_tag [NTAB];
  logic [1:0] ur_bim;
  logic [3:0] ur_use_alt;
  btb_entry_t ub_ent [SLOTS][2];
  btb_entry_t ub_a2_ent [2];
  logic [2:0] ub_a2_bank;
  logic [8:0] ub_a2_row, ub_row;
  logic upd_tick, bw_en, ua_we, bt_we, bt_way;
  logic [NTAB-1:0] tw_en;
  tage_entry_t tw_ent [NTAB];
  logic [1:0] bw_ctr;
  logic [3:0] ua_val;
  logic [2:0] bt_bank;
  logic [8:0] bt_row;
  btb_entry_t bt_ent;
  logic cond_mispred, tage_alloc, mdp_ureset, a2_write;
  logic [2:0] ind_case;
  int checks = 0, failures = 0, nres = 0;

  omni_update dut (.*);

  always #5 clk = !clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic ck(input logic c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", msg); end
  endtask

  localparam logic [PC_W-1:0] PC = 48'h0000_00AB_CD48;   // slot 2
  localparam logic [PC_W-1:0] T  = 48'h0000_0000_8888;

  function automatic btb_entry_t own(input logic [PC_W-1:0] tgt, input logic h = 0);
    return '{valid: 1, hyst: h, tag: btb_tag(PC), target: tgt[PC_W-1:2]};
  endfunction

  task automatic reset_state();
    for (int t = 0; t < NTAB; t++) begin
      ur_tag[t] = 10'(t + 1);
      ur_ent[t] = '{u: 0, tag: 10'h3FF, ctr: 0};
    end
    ur_bim = 2'b01; ur_use_alt = 4'd8;
    for (int s = 0; s < SLOTS; s++) begin ub_ent[s][0] = '0; ub_ent[s][1] = '0; end
    ub_a2_ent[0] = '0; ub_a2_ent[1] = '0;
    ub_a2_bank = 3'd5; ub_a2_row = 9'd77; ub_row = 9'd12;
    upd = '0; upd.pc = PC; upd.target = T;
    upd_valid = 1;
  endtask

  function automatic int count_en();
    int n = 0;
    for (int t = 0; t < NTAB; t++) n += int'(tw_en[t]);
    return n;
  endfunction

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    // ---- A: conditional, no hit, taken, bimodal says not taken
    reset_state(); upd.itype = IT_COND; upd.taken = 1; #1;
    ck(cond_mispred && bw_en && bw_ctr == 2'b10, "A bimodal trained");
    ck(tage_alloc && count_en() == 1 && (tw_en[0] || tw_en[1]), "A allocate in component 0/1");
    ck((tw_en[0] && tw_ent[0] == '{u: 0, tag: 10'd1, ctr: 3'b000}) ||
       (tw_en[1] && tw_ent[1] == '{u: 0, tag: 10'd2, ctr: 3'b000}), "A new entry weak taken");
    ck(bt_we && bt_bank == 2 && bt_row == 12 && bt_ent == own(T), "A BTB target written");
    // ---- B: hit in 4 (strong taken, u 2), alternate 2 not taken, taken
    reset_state(); upd.itype = IT_COND; upd.taken = 1;
    ur_ent[4] = '{u: 2, tag: 10'd5, ctr: 3'b011};
    ur_ent[2] = '{u: 1, tag: 10'd3, ctr: 3'b100}; #1;
    ck(!cond_mispred && !tage_alloc && !bw_en, "B correct");
    ck(tw_en == 12'b0000_0001_0000 && tw_ent[4].u == 3 && tw_ent[4].ctr == 3'b011, "B u raised");
    // ---- C: same entry with u 0, not taken; longer components all u 1
    reset_state(); upd.itype = IT_COND; upd.taken = 0;
    ur_ent[4] = '{u: 0, tag: 10'd5, ctr: 3'b011};
    ur_ent[2] = '{u: 1, tag: 10'd3, ctr: 3'b101};
    for (int t = 5; t < NTAB; t++) ur_ent[t].u = 2'd1; #1;
    ck(cond_mispred && tw_en[4] && tw_ent[4].ctr == 3'b010, "C provider weakened");
    ck(tw_en[2] && tw_ent[2].ctr == 3'b100, "C alternate trained");
    ck(!tage_alloc && tw_en[11:5] == 7'h7F && tw_ent[7].u == 0, "C u decay of longer components");
    // ---- D: load violation, no hit -> allocate with the distance
    reset_state(); upd.itype = IT_LOAD; upd.mev = MEV_VIOLATION; upd.mdist = 3'd3; #1;
    ck(tage_alloc && count_en() == 1 &&
       ((tw_en[0] && tw_ent[0].ctr == 3'b011) || (tw_en[1] && tw_ent[1].ctr == 3'b011)), "D MDP allocate");
    ck(!bt_we && !bw_en, "D no BTB/bimodal write");
    // ---- E: load violation, hit -> distance corrected
    reset_state(); upd.itype = IT_LOAD; upd.mev = MEV_VIOLATION; upd.mdist = 3'd6;
    ur_ent[6] = '{u: 1, tag: 10'd7, ctr: 3'b001}; #1;
    ck(!tage_alloc && tw_en == 12'b0000_0100_0000 && tw_ent[6].ctr == 3'd6, "E distance corrected");
    // ---- F: data from cache -> u reset with probability 1/256
    reset_state(); upd.itype = IT_LOAD; upd.mev = MEV_FROMCACHE;
    ur_ent[6] = '{u: 3, tag: 10'd7, ctr: 3'b001};
    for (int i = 0; i < 5120; i++) begin
      #1; if (mdp_ureset) begin nres++; if (tw_ent[6].u != 0) failures++; end
      @(negedge clk);
    end
    ck(nres >= 5 && nres <= 50, $sformatf("F u reset rate %0d/5120", nres));
    // ---- G1: indirect, TAGE miss, no A0 -> case 1
    reset_state(); upd.itype = IT_IND; #1;
    ck(ind_case == 4 && bt_we && bt_bank == 2 && bt_ent == own(T) && tw_en == 0, "G1 case 1");
    // ---- G2: TAGE miss, A0 holds the target -> correct A0, hysteresis set
    reset_state(); upd.itype = IT_IND; ub_ent[2][1] = own(T); #1;
    ck(ind_case == 1 && bt_we && bt_bank == 2 && bt_way == 1 && bt_ent == own(T, 1), "G2 ok A0");
    // ---- G3: TAGE miss, A0 wrong, pointer 3 (slot 1) holds it -> case 2
    reset_state(); upd.itype = IT_IND; ub_ent[2][0] = own(48'h4444); ub_ent[1][1] = own(T); #1;
    ck(ind_case == 5 && tage_alloc && count_en() == 1 &&
       ((tw_en[0] && tw_ent[0].ctr == 3'd3) || (tw_en[1] && tw_ent[1].ctr == 3'd3)) && !bt_we, "G3 case 2");
    // ---- G4: hit in 7 with pointer 2 (slot 0) right -> correct A1
    reset_state(); upd.itype = IT_IND; ur_ent[7] = '{u: 1, tag: 10'd8, ctr: 3'd2};
    ub_ent[0][0] = own(T); #1;
    ck(ind_case == 2 && bt_we && bt_bank == 0 && bt_ent.hyst && tw_en[7] && tw_ent[7].u == 2, "G4 ok A1");
    // ---- G5: hit, pointer 5 (slot 7) wrong, A0 present -> case 3, first free A1 (pointer 1, slot 3)
    reset_state(); upd.itype = IT_IND; ur_ent[7] = '{u: 1, tag: 10'd8, ctr: 3'd5};
    ub_ent[7][0] = own(48'h7770); ub_ent[2][0] = own(48'h2220); #1;
    ck(ind_case == 6 && bt_we && bt_bank == 3 && bt_ent == own(T), "G5 case 3 BTB");
    ck(tw_en[7] && tw_ent[7].ctr == 3'd1 && tage_alloc && (tw_en[8] || tw_en[9]) &&
       (tw_en[8] ? tw_ent[8].ctr : tw_ent[9].ctr) == 3'd1, "G5 case 3 TAGE");
    // ---- G6: hit, field 111, A2 holds the target -> correct A2
    reset_state(); upd.itype = IT_IND; ur_ent[3] = '{u: 0, tag: 10'd4, ctr: 3'b111};
    ub_a2_ent[1] = own(T); #1;
    ck(ind_case == 3 && bt_we && bt_bank == 5 && bt_row == 77 && bt_way == 1 && bt_ent.hyst, "G6 ok A2");
    // ---- G7: field 111, A2 miss, every A1 entry owned (wrong targets) -> rewrite A2
    reset_state(); upd.itype = IT_IND; ur_ent[3] = '{u: 0, tag: 10'd4, ctr: 3'b111};
    for (int s = 0; s < SLOTS; s++) begin ub_ent[s][0] = own(48'h100 * s); ub_ent[s][1] = own(48'h104 * s + 4); end
    #1;
    ck(ind_case == 7 && a2_write && bt_bank == 5 && bt_row == 77 && bt_ent == own(T) && !tage_alloc, "G7 A2 rewrite");
    // ---- G8: field 111, A2 wrong, a free A1 entry -> take it, re-point
    reset_state(); upd.itype = IT_IND; ur_ent[3] = '{u: 0, tag: 10'd4, ctr: 3'b111};
    ub_a2_ent[0] = own(48'h9990); #1;
    ck(ind_case == 7 && !a2_write && bt_bank == 3 && tw_en[3] && tw_ent[3].ctr == 3'd1 && tage_alloc, "G8 case 4");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
