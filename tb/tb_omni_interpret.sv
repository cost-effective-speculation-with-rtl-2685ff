// tb_omni_interpret: self-checking test of the per-type reading of TAGE
// fields: a conditional branch takes the TAGE direction and its own BTB
// target; loads map no hit / 000..110 / 111 to no wait / distance / wait
// all (a field of 011 is the 4th most recent store); indirect jumps use
// their A0 entry on a TAGE miss, field XOR offset on a hit (field 010 at
// offset 11 selects the target word of slot 1), and request A2 on 111.
module tb_omni_interpret;
  import omni_pkg::*;
  logic [PC_W-1:0] blk;
  itype_e itype [SLOTS];
  slot_pred_t pred [SLOTS];
  btb_entry_t btb [SLOTS][2];
  logic dir [SLOTS];
  mdp_kind_e mdp_kind [SLOTS];
  logic [2:0] mdp_dist [SLOTS];
  logic tgt_valid [SLOTS];
  logic [PC_W-1:0] tgt [SLOTS];
  logic [1:0] ind_src [SLOTS];
  logic a2_req [SLOTS];
  int checks = 0, failures = 0;

  omni_interpret dut (.*);

  function automatic logic [PC_W-1:0] spc(int s);
    return blk | PC_W'(s * 4);
  endfunction

  task automatic clear();
    for (int s = 0; s < SLOTS; s++) begin
      itype[s] = IT_OTHER; pred[s] = '0;
      btb[s][0] = '0; btb[s][1] = '0;
    end
  endtask

  task automatic ck(input logic c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    blk = 48'h0000_1234_5660;
    // conditional / loads
    clear();
    itype[0] = IT_COND; pred[0] = '{hit: 1, provider: 3, field: 3'b101, u: 0, dir: 1};
    btb[0][1] = '{valid: 1, hyst: 0, tag: btb_tag(spc(0)), target: 46'h111};
    itype[1] = IT_LOAD; pred[1] = '{hit: 0, provider: 0, field: 0, u: 0, dir: 0};
    itype[2] = IT_LOAD; pred[2] = '{hit: 1, provider: 2, field: 3'b011, u: 1, dir: 1};
    itype[3] = IT_LOAD; pred[3] = '{hit: 1, provider: 2, field: 3'b111, u: 1, dir: 0};
    itype[4] = IT_COND; pred[4] = '{hit: 0, provider: 0, field: 0, u: 0, dir: 0};
    btb[4][0] = '{valid: 1, hyst: 0, tag: btb_tag(spc(5)), target: 46'h222}; // other owner
    #1;
    ck(dir[0] == 1 && tgt_valid[0] && tgt[0] == 48'h444, "cond own target");
    ck(mdp_kind[1] == MDP_NONE, "load miss");
    ck(mdp_kind[2] == MDP_DIST && mdp_dist[2] == 3, "load 011 -> distance 3");
    ck(mdp_kind[3] == MDP_ALL, "load 111 -> all");
    ck(dir[4] == 0 && !tgt_valid[4], "cond foreign tag");
    // indirect jumps
    clear();
    // slot 3: TAGE hit field 010 -> slot 010^011 = 001
    itype[3] = IT_IND; pred[3] = '{hit: 1, provider: 5, field: 3'b010, u: 1, dir: 1};
    btb[1][1] = '{valid: 1, hyst: 0, tag: btb_tag(spc(3)), target: 46'h3000};
    btb[3][0] = '{valid: 1, hyst: 0, tag: btb_tag(spc(3)), target: 46'h4000};
    // slot 6: TAGE miss -> A0
    itype[6] = IT_INDCALL; pred[6] = '0;
    btb[6][0] = '{valid: 1, hyst: 0, tag: btb_tag(spc(6)), target: 46'h5000};
    // slot 7: field 111 -> A2
    itype[7] = IT_IND; pred[7] = '{hit: 1, provider: 1, field: 3'b111, u: 0, dir: 0};
    // slot 5: field 001 -> slot 4, which is not owned by slot 5: no target
    itype[5] = IT_IND; pred[5] = '{hit: 1, provider: 1, field: 3'b001, u: 0, dir: 0};
    btb[4][0] = '{valid: 1, hyst: 0, tag: btb_tag(spc(4)), target: 46'h6000};
    #1;
    ck(tgt_valid[3] && tgt[3] == 48'hC000 && ind_src[3] == 2, "A1 via XOR (target1 for I3)");
    ck(tgt_valid[6] && tgt[6] == 48'h14000 && ind_src[6] == 1, "A0");
    ck(a2_req[7] && !tgt_valid[7] && ind_src[7] == 3, "A2 request");
    ck(!tgt_valid[5] && ind_src[5] == 0 && !a2_req[5], "A1 tag miss");
    // same field in slot 3 with a TAGE miss falls back to A0
    pred[3].hit = 0; #1;
    ck(tgt_valid[3] && tgt[3] == 48'h10000 && ind_src[3] == 1, "miss -> A0");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
