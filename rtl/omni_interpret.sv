// omni_interpret: reads each slot's TAGE prediction according to its decoded type.
//
// The TAGE predictor and the BTB deliver one prediction and one pair of BTB
// ways for every instruction word of the fetch block before the block is
// decoded. Once decode says what each instruction is, this block gives the
// 3-bit field of the provider entry its meaning:
//   conditional branch  the TAGE direction; target from the slot's own BTB
//                       entry
//   direct jump / call  target from the slot's own BTB entry
//   load                no TAGE hit: no dependence; field 111: wait for all
//                       older stores; other values: distance to the producer
//                       store (000 = youngest store)
//   indirect jump/call  no TAGE hit: own (A0) BTB entry if it hits;
//                       field 111: a second BTB access (A2) is requested;
//                       otherwise the field XOR the jump's offset in the
//                       block selects the slot whose BTB set holds the
//                       target (A1); a way of that set must carry the
//                       jump's own tag
// The four indirect scenarios and the XOR of field and offset follow the
// source; the per-slot output format is this design's own. Purely
// combinational.
module omni_interpret
  import omni_pkg::*;
#(
  parameter int unsigned WAYS = 2
) (
  input  logic [PC_W-1:0] blk,                    // fetch block address
  input  itype_e          itype [SLOTS],
  input  slot_pred_t      pred  [SLOTS],
  input  btb_entry_t      btb   [SLOTS][WAYS],
  output logic            dir   [SLOTS],          // conditional direction
  output mdp_kind_e       mdp_kind [SLOTS],
  output logic [2:0]      mdp_dist [SLOTS],
  output logic            tgt_valid [SLOTS],      // a target is predicted
  output logic [PC_W-1:0] tgt   [SLOTS],
  output logic [1:0]      ind_src [SLOTS],        // 0 none, 1 A0, 2 A1, 3 A2 needed
  output logic            a2_req [SLOTS]
);

  always_comb begin
    for (int s = 0; s < SLOTS; s++) begin
      logic [PC_W-1:0]      spc;
      logic [BTB_TAG_W-1:0] stag;
      logic                 own_hit, a1_hit;
      logic [TGT_W-1:0]     own_tgt, a1_tgt;
      logic [SLOT_W-1:0]    a1_slot;
      spc     = {blk[PC_W-1:5], SLOT_W'(s), 2'b00};
      stag    = btb_tag(spc);
      a1_slot = pred[s].field ^ SLOT_W'(s);
      own_hit = 1'b0; own_tgt = '0; a1_hit = 1'b0; a1_tgt = '0;
      for (int w = 0; w < WAYS; w++) begin
        if (btb[s][w].valid && btb[s][w].tag == stag) begin
          own_hit = 1'b1; own_tgt = btb[s][w].target;
        end
        if (btb[a1_slot][w].valid && btb[a1_slot][w].tag == stag) begin
          a1_hit = 1'b1; a1_tgt = btb[a1_slot][w].target;
        end
      end

      dir[s]       = 1'b0;
      mdp_kind[s]  = MDP_NONE;
      mdp_dist[s]  = '0;
      tgt_valid[s] = 1'b0;
      tgt[s]       = '0;
      ind_src[s]   = 2'd0;
      a2_req[s]    = 1'b0;

      unique case (itype[s])
        IT_COND: begin
          dir[s]       = pred[s].dir;
          tgt_valid[s] = own_hit;
          tgt[s]       = {own_tgt, 2'b00};
        end
        IT_JUMP, IT_CALL: begin
          tgt_valid[s] = own_hit;
          tgt[s]       = {own_tgt, 2'b00};
        end
        IT_LOAD: begin
          if (pred[s].hit) begin
            if (pred[s].field == FIELD_ALL) mdp_kind[s] = MDP_ALL;
            else begin
              mdp_kind[s] = MDP_DIST;
              mdp_dist[s] = pred[s].field;
            end
          end
        end
        IT_IND, IT_INDCALL: begin
          if (!pred[s].hit) begin
            tgt_valid[s] = own_hit;
            tgt[s]       = {own_tgt, 2'b00};
            ind_src[s]   = own_hit ? 2'd1 : 2'd0;
          end else if (pred[s].field == FIELD_ALL) begin
            a2_req[s]  = 1'b1;
            ind_src[s] = 2'd3;
          end else begin
            tgt_valid[s] = a1_hit;
            tgt[s]       = {a1_tgt, 2'b00};
            ind_src[s]   = a1_hit ? 2'd2 : 2'd0;
          end
        end
        default: ;
      endcase
    end
  end

endmodule
