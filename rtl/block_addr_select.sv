// block_addr_select: instruction block address selection (slow next PC).
//
// Scans the decoded fetch block from the fetch entry slot and stops at the
// first control transfer predicted taken: a conditional branch predicted
// taken, a direct jump or call, an indirect jump or call, or a return. Its
// target is the next block address: the BTB target for direct transfers,
// the omnipredictor's target for indirect ones and the top of the return
// address stack for returns. With no taken transfer the next address is
// the fall-through, the following 32-byte block. A taken transfer whose
// target is unknown (BTB miss, or an indirect jump waiting for its A2 BTB
// access) stops the scan and is reported; the fall-through is then given
// and the front end must redirect later (at decode for direct branches,
// after the A2 access for indirect ones). It also reports the outcome of
// every conditional branch up to the exit, for the global history, and the
// call/return that drives the return address stack. The function follows
// the source's front-end description; the scan order and the outputs are
// this design's own. Purely combinational.
module block_addr_select
  import omni_pkg::*;
(
  input  logic [PC_W-1:0]   blk,
  input  logic [SLOT_W-1:0] start_slot,
  input  itype_e            itype [SLOTS],
  input  logic              dir [SLOTS],
  input  logic              tgt_valid [SLOTS],
  input  logic [PC_W-1:0]   tgt [SLOTS],
  input  logic              a2_req [SLOTS],
  input  logic              ras_valid,
  input  logic [PC_W-1:0]   ras_top,
  output logic [PC_W-1:0]   next_pc,
  output logic              exit_taken,       // a taken transfer ends the block
  output logic [SLOT_W-1:0] exit_slot,
  output logic              tgt_miss,         // its target is not known yet
  output logic              a2_wait,          // ... because an A2 access is needed
  output logic              ras_push,
  output logic [PC_W-1:0]   ras_push_addr,
  output logic              ras_pop,
  output logic [SLOTS-1:0]  cond_mask,        // conditional branches up to the exit
  output logic [SLOTS-1:0]  cond_taken
);

  always_comb begin
    logic done, tk;
    logic [PC_W-1:0] spc;
    done          = 1'b0;
    next_pc       = blk + PC_W'(32);
    exit_taken    = 1'b0;
    exit_slot     = '0;
    tgt_miss      = 1'b0;
    a2_wait       = 1'b0;
    ras_push      = 1'b0;
    ras_push_addr = '0;
    ras_pop       = 1'b0;
    cond_mask     = '0;
    cond_taken    = '0;
    for (int s = 0; s < SLOTS; s++) begin
      tk  = 1'b0;
      spc = {blk[PC_W-1:5], SLOT_W'(s), 2'b00};
      if (!done && SLOT_W'(s) >= start_slot) begin
        tk = 1'b0;
        unique case (itype[s])
          IT_COND: begin
            cond_mask[s]  = 1'b1;
            cond_taken[s] = dir[s];
            tk = dir[s];
          end
          IT_JUMP, IT_CALL, IT_IND, IT_INDCALL, IT_RET: tk = 1'b1;
          default: ;
        endcase
        if (tk) begin
          done       = 1'b1;
          exit_taken = 1'b1;
          exit_slot  = SLOT_W'(s);
          if (itype[s] == IT_CALL || itype[s] == IT_INDCALL) begin
            ras_push      = 1'b1;
            ras_push_addr = spc + PC_W'(4);
          end
          if (itype[s] == IT_RET) begin
            ras_pop  = 1'b1;
            tgt_miss = !ras_valid;
            if (ras_valid) next_pc = ras_top;
          end else if (a2_req[s]) begin
            a2_wait  = 1'b1;
            tgt_miss = 1'b1;
          end else if (tgt_valid[s]) begin
            next_pc = tgt[s];
          end else begin
            tgt_miss = 1'b1;
          end
        end
      end
    end
  end

endmodule
