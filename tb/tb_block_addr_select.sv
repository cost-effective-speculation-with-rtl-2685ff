// tb_block_addr_select: self-checking test of next block address
// selection: fall-through, first taken branch after the entry slot,
// skipped slots before the entry slot, returns from the RAS, calls pushing
// their return address, a BTB miss and an A2 wait, and the conditional
// outcome mask for the history.
module tb_block_addr_select;
  import omni_pkg::*;
  logic [PC_W-1:0] blk, ras_top, next_pc, ras_push_addr;
  logic [SLOT_W-1:0] start_slot, exit_slot;
  itype_e itype [SLOTS];
  logic dir [SLOTS], tgt_valid [SLOTS], a2_req [SLOTS];
  logic [PC_W-1:0] tgt [SLOTS];
  logic ras_valid, exit_taken, tgt_miss, a2_wait, ras_push, ras_pop;
  logic [SLOTS-1:0] cond_mask, cond_taken;
  int checks = 0, failures = 0;

  block_addr_select dut (.*);

  task automatic clear();
    for (int s = 0; s < SLOTS; s++) begin
      itype[s] = IT_OTHER; dir[s] = 0; tgt_valid[s] = 0; tgt[s] = '0; a2_req[s] = 0;
    end
    start_slot = 0; ras_valid = 0; ras_top = '0;
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
    blk = 48'h0000_0040_0000;
    clear(); #1;
    ck(next_pc == blk + 32 && !exit_taken && cond_mask == 0, "fall-through");
    clear();
    itype[1] = IT_COND; dir[1] = 0;
    itype[3] = IT_COND; dir[3] = 1; tgt_valid[3] = 1; tgt[3] = 48'h9000;
    itype[5] = IT_JUMP; tgt_valid[5] = 1; tgt[5] = 48'hA000;
    #1;
    ck(next_pc == 48'h9000 && exit_taken && exit_slot == 3, "first taken cond");
    ck(cond_mask == 8'b0000_1010 && cond_taken == 8'b0000_1000, "cond mask");
    start_slot = 4; #1;
    ck(next_pc == 48'hA000 && exit_slot == 5 && cond_mask == 0, "entry slot 4");
    clear();
    itype[2] = IT_CALL; tgt_valid[2] = 1; tgt[2] = 48'hB000; #1;
    ck(ras_push && ras_push_addr == blk + 12 && next_pc == 48'hB000, "call");
    clear();
    itype[6] = IT_RET; ras_valid = 1; ras_top = 48'hC000; #1;
    ck(ras_pop && next_pc == 48'hC000 && !tgt_miss, "return");
    clear();
    itype[0] = IT_JUMP; #1;
    ck(tgt_miss && next_pc == blk + 32 && exit_taken, "BTB miss");
    clear();
    itype[4] = IT_IND; a2_req[4] = 1; #1;
    ck(a2_wait && tgt_miss && exit_slot == 4, "A2 wait");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
