// tb_tage_predictor: self-checking test of the TAGE predictor: reset sweep
// length, bimodal-only predictions after reset, entries written through
// the update port found again by a lookup with the same block and history
// (provider = longest match, its field and u), the use-alternate rule for
// a newly allocated provider, a bimodal write, and the u aging after
// U_PERIOD updates (MSB cleared first, then LSB).
module tb_tage_predictor;
  import omni_pkg::*;
  localparam int UP = 64;
  logic clk = 0, rst_n = 0, ready;
  logic [PC_W-1:0] lk_blk = '0, ur_pc = '0;
  logic [HIST_MAX-1:0] lk_ghist = '0, ur_ghist = '0;
  slot_pred_t lk_pred [SLOTS];
  tage_entry_t ur_ent [NTAB];
  logic [TAG_W-1:0] ur_tag [NTAB];
  logic [1:0] ur_bim;
  logic [3:0] ur_use_alt;
  logic upd_tick = 0;
  logic [NTAB-1:0] tw_en = '0;
  tage_entry_t tw_ent [NTAB];
  logic bw_en = 0, ua_we = 0, aging;
  logic [1:0] bw_ctr = '0;
  logic [3:0] ua_val = '0;
  int checks = 0, failures = 0, cyc = 0;

  tage_predictor #(.U_PERIOD(UP)) dut (.*);

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

  localparam logic [PC_W-1:0] BLK = 48'h0000_7654_3200;
  localparam int SL = 3;

  task automatic write_tab(input int t, input logic [1:0] u, input logic [2:0] ctr);
    @(negedge clk);
    ur_pc = BLK | PC_W'(SL * 4); #1;
    tw_en = '0; tw_en[t] = 1'b1;
    tw_ent[t] = '{u: u, tag: ur_tag[t], ctr: ctr};
    @(negedge clk);
    tw_en = '0;
  endtask

  initial begin
    for (int t = 0; t < NTAB; t++) tw_ent[t] = '0;
    lk_ghist = {20{32'h1357_9BDF}};
    ur_ghist = lk_ghist;
    repeat (2) @(posedge clk);
    rst_n = 1;
    while (!ready) begin @(posedge clk); cyc++; end
    ck(cyc == 2048, "ready after 2048 cycles");
    lk_blk = BLK; #1;
    for (int s = 0; s < SLOTS; s++) ck(!lk_pred[s].hit && !lk_pred[s].dir, "empty -> bimodal not taken");
    // component 5: strong taken
    write_tab(5, 2'd1, 3'b010);
    #1;
    ck(lk_pred[SL].hit && lk_pred[SL].provider == 5 && lk_pred[SL].field == 3'b010 &&
       lk_pred[SL].u == 1 && lk_pred[SL].dir, "provider 5");
    ck(!lk_pred[SL+1].hit && !lk_pred[SL-1].hit, "other banks untouched");
    // a different history misses
    lk_ghist = ~lk_ghist; #1;
    ck(!lk_pred[SL].hit, "other history misses");
    lk_ghist = ur_ghist; #1;
    // component 5 not taken, component 8 weak taken and new (u = 0):
    // USE_ALT_ON_NA starts at 8, so the alternate (5, not taken) wins
    write_tab(5, 2'd1, 3'b100);
    write_tab(8, 2'd0, 3'b000);
    #1;
    ck(lk_pred[SL].provider == 8 && lk_pred[SL].field == 3'b000 && !lk_pred[SL].dir, "alternate used");
    ck(ur_use_alt == 4'd8, "use_alt reset value");
    @(negedge clk); ua_we = 1; ua_val = 4'd3; @(negedge clk); ua_we = 0; #1;
    ck(lk_pred[SL].dir, "provider used when USE_ALT_ON_NA < 8");
    write_tab(8, 2'd3, 3'b000);
    #1;
    ck(lk_pred[SL].dir && lk_pred[SL].u == 3, "provider with u=3");
    // bimodal write, slot 6
    @(negedge clk); ur_pc = BLK | 48'd24; bw_en = 1; bw_ctr = 2'b11; @(negedge clk); bw_en = 0; #1;
    ck(lk_pred[6].dir && !lk_pred[6].hit, "bimodal taken");
    ck(ur_bim == 2'b11, "bimodal update read");
    // aging: UP updates start a sweep clearing u MSB
    ur_pc = BLK | PC_W'(SL * 4);
    for (int i = 0; i < UP; i++) begin upd_tick = 1; @(negedge clk); end
    upd_tick = 0;
    ck(aging, "aging sweep started");
    while (aging) @(negedge clk);
    #1;
    ck(ur_ent[8].u == 2'b01 && ur_ent[5].u == 2'b01, "u MSB cleared");
    for (int i = 0; i < UP; i++) begin upd_tick = 1; @(negedge clk); end
    upd_tick = 0;
    while (aging) @(negedge clk);
    #1;
    ck(ur_ent[8].u == 2'b00 && ur_ent[8].ctr == 3'b000, "u LSB cleared, ctr kept");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
