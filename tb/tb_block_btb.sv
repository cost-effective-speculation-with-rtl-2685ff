// tb_block_btb: self-checking test of the block BTB: reset sweep and
// ready timing, writes read back through the block lookup (one set per
// slot) and the update port against a reference model, and the A2 access
// landing on the set the update side names for the same PC and history.
module tb_block_btb;
  import omni_pkg::*;
  localparam int ROWS = 512;
  logic clk = 0, rst_n = 0, ready;
  logic [PC_W-1:0] lk_blk = '0, a2_pc = '0, ur_pc = '0;
  logic [HIST_MAX-1:0] a2_ghist = '0, ur_ghist = '0;
  btb_entry_t lk_ent [SLOTS][2];
  btb_entry_t a2_ent [2];
  btb_entry_t ur_ent [SLOTS][2];
  btb_entry_t ur_a2_ent [2];
  logic [2:0] ur_a2_bank, w_bank = '0;
  logic [8:0] ur_a2_row, ur_row, w_row = '0;
  logic we = 0;
  logic w_way = 0;
  btb_entry_t w_ent = '0;
  btb_entry_t ref_m [SLOTS][ROWS][2];
  int checks = 0, failures = 0, cyc = 0;

  block_btb #(.ROWS(ROWS)) dut (.*);

  always #5 clk = !clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    while (!ready) begin @(posedge clk); cyc++; end
    checks++; if (cyc != ROWS) begin failures++; $display("FAIL ready after %0d", cyc); end
    @(negedge clk);
    for (int s = 0; s < SLOTS; s++) for (int r = 0; r < ROWS; r++) for (int w = 0; w < 2; w++) begin
      ref_m[s][r][w] = '0;
    end
    for (int n = 0; n < 1000; n++) begin
      we = 1; w_bank = 3'($urandom); w_row = 9'($urandom); w_way = 1'($urandom);
      w_ent = {1'b1, 1'($urandom), 20'($urandom), 46'({$urandom, $urandom})};
      ref_m[w_bank][w_row][w_way] = w_ent;
      @(negedge clk);
    end
    we = 0;
    for (int r = 0; r < ROWS; r += 5) begin
      lk_blk = {$urandom, 16'h0} & ~48'h3FE0 | (48'(r) << 5);
      ur_pc  = lk_blk | 48'h1C;
      #1;
      checks++; if (ur_row !== 9'(r)) failures++;
      for (int s = 0; s < SLOTS; s++) for (int w = 0; w < 2; w++) begin
        checks += 2;
        if (ref_m[s][r][w].valid && lk_ent[s][w] !== ref_m[s][r][w]) begin failures++; $display("FAIL lk %0d %0d %0d", r, s, w); end
        if (lk_ent[s][w].valid !== ref_m[s][r][w].valid) failures++;
        if (ur_ent[s][w] !== lk_ent[s][w]) failures++;
      end
    end
    // A2: find where the update side places (pc, history), write there, read via A2
    for (int n = 0; n < 20; n++) begin
      ur_pc = {$urandom, 16'($urandom)} & ~48'h3; ur_ghist = {20{$urandom}};
      #1;
      we = 1; w_bank = ur_a2_bank; w_row = ur_a2_row; w_way = 1'(n);
      w_ent = {1'b1, 1'b0, btb_tag(ur_pc), 46'(n + 100)};
      @(negedge clk); we = 0;
      a2_pc = ur_pc; a2_ghist = ur_ghist; #1;
      checks++;
      if (a2_ent[1'(n)] !== w_ent || ur_a2_ent[1'(n)] !== w_ent) begin failures++; $display("FAIL a2 %0d", n); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
