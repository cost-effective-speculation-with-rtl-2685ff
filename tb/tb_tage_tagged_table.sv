// tb_tage_tagged_table: self-checking test of one banked TAGE component:
// clear sweep, writes to random bank/row read back on both read ports
// against a reference model, u MSB/LSB aging of a row, and write priority.
module tb_tage_tagged_table;
  import omni_pkg::*;
  localparam int ROWS = 160;
  logic clk = 0;
  logic [7:0] rd_row = '0, ur_row = '0, w_row = '0, clr_row = '0, age_row = '0;
  logic [2:0] ur_bank = '0, w_bank = '0;
  tage_entry_t rd_ent [SLOTS];
  tage_entry_t ur_ent, w_ent = '0;
  logic we = 0, clr_en = 0, age_en = 0, age_msb = 0;
  tage_entry_t ref_m [SLOTS][ROWS];
  int checks = 0, failures = 0;

  tage_tagged_table #(.ROWS(ROWS)) dut (.*);

  always #5 clk = !clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic cmp_row(input int r);
    rd_row = 8'(r); #1;
    for (int b = 0; b < SLOTS; b++) begin
      checks++;
      if (rd_ent[b] !== ref_m[b][r]) begin
        failures++; $display("FAIL row %0d bank %0d %h vs %h", r, b, rd_ent[b], ref_m[b][r]);
      end
    end
  endtask

  initial begin
    @(negedge clk);
    clr_en = 1;
    for (int r = 0; r < ROWS; r++) begin clr_row = 8'(r); @(negedge clk); end
    clr_en = 0;
    for (int b = 0; b < SLOTS; b++) for (int r = 0; r < ROWS; r++) ref_m[b][r] = '0;
    for (int r = 0; r < ROWS; r += 17) cmp_row(r);
    for (int n = 0; n < 400; n++) begin
      we = 1; w_row = 8'($urandom % ROWS); w_bank = 3'($urandom); w_ent = 15'($urandom);
      ref_m[w_bank][w_row] = w_ent;
      @(negedge clk);
    end
    we = 0;
    for (int r = 0; r < ROWS; r++) cmp_row(r);
    for (int n = 0; n < 50; n++) begin
      ur_row = 8'($urandom % ROWS); ur_bank = 3'($urandom); #1;
      checks++; if (ur_ent !== ref_m[ur_bank][ur_row]) begin failures++; $display("FAIL ur"); end
    end
    // age row 5: MSB, then row 7: LSB, with a same-cycle write to row 7 bank 2
    age_en = 1; age_row = 8'd5; age_msb = 1; @(negedge clk);
    for (int b = 0; b < SLOTS; b++) ref_m[b][5].u[1] = 1'b0;
    age_row = 8'd7; age_msb = 0; we = 1; w_row = 8'd7; w_bank = 3'd2; w_ent = '{u: 2'b11, tag: 10'h155, ctr: 3'b101};
    @(negedge clk);
    for (int b = 0; b < SLOTS; b++) ref_m[b][7].u[0] = 1'b0;
    ref_m[2][7] = w_ent;
    age_en = 0; we = 0;
    cmp_row(5); cmp_row(7);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
