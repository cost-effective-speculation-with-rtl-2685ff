// tb_tage_bimodal: self-checking test of the banked bimodal table: clear
// to weakly not taken (01), random writes read back on both ports.
module tb_tage_bimodal;
  import omni_pkg::*;
  localparam int ROWS = 2048;
  logic clk = 0;
  logic [10:0] rd_row = '0, ur_row = '0, w_row = '0, clr_row = '0;
  logic [2:0] ur_bank = '0, w_bank = '0;
  logic [1:0] rd_ctr [SLOTS];
  logic [1:0] ur_ctr, w_ctr = '0;
  logic we = 0, clr_en = 0;
  logic [1:0] ref_m [SLOTS][ROWS];
  int checks = 0, failures = 0;

  tage_bimodal #(.ROWS(ROWS)) dut (.*);

  always #5 clk = !clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk);
    clr_en = 1;
    for (int r = 0; r < ROWS; r++) begin clr_row = 11'(r); @(negedge clk); end
    clr_en = 0;
    for (int b = 0; b < SLOTS; b++) for (int r = 0; r < ROWS; r++) ref_m[b][r] = 2'b01;
    for (int n = 0; n < 2000; n++) begin
      we = 1; w_row = 11'($urandom); w_bank = 3'($urandom); w_ctr = 2'($urandom);
      ref_m[w_bank][w_row] = w_ctr;
      @(negedge clk);
    end
    we = 0;
    for (int r = 0; r < ROWS; r += 3) begin
      rd_row = 11'(r); #1;
      for (int b = 0; b < SLOTS; b++) begin
        checks++;
        if (rd_ctr[b] !== ref_m[b][r]) begin failures++; $display("FAIL %0d %0d", r, b); end
      end
    end
    for (int n = 0; n < 100; n++) begin
      ur_row = 11'($urandom); ur_bank = 3'($urandom); #1;
      checks++; if (ur_ctr !== ref_m[ur_bank][ur_row]) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
