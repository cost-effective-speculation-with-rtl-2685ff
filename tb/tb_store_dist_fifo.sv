// tb_store_dist_fifo: self-checking test of the store distance FIFO.
// Pushes store queue ids, checks that distance d returns the (d+1)-th most
// recent store, that the 8th push drops the oldest, that an issued store
// invalidates itself and that a flush empties the FIFO.
module tb_store_dist_fifo;
  import omni_pkg::*;
  logic clk = 0, rst_n = 0, flush = 0, push = 0, inv = 0;
  logic [SQID_W-1:0] push_sqid = '0, inv_sqid = '0, ld_sqid;
  logic [2:0] ld_dist = '0;
  logic ld_dep_valid;
  logic [SFIFO_N-1:0] valid_vec;
  int checks = 0, failures = 0;

  store_dist_fifo dut (.*);

  always #5 clk = !clk;
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic [2:0] d, input logic v, input logic [SQID_W-1:0] id);
    ld_dist = d; #1;
    checks++;
    if (ld_dep_valid !== v || (v && ld_sqid !== id)) begin
      failures++;
      $display("FAIL dist %0d: got v=%0d id=%0d want v=%0d id=%0d", d, ld_dep_valid, ld_sqid, v, id);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int d = 0; d < 7; d++) chk(3'(d), 0, 0);
    // push stores 10..18 (9 stores)
    for (int i = 0; i < 9; i++) begin
      push = 1; push_sqid = 6'(10 + i); @(negedge clk);
    end
    push = 0;
    // youngest is 18 at distance 0, 12 at distance 6; 10 and 11 fell out
    for (int d = 0; d < 7; d++) chk(3'(d), 1, 6'(18 - d));
    // store 15 (distance 3) issues
    @(negedge clk);
    inv = 1; inv_sqid = 6'd15; @(negedge clk); inv = 0;
    chk(3'd3, 0, 0);
    chk(3'd2, 1, 6'd16);
    // push one more while 13 issues: 15's hole moves to distance 4
    @(negedge clk);
    push = 1; push_sqid = 6'd40; inv = 1; inv_sqid = 6'd13; @(negedge clk);
    push = 0; inv = 0;
    chk(3'd0, 1, 6'd40);
    chk(3'd4, 0, 0);
    chk(3'd6, 0, 0);   // 13 invalid, now at distance 6
    chk(3'd5, 1, 6'd14);
    checks++; if (valid_vec !== 7'b0101111) begin failures++; $display("FAIL valid_vec %b", valid_vec); end
    @(negedge clk);
    flush = 1; @(negedge clk); flush = 0;
    for (int d = 0; d < 7; d++) chk(3'(d), 0, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
