// tb_ras: self-checking test of the return address stack: LIFO order,
// overflow past DEPTH entries (oldest overwritten), underflow, and a
// push and pop in the same cycle.
module tb_ras;
  import omni_pkg::*;
  logic clk = 0, rst_n = 0, push = 0, pop = 0, top_valid;
  logic [PC_W-1:0] push_addr = '0, top;
  int checks = 0, failures = 0;

  ras #(.DEPTH(32)) dut (.*);

  always #5 clk = !clk;
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic v, input logic [PC_W-1:0] a);
    checks++;
    if (top_valid !== v || (v && top !== a)) begin
      failures++;
      $display("FAIL top v=%0d %h want v=%0d %h", top_valid, top, v, a);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    chk(0, 0);
    for (int i = 1; i <= 40; i++) begin
      push = 1; push_addr = PC_W'(i * 4); @(negedge clk);
      chk(1, PC_W'(i * 4));
    end
    push = 0;
    // 32 most recent survive: 40 down to 9
    for (int i = 40; i >= 9; i--) begin
      chk(1, PC_W'(i * 4));
      pop = 1; @(negedge clk); pop = 0;
    end
    chk(0, 0);
    pop = 1; @(negedge clk); pop = 0;   // underflow
    chk(0, 0);
    push = 1; push_addr = 48'h1000; @(negedge clk);
    push_addr = 48'h2000; @(negedge clk);
    push = 1; pop = 1; push_addr = 48'h3000; @(negedge clk);
    push = 0; pop = 0;
    chk(1, 48'h3000);
    pop = 1; @(negedge clk); pop = 0;
    chk(1, 48'h1000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
