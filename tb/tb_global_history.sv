// tb_global_history: self-checking test of the global history register:
// per-block pushes of the conditional outcomes in slot order, against a
// reference queue, and restore priority over push.
module tb_global_history;
  import omni_pkg::*;
  logic clk = 0, rst_n = 0, push = 0, restore = 0;
  logic [SLOTS-1:0] mask = '0, taken = '0;
  logic [HIST_MAX-1:0] restore_hist = '0, hist, ref_h;
  int checks = 0, failures = 0;

  global_history dut (.*);

  always #5 clk = !clk;
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ref_h = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    checks++; if (hist !== '0) failures++;
    for (int n = 0; n < 200; n++) begin
      push = 1; mask = 8'($urandom); taken = 8'($urandom);
      for (int s = 0; s < SLOTS; s++) if (mask[s]) ref_h = {ref_h[HIST_MAX-2:0], taken[s]};
      @(negedge clk);
      checks++;
      if (hist !== ref_h) begin failures++; $display("FAIL push %0d", n); end
    end
    push = 1; mask = 8'hFF; restore = 1; restore_hist = {20{32'hDEADBEEF}};
    @(negedge clk);
    push = 0; restore = 0;
    checks++; if (hist !== {20{32'hDEADBEEF}}) begin failures++; $display("FAIL restore"); end
    // one conditional in slot 5, taken
    push = 1; mask = 8'b0010_0000; taken = 8'b0010_0000; @(negedge clk); push = 0;
    ref_h = {20{32'hDEADBEEF}};
    ref_h = {ref_h[HIST_MAX-2:0], 1'b1};
    checks++; if (hist !== ref_h) begin failures++; $display("FAIL shift after restore"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
