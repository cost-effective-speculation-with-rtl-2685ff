// ras: return address stack.
//
// A circular stack of DEPTH return addresses: a call pushes the address of
// the instruction after it, a return pops. When full, a push overwrites the
// oldest entry; popping an empty stack leaves it empty and top_valid low.
// The depth (32) follows the source; the overflow policy is this design's
// own, and speculative-state repair is left to the front end (the stack is
// not checkpointed here).
//
// Interface and timing: top/top_valid show the current top combinationally;
// push and pop act at the clock edge. With both in one cycle the top is
// replaced (a return followed by a call in the same block cannot happen,
// since a block ends at its first taken transfer, so this only serves
// completeness).
module ras
  import omni_pkg::*;
#(
  parameter int unsigned DEPTH = 32,
  localparam int unsigned PW   = $clog2(DEPTH)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            push,
  input  logic [PC_W-1:0] push_addr,
  input  logic            pop,
  output logic            top_valid,
  output logic [PC_W-1:0] top
);

  logic [PC_W-1:0] stk [DEPTH];
  logic [PW-1:0]   sp;      // index of the top entry
  logic [PW:0]     cnt;     // number of valid entries

  assign top_valid = cnt != '0;
  assign top       = stk[sp];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sp  <= '0;
      cnt <= '0;
      for (int i = 0; i < DEPTH; i++) stk[i] <= '0;
    end else if (push && pop) begin
      stk[sp] <= push_addr;
      if (cnt == '0) cnt <= 1;
    end else if (push) begin
      sp          <= sp + 1'b1;
      stk[sp + 1'b1] <= push_addr;
      if (cnt != (PW+1)'(DEPTH)) cnt <= cnt + 1'b1;
    end else if (pop && cnt != '0) begin
      sp  <= sp - 1'b1;
      cnt <= cnt - 1'b1;
    end
  end

endmodule
