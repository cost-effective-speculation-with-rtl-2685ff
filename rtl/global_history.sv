// global_history: speculative global branch history register.
//
// Holds the last HIST_MAX conditional branch outcomes, youngest in bit 0.
// After a fetch block is predicted, the outcomes of its conditional branches
// up to the block exit are shifted in, oldest first (up to 8 per block). On
// a misprediction the front end restores the history the mispredicted
// block was predicted with, corrected. The source uses global branch
// history but does not describe how it is kept; this register is the
// simplest one that serves the TAGE and A2 hashes.
//
// Interface and timing: hist is the register; a restore takes priority over
// a push; both act at the clock edge. Reset clears the history.
module global_history
  import omni_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  logic                push,
  input  logic [SLOTS-1:0]    mask,      // which slots are conditional branches
  input  logic [SLOTS-1:0]    taken,     // their outcomes
  input  logic                restore,
  input  logic [HIST_MAX-1:0] restore_hist,
  output logic [HIST_MAX-1:0] hist
);

  logic [HIST_MAX-1:0] hist_nx;

  always_comb begin
    hist_nx = hist;
    if (restore) hist_nx = restore_hist;
    else if (push)
      for (int s = 0; s < SLOTS; s++)
        if (mask[s]) hist_nx = {hist_nx[HIST_MAX-2:0], taken[s]};
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) hist <= '0;
    else        hist <= hist_nx;

endmodule
