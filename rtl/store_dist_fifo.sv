// store_dist_fifo: FIFO of the most recently dispatched stores (precise linking).
//
// A load whose TAGE field holds a distance d (000..110) must wait for the
// (d+1)-th most recently dispatched store; 111 means "wait for all older
// stores". To turn the distance into a store, every store pushes its store
// queue identifier here at dispatch; position 0 is the youngest and the
// oldest of the 7 falls out. When a store issues it searches the FIFO and
// invalidates its own entry, so a load finding an invalid entry need not
// wait. A flush (pipeline squash) empties the FIFO. 7 entries of 6-bit
// store queue identifiers follow the source; the flush and same-cycle
// ordering are this design's own.
//
// Interface and timing: the load lookup (ld_dist -> ld_dep_valid/ld_sqid)
// is combinational and sees the FIFO as it stands before this cycle's
// push, so a load is dispatched after the older stores of earlier cycles.
// Push, invalidate and flush act at the clock edge; an invalidate in the
// same cycle as a push does not touch the entry being pushed.
module store_dist_fifo
  import omni_pkg::*;
#(
  parameter int unsigned DEPTH = SFIFO_N
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              flush,
  input  logic              push,        // store dispatched
  input  logic [SQID_W-1:0] push_sqid,
  input  logic              inv,         // store issued
  input  logic [SQID_W-1:0] inv_sqid,
  input  logic [2:0]        ld_dist,     // predicted distance of a load
  output logic              ld_dep_valid,
  output logic [SQID_W-1:0] ld_sqid,
  output logic [DEPTH-1:0]  valid_vec
);

  logic [DEPTH-1:0]  vld;
  logic [SQID_W-1:0] id [DEPTH];

  assign valid_vec = vld;

  always_comb begin
    ld_dep_valid = 1'b0;
    ld_sqid      = '0;
    for (int i = 0; i < DEPTH; i++)
      if (32'(ld_dist) == i) begin
        ld_dep_valid = vld[i];
        ld_sqid      = id[i];
      end
  end

  logic [DEPTH-1:0] vld_inv;   // after this cycle's invalidation

  always_comb begin
    vld_inv = vld;
    if (inv)
      for (int i = 0; i < DEPTH; i++)
        if (id[i] == inv_sqid) vld_inv[i] = 1'b0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vld <= '0;
      for (int i = 0; i < DEPTH; i++) id[i] <= '0;
    end else if (flush) begin
      vld <= '0;
    end else if (push) begin
      vld   <= {vld_inv[DEPTH-2:0], 1'b1};
      id[0] <= push_sqid;
      for (int i = 1; i < DEPTH; i++) id[i] <= id[i-1];
    end else begin
      vld <= vld_inv;
    end
  end

endmodule
