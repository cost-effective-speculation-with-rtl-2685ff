// omni_pkg: types, sizes and hash functions shared by the omnipredictor.
//
// The omnipredictor is one TAGE conditional branch predictor plus a
// block-organised BTB whose 3-bit TAGE "counter" field is read three ways
// after decode: as a signed direction counter for conditional branches, as
// a distance to a producer store for loads, and as a pointer to one of the
// BTB target words of the fetch block for indirect jumps.
//
// Sizes that follow the source configuration: 8 instructions per fetch
// block, 1+12 TAGE components, 16K bimodal entries, 15K tagged entries in
// total (1280 per component), 3-bit ctr, 2-bit u, 10-bit partial tags, a
// 2-way 8K-entry BTB, a 32-entry RAS, a 7-entry store FIFO with 6-bit store
// queue identifiers (48-entry store queue) and a u reset every 512K updates.
// Own choices: 48-bit virtual PCs with 4-byte instructions, the history
// lengths of the geometric series (4..640), the 16-bit A2 history, the
// 20-bit BTB tag and the hash functions below.
package omni_pkg;

  localparam int unsigned SLOTS      = 8;    // instructions per fetch block
  localparam int unsigned SLOT_W     = 3;
  localparam int unsigned PC_W       = 48;   // virtual address bits
  localparam int unsigned NTAB       = 12;   // tagged components
  localparam int unsigned TAG_W      = 10;
  localparam int unsigned CTR_W      = 3;
  localparam int unsigned U_W        = 2;
  localparam int unsigned HIST_MAX   = 640;  // longest global history
  localparam int unsigned A2_HIST    = 16;   // gshare-like history of the A2 access
  localparam int unsigned BTB_TAG_W  = 20;
  localparam int unsigned TGT_W      = PC_W - 2;  // word address of a target
  localparam int unsigned SQID_W     = 6;    // 48-entry store queue
  localparam int unsigned SFIFO_N    = 7;    // stores reachable by distance

  // Geometric series of history lengths, shortest first.
  localparam int unsigned HIST_LEN [NTAB] =
    '{4, 6, 10, 16, 25, 40, 64, 101, 161, 255, 404, 640};

  localparam logic [CTR_W-1:0] FIELD_ALL = 3'b111;  // wait-all / A2 marker

  // Instruction classes delivered by decode.
  typedef enum logic [3:0] {
    IT_OTHER   = 4'd0,
    IT_COND    = 4'd1,   // conditional direct branch
    IT_JUMP    = 4'd2,   // unconditional direct jump
    IT_CALL    = 4'd3,   // direct call
    IT_IND     = 4'd4,   // indirect jump
    IT_INDCALL = 4'd5,   // indirect call
    IT_RET     = 4'd6,   // return
    IT_LOAD    = 4'd7,
    IT_STORE   = 4'd8
  } itype_e;

  typedef struct packed {
    logic [U_W-1:0]   u;
    logic [TAG_W-1:0] tag;
    logic [CTR_W-1:0] ctr;   // signed for branches, raw field otherwise
  } tage_entry_t;

  typedef struct packed {
    logic                 valid;
    logic                 hyst;
    logic [BTB_TAG_W-1:0] tag;
    logic [TGT_W-1:0]     target;
  } btb_entry_t;

  // Per-slot output of the TAGE lookup.
  typedef struct packed {
    logic             hit;       // some tagged component matched
    logic [3:0]       provider;  // longest matching component
    logic [CTR_W-1:0] field;     // provider's 3-bit field
    logic [U_W-1:0]   u;
    logic             dir;       // final direction (provider/alt/bimodal)
  } slot_pred_t;

  // Memory dependence verdict for a load.
  typedef enum logic [1:0] {
    MDP_NONE = 2'd0,   // issue when operands are ready
    MDP_DIST = 2'd1,   // wait for the store at the given distance
    MDP_ALL  = 2'd2    // wait for all older stores
  } mdp_kind_e;

  // Memory dependence training event for a load.
  typedef enum logic [1:0] {
    MEV_NONE      = 2'd0,
    MEV_VIOLATION = 2'd1,  // executed before an older aliasing store
    MEV_FORWARDED = 2'd2,  // predicted dependent, data came from a store
    MEV_FROMCACHE = 2'd3   // predicted dependent, data came from the cache
  } mdp_event_e;

  // One resolved instruction sent back to train the predictor.
  typedef struct packed {
    itype_e              itype;
    logic [PC_W-1:0]     pc;       // instruction PC (block address = pc with low 5 bits cleared)
    logic [HIST_MAX-1:0] ghist;    // history the block was predicted with
    logic                taken;    // conditional outcome
    logic [PC_W-1:0]     target;   // resolved target of a taken transfer
    mdp_event_e          mev;
    logic [CTR_W-1:0]    mdist;    // producer store distance (7: further / unknown)
  } upd_t;

  // Bits of the history that XOR into bit b of a w-bit fold of its
  // youngest len bits (bit i goes to bit i mod w). Evaluated at elaboration.
  function automatic logic [HIST_MAX-1:0] fold_mask(int unsigned len, int unsigned w,
                                                    int unsigned b);
    logic [HIST_MAX-1:0] m;
    m = '0;
    for (int unsigned i = 0; i < HIST_MAX; i++)
      if (i < len && i % w == b) m[i] = 1'b1;
    return m;
  endfunction

  // Row shared by all banks of component t for a block; f16 is the
  // component's history folded to 16 bits.
  function automatic logic [15:0] tage_row_hash(logic [PC_W-1:0] blk, logic [15:0] f16,
                                                int unsigned t);
    return blk[20:5] ^ blk[36:21] ^ {blk[47:37], 5'(t)} ^ f16;
  endfunction

  // Partial tag of the instruction at pc; f10/f9 are the component's
  // history folded to TAG_W and TAG_W-1 bits.
  function automatic logic [TAG_W-1:0] tage_tag_hash(logic [PC_W-1:0] pc, logic [TAG_W-1:0] f10,
                                                     logic [TAG_W-2:0] f9);
    return pc[TAG_W+1:2] ^ pc[2*TAG_W+1:TAG_W+2] ^ f10 ^ {f9, 1'b0};
  endfunction

  // BTB tag of an instruction; includes its offset in the block so that A1
  // entries held in other slots' sets still name their owner.
  function automatic logic [BTB_TAG_W-1:0] btb_tag(logic [PC_W-1:0] pc);
    return {pc[PC_W-1:PC_W-17] ^ pc[30:14], pc[4:2]};
  endfunction

  // Index of the A2 access: PC hashed with a fixed-length global history.
  function automatic logic [15:0] a2_hash(logic [PC_W-1:0] pc, logic [HIST_MAX-1:0] h);
    return pc[17:2] ^ pc[33:18] ^ h[A2_HIST-1:0];
  endfunction

endpackage
