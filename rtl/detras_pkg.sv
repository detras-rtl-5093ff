// detras_pkg: types and constants shared by the DeTraS store buffer blocks.
//
// A store is described by an aligned 8-byte word address and a byte mask
// inside that word, so that two stores overlap when they name the same word
// and their masks intersect. The store buffer size (56 entries), the 256-entry
// 1-bit store conflict history table and the 4-bit global conflict history
// counter are the sizes of the published DeTraS-C configuration. The address
// width, data width, PC width and the 8-byte word granularity are choices of
// this implementation.
package detras_pkg;

  localparam int unsigned ADDR_W  = 48;           // byte address width
  localparam int unsigned PC_W    = 48;           // store PC width
  localparam int unsigned DATA_W  = 64;           // one store word
  localparam int unsigned BYTES_W = DATA_W / 8;   // byte-mask width
  localparam int unsigned WADDR_W = ADDR_W - $clog2(BYTES_W); // word address
  localparam int unsigned SCH_IDX_W = 8;          // hashed-PC index, 256-entry SCH

  typedef logic [WADDR_W-1:0] waddr_t;
  typedef logic [BYTES_W-1:0] bmask_t;
  typedef logic [DATA_W-1:0]  data_t;
  typedef logic [PC_W-1:0]    pc_t;
  typedef logic [SCH_IDX_W-1:0] sch_idx_t;

  // Payload of a store as it leaves the commit stage (and as stored in the SB).
  typedef struct packed {
    waddr_t waddr;   // word address
    bmask_t mask;    // bytes written inside the word
    data_t  data;    // store data, byte lanes as given by mask
    logic   tx;      // transactional store
  } store_t;

  // One store buffer entry. The SCH index travels with the store so that the
  // cache response can update the predictor after the entry has been freed.
  typedef struct packed {
    logic   valid;
    store_t st;
    sch_idx_t sch_idx;
    logic   delay;      // DeTraS delay bit
    logic   issued;     // write to cache initiated (or made unnecessary)
    logic   completed;  // counts in completedStores (tx: issued/coalesced, non-tx: done)
    logic   pinned;     // a younger store partially overlaps this one
    logic   coalesced;  // a younger store fully overwrites this one
  } sb_entry_t;

  // Store write request to the L1 data cache.
  typedef struct packed {
    store_t     st;
    sch_idx_t sch_idx;   // echoed back in the response
  } cache_req_t;

  // Completion of a store write in the L1 data cache. conflict is the bit the
  // coherence protocol piggybacks on invalidation acks and data responses.
  typedef struct packed {
    logic       tx;
    logic       conflict;
    sch_idx_t sch_idx;
  } cache_resp_t;

  // One-cycle indications of the store buffer's mechanisms at work.
  typedef struct packed {
    logic commit_delayed;   // a committing store entered with its delay bit set
    logic snoop_delayed;    // delayed only because it overlaps a delayed store
    logic snoop_elided;     // transactional store committed without a snoop
    logic coalesce;         // older entries marked coalesced by a committing store
    logic pin;              // older entries marked pinned by a committing store
    logic compact;          // head entry moved into a completed entry
    logic overflow_resume;  // SB full: head store's delay bit cleared
    logic reorder;          // transactional store issued ahead of an older entry
    logic load_fwd;         // load served from the SB
    logic load_priority;    // committing store held back by a load snoop
    logic drain;            // delay bits flash-cleared (xend or abort)
    logic squash;           // transactional entries discarded on abort
  } sb_events_t;

  // Overlap of a committing store with an older store:
  //   full    - the committing store writes every byte of the older one
  //   partial - they share bytes but the older one has bytes of its own
  function automatic logic mask_overlap(bmask_t a, bmask_t b);
    return |(a & b);
  endfunction

  function automatic logic mask_covers(bmask_t outer, bmask_t inner);
    return (inner & ~outer) == '0;
  endfunction

  // Folding hash of a store PC into an SCH index: XOR of the PC's
  // SCH_IDX_W-bit slices, so every PC bit takes part.
  function automatic sch_idx_t pc_hash(pc_t pc);
    sch_idx_t h;
    h = '0;
    for (int i = 0; i < PC_W; i += SCH_IDX_W) h ^= pc[i +: SCH_IDX_W];
    return h;
  endfunction

endpackage
