// detras_predictor: decides whether a committing transactional store is
// delayed in the store buffer (SB).
//
// Three pieces of state, as in DeTraS-C:
//   GCH  global conflict history, a saturating counter (4 bits). It is set to
//        its maximum when a store completes with the conflict bit set or when
//        the transaction aborts because of a conflict, and is decremented by
//        one for each transaction that commits while OT is clear.
//   SCH  store conflict history, a tagless direct-mapped table of 1-bit
//        entries indexed by the hashed store PC. Each transactional store
//        completion writes its conflict bit into its entry.
//   OT   offending transaction, set by a conflicting store completion and
//        cleared when the transaction ends (commit or abort).
// Decision for a transactional store: never delay while GCH is 0; otherwise
// delay every store while the SB holds fewer than half its entries, and at or
// above half delay only stores whose SCH bit is set.
//
// Interface: q_* is the lookup of the committing store (combinational
// result in q_delay). upd_* is a cache completion. tx_commit / tx_abort /
// abort_conflict are one-cycle pulses at the end of a transaction.
// Timing: the lookup is combinational; all updates take effect on the next
// clock edge. When a completion and a transaction end coincide, the
// completion's saturation of GCH wins over the commit's decrement.
// Choices of this implementation: all state resets to zero; the threshold
// compares the total SB occupancy with half the SB size; GCH saturates on a
// conflict response only for transactional stores.
module detras_predictor
  import detras_pkg::*;
#(
  parameter int unsigned SB_ENTRIES  = 56,
  parameter int unsigned SCH_ENTRIES = 256,
  parameter int unsigned GCH_W       = 4,
  localparam int unsigned OCC_W = $clog2(SB_ENTRIES + 1),
  localparam int unsigned SI_W  = $clog2(SCH_ENTRIES)
) (
  input  logic             clk,
  input  logic             rst_n,
  // lookup for the committing store
  input  logic             q_tx,
  input  sch_idx_t         q_idx,
  input  logic [OCC_W-1:0] q_occupancy,
  output logic             q_delay,
  // store completion from the L1 data cache
  input  logic             upd_valid,
  input  cache_resp_t      upd,
  // transaction end events
  input  logic             tx_commit,
  input  logic             tx_abort,
  input  logic             abort_conflict,
  // state, for observation
  output logic [GCH_W-1:0] gch,
  output logic             ot
);

  localparam logic [GCH_W-1:0] GCH_MAX = '1;
  localparam int unsigned THRESHOLD = SB_ENTRIES / 2;

  logic [SCH_ENTRIES-1:0] sch;
  logic [SI_W-1:0]        rd_idx, wr_idx;

  assign rd_idx = q_idx[SI_W-1:0];
  assign wr_idx = upd.sch_idx[SI_W-1:0];

  always_comb begin
    if (!q_tx || gch == '0)             q_delay = 1'b0;
    else if (q_occupancy < OCC_W'(THRESHOLD))   q_delay = 1'b1;
    else                                q_delay = sch[rd_idx];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sch <= '0;
      gch <= '0;
      ot  <= 1'b0;
    end else begin
      if (upd_valid && upd.tx) sch[wr_idx] <= upd.conflict;

      if (upd_valid && upd.tx && upd.conflict) begin
        gch <= GCH_MAX;
      end else if (tx_abort && abort_conflict) begin
        gch <= GCH_MAX;
      end else if (tx_commit && !ot && gch != '0) begin
        gch <= gch - 1'b1;
      end

      if (tx_commit || tx_abort)            ot <= 1'b0;
      else if (upd_valid && upd.tx && upd.conflict) ot <= 1'b1;
    end
  end

endmodule
