// detras_top: one core's DeTraS-C store buffer subsystem.
//
// DeTraS keeps transactional stores that are likely to conflict in the
// store buffer (SB) until the transaction is about to commit, so that remote
// cores see the written cache lines as late as possible and requester-wins
// conflict resolution stops killing transactions that would have committed
// ("friendly fire"). This top connects:
//   detras_tx_ctrl   - xbegin/xend/abort handling, SB drain on xend
//   detras_predictor - GCH counter, PC-indexed SCH table, OT bit
//   detras_sb        - the store buffer with delay, reorder, compaction,
//                      coalescing and store-to-load forwarding
// The committing store's PC is hashed into an SCH index; the predictor's
// verdict for it (from GCH, SCH and the current SB occupancy) becomes the
// store's delay bit in the same cycle. A store is transactional when it
// commits while a transaction is open. The cache port is a plain
// valid/ready request channel and a response channel carrying the conflict
// bit that the coherence protocol piggybacks on its responses; the L1 cache,
// the coherence protocol and the out-of-order core are outside this design.
//
// Timing: the commit decision is combinational within the cycle; a store
// committed in cycle t is in the SB at t+1 and, if not delayed, can be sent
// to the cache at t+1. xend retires (xend_commit) in the first cycle in which
// xend_req is high and the SB is empty with no transactional write
// outstanding.
module detras_top
  import detras_pkg::*;
#(
  parameter int unsigned SB_ENTRIES  = 56,
  parameter int unsigned SCH_ENTRIES = 256,
  parameter int unsigned GCH_W       = 4,
  localparam int unsigned CW = $clog2(SB_ENTRIES + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  // transaction boundaries
  input  logic             xbegin,
  input  logic             xend_req,
  output logic             xend_commit,
  input  logic             abort_req,
  input  logic             abort_conflict,
  output logic             tx_active,
  // store commit
  input  logic             commit_valid,
  output logic             commit_ready,
  input  pc_t              commit_pc,
  input  waddr_t           commit_waddr,
  input  bmask_t           commit_mask,
  input  data_t            commit_data,
  // load snoop
  input  logic             ld_valid,
  input  waddr_t           ld_waddr,
  input  bmask_t           ld_mask,
  output logic             ld_hit,
  output logic             ld_fwd_ok,
  output data_t            ld_data,
  // L1 data cache
  output logic             creq_valid,
  input  logic             creq_ready,
  output cache_req_t       creq,
  input  logic             cresp_valid,
  input  cache_resp_t      cresp,
  // observation
  output logic [GCH_W-1:0] gch,
  output logic             ot,
  output logic [CW-1:0]    sb_occupancy,
  output logic [CW-1:0]    completed_stores,
  output logic             delayed_stores,
  output logic             need_snoop,
  output logic             sb_drained,
  output sb_events_t       ev
);

  logic     sb_drain, sb_abort;
  logic     ev_commit, ev_abort, ev_abort_conflict;
  logic     pred_delay;
  store_t   commit_st;
  sch_idx_t commit_idx;

  assign commit_st.waddr = commit_waddr;
  assign commit_st.mask  = commit_mask;
  assign commit_st.data  = commit_data;
  assign commit_st.tx    = tx_active;
  assign commit_idx      = pc_hash(commit_pc);

  detras_tx_ctrl u_tx (
    .clk              (clk),
    .rst_n            (rst_n),
    .xbegin           (xbegin),
    .xend_req         (xend_req),
    .abort_req        (abort_req),
    .abort_conflict   (abort_conflict),
    .sb_drained       (sb_drained),
    .tx_active        (tx_active),
    .xend_commit      (xend_commit),
    .sb_drain         (sb_drain),
    .sb_abort         (sb_abort),
    .ev_commit        (ev_commit),
    .ev_abort         (ev_abort),
    .ev_abort_conflict(ev_abort_conflict)
  );

  detras_predictor #(
    .SB_ENTRIES (SB_ENTRIES),
    .SCH_ENTRIES(SCH_ENTRIES),
    .GCH_W      (GCH_W)
  ) u_pred (
    .clk           (clk),
    .rst_n         (rst_n),
    .q_tx          (commit_st.tx),
    .q_idx         (commit_idx),
    .q_occupancy   (sb_occupancy),
    .q_delay       (pred_delay),
    .upd_valid     (cresp_valid),
    .upd           (cresp),
    .tx_commit     (ev_commit),
    .tx_abort      (ev_abort),
    .abort_conflict(ev_abort_conflict),
    .gch           (gch),
    .ot            (ot)
  );

  detras_sb #(.N(SB_ENTRIES)) u_sb (
    .clk             (clk),
    .rst_n           (rst_n),
    .commit_valid    (commit_valid),
    .commit_ready    (commit_ready),
    .commit_st       (commit_st),
    .commit_sch_idx  (commit_idx),
    .commit_delay    (pred_delay),
    .sb_occupancy    (sb_occupancy),
    .ld_valid        (ld_valid),
    .ld_waddr        (ld_waddr),
    .ld_mask         (ld_mask),
    .ld_hit          (ld_hit),
    .ld_fwd_ok       (ld_fwd_ok),
    .ld_data         (ld_data),
    .creq_valid      (creq_valid),
    .creq_ready      (creq_ready),
    .creq            (creq),
    .cresp_valid     (cresp_valid),
    .cresp_tx        (cresp.tx),
    .drain           (sb_drain),
    .abort_in        (sb_abort),
    .drained         (sb_drained),
    .delayed_stores  (delayed_stores),
    .need_snoop      (need_snoop),
    .completed_stores(completed_stores),
    .ev              (ev)
  );

endmodule
