// detras_sb: HTM-aware store buffer with delayed, reordered and compacted
// transactional stores (the DeTraS-C store buffer).
//
// Committed stores wait here, in a circular FIFO, until they write to the L1
// data cache. Each entry carries the transactional bit plus the three DeTraS
// bits delay, pinned and coalesced.
//  * Delay: a transactional store may be held in the buffer instead of being
//    written to cache; the predictor (outside) says which. A store that
//    overlaps a delayed store is delayed as well, whatever the prediction,
//    so that overlapping stores never swap.
//  * Reorder: transactional stores are written out of program order. The
//    oldest entry that is neither delayed nor written yet is sent to cache,
//    one per cycle; a transactional entry counts as completed as soon as its
//    write is sent, and the head entry is freed in that same cycle.
//    Transactional stores wait until every older non-transactional store has
//    completed. Non-transactional stores leave strictly in order: one at a
//    time, from the head, freed when the cache reports completion.
//  * Drain: while `drain` (xend ready to retire) or `abort_in` is high, all
//    delay bits are flash-cleared.
//  * Overflow: when the buffer is full and its head is a delayed store, the
//    head is moved into the completed entry closest to the tail (compaction)
//    if one exists and the head is not pinned; otherwise only the head's
//    delay bit is cleared.
//  * Coalescing: a committing transactional store that writes every byte of
//    an older, not yet written transactional store marks that entry
//    coalesced and completed; it is freed without a write when it reaches
//    the head. A partial overlap marks the older entry pinned.
//  * Loads snoop the buffer through the same search logic and take priority
//    over a committing store, which then waits (commit_ready low). A load
//    searches only entries whose write is not completed: the data of a
//    completed entry is already in the cache, and compaction may overwrite
//    a completed entry while an older completed one to the same bytes stays
//    behind, which would otherwise be forwarded stale.
//  * Abort: all transactional entries are discarded.
// The delayedStores and needSnoop flags follow the design: delayedStores is
// set by the first delayed store, needSnoop by a non-delayed transactional
// store that finds delayedStores set, and both clear on drain and abort.
// Own choice here: a committing transactional store snoops whenever
// delayedStores is set (not only once needSnoop is), because the pinned and
// coalesced marks that compaction relies on must be recorded for delayed
// stores that commit before the first non-delayed one. completedStores is
// kept as a register loaded with the number of completed entries.
//
// Interface (all synchronous to clk, active-low asynchronous reset):
//   commit_*   store from the commit stage, valid/ready; commit_delay is the
//              predictor's verdict for it (combinational from sb_occupancy)
//   ld_*       load snoop: ld_hit if an entry overlaps, ld_fwd_ok if the
//              youngest overlapping entry holds every loaded byte, ld_data
//   creq_*     write to the L1 cache, valid/ready; cresp_* its completion
//   drained    buffer empty and no transactional write outstanding
// Timing: a store committed in cycle t can be sent to cache in cycle t+1.
module detras_sb
  import detras_pkg::*;
#(
  parameter int unsigned N       = 56,   // SB entries
  parameter int unsigned OUT_W   = 8,    // outstanding transactional writes counter
  localparam int unsigned IW     = $clog2(N),
  localparam int unsigned CW     = $clog2(N + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  // commit port
  input  logic          commit_valid,
  output logic          commit_ready,
  input  store_t        commit_st,
  input  sch_idx_t      commit_sch_idx,
  input  logic          commit_delay,
  output logic [CW-1:0] sb_occupancy,
  // load snoop port
  input  logic          ld_valid,
  input  waddr_t        ld_waddr,
  input  bmask_t        ld_mask,
  output logic          ld_hit,
  output logic          ld_fwd_ok,
  output data_t         ld_data,
  // L1 data cache port
  output logic          creq_valid,
  input  logic          creq_ready,
  output cache_req_t    creq,
  input  logic          cresp_valid,
  input  logic          cresp_tx,
  // control
  input  logic          drain,
  input  logic          abort_in,
  // status
  output logic          drained,
  output logic          delayed_stores,
  output logic          need_snoop,
  output logic [CW-1:0] completed_stores,
  output sb_events_t    ev
);

  sb_entry_t     ent [N];
  sb_entry_t     ent_n [N];
  logic [IW-1:0] head, tail, head_n, tail_n;
  logic [CW-1:0] count, count_n;
  logic [CW-1:0] completed_n;
  logic [OUT_W-1:0] tx_out;
  logic          ntx_busy;

  function automatic logic [IW-1:0] wrap(int unsigned v);
    return (v >= N) ? IW'(v - N) : IW'(v);
  endfunction

  // ---------------------------------------------------------------- snoop
  waddr_t        e_waddr [N];
  bmask_t        e_mask  [N];
  logic [N-1:0]  cand, ovl, covers, partial, delay_vec;
  logic          yng_hit, yng_full;
  logic [IW-1:0] yng_idx;
  waddr_t        q_waddr;
  bmask_t        q_mask;
  logic          st_snoop;   // committing store uses the search this cycle

  always_comb begin
    for (int i = 0; i < N; i++) begin
      e_waddr[i]   = ent[i].st.waddr;
      e_mask[i]    = ent[i].st.mask;
      delay_vec[i] = ent[i].valid && ent[i].delay;
      if (ld_valid) cand[i] = ent[i].valid && !ent[i].completed;
      else          cand[i] = ent[i].valid && ent[i].st.tx && !ent[i].issued;
    end
    q_waddr = ld_valid ? ld_waddr : commit_st.waddr;
    q_mask  = ld_valid ? ld_mask  : commit_st.mask;
  end

  sb_snoop #(.N(N)) u_snoop (
    .e_waddr (e_waddr),
    .e_mask  (e_mask),
    .cand    (cand),
    .head    (head),
    .q_waddr (q_waddr),
    .q_mask  (q_mask),
    .ovl     (ovl),
    .covers  (covers),
    .partial (partial),
    .yng_hit (yng_hit),
    .yng_idx (yng_idx),
    .yng_full(yng_full)
  );

  assign ld_hit    = ld_valid && yng_hit;
  assign ld_fwd_ok = ld_valid && yng_full;
  assign ld_data   = ent[yng_idx].st.data;

  // --------------------------------------------------------------- commit
  logic commit_fire, new_delay, snoop_hit_delayed;

  assign commit_ready = !ld_valid && !abort_in && (count < CW'(N));
  assign commit_fire  = commit_valid && commit_ready;
  assign st_snoop     = commit_fire && commit_st.tx && delayed_stores;
  assign snoop_hit_delayed = st_snoop && |(ovl & delay_vec);
  assign new_delay    = commit_st.tx && !drain && (commit_delay || snoop_hit_delayed);
  assign sb_occupancy = count;

  // ---------------------------------------------------------------- issue
  // Oldest entry that is not delayed and not yet written. Transactional
  // entries wait for older non-transactional ones; non-transactional entries
  // go only from the head, one at a time.
  logic          iss_found, iss_ok;
  logic [IW-1:0] iss_idx;
  logic          iss_at_head;

  always_comb begin
    logic ntx_pending;
    logic [IW-1:0] idx;
    iss_found   = 1'b0;
    iss_ok      = 1'b0;
    iss_idx     = '0;
    iss_at_head = 1'b0;
    ntx_pending = 1'b0;
    for (int k = 0; k < N; k++) begin
      idx = wrap(int'(head) + k);
      if (!iss_found && (CW'(k) < count) && ent[idx].valid && !ent[idx].issued
          && !ent[idx].delay) begin
        iss_found   = 1'b1;
        iss_idx     = idx;
        iss_at_head = (k == 0);
        if (ent[idx].st.tx) iss_ok = !ntx_pending && (tx_out != '1);
        else                iss_ok = (k == 0) && !ntx_busy;
      end
      if ((CW'(k) < count) && ent[idx].valid && !ent[idx].st.tx && !ent[idx].completed)
        ntx_pending = 1'b1;
    end
  end

  logic iss_fire;
  assign creq_valid   = iss_found && iss_ok && !abort_in;
  assign creq.st      = ent[iss_idx].st;
  assign creq.sch_idx = ent[iss_idx].sch_idx;
  assign iss_fire     = creq_valid && creq_ready;

  // ------------------------------------------------------------- overflow
  logic          full, ovf, compact, resume;
  logic          dst_found;
  logic [IW-1:0] dst_idx;

  always_comb begin
    logic [IW-1:0] idx;
    dst_found = 1'b0;
    dst_idx   = '0;
    for (int k = N - 1; k >= 1; k--) begin
      idx = wrap(int'(head) + k);
      if (!dst_found && (CW'(k) < count) && ent[idx].valid && ent[idx].st.tx
          && ent[idx].completed) begin
        dst_found = 1'b1;
        dst_idx   = idx;
      end
    end
  end

  assign full    = (count == CW'(N));
  assign ovf     = full && ent[head].valid && ent[head].delay && !drain && !abort_in;
  assign compact = ovf && (completed_stores != '0) && !ent[head].pinned && dst_found;
  assign resume  = ovf && !compact;

  // ------------------------------------------------------------ head free
  logic free_head;
  assign free_head = !compact && ent[head].valid &&
                     (ent[head].completed ||
                      (iss_fire && iss_at_head && ent[head].st.tx));

  // ------------------------------------------------------------ next state
  always_comb begin
    int unsigned keep;
    logic [CW-1:0] ncomp;
    keep    = 0;
    ncomp   = '0;
    ent_n   = ent;
    head_n  = head;
    tail_n  = tail;
    count_n = count;

    // completion of the in-flight non-transactional store (always the head)
    if (cresp_valid && !cresp_tx && ent[head].valid && !ent[head].st.tx)
      ent_n[head].completed = 1'b1;

    // write sent to cache
    if (iss_fire) begin
      ent_n[iss_idx].issued = 1'b1;
      if (ent[iss_idx].st.tx) ent_n[iss_idx].completed = 1'b1;
    end

    // marks left by the committing store's snoop
    if (st_snoop) begin
      for (int i = 0; i < N; i++) begin
        if (covers[i]) begin
          ent_n[i].coalesced = 1'b1;
          ent_n[i].pinned    = 1'b0;
          ent_n[i].issued    = 1'b1;
          ent_n[i].completed = 1'b1;
          ent_n[i].delay     = 1'b0;
        end else if (partial[i]) begin
          ent_n[i].pinned    = 1'b1;
        end
      end
    end

    // flash clear on drain or abort
    if (drain || abort_in)
      for (int i = 0; i < N; i++) ent_n[i].delay = 1'b0;

    // overflow: compaction or resume of the head
    if (compact) begin
      ent_n[dst_idx]           = ent[head];
      ent_n[dst_idx].pinned    = 1'b0;
      ent_n[dst_idx].coalesced = 1'b0;
      ent_n[dst_idx].issued    = 1'b0;
      ent_n[dst_idx].completed = 1'b0;
      ent_n[head].valid        = 1'b0;
      head_n  = wrap(int'(head) + 1);
      count_n = count_n - 1'b1;
    end else if (resume) begin
      ent_n[head].delay = 1'b0;
    end

    if (free_head) begin
      ent_n[head].valid = 1'b0;
      head_n  = wrap(int'(head) + 1);
      count_n = count_n - 1'b1;
    end

    // enqueue
    if (commit_fire) begin
      ent_n[tail].valid     = 1'b1;
      ent_n[tail].st        = commit_st;
      ent_n[tail].sch_idx   = commit_sch_idx;
      ent_n[tail].delay     = new_delay;
      ent_n[tail].issued    = 1'b0;
      ent_n[tail].completed = 1'b0;
      ent_n[tail].pinned    = 1'b0;
      ent_n[tail].coalesced = 1'b0;
      tail_n  = wrap(int'(tail) + 1);
      count_n = count_n + 1'b1;
    end

    // abort: non-transactional entries are the oldest ones, so the buffer
    // is cut back to them
    if (abort_in) begin
      for (int i = 0; i < N; i++)
        if (ent_n[i].valid && !ent_n[i].st.tx) keep++;
      for (int i = 0; i < N; i++)
        if (ent_n[i].st.tx) ent_n[i].valid = 1'b0;
      tail_n  = wrap(int'(head_n) + keep);
      count_n = CW'(keep);
    end

    for (int i = 0; i < N; i++)
      if (ent_n[i].valid && ent_n[i].completed) ncomp++;
    completed_n = ncomp;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N; i++) ent[i] <= '0;
      head             <= '0;
      tail             <= '0;
      count            <= '0;
      completed_stores <= '0;
      tx_out           <= '0;
      ntx_busy         <= 1'b0;
      delayed_stores   <= 1'b0;
      need_snoop       <= 1'b0;
    end else begin
      ent              <= ent_n;
      head             <= head_n;
      tail             <= tail_n;
      count            <= count_n;
      completed_stores <= completed_n;

      case ({iss_fire && creq.st.tx, cresp_valid && cresp_tx})
        2'b10:   tx_out <= tx_out + 1'b1;
        2'b01:   tx_out <= tx_out - 1'b1;
        default: ;
      endcase

      if (iss_fire && !creq.st.tx)          ntx_busy <= 1'b1;
      else if (cresp_valid && !cresp_tx)    ntx_busy <= 1'b0;

      if (drain || abort_in) begin
        delayed_stores <= 1'b0;
        need_snoop     <= 1'b0;
      end else if (commit_fire && commit_st.tx) begin
        if (new_delay)           delayed_stores <= 1'b1;
        else if (delayed_stores) need_snoop     <= 1'b1;
      end
    end
  end

  assign drained = (count == '0) && (tx_out == '0) && !ntx_busy;

  // ---------------------------------------------------------------- events
  always_comb begin
    ev = '0;
    ev.commit_delayed  = commit_fire && new_delay;
    ev.snoop_delayed   = commit_fire && new_delay && !commit_delay;
    ev.snoop_elided    = commit_fire && commit_st.tx && !delayed_stores;
    ev.coalesce        = st_snoop && |covers;
    ev.pin             = st_snoop && |partial;
    ev.compact         = compact;
    ev.overflow_resume = resume;
    ev.reorder         = iss_fire && creq.st.tx && !iss_at_head;
    ev.load_fwd        = ld_valid && yng_full;
    ev.load_priority   = ld_valid && commit_valid;
    ev.drain           = (drain || abort_in) && |delay_vec;
    ev.squash          = abort_in && (count != '0);
  end

  // -------------------------------------------------------------- checks
  // Transactional entries never precede a non-transactional one in age.
  property p_ntx_not_after_tx;
    @(posedge clk) disable iff (!rst_n)
      (commit_fire && !commit_st.tx) |-> (count == '0) || !ent[wrap(int'(tail) + N - 1)].st.tx
                                          || !ent[wrap(int'(tail) + N - 1)].valid;
  endproperty
  a_ntx_not_after_tx: assert property (p_ntx_not_after_tx);

  a_pinned_coalesced_exclusive: assert property (@(posedge clk) disable iff (!rst_n)
    !(ent[head].valid && ent[head].pinned && ent[head].coalesced));

  a_no_cache_req_when_delayed: assert property (@(posedge clk) disable iff (!rst_n)
    creq_valid |-> !ent[iss_idx].delay);

endmodule
