// detras_tx_ctrl: transaction boundary control next to the store buffer.
//
// An RTM-style transaction is opened by xbegin and closed by xend or by an
// abort. xend behaves as a full memory fence: it may only retire once every
// store ahead of it has been written to the cache and no abort has been
// signalled. While xend waits at the head of the commit stage, this block
// asks the store buffer to drain (its delay bits are flash-cleared), and it
// retires xend in the first cycle in which the store buffer reports itself
// drained. The block also tells the rest of the design whether stores that
// commit now are transactional, and reports each commit and abort to the
// delay predictor.
//
// Interface (synchronous to clk, active-low asynchronous reset):
//   xbegin        pulse: xbegin retires; the transaction opens next cycle
//   xend_req      level: xend waits to retire
//   xend_commit   pulse: xend retires in this cycle (the transaction commits)
//   abort_req     pulse: the transaction aborts (abort_conflict gives the cause)
//   sb_drain      level to the store buffer: flash-clear delay bits
//   sb_abort      pulse to the store buffer: discard transactional stores
//   ev_commit / ev_abort / ev_abort_conflict  pulses to the predictor
// An abort wins over an xend that would retire in the same cycle. Requests
// outside a transaction are ignored; a nested xbegin is flattened into the
// outer transaction, as RTM does. These rules are this design's choices.
module detras_tx_ctrl (
  input  logic clk,
  input  logic rst_n,
  input  logic xbegin,
  input  logic xend_req,
  input  logic abort_req,
  input  logic abort_conflict,
  input  logic sb_drained,
  output logic tx_active,
  output logic xend_commit,
  output logic sb_drain,
  output logic sb_abort,
  output logic ev_commit,
  output logic ev_abort,
  output logic ev_abort_conflict
);

  always_comb begin
    sb_abort          = tx_active && abort_req;
    sb_drain          = tx_active && xend_req && !abort_req;
    xend_commit       = sb_drain && sb_drained;
    ev_commit         = xend_commit;
    ev_abort          = sb_abort;
    ev_abort_conflict = sb_abort && abort_conflict;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                          tx_active <= 1'b0;
    else if (xend_commit || sb_abort)    tx_active <= 1'b0;
    else if (xbegin)                     tx_active <= 1'b1;
  end

endmodule
