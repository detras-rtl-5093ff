// sb_snoop: associative search of the store buffer (SB) for one address.
//
// The same search serves two users. A load looks for the youngest older
// store that writes any of its bytes (store-to-load forwarding). A committing
// transactional store looks for the entries it overlaps, so the SB can delay
// it behind an overlapped delayed store and mark older entries as pinned
// (partly overlapped) or coalesced (fully overwritten). The DeTraS design
// reuses the forwarding search for the second purpose; how the search is
// built inside is this implementation's own.
//
// Interface: the SB supplies every entry's word address and byte mask, a
// candidate vector (the entries that may take part), and its head pointer
// so that age order inside the circular buffer is known. The query is a word
// address and byte mask.
//   ovl[i]      entry i is a candidate and shares bytes with the query
//   covers[i]   ovl[i] and the query writes every byte of entry i
//   partial[i]  ovl[i] and entry i has bytes the query does not write
//   yng_hit     some entry overlaps; yng_idx is the youngest such entry
//   yng_full    the youngest overlapping entry holds every byte of the query
// Timing: purely combinational, one search per cycle.
module sb_snoop
  import detras_pkg::*;
#(
  parameter int unsigned N   = 56,
  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1
) (
  input  waddr_t          e_waddr [N],
  input  bmask_t          e_mask  [N],
  input  logic   [N-1:0]  cand,
  input  logic   [IW-1:0] head,
  input  waddr_t          q_waddr,
  input  bmask_t          q_mask,
  output logic   [N-1:0]  ovl,
  output logic   [N-1:0]  covers,
  output logic   [N-1:0]  partial,
  output logic            yng_hit,
  output logic   [IW-1:0] yng_idx,
  output logic            yng_full
);

  always_comb begin
    for (int i = 0; i < N; i++) begin
      ovl[i]     = cand[i] && (e_waddr[i] == q_waddr) && mask_overlap(e_mask[i], q_mask);
      covers[i]  = ovl[i] && mask_covers(q_mask, e_mask[i]);
      partial[i] = ovl[i] && !mask_covers(q_mask, e_mask[i]);
    end
  end

  // Walk the buffer from the head (oldest) towards younger entries; the last
  // overlapping entry seen is the youngest.
  always_comb begin
    logic [IW-1:0] idx;
    yng_hit = 1'b0;
    yng_idx = '0;
    for (int k = 0; k < N; k++) begin
      idx = (int'(head) + k >= N) ? IW'(int'(head) + k - N) : IW'(int'(head) + k);
      if (ovl[idx]) begin
        yng_hit = 1'b1;
        yng_idx = idx;
      end
    end
    yng_full = yng_hit && mask_covers(e_mask[yng_idx], q_mask);
  end

endmodule
