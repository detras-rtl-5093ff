// l1_store_model: behavioural model of the L1 data cache as seen by the
// store buffer. Testbench only, not synthesizable.
//
// It accepts store writes on a valid/ready channel (ready is asserted
// randomly, READY_PCT percent of cycles), applies each write to a word array
// at acceptance, and answers each with a completion after HIT_LAT cycles
// when the word was written before (a hit) or after a random miss latency
// otherwise. Completions may come back out of order, at most one per cycle.
// The conflict bit of a transactional completion is set when the word is
// marked in `contended`, standing in for the coherence protocol's report
// that the write invalidated a remote transactional reader.
// Transactional writes are speculative: the first transactional write to a
// word saves the old value; `tx_abort` restores the saved values and
// `tx_commit` discards them, like the speculatively-modified bits of the
// cache.
module l1_store_model
  import detras_pkg::*;
#(
  parameter int unsigned WORDS     = 256,
  parameter int unsigned HIT_LAT   = 1,
  parameter int unsigned MISS_MIN  = 4,
  parameter int unsigned MISS_MAX  = 20,
  parameter int unsigned READY_PCT = 85
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        creq_valid,
  output logic        creq_ready,
  input  cache_req_t  creq,
  output logic        cresp_valid,
  output cache_resp_t cresp,
  input  logic [WORDS-1:0] contended,
  input  logic        tx_commit,
  input  logic        tx_abort
);

  data_t            mem     [WORDS];
  data_t            saved   [WORDS];
  logic [WORDS-1:0] sm;
  logic [WORDS-1:0] present;
  int unsigned      writes;     // writes accepted
  int unsigned      tx_writes;

  typedef struct {
    longint unsigned due;
    cache_resp_t     r;
  } pend_t;
  pend_t q[$];
  longint unsigned cyc;

  function automatic int unsigned widx(waddr_t a);
    return int'(a) % WORDS;
  endfunction

  function automatic data_t merge(data_t old, data_t nw, bmask_t m);
    data_t r = old;
    for (int b = 0; b < BYTES_W; b++) if (m[b]) r[8*b +: 8] = nw[8*b +: 8];
    return r;
  endfunction

  initial begin
    for (int i = 0; i < WORDS; i++) begin
      mem[i] = '0;
      saved[i] = '0;
    end
    sm = '0;
    present = '0;
    writes = 0;
    tx_writes = 0;
    cyc = 0;
    creq_ready = 1'b0;
    cresp_valid = 1'b0;
    cresp = '0;
  end

  always @(posedge clk) begin
    if (!rst_n) begin
      q.delete();
      creq_ready  <= 1'b0;
      cresp_valid <= 1'b0;
      sm = '0;
    end else begin
      cyc++;
      // write acceptance
      if (creq_valid && creq_ready) begin
        automatic int unsigned w = widx(creq.st.waddr);
        automatic pend_t p;
        if (creq.st.tx && !sm[w]) begin
          saved[w] = mem[w];
          sm[w] = 1'b1;
        end
        mem[w] = merge(mem[w], creq.st.data, creq.st.mask);
        writes++;
        if (creq.st.tx) tx_writes++;
        p.due = cyc + (present[w] ? HIT_LAT : MISS_MIN + ($urandom % (MISS_MAX - MISS_MIN + 1)));
        p.r.tx = creq.st.tx;
        p.r.conflict = creq.st.tx && contended[w];
        p.r.sch_idx = creq.sch_idx;
        present[w] = 1'b1;
        q.push_back(p);
      end
      // speculative versions
      if (tx_abort) begin
        for (int i = 0; i < WORDS; i++) if (sm[i]) mem[i] = saved[i];
        sm = '0;
      end else if (tx_commit) begin
        sm = '0;
      end
      // one completion per cycle, earliest due first
      cresp_valid <= 1'b0;
      begin
        automatic int best = -1;
        foreach (q[i]) if (q[i].due <= cyc && (best < 0 || q[i].due < q[best].due)) best = i;
        if (best >= 0) begin
          cresp_valid <= 1'b1;
          cresp <= q[best].r;
          q.delete(best);
        end
      end
      creq_ready <= (($urandom % 100) < READY_PCT);
    end
  end

  function automatic int unsigned pending();
    return q.size();
  endfunction

endmodule
