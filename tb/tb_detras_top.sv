// tb_detras_top: end-to-end run of the DeTraS store buffer subsystem at its
// default size (56-entry store buffer, 256-entry SCH, 4-bit GCH).
//
// The testbench plays an out-of-order core's commit stage and load port,
// and connects the behavioural L1 model. It runs a stream of transactions
// of 1 to 110 stores each (so that some overflow the store buffer), with
// plain stores between them. Stores from a few PCs go to "contended" words,
// whose completions carry the conflict bit; the others go to private words.
// Some transactions are aborted part-way, some with a conflict cause.
// Loads are issued at random, often in the same cycle as a store commit.
//
// Checks, against a reference of the program-order memory image:
//   * every load that the store buffer forwards gets the bytes of the
//     youngest committed store; every load that finds no entry would read
//     the right bytes from the cache;
//   * xend retires only with the buffer empty and no write outstanding,
//     and afterwards the cache holds exactly the committed image;
//   * after an abort the cache holds the image from before the transaction;
//   * each mechanism of the design happens at least once: delay by GCH,
//     delay and non-delay decided by SCH above the half-occupancy
//     threshold, delay forced by an overlapping delayed store, pinning,
//     coalescing, compaction, overflow resume, reordering, drain on xend,
//     load forwarding, load priority, snoop elision, squash on abort, GCH
//     saturation and decrement.
module tb_detras_top;
  import detras_pkg::*;

  localparam int unsigned SB    = 56;
  localparam int unsigned WORDS = 256;
  localparam int unsigned NTX   = 400;
  localparam int unsigned NCONT = 8;        // contended words 0..7

  logic        clk = 0, rst_n = 0;
  logic        xbegin, xend_req, xend_commit, abort_req, abort_conflict, tx_active;
  logic        commit_valid, commit_ready;
  pc_t         commit_pc;
  waddr_t      commit_waddr;
  bmask_t      commit_mask;
  data_t       commit_data;
  logic        ld_valid, ld_hit, ld_fwd_ok;
  waddr_t      ld_waddr;
  bmask_t      ld_mask;
  data_t       ld_data;
  logic        creq_valid, creq_ready, cresp_valid;
  cache_req_t  creq;
  cache_resp_t cresp;
  logic [3:0]  gch;
  logic        ot;
  logic [5:0]  sb_occupancy, completed_stores;
  logic        delayed_stores, need_snoop, sb_drained;
  sb_events_t  ev;
  logic [WORDS-1:0] contended;

  detras_top dut (.*);

  l1_store_model #(.WORDS(WORDS)) l1 (
    .clk, .rst_n, .creq_valid, .creq_ready, .creq, .cresp_valid, .cresp,
    .contended, .tx_commit(xend_commit), .tx_abort(abort_req && tx_active)
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint unsigned cycles = 0;
  always @(posedge clk) cycles++;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL cycle=%0d %s", cycles, what);
    end
  endtask

  // watchdog
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ mechanisms
  int n_gch_delay, n_sch_delay, n_sch_nodelay, n_snoop_delay, n_pin, n_coalesce,
      n_compact, n_resume, n_reorder, n_drain, n_fwd, n_ldprio, n_elide, n_squash,
      n_gch_sat, n_gch_dec, n_xend_wait;
  logic [3:0] gch_q;

  always @(posedge clk) if (rst_n) begin
    if (commit_valid && commit_ready && tx_active && gch != 0) begin
      if (sb_occupancy < SB / 2) begin
        if (ev.commit_delayed) n_gch_delay++;
      end else if (!ev.snoop_delayed) begin
        if (ev.commit_delayed) n_sch_delay++;
        else                   n_sch_nodelay++;
      end
    end
    if (ev.snoop_delayed)   n_snoop_delay++;
    if (ev.pin)             n_pin++;
    if (ev.coalesce)        n_coalesce++;
    if (ev.compact)         n_compact++;
    if (ev.overflow_resume) n_resume++;
    if (ev.reorder)         n_reorder++;
    if (ev.drain && xend_req) n_drain++;
    if (ev.load_fwd)        n_fwd++;
    if (ev.load_priority)   n_ldprio++;
    if (ev.snoop_elided)    n_elide++;
    if (ev.squash)          n_squash++;
    if (xend_req && tx_active && !xend_commit) n_xend_wait++;
    if (gch == 4'hf && gch_q != 4'hf) n_gch_sat++;
    if (gch + 1 == gch_q)   n_gch_dec++;
    gch_q <= gch;
  end

  // ------------------------------------------------------------ reference
  data_t ref_mem  [WORDS];   // committed image (what the cache must hold)
  data_t core_view[WORDS];   // program-order image seen by the core's loads

  function automatic data_t merge(data_t old, data_t nw, bmask_t m);
    data_t r = old;
    for (int b = 0; b < 8; b++) if (m[b]) r[8*b +: 8] = nw[8*b +: 8];
    return r;
  endfunction

  function automatic bmask_t rand_mask();
    case ($urandom % 4)
      0, 1:    return 8'hff;
      2:       return 8'h0f << (4 * ($urandom % 2));
      default: return bmask_t'(8'h03 << (2 * ($urandom % 4)));
    endcase
  endfunction

  function automatic data_t m2bits(bmask_t m);
    data_t r;
    for (int b = 0; b < 8; b++) r[8*b +: 8] = {8{m[b]}};
    return r;
  endfunction

  // a load in the current cycle: check what the store buffer says
  task automatic check_load();
    data_t bm;
    bm = m2bits(ld_mask);
    if (ld_fwd_ok)
      check((ld_data & bm) == (core_view[ld_waddr] & bm),
            $sformatf("forwarded load word %0d: %h, expected %h", ld_waddr, ld_data & bm,
                      core_view[ld_waddr] & bm));
    else if (!ld_hit)
      check((l1.mem[ld_waddr] & bm) == (core_view[ld_waddr] & bm),
            $sformatf("load from cache word %0d: %h, expected %h", ld_waddr,
                      l1.mem[ld_waddr] & bm, core_view[ld_waddr] & bm));
  endtask

  task automatic compare_cache(input string tag);
    int bad = 0;
    for (int i = 0; i < WORDS; i++) if (l1.mem[i] != ref_mem[i]) bad++;
    check(bad == 0, $sformatf("%s: %0d words differ from the committed image", tag, bad));
  endtask

  // one store through the commit port, with a random load alongside
  task automatic do_store(input pc_t pc, input int w, input bmask_t m, input data_t d);
    commit_valid = 1; commit_pc = pc; commit_waddr = waddr_t'(w); commit_mask = m; commit_data = d;
    forever begin
      logic fire;
      ld_valid = ($urandom % 4) == 0;
      ld_waddr = waddr_t'(($urandom % 2) ? w : ($urandom % 24));
      ld_mask  = rand_mask();
      #1;
      if (ld_valid) check_load();
      fire = commit_ready;
      @(posedge clk);
      if (fire) break;
      #1;
    end
    core_view[w] = merge(core_view[w], d, m);
    #1;
    commit_valid = 0;
    ld_valid = 0;
  endtask

  task automatic idle_cycles(input int n);
    repeat (n) begin
      ld_valid = ($urandom % 2);
      ld_waddr = waddr_t'($urandom % 24);
      ld_mask  = rand_mask();
      #1;
      if (ld_valid) check_load();
      @(posedge clk);
      #1;
      ld_valid = 0;
    end
  endtask

  typedef struct { pc_t pc; int w; bmask_t m; data_t d; } st_t;

  initial begin
    st_t ops[$];
    int   nst, cut, hot, nplain;
    logic do_abort;
    int   n_commit = 0, n_abort = 0, n_overflow_tx = 0, wait_c;

    xbegin = 0; xend_req = 0; abort_req = 0; abort_conflict = 0;
    commit_valid = 0; commit_pc = '0; commit_waddr = '0; commit_mask = '0; commit_data = '0;
    ld_valid = 0; ld_waddr = '0; ld_mask = '0;
    contended = '0;
    for (int i = 0; i < NCONT; i++) contended[i] = 1'b1;
    for (int i = 0; i < WORDS; i++) begin ref_mem[i] = '0; core_view[i] = '0; end
    gch_q = 0;
    {n_gch_delay, n_sch_delay, n_sch_nodelay, n_snoop_delay, n_pin, n_coalesce, n_compact,
     n_resume, n_reorder, n_drain, n_fwd, n_ldprio, n_elide, n_squash, n_gch_sat, n_gch_dec,
     n_xend_wait} = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;

    for (int t = 0; t < NTX; t++) begin
      // a few plain stores between transactions
      nplain = $urandom % 3;
      for (int i = 0; i < nplain; i++) begin
        automatic int w = 32 + ($urandom % 64);
        automatic bmask_t m = rand_mask();
        automatic data_t d = {$urandom, $urandom};
        do_store(pc_t'('h9000 + i), w, m, d);
        ref_mem[w] = merge(ref_mem[w], d, m);
      end

      // build the transaction
      ops.delete();
      nst = 1 + ($urandom % 110);
      hot = ($urandom % 2);                // touches contended words
      if (nst > SB) n_overflow_tx++;
      for (int i = 0; i < nst; i++) begin
        automatic st_t s;
        automatic int p = $urandom % 64;
        if (hot && p < 12) begin
          s.pc = pc_t'('h400 + 4 * (p % NCONT));  // contended PCs
          s.w  = p % NCONT;
        end else begin
          s.pc = pc_t'('h1000 + 4 * p);
          s.w  = 8 + ($urandom % 200);
          if (($urandom % 6) == 0) s.w = 8 + (p % 16);  // some reuse of private words
        end
        s.m = rand_mask();
        s.d = {$urandom, $urandom};
        ops.push_back(s);
      end
      do_abort = ($urandom % 8) == 0;
      cut = do_abort ? ($urandom % nst) : nst;

      // xbegin
      xbegin = 1;
      @(posedge clk);
      #1 xbegin = 0;
      for (int i = 0; i < cut; i++) begin
        do_store(ops[i].pc, ops[i].w, ops[i].m, ops[i].d);
        if (($urandom % 8) == 0) idle_cycles(1);
      end

      if (do_abort) begin
        abort_req = 1; abort_conflict = $urandom;
        @(posedge clk);
        #1 abort_req = 0;
        for (int i = 0; i < WORDS; i++) core_view[i] = ref_mem[i];
        wait_c = 0;
        while (!sb_drained && wait_c < 2000) begin idle_cycles(1); wait_c++; end
        check(sb_drained, "drained after abort");
        check(!tx_active, "transaction closed by abort");
        compare_cache("after abort");
        n_abort++;
      end else begin
        xend_req = 1;
        wait_c = 0;
        forever begin
          #1;
          if (xend_commit) begin
            check(sb_occupancy == 0 && l1.pending() == 0,
                  $sformatf("xend retired with %0d entries, %0d writes outstanding",
                            sb_occupancy, l1.pending()));
            break;
          end
          @(posedge clk);
          wait_c++;
          if (wait_c > 5000) break;
        end
        check(wait_c <= 5000, "xend retired");
        @(posedge clk);
        #1 xend_req = 0;
        foreach (ops[i]) ref_mem[ops[i].w] = merge(ref_mem[ops[i].w], ops[i].d, ops[i].m);
        compare_cache("after commit");
        n_commit++;
      end
      idle_cycles($urandom % 4);
    end

    $display("transactions: %0d committed, %0d aborted, %0d larger than the SB; %0d cycles",
             n_commit, n_abort, n_overflow_tx, cycles);
    $display("delay by GCH %0d, SCH delay %0d, SCH no-delay %0d, snoop delay %0d, pin %0d, coalesce %0d",
             n_gch_delay, n_sch_delay, n_sch_nodelay, n_snoop_delay, n_pin, n_coalesce);
    $display("compact %0d, overflow resume %0d, reorder %0d, xend drain %0d, load fwd %0d, load priority %0d",
             n_compact, n_resume, n_reorder, n_drain, n_fwd, n_ldprio);
    $display("snoop elided %0d, squash %0d, GCH saturate %0d, GCH decrement %0d, xend wait %0d",
             n_elide, n_squash, n_gch_sat, n_gch_dec, n_xend_wait);
    check(n_gch_delay > 0,   "mechanism: delay by GCH below threshold");
    check(n_sch_delay > 0,   "mechanism: delay by SCH above threshold");
    check(n_sch_nodelay > 0, "mechanism: no delay by SCH above threshold");
    check(n_snoop_delay > 0, "mechanism: delay by overlapped delayed store");
    check(n_pin > 0,         "mechanism: pinned");
    check(n_coalesce > 0,    "mechanism: coalesced");
    check(n_compact > 0,     "mechanism: compaction");
    check(n_resume > 0,      "mechanism: overflow resume");
    check(n_reorder > 0,     "mechanism: reordering");
    check(n_drain > 0,       "mechanism: drain on xend");
    check(n_fwd > 0,         "mechanism: load forwarding");
    check(n_ldprio > 0,      "mechanism: load priority");
    check(n_elide > 0,       "mechanism: snoop elided");
    check(n_squash > 0,      "mechanism: squash on abort");
    check(n_gch_sat > 0,     "mechanism: GCH saturation");
    check(n_gch_dec > 0,     "mechanism: GCH decrement");
    check(n_xend_wait > 0,   "mechanism: xend waiting for drain");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
