// tb_detras_sb: directed scenarios for the DeTraS store buffer, 8 entries.
//
// The testbench plays the commit stage, a load port and a simple cache that
// accepts writes when `cready` is high and completes them LAT cycles later,
// in order. Every accepted write is applied to a word array and logged.
// Scenarios, each checked against values worked out here:
//   1 non-delayed transactional stores are written in order, the first one
//     in the cycle after it commits
//   2 delayed stores stay in the buffer until drain, then go in order
//   3 a non-delayed store overtakes an older delayed one (reordering);
//     needSnoop is set
//   4 a store that partly overlaps a delayed one is delayed too and pins it
//   5 a store that fully covers a delayed one coalesces it: one write only
//   6 full buffer, delayed head, completed entries behind it: compaction
//   7 full buffer of delayed stores: the head is resumed, one at a time
//   8 full buffer with a pinned delayed head: resume instead of compaction
//   9 store-to-load forwarding, and loads taking priority over commits
//  10 abort discards transactional stores and keeps older plain ones
//  11 non-transactional stores leave one at a time, in order
// After each scenario the final memory is compared with the program-order
// result of all stores that were not discarded.
module tb_detras_sb;
  import detras_pkg::*;

  localparam int unsigned N   = 8;
  localparam int unsigned CW  = $clog2(N + 1);
  localparam int unsigned MW  = 16;   // words in the cache model

  logic          clk = 0, rst_n = 0;
  logic          commit_valid, commit_ready, commit_delay;
  store_t        commit_st;
  sch_idx_t      commit_sch_idx;
  logic [CW-1:0] sb_occupancy, completed_stores;
  logic          ld_valid, ld_hit, ld_fwd_ok;
  waddr_t        ld_waddr;
  bmask_t        ld_mask;
  data_t         ld_data;
  logic          creq_valid, creq_ready, cresp_valid, cresp_tx;
  cache_req_t    creq;
  logic          drain, abort_in, drained, delayed_stores, need_snoop;
  sb_events_t    ev;

  detras_sb #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL t=%0t %s", $time, what);
    end
  endtask

  initial begin
    #2_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ cache model
  int unsigned  cyc = 0;
  int unsigned  LAT = 3;
  logic         cready = 1;
  data_t        mem     [MW];
  data_t        ref_mem [MW];
  int unsigned  wcount  [MW];
  typedef struct { int unsigned due; logic tx; } resp_t;
  resp_t        rq[$];
  typedef struct { int unsigned cyc; waddr_t a; data_t d; bmask_t m; logic tx; } log_t;
  log_t         wlog[$];

  function automatic data_t merge(data_t old, data_t nw, bmask_t m);
    data_t r = old;
    for (int b = 0; b < 8; b++) if (m[b]) r[8*b +: 8] = nw[8*b +: 8];
    return r;
  endfunction

  assign creq_ready = cready;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    cresp_valid <= 1'b0;
    if (rst_n) begin
      if (creq_valid && creq_ready) begin
        automatic resp_t r;
        automatic log_t l;
        mem[int'(creq.st.waddr) % MW] = merge(mem[int'(creq.st.waddr) % MW], creq.st.data, creq.st.mask);
        wcount[int'(creq.st.waddr) % MW]++;
        r.due = cyc + LAT; r.tx = creq.st.tx;
        rq.push_back(r);
        l.cyc = cyc; l.a = creq.st.waddr; l.d = creq.st.data; l.m = creq.st.mask; l.tx = creq.st.tx;
        wlog.push_back(l);
      end
      if (rq.size() > 0 && rq[0].due <= cyc) begin
        cresp_valid <= 1'b1;
        cresp_tx <= rq[0].tx;
        void'(rq.pop_front());
      end
    end
  end

  // event counters
  int n_ev [string];
  always @(posedge clk) if (rst_n) begin
    if (ev.commit_delayed)  n_ev["delayed"]++;
    if (ev.snoop_delayed)   n_ev["snoop_delayed"]++;
    if (ev.coalesce)        n_ev["coalesce"]++;
    if (ev.pin)             n_ev["pin"]++;
    if (ev.compact)         n_ev["compact"]++;
    if (ev.overflow_resume) n_ev["resume"]++;
    if (ev.reorder)         n_ev["reorder"]++;
    if (ev.load_fwd)        n_ev["load_fwd"]++;
    if (ev.load_priority)   n_ev["load_priority"]++;
    if (ev.squash)          n_ev["squash"]++;
  end

  function automatic int evc(string k);
    return n_ev.exists(k) ? n_ev[k] : 0;
  endfunction

  // ------------------------------------------------------------- drivers
  task automatic commit(input int a, input bmask_t m, input data_t d, input logic tx,
                        input logic dly, input logic keep = 1);
    commit_valid = 1;
    commit_st.waddr = waddr_t'(a); commit_st.mask = m; commit_st.data = d; commit_st.tx = tx;
    commit_sch_idx = sch_idx_t'(a);
    commit_delay = dly;
    #1;
    while (!commit_ready) begin
      @(posedge clk);
      #1;
    end
    @(posedge clk);
    if (keep) ref_mem[a % MW] = merge(ref_mem[a % MW], d, m);
    #1;
    commit_valid = 0;
    @(negedge clk);
  endtask

  task automatic wait_drained(input int maxc = 200);
    int c = 0;
    while (!drained && c < maxc) begin @(negedge clk); c++; end
    check(drained, "buffer drained");
  endtask

  task automatic do_drain();
    drain = 1;
    wait_drained();
    drain = 0;
    @(negedge clk);
  endtask

  task automatic check_mem(input string tag);
    for (int i = 0; i < MW; i++)
      check(mem[i] == ref_mem[i], $sformatf("%s: word %0d = %h, expected %h", tag, i, mem[i], ref_mem[i]));
  endtask

  task automatic settle(input int n);
    repeat (n) @(negedge clk);
  endtask

  initial begin
    int w0, c0;
    commit_valid = 0; commit_delay = 0; commit_st = '0; commit_sch_idx = '0;
    ld_valid = 0; ld_waddr = '0; ld_mask = '0;
    drain = 0; abort_in = 0; cresp_tx = 0;
    for (int i = 0; i < MW; i++) begin mem[i] = '0; ref_mem[i] = '0; wcount[i] = 0; end
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);

    // 1: in-order, first write in the cycle after commit
    w0 = wlog.size();
    commit_valid = 1; commit_st = '{waddr: 1, mask: 8'hff, data: 64'h11, tx: 1}; commit_delay = 0;
    @(posedge clk); c0 = cyc; #1;
    ref_mem[1] = 64'h11;
    commit_valid = 0;
    @(negedge clk);
    commit(2, 8'hff, 64'h22, 1, 0);
    commit(3, 8'hff, 64'h33, 1, 0);
    settle(6);
    check(wlog.size() == w0 + 3, "1: three writes");
    check(wlog[w0].cyc == c0 + 1, $sformatf("1: first write one cycle after commit (%0d vs %0d)", wlog[w0].cyc, c0));
    check(wlog[w0].a == 1 && wlog[w0+1].a == 2 && wlog[w0+2].a == 3, "1: program order");
    wait_drained();
    check_mem("1");

    // 2: delayed stores held until drain
    w0 = wlog.size();
    commit(4, 8'hff, 64'h44, 1, 1);
    commit(5, 8'hff, 64'h55, 1, 1);
    settle(20);
    check(wlog.size() == w0, "2: delayed stores not written");
    check(delayed_stores, "2: delayedStores set");
    check(sb_occupancy == 2, "2: two entries held");
    do_drain();
    check(wlog.size() == w0 + 2 && wlog[w0].a == 4 && wlog[w0+1].a == 5, "2: drained in order");
    check(!delayed_stores, "2: delayedStores cleared by drain");
    check_mem("2");

    // 3: reordering past a delayed store
    w0 = wlog.size();
    c0 = evc("reorder");
    commit(6, 8'hff, 64'h66, 1, 1);
    commit(7, 8'hff, 64'h77, 1, 0);
    settle(5);
    check(wlog.size() == w0 + 1 && wlog[w0].a == 7, "3: younger store written first");
    check(evc("reorder") == c0 + 1, "3: reorder event");
    check(need_snoop, "3: needSnoop set");
    check(completed_stores == 1, $sformatf("3: completedStores=%0d", completed_stores));
    do_drain();
    check(wlog[w0+1].a == 6, "3: delayed store written at drain");
    check_mem("3");

    // 4: partial overlap with a delayed store
    w0 = wlog.size();
    c0 = evc("snoop_delayed");
    commit(8, 8'h0f, 64'h0000_0000_8888_8888, 1, 1);
    commit(8, 8'h3c, 64'h0000_9999_9999_0000, 1, 0);
    settle(5);
    check(wlog.size() == w0, "4: overlapping store held");
    check(evc("snoop_delayed") == c0 + 1, "4: delayed by snoop");
    check(evc("pin") >= 1, "4: older entry pinned");
    do_drain();
    check(wlog.size() == w0 + 2 && wlog[w0].m == 8'h0f && wlog[w0+1].m == 8'h3c, "4: order kept");
    check_mem("4");

    // 5: coalescing
    w0 = wcount[9];
    commit(9, 8'h0f, 64'h0000_0000_aaaa_aaaa, 1, 1);
    commit(9, 8'hff, 64'hbbbb_bbbb_bbbb_bbbb, 1, 1);
    check(evc("coalesce") == 1, "5: coalesce event");
    do_drain();
    check(wcount[9] == w0 + 1, $sformatf("5: one write for the coalesced pair (%0d)", wcount[9] - w0));
    check_mem("5");

    // 6: compaction. Delayed head, then seven non-delayed stores that are
    // written but cannot leave behind it.
    w0 = wlog.size();
    commit(10, 8'hff, 64'hd0, 1, 1);
    for (int i = 0; i < 7; i++) commit(11 + (i % 4), 8'h01 << i, 64'(i) << (8*i), 1, 0);
    settle(3);
    check(evc("compact") >= 1, "6: compaction happened");
    check(sb_occupancy < N, $sformatf("6: entries freed, occupancy %0d", sb_occupancy));
    check(wlog.size() == w0 + 7, $sformatf("6: delayed store still held (%0d writes)", wlog.size() - w0));
    check(evc("resume") == 0, "6: no resume needed");
    do_drain();
    check(wlog[wlog.size()-1].a == 10, "6: moved store written at drain");
    check_mem("6");

    // 7: buffer full of delayed stores: the head is resumed
    w0 = wlog.size();
    for (int i = 0; i < N; i++) commit(i, 8'h80, 64'h7700_0000_0000_0000 + (64'(i) << 56), 1, 1);
    settle(4);
    check(evc("resume") >= 1, "7: overflow resume");
    check(wlog.size() >= w0 + 1 && wlog[w0].a == 0, "7: head written first");
    check(sb_occupancy < N, "7: room made");
    do_drain();
    check_mem("7");

    // 8: pinned head blocks compaction
    c0 = evc("compact");
    w0 = evc("resume");
    commit(12, 8'h0f, 64'h0000_0000_1212_1212, 1, 1);
    commit(12, 8'h3c, 64'h0000_3434_3434_0000, 1, 1);
    for (int i = 0; i < 6; i++) commit(13 + (i % 2), 8'h01 << i, 64'hff << (8*i), 1, 0);
    settle(4);
    check(evc("compact") == c0, "8: no compaction with pinned head");
    check(evc("resume") > w0, "8: head resumed instead");
    do_drain();
    check_mem("8");

    // 9: forwarding and load priority
    commit(15, 8'hff, 64'h0123_4567_89ab_cdef, 1, 1);
    ld_valid = 1; ld_waddr = 15; ld_mask = 8'h0c;
    commit_valid = 1; commit_st = '{waddr: 3, mask: 8'hff, data: 64'h5, tx: 1};
    #1;
    check(ld_hit && ld_fwd_ok && ld_data == 64'h0123_4567_89ab_cdef, "9: forwarded data");
    check(!commit_ready, "9: load has priority over commit");
    ld_mask = 8'h00; ld_waddr = 14;   // miss
    #1;
    check(!ld_hit, "9: no match");
    @(negedge clk);
    ld_valid = 0; commit_valid = 0;
    check(evc("load_priority") >= 1, "9: load priority event");
    commit(15, 8'h0f, 64'h0000_0000_0000_1111, 1, 1);
    ld_valid = 1; ld_waddr = 15; ld_mask = 8'h18;
    #1;
    check(ld_hit && !ld_fwd_ok, "9: youngest match lacks bytes: no forwarding");
    ld_mask = 8'h03;
    #1;
    check(ld_fwd_ok && ld_data[15:0] == 16'h1111, "9: youngest store forwarded");
    @(negedge clk);
    ld_valid = 0;
    check(evc("load_fwd") >= 1, "9: load forwarding event");
    do_drain();
    check_mem("9");

    // 10: abort
    w0 = wlog.size();
    cready = 0;
    commit(1, 8'hff, 64'hab, 0, 0);
    commit(2, 8'hff, 64'hcd, 1, 1, 0);
    commit(3, 8'hff, 64'hef, 1, 0, 0);
    abort_in = 1;
    @(negedge clk);
    abort_in = 0;
    check(sb_occupancy == 1, $sformatf("10: only the plain store left (%0d)", sb_occupancy));
    cready = 1;
    wait_drained();
    check(wlog.size() == w0 + 1 && !wlog[w0].tx, "10: only the plain store written");
    check(evc("squash") == 1, "10: squash event");
    check_mem("10");

    // 11: non-transactional order, one in flight at a time
    w0 = wlog.size();
    LAT = 6;
    commit(4, 8'hff, 64'h1, 0, 0);
    commit(5, 8'hff, 64'h2, 0, 0);
    commit(6, 8'hff, 64'h3, 0, 0);
    wait_drained();
    check(wlog.size() == w0 + 3, "11: three writes");
    check(wlog[w0+1].cyc >= wlog[w0].cyc + 6 && wlog[w0+2].cyc >= wlog[w0+1].cyc + 6,
          "11: each waits for the previous completion");
    check_mem("11");

    $display("events: delayed=%0d snoop_delayed=%0d coalesce=%0d pin=%0d compact=%0d resume=%0d reorder=%0d",
             evc("delayed"), evc("snoop_delayed"), evc("coalesce"), evc("pin"), evc("compact"),
             evc("resume"), evc("reorder"));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
