// tb_detras_friendly_fire: the motivating transaction of the design, run
// twice through the full-size store buffer subsystem.
//
// The transaction reads x, writes x, reads y and z, then writes t
// (r_x w_x r_y r_z w_t), and takes ten idle cycles between accesses, which
// stand for the work of the transaction. Word x is contended: a write to it
// reports a conflict.
//   Run 1, no recent contention (GCH = 0): w_x reaches the cache right after
//   it commits, long before xend. A remote reader of x would be killed
//   during the whole rest of the transaction, and its retry would kill this
//   one in turn.
//   Run 2, after that conflict has been seen (GCH saturated): w_x is held in
//   the store buffer and reaches the cache only once xend is waiting to
//   retire. The window in which x is exposed shrinks from most of the
//   transaction to the drain at its end.
// The testbench measures the cycle of w_x's write relative to the xend
// request in each run and checks both cases. The loads of x must see the
// held w_x through store-to-load forwarding.
module tb_detras_friendly_fire;
  import detras_pkg::*;

  localparam int unsigned WORDS = 64;
  localparam int unsigned X = 1, Y = 2, Z = 3, T = 4;
  localparam int unsigned WORK = 10;

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

  l1_store_model #(.WORDS(WORDS), .READY_PCT(100)) l1 (
    .clk, .rst_n, .creq_valid, .creq_ready, .creq, .cresp_valid, .cresp,
    .contended, .tx_commit(xend_commit), .tx_abort(1'b0)
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int unsigned cyc = 0;
  int unsigned wx_cycle, xend_cycle;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (creq_valid && creq_ready && creq.st.waddr == waddr_t'(X) && creq.st.tx) wx_cycle <= cyc;
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL cycle=%0d %s", cyc, what);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic work();
    repeat (WORK) @(posedge clk);
    #1;
  endtask

  task automatic load(input int w, input data_t exp, input logic from_sb);
    ld_valid = 1; ld_waddr = waddr_t'(w); ld_mask = 8'hff;
    #1;
    if (from_sb) check(ld_fwd_ok && ld_data == exp, $sformatf("load of word %0d forwarded", w));
    @(posedge clk);
    #1 ld_valid = 0;
  endtask

  task automatic store(input int w, input data_t d);
    commit_valid = 1; commit_pc = pc_t'('h400 + 4 * w); commit_waddr = waddr_t'(w);
    commit_mask = 8'hff; commit_data = d;
    #1;
    while (!commit_ready) begin @(posedge clk); #1; end
    @(posedge clk);
    #1 commit_valid = 0;
  endtask

  task automatic run_tx(input int run, output int unsigned lead);
    wx_cycle = 0;
    xbegin = 1;
    @(posedge clk);
    #1 xbegin = 0;
    load(X, '0, 0);           work();
    store(X, 64'(run));       work();
    load(X, 64'(run), gch != 0);
    load(Y, '0, 0);           work();
    load(Z, '0, 0);           work();
    store(T, 64'(run));       work();
    xend_req = 1;
    xend_cycle = cyc;
    while (!xend_commit) begin @(posedge clk); #1; end
    @(posedge clk);
    #1 xend_req = 0;
    lead = xend_cycle - wx_cycle;
    check(l1.mem[X] == 64'(run), "x written by the end of the transaction");
    $display("run %0d: GCH=%0d at start, w_x written %0d cycles before xend was ready",
             run, run == 1 ? 0 : 15, int'(lead));
    repeat (5) @(posedge clk);
    #1;
  endtask

  initial begin
    int unsigned lead1, lead2;
    xbegin = 0; xend_req = 0; abort_req = 0; abort_conflict = 0;
    commit_valid = 0; commit_pc = '0; commit_waddr = '0; commit_mask = '0; commit_data = '0;
    ld_valid = 0; ld_waddr = '0; ld_mask = '0;
    contended = '0;
    contended[X] = 1'b1;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;

    check(gch == 0, "no contention seen yet");
    run_tx(1, lead1);
    check(gch == 15, "the conflict on x saturated GCH");
    check(lead1 >= 3 * WORK, $sformatf("run 1: w_x written early (%0d cycles before xend)", lead1));
    run_tx(2, lead2);
    check(int'(lead2) <= 0, $sformatf("run 2: w_x held until xend (%0d)", int'(lead2)));
    check(lead2 != lead1, "the two runs differ");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
