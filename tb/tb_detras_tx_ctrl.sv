// tb_detras_tx_ctrl: checks the transaction boundary control.
//
// Drives random xbegin / xend / abort requests and a random "store buffer
// drained" signal, and compares every output with a reference model: xend
// retires only inside a transaction, only when the store buffer is drained,
// and never in the cycle of an abort; the drain request is raised exactly
// while xend waits; the predictor events follow commits and aborts.
module tb_detras_tx_ctrl;
  logic clk = 0, rst_n = 0;
  logic xbegin, xend_req, abort_req, abort_conflict, sb_drained;
  logic tx_active, xend_commit, sb_drain, sb_abort, ev_commit, ev_abort, ev_abort_conflict;
  int checks = 0, failures = 0;
  int n_commit = 0, n_abort = 0, n_wait = 0;
  logic m_active;

  detras_tx_ctrl dut (.*);
  always #5 clk = ~clk;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL t=%0t %s", $time, what);
    end
  endtask

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic e_drain, e_commit, e_abort;
    xbegin = 0; xend_req = 0; abort_req = 0; abort_conflict = 0; sb_drained = 0;
    m_active = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 4000; t++) begin
      @(negedge clk);
      xbegin = ($urandom % 4) == 0;
      xend_req = ($urandom % 2) == 0;
      abort_req = ($urandom % 12) == 0;
      abort_conflict = $urandom;
      sb_drained = ($urandom % 3) == 0;
      #1;
      e_abort  = m_active && abort_req;
      e_drain  = m_active && xend_req && !abort_req;
      e_commit = e_drain && sb_drained;
      check(tx_active == m_active, "tx_active");
      check(sb_drain == e_drain, "sb_drain");
      check(xend_commit == e_commit, "xend_commit");
      check(sb_abort == e_abort && ev_abort == e_abort, "abort");
      check(ev_abort_conflict == (e_abort && abort_conflict), "abort cause");
      check(ev_commit == e_commit, "ev_commit");
      if (e_commit) n_commit++;
      if (e_abort) n_abort++;
      if (e_drain && !sb_drained) n_wait++;
      @(posedge clk);
      if (e_commit || e_abort) m_active = 0;
      else if (xbegin) m_active = 1;
    end
    check(n_commit > 0 && n_abort > 0 && n_wait > 0, "all cases seen");
    $display("commits=%0d aborts=%0d xend waits=%0d", n_commit, n_abort, n_wait);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
