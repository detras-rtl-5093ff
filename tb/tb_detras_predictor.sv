// tb_detras_predictor: checks the delay predictor against a reference model
// kept in the testbench.
//
// Directed part: a fresh predictor never delays (GCH is 0); a conflicting
// completion saturates GCH to 15 and sets OT; below half of the 56-entry
// store buffer every transactional store is delayed, at or above it only
// stores whose SCH bit is set; a commit with OT set leaves GCH alone and
// clears OT; a commit with OT clear decrements GCH; a conflict-induced abort
// saturates GCH. Random part: random lookups, completions and transaction
// ends, with the reference model's GCH, OT and SCH compared every cycle.
module tb_detras_predictor;
  import detras_pkg::*;

  localparam int unsigned SB = 56;

  logic        clk = 0, rst_n = 0;
  logic        q_tx;
  sch_idx_t    q_idx;
  logic [5:0]  q_occupancy;
  logic        q_delay;
  logic        upd_valid;
  cache_resp_t upd;
  logic        tx_commit, tx_abort, abort_conflict;
  logic [3:0]  gch;
  logic        ot;

  int checks = 0, failures = 0;

  detras_predictor dut (.*);

  always #5 clk = ~clk;

  // reference model
  int   m_gch;
  logic m_ot;
  logic m_sch [256];

  function automatic logic m_delay(logic tx, int idx, int occ);
    if (!tx || m_gch == 0) return 1'b0;
    if (occ < SB / 2) return 1'b1;
    return m_sch[idx];
  endfunction

  task automatic m_step();
    if (upd_valid && upd.tx) m_sch[upd.sch_idx] = upd.conflict;
    if (upd_valid && upd.tx && upd.conflict) m_gch = 15;
    else if (tx_abort && abort_conflict) m_gch = 15;
    else if (tx_commit && !m_ot && m_gch > 0) m_gch--;
    if (tx_commit || tx_abort) m_ot = 0;
    else if (upd_valid && upd.tx && upd.conflict) m_ot = 1;
  endtask

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL t=%0t %s", $time, what);
    end
  endtask

  task automatic idle();
    upd_valid = 0; upd = '0; tx_commit = 0; tx_abort = 0; abort_conflict = 0;
  endtask

  // apply inputs for one cycle, update the model at the edge
  task automatic cycle();
    @(posedge clk);
    m_step();
    #1;
    idle();
  endtask

  task automatic lookup(input logic tx, input int idx, input int occ, input logic exp);
    q_tx = tx; q_idx = sch_idx_t'(idx); q_occupancy = 6'(occ);
    #1;
    check(q_delay == exp, $sformatf("delay tx=%0d idx=%0d occ=%0d gch=%0d got %0d exp %0d",
                                    tx, idx, occ, gch, q_delay, exp));
  endtask

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    m_gch = 0; m_ot = 0;
    foreach (m_sch[i]) m_sch[i] = 0;
    idle();
    q_tx = 0; q_idx = 0; q_occupancy = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    #1;
    // no recent contention: never delay
    lookup(1, 3, 0, 0);
    lookup(1, 3, 40, 0);
    check(gch == 0 && ot == 0, "reset state");
    // a conflicting completion for PC index 7
    upd_valid = 1; upd.tx = 1; upd.conflict = 1; upd.sch_idx = 7;
    cycle();
    check(gch == 15, $sformatf("gch saturates, got %0d", gch));
    check(ot == 1, "ot set");
    lookup(0, 7, 0, 0);          // non-transactional: never delayed
    lookup(1, 9, 0, 1);          // below threshold: delayed
    lookup(1, 9, 27, 1);
    lookup(1, 9, 28, 0);         // at threshold: SCH decides (bit 9 clear)
    lookup(1, 7, 28, 1);         // SCH bit 7 set
    lookup(1, 7, 56, 1);
    // commit while OT set: no decrement, OT cleared
    tx_commit = 1;
    cycle();
    check(gch == 15 && ot == 0, $sformatf("commit with OT: gch=%0d ot=%0d", gch, ot));
    // commit with OT clear: decrement
    tx_commit = 1;
    cycle();
    check(gch == 14, $sformatf("decrement: gch=%0d", gch));
    // a clean completion clears SCH bit 7
    upd_valid = 1; upd.tx = 1; upd.conflict = 0; upd.sch_idx = 7;
    cycle();
    lookup(1, 7, 30, 0);
    // commits decrement to zero and stop there
    repeat (16) begin tx_commit = 1; cycle(); end
    check(gch == 0, $sformatf("gch floor: %0d", gch));
    lookup(1, 1, 0, 0);
    // conflict-induced abort saturates, other aborts do not
    tx_abort = 1; abort_conflict = 0;
    cycle();
    check(gch == 0, "non-conflict abort");
    tx_abort = 1; abort_conflict = 1;
    cycle();
    check(gch == 15, "conflict abort saturates");

    // random part against the model
    for (int t = 0; t < 5000; t++) begin
      upd_valid = ($urandom % 3) == 0;
      upd.tx = ($urandom % 4) != 0;
      upd.conflict = ($urandom % 5) == 0;
      upd.sch_idx = sch_idx_t'($urandom % 16);
      tx_commit = ($urandom % 6) == 0;
      tx_abort = !tx_commit && (($urandom % 20) == 0);
      abort_conflict = $urandom;
      q_tx = $urandom; q_idx = sch_idx_t'($urandom % 16); q_occupancy = 6'($urandom % 57);
      #1;
      check(q_delay == m_delay(q_tx, int'(q_idx), int'(q_occupancy)), "random lookup");
      cycle();
      check(int'(gch) == m_gch && ot == m_ot, $sformatf("random state gch=%0d/%0d ot=%0d/%0d",
                                                        gch, m_gch, ot, m_ot));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
