// tb_sb_snoop: random check of the store buffer search logic.
//
// An 8-entry buffer is filled with random word addresses (from a small set,
// so that matches are frequent) and random byte masks; the head pointer and
// candidate vector are random too. The expected overlap, containment,
// partial-overlap and youngest-match results are computed here by walking
// the entries in age order, and compared with the block's outputs.
module tb_sb_snoop;
  import detras_pkg::*;

  localparam int unsigned N  = 8;
  localparam int unsigned IW = $clog2(N);

  waddr_t        e_waddr [N];
  bmask_t        e_mask  [N];
  logic [N-1:0]  cand, ovl, covers, partial;
  logic [IW-1:0] head, yng_idx;
  waddr_t        q_waddr;
  bmask_t        q_mask;
  logic          yng_hit, yng_full;

  int checks = 0, failures = 0;

  sb_snoop #(.N(N)) dut (.*);

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    #2_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [N-1:0] e_ovl, e_cov, e_par;
    logic         e_hit, e_full;
    int           e_idx;
    for (int t = 0; t < 4000; t++) begin
      for (int i = 0; i < N; i++) begin
        e_waddr[i] = waddr_t'($urandom % 3);
        e_mask[i]  = bmask_t'($urandom);
        if (($urandom % 4) == 0) e_mask[i] = 8'hff;
      end
      cand    = N'($urandom);
      head    = IW'($urandom);
      q_waddr = waddr_t'($urandom % 3);
      q_mask  = bmask_t'($urandom);
      if (($urandom % 4) == 0) q_mask = 8'hff;
      #1;
      e_hit = 0; e_idx = 0;
      for (int i = 0; i < N; i++) begin
        logic share;
        share = 0;
        for (int b = 0; b < 8; b++) if (e_mask[i][b] && q_mask[b]) share = 1;
        e_ovl[i] = cand[i] && e_waddr[i] == q_waddr && share;
        e_cov[i] = e_ovl[i];
        for (int b = 0; b < 8; b++) if (e_mask[i][b] && !q_mask[b]) e_cov[i] = 0;
        e_par[i] = e_ovl[i] && !e_cov[i];
      end
      for (int k = 0; k < N; k++) begin
        int i;
        i = (int'(head) + k) % N;
        if (e_ovl[i]) begin e_hit = 1; e_idx = i; end
      end
      e_full = e_hit;
      if (e_hit) for (int b = 0; b < 8; b++) if (q_mask[b] && !e_mask[e_idx][b]) e_full = 0;
      check(ovl == e_ovl, $sformatf("ovl %b exp %b", ovl, e_ovl));
      check(covers == e_cov, $sformatf("covers %b exp %b", covers, e_cov));
      check(partial == e_par, $sformatf("partial %b exp %b", partial, e_par));
      check(yng_hit == e_hit, "yng_hit");
      if (e_hit) check(int'(yng_idx) == e_idx, $sformatf("yng_idx %0d exp %0d head %0d", yng_idx, e_idx, head));
      check(yng_full == e_full, "yng_full");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
