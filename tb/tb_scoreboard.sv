// tb_scoreboard: random allocation (one- and two-destination entries, up to
// two per cycle), random out-of-order write-back on the three ports, and a
// queue model of program order. Every cycle the commit writes must be
// exactly the greedy in-order prefix that fits in three register writes,
// busy_o must match the live destinations and free_o the free entries.
// Counts cycles that commit 1, 2 and 3 register writes; the three-write
// case must occur.
module tb_scoreboard;
  import ntt_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic              alloc [2];
  logic [1:0]        awe   [2];
  logic [REG_AW-1:0] ard0  [2], ard1 [2];
  logic [SB_IW-1:0]  aidx  [2];
  logic [SB_IW:0]    free;
  logic [31:0]       busy;
  wb_t               wb    [3];
  rf_wr_t            rfw   [3];
  logic [1:0]        ncw;
  logic              empty;

  scoreboard dut (.clk_i(clk), .rst_ni(rst_n), .alloc_i(alloc), .alloc_we_i(awe),
    .alloc_rd0_i(ard0), .alloc_rd1_i(ard1), .alloc_idx_o(aidx), .free_o(free), .busy_o(busy),
    .wb_i(wb), .rf_wr_o(rfw), .commit_writes_o(ncw), .empty_o(empty));

  typedef struct { int idx; bit we[2]; int rd[2]; logic [31:0] d[2]; bit pend[2]; } ent_t;
  ent_t q [$];
  int   tail;
  int checks = 0, failures = 0;
  int hist [4];

  task automatic fail(string s);
    failures++;
    if (failures < 10) $display("FAIL %s", s);
  endtask

  initial begin
    repeat (50000) @(posedge clk); failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    tail = 0;
    for (int s = 0; s < 2; s++) begin alloc[s] = 0; awe[s] = 0; ard0[s] = 0; ard1[s] = 0; end
    for (int w = 0; w < 3; w++) wb[w] = '0;
    for (int k = 0; k < 4; k++) hist[k] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 5000; cyc++) begin
      int used, ncommit, port, nfree;
      logic [31:0] exp_busy;
      @(negedge clk);
      // ---- expected commit from the model state
      used = 0; ncommit = 0;
      for (int k = 0; k < q.size() && k < 3; k++) begin
        int nw;
        nw = int'(q[k].we[0]) + int'(q[k].we[1]);
        if (q[k].pend[0] || q[k].pend[1] || used + nw > 3) break;
        used += nw; ncommit++;
      end
      checks++;
      if (int'(ncw) != used) fail($sformatf("commit writes %0d exp %0d", ncw, used));
      port = 0;
      for (int k = 0; k < ncommit; k++)
        for (int j = 0; j < 2; j++)
          if (q[k].we[j]) begin
            checks++;
            if (!rfw[port].we || int'(rfw[port].addr) != q[k].rd[j] || rfw[port].data !== q[k].d[j])
              fail($sformatf("port %0d commit mismatch", port));
            port++;
          end
      for (int p = port; p < 3; p++) begin checks++; if (rfw[p].we) fail("extra commit write"); end
      exp_busy = 0;
      foreach (q[k]) for (int j = 0; j < 2; j++) if (q[k].we[j]) exp_busy[q[k].rd[j]] = 1;
      exp_busy[0] = 0;
      checks++;
      if (busy !== exp_busy) fail("busy mismatch");
      checks++;
      if (int'(free) != NR_SB_ENTRIES - q.size()) fail("free mismatch");
      hist[used]++;
      nfree = NR_SB_ENTRIES - q.size();
      repeat (ncommit) void'(q.pop_front());
      // ---- random write-back of outstanding results
      for (int w = 0; w < 3; w++) wb[w] = '0;
      begin
        int cand_e [$]; int cand_j [$];
        cand_e.delete(); cand_j.delete();
        foreach (q[k]) for (int j = 0; j < 2; j++) if (q[k].pend[j]) begin cand_e.push_back(k); cand_j.push_back(j); end
        for (int w = 0; w < 3 && cand_e.size() > 0; w++) begin
          int pick;
          if ($urandom_range(3, 0) == 0) continue;
          pick = $urandom_range(cand_e.size() - 1, 0);
          wb[w].valid = 1; wb[w].idx = SB_IW'(q[cand_e[pick]].idx); wb[w].sel = cand_j[pick][0];
          wb[w].data = $urandom;
          q[cand_e[pick]].d[cand_j[pick]] = wb[w].data;
          q[cand_e[pick]].pend[cand_j[pick]] = 0;
          cand_e.delete(pick); cand_j.delete(pick);
        end
      end
      // ---- random allocation (free count as seen before this cycle's commit)
      for (int s = 0; s < 2; s++) begin
        alloc[s] = (nfree > s) && ($urandom_range(2, 0) != 0) && (s == 0 || alloc[0]);
        awe[s] = ($urandom_range(1, 0) == 1) ? 2'b11 : 2'b01;
        ard0[s] = REG_AW'($urandom_range(31, 1));
        ard1[s] = REG_AW'($urandom_range(31, 1));
      end
      #1;
      for (int s = 0; s < 2; s++) if (alloc[s]) begin
        ent_t e;
        checks++;
        if (int'(aidx[s]) != tail) fail("allocation index");
        e.idx = tail; e.we[0] = awe[s][0]; e.we[1] = awe[s][1];
        e.rd[0] = int'(ard0[s]); e.rd[1] = int'(ard1[s]);
        e.pend[0] = awe[s][0]; e.pend[1] = awe[s][1]; e.d[0] = 0; e.d[1] = 0;
        q.push_back(e);
        tail = (tail + 1) % NR_SB_ENTRIES;
      end
    end
    $display("commit writes per cycle: 0:%0d 1:%0d 2:%0d 3:%0d", hist[0], hist[1], hist[2], hist[3]);
    checks++;
    if (hist[3] == 0) fail("no triple commit");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
