// scoreboard: in-order record of issued instructions with out-of-order
// write-back and in-order, multi-result commit.
//
// Each entry holds up to two destination registers (a butterfly writes both
// a and b from one entry), a pending bit and a result per destination. Issue
// allocates up to two entries per cycle at the tail (slot 0 first). The
// write-back ports (ALU/butterfly-b', ALU2/butterfly-a', LSU) fill results
// in any order. Commit walks the entries from the head and retires, in
// program order, as many finished entries as fit in NR_COMMIT_PORTS register
// writes this cycle ("triple commit" with the default of 3); the first entry
// that is unfinished or does not fit stops the walk. Register writes go out
// on rf_wr_o in the same cycle and reach the register file at the clock
// edge, where the entries are freed.
//
// busy_o marks every register that a valid entry will still write; issue
// uses it for read-after-write and write-after-write stalls. Entry count,
// the allocation order and the stall policy are this design's choices;
// the commit width of 3 follows the description.
module scoreboard
  import ntt_pkg::*;
#(
  parameter int unsigned NR_COMMIT_PORTS = 3,
  parameter int unsigned NR_WB_PORTS     = 3
) (
  input  logic                   clk_i,
  input  logic                   rst_ni,
  // allocation from issue
  input  logic                   alloc_i   [2],
  input  logic [1:0]             alloc_we_i[2],   // destination enables
  input  logic [REG_AW-1:0]      alloc_rd0_i[2],
  input  logic [REG_AW-1:0]      alloc_rd1_i[2],
  output logic [SB_IW-1:0]       alloc_idx_o[2],
  output logic [SB_IW:0]         free_o,
  output logic [NR_REGS-1:0]     busy_o,
  // write-back
  input  wb_t                    wb_i      [NR_WB_PORTS],
  // commit
  output rf_wr_t                 rf_wr_o   [NR_COMMIT_PORTS],
  output logic [$clog2(NR_COMMIT_PORTS+1)-1:0] commit_writes_o,
  output logic                   empty_o
);
  typedef struct packed {
    logic              valid;
    logic [1:0]        we;
    logic [1:0]        pend;
    logic [REG_AW-1:0] rd0;
    logic [REG_AW-1:0] rd1;
    logic [XLEN-1:0]   res0;
    logic [XLEN-1:0]   res1;
  } entry_t;

  localparam int unsigned CW = $clog2(NR_COMMIT_PORTS + 1);

  entry_t           sb_q [NR_SB_ENTRIES];
  logic [SB_IW-1:0] head_q, tail_q;
  logic [SB_IW:0]   count_q;

  // ---------------------------------------------------------------- alloc
  always_comb begin
    alloc_idx_o[0] = tail_q;
    alloc_idx_o[1] = tail_q + SB_IW'(alloc_i[0]);
    free_o         = (SB_IW+1)'(NR_SB_ENTRIES) - count_q;
    empty_o        = (count_q == '0);
    busy_o         = '0;
    for (int e = 0; e < NR_SB_ENTRIES; e++) begin
      if (sb_q[e].valid && sb_q[e].we[0]) busy_o[sb_q[e].rd0] = 1'b1;
      if (sb_q[e].valid && sb_q[e].we[1]) busy_o[sb_q[e].rd1] = 1'b1;
    end
    busy_o[0] = 1'b0;
  end

  // ---------------------------------------------------------------- commit
  logic [SB_IW:0]   n_commit;
  always_comb begin
    int unsigned used;
    logic        stop;
    logic [SB_IW-1:0] e;
    int unsigned nw;
    used     = 0;
    stop     = 1'b0;
    n_commit = '0;
    for (int p = 0; p < NR_COMMIT_PORTS; p++) rf_wr_o[p] = '0;
    for (int k = 0; k < NR_COMMIT_PORTS; k++) begin
      e  = head_q + SB_IW'(k);
      nw = 32'(sb_q[e].we[0]) + 32'(sb_q[e].we[1]);
      if (!stop && sb_q[e].valid && sb_q[e].pend == 2'b00 && used + nw <= NR_COMMIT_PORTS) begin
        if (sb_q[e].we[0]) begin
          rf_wr_o[used] = '{we: 1'b1, addr: sb_q[e].rd0, data: sb_q[e].res0};
          used++;
        end
        if (sb_q[e].we[1]) begin
          rf_wr_o[used] = '{we: 1'b1, addr: sb_q[e].rd1, data: sb_q[e].res1};
          used++;
        end
        n_commit++;
      end else begin
        stop = 1'b1;
      end
    end
    commit_writes_o = CW'(used);
  end

  // ---------------------------------------------------------------- state
  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      for (int e = 0; e < NR_SB_ENTRIES; e++) sb_q[e] <= '0;
      head_q  <= '0;
      tail_q  <= '0;
      count_q <= '0;
    end else begin
      // write-back
      for (int w = 0; w < NR_WB_PORTS; w++) begin
        if (wb_i[w].valid) begin
          if (wb_i[w].sel) begin
            sb_q[wb_i[w].idx].res1    <= wb_i[w].data;
            sb_q[wb_i[w].idx].pend[1] <= 1'b0;
          end else begin
            sb_q[wb_i[w].idx].res0    <= wb_i[w].data;
            sb_q[wb_i[w].idx].pend[0] <= 1'b0;
          end
        end
      end
      // commit frees entries at the head
      for (int k = 0; k < NR_COMMIT_PORTS; k++)
        if (k < int'(n_commit)) sb_q[head_q + SB_IW'(k)].valid <= 1'b0;
      // allocation at the tail (entries are free, so no overlap with commit)
      for (int s = 0; s < 2; s++) begin
        if (alloc_i[s]) begin
          sb_q[alloc_idx_o[s]].valid <= 1'b1;
          sb_q[alloc_idx_o[s]].we    <= alloc_we_i[s];
          sb_q[alloc_idx_o[s]].pend  <= alloc_we_i[s];
          sb_q[alloc_idx_o[s]].rd0   <= alloc_rd0_i[s];
          sb_q[alloc_idx_o[s]].rd1   <= alloc_rd1_i[s];
        end
      end
      head_q  <= head_q + n_commit[SB_IW-1:0];
      tail_q  <= tail_q + SB_IW'(alloc_i[0]) + SB_IW'(alloc_i[1]);
      count_q <= count_q + (SB_IW+1)'(alloc_i[0]) + (SB_IW+1)'(alloc_i[1]) - n_commit;
    end
  end

  // Handshake rules: allocation only into free entries, write-back only to
  // live entries that still wait for that result.
  a_no_overflow: assert property (@(posedge clk_i) disable iff (!rst_ni)
      (SB_IW+1)'(alloc_i[0]) + (SB_IW+1)'(alloc_i[1]) <= free_o)
    else $error("scoreboard overflow");
  for (genvar w = 0; w < NR_WB_PORTS; w++) begin : g_wb_chk
    a_wb_expected: assert property (@(posedge clk_i) disable iff (!rst_ni)
        wb_i[w].valid |-> (sb_q[wb_i[w].idx].valid && sb_q[wb_i[w].idx].pend[wb_i[w].sel]))
      else $error("write-back to an entry that does not expect it");
  end
endmodule
