// tb_issue_stage: directed cases for the dual-issue decision and operand
// routing, each checked against hand-derived expectations:
//   butterfly + load issue together, the butterfly's a read on read port 3;
//   butterfly + anything else, or + a load that conflicts with a or b,
//   issues the butterfly alone; independent ALU ops pair; dependent ones
//   do not; busy registers and a full scoreboard stall; the cycle after a
//   butterfly an ALU op may not use the butterfly's result port; two memory
//   instructions never pair; a butterfly in slot 1 never issues.
// A random phase then offers 4000 pairs drawn from a few registers, with
// random busy masks and free-entry counts, and checks every acknowledge
// against the issue rules restated here from the register sets each
// instruction reads and writes, and the registered operands of what issued.
// Register reads return 1000*addr + 7 so operand routing can be checked.
module tb_issue_stage;
  import ntt_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  instr_t            ins  [2];
  logic              v    [2];
  logic              ack  [2];
  logic [REG_AW-1:0] ra   [4];
  logic [31:0]       rd   [4];
  logic [31:0]       busy;
  logic [SB_IW:0]    free;
  logic [SB_IW-1:0]  sidx [2];
  logic              alloc[2];
  logic [1:0]        awe  [2];
  logic [REG_AW-1:0] ard0 [2], ard1 [2];
  ex_t               ex   [2];
  issue_ev_t         ev;

  issue_stage dut (.clk_i(clk), .rst_ni(rst_n), .instr_i(ins), .valid_i(v), .ack_o(ack),
    .rf_raddr_o(ra), .rf_rdata_i(rd), .busy_i(busy), .sb_free_i(free), .sb_idx_i(sidx),
    .alloc_o(alloc), .alloc_we_o(awe), .alloc_rd0_o(ard0), .alloc_rd1_o(ard1), .ex_o(ex), .ev_o(ev));

  always_comb for (int p = 0; p < 4; p++) rd[p] = 1000 * 32'(ra[p]) + 7;
  assign sidx[0] = 3'd5;
  assign sidx[1] = alloc[0] ? 3'd6 : 3'd5;

  int checks = 0, failures = 0;
  int n_split = 0, n_pair = 0, n_haz = 0, n_port = 0, n_full = 0;

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic instr_t mk(op_e op, int rdn, int rs1, int rs2, int imm = 0);
    instr_t i;
    i.op = op; i.rd = REG_AW'(rdn); i.rs1 = REG_AW'(rs1); i.rs2 = REG_AW'(rs2); i.imm = 12'(imm);
    return i;
  endfunction

  // offer a pair for one cycle and check the acknowledges
  task automatic offer(instr_t i0, instr_t i1, bit e0, bit e1, string name);
    @(negedge clk);
    ins[0] = i0; ins[1] = i1; v[0] = 1; v[1] = 1;
    #1;
    chk(ack[0] == e0 && ack[1] == e1, $sformatf("%s: ack %0d%0d exp %0d%0d", name, ack[0], ack[1], e0, e1));
    if (ev.btf_split) n_split++;
    if (ev.btf_lw_pair) n_pair++;
    if (ev.stall_hazard) n_haz++;
    if (ev.stall_wb_port) n_port++;
    if (ev.stall_sb_full) n_full++;
  endtask

  task automatic idle();
    @(negedge clk); v[0] = 0; v[1] = 0;
  endtask


  // ---- issue rules restated for the random phase ----
  function automatic logic [31:0] rd_set(instr_t i);
    logic [31:0] m = '0;
    if (i.op inside {OP_ADD, OP_SUB, OP_ADDI, OP_LW, OP_SW, OP_BTF_CT, OP_BTF_GS, OP_BTF_MM}) m[i.rs1] = 1;
    if (i.op inside {OP_ADD, OP_SUB, OP_SW, OP_BTF_CT, OP_BTF_GS, OP_BTF_MM}) m[i.rs2] = 1;
    if (i.op inside {OP_BTF_CT, OP_BTF_GS}) m[i.rd] = 1;
    m[0] = 0;
    return m;
  endfunction
  function automatic logic [31:0] wr_set(instr_t i);
    logic [31:0] m = '0;
    if (i.op inside {OP_ADD, OP_SUB, OP_ADDI, OP_LW, OP_BTF_MM}) m[i.rd] = 1;
    if (i.op inside {OP_BTF_CT, OP_BTF_GS}) begin m[i.rd] = 1; m[i.rs1] = 1; end
    m[0] = 0;
    return m;
  endfunction
  function automatic int entries(instr_t i);
    return (i.op inside {OP_NOP, OP_SW}) ? 0 : 1;
  endfunction
  function automatic instr_t rnd_instr();
    op_e ops [9] = '{OP_NOP, OP_ADD, OP_SUB, OP_ADDI, OP_LW, OP_SW, OP_BTF_CT, OP_BTF_GS, OP_BTF_MM};
    return mk(ops[$urandom_range(8)], $urandom_range(7), $urandom_range(7), $urandom_range(7), $urandom_range(4095));
  endfunction

  task automatic random_phase(int n);
    bit prev_btf = 0, prev_btf2 = 0;
    for (int k = 0; k < n; k++) begin
      bit e0, e1, a0, a1, m0, m1, b2;
      instr_t i0, i1;
      @(negedge clk);
      i0 = rnd_instr(); i1 = rnd_instr();
      ins[0] = i0; ins[1] = i1;
      v[0] = ($urandom_range(7) != 0); v[1] = ($urandom_range(7) != 0);
      busy = ($urandom_range(1) == 1) ? 32'(1) << $urandom_range(7) : 32'h0;
      free = (SB_IW+1)'($urandom_range(2) == 0 ? $urandom_range(1) : 8);
      #1;
      a0 = i0.op inside {OP_ADD, OP_SUB, OP_ADDI};
      a1 = i1.op inside {OP_ADD, OP_SUB, OP_ADDI};
      m0 = i0.op inside {OP_LW, OP_SW};
      m1 = i1.op inside {OP_LW, OP_SW};
      b2 = i0.op inside {OP_BTF_CT, OP_BTF_GS};
      e0 = v[0] && ((rd_set(i0) | wr_set(i0)) & busy) == 0 && (entries(i0) == 0 || free > 0)
           && !(a0 && prev_btf);
      e1 = e0 && v[1]
           && (b2 ? i1.op == OP_LW : !(i1.op inside {OP_BTF_CT, OP_BTF_GS, OP_BTF_MM}))
           && !(m0 && m1)
           && ((rd_set(i1) | wr_set(i1)) & (busy | wr_set(i0))) == 0
           && !(a1 && prev_btf2)
           && free >= (SB_IW+1)'(entries(i0) + entries(i1));
      chk(ack[0] == e0 && ack[1] == e1,
          $sformatf("random %0d: %s/%s ack %0d%0d exp %0d%0d", k, i0.op.name(), i1.op.name(), ack[0], ack[1], e0, e1));
      if (e0 && entries(i0) == 1) chk(alloc[0] && awe[0] == {b2 && i0.rd != 0, (b2 ? i0.rs1 : i0.rd) != 0}, "random alloc 0");
      if (ev.btf_split) n_split++;
      if (ev.btf_lw_pair) n_pair++;
      if (ev.stall_hazard) n_haz++;
      if (ev.stall_wb_port) n_port++;
      if (ev.stall_sb_full) n_full++;
      @(posedge clk); #1;
      chk(ex[0].valid == e0 && ex[1].valid == e1, $sformatf("random %0d: execute valid", k));
      if (e0) chk(ex[0].op == i0.op && ex[0].opa == 1000 * 32'(i0.rs1) + 7 && ex[0].opb == 1000 * 32'(i0.rs2) + 7
                  && (!b2 || ex[0].opc == 1000 * 32'(i0.rd) + 7) && ex[0].imm == i0.imm,
                  $sformatf("random %0d: slot 0 operands", k));
      if (e1) chk(ex[1].op == i1.op && ex[1].opa == 1000 * 32'(i1.rs1) + 7 && ex[1].imm == i1.imm
                  && (b2 || ex[1].opb == 1000 * 32'(i1.rs2) + 7),
                  $sformatf("random %0d: slot 1 operands", k));
      prev_btf  = e0 && i0.op inside {OP_BTF_CT, OP_BTF_GS, OP_BTF_MM};
      prev_btf2 = e0 && b2;
    end
    @(negedge clk); v[0] = 0; v[1] = 0; busy = 0; free = 8;
  endtask

  initial begin
    repeat (20000) @(posedge clk); failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    v[0] = 0; v[1] = 0; ins[0] = '0; ins[1] = '0; busy = 0; free = 8;
    repeat (2) @(posedge clk);
    rst_n = 1;

    // 1. btf.ct a=x10 b=x11 z=x12 with lw x13, 8(x5): fused pair
    offer(mk(OP_BTF_CT, 10, 11, 12), mk(OP_LW, 13, 5, 0, 8), 1, 1, "btf+lw");
    chk(ra[3] == 10, "a read on port 3");
    chk(alloc[0] && awe[0] == 2'b11 && ard0[0] == 11 && ard1[0] == 10, "btf entry: b' then a'");
    chk(alloc[1] && awe[1] == 2'b01 && ard0[1] == 13, "lw entry");
    chk(ev.btf_lw_pair, "pair event");
    @(posedge clk); #1;
    chk(ex[0].valid && ex[0].op == OP_BTF_CT && ex[0].opa == 11007 && ex[0].opb == 12007 && ex[0].opc == 10007 && ex[0].idx == 5,
        "btf operands b, z, a");
    chk(ex[1].valid && ex[1].op == OP_LW && ex[1].opa == 5007 && ex[1].imm == 8 && ex[1].idx == 6, "lw operands");
    idle(); idle();

    // 2. btf + add: butterfly alone, port 1 busy with its a operand
    offer(mk(OP_BTF_GS, 10, 11, 12), mk(OP_ADD, 1, 2, 3), 1, 0, "btf+add");
    chk(ev.btf_split, "split event");
    // 3. cycle after a ct/gs butterfly: ALU in slot 0 waits, and so does slot 1 ALU
    offer(mk(OP_ADD, 1, 2, 3), mk(OP_ADDI, 4, 2, 0, 1), 0, 0, "ALU after btf");
    chk(ev.stall_wb_port, "result port stall event");
    idle(); idle();
    // 4. cycle after a butterfly: a load may go
    offer(mk(OP_BTF_CT, 10, 11, 12), mk(OP_NOP, 0, 0, 0), 1, 0, "btf alone");
    offer(mk(OP_LW, 1, 5, 0), mk(OP_ADD, 2, 3, 4), 1, 0, "lw + ALU2 after btf");
    idle(); idle();
    // 5. btf + lw writing b, btf + lw reading a: not paired
    offer(mk(OP_BTF_CT, 10, 11, 12), mk(OP_LW, 11, 5, 0), 1, 0, "btf+lw WAW");
    idle(); idle();
    offer(mk(OP_BTF_CT, 10, 11, 12), mk(OP_LW, 13, 10, 0), 1, 0, "btf+lw RAW");
    idle(); idle();
    // 6. independent ALU ops pair, dependent ones do not
    offer(mk(OP_ADD, 1, 2, 3), mk(OP_SUB, 4, 5, 6), 1, 1, "ALU pair");
    chk(ra[0] == 2 && ra[1] == 3 && ra[2] == 5 && ra[3] == 6, "ALU pair read ports");
    offer(mk(OP_ADD, 1, 2, 3), mk(OP_SUB, 4, 1, 6), 1, 0, "ALU RAW in pair");
    // 7. two memory instructions never pair
    offer(mk(OP_LW, 1, 2, 0), mk(OP_SW, 0, 5, 6), 1, 0, "lw+sw");
    chk(!alloc[1] || !ack[1], "");
    offer(mk(OP_SW, 0, 5, 6), mk(OP_ADD, 1, 2, 3), 1, 1, "sw+add");
    chk(!alloc[0] && alloc[1] && sidx[1] == 5, "store takes no entry");
    // 8. btf.mm leaves port 1 free; a butterfly in slot 1 waits
    offer(mk(OP_BTF_MM, 7, 8, 9), mk(OP_ADD, 1, 2, 3), 1, 1, "mm+add");
    chk(awe[0] == 2'b01 && ard0[0] == 7, "mm single destination");
    offer(mk(OP_ADD, 1, 2, 3), mk(OP_BTF_CT, 10, 11, 12), 0, 0, "ALU after mm");
    idle();
    offer(mk(OP_ADD, 1, 2, 3), mk(OP_BTF_CT, 10, 11, 12), 1, 0, "btf in slot 1");
    // 9. busy registers: source, destination, butterfly a operand
    busy = 32'h1 << 2;
    offer(mk(OP_ADD, 1, 2, 3), mk(OP_NOP, 0, 0, 0), 0, 0, "busy source");
    chk(ev.stall_hazard, "hazard event");
    busy = 32'h1 << 10;
    offer(mk(OP_BTF_CT, 10, 11, 12), mk(OP_NOP, 0, 0, 0), 0, 0, "busy a");
    offer(mk(OP_LW, 10, 1, 0), mk(OP_NOP, 0, 0, 0), 0, 0, "busy destination");
    busy = 0;
    offer(mk(OP_ADD, 1, 2, 3), mk(OP_LW, 4, 2, 0), 1, 1, "not busy");
    busy = 32'h1 << 4;
    offer(mk(OP_ADD, 1, 2, 3), mk(OP_LW, 4, 2, 0), 1, 0, "slot 1 busy");
    busy = 0;
    // 10. scoreboard space
    free = 0;
    offer(mk(OP_ADD, 1, 2, 3), mk(OP_SW, 0, 5, 6), 0, 0, "scoreboard full");
    chk(ev.stall_sb_full, "full event");
    offer(mk(OP_SW, 0, 5, 6), mk(OP_NOP, 0, 0, 0), 1, 1, "store with full scoreboard");
    free = 1;
    offer(mk(OP_ADD, 1, 2, 3), mk(OP_SUB, 4, 5, 6), 1, 0, "one entry left");
    free = 8;
    idle();
    random_phase(4000);
    chk(n_split > 0 && n_pair > 0 && n_haz > 0 && n_port > 0 && n_full > 0, "every issue event seen");
    $display("events: split=%0d pair=%0d hazard=%0d port=%0d full=%0d", n_split, n_pair, n_haz, n_port, n_full);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
