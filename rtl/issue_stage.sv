// issue_stage: dual-issue decision, operand read and issue->execute register.
//
// Two decoded instructions (slot 0 older than slot 1) are offered each
// cycle; ack_o tells which were taken (slot 1 only together with slot 0).
// Issue port 0 reads rs1/rs2 on register-file ports 0/1, port 1 on ports 2/3.
//
// Butterflies (btf.ct, btf.gs) have three source operands: b = rs1 and
// z = rs2 are read on port 0, and a (the rd field) is read on the second
// read port of issue port 1 (data[1].rs2). A butterfly therefore always goes
// in slot 0 and occupies the execute path of port 0 plus the a-read of port
// 1. The other half of port 1 stays usable: a load (base = data[1].rs1,
// offset = data[1].imm) may issue beside it, which is how loads of the next
// butterfly's coefficients overlap the current one. Any other instruction
// beside a butterfly waits. btf.mm needs only two operands and leaves port 1
// free for an ALU2 or memory instruction.
//
// Slot 0 issues when its sources and destinations are not busy in the
// scoreboard, the scoreboard has an entry free (stores need none) and its
// result port is free: a butterfly issued in the previous cycle delivers its
// results one cycle later than a single-cycle ALU would, so an ALU op on the
// same port must wait one cycle. Slot 1 additionally must not read or write
// a register slot 0 writes, and at most one memory instruction issues per
// cycle. Operand reading is in order; there is no result forwarding, so a
// consumer waits for its producer to commit. The port assignment of the
// butterfly operands follows the description; the hazard policy, no
// forwarding and the one-memory-port rule are this design's choices.
module issue_stage
  import ntt_pkg::*;
(
  input  logic               clk_i,
  input  logic               rst_ni,
  input  instr_t             instr_i   [2],
  input  logic               valid_i   [2],
  output logic               ack_o     [2],
  // register file
  output logic [REG_AW-1:0]  rf_raddr_o[4],
  input  logic [XLEN-1:0]    rf_rdata_i[4],
  // scoreboard
  input  logic [NR_REGS-1:0] busy_i,
  input  logic [SB_IW:0]     sb_free_i,
  input  logic [SB_IW-1:0]   sb_idx_i  [2],
  output logic               alloc_o   [2],
  output logic [1:0]         alloc_we_o[2],
  output logic [REG_AW-1:0]  alloc_rd0_o[2],
  output logic [REG_AW-1:0]  alloc_rd1_o[2],
  // execute
  output ex_t                ex_o      [2],
  output issue_ev_t          ev_o
);
  function automatic bit uses_rs1(op_e op);
    return op inside {OP_ADD, OP_SUB, OP_ADDI, OP_LW, OP_SW, OP_BTF_CT, OP_BTF_GS, OP_BTF_MM};
  endfunction
  function automatic bit uses_rs2(op_e op);
    return op inside {OP_ADD, OP_SUB, OP_SW, OP_BTF_CT, OP_BTF_GS, OP_BTF_MM};
  endfunction
  function automatic bit allocates(op_e op);
    return op inside {OP_ADD, OP_SUB, OP_ADDI, OP_LW, OP_BTF_CT, OP_BTF_GS, OP_BTF_MM};
  endfunction

  // destination set of an instruction as a register mask
  function automatic logic [NR_REGS-1:0] dest_mask(instr_t i);
    logic [NR_REGS-1:0] m;
    m = '0;
    if (is_btf2(i.op)) begin
      m[i.rs1] = 1'b1;
      m[i.rd]  = 1'b1;
    end else if (allocates(i.op)) begin
      m[i.rd] = 1'b1;
    end
    m[0] = 1'b0;
    return m;
  endfunction

  function automatic logic [NR_REGS-1:0] src_mask(instr_t i);
    logic [NR_REGS-1:0] m;
    m = '0;
    if (uses_rs1(i.op)) m[i.rs1] = 1'b1;
    if (uses_rs2(i.op)) m[i.rs2] = 1'b1;
    if (is_btf2(i.op))  m[i.rd]  = 1'b1;
    m[0] = 1'b0;
    return m;
  endfunction

  ex_t ex_q [2];

  logic [NR_REGS-1:0] src0, src1, dst0, dst1;
  logic haz0, port0_blk, port1_blk, room0, ok0, ok1, ok1_but_room, pair_ok;
  logic [SB_IW:0] need;

  always_comb begin
    src0 = src_mask(instr_i[0]);
    dst0 = dest_mask(instr_i[0]);
    src1 = src_mask(instr_i[1]);
    dst1 = dest_mask(instr_i[1]);

    // a butterfly now in execute owns the port-0 (and for ct/gs port-1)
    // result path in the next cycle
    port0_blk = ex_q[0].valid && is_btf(ex_q[0].op);
    port1_blk = ex_q[0].valid && is_btf2(ex_q[0].op);

    haz0  = |((src0 | dst0) & busy_i);
    room0 = !allocates(instr_i[0].op) || sb_free_i != '0;
    ok0   = valid_i[0] && !haz0 && room0 && !(is_alu(instr_i[0].op) && port0_blk);

    need  = (SB_IW+1)'(allocates(instr_i[0].op)) + (SB_IW+1)'(allocates(instr_i[1].op));
    pair_ok = is_btf2(instr_i[0].op) ? (instr_i[1].op == OP_LW)
                                     : !is_btf(instr_i[1].op);
    ok1_but_room = ok0 && valid_i[1] && pair_ok
            && !(is_mem(instr_i[0].op) && is_mem(instr_i[1].op))
            && !(|((src1 | dst1) & busy_i))
            && !(|((src1 | dst1) & dst0))
            && !(is_alu(instr_i[1].op) && port1_blk);
    ok1   = ok1_but_room && sb_free_i >= need;

    ack_o[0] = ok0;
    ack_o[1] = ok1;

    rf_raddr_o[0] = instr_i[0].rs1;
    rf_raddr_o[1] = instr_i[0].rs2;
    rf_raddr_o[2] = instr_i[1].rs1;
    rf_raddr_o[3] = is_btf2(instr_i[0].op) ? instr_i[0].rd : instr_i[1].rs2;

    for (int s = 0; s < 2; s++) begin
      alloc_o[s]     = (s == 0 ? ok0 : ok1) && allocates(instr_i[s].op);
      alloc_we_o[s]  = '0;
      alloc_rd0_o[s] = instr_i[s].rd;
      alloc_rd1_o[s] = instr_i[s].rd;
      if (is_btf2(instr_i[s].op)) begin
        alloc_rd0_o[s] = instr_i[s].rs1;                   // b'
        alloc_we_o[s]  = {instr_i[s].rd != '0, instr_i[s].rs1 != '0};
      end else if (allocates(instr_i[s].op)) begin
        alloc_we_o[s]  = {1'b0, instr_i[s].rd != '0};
      end
    end

    ev_o.issue0        = ok0;
    ev_o.dual_issue    = ok1;
    ev_o.btf_split     = ok0 && is_btf2(instr_i[0].op) && !ok1;
    ev_o.btf_lw_pair   = ok1 && is_btf2(instr_i[0].op);
    ev_o.stall_hazard  = valid_i[0] && haz0;
    ev_o.stall_wb_port = valid_i[0] && !haz0 && is_alu(instr_i[0].op) && port0_blk;
    ev_o.stall_sb_full = (valid_i[0] && !haz0 && !room0) || (ok1_but_room && sb_free_i < need);
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      ex_q[0] <= '0;
      ex_q[1] <= '0;
    end else begin
      ex_q[0].valid <= ok0;
      ex_q[1].valid <= ok1;
      if (ok0) begin
        ex_q[0].op  <= instr_i[0].op;
        ex_q[0].idx <= sb_idx_i[0];
        ex_q[0].opa <= rf_rdata_i[0];
        ex_q[0].opb <= rf_rdata_i[1];
        ex_q[0].opc <= rf_rdata_i[3];
        ex_q[0].imm <= instr_i[0].imm;
      end
      if (ok1) begin
        ex_q[1].op  <= instr_i[1].op;
        ex_q[1].idx <= sb_idx_i[1];
        ex_q[1].opa <= rf_rdata_i[2];
        ex_q[1].opb <= rf_rdata_i[3];
        ex_q[1].opc <= '0;
        ex_q[1].imm <= instr_i[1].imm;
      end
    end
  end

  assign ex_o = ex_q;

  // slot 1 is never taken without slot 0
  a_slot1_needs_slot0: assert property (@(posedge clk_i) disable iff (!rst_ni) ack_o[1] |-> ack_o[0])
    else $error("slot 1 issued alone");
endmodule
