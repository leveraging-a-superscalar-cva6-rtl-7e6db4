// ntt_pkg: constants and types shared by the butterfly-extended dual-issue
// execute cluster.
//
// The modulus is the ML-DSA (Dilithium) prime q = 2^23 - 2^13 + 1, the scheme
// the butterfly instructions target. Montgomery arithmetic uses R = 2^32,
// matching the 32-bit register width of the processor. QPRIME is -q^-1 mod R.
//
// The decoded-instruction format is this design's own: the binary encodings of
// the butterfly instructions are not part of the description. A butterfly
// "btf a, b, z" keeps its operands in place: rd names register a (read and
// written), rs1 names b (read and written), rs2 names z (read only).
package ntt_pkg;

  localparam int unsigned XLEN      = 32;
  localparam int unsigned NR_REGS   = 32;
  localparam int unsigned REG_AW    = 5;
  // Scoreboard entries (CVA6 makes this a configuration option).
  localparam int unsigned NR_SB_ENTRIES = 8;
  localparam int unsigned SB_IW         = $clog2(NR_SB_ENTRIES);

  localparam logic [31:0] Q         = 32'd8380417;
  localparam logic [31:0] QPRIME    = 32'd4236238847;   // -q^-1 mod 2^32

  typedef enum logic [3:0] {
    OP_NOP    = 4'd0,
    OP_ADD    = 4'd1,   // rd = rs1 + rs2
    OP_SUB    = 4'd2,   // rd = rs1 - rs2
    OP_ADDI   = 4'd3,   // rd = rs1 + imm
    OP_LW     = 4'd4,   // rd = mem[rs1 + imm]
    OP_SW     = 4'd5,   // mem[rs1 + imm] = rs2
    OP_BTF_CT = 4'd6,   // a' = a + z.b, b' = a - z.b (mod q), Montgomery product
    OP_BTF_GS = 4'd7,   // a' = a + b,   b' = (a - b).z (mod q)
    OP_BTF_MM = 4'd8    // rd = b.z.R^-1 mod q (pointwise Montgomery product)
  } op_e;

  // Butterfly-unit operation select.
  typedef enum logic [1:0] {
    BTF_CT = 2'd0,
    BTF_GS = 2'd1,
    BTF_MM = 2'd2
  } btf_op_e;

  // One decoded instruction as delivered by decode.
  typedef struct packed {
    op_e                op;
    logic [REG_AW-1:0]  rd;
    logic [REG_AW-1:0]  rs1;
    logic [REG_AW-1:0]  rs2;
    logic [11:0]        imm;
  } instr_t;

  // Write-back of one result into the scoreboard.
  typedef struct packed {
    logic               valid;
    logic [SB_IW-1:0]   idx;    // scoreboard entry
    logic               sel;    // 0: first destination, 1: second destination
    logic [XLEN-1:0]    data;
  } wb_t;

  // One register-file write from commit.
  typedef struct packed {
    logic               we;
    logic [REG_AW-1:0]  addr;
    logic [XLEN-1:0]    data;
  } rf_wr_t;

  // Operands of one issue port, registered between issue and execute.
  typedef struct packed {
    logic               valid;
    op_e                op;
    logic [SB_IW-1:0]   idx;
    logic [XLEN-1:0]    opa;   // rs1 value (b for a butterfly, base for memory)
    logic [XLEN-1:0]    opb;   // rs2 value (z for a butterfly, store data)
    logic [XLEN-1:0]    opc;   // third operand: a of a butterfly
    logic [11:0]        imm;
  } ex_t;

  // Per-cycle issue events, for performance counting.
  typedef struct packed {
    logic               issue0;        // slot 0 issued
    logic               dual_issue;    // both slots issued
    logic               btf_split;     // butterfly issued over both ports, slot 1 idle
    logic               btf_lw_pair;   // butterfly and load issued together
    logic               stall_hazard;  // slot 0 waits for a busy register
    logic               stall_wb_port; // slot 0 waits for its result port
    logic               stall_sb_full; // an instruction waits for a scoreboard entry
  } issue_ev_t;

  function automatic bit is_btf2(op_e op);
    return op == OP_BTF_CT || op == OP_BTF_GS;
  endfunction

  function automatic bit is_btf(op_e op);
    return op == OP_BTF_CT || op == OP_BTF_GS || op == OP_BTF_MM;
  endfunction

  function automatic bit is_mem(op_e op);
    return op == OP_LW || op == OP_SW;
  endfunction

  function automatic bit is_alu(op_e op);
    return op == OP_ADD || op == OP_SUB || op == OP_ADDI;
  endfunction

endpackage
