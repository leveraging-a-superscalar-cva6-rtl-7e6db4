// cva6_ntt_cluster: issue, execute and commit of a dual-issue, in-order-issue
// RISC-V core (CVA6 style) extended with butterfly instructions for the
// number-theoretic transform (NTT) of ML-DSA.
//
// Pipeline: decoded instruction pairs -> issue_stage (operand read, hazard
// checks, scoreboard allocation) -> execute -> scoreboard -> commit into the
// register file. Execute has
//   port 0: ALU, the butterfly unit (btf.ct / btf.gs / btf.mm), LSU access
//   port 1: ALU2, LSU access
// The butterfly results are multiplexed onto the result paths of the two
// ports: b' onto the ALU path, a' onto the ALU2 path, so one butterfly
// writes two registers from a single scoreboard entry. Loads return on a
// third write-back port. Commit retires up to three register results per
// cycle, so a butterfly and a load that finish together retire together.
//
// Timing (cycles after the issue cycle t): ALU/ALU2 results reach the
// scoreboard at the end of t+1; butterfly and load results at the end of
// t+2; commit writes the register file one cycle after the last result,
// and a dependent instruction issues the cycle after that.
//
// The surrounding front end (PC generation, fetch, instruction cache,
// decode) is the processor's own and not part of this block: instructions
// arrive decoded on instr_i with a valid/ack handshake (ack in the same
// cycle; slot 0 is the older one; the offered pair advances by the number
// acknowledged). The data memory can be filled and read through ext_* while
// no load or store executes.
module cva6_ntt_cluster
  import ntt_pkg::*;
#(
  parameter int unsigned DMEM_WORDS      = 1024,
  parameter int unsigned NR_COMMIT_PORTS = 3
) (
  input  logic                          clk_i,
  input  logic                          rst_ni,
  input  instr_t                        instr_i      [2],
  input  logic                          instr_valid_i[2],
  output logic                          instr_ack_o  [2],
  // data memory access from outside
  input  logic                          ext_en_i,
  input  logic                          ext_we_i,
  input  logic [$clog2(DMEM_WORDS)-1:0] ext_addr_i,
  input  logic [31:0]                   ext_wdata_i,
  output logic [31:0]                   ext_rdata_o,
  // status
  output logic                          idle_o,
  output issue_ev_t                     issue_ev_o,
  output logic [$clog2(NR_COMMIT_PORTS+1)-1:0] commit_writes_o
);
  logic [REG_AW-1:0]  rf_raddr [4];
  logic [XLEN-1:0]    rf_rdata [4];
  rf_wr_t             rf_wr    [NR_COMMIT_PORTS];
  logic [NR_REGS-1:0] busy;
  logic [SB_IW:0]     sb_free;
  logic [SB_IW-1:0]   sb_idx   [2];
  logic               alloc    [2];
  logic [1:0]         alloc_we [2];
  logic [REG_AW-1:0]  alloc_rd0[2];
  logic [REG_AW-1:0]  alloc_rd1[2];
  ex_t                ex       [2];
  wb_t                wb       [3];
  logic               sb_empty;

  issue_stage u_issue (
    .clk_i, .rst_ni,
    .instr_i, .valid_i(instr_valid_i), .ack_o(instr_ack_o),
    .rf_raddr_o(rf_raddr), .rf_rdata_i(rf_rdata),
    .busy_i(busy), .sb_free_i(sb_free), .sb_idx_i(sb_idx),
    .alloc_o(alloc), .alloc_we_o(alloc_we), .alloc_rd0_o(alloc_rd0), .alloc_rd1_o(alloc_rd1),
    .ex_o(ex), .ev_o(issue_ev_o)
  );

  regfile #(.NR_READ(4), .NR_WRITE(NR_COMMIT_PORTS)) u_rf (
    .clk_i, .rst_ni, .raddr_i(rf_raddr), .rdata_o(rf_rdata), .wr_i(rf_wr)
  );

  scoreboard #(.NR_COMMIT_PORTS(NR_COMMIT_PORTS), .NR_WB_PORTS(3)) u_sb (
    .clk_i, .rst_ni,
    .alloc_i(alloc), .alloc_we_i(alloc_we), .alloc_rd0_i(alloc_rd0), .alloc_rd1_i(alloc_rd1),
    .alloc_idx_o(sb_idx), .free_o(sb_free), .busy_o(busy),
    .wb_i(wb), .rf_wr_o(rf_wr), .commit_writes_o, .empty_o(sb_empty)
  );

  // ------------------------------------------------------------ execute
  logic [31:0] alu0_res, alu1_res;
  alu u_alu  (.op_i(ex[0].op), .a_i(ex[0].opa), .b_i(ex[0].opb), .imm_i(ex[0].imm), .res_o(alu0_res));
  alu u_alu2 (.op_i(ex[1].op), .a_i(ex[1].opa), .b_i(ex[1].opb), .imm_i(ex[1].imm), .res_o(alu1_res));

  btf_op_e          btf_op_in;
  logic             btf_valid;
  btf_op_e          btf_op;
  logic [SB_IW-1:0] btf_idx;
  logic [31:0]      btf_lo, btf_hi;

  always_comb begin
    unique case (ex[0].op)
      OP_BTF_GS: btf_op_in = BTF_GS;
      OP_BTF_MM: btf_op_in = BTF_MM;
      default:   btf_op_in = BTF_CT;
    endcase
  end

  btf_unit u_btf (
    .clk_i, .rst_ni,
    .valid_i(ex[0].valid && is_btf(ex[0].op)), .op_i(btf_op_in), .idx_i(ex[0].idx),
    .a_i(ex[0].opc), .b_i(ex[0].opa), .z_i(ex[0].opb),
    .valid_o(btf_valid), .op_o(btf_op), .idx_o(btf_idx),
    .res_lo_o(btf_lo), .res_hi_o(btf_hi)
  );

  // memory instruction from whichever port carries it
  logic  mem_sel1;
  ex_t   mem_ex;
  always_comb begin
    mem_sel1 = !(ex[0].valid && is_mem(ex[0].op));
    mem_ex   = mem_sel1 ? ex[1] : ex[0];
  end

  lsu #(.DMEM_WORDS(DMEM_WORDS)) u_lsu (
    .clk_i, .rst_ni,
    .valid_i(mem_ex.valid && is_mem(mem_ex.op)), .we_i(mem_ex.op == OP_SW),
    .idx_i(mem_ex.idx), .base_i(mem_ex.opa), .offset_i(mem_ex.imm), .wdata_i(mem_ex.opb),
    .wb_o(wb[2]),
    .ext_en_i, .ext_we_i, .ext_addr_i, .ext_wdata_i, .ext_rdata_o
  );

  // result multiplexers in front of the scoreboard
  always_comb begin
    if (btf_valid)
      wb[0] = '{valid: 1'b1, idx: btf_idx, sel: 1'b0, data: btf_lo};            // btf.ct : btf.gs/mm
    else
      wb[0] = '{valid: ex[0].valid && is_alu(ex[0].op), idx: ex[0].idx, sel: 1'b0, data: alu0_res};
    if (btf_valid && btf_op != BTF_MM)
      wb[1] = '{valid: 1'b1, idx: btf_idx, sel: 1'b1, data: btf_hi};            // btf.ct/gs
    else
      wb[1] = '{valid: ex[1].valid && is_alu(ex[1].op), idx: ex[1].idx, sel: 1'b0, data: alu1_res};
  end

  assign idle_o = sb_empty && !ex[0].valid && !ex[1].valid && !btf_valid && !wb[2].valid;

  // no two results may claim one result path
  a_port0_free: assert property (@(posedge clk_i) disable iff (!rst_ni)
      btf_valid |-> !(ex[0].valid && is_alu(ex[0].op)))
    else $error("ALU and butterfly collide on port 0");
  a_port1_free: assert property (@(posedge clk_i) disable iff (!rst_ni)
      (btf_valid && btf_op != BTF_MM) |-> !(ex[1].valid && is_alu(ex[1].op)))
    else $error("ALU2 and butterfly collide on port 1");
  a_one_mem: assert property (@(posedge clk_i) disable iff (!rst_ni)
      !(ex[0].valid && is_mem(ex[0].op) && ex[1].valid && is_mem(ex[1].op)))
    else $error("two memory instructions in execute");
endmodule
