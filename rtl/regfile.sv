// regfile: integer register file with NR_READ combinational read ports and
// NR_WRITE write ports.
//
// Two issue ports each read two operands (rs1, rs2), giving four read ports;
// a butterfly in issue slot 0 borrows the second read port of slot 1 for its
// third operand. Three write ports let commit retire three register results
// per cycle ("triple commit": a butterfly's two results plus a load). x0
// reads as zero and ignores writes. Writes take effect at the clock edge; a
// read in the same cycle returns the old value (no write-through), which the
// issue logic never relies on because a register being written is still
// marked busy. Port counts follow the dual-issue, triple-commit structure;
// the lack of bypass is this design's choice. Write ports never target the
// same register in one cycle (commit guarantees it); the highest port wins.
module regfile
  import ntt_pkg::*;
#(
  parameter int unsigned NR_READ  = 4,
  parameter int unsigned NR_WRITE = 3
) (
  input  logic                    clk_i,
  input  logic                    rst_ni,
  input  logic [REG_AW-1:0]       raddr_i [NR_READ],
  output logic [XLEN-1:0]         rdata_o [NR_READ],
  input  rf_wr_t                  wr_i    [NR_WRITE]
);
  logic [XLEN-1:0] regs [NR_REGS];

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      for (int r = 0; r < NR_REGS; r++) regs[r] <= '0;
    end else begin
      for (int w = 0; w < NR_WRITE; w++)
        if (wr_i[w].we && wr_i[w].addr != '0) regs[wr_i[w].addr] <= wr_i[w].data;
    end
  end

  always_comb begin
    for (int p = 0; p < NR_READ; p++)
      rdata_o[p] = (raddr_i[p] == '0) ? '0 : regs[raddr_i[p]];
  end
endmodule
