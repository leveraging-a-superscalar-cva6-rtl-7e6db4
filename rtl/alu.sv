// alu: integer ALU of one issue port (ALU on port 0, ALU2 on port 1).
//
// Only the integer operations the NTT kernels need are implemented: add,
// subtract and add-immediate (address arithmetic). The processor's full ALU
// is pre-existing and outside this design. Purely combinational; the
// immediate is the 12-bit I-type field, sign-extended.
module alu
  import ntt_pkg::*;
(
  input  op_e          op_i,
  input  logic [31:0]  a_i,
  input  logic [31:0]  b_i,
  input  logic [11:0]  imm_i,
  output logic [31:0]  res_o
);
  always_comb begin
    unique case (op_i)
      OP_ADD:  res_o = a_i + b_i;
      OP_SUB:  res_o = a_i - b_i;
      OP_ADDI: res_o = a_i + {{20{imm_i[11]}}, imm_i};
      default: res_o = '0;
    endcase
  end
endmodule
