// btf_unit: the butterfly functional unit added beside ALU and ALU2.
//
// Operations (all mod q, operands canonical in [0, q)):
//   BTF_CT  Cooley-Tukey:    a' = a + z.b   b' = a - z.b
//   BTF_GS  Gentleman-Sande: a' = a + b     b' = (a - b).z
//   BTF_MM  pointwise Montgomery product:   b' = b.z
// where "x.z" is the Montgomery product x*z*2^-32 mod q, so twiddles are
// supplied in Montgomery form (z*2^32 mod q).
//
// Structure, following the datapath drawing of the unit: a modular
// subtractor (a - b) and a multiplexer choose the multiplier input (b for
// ct/mm, a - b for gs); the multiplier result is registered (one pipeline
// register between MUL and Reduction); in the second cycle the Montgomery
// reduction feeds a modular subtractor (a - r, ct) and a modular adder whose
// second input is r (ct) or b (gs). res_lo_o (b') is the value that is
// multiplexed onto the ALU result path, res_hi_o (a') onto the ALU2 path.
//
// Timing: fully pipelined, one operation accepted per cycle, results valid
// exactly one clock after the operands (latency 1 register). The tag idx
// travels with the operation. Reset value of the stage register is this
// design's choice.
module btf_unit
  import ntt_pkg::*;
(
  input  logic             clk_i,
  input  logic             rst_ni,
  input  logic             valid_i,
  input  btf_op_e          op_i,
  input  logic [SB_IW-1:0] idx_i,
  input  logic [31:0]      a_i,
  input  logic [31:0]      b_i,
  input  logic [31:0]      z_i,
  output logic             valid_o,
  output btf_op_e          op_o,
  output logic [SB_IW-1:0] idx_o,
  output logic [31:0]      res_lo_o,   // b' (ALU side)
  output logic [31:0]      res_hi_o    // a' (ALU2 side)
);
  logic [31:0] a_minus_b;
  logic [31:0] mul_in;
  logic [63:0] prod;

  mod_sub u_pre_sub (.a_i(a_i), .b_i(b_i), .r_o(a_minus_b));

  always_comb begin
    mul_in = (op_i == BTF_GS) ? a_minus_b : b_i;
    prod   = 64'(mul_in) * 64'(z_i);
  end

  // MUL -> Reduction pipeline register
  logic             s_valid;
  btf_op_e          s_op;
  logic [SB_IW-1:0] s_idx;
  logic [63:0]      s_prod;
  logic [31:0]      s_a, s_b;

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      s_valid <= 1'b0;
      s_op    <= BTF_CT;
      s_idx   <= '0;
      s_prod  <= '0;
      s_a     <= '0;
      s_b     <= '0;
    end else begin
      s_valid <= valid_i;
      if (valid_i) begin
        s_op   <= op_i;
        s_idx  <= idx_i;
        s_prod <= prod;
        s_a    <= a_i;
        s_b    <= b_i;
      end
    end
  end

  logic [31:0] red;
  logic [31:0] diff;
  logic [31:0] add_in;
  logic [31:0] sum;

  mont_reduce u_red  (.t_i(s_prod), .r_o(red));
  mod_sub     u_sub  (.a_i(s_a), .b_i(red), .r_o(diff));
  assign add_in = (s_op == BTF_CT) ? red : s_b;
  mod_add     u_add  (.a_i(s_a), .b_i(add_in), .r_o(sum));

  always_comb begin
    valid_o  = s_valid;
    op_o     = s_op;
    idx_o    = s_idx;
    res_lo_o = (s_op == BTF_CT) ? diff : red;   // btf.ct : btf.gs/mm
    res_hi_o = sum;                             // btf.ct/gs
  end
endmodule
