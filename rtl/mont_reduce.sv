// mont_reduce: Montgomery reduction, the "Reduction" box that follows the
// multiplier in the butterfly datapath.
//
// Given t < q*2^32 it returns t * 2^-32 mod q in [0, q):
//   m = (t mod 2^32) * QPRIME mod 2^32      (QPRIME = -q^-1 mod 2^32)
//   u = (t + m*q) / 2^32                    (exact division, u < 2q)
//   r = u >= q ? u - q : u
// Purely combinational: two multipliers, an adder and a final subtraction.
// R = 2^32 and q = 8380417 (ML-DSA) are this design's reading of a 32-bit
// processor running ML-DSA; the reduction algorithm itself is the textbook one.
module mont_reduce
  import ntt_pkg::*;
(
  input  logic [63:0] t_i,
  output logic [31:0] r_o
);
  logic [31:0] m;
  logic [63:0] mq;
  logic [64:0] sum;
  logic [32:0] u;
  logic [32:0] u_q;

  always_comb begin
    m   = 32'(t_i[31:0] * QPRIME);
    mq  = 64'(m) * 64'(Q);
    sum = {1'b0, t_i} + {1'b0, mq};
    u   = sum[64:32];
    u_q = u - {1'b0, Q};
    r_o = u_q[32] ? u[31:0] : u_q[31:0];
  end
endmodule
