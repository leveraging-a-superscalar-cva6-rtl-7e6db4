// mod_sub: modular subtraction r = (a - b) mod q for a, b in [0, q).
// The "-" boxes of the butterfly datapath. Subtract, and add q back when the
// difference borrows; purely combinational.
module mod_sub
  import ntt_pkg::*;
(
  input  logic [31:0] a_i,
  input  logic [31:0] b_i,
  output logic [31:0] r_o
);
  logic [32:0] d;
  always_comb begin
    d   = {1'b0, a_i} - {1'b0, b_i};
    r_o = d[32] ? (d[31:0] + Q) : d[31:0];
  end
endmodule
