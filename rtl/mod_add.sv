// mod_add: modular addition r = (a + b) mod q for a, b in [0, q).
// The "+" box of the butterfly datapath. One adder, one compare-subtract;
// purely combinational. Keeping operands canonical is this design's choice.
module mod_add
  import ntt_pkg::*;
(
  input  logic [31:0] a_i,
  input  logic [31:0] b_i,
  output logic [31:0] r_o
);
  logic [32:0] s;
  logic [32:0] d;
  always_comb begin
    s   = {1'b0, a_i} + {1'b0, b_i};
    d   = s - {1'b0, Q};
    r_o = d[32] ? s[31:0] : d[31:0];
  end
endmodule
