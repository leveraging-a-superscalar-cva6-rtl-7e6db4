// tb_mont_reduce: checks the Montgomery reduction against t*2^-32 mod q
// computed with plain modular arithmetic, for products x*z of canonical
// operands (random and extreme values) and for random inputs over the whole
// legal range t < q * 2^32.
module tb_mont_reduce;
  import tb_ntt_ref_pkg::*;
  logic [63:0] t;
  logic [31:0] r;
  int checks = 0, failures = 0;
  longint unsigned ri;

  mont_reduce dut (.t_i(t), .r_o(r));

  task automatic check(logic [31:0] x, logic [31:0] z);
    check_t(64'(x) * 64'(z));
  endtask

  // any t < q * 2^32 is a legal input
  task automatic check_t(logic [63:0] tv);
    longint unsigned exp;
    t = tv;
    #1;
    exp = mulmod(t % QL, ri);
    checks++;
    if (64'(r) != exp) begin
      failures++;
      if (failures < 10) $display("FAIL t=%0d got %0d exp %0d", t, r, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ri = rinv();
    check(0, 0); check(1, 1); check(32'd8380416, 32'd8380416);
    check(32'd8380416, 1); check(1, 32'd8380416); check(32'd4193792, 32'd2365951);
    for (int i = 0; i < 5000; i++) check(rand_q(), rand_q());
    // full input range: the final subtraction of q is needed about half the time
    for (int i = 0; i < 3000; i++) check_t({9'd0, 23'($urandom_range(32'd8380416, 0)), $urandom});
    check_t(64'd8380416 * 64'h1_0000_0000 + 64'hFFFF_FFFF);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
