// tb_btf_unit: drives one butterfly operation per cycle (random mix of
// btf.ct, btf.gs, btf.mm, with idle gaps) and checks each result against
//   ct: a' = a + mont(b,z), b' = a - mont(b,z)
//   gs: a' = a + b,         b' = mont(a - b, z)
//   mm: b' = mont(b, z)
// computed with plain modular arithmetic. Checks that every result appears
// exactly one clock after its operands (latency 1, throughput 1 per cycle)
// and that the tag follows the operation.
module tb_btf_unit;
  import ntt_pkg::*;
  import tb_ntt_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic            valid_i;
  btf_op_e         op_i;
  logic [SB_IW-1:0] idx_i;
  logic [31:0]     a_i, b_i, z_i;
  logic            valid_o;
  btf_op_e         op_o;
  logic [SB_IW-1:0] idx_o;
  logic [31:0]     lo, hi;

  btf_unit dut (.clk_i(clk), .rst_ni(rst_n), .valid_i, .op_i, .idx_i, .a_i, .b_i, .z_i,
                .valid_o, .op_o, .idx_o, .res_lo_o(lo), .res_hi_o(hi));

  int checks = 0, failures = 0;
  int cycle = 0;
  int n_ct = 0, n_gs = 0, n_mm = 0;

  typedef struct { int issue_cycle; btf_op_e op; logic [SB_IW-1:0] idx; longint unsigned lo, hi; } exp_t;
  exp_t expq [$];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) cycle <= cycle + 1;

  // checker: sample outputs just before each edge
  always @(negedge clk) begin
    if (rst_n && valid_o) begin
      exp_t e;
      checks++;
      if (expq.size() == 0) begin
        failures++; $display("FAIL unexpected output");
      end else begin
        e = expq.pop_front();
        if (cycle != e.issue_cycle + 1 || op_o != e.op || idx_o != e.idx
            || 64'(lo) != e.lo || (e.op != BTF_MM && 64'(hi) != e.hi)) begin
          failures++;
          if (failures < 10)
            $display("FAIL op=%0d lo=%0d/%0d hi=%0d/%0d lat=%0d", e.op, lo, e.lo, hi, e.hi, cycle - e.issue_cycle);
        end
      end
    end
  end

  initial begin
    valid_i = 0; op_i = BTF_CT; idx_i = 0; a_i = 0; b_i = 0; z_i = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      if (($urandom % 8) == 0 && i > 0) begin
        valid_i = 0;
      end else begin
        exp_t e;
        longint unsigned t;
        valid_i = 1;
        op_i  = btf_op_e'($urandom_range(2, 0));
        idx_i = SB_IW'($urandom);
        a_i = rand_q(); b_i = rand_q(); z_i = rand_q();
        if (i < 4) begin a_i = 32'd8380416; b_i = (i % 2) ? 0 : 32'd8380416; end
        e.issue_cycle = cycle; e.op = op_i; e.idx = idx_i;
        case (op_i)
          BTF_CT: begin t = mont(b_i, z_i); e.hi = (a_i + t) % QL; e.lo = (a_i + QL - t) % QL; n_ct++; end
          BTF_GS: begin e.hi = (a_i + b_i) % QL; e.lo = mont((a_i + QL - b_i) % QL, z_i); n_gs++; end
          default: begin e.lo = mont(b_i, z_i); e.hi = 0; n_mm++; end
        endcase
        expq.push_back(e);
      end
    end
    @(negedge clk); valid_i = 0;
    repeat (4) @(posedge clk);
    checks++;
    if (expq.size() != 0) begin failures++; $display("FAIL %0d results missing", expq.size()); end
    checks++;
    if (n_ct == 0 || n_gs == 0 || n_mm == 0) failures++;
    $display("ct=%0d gs=%0d mm=%0d", n_ct, n_gs, n_mm);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
