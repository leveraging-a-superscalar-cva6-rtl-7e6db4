// tb_cluster_two_commit: the same end-to-end polynomial multiplication as
// tb_cva6_ntt_cluster, on a cluster built with two commit ports instead of
// three (the commit width of the unmodified dual-issue core). Results must
// still be exact; the burst of butterfly+load pairs now fills the
// scoreboard (three register writes are allocated per cycle but only two
// retire) and must take longer than the 9 cycles it takes with three
// commit ports. Cycle counts per phase are printed for comparison.
module tb_cluster_two_commit;
  import ntt_pkg::*;
  import tb_ntt_ref_pkg::*;

  localparam int N = 256;
  localparam bit EXPECT_FULL = 1'b1;   // two commit ports fall behind a butterfly+load pair per cycle

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  instr_t     ins [2];
  logic       iv  [2];
  logic       ack [2];
  logic       ext_en, ext_we;
  logic [9:0] ext_addr;
  logic [31:0] ext_wdata, ext_rdata;
  logic       idle;
  issue_ev_t  ev;
  logic [1:0] ncw;

  cva6_ntt_cluster #(.NR_COMMIT_PORTS(2)) dut (
    .clk_i(clk), .rst_ni(rst_n), .instr_i(ins), .instr_valid_i(iv), .instr_ack_o(ack),
    .ext_en_i(ext_en), .ext_we_i(ext_we), .ext_addr_i(ext_addr), .ext_wdata_i(ext_wdata),
    .ext_rdata_o(ext_rdata), .idle_o(idle), .issue_ev_o(ev), .commit_writes_o(ncw));

  int checks = 0, failures = 0;
  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  // ------------------------------------------------------------------ events
  int n_split = 0, n_pair = 0, n_dual = 0, n_haz = 0, n_port = 0, n_full = 0, n_commit3 = 0;
  int n_ct = 0, n_gs = 0, n_mm = 0;
  always @(posedge clk) if (rst_n) begin
    if (ev.btf_split)     n_split++;
    if (ev.btf_lw_pair)   n_pair++;
    if (ev.dual_issue && !ev.btf_lw_pair) n_dual++;
    if (ev.stall_hazard)  n_haz++;
    if (ev.stall_wb_port) n_port++;
    if (ev.stall_sb_full) n_full++;
    if (ncw == 2'd2)      n_commit3++;
  end

  // ------------------------------------------------------------------ program
  instr_t prog [$];

  function automatic instr_t mk(op_e op, int rdn, int rs1, int rs2, int imm = 0);
    instr_t i;
    i.op = op; i.rd = REG_AW'(rdn); i.rs1 = REG_AW'(rs1); i.rs2 = REG_AW'(rs2); i.imm = 12'(imm);
    return i;
  endfunction

  typedef enum int {J_PW, J_SCALE} jkind_e;
  typedef struct {
    jkind_e kind;
    int base_a, off_a;   // coefficient a (bytes)
    int base_b, off_b;   // coefficient b
  } job_t;

  localparam int XP = 5, XQ = 6, XZ = 7, XIZ = 8, XF = 24, XCNT = 25;

  function automatic int ra(int i); return 10 + 2 * (i % 4); endfunction
  function automatic int rb(int i); return 11 + 2 * (i % 4); endfunction

  task automatic emit_load(job_t j[$], int i);
    prog.push_back(mk(OP_LW, ra(i), j[i].base_a, 0, j[i].off_a));
    if (j[i].kind != J_SCALE) prog.push_back(mk(OP_LW, rb(i), j[i].base_b, 0, j[i].off_b));
  endtask

  task automatic emit_op(job_t j[$], int i);
    case (j[i].kind)
      J_PW:  begin prog.push_back(mk(OP_BTF_MM, ra(i), ra(i), rb(i))); n_mm++; end
      default: begin
        prog.push_back(mk(OP_BTF_MM, ra(i), ra(i), XF)); n_mm++;
      end
    endcase
  endtask

  task automatic emit_store(job_t j[$], int i);
    prog.push_back(mk(OP_SW, 0, j[i].base_a, ra(i), j[i].off_a));
  endtask

  // software-pipelined block of independent jobs: loads run two jobs ahead,
  // stores one job behind (four register sets rotate)
  task automatic emit_block(job_t j[$]);
    emit_load(j, 0);
    if (j.size() > 1) emit_load(j, 1);
    for (int i = 0; i < j.size(); i++) begin
      emit_op(j, i);
      if (i + 2 < j.size()) emit_load(j, i + 2);
      if (j[i].kind == J_SCALE) prog.push_back(mk(OP_ADDI, XCNT, XCNT, 0, 1));   // loop counter
      if (i >= 1) emit_store(j, i - 1);
    end
    emit_store(j, j.size() - 1);
  endtask

  // Register-blocked transform: 16 coefficients live in x10..x25 while four
  // layers run on them; twiddles rotate through zregs. The forward transform
  // works on coefficients b + 16m in its first pass (layers with distance
  // 128..16) and on 16b + m in its second (distance 8..1); the inverse runs
  // the same passes in the opposite order. Between blocks of a pass, the
  // store of a register is followed directly by the load of its next
  // coefficient.
  int zregs [11] = '{26, 27, 28, 29, 30, 31, 1, 2, 3, 4, 9};
  int zrot;

  function automatic int fwd_k(int idx, int len);   // forward twiddle index
    return 128 / len + idx / (2 * len);
  endfunction
  function automatic int inv_k(int idx, int len);   // inverse twiddle index
    return 2 * (128 / len) - 1 - idx / (2 * len);
  endfunction

  task automatic gen_transform(int base, bit inverse);
    int lens [2][4];
    int blk_idx [16];
    int prev_idx [16];
    bit have_prev;
    if (!inverse) lens = '{'{128, 64, 32, 16}, '{8, 4, 2, 1}};
    else          lens = '{'{1, 2, 4, 8}, '{16, 32, 64, 128}};
    for (int pass = 0; pass < 2; pass++) begin
      have_prev = 0;
      for (int b = 0; b < 16; b++) begin
        bit strided;
        strided = (pass == 0) != inverse;
        for (int m = 0; m < 16; m++) blk_idx[m] = strided ? b + 16 * m : 16 * b + m;
        for (int m = 0; m < 16; m++) begin
          if (have_prev) prog.push_back(mk(OP_SW, 0, base, 10 + m, 4 * prev_idx[m]));
          prog.push_back(mk(OP_LW, 10 + m, base, 0, 4 * blk_idx[m]));
        end
        for (int l = 0; l < 4; l++) begin
          int len, lastk, zr;
          len = lens[pass][l];
          lastk = -1; zr = 0;
          for (int m = 0; m < 16; m++) begin
            if ((blk_idx[m] & len) == 0) begin
              int mp, k;
              mp = 0;
              for (int t = 0; t < 16; t++) if (blk_idx[t] == blk_idx[m] + len) mp = t;
              k = inverse ? inv_k(blk_idx[m], len) : fwd_k(blk_idx[m], len);
              if (k != lastk) begin
                zr = zregs[zrot % 11]; zrot++;
                prog.push_back(mk(OP_LW, zr, inverse ? XIZ : XZ, 0, 4 * k));
                lastk = k;
              end
              prog.push_back(mk(inverse ? OP_BTF_GS : OP_BTF_CT, 10 + m, 10 + mp, zr));
              if (inverse) n_gs++; else n_ct++;
            end
          end
        end
        prev_idx = blk_idx;
        have_prev = 1;
      end
      for (int m = 0; m < 16; m++) prog.push_back(mk(OP_SW, 0, base, 10 + m, 4 * prev_idx[m]));
    end
  endtask

  task automatic gen_pointwise();
    job_t jl [$];
    for (int jj = 0; jj < N; jj++) begin
      job_t x;
      x.kind = J_PW; x.base_a = XP; x.off_a = 4 * jj; x.base_b = XQ; x.off_b = 4 * jj;
      jl.push_back(x);
    end
    emit_block(jl);
  endtask

  task automatic gen_scale();
    job_t jl [$];
    prog.push_back(mk(OP_LW, XF, XZ, 0, 0));
    prog.push_back(mk(OP_ADDI, XCNT, 0, 0, 0));
    for (int jj = 0; jj < N; jj++) begin
      job_t x;
      x.kind = J_SCALE; x.base_a = XP; x.off_a = 4 * jj; x.base_b = 0; x.off_b = 0;
      jl.push_back(x);
    end
    emit_block(jl);
    prog.push_back(mk(OP_SW, 0, XZ, XCNT, 0));   // counter -> twiddle word 0
  endtask

  // run the program in prog through the two-wide instruction port
  task automatic run(string name, int mem_ops, output int cycles);
    int ptr = 0;
    cycles = 0;
    while (ptr < prog.size()) begin
      @(negedge clk);
      ins[0] = prog[ptr]; iv[0] = 1;
      if (ptr + 1 < prog.size()) begin ins[1] = prog[ptr + 1]; iv[1] = 1; end
      else begin ins[1] = '0; iv[1] = 0; end
      #1;
      ptr += int'(ack[0]) + int'(ack[0] && ack[1]);
      cycles++;
    end
    @(negedge clk); iv[0] = 0; iv[1] = 0;
    while (!idle) begin @(negedge clk); cycles++; end
    $display("%-10s %6d instructions %6d cycles (memory instructions %0d)", name, prog.size(), cycles, mem_ops);
    prog.delete();
  endtask

  function automatic int count_mem();
    int n = 0;
    foreach (prog[i]) if (is_mem(prog[i].op)) n++;
    return n;
  endfunction

  // ------------------------------------------------------------ memory access
  task automatic mem_write(int addr, logic [31:0] d);
    @(negedge clk); ext_en = 1; ext_we = 1; ext_addr = 10'(addr); ext_wdata = d;
    @(negedge clk); ext_en = 0; ext_we = 0;
  endtask
  task automatic mem_read(int addr, output logic [31:0] d);
    @(negedge clk); ext_en = 1; ext_we = 0; ext_addr = 10'(addr);
    @(negedge clk); ext_en = 0; d = ext_rdata;
  endtask

  // ------------------------------------------------------------ references
  longint unsigned zplain [N];
  longint unsigned p [N], q [N], phat [N], qhat [N], prod [N];

  function automatic int brv8(int x);
    int r = 0;
    for (int b = 0; b < 8; b++) if (x[b]) r |= 1 << (7 - b);
    return r;
  endfunction

  task automatic ref_ntt(inout longint unsigned a [N]);
    int k = 0;
    for (int len = 128; len >= 1; len >>= 1)
      for (int start = 0; start < N; start += 2 * len) begin
        longint unsigned z;
        k++; z = zplain[k];
        for (int jj = start; jj < start + len; jj++) begin
          longint unsigned t;
          t = mulmod(z, a[jj + len]);
          a[jj + len] = (a[jj] + QL - t) % QL;
          a[jj] = (a[jj] + t) % QL;
        end
      end
  endtask

  // ------------------------------------------------------------------ test
  initial begin
    repeat (400000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int c_burst, c_ntt, c_ntt2, c_pw, c_intt, c_scale, c_setup, mops;
    logic [31:0] d;
    longint unsigned f;
    iv[0] = 0; iv[1] = 0; ins[0] = '0; ins[1] = '0;
    ext_en = 0; ext_we = 0; ext_addr = 0; ext_wdata = 0;
    zrot = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    for (int k = 0; k < N; k++) zplain[k] = powmod(1753, brv8(k));
    // f = 256^-1 * 2^64 mod q: undoes the 2^-32 of the pointwise product and
    // of its own Montgomery product
    f = mulmod(mulmod(powmod(N, QL - 2), to_mont(1)), to_mont(1));
    for (int i = 0; i < N; i++) begin
      p[i] = rand_q(); q[i] = rand_q();
      mem_write(i, 32'(p[i])); mem_write(N + i, 32'(q[i]));
      mem_write(2 * N + i, i == 0 ? 32'(f) : 32'(to_mont(zplain[i])));
      mem_write(3 * N + i, 32'(to_mont((QL - zplain[i]) % QL)));
    end

    // base registers: two independent ALU ops pair, the ADD waits for both
    prog.push_back(mk(OP_ADDI, XP, 0, 0, 0));
    prog.push_back(mk(OP_ADDI, XQ, 0, 0, 1024));
    prog.push_back(mk(OP_ADDI, XZ, 0, 0, 2047));
    prog.push_back(mk(OP_ADDI, XZ, XZ, 0, 1));
    prog.push_back(mk(OP_ADD, XIZ, XZ, XQ));
    run("setup", 0, c_setup);

    // burst of independent butterfly + load pairs: two scoreboard entries
    // per cycle that each live four cycles, so the scoreboard fills
    begin
      int pr [6][2] = '{'{10, 11}, '{13, 14}, '{15, 16}, '{17, 18}, '{19, 20}, '{21, 22}};
      for (int i = 0; i < 6; i++) begin
        prog.push_back(mk(OP_BTF_CT, pr[i][0], pr[i][1], 12));
        prog.push_back(mk(OP_LW, 26 + (i % 6), XP, 0, 4 * i));
      end
      run("burst", 6, c_burst);
    end

    gen_transform(XP, 0); mops = count_mem(); run("NTT(P)", mops, c_ntt);
    chk(c_ntt >= mops, "NTT cycles at least the memory-port bound");
    gen_transform(XQ, 0); mops = count_mem(); run("NTT(Q)", mops, c_ntt2);
    chk(c_ntt2 == c_ntt, "both NTTs take the same number of cycles");

    for (int i = 0; i < N; i++) begin phat[i] = p[i]; qhat[i] = q[i]; end
    ref_ntt(phat); ref_ntt(qhat);
    for (int i = 0; i < N; i++) begin
      mem_read(i, d);     chk(64'(d) == phat[i], $sformatf("NTT(P)[%0d] %0d exp %0d", i, d, phat[i]));
      mem_read(N + i, d); chk(64'(d) == qhat[i], $sformatf("NTT(Q)[%0d] %0d exp %0d", i, d, qhat[i]));
    end

    gen_pointwise(); mops = count_mem(); run("pointwise", mops, c_pw);
    chk(c_pw >= mops && c_pw <= 807, "pointwise cycles between the memory-port bound and the reference figure");
    gen_transform(XP, 1); mops = count_mem(); run("NTT^-1", mops, c_intt);
    chk(c_intt >= mops, "NTT^-1 cycles at least the memory-port bound");
    gen_scale(); mops = count_mem(); run("scale", mops, c_scale);

    // schoolbook negacyclic product
    for (int i = 0; i < N; i++) prod[i] = 0;
    for (int i = 0; i < N; i++)
      for (int jj = 0; jj < N; jj++) begin
        longint unsigned t;
        t = mulmod(p[i], q[jj]);
        if (i + jj < N) prod[i + jj] = (prod[i + jj] + t) % QL;
        else            prod[i + jj - N] = (prod[i + jj - N] + QL - t) % QL;
      end
    for (int i = 0; i < N; i++) begin
      mem_read(i, d); chk(64'(d) == prod[i], $sformatf("P*Q[%0d] %0d exp %0d", i, d, prod[i]));
    end
    mem_read(2 * N, d); chk(d == 32'(N), $sformatf("loop counter %0d", d));

    $display("events: btf split=%0d btf+lw pair=%0d other dual issue=%0d hazard stall=%0d port stall=%0d sb full=%0d triple commit=%0d",
             n_split, n_pair, n_dual, n_haz, n_port, n_full, n_commit3);
    $display("butterflies: ct=%0d gs=%0d mm=%0d", n_ct, n_gs, n_mm);
    chk(n_split > 0, "butterfly issued over both ports");
    chk(n_pair > 0, "butterfly paired with a load");
    chk(n_dual > 0, "dual issue of ALU/ALU2");
    chk(n_haz > 0, "hazard stall");
    chk(n_port > 0, "result-port stall");
    if (EXPECT_FULL) chk(n_full > 0, "scoreboard full");
    chk(n_commit3 > 0, "two-write commit");
    chk(c_burst > 9, "burst slower than with three commit ports");
    chk(n_ct == 2048 && n_gs == 1024 && n_mm == 512, "butterfly mix");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
