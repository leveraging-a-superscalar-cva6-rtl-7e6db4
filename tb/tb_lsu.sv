// tb_lsu: random stores and loads (base + signed offset) one per cycle,
// mixed with external accesses in idle cycles, against a word-array model.
// Each load result must appear exactly one cycle after the access, with
// its tag.
module tb_lsu;
  import ntt_pkg::*;
  localparam int W = 1024;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic valid, we; logic [SB_IW-1:0] idx; logic [31:0] base, wdata; logic [11:0] off;
  wb_t wb;
  logic ext_en, ext_we; logic [9:0] ext_addr; logic [31:0] ext_wdata, ext_rdata;
  logic [31:0] model [W];
  int checks = 0, failures = 0;

  lsu dut (.clk_i(clk), .rst_ni(rst_n), .valid_i(valid), .we_i(we), .idx_i(idx),
    .base_i(base), .offset_i(off), .wdata_i(wdata), .wb_o(wb),
    .ext_en_i(ext_en), .ext_we_i(ext_we), .ext_addr_i(ext_addr), .ext_wdata_i(ext_wdata),
    .ext_rdata_o(ext_rdata));

  initial begin
    repeat (50000) @(posedge clk); failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    bit pend_ld, pend_ext; logic [31:0] exp; logic [SB_IW-1:0] exp_idx;
    valid = 0; we = 0; idx = 0; base = 0; off = 0; wdata = 0;
    ext_en = 0; ext_we = 0; ext_addr = 0; ext_wdata = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // fill through the external port
    for (int a = 0; a < W; a++) begin
      @(negedge clk); ext_en = 1; ext_we = 1; ext_addr = 10'(a); ext_wdata = $urandom; model[a] = ext_wdata;
    end
    pend_ld = 0; pend_ext = 0; exp = 0; exp_idx = 0;
    for (int i = 0; i < 4000; i++) begin
      int word, kind;
      @(negedge clk);
      // results of the previous cycle's access
      checks++;
      if (wb.valid != pend_ld) begin failures++; $display("FAIL load valid timing"); end
      if (pend_ld && (wb.data !== exp || wb.idx !== exp_idx)) begin
        failures++; if (failures < 10) $display("FAIL load %h exp %h", wb.data, exp);
      end
      if (pend_ext) begin
        checks++;
        if (ext_rdata !== exp) begin failures++; if (failures < 10) $display("FAIL ext %h exp %h", ext_rdata, exp); end
      end
      pend_ld = 0; pend_ext = 0;
      kind = $urandom_range(3, 0);
      word = $urandom_range(W - 1, 0);
      valid = 0; ext_en = 0;
      if (kind == 3) begin
        ext_en = 1; ext_we = 0; ext_addr = 10'(word);
        exp = model[word]; pend_ext = 1;
      end else if (kind != 2) begin
        // base + offset with a signed offset in [-64, 63] words
        int o;
        o = $urandom_range(127, 0) - 64;
        valid = 1; we = (kind == 1); idx = SB_IW'($urandom);
        off = 12'(o * 4);
        base = 32'(word * 4 - o * 4);
        wdata = $urandom;
        if (we) model[word] = wdata;
        else begin exp = model[word]; exp_idx = idx; pend_ld = 1; end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
