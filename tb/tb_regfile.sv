// tb_regfile: random traffic on 3 write and 4 read ports against an array
// model; x0 must stay zero, writes must appear the cycle after.
module tb_regfile;
  import ntt_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [REG_AW-1:0] ra [4];
  logic [31:0]       rd [4];
  rf_wr_t            wr [3];
  logic [31:0]       model [32];
  int checks = 0, failures = 0;

  regfile dut (.clk_i(clk), .rst_ni(rst_n), .raddr_i(ra), .rdata_o(rd), .wr_i(wr));

  initial begin
    repeat (50000) @(posedge clk); failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int r = 0; r < 32; r++) model[r] = 0;
    for (int w = 0; w < 3; w++) wr[w] = '0;
    for (int p = 0; p < 4; p++) ra[p] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      // check reads of the current state
      for (int p = 0; p < 4; p++) ra[p] = REG_AW'($urandom);
      #1;
      for (int p = 0; p < 4; p++) begin
        checks++;
        if (rd[p] !== model[ra[p]]) begin failures++; if (failures < 10) $display("FAIL r%0d %h %h", ra[p], rd[p], model[ra[p]]); end
      end
      // three writes to distinct registers
      wr[0].addr = REG_AW'($urandom);
      wr[1].addr = wr[0].addr + 5'd1 + REG_AW'($urandom_range(9, 0));
      wr[2].addr = wr[1].addr + 5'd1 + REG_AW'($urandom_range(9, 0));
      for (int w = 0; w < 3; w++) begin
        wr[w].we = 1'($urandom);
        wr[w].data = $urandom;
      end
      @(posedge clk);
      for (int w = 0; w < 3; w++) if (wr[w].we && wr[w].addr != 0) model[wr[w].addr] = wr[w].data;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
