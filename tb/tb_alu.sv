// tb_alu: random add, subtract and add-immediate (with negative immediates)
// against the same operations written out in the testbench.
module tb_alu;
  import ntt_pkg::*;
  op_e op; logic [31:0] a, b, r; logic [11:0] imm;
  int checks = 0, failures = 0;
  alu dut (.op_i(op), .a_i(a), .b_i(b), .imm_i(imm), .res_o(r));
  initial begin
    #100000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int i = 0; i < 3000; i++) begin
      logic [31:0] exp;
      int sel;
      a = $urandom; b = $urandom; imm = 12'($urandom);
      sel = $urandom_range(2, 0);
      op = (sel == 0) ? OP_ADD : (sel == 1) ? OP_SUB : OP_ADDI;
      #1;
      case (sel)
        0: exp = a + b;
        1: exp = a - b;
        default: exp = 32'(signed'(a) + 32'(signed'(imm)));
      endcase
      checks++;
      if (r !== exp) begin failures++; if (failures < 10) $display("FAIL op=%0d a=%h b=%h imm=%h r=%h exp=%h", sel, a, b, imm, r, exp); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
