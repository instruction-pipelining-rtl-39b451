// tb_imm_ext: all 65536 immediates in each of the three extension modes.
module tb_imm_ext;
  import mips_pkg::*;
  ext_op_e op;
  logic [15:0] imm16;
  logic [31:0] imm32, exp;
  int checks = 0, failures = 0;
  imm_ext dut (.op, .imm16, .imm32);
  initial begin
    for (int m = 0; m < 3; m++) begin
      for (int v = 0; v < 65536; v++) begin
        op = ext_op_e'(m); imm16 = 16'(v);
        #1;
        case (m)
          0: exp = 32'(signed'(16'(v)));
          1: exp = 32'(v);
          default: exp = 32'(v) * 65536;
        endcase
        checks++;
        if (imm32 !== exp) begin failures++; if (failures < 10) $display("FAIL mode %0d imm %h: %h", m, v, imm32); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #10000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
