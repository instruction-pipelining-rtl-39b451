// tb_alu: checks every ALU operation against values computed here, on
// directed corner operands and random ones, including the zero flag used by
// beq/bne.
module tb_alu;
  import mips_pkg::*;
  alu_op_e     op;
  logic [31:0] a, b, y;
  logic [4:0]  sh;
  logic        zero;
  int checks = 0, failures = 0;

  alu dut (.op(op), .a(a), .b(b), .shamt(sh), .y(y), .zero(zero));

  function automatic logic [31:0] model(alu_op_e o, logic [31:0] x, logic [31:0] z, logic [4:0] s);
    case (o)
      ALU_ADD:  return x + z;
      ALU_SUB:  return x - z;
      ALU_AND:  return x & z;
      ALU_OR:   return x | z;
      ALU_XOR:  return x ^ z;
      ALU_NOR:  return ~(x | z);
      ALU_SLT:  return (int'(x) < int'(z)) ? 32'd1 : 32'd0;
      ALU_SLTU: return (x < z) ? 32'd1 : 32'd0;
      ALU_SLL:  return z << s;
      ALU_SRL:  return z >> s;
      ALU_SRA:  return z[31] ? ~((~z) >> s) : z >> s;
      default:  return z;
    endcase
  endfunction

  task automatic try(alu_op_e o, logic [31:0] x, logic [31:0] z, logic [4:0] s);
    op = o; a = x; b = z; sh = s;
    #1;
    checks++;
    if (y !== model(o, x, z, s) || zero !== (model(o, x, z, s) == 0)) begin
      failures++;
      $display("FAIL %s a=%h b=%h sh=%0d: y=%h zero=%b", o.name(), x, z, s, y, zero);
    end
  endtask

  initial begin
    logic [31:0] corner[6] = '{32'h0, 32'h1, 32'hFFFF_FFFF, 32'h8000_0000, 32'h7FFF_FFFF, 32'h1234_5678};
    for (int o = 0; o <= int'(ALU_PASSB); o++)
      foreach (corner[i]) foreach (corner[j]) try(alu_op_e'(o), corner[i], corner[j], 5'(i * 7));
    repeat (2000) try(alu_op_e'($urandom_range(int'(ALU_PASSB))), $urandom, $urandom, 5'($urandom));
    // beq-style compare
    try(ALU_SUB, 32'd42, 32'd42, 0);
    checks++; if (!zero) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
