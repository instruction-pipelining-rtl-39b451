// tb_control_unit: decodes each supported instruction and compares the whole
// control word with a table written out here; unsupported encodings must give
// the bubble.
module tb_control_unit;
  import mips_pkg::*;
  logic [5:0] op, funct;
  ctrl_t ctrl;
  int checks = 0, failures = 0;
  control_unit dut (.op, .funct, .ctrl);

  // dst alu_src alu_op ext mem_read mem_write sel_result reg_write j jr beq bne
  function automatic ctrl_t c(reg_dst_e d, bit s, alu_op_e a, ext_op_e e, bit mr, bit mw,
                              sel_result_e r, bit w, bit j, bit jr, bit be, bit bn);
    ctrl_t x;
    x.reg_dst = d; x.alu_src = s; x.alu_op = a; x.ext_op = e; x.mem_read = mr; x.mem_write = mw;
    x.sel_result = r; x.reg_write = w; x.j = j; x.jr = jr; x.beq = be; x.bne = bn;
    return x;
  endfunction

  task automatic t(logic [5:0] o, logic [5:0] f, ctrl_t exp, string name);
    op = o; funct = f; #1;
    checks++;
    if (ctrl !== exp) begin failures++; $display("FAIL %s: %p expected %p", name, ctrl, exp); end
  endtask

  initial begin
    t(OP_RTYPE, F_ADD,  c(DST_RD, 0, ALU_ADD,  EXT_SIGN, 0, 0, RES_ALU, 1, 0, 0, 0, 0), "add");
    t(OP_RTYPE, F_ADDU, c(DST_RD, 0, ALU_ADD,  EXT_SIGN, 0, 0, RES_ALU, 1, 0, 0, 0, 0), "addu");
    t(OP_RTYPE, F_SUB,  c(DST_RD, 0, ALU_SUB,  EXT_SIGN, 0, 0, RES_ALU, 1, 0, 0, 0, 0), "sub");
    t(OP_RTYPE, F_SUBU, c(DST_RD, 0, ALU_SUB,  EXT_SIGN, 0, 0, RES_ALU, 1, 0, 0, 0, 0), "subu");
    t(OP_RTYPE, F_AND,  c(DST_RD, 0, ALU_AND,  EXT_SIGN, 0, 0, RES_ALU, 1, 0, 0, 0, 0), "and");
    t(OP_RTYPE, F_OR,   c(DST_RD, 0, ALU_OR,   EXT_SIGN, 0, 0, RES_ALU, 1, 0, 0, 0, 0), "or");
    t(OP_RTYPE, F_XOR,  c(DST_RD, 0, ALU_XOR,  EXT_SIGN, 0, 0, RES_ALU, 1, 0, 0, 0, 0), "xor");
    t(OP_RTYPE, F_NOR,  c(DST_RD, 0, ALU_NOR,  EXT_SIGN, 0, 0, RES_ALU, 1, 0, 0, 0, 0), "nor");
    t(OP_RTYPE, F_SLT,  c(DST_RD, 0, ALU_SLT,  EXT_SIGN, 0, 0, RES_ALU, 1, 0, 0, 0, 0), "slt");
    t(OP_RTYPE, F_SLTU, c(DST_RD, 0, ALU_SLTU, EXT_SIGN, 0, 0, RES_ALU, 1, 0, 0, 0, 0), "sltu");
    t(OP_RTYPE, F_SLL,  c(DST_RD, 0, ALU_SLL,  EXT_SIGN, 0, 0, RES_ALU, 1, 0, 0, 0, 0), "sll");
    t(OP_RTYPE, F_SRL,  c(DST_RD, 0, ALU_SRL,  EXT_SIGN, 0, 0, RES_ALU, 1, 0, 0, 0, 0), "srl");
    t(OP_RTYPE, F_SRA,  c(DST_RD, 0, ALU_SRA,  EXT_SIGN, 0, 0, RES_ALU, 1, 0, 0, 0, 0), "sra");
    t(OP_RTYPE, F_JR,   c(DST_RD, 0, ALU_ADD,  EXT_SIGN, 0, 0, RES_ALU, 0, 0, 1, 0, 0), "jr");
    t(OP_RTYPE, F_JALR, c(DST_RD, 0, ALU_ADD,  EXT_SIGN, 0, 0, RES_RA,  1, 0, 1, 0, 0), "jalr");
    t(OP_J,     6'h15,  c(DST_RT, 0, ALU_ADD,  EXT_SIGN, 0, 0, RES_MEM, 0, 1, 0, 0, 0), "j");
    t(OP_JAL,   6'h00,  c(DST_R31,0, ALU_ADD,  EXT_SIGN, 0, 0, RES_RA,  1, 1, 0, 0, 0), "jal");
    t(OP_BEQ,   6'h00,  c(DST_RT, 0, ALU_SUB,  EXT_SIGN, 0, 0, RES_MEM, 0, 0, 0, 1, 0), "beq");
    t(OP_BNE,   6'h3F,  c(DST_RT, 0, ALU_SUB,  EXT_SIGN, 0, 0, RES_MEM, 0, 0, 0, 0, 1), "bne");
    t(OP_ADDI,  6'h00,  c(DST_RT, 1, ALU_ADD,  EXT_SIGN, 0, 0, RES_ALU, 1, 0, 0, 0, 0), "addi");
    t(OP_ADDIU, 6'h00,  c(DST_RT, 1, ALU_ADD,  EXT_SIGN, 0, 0, RES_ALU, 1, 0, 0, 0, 0), "addiu");
    t(OP_SLTI,  6'h00,  c(DST_RT, 1, ALU_SLT,  EXT_SIGN, 0, 0, RES_ALU, 1, 0, 0, 0, 0), "slti");
    t(OP_SLTIU, 6'h00,  c(DST_RT, 1, ALU_SLTU, EXT_SIGN, 0, 0, RES_ALU, 1, 0, 0, 0, 0), "sltiu");
    t(OP_ANDI,  6'h00,  c(DST_RT, 1, ALU_AND,  EXT_ZERO, 0, 0, RES_ALU, 1, 0, 0, 0, 0), "andi");
    t(OP_ORI,   6'h00,  c(DST_RT, 1, ALU_OR,   EXT_ZERO, 0, 0, RES_ALU, 1, 0, 0, 0, 0), "ori");
    t(OP_XORI,  6'h00,  c(DST_RT, 1, ALU_XOR,  EXT_ZERO, 0, 0, RES_ALU, 1, 0, 0, 0, 0), "xori");
    t(OP_LUI,   6'h00,  c(DST_RT, 1, ALU_PASSB,EXT_LUI,  0, 0, RES_ALU, 1, 0, 0, 0, 0), "lui");
    t(OP_LW,    6'h00,  c(DST_RT, 1, ALU_ADD,  EXT_SIGN, 1, 0, RES_MEM, 1, 0, 0, 0, 0), "lw");
    t(OP_SW,    6'h00,  c(DST_RT, 1, ALU_ADD,  EXT_SIGN, 0, 1, RES_MEM, 0, 0, 0, 0, 0), "sw");
    t(6'h3F,    6'h00,  CTRL_BUBBLE, "unknown opcode");
    t(OP_RTYPE, 6'h3F,  CTRL_BUBBLE, "unknown funct");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
