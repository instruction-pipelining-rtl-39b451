// alu: the integer ALU of the EX stage.
//
// Purely combinational.  Operand A comes from the A pipeline register, operand B
// from the B register or the extended immediate (ALUSrc, chosen outside), and
// `shamt` is the instruction's sa field for the shift operations.  `zero` is the
// flag the PC control uses for beq/bne: those instructions run ALU_SUB and
// compare the difference with zero.  The operation set is the one needed by the
// MIPS integer subset the pipeline executes; add and sub wrap around (no overflow
// trap), which is a choice of this design.
module alu
  import mips_pkg::*;
(
  input  alu_op_e     op,
  input  logic [31:0] a,
  input  logic [31:0] b,
  input  logic [4:0]  shamt,
  output logic [31:0] y,
  output logic        zero
);
  always_comb begin
    unique case (op)
      ALU_ADD:   y = a + b;
      ALU_SUB:   y = a - b;
      ALU_AND:   y = a & b;
      ALU_OR:    y = a | b;
      ALU_XOR:   y = a ^ b;
      ALU_NOR:   y = ~(a | b);
      ALU_SLT:   y = {31'd0, $signed(a) < $signed(b)};
      ALU_SLTU:  y = {31'd0, a < b};
      ALU_SLL:   y = b << shamt;
      ALU_SRL:   y = b >> shamt;
      ALU_SRA:   y = $unsigned($signed(b) >>> shamt);
      ALU_PASSB: y = b;
      default:   y = a + b;
    endcase
  end

  assign zero = (y == 32'd0);
endmodule
