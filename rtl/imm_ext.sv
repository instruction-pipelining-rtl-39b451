// imm_ext: the Ext block of the ID stage.
//
// Widens the 16-bit immediate of an I-format instruction to 32 bits.  Sign
// extension serves arithmetic, loads, stores and branches; zero extension serves
// andi/ori/xori; the LUI mode places the immediate in the upper half.  Which mode
// an opcode uses is decided by the control unit; the modes are the usual MIPS
// semantics.  Combinational.
module imm_ext
  import mips_pkg::*;
(
  input  ext_op_e     op,
  input  logic [15:0] imm16,
  output logic [31:0] imm32
);
  always_comb begin
    unique case (op)
      EXT_ZERO: imm32 = {16'd0, imm16};
      EXT_LUI:  imm32 = {imm16, 16'd0};
      default:  imm32 = {{16{imm16[15]}}, imm16};
    endcase
  end
endmodule
