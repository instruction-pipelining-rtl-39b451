// control_unit: main and ALU control of the ID stage.
//
// Decodes the opcode and function field of the instruction in the IR into the
// control word `ctrl_t` that is then carried down the pipeline registers: RegDst
// (Rt / Rd / R31) and J are used in ID, ALUSrc, ALUOp, JR, Beq and Bne in EX,
// MemRead, MemWrite and SelectResult in MEM, and RegWrite in WB.  Unknown
// encodings decode to the bubble (all zeros), so they do nothing.  Supported:
// add/addu/sub/subu/and/or/xor/nor/slt/sltu/sll/srl/sra/jr/jalr, addi/addiu/
// slti/sltiu/andi/ori/xori/lui, lw/sw, beq/bne, j/jal.  The split of the signals
// over the stages follows the pipeline description; the instruction subset and
// its encodings are standard MIPS-I and a choice of this design.  Combinational.
module control_unit
  import mips_pkg::*;
(
  input  logic [5:0] op,
  input  logic [5:0] funct,
  output ctrl_t      ctrl
);
  always_comb begin
    ctrl = CTRL_BUBBLE;
    unique case (op)
      OP_RTYPE: begin
        ctrl.reg_dst    = DST_RD;
        ctrl.sel_result = RES_ALU;
        ctrl.reg_write  = 1'b1;
        unique case (funct)
          F_ADD, F_ADDU: ctrl.alu_op = ALU_ADD;
          F_SUB, F_SUBU: ctrl.alu_op = ALU_SUB;
          F_AND:         ctrl.alu_op = ALU_AND;
          F_OR:          ctrl.alu_op = ALU_OR;
          F_XOR:         ctrl.alu_op = ALU_XOR;
          F_NOR:         ctrl.alu_op = ALU_NOR;
          F_SLT:         ctrl.alu_op = ALU_SLT;
          F_SLTU:        ctrl.alu_op = ALU_SLTU;
          F_SLL:         ctrl.alu_op = ALU_SLL;
          F_SRL:         ctrl.alu_op = ALU_SRL;
          F_SRA:         ctrl.alu_op = ALU_SRA;
          F_JR: begin
            ctrl.jr        = 1'b1;
            ctrl.reg_write = 1'b0;
          end
          F_JALR: begin
            ctrl.jr         = 1'b1;
            ctrl.sel_result = RES_RA;
          end
          default: ctrl = CTRL_BUBBLE;
        endcase
      end
      OP_J: ctrl.j = 1'b1;
      OP_JAL: begin
        ctrl.j          = 1'b1;
        ctrl.reg_dst    = DST_R31;
        ctrl.sel_result = RES_RA;
        ctrl.reg_write  = 1'b1;
      end
      OP_BEQ: begin ctrl.beq = 1'b1; ctrl.alu_op = ALU_SUB; end
      OP_BNE: begin ctrl.bne = 1'b1; ctrl.alu_op = ALU_SUB; end
      OP_ADDI, OP_ADDIU, OP_SLTI, OP_SLTIU, OP_ANDI, OP_ORI, OP_XORI, OP_LUI: begin
        ctrl.reg_dst    = DST_RT;
        ctrl.alu_src    = 1'b1;
        ctrl.sel_result = RES_ALU;
        ctrl.reg_write  = 1'b1;
        unique case (op)
          OP_SLTI:  ctrl.alu_op = ALU_SLT;
          OP_SLTIU: ctrl.alu_op = ALU_SLTU;
          OP_ANDI:  begin ctrl.alu_op = ALU_AND;   ctrl.ext_op = EXT_ZERO; end
          OP_ORI:   begin ctrl.alu_op = ALU_OR;    ctrl.ext_op = EXT_ZERO; end
          OP_XORI:  begin ctrl.alu_op = ALU_XOR;   ctrl.ext_op = EXT_ZERO; end
          OP_LUI:   begin ctrl.alu_op = ALU_PASSB; ctrl.ext_op = EXT_LUI;  end
          default:  ctrl.alu_op = ALU_ADD;
        endcase
      end
      OP_LW: begin
        ctrl.reg_dst    = DST_RT;
        ctrl.alu_src    = 1'b1;
        ctrl.alu_op     = ALU_ADD;
        ctrl.mem_read   = 1'b1;
        ctrl.sel_result = RES_MEM;
        ctrl.reg_write  = 1'b1;
      end
      OP_SW: begin
        ctrl.alu_src   = 1'b1;
        ctrl.alu_op    = ALU_ADD;
        ctrl.mem_write = 1'b1;
      end
      default: ctrl = CTRL_BUBBLE;
    endcase
  end
endmodule
