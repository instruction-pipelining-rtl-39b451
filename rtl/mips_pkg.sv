// mips_pkg: types and constants shared by the five-stage MIPS pipeline.
//
// Holds the MIPS-I opcode and function-field encodings of the integer subset the
// pipeline executes, the ALU operation codes, the bundle of control signals that
// travels down the pipeline registers, and the record of hazard events that the
// top level reports.  The instruction fields (opcode 31:26, rs 25:21, rt 20:16,
// rd 15:11, sa 10:6, funct 5:0, imm 15:0, address 25:0) follow the R/I/J formats
// of the MIPS architecture.  The numeric encodings are the standard MIPS-I values;
// the control-signal names (RegDst, ALUSrc, ALUOp, MemRead, MemWrite,
// SelectResult, RegWrite, J, JR, Beq, Bne) and the mux input numbering follow the
// pipeline's own datapath description.  A bubble is a control word of all zeros.
package mips_pkg;

  // Primary opcodes (bits 31:26)
  localparam logic [5:0] OP_RTYPE = 6'h00;
  localparam logic [5:0] OP_J     = 6'h02;
  localparam logic [5:0] OP_JAL   = 6'h03;
  localparam logic [5:0] OP_BEQ   = 6'h04;
  localparam logic [5:0] OP_BNE   = 6'h05;
  localparam logic [5:0] OP_ADDI  = 6'h08;
  localparam logic [5:0] OP_ADDIU = 6'h09;
  localparam logic [5:0] OP_SLTI  = 6'h0A;
  localparam logic [5:0] OP_SLTIU = 6'h0B;
  localparam logic [5:0] OP_ANDI  = 6'h0C;
  localparam logic [5:0] OP_ORI   = 6'h0D;
  localparam logic [5:0] OP_XORI  = 6'h0E;
  localparam logic [5:0] OP_LUI   = 6'h0F;
  localparam logic [5:0] OP_LW    = 6'h23;
  localparam logic [5:0] OP_SW    = 6'h2B;

  // Function field of R-type instructions (bits 5:0)
  localparam logic [5:0] F_SLL  = 6'h00;
  localparam logic [5:0] F_SRL  = 6'h02;
  localparam logic [5:0] F_SRA  = 6'h03;
  localparam logic [5:0] F_JR   = 6'h08;
  localparam logic [5:0] F_JALR = 6'h09;
  localparam logic [5:0] F_ADD  = 6'h20;
  localparam logic [5:0] F_ADDU = 6'h21;
  localparam logic [5:0] F_SUB  = 6'h22;
  localparam logic [5:0] F_SUBU = 6'h23;
  localparam logic [5:0] F_AND  = 6'h24;
  localparam logic [5:0] F_OR   = 6'h25;
  localparam logic [5:0] F_XOR  = 6'h26;
  localparam logic [5:0] F_NOR  = 6'h27;
  localparam logic [5:0] F_SLT  = 6'h2A;
  localparam logic [5:0] F_SLTU = 6'h2B;

  // The no-op: sll r0, r0, 0
  localparam logic [31:0] NOP = 32'h0000_0000;

  typedef enum logic [3:0] {
    ALU_ADD, ALU_SUB, ALU_AND, ALU_OR, ALU_XOR, ALU_NOR,
    ALU_SLT, ALU_SLTU, ALU_SLL, ALU_SRL, ALU_SRA, ALU_PASSB
  } alu_op_e;

  // Ext block: how the 16-bit immediate becomes 32 bits
  typedef enum logic [1:0] { EXT_SIGN, EXT_ZERO, EXT_LUI } ext_op_e;

  // RegDst mux: 0 = Rt, 1 = Rd, 2 = R31
  typedef enum logic [1:0] { DST_RT = 2'd0, DST_RD = 2'd1, DST_R31 = 2'd2 } reg_dst_e;

  // SelectResult mux in MEM: 0 = Data_out, 1 = ALU result, 2 = return address
  typedef enum logic [1:0] { RES_MEM = 2'd0, RES_ALU = 2'd1, RES_RA = 2'd2 } sel_result_e;

  // ForwardA / ForwardB: 0 = register file, 1 = ALU (EX), 2 = MEM, 3 = WB
  typedef enum logic [1:0] { FWD_RF = 2'd0, FWD_EX = 2'd1, FWD_MEM = 2'd2, FWD_WB = 2'd3 } fwd_e;

  typedef struct packed {
    reg_dst_e    reg_dst;
    logic        alu_src;     // 0 = B register, 1 = extended immediate
    alu_op_e     alu_op;
    ext_op_e     ext_op;
    logic        mem_read;
    logic        mem_write;
    sel_result_e sel_result;
    logic        reg_write;
    logic        j;           // J / JAL: target known in ID
    logic        jr;          // JR / JALR: target is Rs, resolved in EX
    logic        beq;
    logic        bne;
  } ctrl_t;

  localparam ctrl_t CTRL_BUBBLE = '0;

  // Hazard events of one clock cycle, reported by the top level
  typedef struct packed {
    fwd_e fwd_a;          // forwarding selected for the A operand in ID
    fwd_e fwd_b;          // forwarding selected for the B operand in ID
    logic stall;          // load-use stall: PC and IR frozen, bubble into EX
    logic id_redirect;    // jump (or mispredicted non-branch) redirected from ID, one slot killed
    logic ex_redirect;    // branch/JR outcome differed from prediction, two slots killed
    logic ex_resolve;     // a conditional branch or JR was resolved in EX
    logic ex_taken_ok;    // a taken branch/JR was correctly predicted (no cycle lost)
    logic btb_hit;        // the fetch PC was found in the branch target buffer
  } pipe_events_t;

endpackage
