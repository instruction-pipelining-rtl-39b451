// mips_pipeline: five-stage pipelined MIPS integer processor (top level).
//
// Stages: IF fetches from the instruction memory into the IR; ID decodes,
// reads the register file and selects each operand through a 4-input forwarding
// mux before it enters the A/B registers; EX runs the ALU and resolves branches
// and JR; MEM accesses the data memory and picks the result (Data_out, ALU
// result or return address); WB writes the register file.  Control signals are
// decoded once in ID and travel with the instruction in the pipeline registers.
//
// Hazards
//   data     ForwardA/B (hazard_unit) bring a result from EX (1), MEM (2) or WB
//            (3) into the operand of the instruction in ID, so no cycle is lost,
//            except after a load: an instruction that needs the loaded value
//            right after it is held in ID for one cycle (PC and IR frozen, bubble
//            into EX) and then takes the value from MEM.
//   control  J/JAL redirect fetch from ID (one instruction killed); Beq/Bne/JR/
//            JALR are resolved in EX (two instructions killed when the fetch went
//            the wrong way).  With USE_BTB = 0 the pipeline predicts every branch
//            not taken; with USE_BTB = 1 a branch target buffer with PRED_BITS
//            prediction bits per entry steers fetch from IF, and only
//            mispredictions cost cycles.
//   structural  none: separate instruction and data memories, and every
//            register write happens in WB.
// By default there are no branch delay slots: the instruction after a taken
// branch or jump is never executed, and JAL/JALR save PC+4 in r31/Rd.  With
// DELAY_SLOT = 1 the pipeline runs delayed-branch code instead (the BTB is then
// left out): the instruction after every jump or branch always executes, a jump
// costs no cycle and a taken branch or JR one, and JAL/JALR save PC+8.
//
// Interface: active-low synchronous reset `rst_n`; while it is low the program is
// written through `imem_we/imem_waddr/imem_wdata`.  Execution starts at address 0
// on the first cycle after reset.  Each cycle the WB stage reports the instruction
// it completes (`retire_*`, with its register write), the MEM stage reports
// stores (`store_*`), and `events` reports the forwarding, stall and redirect
// decisions of that cycle.  An instruction is completed 4 cycles after it was
// fetched; n instructions without hazards take n + 4 cycles.
//
// The stage split, forwarding sources and equations, load stall, where jumps and
// branches are resolved, RegDst/SelectResult numbering and the BTB follow the
// pipeline description, and so does the one-slot delayed branch as an option.
// The instruction subset, forwarding a JAL/JALR return address from EX, the
// memory sizes and the BTB size are choices of this design.
module mips_pipeline
  import mips_pkg::*;
#(
  parameter int unsigned IMEM_WORDS  = 1024,
  parameter int unsigned DMEM_WORDS  = 1024,
  parameter bit          USE_BTB     = 1'b1,
  parameter int unsigned BTB_ENTRIES = 16,
  parameter int unsigned PRED_BITS   = 2,
  parameter bit          DELAY_SLOT  = 1'b0
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // program load
  input  logic                          imem_we,
  input  logic [$clog2(IMEM_WORDS)-1:0] imem_waddr,
  input  logic [31:0]                   imem_wdata,
  // completion (WB stage)
  output logic                          retire_valid,
  output logic [31:0]                   retire_pc,
  output logic                          retire_we,
  output logic [4:0]                    retire_rd,
  output logic [31:0]                   retire_data,
  // stores (MEM stage)
  output logic                          store_valid,
  output logic [31:0]                   store_addr,
  output logic [31:0]                   store_data,
  // hazard events of this cycle
  output pipe_events_t                  events
);
  // ---------------------------------------------------------------- IF
  logic [31:0] pc_q, pc_plus4, instr_if, next_pc;
  logic        pc_en, if_kill, id_kill;
  logic        btb_hit, btb_pred, btb_upd_en, btb_upd_taken;
  logic [31:0] btb_target, btb_upd_pc, btb_upd_target;

  assign pc_plus4 = pc_q + 32'd4;

  imem #(.WORDS(IMEM_WORDS)) u_imem (
    .clk(clk), .pc(pc_q), .instr(instr_if),
    .we(imem_we), .waddr(imem_waddr), .wdata(imem_wdata)
  );

  // delayed branching replaces prediction: no BTB when DELAY_SLOT is set
  localparam bit HAS_BTB = USE_BTB && !DELAY_SLOT;

  if (HAS_BTB) begin : g_btb
    btb #(.ENTRIES(BTB_ENTRIES), .PRED_BITS(PRED_BITS)) u_btb (
      .clk(clk), .rst_n(rst_n), .pc(pc_q),
      .hit(btb_hit), .predict_taken(btb_pred), .target(btb_target),
      .upd_en(btb_upd_en), .upd_pc(btb_upd_pc),
      .upd_taken(btb_upd_taken), .upd_target(btb_upd_target)
    );
  end else begin : g_no_btb
    assign btb_hit    = 1'b0;
    assign btb_pred   = 1'b0;
    assign btb_target = pc_plus4;
  end

  always_ff @(posedge clk) begin
    if (!rst_n)     pc_q <= 32'd0;
    else if (pc_en) pc_q <= next_pc;
  end

  // IF/ID register
  logic [31:0] ir1, pc1, npc1, pred_target1;
  logic        valid1, pred_taken1;
  logic        stall;

  always_ff @(posedge clk) begin
    if (!rst_n || if_kill) begin
      ir1          <= NOP;
      valid1       <= 1'b0;
      pred_taken1  <= 1'b0;
      pc1          <= 32'd0;
      npc1         <= 32'd0;
      pred_target1 <= 32'd0;
    end else if (!stall) begin
      ir1          <= instr_if;
      valid1       <= 1'b1;
      pc1          <= pc_q;
      npc1         <= pc_plus4;
      pred_taken1  <= btb_pred;
      pred_target1 <= btb_target;
    end
  end

  // ---------------------------------------------------------------- ID
  logic [4:0]  rs1, rt1, rd1, dst1;
  logic [31:0] bus_a, bus_b, imm1, jump_target1, opa1, opb1;
  ctrl_t       dec1, ctrl1;
  fwd_e        fwd_a, fwd_b;

  assign rs1 = ir1[25:21];
  assign rt1 = ir1[20:16];
  assign rd1 = ir1[15:11];
  assign jump_target1 = {npc1[31:28], ir1[25:0], 2'b00};

  control_unit u_ctrl (.op(ir1[31:26]), .funct(ir1[5:0]), .ctrl(dec1));
  assign ctrl1 = valid1 ? dec1 : CTRL_BUBBLE;

  imm_ext u_ext (.op(ctrl1.ext_op), .imm16(ir1[15:0]), .imm32(imm1));

  // EX/MEM/WB-side signals needed in ID
  ctrl_t       ctrl2, ctrl3;
  logic [4:0]  rd2, rd3, rd4;
  logic        reg_wr4;
  logic [31:0] fwd_ex_val, mem_result, result4;

  regfile u_rf (
    .clk(clk), .rst_n(rst_n),
    .ra(rs1), .rb(rt1), .bus_a(bus_a), .bus_b(bus_b),
    .we(reg_wr4), .rw(rd4), .bus_w(result4)
  );

  hazard_unit u_hazard (
    .rs(rs1), .rt(rt1),
    .rd2(rd2), .reg_wr2(ctrl2.reg_write), .mem_read2(ctrl2.mem_read),
    .rd3(rd3), .reg_wr3(ctrl3.reg_write),
    .rd4(rd4), .reg_wr4(reg_wr4),
    .fwd_a(fwd_a), .fwd_b(fwd_b), .stall(stall)
  );

  function automatic logic [31:0] fwd_mux(input fwd_e sel, input logic [31:0] rf,
                                          input logic [31:0] ex, input logic [31:0] mem,
                                          input logic [31:0] wb);
    unique case (sel)
      FWD_EX:  return ex;
      FWD_MEM: return mem;
      FWD_WB:  return wb;
      default: return rf;
    endcase
  endfunction

  assign opa1 = fwd_mux(fwd_a, bus_a, fwd_ex_val, mem_result, result4);
  assign opb1 = fwd_mux(fwd_b, bus_b, fwd_ex_val, mem_result, result4);

  always_comb begin
    unique case (ctrl1.reg_dst)
      DST_RD:  dst1 = rd1;
      DST_R31: dst1 = 5'd31;
      default: dst1 = rt1;
    endcase
  end

  // ID/EX register
  logic [31:0] a2, b2, imm2, pc2, npc2, pred_target2;
  logic [4:0]  shamt2;
  logic        valid2, pred_taken2;

  always_ff @(posedge clk) begin
    if (!rst_n || id_kill || stall) begin
      ctrl2        <= CTRL_BUBBLE;
      valid2       <= 1'b0;
      rd2          <= 5'd0;
      pred_taken2  <= 1'b0;
      a2           <= 32'd0;
      b2           <= 32'd0;
      imm2         <= 32'd0;
      shamt2       <= 5'd0;
      pc2          <= 32'd0;
      npc2         <= 32'd0;
      pred_target2 <= 32'd0;
    end else begin
      ctrl2        <= ctrl1;
      valid2       <= valid1;
      rd2          <= dst1;
      pred_taken2  <= pred_taken1;
      a2           <= opa1;
      b2           <= opb1;
      imm2         <= imm1;
      shamt2       <= ir1[10:6];
      pc2          <= pc1;
      npc2         <= npc1;
      pred_target2 <= pred_target1;
    end
  end

  // ---------------------------------------------------------------- EX
  logic [31:0] alu_b, alu_y, branch_target2, link2;
  logic        zero2;

  assign alu_b = ctrl2.alu_src ? imm2 : b2;
  alu u_alu (.op(ctrl2.alu_op), .a(a2), .b(alu_b), .shamt(shamt2), .y(alu_y), .zero(zero2));

  assign branch_target2 = npc2 + {imm2[29:0], 2'b00};
  // return address of JAL/JALR: PC+4, or PC+8 past the delay slot
  assign link2          = DELAY_SLOT ? npc2 + 32'd4 : npc2;
  assign fwd_ex_val     = (ctrl2.sel_result == RES_RA) ? link2 : alu_y;

  logic id_redirect, ex_redirect, ex_resolve, ex_taken_ok;

  pc_control #(.USE_BTB(HAS_BTB), .DELAY_SLOT(DELAY_SLOT)) u_pcc (
    .pc_plus4(pc_plus4), .btb_predict_taken(btb_pred), .btb_target(btb_target),
    .valid1(valid1), .j1(ctrl1.j), .resolves_in_ex1(ctrl1.beq || ctrl1.bne || ctrl1.jr),
    .pc1(pc1), .npc1(npc1), .jump_target1(jump_target1),
    .pred_taken1(pred_taken1), .pred_target1(pred_target1), .stall(stall),
    .valid2(valid2), .beq2(ctrl2.beq), .bne2(ctrl2.bne), .jr2(ctrl2.jr), .zero2(zero2),
    .pc2(pc2), .npc2(npc2), .branch_target2(branch_target2), .rs_value2(a2),
    .pred_taken2(pred_taken2), .pred_target2(pred_target2),
    .next_pc(next_pc), .pc_en(pc_en), .if_kill(if_kill), .id_kill(id_kill),
    .upd_en(btb_upd_en), .upd_pc(btb_upd_pc), .upd_taken(btb_upd_taken),
    .upd_target(btb_upd_target),
    .id_redirect(id_redirect), .ex_redirect(ex_redirect),
    .ex_resolve(ex_resolve), .ex_taken_ok(ex_taken_ok)
  );

  // EX/MEM register
  logic [31:0] y3, d3, link3, pc3;
  logic        valid3;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ctrl3  <= CTRL_BUBBLE;
      valid3 <= 1'b0;
      rd3    <= 5'd0;
      y3     <= 32'd0;
      d3     <= 32'd0;
      link3  <= 32'd0;
      pc3    <= 32'd0;
    end else begin
      ctrl3  <= ctrl2;
      valid3 <= valid2;
      rd3    <= rd2;
      y3     <= alu_y;
      d3     <= b2;
      link3  <= link2;
      pc3    <= pc2;
    end
  end

  // ---------------------------------------------------------------- MEM
  logic [31:0] data_out;

  dmem #(.WORDS(DMEM_WORDS)) u_dmem (
    .clk(clk), .addr(y3), .we(ctrl3.mem_write), .data_in(d3), .data_out(data_out)
  );

  always_comb begin
    unique case (ctrl3.sel_result)
      RES_ALU: mem_result = y3;
      RES_RA:  mem_result = link3;
      default: mem_result = data_out;
    endcase
  end

  // MEM/WB register
  logic [31:0] pc4;
  logic        valid4;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      valid4  <= 1'b0;
      reg_wr4 <= 1'b0;
      rd4     <= 5'd0;
      result4 <= 32'd0;
      pc4     <= 32'd0;
    end else begin
      valid4  <= valid3;
      reg_wr4 <= ctrl3.reg_write;
      rd4     <= rd3;
      result4 <= mem_result;
      pc4     <= pc3;
    end
  end

  // ---------------------------------------------------------------- WB / outputs
  assign retire_valid = valid4;
  assign retire_pc    = pc4;
  assign retire_we    = reg_wr4 && rd4 != 5'd0;
  assign retire_rd    = rd4;
  assign retire_data  = result4;

  assign store_valid = ctrl3.mem_write;
  assign store_addr  = y3;
  assign store_data  = d3;

  always_comb begin
    events             = '0;
    events.fwd_a       = valid1 ? fwd_a : FWD_RF;
    events.fwd_b       = valid1 ? fwd_b : FWD_RF;
    events.stall       = stall && !ex_redirect;
    events.id_redirect = id_redirect;
    events.ex_redirect = ex_redirect;
    events.ex_resolve  = ex_resolve;
    events.ex_taken_ok = ex_taken_ok;
    events.btb_hit     = btb_hit;
  end

  // A bubble carries no control and no valid instruction.
  always_ff @(posedge clk) begin
    if (rst_n) begin
      assert (valid2 || ctrl2 == CTRL_BUBBLE)
        else $error("bubble in EX carries control signals");
      assert (!(id_redirect && stall))
        else $error("jump redirected while stalled");
    end
  end
endmodule
