// pc_control: next-PC selection and wrong-path kill of the pipeline (PCSrc).
//
// Three places can redirect fetch, in this order of priority:
//   EX  A conditional branch (Beq/Bne, outcome from the ALU zero flag) or a JR/
//       JALR (target = forwarded Rs) is resolved.  If its real outcome or target
//       differs from what was predicted when it was fetched, the PC is loaded
//       with the right address (branch target, Rs, or the fall-through NPC) and
//       both younger instructions, in ID and IF, are killed: two cycles lost.
//   ID  A J/JAL is decoded and its target {NPC[31:28], address, 00} is known.  If
//       it was not predicted taken to that target, the PC is loaded with it and
//       the instruction in IF is killed: one cycle lost.  A non-control
//       instruction that was predicted taken is redirected to its NPC the same
//       way.  A stalled instruction in ID does not redirect until the stall ends.
//   IF  Without a redirect the PC advances to PC+4, or, when USE_BTB is set and
//       the BTB predicts taken, to the BTB target.
// A load-use stall (from the hazard unit) freezes the PC and the IR; it is
// overruled by an EX redirect, which kills the stalled instruction anyway.
// With USE_BTB = 0 nothing is ever predicted taken, which is the
// predict-not-taken scheme.  DELAY_SLOT = 1 (used without the BTB) gives the
// delayed-branch scheme instead: the instruction right after a jump or branch
// is its delay slot and always runs, so a jump kills nothing (0 cycles lost) and
// a taken branch or JR kills only the instruction in IF (1 cycle lost).  A jump
// or branch placed in a delay slot is not supported.  The unit also issues the
// BTB update of the jump or branch that was resolved (EX has priority over ID
// when both resolve in one cycle, and the ID update is then dropped) and reports
// the redirect events.
// Resolving jumps in ID and branches/JR in EX, and killing the fetched
// instructions, follow the pipeline description; the recovery details are this
// design's.  Combinational.
module pc_control #(
  parameter bit USE_BTB    = 1'b1,
  parameter bit DELAY_SLOT = 1'b0
) (
  // IF stage
  input  logic [31:0] pc_plus4,
  input  logic        btb_predict_taken,
  input  logic [31:0] btb_target,
  // ID stage
  input  logic        valid1,
  input  logic        j1,
  input  logic        resolves_in_ex1,  // beq, bne, jr or jalr in ID
  input  logic [31:0] pc1,
  input  logic [31:0] npc1,
  input  logic [31:0] jump_target1,
  input  logic        pred_taken1,
  input  logic [31:0] pred_target1,
  input  logic        stall,
  // EX stage
  input  logic        valid2,
  input  logic        beq2,
  input  logic        bne2,
  input  logic        jr2,
  input  logic        zero2,
  input  logic [31:0] pc2,
  input  logic [31:0] npc2,
  input  logic [31:0] branch_target2,
  input  logic [31:0] rs_value2,
  input  logic        pred_taken2,
  input  logic [31:0] pred_target2,
  // decisions
  output logic [31:0] next_pc,
  output logic        pc_en,       // load the PC (0 during a stall)
  output logic        if_kill,     // IR <= bubble
  output logic        id_kill,     // EX <= bubble because ID is on the wrong path
  // BTB update
  output logic        upd_en,
  output logic [31:0] upd_pc,
  output logic        upd_taken,
  output logic [31:0] upd_target,
  // events
  output logic        id_redirect,
  output logic        ex_redirect,
  output logic        ex_resolve,
  output logic        ex_taken_ok
);
  logic        ex_ctl, ex_taken;
  logic [31:0] ex_target;
  logic        id_wrong;

  always_comb begin
    // EX resolution
    ex_ctl    = valid2 && (beq2 || bne2 || jr2);
    ex_taken  = jr2 || (beq2 && zero2) || (bne2 && !zero2);
    ex_target = jr2 ? rs_value2 : branch_target2;
    ex_resolve  = ex_ctl;
    ex_redirect = ex_ctl && ((ex_taken != pred_taken2) ||
                             (ex_taken && pred_target2 != ex_target));
    ex_taken_ok = ex_ctl && ex_taken && !ex_redirect;

    // ID resolution
    if (j1)                   id_wrong = !(pred_taken1 && pred_target1 == jump_target1);
    else if (resolves_in_ex1) id_wrong = 1'b0;
    else                      id_wrong = pred_taken1;
    id_redirect = valid1 && id_wrong && !stall && !ex_redirect;

    // next PC
    pc_en   = 1'b1;
    if_kill = 1'b0;
    id_kill = 1'b0;
    if (ex_redirect) begin
      next_pc = ex_taken ? ex_target : npc2;
      if_kill = 1'b1;
      id_kill = !DELAY_SLOT;   // ID holds the branch's delay slot
    end else if (stall) begin
      next_pc = pc_plus4;
      pc_en   = 1'b0;
    end else if (id_redirect) begin
      next_pc = j1 ? jump_target1 : npc1;
      if_kill = !DELAY_SLOT;   // IF holds the jump's delay slot
    end else if (USE_BTB && btb_predict_taken) begin
      next_pc = btb_target;
    end else begin
      next_pc = pc_plus4;
    end

    // BTB update
    upd_en     = 1'b0;
    upd_pc     = pc2;
    upd_taken  = ex_taken;
    upd_target = ex_target;
    if (USE_BTB) begin
      if (ex_ctl) begin
        upd_en = 1'b1;
      end else if (valid1 && j1 && !stall) begin
        upd_en     = 1'b1;
        upd_pc     = pc1;
        upd_taken  = 1'b1;
        upd_target = jump_target1;
      end
    end
  end
endmodule
