// tb_pc_control: directed cases for each redirect (taken branch, not-taken
// branch, JR, jump, load-use stall, BTB-steered fetch, mispredicted prediction)
// and random inputs against a reference of the priority EX redirect > stall >
// ID redirect > BTB prediction > PC+4, including the BTB update it issues.
// A second copy built for delayed branching (DELAY_SLOT = 1, no BTB) shares the
// inputs and must keep the delay slot: a jump kills nothing and a taken branch
// or JR kills only the instruction in IF.
module tb_pc_control;
  logic [31:0] pc_plus4, btb_target, pc1, npc1, jump_target1, pred_target1;
  logic [31:0] pc2, npc2, branch_target2, rs_value2, pred_target2;
  logic btb_predict_taken, valid1, j1, resolves_in_ex1, pred_taken1, stall;
  logic valid2, beq2, bne2, jr2, zero2, pred_taken2;
  logic [31:0] next_pc, upd_pc, upd_target;
  logic pc_en, if_kill, id_kill, upd_en, upd_taken, id_redirect, ex_redirect, ex_resolve, ex_taken_ok;
  int checks = 0, failures = 0;

  pc_control #(.USE_BTB(1'b1)) dut (.*);

  logic [31:0] ds_next_pc, ds_upd_pc, ds_upd_target;
  logic ds_pc_en, ds_if_kill, ds_id_kill, ds_upd_en, ds_upd_taken;
  logic ds_id_redirect, ds_ex_redirect, ds_ex_resolve, ds_ex_taken_ok;

  pc_control #(.USE_BTB(1'b0), .DELAY_SLOT(1'b1)) dut_ds (
    .pc_plus4, .btb_predict_taken, .btb_target, .valid1, .j1, .resolves_in_ex1, .pc1, .npc1,
    .jump_target1, .pred_taken1, .pred_target1, .stall, .valid2, .beq2, .bne2, .jr2, .zero2,
    .pc2, .npc2, .branch_target2, .rs_value2, .pred_taken2, .pred_target2,
    .next_pc(ds_next_pc), .pc_en(ds_pc_en), .if_kill(ds_if_kill), .id_kill(ds_id_kill),
    .upd_en(ds_upd_en), .upd_pc(ds_upd_pc), .upd_taken(ds_upd_taken), .upd_target(ds_upd_target),
    .id_redirect(ds_id_redirect), .ex_redirect(ds_ex_redirect), .ex_resolve(ds_ex_resolve),
    .ex_taken_ok(ds_ex_taken_ok)
  );

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic quiet();
    pc_plus4 = 32'h104; btb_predict_taken = 0; btb_target = 32'h900;
    valid1 = 1; j1 = 0; resolves_in_ex1 = 0; pc1 = 32'h0FC; npc1 = 32'h100;
    jump_target1 = 32'h400; pred_taken1 = 0; pred_target1 = 0; stall = 0;
    valid2 = 1; beq2 = 0; bne2 = 0; jr2 = 0; zero2 = 0; pc2 = 32'h0F8; npc2 = 32'h0FC;
    branch_target2 = 32'h200; rs_value2 = 32'h300; pred_taken2 = 0; pred_target2 = 0;
  endtask

  initial begin
    quiet(); #1;
    chk(next_pc == 32'h104 && pc_en && !if_kill && !id_kill && !upd_en, "sequential fetch");
    btb_predict_taken = 1; #1;
    chk(next_pc == 32'h900 && !if_kill, "BTB-predicted fetch");
    quiet(); beq2 = 1; zero2 = 1; #1;
    chk(next_pc == 32'h200 && if_kill && id_kill && ex_redirect, "taken beq kills two");
    chk(upd_en && upd_pc == 32'h0F8 && upd_taken && upd_target == 32'h200, "taken beq updates BTB");
    chk(ds_next_pc == 32'h200 && ds_if_kill && !ds_id_kill && ds_ex_redirect,
        "delayed taken beq keeps its slot and kills one");
    chk(!ds_upd_en, "delayed branching issues no BTB update");
    quiet(); beq2 = 1; zero2 = 0; #1;
    chk(next_pc == 32'h104 && !if_kill && !id_kill && ex_resolve && !ex_redirect, "not-taken beq costs nothing");
    quiet(); bne2 = 1; zero2 = 0; pred_taken2 = 1; pred_target2 = 32'h200; #1;
    chk(!ex_redirect && ex_taken_ok && next_pc == 32'h104, "correctly predicted taken bne");
    quiet(); bne2 = 1; zero2 = 1; pred_taken2 = 1; pred_target2 = 32'h200; #1;
    chk(ex_redirect && next_pc == 32'h0FC, "mispredicted bne recovers to fall-through");
    quiet(); jr2 = 1; #1;
    chk(ex_redirect && next_pc == 32'h300, "jr redirects to Rs");
    quiet(); j1 = 1; #1;
    chk(id_redirect && next_pc == 32'h400 && if_kill && !id_kill, "jump kills one");
    chk(ds_id_redirect && ds_next_pc == 32'h400 && !ds_if_kill && !ds_id_kill,
        "delayed jump keeps its slot");
    quiet(); jr2 = 1; #1;
    chk(ds_ex_redirect && ds_next_pc == 32'h300 && ds_if_kill && !ds_id_kill,
        "delayed jr keeps its slot");
    quiet(); stall = 1; #1;
    chk(!ds_pc_en && !ds_if_kill && !ds_id_kill, "delayed-branch copy stalls too");
    quiet(); j1 = 1; pred_taken1 = 1; pred_target1 = 32'h400; #1;
    chk(!id_redirect && !if_kill && next_pc == 32'h104, "predicted jump costs nothing");
    quiet(); j1 = 1; stall = 1; #1;
    chk(!pc_en && !if_kill && !id_redirect, "stalled jump waits");
    quiet(); stall = 1; beq2 = 1; zero2 = 1; #1;
    chk(pc_en && if_kill && id_kill && next_pc == 32'h200, "branch redirect overrules stall");
    quiet(); pred_taken1 = 1; pred_target1 = 32'h800; #1;
    chk(id_redirect && next_pc == 32'h100, "non-branch predicted taken is sent back to NPC");

    repeat (20000) begin
      logic [31:0] exp_pc;
      bit exp_en, exp_ifk, exp_idk, ex_ctl, taken, exr, idr;
      logic [31:0] tgt;
      quiet();
      btb_predict_taken = 1'($urandom); valid1 = 1'($urandom); j1 = 1'($urandom);
      resolves_in_ex1 = !j1 && 1'($urandom); pred_taken1 = 1'($urandom);
      pred_target1 = $urandom_range(1) ? jump_target1 : 32'h444; stall = ($urandom_range(3) == 0);
      valid2 = 1'($urandom); {beq2, bne2, jr2} = 3'(1 << $urandom_range(3));
      zero2 = 1'($urandom); pred_taken2 = 1'($urandom);
      pred_target2 = $urandom_range(1) ? (jr2 ? rs_value2 : branch_target2) : 32'h555;
      #1;
      ex_ctl = valid2 && (beq2 || bne2 || jr2);
      taken = jr2 || (beq2 && zero2) || (bne2 && !zero2);
      tgt = jr2 ? rs_value2 : branch_target2;
      exr = ex_ctl && (taken ? !(pred_taken2 && pred_target2 == tgt) : pred_taken2);
      idr = valid1 && !stall && !exr &&
            (j1 ? !(pred_taken1 && pred_target1 == jump_target1) : (!resolves_in_ex1 && pred_taken1));
      exp_en = 1; exp_ifk = 0; exp_idk = 0;
      if (exr) begin exp_pc = taken ? tgt : npc2; exp_ifk = 1; exp_idk = 1; end
      else if (stall) begin exp_en = 0; exp_pc = next_pc; end
      else if (idr) begin exp_pc = j1 ? jump_target1 : npc1; exp_ifk = 1; end
      else exp_pc = btb_predict_taken ? btb_target : pc_plus4;
      chk(next_pc == exp_pc && pc_en == exp_en && if_kill == exp_ifk && id_kill == exp_idk &&
          ex_redirect == exr && id_redirect == idr, "random next-PC decision");
      chk(upd_en == (ex_ctl || (valid1 && j1 && !stall)), "random BTB update enable");
      // delayed copy: same decisions from the same prediction inputs, but no BTB
      // fetch and no kill of the delay slot
      if (exr) exp_pc = taken ? tgt : npc2;
      else if (stall) exp_pc = ds_next_pc;
      else if (idr) exp_pc = j1 ? jump_target1 : npc1;
      else exp_pc = pc_plus4;
      chk(ds_next_pc == exp_pc && ds_pc_en == (exr || !stall) && ds_if_kill == exr &&
          !ds_id_kill && ds_ex_redirect == exr && ds_id_redirect == idr,
          "random delayed-branch next-PC decision");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
