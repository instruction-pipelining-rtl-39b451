// tb_hazard_unit: random register numbers (drawn from a few registers so that
// matches are frequent) against the forwarding priority EX > MEM > WB > file,
// the r0 exception and the load-use stall rule.  Includes the lw/ori/sub case
// where A comes from MEM (2) and B from EX (1).
module tb_hazard_unit;
  import mips_pkg::*;
  logic [4:0] rs, rt, rd2, rd3, rd4;
  logic reg_wr2, mem_read2, reg_wr3, reg_wr4, stall;
  fwd_e fwd_a, fwd_b;
  int checks = 0, failures = 0;

  hazard_unit dut (.*);

  function automatic fwd_e ref_fwd(logic [4:0] r);
    if (r == 0) return FWD_RF;
    if (reg_wr2 && rd2 == r) return FWD_EX;
    if (reg_wr3 && rd3 == r) return FWD_MEM;
    if (reg_wr4 && rd4 == r) return FWD_WB;
    return FWD_RF;
  endfunction

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    int seen[4];
    // sub r3,r4,r7 in ID, ori r7,r9,2 in EX, lw r4,4(r8) in MEM
    rs = 4; rt = 7; rd2 = 7; reg_wr2 = 1; mem_read2 = 0; rd3 = 4; reg_wr3 = 1; rd4 = 0; reg_wr4 = 0;
    #1;
    chk(fwd_a == FWD_MEM && fwd_b == FWD_EX && !stall, "worked example: ForwardA=2, ForwardB=1");
    // load in EX feeding the instruction in ID
    mem_read2 = 1; #1;
    chk(stall, "load-use stall");
    repeat (20000) begin
      rs = 5'($urandom_range(3)); rt = 5'($urandom_range(3));
      rd2 = 5'($urandom_range(3)); rd3 = 5'($urandom_range(3)); rd4 = 5'($urandom_range(3));
      reg_wr2 = 1'($urandom); reg_wr3 = 1'($urandom); reg_wr4 = 1'($urandom);
      mem_read2 = reg_wr2 & 1'($urandom);
      #1;
      chk(fwd_a == ref_fwd(rs), "ForwardA");
      chk(fwd_b == ref_fwd(rt), "ForwardB");
      chk(stall == (mem_read2 && (ref_fwd(rs) == FWD_EX || ref_fwd(rt) == FWD_EX)), "stall");
      seen[fwd_a]++;
    end
    foreach (seen[i]) chk(seen[i] > 0, "every forwarding choice seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
