// tb_workloads: the example instruction sequences of the pipeline description,
// run on three copies of the processor (predict not taken, BTB with 2-bit
// counters, BTB with 1-bit predictors) and checked against the reference model.
//
// For each sequence the number of load-use stalls and branch redirects is
// checked against the count the sequence is known to cost: the sub/add/or/and/sw
// chain on r8 runs with forwarding and no stall; lw/ori/sub takes A from MEM (2)
// and B from EX (1); a load followed by its user stalls once; the two-load chain
// stalls twice; the A = B + C; D = E - F code stalls twice as written and not at
// all once the loads are scheduled first; a taken beq costs two cycles and a
// not-taken one none under predict-not-taken; and a mix of 5% jumps and 20%
// branches of which 90% are taken runs at CPI 1.41 (fill time excluded).
module tb_workloads;
  import mips_pkg::*;
  import mips_tb_pkg::*;

  localparam int NCFG = 3;
  localparam int IMEM_WORDS = 1024;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        imem_we = 1'b0;
  logic [9:0]  imem_waddr = '0;
  logic [31:0] imem_wdata = '0;

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cyc = 0;
  bit running = 0;
  int halt_pc;

  int          e_pc[$];
  bit          e_we[$];
  int          e_rd[$];
  logic [31:0] e_data[$];
  logic [31:0] e_saddr[$];
  logic [31:0] e_sdata[$];

  int idx[NCFG], sidx[NCFG], done_cyc[NCFG];
  bit done[NCFG];
  int n_fwd_a[NCFG][4], n_fwd_b[NCFG][4];
  int n_stall[NCFG], n_idr[NCFG], n_exr[NCFG], n_tok[NCFG], n_hit[NCFG];

  always @(posedge clk) if (running) cyc <= cyc + 1;

  for (genvar g = 0; g < NCFG; g++) begin : g_cfg
    logic         rv, rwe, sv;
    logic [31:0]  rpc, rdata, saddr, sdata;
    logic [4:0]   rrd;
    pipe_events_t ev;

    mips_pipeline #(.USE_BTB(g != 0), .PRED_BITS(g == 2 ? 1 : 2)) dut (
      .clk(clk), .rst_n(rst_n),
      .imem_we(imem_we), .imem_waddr(imem_waddr), .imem_wdata(imem_wdata),
      .retire_valid(rv), .retire_pc(rpc), .retire_we(rwe), .retire_rd(rrd), .retire_data(rdata),
      .store_valid(sv), .store_addr(saddr), .store_data(sdata),
      .events(ev)
    );

    always @(negedge clk) begin
      if (running && !done[g]) begin
        n_fwd_a[g][ev.fwd_a]++;
        n_fwd_b[g][ev.fwd_b]++;
        if (ev.stall)       n_stall[g]++;
        if (ev.id_redirect) n_idr[g]++;
        if (ev.ex_redirect) n_exr[g]++;
        if (ev.ex_taken_ok) n_tok[g]++;
        if (ev.btb_hit)     n_hit[g]++;
        if (sv) begin
          checks++;
          if (sidx[g] >= e_saddr.size() || saddr != e_saddr[sidx[g]] || sdata != e_sdata[sidx[g]]) begin
            failures++;
            $display("cfg%0d: unexpected store [%h] <= %h (store #%0d)", g, saddr, sdata, sidx[g]);
          end
          sidx[g]++;
        end
        if (rv) begin
          checks++;
          if (idx[g] >= e_pc.size()) begin
            failures++;
            $display("cfg%0d: extra completion pc=%h", g, rpc);
          end else if (rpc != 32'(e_pc[idx[g]]) || rwe != e_we[idx[g]] ||
                       (rwe && (rrd != 5'(e_rd[idx[g]]) || rdata != e_data[idx[g]]))) begin
            failures++;
            $display("cfg%0d: completion #%0d pc=%h we=%0d r%0d=%h, expected pc=%h we=%0d r%0d=%h",
                     g, idx[g], rpc, rwe, rrd, rdata, e_pc[idx[g]], e_we[idx[g]],
                     e_rd[idx[g]], e_data[idx[g]]);
          end
          idx[g]++;
          if (rpc == 32'(halt_pc)) begin
            done[g] = 1'b1;
            done_cyc[g] = cyc + 1;
          end
        end
      end
    end
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // exp_cyc[g] < 0: no hand-worked count for that copy
  task automatic run_prog(prog_builder p, string name, int exp_cyc[NCFG]);
    ref_model m = new();
    m.run(p);
    e_pc = m.exp_pc; e_we = m.exp_we; e_rd = m.exp_rd; e_data = m.exp_data;
    e_saddr = m.st_addr; e_sdata = m.st_data;
    halt_pc = 4 * p.halt_word;
    // load the program while the processors are held in reset
    @(negedge clk);
    running = 0;
    rst_n = 0;
    for (int a = 0; a < IMEM_WORDS; a++) begin
      imem_we = 1;
      imem_waddr = 10'(a);
      imem_wdata = p.words.exists(a) ? p.words[a] : NOP;
      @(negedge clk);
    end
    imem_we = 0;
    @(negedge clk);
    foreach (idx[g]) begin
      idx[g] = 0; sidx[g] = 0; done[g] = 0; done_cyc[g] = 0;
    end
    cyc = 0;
    rst_n = 1;
    running = 1;
    while (!(done[0] && done[1] && done[2]) && cyc < 20000) @(negedge clk);
    running = 0;
    for (int g = 0; g < NCFG; g++) begin
      check(done[g], $sformatf("%s cfg%0d reached the halt", name, g));
      check(idx[g] == e_pc.size(), $sformatf("%s cfg%0d completed %0d of %0d", name, g, idx[g], e_pc.size()));
      check(sidx[g] == e_saddr.size(), $sformatf("%s cfg%0d stored %0d of %0d", name, g, sidx[g], e_saddr.size()));
      if (exp_cyc[g] >= 0)
        check(done_cyc[g] == exp_cyc[g], $sformatf("%s cfg%0d took %0d cycles, expected %0d",
                                                   name, g, done_cyc[g], exp_cyc[g]));
    end
    check(done_cyc[0] == m.pnt_cycles, $sformatf("%s predict-not-taken took %0d cycles, reference %0d",
                                                 name, done_cyc[0], m.pnt_cycles));
    $display("%s: %0d instructions, cycles pnt=%0d btb2=%0d btb1=%0d", name, e_pc.size(),
             done_cyc[0], done_cyc[1], done_cyc[2]);
  endtask

  int stalls_of[NCFG], exr_of[NCFG];
  int fwd_seen;

  task automatic run_counted(prog_builder p, string name, int exp_stalls, int exp_exr_pnt, int exp_cyc_pnt);
    int s0[NCFG], e0[NCFG];
    for (int g = 0; g < NCFG; g++) begin s0[g] = n_stall[g]; e0[g] = n_exr[g]; end
    run_prog(p, name, '{exp_cyc_pnt, -1, -1});
    for (int g = 0; g < NCFG; g++) begin
      check(n_stall[g] - s0[g] == exp_stalls,
            $sformatf("%s cfg%0d: %0d load-use stalls, expected %0d", name, g, n_stall[g] - s0[g], exp_stalls));
    end
    if (exp_exr_pnt >= 0)
      check(n_exr[0] - e0[0] == exp_exr_pnt,
            $sformatf("%s: %0d branch redirects, expected %0d", name, n_exr[0] - e0[0], exp_exr_pnt));
  endtask

  // sub r3,r4,r7 seen in ID with ForwardA = 2 and ForwardB = 1
  always @(negedge clk)
    if (running && g_cfg[0].dut.valid1 && g_cfg[0].dut.ir1 == enc_r(F_SUB, 3, 4, 7) &&
        g_cfg[0].ev.fwd_a == FWD_MEM && g_cfg[0].ev.fwd_b == FWD_EX)
      fwd_seen++;

  function automatic void setreg(prog_builder p, int r, int v);
    p.emit(enc_i(OP_ADDIU, r, 0, v));
  endfunction

  initial begin
    prog_builder p;
    fwd_seen = 0;

    // RAW chain on r8: r8 goes from 10 to 20, every user gets 20 by forwarding
    p = new();
    setreg(p, 8, 10); setreg(p, 9, 30); setreg(p, 13, 10); setreg(p, 15, 1); setreg(p, 18, 7);
    p.emit(enc_r(F_SUB, 8, 9, 13));
    p.emit(enc_r(F_ADD, 4, 8, 15));
    p.emit(enc_r(F_OR, 16, 13, 8));
    p.emit(enc_r(F_AND, 17, 16, 8));
    p.emit(enc_i(OP_SW, 18, 8, 16));
    p.halt();
    run_counted(p, "raw_chain", 0, 0, 11 + 4);

    // lw r4,4(r8); ori r7,r9,2; sub r3,r4,r7
    p = new();
    setreg(p, 8, 100); setreg(p, 1, 55); p.emit(enc_i(OP_SW, 1, 8, 4)); setreg(p, 9, 12);
    p.emit(enc_i(OP_LW, 4, 8, 4));
    p.emit(enc_i(OP_ORI, 7, 9, 2));
    p.emit(enc_r(F_SUB, 3, 4, 7));
    p.halt();
    run_counted(p, "forward_example", 0, 0, -1);
    check(fwd_seen > 0, "sub took ForwardA=2 (MEM) and ForwardB=1 (EX)");

    // ld r12,24(r10); add r14,r12,r15; or r16,r13,r12; and r17,r12,r13
    p = new();
    setreg(p, 10, 64); setreg(p, 1, 9); p.emit(enc_i(OP_SW, 1, 10, 24));
    setreg(p, 15, 3); setreg(p, 13, 5);
    p.emit(enc_i(OP_LW, 12, 10, 24));
    p.emit(enc_r(F_ADD, 14, 12, 15));
    p.emit(enc_r(F_OR, 16, 13, 12));
    p.emit(enc_r(F_AND, 17, 12, 13));
    p.halt();
    run_counted(p, "load_delay", 1, 0, -1);

    // ld r11,(r15); ld r12,8(r11); add r3,r12,r13; sub r4,r11,r3
    p = new();
    setreg(p, 15, 32); setreg(p, 1, 48); p.emit(enc_i(OP_SW, 1, 15, 0));
    setreg(p, 1, 77); p.emit(enc_i(OP_SW, 1, 0, 56)); setreg(p, 13, 4);
    p.emit(enc_i(OP_LW, 11, 15, 0));
    p.emit(enc_i(OP_LW, 12, 11, 8));
    p.emit(enc_r(F_ADD, 3, 12, 13));
    p.emit(enc_r(F_SUB, 4, 11, 3));
    p.halt();
    run_counted(p, "load_chain", 2, 0, -1);

    // A = B + C; D = E - F with A..F at 0,8,16,24,32,40 off r16
    for (int sched = 0; sched < 2; sched++) begin
      p = new();
      setreg(p, 16, 128);
      for (int k = 1; k < 6; k++) begin
        setreg(p, 1, 10 * k); p.emit(enc_i(OP_SW, 1, 16, 8 * k));
      end
      if (sched == 0) begin
        p.emit(enc_i(OP_LW, 10, 16, 8));
        p.emit(enc_i(OP_LW, 11, 16, 16));
        p.emit(enc_r(F_ADD, 12, 10, 11));
        p.emit(enc_i(OP_SW, 12, 16, 0));
        p.emit(enc_i(OP_LW, 13, 16, 32));
        p.emit(enc_i(OP_LW, 14, 16, 40));
        p.emit(enc_r(F_SUB, 15, 13, 14));
        p.emit(enc_i(OP_SW, 15, 16, 24));
      end else begin
        p.emit(enc_i(OP_LW, 10, 16, 8));
        p.emit(enc_i(OP_LW, 11, 16, 16));
        p.emit(enc_i(OP_LW, 13, 16, 32));
        p.emit(enc_i(OP_LW, 14, 16, 40));
        p.emit(enc_r(F_ADD, 12, 10, 11));
        p.emit(enc_i(OP_SW, 12, 16, 0));
        p.emit(enc_r(F_SUB, 15, 13, 14));
        p.emit(enc_i(OP_SW, 15, 16, 24));
      end
      p.halt();
      // 11 set-up + 8 + halt = 20 instructions
      run_counted(p, sched ? "scheduled" : "unscheduled", sched ? 0 : 2, 0, sched ? 24 : 26);
    end

    // beq r8,r9,L1 taken: Next1 and Next2 become bubbles
    p = new();
    setreg(p, 8, 5); setreg(p, 9, 5);
    p.emit(enc_i(OP_BEQ, 9, 8, 2));
    p.emit(enc_i(OP_ADDIU, 1, 0, 1));
    p.emit(enc_i(OP_ADDIU, 2, 0, 2));
    p.emit(enc_i(OP_ADDIU, 3, 0, 3));
    p.halt();
    run_counted(p, "beq_taken", 0, 1, 5 + 4 + 2);
    // same branch not taken: no cycle lost
    p = new();
    setreg(p, 8, 5); setreg(p, 9, 6);
    p.emit(enc_i(OP_BEQ, 9, 8, 2));
    p.emit(enc_i(OP_ADDIU, 1, 0, 1));
    p.emit(enc_i(OP_ADDIU, 2, 0, 2));
    p.emit(enc_i(OP_ADDIU, 3, 0, 3));
    p.halt();
    run_counted(p, "beq_not_taken", 0, 0, 7 + 4);

    // 100 instructions: 5 jumps, 18 taken and 2 not-taken branches, 75 others
    p = new();
    for (int i = 0; i < 100; i++) begin
      if (i % 20 == 10) begin
        p.emit(enc_j(OP_J, p.pc + 2)); p.emit(NOP);
      end else if (i % 5 == 2) begin
        if (i % 50 == 27) p.emit(enc_i(OP_BNE, 0, 0, 1));
        else begin p.emit(enc_i(OP_BEQ, 0, 0, 1)); p.emit(NOP); end
      end else begin
        p.emit(enc_i(OP_ADDIU, 1 + (i % 8), 0, i));
      end
    end
    p.halt();
    // 101 instructions + 4 fill + 5 x 1 + 18 x 2: CPI (146 - 4 - 1) / 100 = 1.41
    run_counted(p, "cpi_mix", 0, 18, 146);
    $display("cpi_mix: predict-not-taken CPI = %0d.%02d (excluding fill and the halt)",
             (done_cyc[0] - 5) / 100, (done_cyc[0] - 5) % 100);

    // nested loops of the 1-bit shortcoming
    p = new(); p.nested_loops(3, 4);
    run_prog(p, "nested", '{73, 63, 67});

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
