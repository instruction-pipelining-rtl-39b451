// tb_mips_pipeline: end-to-end test of the five-stage pipeline.
//
// Three copies of the processor run the same programs side by side: predict-
// not-taken (no BTB), BTB with 2-bit counters, and BTB with 1-bit predictors.
// Each program is also executed by the reference model in mips_tb_pkg, and every
// copy must complete exactly the reference's instructions, in order, with the
// same register writes, and make the same stores.  Cycle counts are checked
// exactly: for the predict-not-taken copy against the reference's count
// (n + 4, plus 1 per jump, 2 per taken branch or JR, 1 per load-use), and for the
// directed loop programs against hand-worked counts for all three copies,
// which shows the BTB removing the taken-branch penalty and the 1-bit scheme
// mispredicting a nested inner loop twice per pass.  Every hazard mechanism
// (each forwarding source for both operands, load-use stall, ID redirect, EX
// redirect, correctly predicted taken branch, BTB hit) must occur at least once
// in each copy that has it.
module tb_mips_pipeline;
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

  initial begin
    prog_builder p;
    void'($urandom(7));
    // n instructions complete in n + 4 cycles
    p = new(); p.straight(10);
    run_prog(p, "straight", '{15, 15, 15});
    // single loop of 10 passes: 9 taken branches
    p = new(); p.nested_loops(1, 10);
    run_prog(p, "loop", '{57, 43, 43});
    // 3 x 4 nested loops
    p = new(); p.nested_loops(3, 4);
    run_prog(p, "nested", '{73, 63, 67});
    for (int t = 0; t < 12; t++) begin
      p = new();
      p.random_program(45);
      check(p.pc < 600, "program fits below the subroutine area");
      run_prog(p, $sformatf("random%0d", t), '{-1, -1, -1});
    end
    for (int g = 0; g < NCFG; g++) begin
      for (int f = 1; f < 4; f++) begin
        check(n_fwd_a[g][f] > 0, $sformatf("cfg%0d ForwardA=%0d happened (%0d)", g, f, n_fwd_a[g][f]));
        check(n_fwd_b[g][f] > 0, $sformatf("cfg%0d ForwardB=%0d happened (%0d)", g, f, n_fwd_b[g][f]));
      end
      check(n_stall[g] > 0, $sformatf("cfg%0d load-use stall happened", g));
      check(n_idr[g] > 0, $sformatf("cfg%0d jump redirect in ID happened", g));
      check(n_exr[g] > 0, $sformatf("cfg%0d branch redirect in EX happened", g));
      if (g != 0) begin
        check(n_tok[g] > 0, $sformatf("cfg%0d correctly predicted taken branch happened", g));
        check(n_hit[g] > 0, $sformatf("cfg%0d BTB hit happened", g));
      end
      $display("cfg%0d events: fwdA 1/2/3=%0d/%0d/%0d fwdB 1/2/3=%0d/%0d/%0d stall=%0d id_redirect=%0d ex_redirect=%0d taken_ok=%0d btb_hit=%0d",
               g, n_fwd_a[g][1], n_fwd_a[g][2], n_fwd_a[g][3], n_fwd_b[g][1], n_fwd_b[g][2],
               n_fwd_b[g][3], n_stall[g], n_idr[g], n_exr[g], n_tok[g], n_hit[g]);
    end
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
