// tb_mips_delayed: end-to-end test of the pipeline built for delayed branching.
//
// The processor is built with DELAY_SLOT = 1 (no BTB) and runs delayed-branch
// code from mips_tb_pkg: every jump and branch is followed by one delay-slot
// instruction, which always executes.  The reference model runs the same code
// with delayed-branch semantics (slot first, then the target; JAL/JALR link
// PC+8).  The pipeline must complete exactly the reference's instructions, in
// order, with the same register writes and stores, and take exactly the
// reference's delayed-branch cycle count: n + 4, plus 1 per taken branch or
// JR/JALR, plus 1 per load-use not in a taken branch's slot; a jump costs
// nothing.  Directed programs check
// hand-worked counts (a loop of 10 passes: 9 taken branches cost 9 cycles, where
// predict-not-taken loses 18).  The delay slot of a jump, the delay slot of a
// taken branch, a load-use stall and each forwarding source must each occur.
module tb_mips_delayed;
  import mips_pkg::*;
  import mips_tb_pkg::*;

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

  int idx, sidx, done_cyc;
  bit done;
  int n_fwd_a[4], n_fwd_b[4];
  int n_stall = 0, n_jslot = 0, n_bslot = 0;

  logic         rv, rwe, sv;
  logic [31:0]  rpc, rdata, saddr, sdata;
  logic [4:0]   rrd;
  pipe_events_t ev;

  mips_pipeline #(.USE_BTB(1'b0), .DELAY_SLOT(1'b1)) dut (
    .clk(clk), .rst_n(rst_n),
    .imem_we(imem_we), .imem_waddr(imem_waddr), .imem_wdata(imem_wdata),
    .retire_valid(rv), .retire_pc(rpc), .retire_we(rwe), .retire_rd(rrd), .retire_data(rdata),
    .store_valid(sv), .store_addr(saddr), .store_data(sdata),
    .events(ev)
  );

  always @(posedge clk) if (running) cyc <= cyc + 1;

  // program image, to tell which completed instructions were delay slots
  logic [31:0] prog_w[int];

  function automatic bit is_jump(logic [31:0] w);
    return w[31:26] == OP_J || w[31:26] == OP_JAL;
  endfunction

  function automatic bit is_branch(logic [31:0] w);
    return w[31:26] == OP_BEQ || w[31:26] == OP_BNE ||
           (w[31:26] == OP_RTYPE && (w[5:0] == F_JR || w[5:0] == F_JALR));
  endfunction

  always @(negedge clk) begin
    if (running && !done) begin
      n_fwd_a[ev.fwd_a]++;
      n_fwd_b[ev.fwd_b]++;
      if (ev.stall) n_stall++;
      if (sv) begin
        checks++;
        if (sidx >= e_saddr.size() || saddr != e_saddr[sidx] || sdata != e_sdata[sidx]) begin
          failures++;
          $display("unexpected store [%h] <= %h (store #%0d)", saddr, sdata, sidx);
        end
        sidx++;
      end
      if (rv) begin
        checks++;
        if (idx >= e_pc.size()) begin
          failures++;
          $display("extra completion pc=%h", rpc);
        end else if (rpc != 32'(e_pc[idx]) || rwe != e_we[idx] ||
                     (rwe && (rrd != 5'(e_rd[idx]) || rdata != e_data[idx]))) begin
          failures++;
          $display("completion #%0d pc=%h we=%0d r%0d=%h, expected pc=%h we=%0d r%0d=%h",
                   idx, rpc, rwe, rrd, rdata, e_pc[idx], e_we[idx], e_rd[idx], e_data[idx]);
        end
        // a delay slot: it completes right after its jump or branch, and the
        // transfer's target completes next, not the following word
        if (idx > 0 && idx + 1 < e_pc.size() && e_pc[idx] == e_pc[idx - 1] + 4 &&
            e_pc[idx + 1] != e_pc[idx] + 4 && rpc == 32'(e_pc[idx])) begin
          if (is_jump(prog_w[e_pc[idx - 1] / 4]))   n_jslot++;
          if (is_branch(prog_w[e_pc[idx - 1] / 4])) n_bslot++;
        end
        idx++;
        if (rpc == 32'(halt_pc)) begin
          done = 1'b1;
          done_cyc = cyc + 1;
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

  task automatic run_prog(prog_builder p, string name, int exp_cyc);
    ref_model m = new();
    m.run(p);
    e_pc = m.exp_pc; e_we = m.exp_we; e_rd = m.exp_rd; e_data = m.exp_data;
    e_saddr = m.st_addr; e_sdata = m.st_data;
    halt_pc = 4 * p.halt_word;
    prog_w = p.words;
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
    idx = 0; sidx = 0; done = 0; done_cyc = 0;
    cyc = 0;
    rst_n = 1;
    running = 1;
    while (!done && cyc < 20000) @(negedge clk);
    running = 0;
    check(done, $sformatf("%s reached the halt", name));
    check(idx == e_pc.size(), $sformatf("%s completed %0d of %0d", name, idx, e_pc.size()));
    check(sidx == e_saddr.size(), $sformatf("%s stored %0d of %0d", name, sidx, e_saddr.size()));
    check(done_cyc == m.ds_cycles, $sformatf("%s took %0d cycles, reference %0d",
                                             name, done_cyc, m.ds_cycles));
    if (exp_cyc >= 0)
      check(done_cyc == exp_cyc, $sformatf("%s took %0d cycles, expected %0d", name, done_cyc, exp_cyc));
    $display("%s: %0d instructions, %0d cycles", name, e_pc.size(), done_cyc);
  endtask

  initial begin
    prog_builder p;
    void'($urandom(11));
    p = new(600, 1'b1); p.straight(10);
    run_prog(p, "straight", 15);
    // addi, addi, 10 x (addi, addi, bne, slot), addi, bne, slot, halt = 46
    // instructions; the 9 taken inner branches cost 1 cycle each
    p = new(600, 1'b1); p.nested_loops(1, 10);
    run_prog(p, "loop", 46 + 4 + 9);
    for (int t = 0; t < 12; t++) begin
      p = new(600, 1'b1);
      p.random_program(45);
      check(p.pc < 600, "program fits below the subroutine area");
      run_prog(p, $sformatf("random%0d", t), -1);
    end
    for (int f = 1; f < 4; f++) begin
      check(n_fwd_a[f] > 0, $sformatf("ForwardA=%0d happened (%0d)", f, n_fwd_a[f]));
      check(n_fwd_b[f] > 0, $sformatf("ForwardB=%0d happened (%0d)", f, n_fwd_b[f]));
    end
    check(n_stall > 0, "load-use stall happened");
    check(n_jslot > 0, "a jump's delay slot executed");
    check(n_bslot > 0, "a taken branch's delay slot executed");
    $display("events: fwdA 1/2/3=%0d/%0d/%0d fwdB 1/2/3=%0d/%0d/%0d stall=%0d jump slots=%0d branch slots=%0d",
             n_fwd_a[1], n_fwd_a[2], n_fwd_a[3], n_fwd_b[1], n_fwd_b[2], n_fwd_b[3],
             n_stall, n_jslot, n_bslot);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
