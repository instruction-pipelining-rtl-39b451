// tb_mips_full: the processor with every parameter at its default (1024-word
// memories, 16-entry BTB with 2-bit counters) running complete programs.
//
// Runs the directed nested-loop program, whose cycle count is worked out by
// hand (63 cycles for 47 instructions: 12 cycles lost to the 6 mispredicted
// branches), then random programs filling up to the subroutine area, each
// checked against the reference model completion by completion and store by
// store.  Counts the forwarding, stall, redirect and BTB events and requires
// each to occur.
module tb_mips_full;
  import mips_pkg::*;
  import mips_tb_pkg::*;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        imem_we = 1'b0;
  logic [9:0]  imem_waddr = '0;
  logic [31:0] imem_wdata = '0;
  always #5 clk = ~clk;

  logic         rv, rwe, sv;
  logic [31:0]  rpc, rdata, saddr, sdata;
  logic [4:0]   rrd;
  pipe_events_t ev;

  mips_pipeline dut (
    .clk(clk), .rst_n(rst_n),
    .imem_we(imem_we), .imem_waddr(imem_waddr), .imem_wdata(imem_wdata),
    .retire_valid(rv), .retire_pc(rpc), .retire_we(rwe), .retire_rd(rrd), .retire_data(rdata),
    .store_valid(sv), .store_addr(saddr), .store_data(sdata),
    .events(ev)
  );

  int checks = 0, failures = 0;
  int cyc = 0, idx = 0, sidx = 0, done_cyc = 0, halt_pc = 0;
  bit running = 0, done = 0;
  int n_fa[4], n_fb[4], n_stall = 0, n_idr = 0, n_exr = 0, n_tok = 0, n_hit = 0;

  int          e_pc[$];
  bit          e_we[$];
  int          e_rd[$];
  logic [31:0] e_data[$];
  logic [31:0] e_saddr[$];
  logic [31:0] e_sdata[$];

  always @(posedge clk) if (running) cyc <= cyc + 1;

  always @(negedge clk) begin
    if (running && !done) begin
      n_fa[ev.fwd_a]++;
      n_fb[ev.fwd_b]++;
      if (ev.stall)       n_stall++;
      if (ev.id_redirect) n_idr++;
      if (ev.ex_redirect) n_exr++;
      if (ev.ex_taken_ok) n_tok++;
      if (ev.btb_hit)     n_hit++;
      if (sv) begin
        checks++;
        if (sidx >= e_saddr.size() || saddr != e_saddr[sidx] || sdata != e_sdata[sidx]) begin
          failures++;
          $display("unexpected store [%h] <= %h", saddr, sdata);
        end
        sidx++;
      end
      if (rv) begin
        checks++;
        if (idx >= e_pc.size() || rpc != 32'(e_pc[idx]) || rwe != e_we[idx] ||
            (rwe && (rrd != 5'(e_rd[idx]) || rdata != e_data[idx]))) begin
          failures++;
          $display("completion #%0d pc=%h r%0d=%h differs from the reference", idx, rpc, rrd, rdata);
        end
        idx++;
        if (rpc == 32'(halt_pc)) begin
          done = 1;
          done_cyc = cyc + 1;
        end
      end
    end
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic run_prog(prog_builder p, string name, int exp_cyc);
    ref_model m = new();
    m.run(p);
    e_pc = m.exp_pc; e_we = m.exp_we; e_rd = m.exp_rd; e_data = m.exp_data;
    e_saddr = m.st_addr; e_sdata = m.st_data;
    halt_pc = 4 * p.halt_word;
    @(negedge clk);
    running = 0; rst_n = 0;
    for (int a = 0; a < 1024; a++) begin
      imem_we = 1; imem_waddr = 10'(a);
      imem_wdata = p.words.exists(a) ? p.words[a] : NOP;
      @(negedge clk);
    end
    imem_we = 0;
    @(negedge clk);
    idx = 0; sidx = 0; done = 0; done_cyc = 0; cyc = 0;
    rst_n = 1; running = 1;
    while (!done && cyc < 20000) @(negedge clk);
    running = 0;
    check(done && idx == e_pc.size() && sidx == e_saddr.size(),
          $sformatf("%s completed %0d of %0d, stored %0d of %0d", name, idx, e_pc.size(), sidx, e_saddr.size()));
    if (exp_cyc >= 0) check(done_cyc == exp_cyc, $sformatf("%s took %0d cycles, expected %0d", name, done_cyc, exp_cyc));
    check(done_cyc <= m.pnt_cycles + 4 * m.n_taken,
          $sformatf("%s cycle count %0d within bound", name, done_cyc));
    $display("%s: %0d instructions in %0d cycles (predict-not-taken would take %0d)",
             name, e_pc.size(), done_cyc, m.pnt_cycles);
  endtask

  initial begin
    prog_builder p;
    void'($urandom(11));
    p = new(); p.nested_loops(3, 4);
    run_prog(p, "nested", 63);
    for (int t = 0; t < 4; t++) begin
      p = new(); p.random_program(70);
      check(p.pc < 600, "program fits below the subroutine area");
      run_prog(p, $sformatf("random%0d", t), -1);
    end
    for (int f = 1; f < 4; f++) begin
      check(n_fa[f] > 0, $sformatf("ForwardA=%0d happened", f));
      check(n_fb[f] > 0, $sformatf("ForwardB=%0d happened", f));
    end
    check(n_stall > 0, "load-use stall happened");
    check(n_idr > 0, "ID redirect happened");
    check(n_exr > 0, "EX redirect happened");
    check(n_tok > 0, "correctly predicted taken branch happened");
    check(n_hit > 0, "BTB hit happened");
    $display("events: fwdA=%0d/%0d/%0d fwdB=%0d/%0d/%0d stall=%0d id_redirect=%0d ex_redirect=%0d taken_ok=%0d btb_hit=%0d",
             n_fa[1], n_fa[2], n_fa[3], n_fb[1], n_fb[2], n_fb[3], n_stall, n_idr, n_exr, n_tok, n_hit);
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
