// tb_btb: random updates and lookups against a shadow direct-mapped buffer,
// for the default 2-bit buffer and a 1-bit one.  Also a directed sequence: a
// taken branch is allocated weakly taken, is still predicted taken after one
// not-taken outcome only if it was strengthened first, and an absent not-taken
// branch allocates nothing.
module tb_btb;
  localparam int N = 16;
  logic clk = 0, rst_n = 0;
  logic [31:0] pc, target, upd_pc, upd_target;
  logic upd_en, upd_taken, hit, pt;
  logic hit1, pt1;
  logic [31:0] target1;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  btb #(.ENTRIES(N), .PRED_BITS(2)) dut (.clk, .rst_n, .pc, .hit, .predict_taken(pt), .target,
                                         .upd_en, .upd_pc, .upd_taken, .upd_target);
  btb #(.ENTRIES(N), .PRED_BITS(1)) dut1 (.clk, .rst_n, .pc, .hit(hit1), .predict_taken(pt1),
                                          .target(target1), .upd_en, .upd_pc, .upd_taken, .upd_target);

  // shadow state
  bit          v[N];
  logic [31:0] a[N], tg[N];
  int          c2[N], c1[N];

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic look(logic [31:0] p);
    int i = int'(p[5:2]);
    bit h = v[i] && a[i] == p;
    pc = p; #1;
    chk(hit == h && hit1 == h, "hit");
    chk(pt == (h && c2[i] >= 2), "2-bit prediction");
    chk(pt1 == (h && c1[i] == 1), "1-bit prediction");
    if (h) chk(target == tg[i] && target1 == tg[i], "target");
  endtask

  task automatic update(logic [31:0] p, bit tk, logic [31:0] t);
    int i = int'(p[5:2]);
    @(negedge clk);
    upd_en = 1; upd_pc = p; upd_taken = tk; upd_target = t;
    @(posedge clk); #1;
    upd_en = 0;
    if (v[i] && a[i] == p) begin
      c2[i] = tk ? (c2[i] == 3 ? 3 : c2[i] + 1) : (c2[i] == 0 ? 0 : c2[i] - 1);
      c1[i] = tk ? 1 : 0;
      if (tk) tg[i] = t;
    end else if (tk) begin
      v[i] = 1; a[i] = p; tg[i] = t; c2[i] = 2; c1[i] = 1;
    end
  endtask

  initial begin
    upd_en = 0; upd_pc = 0; upd_taken = 0; upd_target = 0; pc = 0;
    @(negedge clk); @(negedge clk); rst_n = 1;
    look(32'h40);
    update(32'h40, 0, 32'h80); look(32'h40);
    chk(!hit, "not-taken absent branch not allocated");
    update(32'h40, 1, 32'h80); look(32'h40);
    chk(hit && pt && pt1 && target == 32'h80, "taken branch allocated, predicted taken");
    update(32'h40, 0, 32'h80); look(32'h40);
    chk(hit && !pt && !pt1, "weak taken drops to not taken after one miss");
    update(32'h40, 1, 32'h80); update(32'h40, 1, 32'h80); update(32'h40, 0, 32'h80); look(32'h40);
    chk(pt && !pt1, "strong taken survives one miss in 2-bit, not in 1-bit");
    look(32'h440);
    chk(!hit, "same index, other address misses");
    repeat (5000) begin
      logic [31:0] p = {24'd0, 2'($urandom), 4'($urandom), 2'b00};
      if ($urandom_range(1)) update(p, 1'($urandom), {20'd0, 10'($urandom), 2'b00});
      look({24'd0, 2'($urandom), 4'($urandom), 2'b00});
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (100000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
