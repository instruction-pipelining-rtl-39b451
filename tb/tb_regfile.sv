// tb_regfile: random writes and reads against a shadow array; checks that r0
// stays zero, that a write becomes visible on both read ports the next cycle,
// and that reset clears the file.
module tb_regfile;
  logic clk = 0, rst_n = 0, we = 0;
  logic [4:0] ra = 0, rb = 0, rw = 0;
  logic [31:0] bus_a, bus_b, bus_w = 0;
  logic [31:0] shadow [32];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  regfile dut (.clk, .rst_n, .ra, .rb, .bus_a, .bus_b, .we, .rw, .bus_w);

  task automatic chk(logic [31:0] got, logic [31:0] exp, string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: %h expected %h", what, got, exp); end
  endtask

  initial begin
    foreach (shadow[i]) shadow[i] = 0;
    @(negedge clk); @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 32; i++) begin ra = 5'(i); rb = 5'(31 - i); #1; chk(bus_a, 0, "reset A"); chk(bus_b, 0, "reset B"); end
    repeat (3000) begin
      @(negedge clk);
      we = 1'($urandom); rw = 5'($urandom); bus_w = $urandom;
      ra = 5'($urandom); rb = 5'($urandom);
      #1;
      chk(bus_a, shadow[ra], "read A");
      chk(bus_b, shadow[rb], "read B");
      @(posedge clk);
      if (we && rw != 0) shadow[rw] = bus_w;
      #1;
      ra = rw; rb = 0;
      #1;
      chk(bus_a, shadow[rw], "read after write");
      chk(bus_b, 0, "r0 is zero");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (100000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
