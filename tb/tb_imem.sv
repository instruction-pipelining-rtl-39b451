// tb_imem: writes random words through the load port and reads them back on the
// fetch port by byte address, in a random order.
module tb_imem;
  logic clk = 0, we = 0;
  logic [31:0] pc = 0, instr, wdata = 0;
  logic [9:0] waddr = 0;
  logic [31:0] shadow [1024];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  imem #(.WORDS(1024)) dut (.clk, .pc, .instr, .we, .waddr, .wdata);
  initial begin
    for (int i = 0; i < 1024; i++) begin
      @(negedge clk); we = 1; waddr = 10'(i); wdata = $urandom; shadow[i] = wdata;
    end
    @(negedge clk); we = 0;
    repeat (3000) begin
      int k = $urandom_range(1023);
      pc = 32'(4 * k) | 32'($urandom_range(3));
      #1;
      checks++;
      if (instr !== shadow[k]) begin failures++; $display("FAIL word %0d: %h expected %h", k, instr, shadow[k]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (100000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
