// tb_dmem: random loads and stores against a shadow array.  A store becomes
// visible after the clock edge; Data_out follows the address combinationally.
module tb_dmem;
  logic clk = 0, we = 0;
  logic [31:0] addr = 0, data_in = 0, data_out;
  logic [31:0] shadow [1024];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  dmem #(.WORDS(1024)) dut (.clk, .addr, .we, .data_in, .data_out);
  initial begin
    for (int i = 0; i < 1024; i++) begin
      @(negedge clk); we = 1; addr = 32'(4 * i); data_in = $urandom; shadow[i] = data_in;
    end
    repeat (4000) begin
      int k;
      @(negedge clk);
      k = $urandom_range(1023);
      we = 1'($urandom); addr = 32'(4 * k); data_in = $urandom;
      #1;
      checks++;
      if (data_out !== shadow[k]) begin failures++; $display("FAIL read %0d", k); end
      @(posedge clk);
      if (we) shadow[k] = data_in;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (100000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
