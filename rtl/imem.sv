// imem: instruction memory of the IF stage (the I-side of a Harvard pair).
//
// WORDS 32-bit words.  The fetch port reads the word at the byte address `pc`
// combinationally, so that the IF stage can latch it into the IR at the end of
// the same cycle; it has its own port, separate from the data memory, so a load
// or store in MEM never competes with a fetch.  A synchronous write port loads
// the program before the processor is released from reset.  The memory always
// hits: cache tags, refills and misses are not modelled (a choice of this
// design).  Addresses beyond WORDS wrap.
module imem #(
  parameter int unsigned WORDS = 1024
) (
  input  logic                     clk,
  input  logic [31:0]              pc,
  output logic [31:0]              instr,
  input  logic                     we,
  input  logic [$clog2(WORDS)-1:0] waddr,
  input  logic [31:0]              wdata
);
  localparam int unsigned AW = $clog2(WORDS);
  logic [31:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  assign instr = mem[pc[AW+1:2]];
endmodule
