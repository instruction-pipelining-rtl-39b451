// dmem: data memory of the MEM stage (the D-side of a Harvard pair).
//
// WORDS 32-bit words addressed by byte address (Address = the Y register).
// Data_out is read combinationally so the MEM-stage result mux can pass it to
// the Result register, and to the forwarding path (ForwardA/B = 2), in the same
// cycle.  A store writes Data_in at the rising clock edge.  Only whole-word
// accesses exist, the two low address bits are ignored, and the memory always
// hits (no cache behaviour is modelled); these are choices of this design.
module dmem #(
  parameter int unsigned WORDS = 1024
) (
  input  logic        clk,
  input  logic [31:0] addr,
  input  logic        we,
  input  logic [31:0] data_in,
  output logic [31:0] data_out
);
  localparam int unsigned AW = $clog2(WORDS);
  logic [31:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (we) mem[addr[AW+1:2]] <= data_in;
  end

  assign data_out = mem[addr[AW+1:2]];
endmodule
