// regfile: the 32 x 32-bit general register file of the ID and WB stages.
//
// Two combinational read ports (RA/BusA for Rs, RB/BusB for Rt) serve the
// instruction in ID; the single write port (RW/BusW) is written at the rising
// clock edge by the instruction in WB, which is the only stage that writes
// registers.  Register 0 always reads as zero and ignores writes.  A value
// written in a cycle is not visible on the read ports until the next cycle; the
// pipeline covers that case by forwarding from WB (ForwardA/B = 3), so the file
// needs no write-before-read bypass.  Synchronous active-low reset clears every
// register (a choice of this design, so that simulation starts from known state).
module regfile #(
  parameter int unsigned NREGS = 32,
  parameter int unsigned WIDTH = 32
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [$clog2(NREGS)-1:0] ra,
  input  logic [$clog2(NREGS)-1:0] rb,
  output logic [WIDTH-1:0]         bus_a,
  output logic [WIDTH-1:0]         bus_b,
  input  logic                     we,
  input  logic [$clog2(NREGS)-1:0] rw,
  input  logic [WIDTH-1:0]         bus_w
);
  logic [WIDTH-1:0] regs [NREGS];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < NREGS; i++) regs[i] <= '0;
    end else if (we && rw != '0) begin
      regs[rw] <= bus_w;
    end
  end

  assign bus_a = (ra == '0) ? '0 : regs[ra];
  assign bus_b = (rb == '0) ? '0 : regs[rb];
endmodule
