// hazard_unit: hazard detection, forwarding and stall control of the ID stage.
//
// The instruction being decoded reads Rs and Rt.  Its previous instruction is in
// EX (destination Rd2, RegWr2), the second previous in MEM (Rd3, RegWr3) and the
// third previous in WB (Rd4, RegWr4).  For each operand the unit picks the
// youngest of those that writes the same, non-zero register:
//   ForwardA/B = 1  value from the ALU output (EX stage)
//              = 2  value from the MEM-stage result mux
//              = 3  value on BusW (WB stage)
//              = 0  no match: the register file value.
// A load in EX (MemRead2) cannot supply its value yet, so if either operand
// would take it (ForwardA = 1 or ForwardB = 1) the unit raises `stall`: the PC
// and IR are frozen and a bubble enters EX.  Both equations are the pipeline's
// own, including that Rt is compared even for instructions that do not read it
// (an I-format Rt is a destination), which can cost a needless stall cycle.
// Combinational.
module hazard_unit
  import mips_pkg::*;
(
  input  logic [4:0] rs,
  input  logic [4:0] rt,
  input  logic [4:0] rd2,
  input  logic       reg_wr2,
  input  logic       mem_read2,
  input  logic [4:0] rd3,
  input  logic       reg_wr3,
  input  logic [4:0] rd4,
  input  logic       reg_wr4,
  output fwd_e       fwd_a,
  output fwd_e       fwd_b,
  output logic       stall
);
  function automatic fwd_e pick(input logic [4:0] r);
    if      (r != 5'd0 && r == rd2 && reg_wr2) return FWD_EX;
    else if (r != 5'd0 && r == rd3 && reg_wr3) return FWD_MEM;
    else if (r != 5'd0 && r == rd4 && reg_wr4) return FWD_WB;
    else                                       return FWD_RF;
  endfunction

  always_comb begin
    fwd_a = pick(rs);
    fwd_b = pick(rt);
    stall = mem_read2 && (fwd_a == FWD_EX || fwd_b == FWD_EX);
  end
endmodule
