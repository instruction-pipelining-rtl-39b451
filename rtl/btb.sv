// btb: branch target and prediction buffer of the IF stage.
//
// A small direct-mapped cache of ENTRIES entries.  Each entry holds the address
// of a recent jump or branch, its target address and PRED_BITS prediction bits.
// Lookup (combinational): the low-order bits of the fetch PC, above the two
// byte-offset bits, index the buffer; when the stored address equals the PC and
// the prediction bits say taken, `predict_taken` is set and `target` is the
// address to fetch next.  Update (one per clock, at the rising edge) is made by
// the pipeline once it knows the real outcome of a jump or branch:
//   - entry present: the prediction bits step through pred_fsm with the
//     outcome, and a taken outcome also rewrites the target;
//   - entry absent and taken: the entry is (re)allocated with the address, the
//     target and the weakest taken state (1 for one bit, 2 for two bits);
//   - entry absent and not taken: nothing is written.
// Jumps are always taken, so their entries stay predicted taken.  The buffer
// organisation, its contents and the runtime update follow the pipeline
// description; the number of entries, direct mapping, the allocation policy and
// storing the full word address as the tag are choices of this design.  Active-low
// synchronous reset clears the valid bits.
module btb #(
  parameter int unsigned ENTRIES   = 16,
  parameter int unsigned PRED_BITS = 2
) (
  input  logic        clk,
  input  logic        rst_n,
  // lookup by the IF stage
  input  logic [31:0] pc,
  output logic        hit,
  output logic        predict_taken,
  output logic [31:0] target,
  // update from the stage that resolved the jump or branch
  input  logic        upd_en,
  input  logic [31:0] upd_pc,
  input  logic        upd_taken,
  input  logic [31:0] upd_target
);
  localparam int unsigned IW = (ENTRIES > 1) ? $clog2(ENTRIES) : 1;

  logic                 valid_q  [ENTRIES];
  logic [29:0]          addr_q   [ENTRIES];
  logic [29:0]          target_q [ENTRIES];
  logic [PRED_BITS-1:0] pred_q   [ENTRIES];

  // lookup
  logic [IW-1:0] idx;
  logic          lookup_pred;
  assign idx = IW'(pc[31:2]);
  assign hit = valid_q[idx] && addr_q[idx] == pc[31:2];

  pred_fsm #(.BITS(PRED_BITS)) u_lookup_fsm (
    .state(pred_q[idx]), .taken(1'b0), .next_state(), .predict_taken(lookup_pred)
  );

  assign predict_taken = hit && lookup_pred;
  assign target        = {target_q[idx], 2'b00};

  // update
  logic [IW-1:0]        uidx;
  logic                 uhit;
  logic [PRED_BITS-1:0] unext;
  assign uidx = IW'(upd_pc[31:2]);
  assign uhit = valid_q[uidx] && addr_q[uidx] == upd_pc[31:2];

  pred_fsm #(.BITS(PRED_BITS)) u_update_fsm (
    .state(pred_q[uidx]), .taken(upd_taken), .next_state(unext), .predict_taken()
  );

  localparam logic [PRED_BITS-1:0] WEAK_TAKEN = PRED_BITS'(1) << (PRED_BITS - 1);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < ENTRIES; i++) valid_q[i] <= 1'b0;
    end else if (upd_en) begin
      if (uhit) begin
        pred_q[uidx] <= unext;
        if (upd_taken) target_q[uidx] <= upd_target[31:2];
      end else if (upd_taken) begin
        valid_q[uidx]  <= 1'b1;
        addr_q[uidx]   <= upd_pc[31:2];
        target_q[uidx] <= upd_target[31:2];
        pred_q[uidx]   <= WEAK_TAKEN;
      end
    end
  end
endmodule
