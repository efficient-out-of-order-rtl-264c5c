// guard_group_tracker: decode-side bookkeeping of guarded groups.
//
// A guarded group is the run of instructions that use one occurrence of a guard or its
// opposite: it starts at the first use of the guard pair and ends at the next instruction
// that writes the flags. Only the first instruction of a group gets a guard prediction
// (and only it appends the guard to the branch-and-guard history); the later ones reuse
// it. The tracker keeps, per guard pair, whether a group is open, the predicted (or
// resolved) value of the pair's flag formula, whether that prediction is used and whether
// the BO component was high confidence for it.
//
// Per instruction (combinational, in_valid marks the cycle it is accepted):
//  need_pred  - first use of the pair: the predictor is looked up this cycle and its
//               answer (pred_value/pred_use/pred_bo_hc) is taken for the whole group;
//  first, use_pred, known, value, bo_hc - the decision for this instruction.
// State changes at the clock edge: an opened group is recorded, a flag-writing
// instruction (after its own guard use) closes every group. Conditional branches are
// predicted on their own and do not join groups (an implementation choice).
// Recovery (rc_valid) restores the state saved with the mispredicted instruction; for a
// guard misprediction (rc_set) the pair is reopened with the resolved value, marked
// `known` and `refetch`, so that the refetched first instruction is again the group's
// first (it carries the predictor update) but needs no prediction and no verification.
module guard_group_tracker
  import bobg_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  logic     in_valid,
  input  cond_e    in_cond,
  input  logic     in_is_branch,
  input  logic     in_sets_flags,
  output logic     need_pred,
  input  logic     pred_value,
  input  logic     pred_use,
  input  logic     pred_bo_hc,
  output logic     guarded,
  output logic     first,
  output logic     use_pred,
  output logic     known,
  output logic     value,
  output logic     bo_hc,
  output tracker_t state,
  input  logic     rc_valid,
  input  tracker_t rc_state,
  input  logic     rc_set,
  input  logic [2:0] rc_pair,
  input  logic     rc_value,
  input  logic     rc_bo_hc
);
  logic [2:0]  pair;
  pair_state_t e;

  always_comb begin
    pair     = in_cond[3:1];
    guarded  = !in_is_branch && (pair != 3'd7);
    e        = state[pair];
    need_pred = in_valid && guarded && !e.valid;
    if (e.valid) begin
      first    = e.refetch;
      use_pred = e.use_pred;
      known    = e.known;
      value    = e.value;
      bo_hc    = e.bo_hc;
    end else begin
      first    = 1'b1;
      use_pred = pred_use;
      known    = 1'b0;
      value    = pred_value;
      bo_hc    = pred_bo_hc;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= '0;
    end else if (rc_valid) begin
      state <= rc_state;
      if (rc_set) state[rc_pair] <= '{valid: 1'b1, value: rc_value, use_pred: 1'b1,
                                      bo_hc: rc_bo_hc, known: 1'b1, refetch: 1'b1};
    end else if (in_valid) begin
      if (in_sets_flags) begin
        state <= '0;
      end else if (guarded) begin
        if (!e.valid)
          state[pair] <= '{valid: 1'b1, value: pred_value, use_pred: pred_use,
                           bo_hc: pred_bo_hc, known: 1'b0, refetch: 1'b0};
        else
          state[pair].refetch <= 1'b0;
      end
    end
  end
endmodule
