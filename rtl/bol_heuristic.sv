// bol_heuristic: the Benefit-or-Loss counter that picks the guard-prediction mode.
//
// A signed W-bit (11-bit) saturating counter estimates whether using every guard
// prediction (SY-mode) gains over using only high-confidence ones (HCO-mode). It is
// updated at commit for every conditional branch and every guarded instruction:
//   branch, or guard whose BO prediction was high confidence:
//       if Pred(BO-BG) != Pred(BO): +PENALTY when BO-BG was right, -PENALTY otherwise;
//   guard whose BO prediction was not high confidence:
//       + the size of the guarded group, and -PENALTY if Pred(BO-BG) was wrong.
// The group size is added one instruction at a time: every committed member of such a
// group (first instruction included) adds 1, which sums to the same total without having
// to know the size when the group's first instruction commits (this incremental form is
// this implementation's choice). The wanted mode becomes SY when the counter rises above
// +THRESH and HCO when it falls below -THRESH (512), otherwise it holds. Reset: counter 0,
// HCO-mode (not given by the description; HCO is the mode that is safe without any
// history state). Outputs are registered.
module bol_heuristic
  import bobg_pkg::*;
#(
  parameter int unsigned W       = BOL_W,
  parameter int          PENALTY = BOL_PENALTY,
  parameter int          THRESH  = BOL_THRESH
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                up_valid,
  input  upd_kind_e           up_kind,
  input  logic                pred_bobg,  // hybrid prediction (as in SY-mode)
  input  logic                pred_bo,    // BO component prediction
  input  logic                taken,      // actual branch direction / guard formula value
  input  logic                bo_hc,      // BO was high confidence (guards)
  output logic signed [W-1:0] bol,
  output mode_e               want_mode
);
  localparam int MAXV = 2**(W-1) - 1;
  localparam int MINV = -(2**(W-1));

  int delta, sum;

  always_comb begin
    delta = 0;
    unique case (up_kind)
      UPD_BRANCH:
        if (pred_bobg != pred_bo) delta = (pred_bobg == taken) ? PENALTY : -PENALTY;
      UPD_GUARD_FIRST:
        if (!bo_hc) begin
          delta = 1;
          if (pred_bobg != taken) delta = delta - PENALTY;
        end else if (pred_bobg != pred_bo) begin
          delta = (pred_bobg == taken) ? PENALTY : -PENALTY;
        end
      UPD_GUARD_MEMBER:
        if (!bo_hc) delta = 1;
      default: delta = 0;
    endcase
    sum = int'(bol) + delta;
    if (sum > MAXV) sum = MAXV;
    if (sum < MINV) sum = MINV;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      bol       <= '0;
      want_mode <= MODE_HCO;
    end else if (up_valid) begin
      bol <= W'(sum);
      if (sum > THRESH)       want_mode <= MODE_SY;
      else if (sum < -THRESH) want_mode <= MODE_HCO;
    end
  end
endmodule
