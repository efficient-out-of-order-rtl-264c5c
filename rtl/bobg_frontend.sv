// bobg_frontend: guard-predicting front end for out-of-order execution of a guarded
// (ARMv7-style, every instruction carries a condition) instruction set.
//
// Out-of-order cores cannot rename a register whose last writer was a guarded instruction
// before the guard is known (the multiple-definition problem). This front end predicts
// guards like branches and removes the problem for every predicted guard: a predicted-true
// instruction issues unguarded, a predicted-false one is dropped, and only the first
// instruction of each guarded group verifies the guard at execute. Guards that are not
// predicted fall back to split FPCM: the operation writes a temporary, and a select
// micro-op picks the new or the old value.
//
// Blocks: guard_group_tracker (which instruction needs a prediction), bobg_predictor
// (BO/BG TAGE components, META, BoL, histories, SY/HCO mode), split_fpcm_cracker (micro-op
// generation), guard_exec_unit (select and guard check at execute).
//
// Interfaces (all one instruction / micro-op per cycle):
//  in_*     decoded instructions, valid/ready. Stalled for the table initialisation after
//           reset (4096 cycles), while the predictor drains the
//           pipeline for an HCO->SY switch and while a split instruction is cracked.
//  uop_*    micro-ops to rename/issue, valid/ready; each carries its recovery checkpoint
//           and the predictor update it makes at commit.
//  ex_*     a micro-op at execute with its flags and operands: select result, guard value,
//           and on a guard misprediction a redirect to the group's first instruction.
//  br_*     a resolved branch misprediction (target handled outside).
//  cm_*     commit-time predictor update, one micro-op per cycle.
// The lookup is combinational in the accept cycle; micro-ops leave one cycle later.
// A recovery and an accepted instruction never share a cycle (recovery wins).
module bobg_frontend
  import bobg_pkg::*;
#(
  parameter int unsigned DATA_W  = 32,
  parameter int          PENALTY = BOL_PENALTY,
  parameter int          THRESH  = BOL_THRESH
) (
  input  logic                clk,
  input  logic                rst_n,
  // decoded instructions
  input  logic                in_valid,
  input  instr_t              in_instr,
  output logic                in_ready,
  // micro-ops out
  output logic                uop_valid,
  output uop_t                uop,
  input  logic                uop_ready,
  // execute-stage guard logic
  input  logic                ex_valid,
  input  uop_t                ex_uop,
  input  flags_t              ex_flags,
  input  logic [DATA_W-1:0]   ex_tmp_val,
  input  logic [DATA_W-1:0]   ex_old_val,
  input  flags_t              ex_tmp_flags,
  output logic                ex_guard,
  output logic                ex_base,
  output logic [DATA_W-1:0]   ex_sel_val,
  output flags_t              ex_sel_flags,
  output logic                redirect_valid,
  output logic [PC_W-1:0]     redirect_pc,
  // branch misprediction
  input  logic                br_mispredict,
  input  ckpt_t               br_ckpt,
  input  logic                br_taken,
  // commit
  input  logic                cm_valid,
  input  upd_kind_e           cm_kind,
  input  logic [PC_W-1:0]     cm_pc,
  input  logic                cm_outcome,
  input  logic                cm_bo_hc,
  input  logic                backend_empty,
  // status
  output mode_e               mode,
  output logic                drain_req,
  output logic signed [BOL_W-1:0] bol
);
  logic     acc, crk_ready, crk_busy, pred_ready;
  logic     need_pred, t_guarded, t_first, t_use, t_known, t_value, t_bo_hc;
  tracker_t trk_state;
  logic     lk_valid, lk_pred, lk_use, lk_bo_hc;
  logic [HBUF_LOG-1:0] lk_bo_ptr, lk_bg_ptr;
  logic     g_mispredict, rc_valid, rc_is_branch, rc_outcome;
  ckpt_t    rc_ckpt, in_ckpt;
  logic [2:0] g_pair;

  // ---------------- recovery ----------------
  always_comb begin
    rc_valid     = br_mispredict || g_mispredict;
    rc_is_branch = br_mispredict;
    rc_ckpt      = br_mispredict ? br_ckpt : ex_uop.ckpt;
    rc_outcome   = br_mispredict ? br_taken : ex_base;
  end
  assign redirect_valid = g_mispredict && !br_mispredict;

  // ---------------- decode-side decision ----------------
  assign in_ready = crk_ready && pred_ready && !drain_req && !rc_valid;
  assign acc      = in_valid && in_ready;
  assign lk_valid = acc && (need_pred || (in_instr.is_branch && in_instr.cond[3:1] != 3'd7));

  guard_group_tracker u_trk (
    .clk, .rst_n,
    .in_valid(acc), .in_cond(in_instr.cond), .in_is_branch(in_instr.is_branch),
    .in_sets_flags(in_instr.sets_flags), .need_pred(need_pred),
    .pred_value(lk_pred), .pred_use(lk_use), .pred_bo_hc(lk_bo_hc),
    .guarded(t_guarded), .first(t_first), .use_pred(t_use), .known(t_known),
    .value(t_value), .bo_hc(t_bo_hc), .state(trk_state),
    .rc_valid(rc_valid), .rc_state(rc_ckpt.trk), .rc_set(!br_mispredict),
    .rc_pair(g_pair), .rc_value(ex_base), .rc_bo_hc(ex_uop.bo_hc));

  bobg_predictor #(.PENALTY(PENALTY), .THRESH(THRESH)) u_pred (
    .clk, .rst_n,
    .lk_valid(lk_valid), .lk_pc(in_instr.pc), .lk_is_branch(in_instr.is_branch),
    .lk_pred(lk_pred), .lk_use(lk_use), .lk_bo_hc(lk_bo_hc),
    .lk_bo_ptr(lk_bo_ptr), .lk_bg_ptr(lk_bg_ptr),
    .rc_valid(rc_valid), .rc_is_branch(rc_is_branch), .rc_bo_ptr(rc_ckpt.bo_ptr),
    .rc_bg_ptr(rc_ckpt.bg_ptr), .rc_outcome(rc_outcome),
    .up_valid(cm_valid), .up_kind(cm_kind), .up_pc(cm_pc), .up_outcome(cm_outcome),
    .up_bo_hc(cm_bo_hc),
    .pipe_empty(backend_empty && !crk_busy), .mode(mode), .drain_req(drain_req), .bol(bol),
    .ready(pred_ready));

  assign in_ckpt = '{bo_ptr: lk_bo_ptr, bg_ptr: lk_bg_ptr, trk: trk_state};

  split_fpcm_cracker u_crk (
    .clk, .rst_n,
    .in_valid(acc), .in_ready(crk_ready), .in_instr(in_instr),
    .in_guarded(t_guarded), .in_first(t_first), .in_use(t_use), .in_known(t_known),
    .in_value(t_value), .in_bo_hc(t_bo_hc), .in_br_pred(lk_pred), .in_ckpt(in_ckpt),
    .flush(rc_valid), .uop_valid(uop_valid), .uop(uop), .uop_ready(uop_ready),
    .busy(crk_busy));

  // ---------------- execute-side guard logic ----------------
  guard_exec_unit #(.DATA_W(DATA_W)) u_gex (
    .valid(ex_valid), .uop(ex_uop), .flags(ex_flags), .tmp_val(ex_tmp_val),
    .old_val(ex_old_val), .tmp_flags(ex_tmp_flags), .guard(ex_guard), .base(ex_base),
    .sel_val(ex_sel_val), .sel_flags(ex_sel_flags), .mispredict(g_mispredict),
    .redirect_pc(redirect_pc), .pair(g_pair));

  assert property (@(posedge clk) disable iff (!rst_n) !(br_mispredict && g_mispredict))
    else $error("branch and guard recovery in the same cycle");
endmodule
