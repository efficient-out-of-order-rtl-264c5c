// bobg_predictor: the BO-BG hybrid branch and guard predictor with its BoL mode control.
//
// Two TAGE components predict every conditional branch and the first guard of every
// guarded group: BO reads a global history of branch outcomes only, BG a global history of
// branch outcomes and guard values (a guard enters it once per group). A PC-indexed META
// chooser picks between them. The BoL counter decides the mode:
//  * SY-mode: every guard prediction is used; the prediction is META's choice of BO/BG.
//    Guard mispredictions flush, so the speculative BG history stays exact.
//  * HCO-mode: only the BO prediction is used (the speculative BG history may be corrupted
//    by unused wrong guard predictions), and a guard prediction is used only when BO is
//    high confidence.
// Going from HCO to SY needs a correct speculative BG history: drain_req is raised, the
// front end stops fetching, and once pipe_empty is seen the commit-time histories are
// copied into the speculative ones and the mode changes. SY to HCO is immediate.
//
// Histories: four global_history buffers (speculative and commit-time, BO and BG). Fetch
// lookups (lk_*) are combinational and push the predicted outcome at the clock edge; the
// returned pointers are the checkpoint. A recovery (rc_*) restores the pointers of the
// mispredicted instruction and pushes its resolved outcome (into both histories for a
// branch, into BG only for a guard). At commit (up_*) both components, META and BoL are
// updated as if the core ran in SY-mode, with the commit-time histories, whatever the mode.
// After reset the tables initialise for 4096 cycles; `ready` rises when they are done.
// The structure follows the design description; the interfaces are this implementation's.
module bobg_predictor
  import bobg_pkg::*;
#(
  parameter int unsigned LOG_BUF     = HBUF_LOG,
  parameter int unsigned HLEN        = HIST_LEN,
  parameter int unsigned U_RESET_LOG = 18,
  parameter int          PENALTY     = BOL_PENALTY,
  parameter int          THRESH      = BOL_THRESH
) (
  input  logic                clk,
  input  logic                rst_n,
  // fetch-time lookup
  input  logic                lk_valid,
  input  logic [PC_W-1:0]     lk_pc,
  input  logic                lk_is_branch,
  output logic                lk_pred,     // branch direction, or guard flag-formula value
  output logic                lk_use,      // guard prediction is used
  output logic                lk_bo_hc,
  output logic [LOG_BUF-1:0]  lk_bo_ptr,
  output logic [LOG_BUF-1:0]  lk_bg_ptr,
  // misprediction recovery
  input  logic                rc_valid,
  input  logic                rc_is_branch,
  input  logic [LOG_BUF-1:0]  rc_bo_ptr,
  input  logic [LOG_BUF-1:0]  rc_bg_ptr,
  input  logic                rc_outcome,
  // commit-time update
  input  logic                up_valid,
  input  upd_kind_e           up_kind,
  input  logic [PC_W-1:0]     up_pc,
  input  logic                up_outcome,
  input  logic                up_bo_hc,
  // mode
  input  logic                pipe_empty,
  output mode_e               mode,
  output logic                drain_req,
  output logic signed [BOL_W-1:0] bol,
  output logic                ready       // component tables initialised after reset
);
  localparam int unsigned NB = 2**LOG_BUF;

  logic [HLEN-1:0]    s_bo_hist, s_bg_hist, c_bo_hist, c_bg_hist;
  logic [NB-1:0]      s_bo_buf, s_bg_buf, c_bo_buf, c_bg_buf;
  logic [LOG_BUF-1:0] c_bo_ptr, c_bg_ptr;
  logic               load;
  logic               bo_pred, bo_hc, bg_pred, bg_hc, use_bg;
  logic               bo_up_pred, bo_up_hc, bg_up_pred, bg_up_hc, up_use_bg;
  logic               up_tage, up_guard, s_bo_push, s_bg_push, s_push_bit;
  mode_e              want_mode;
  logic               bo_ready, bg_ready;

  assign ready = bo_ready && bg_ready;

  assign up_tage  = up_valid && (up_kind == UPD_BRANCH || up_kind == UPD_GUARD_FIRST);
  assign up_guard = (up_kind == UPD_GUARD_FIRST);

  // ---------------- components ----------------
  tage_predictor #(.HLEN(HLEN), .U_RESET_LOG(U_RESET_LOG), .LFSR_SEED(16'hACE1)) u_bo (
    .clk, .rst_n,
    .lk_pc(lk_pc), .lk_hist(s_bo_hist), .lk_pred(bo_pred), .lk_hc(bo_hc),
    .up_valid(up_tage), .up_pc(up_pc), .up_hist(c_bo_hist), .up_taken(up_outcome),
    .up_is_guard(up_guard), .up_pred(bo_up_pred), .up_hc(bo_up_hc), .ready(bo_ready));

  tage_predictor #(.HLEN(HLEN), .U_RESET_LOG(U_RESET_LOG), .LFSR_SEED(16'h5A3C)) u_bg (
    .clk, .rst_n,
    .lk_pc(lk_pc), .lk_hist(s_bg_hist), .lk_pred(bg_pred), .lk_hc(bg_hc),
    .up_valid(up_tage), .up_pc(up_pc), .up_hist(c_bg_hist), .up_taken(up_outcome),
    .up_is_guard(up_guard), .up_pred(bg_up_pred), .up_hc(bg_up_hc), .ready(bg_ready));

  meta_predictor u_meta (
    .clk, .rst_n,
    .lk_pc(lk_pc), .lk_use_bg(use_bg),
    .up_valid(up_tage), .up_pc(up_pc), .up_bo_pred(bo_up_pred), .up_bg_pred(bg_up_pred),
    .up_taken(up_outcome), .up_use_bg(up_use_bg));

  bol_heuristic #(.PENALTY(PENALTY), .THRESH(THRESH)) u_bol (
    .clk, .rst_n,
    .up_valid(up_valid), .up_kind(up_kind),
    .pred_bobg(up_use_bg ? bg_up_pred : bo_up_pred), .pred_bo(bo_up_pred),
    .taken(up_outcome), .bo_hc(up_bo_hc), .bol(bol), .want_mode(want_mode));

  // ---------------- fetch-time prediction ----------------
  always_comb begin
    lk_pred  = (mode == MODE_SY && use_bg) ? bg_pred : bo_pred;
    lk_bo_hc = bo_hc;
    lk_use   = lk_is_branch || (mode == MODE_SY) || bo_hc;
    // speculative history pushes: a lookup, or the resolved outcome on a recovery
    if (rc_valid) begin
      s_bo_push  = rc_is_branch;
      s_bg_push  = 1'b1;
      s_push_bit = rc_outcome;
    end else begin
      s_bo_push  = lk_valid && lk_is_branch;
      s_bg_push  = lk_valid;
      s_push_bit = lk_pred;
    end
  end

  // ---------------- histories ----------------
  global_history #(.LOG_BUF(LOG_BUF), .HLEN(HLEN)) u_s_bo (
    .clk, .rst_n, .push(s_bo_push), .push_bit(s_push_bit),
    .restore(rc_valid), .restore_ptr(rc_bo_ptr),
    .load(load), .load_buf(c_bo_buf), .load_ptr(c_bo_ptr),
    .ptr(lk_bo_ptr), .buf_q(s_bo_buf), .hist(s_bo_hist));

  global_history #(.LOG_BUF(LOG_BUF), .HLEN(HLEN)) u_s_bg (
    .clk, .rst_n, .push(s_bg_push), .push_bit(s_push_bit),
    .restore(rc_valid), .restore_ptr(rc_bg_ptr),
    .load(load), .load_buf(c_bg_buf), .load_ptr(c_bg_ptr),
    .ptr(lk_bg_ptr), .buf_q(s_bg_buf), .hist(s_bg_hist));

  global_history #(.LOG_BUF(LOG_BUF), .HLEN(HLEN)) u_c_bo (
    .clk, .rst_n, .push(up_valid && up_kind == UPD_BRANCH), .push_bit(up_outcome),
    .restore(1'b0), .restore_ptr('0), .load(1'b0), .load_buf('0), .load_ptr('0),
    .ptr(c_bo_ptr), .buf_q(c_bo_buf), .hist(c_bo_hist));

  global_history #(.LOG_BUF(LOG_BUF), .HLEN(HLEN)) u_c_bg (
    .clk, .rst_n, .push(up_tage), .push_bit(up_outcome),
    .restore(1'b0), .restore_ptr('0), .load(1'b0), .load_buf('0), .load_ptr('0),
    .ptr(c_bg_ptr), .buf_q(c_bg_buf), .hist(c_bg_hist));

  // ---------------- mode control ----------------
  assign drain_req = (mode == MODE_HCO) && (want_mode == MODE_SY);
  assign load      = drain_req && pipe_empty;

  always_ff @(posedge clk) begin
    if (!rst_n) mode <= MODE_HCO;
    else if (load) mode <= MODE_SY;
    else if (mode == MODE_SY && want_mode == MODE_HCO) mode <= MODE_HCO;
  end

  // the copy needs a quiet pipeline: no lookup, recovery or commit in that cycle
  assert property (@(posedge clk) disable iff (!rst_n) load |-> !(lk_valid || rc_valid || up_valid))
    else $error("history copy while the pipeline is not quiet");
endmodule
