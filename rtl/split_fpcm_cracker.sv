// split_fpcm_cracker: turns one decoded instruction into the micro-ops that enter the
// out-of-order back end, at the exit of decode.
//
//  * not guarded (AL) or a branch: one OP micro-op (branches carry their prediction).
//  * guarded, prediction used, guard predicted true: one unguarded OP; if it is the first
//    instruction of its group it also verifies the guard at execute.
//  * guarded, prediction used, guard predicted false: the group's first instruction
//    becomes a CHECK micro-op (only the guard verification enters the issue queue); later
//    members become NOP micro-ops that only retire, carrying their BoL update.
//  * guarded, prediction not used (HCO-mode, low confidence): split FPCM. First an OP
//    that writes its results to the temporaries (TMP_REG, temporary flags), then a
//    SELECT micro-op: Res = guard ? TMP : Res (and flags likewise).
// The rules follow the design description; the micro-op format is this implementation's.
// Interface: valid/ready on both sides, one micro-op per cycle, so a split instruction
// takes two cycles and holds decode for one. `flush` drops the held instruction.
// The held instruction appears at the output the cycle after it is accepted.
module split_fpcm_cracker
  import bobg_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid,
  output logic   in_ready,
  input  instr_t in_instr,
  input  logic   in_guarded,
  input  logic   in_first,
  input  logic   in_use,
  input  logic   in_known,
  input  logic   in_value,    // predicted/known value of the guard pair's flag formula
  input  logic   in_bo_hc,
  input  logic   in_br_pred,  // predicted direction for a conditional branch
  input  ckpt_t  in_ckpt,
  input  logic   flush,
  output logic   uop_valid,
  output uop_t   uop,
  input  logic   uop_ready,
  output logic   busy
);
  instr_t h;
  logic   h_guarded, h_first, h_use, h_known, h_value, h_bo_hc, h_br_pred;
  ckpt_t  h_ckpt;
  logic   step;
  logic   split, g, last_step, fire;

  always_comb begin
    g         = h_value ^ h.cond[0];
    split     = h_guarded && !h_use;
    last_step = !split || step;

    uop            = '0;
    uop.pc         = h.pc;
    uop.opcode     = h.opcode;
    uop.cond       = h.cond;
    uop.is_branch  = h.is_branch;
    uop.sets_flags = h.sets_flags;
    uop.writes_rd  = h.writes_rd;
    uop.rd         = h.rd;
    uop.rn         = h.rn;
    uop.rm         = h.rm;
    uop.bo_hc      = h_bo_hc;
    uop.ckpt       = h_ckpt;
    uop.last       = last_step;
    uop.kind       = UOP_OP;
    uop.upd        = UPD_NONE;

    if (h.is_branch) begin
      uop.pred = h_br_pred;
      uop.upd  = (h.cond[3:1] != 3'd7) ? UPD_BRANCH : UPD_NONE;
    end else if (h_guarded) begin
      uop.upd = h_first ? UPD_GUARD_FIRST : UPD_GUARD_MEMBER;
      if (h_use) begin
        uop.pred   = g;
        uop.verify = h_first && !h_known;
        if (!g) uop.kind = h_first ? UOP_CHECK : UOP_NOP;
      end else if (!step) begin
        uop.to_tmp = 1'b1;
        uop.upd    = UPD_NONE;
        uop.rd     = TMP_REG;
      end else begin
        uop.kind = UOP_SELECT;
        uop.rn   = TMP_REG;
        uop.rm   = h.rd;
      end
    end

    uop_valid = busy;
    fire      = uop_valid && uop_ready;
    in_ready  = !busy || (fire && last_step);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      step      <= 1'b0;
      h         <= '0;
      h_guarded <= 1'b0;
      h_first   <= 1'b0;
      h_use     <= 1'b0;
      h_known   <= 1'b0;
      h_value   <= 1'b0;
      h_bo_hc   <= 1'b0;
      h_br_pred <= 1'b0;
      h_ckpt    <= '0;
    end else if (flush) begin
      busy <= 1'b0;
      step <= 1'b0;
    end else begin
      if (fire) step <= last_step ? 1'b0 : 1'b1;
      if (in_valid && in_ready) begin
        busy      <= 1'b1;
        h         <= in_instr;
        h_guarded <= in_guarded;
        h_first   <= in_first;
        h_use     <= in_use;
        h_known   <= in_known;
        h_value   <= in_value;
        h_bo_hc   <= in_bo_hc;
        h_br_pred <= in_br_pred;
        h_ckpt    <= in_ckpt;
      end else if (fire && last_step) begin
        busy <= 1'b0;
      end
    end
  end
endmodule
