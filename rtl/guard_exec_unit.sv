// guard_exec_unit: execute-stage guard logic of the back end.
//
// Two jobs, both combinational on one micro-op and the flags it reads:
//  * SELECT micro-op (second half of a split guarded instruction):
//        sel_val   = guard ? tmp_val   : old_val      (P_after = guard ? P_new : P_before)
//        sel_flags = guard ? tmp_flags : flags
//  * guard verification: a micro-op marked `verify` carries a used guard prediction (the
//    first instruction of a predicted guarded group). If the guard evaluated on the flags
//    differs from the prediction, `mispredict` is raised and fetch must resume at that
//    instruction (redirect_pc = its pc); `base` is the resolved flag formula and `pair`
//    the guard pair, which the front end needs to repair its history and group state.
//    redirect_pc and pair are fields of the micro-op passed straight through; they sit
//    here so that a recovery is described by this unit's outputs alone.
// The select and the refetch point follow the design description; the interface is this
// implementation's choice.
module guard_exec_unit
  import bobg_pkg::*;
#(
  parameter int unsigned DATA_W = 32
) (
  input  logic              valid,
  input  uop_t              uop,
  input  flags_t            flags,      // architectural flags seen by the micro-op
  input  logic [DATA_W-1:0] tmp_val,    // result of the first half (SELECT)
  input  logic [DATA_W-1:0] old_val,    // previous value of the destination (SELECT)
  input  flags_t            tmp_flags,  // flags produced by the first half (SELECT)
  output logic              guard,
  output logic              base,
  output logic [DATA_W-1:0] sel_val,
  output flags_t            sel_flags,
  output logic              mispredict,
  output logic [PC_W-1:0]   redirect_pc,
  output logic [2:0]        pair
);
  guard_eval u_eval (.cond(uop.cond), .flags(flags), .base(base), .guard(guard));

  always_comb begin
    sel_val     = guard ? tmp_val : old_val;
    sel_flags   = guard ? tmp_flags : flags;
    mispredict  = valid && uop.verify && (guard != uop.pred);
    redirect_pc = uop.pc;
    pair        = uop.cond[3:1];
  end
endmodule
