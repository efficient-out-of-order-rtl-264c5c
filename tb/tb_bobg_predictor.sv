// tb_bobg_predictor: the hybrid predictor driven by a small in-order pipeline model
// (lookups at fetch, commit-time updates four cycles later).
//  Phase A: a guard repeating true-true-true-false, in groups of eight. Only BG (whose
//    history holds the earlier guards) can learn it; BO is not high confidence, so
//    every group instruction counts for SY-mode, BoL rises past +512, the predictor asks
//    for a drain, fetch stops, and only when the pipeline is empty is the commit-time
//    history copied and SY-mode entered.
//  Phase B: random guards. BO-BG mispredictions push BoL below -512 and the predictor
//    falls back to HCO-mode at once (no drain).
//  Throughout: in HCO-mode the prediction is BO's and a guard prediction is used only when
//    BO is high confidence; in SY-mode all are used. A recovery restores the checkpointed
//    history and appends the resolved outcome.
module tb_bobg_predictor;
  import bobg_pkg::*;
  localparam int HL = HIST_LEN;
  logic clk = 0, rst_n = 0;
  logic lk_valid, lk_is_branch, lk_pred, lk_use, lk_bo_hc;
  logic [31:0] lk_pc, up_pc;
  logic [9:0] lk_bo_ptr, lk_bg_ptr, rc_bo_ptr, rc_bg_ptr;
  logic rc_valid, rc_is_branch, rc_outcome, up_valid, up_outcome, up_bo_hc, pipe_empty;
  logic drain_req, ready;
  upd_kind_e up_kind;
  mode_e mode;
  logic signed [10:0] bol;
  int checks = 0, failures = 0;
  int n_drain_cycles = 0, n_to_sy = 0, n_to_hco = 0, n_recover = 0;

  typedef struct { logic [31:0] pc; upd_kind_e k; logic t; logic hc; int due; } ent_t;
  ent_t pipe [$];
  int cyc = 0;

  bobg_predictor dut (.*);

  always #5 clk = ~clk;

  initial begin
    #50000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s at %0t", what, $time); end
  endtask

  // commit whatever is due; returns after one clock
  task automatic tick();
    up_valid = 0;
    if (pipe.size() > 0 && pipe[0].due <= cyc && !lk_valid) begin
      up_valid = 1; up_pc = pipe[0].pc; up_kind = pipe[0].k; up_outcome = pipe[0].t;
      up_bo_hc = pipe[0].hc;
      void'(pipe.pop_front());
    end
    pipe_empty = (pipe.size() == 0) && !up_valid;
    #1;
    if (drain_req) n_drain_cycles++;
    @(posedge clk);
    cyc++;
    #1;
    lk_valid = 0; up_valid = 0; rc_valid = 0;
  endtask

  // fetch one guarded group of `size` instructions with guard value `t`
  task automatic group(input logic [31:0] pc, input logic t, input int size);
    mode_e m;
    if (drain_req) begin
      while (drain_req) begin
        check(!lk_valid, "no fetch while draining");
        tick();
      end
      check(mode == MODE_SY && pipe.size() == 0, "switch to SY-mode only after the drain");
      check(dut.s_bg_hist == dut.c_bg_hist && dut.s_bo_hist == dut.c_bo_hist,
            "speculative history restored from commit history");
    end
    m = mode;
    lk_valid = 1; lk_pc = pc; lk_is_branch = 0;
    #1;
    check(lk_pred == ((m == MODE_SY && dut.use_bg) ? dut.bg_pred : dut.bo_pred), "prediction source");
    check(lk_use == (m == MODE_SY || lk_bo_hc), "guard use rule");
    pipe.push_back('{pc, UPD_GUARD_FIRST, t, lk_bo_hc, cyc + 4});
    for (int i = 1; i < size; i++) pipe.push_back('{pc + 4 * i, UPD_GUARD_MEMBER, t, lk_bo_hc, cyc + 4});
    tick();
    while (pipe.size() > 8) tick();
  endtask

  initial begin
    mode_e last_mode;
    logic [HL-1:0] h_ck;
    logic [9:0] p_ck, g_ck;
    lk_valid = 0; lk_is_branch = 0; lk_pc = 0; up_pc = 0; rc_valid = 0; rc_is_branch = 0;
    rc_outcome = 0; rc_bo_ptr = 0; rc_bg_ptr = 0; up_valid = 0; up_outcome = 0; up_bo_hc = 0;
    up_kind = UPD_NONE; pipe_empty = 1;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    while (!ready) @(posedge clk);
    #1;
    check(mode == MODE_HCO, "starts in HCO-mode");
    last_mode = mode;

    // Phase A
    for (int i = 0; i < 400 && mode == MODE_HCO; i++) begin
      group(32'h0000_2000, 1'(i % 4 != 3), 8);
      if (mode != last_mode) n_to_sy++;
      last_mode = mode;
    end
    check(mode == MODE_SY, "reached SY-mode");
    check(n_drain_cycles > 0, "drain seen");

    // recovery of a branch in SY-mode
    lk_valid = 1; lk_pc = 32'h0000_3000; lk_is_branch = 1;
    #1;
    p_ck = lk_bo_ptr; g_ck = lk_bg_ptr; h_ck = dut.s_bo_hist;
    tick();
    for (int i = 0; i < 5; i++) begin
      lk_valid = 1; lk_pc = 32'h0000_3100 + 32'(4 * i); lk_is_branch = 1;
      tick();
    end
    rc_valid = 1; rc_is_branch = 1; rc_bo_ptr = p_ck; rc_bg_ptr = g_ck; rc_outcome = ~h_ck[0];
    @(posedge clk);
    #1 rc_valid = 0;
    n_recover++;
    check(dut.s_bo_hist == {h_ck[HL-2:0], ~h_ck[0]}, "branch history after recovery");
    check(lk_bo_ptr == p_ck - 10'd1 && lk_bg_ptr == g_ck - 10'd1, "pointers after recovery");
    pipe.delete();

    // Phase B
    last_mode = mode;
    for (int i = 0; i < 3000 && mode == MODE_SY; i++) begin
      group(32'h0000_4000 + 32'(64 * (i % 16)), 1'($urandom_range(0, 1)), 1);
      if (mode != last_mode) begin
        n_to_hco++;
        check(!drain_req, "no drain to enter HCO-mode");
      end
      last_mode = mode;
    end
    check(mode == MODE_HCO, "back to HCO-mode");
    for (int i = 0; i < 200; i++) group(32'h0000_4000 + 32'(64 * (i % 16)), 1'($urandom_range(0, 1)), 2);
    $display("to SY %0d, to HCO %0d, drain cycles %0d, recoveries %0d, bol %0d",
             n_to_sy, n_to_hco, n_drain_cycles, n_recover, bol);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

