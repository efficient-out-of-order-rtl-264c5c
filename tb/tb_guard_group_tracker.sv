// tb_guard_group_tracker: a random stream of guarded, unguarded, branch and flag-writing
// instructions, with random predictor answers and occasional recoveries, compared with a
// reference model of guarded groups (one prediction per guard pair until the next flag
// write; reopened with the resolved value after a guard misprediction).
module tb_guard_group_tracker;
  import bobg_pkg::*;
  logic clk = 0, rst_n = 0;
  logic in_valid, in_is_branch, in_sets_flags, need_pred, pred_value, pred_use, pred_bo_hc;
  cond_e in_cond;
  logic guarded, first, use_pred, known, value, bo_hc;
  tracker_t state, rc_state;
  logic rc_valid, rc_set, rc_value, rc_bo_hc;
  logic [2:0] rc_pair;
  int checks = 0, failures = 0, n_first = 0, n_member = 0, n_refetch = 0, n_close = 0;

  // reference
  bit v[7], val[7], us[7], hc[7], kn[7], rf[7];
  tracker_t saved [$];

  guard_group_tracker dut (.*);

  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic tracker_t ref_state();
    tracker_t s;
    for (int p = 0; p < 7; p++) s[p] = '{v[p], val[p], us[p], hc[p], kn[p], rf[p]};
    return s;
  endfunction

  initial begin
    in_valid = 0; in_is_branch = 0; in_sets_flags = 0; in_cond = COND_AL; pred_value = 0;
    pred_use = 0; pred_bo_hc = 0; rc_valid = 0; rc_set = 0; rc_value = 0; rc_bo_hc = 0;
    rc_pair = 0; rc_state = '0;
    for (int p = 0; p < 7; p++) begin v[p] = 0; val[p] = 0; us[p] = 0; hc[p] = 0; kn[p] = 0; rf[p] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int it = 0; it < 20000; it++) begin
      int p;
      bit g, exp_first;
      @(negedge clk);
      rc_valid = ($urandom_range(0, 49) == 0) && saved.size() > 0;
      in_valid = $urandom_range(0, 4) != 0;
      in_cond = cond_e'($urandom_range(0, 3) == 0 ? 14 : $urandom_range(0, 13));
      in_is_branch = $urandom_range(0, 9) == 0;
      in_sets_flags = $urandom_range(0, 7) == 0;
      pred_value = $urandom_range(0, 1);
      pred_use = $urandom_range(0, 1);
      pred_bo_hc = $urandom_range(0, 1);
      if (rc_valid) begin
        rc_state = saved[$urandom_range(0, saved.size() - 1)];
        rc_set = $urandom_range(0, 1);
        rc_pair = $urandom_range(0, 6);
        rc_value = $urandom_range(0, 1);
        rc_bo_hc = $urandom_range(0, 1);
      end
      #1;
      check(state == ref_state(), "state");
      p = in_cond[3:1];
      g = !in_is_branch && p != 7;
      check(guarded == g, "guarded");
      if (g) begin
        exp_first = !v[p] || rf[p];
        check(need_pred == (in_valid && !v[p]), "need_pred");
        check(first == exp_first, "first");
        check(use_pred == (v[p] ? us[p] : pred_use), "use");
        check(value == (v[p] ? val[p] : pred_value), "value");
        check(bo_hc == (v[p] ? hc[p] : pred_bo_hc), "bo_hc");
        check(known == (v[p] && kn[p]), "known");
      end else begin
        check(!need_pred, "no prediction for unguarded");
      end
      saved.push_back(state);
      if (saved.size() > 6) void'(saved.pop_front());
      @(posedge clk);
      if (rc_valid) begin
        for (int q = 0; q < 7; q++) {v[q], val[q], us[q], hc[q], kn[q], rf[q]} = rc_state[q];
        if (rc_set) begin
          v[rc_pair] = 1; val[rc_pair] = rc_value; us[rc_pair] = 1; hc[rc_pair] = rc_bo_hc;
          kn[rc_pair] = 1; rf[rc_pair] = 1; n_refetch++;
        end
      end else if (in_valid) begin
        if (g) begin
          if (!v[p]) begin
            v[p] = 1; val[p] = pred_value; us[p] = pred_use; hc[p] = pred_bo_hc; kn[p] = 0; rf[p] = 0;
            n_first++;
          end else begin
            rf[p] = 0; n_member++;
          end
        end
        if (in_sets_flags) begin
          for (int q = 0; q < 7; q++) begin v[q] = 0; val[q] = 0; us[q] = 0; hc[q] = 0; kn[q] = 0; rf[q] = 0; end
          n_close++;
        end
      end
    end
    check(n_first > 100 && n_member > 100 && n_refetch > 20 && n_close > 100, "coverage");
    $display("first %0d member %0d refetch %0d close %0d", n_first, n_member, n_refetch, n_close);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
