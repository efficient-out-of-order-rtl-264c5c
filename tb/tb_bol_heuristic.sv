// tb_bol_heuristic: the BoL counter against a reference model of the benefit-or-loss
// rules (penalty 64, 11-bit saturation, +-512 mode hysteresis). Phases of stimuli favour
// SY-mode, then HCO-mode, then random; the counter and the wanted mode are compared every
// cycle, and both mode changes and both saturation limits must be reached.
module tb_bol_heuristic;
  import bobg_pkg::*;
  logic clk = 0, rst_n = 0;
  logic up_valid, pred_bobg, pred_bo, taken, bo_hc;
  upd_kind_e up_kind;
  logic signed [10:0] bol;
  mode_e want_mode;
  int checks = 0, failures = 0;
  int m_bol = 0;
  mode_e m_mode = MODE_HCO;
  int n_to_sy = 0, n_to_hco = 0, n_max = 0, n_min = 0;

  bol_heuristic dut (.*);

  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t bol=%0d model=%0d", what, $time, bol, m_bol); end
  endtask

  // Algorithm: branch / confident guard: +-64 when BO-BG and BO disagree;
  // unconfident guard: +1 per group instruction, -64 if BO-BG wrong on the first.
  function automatic int ref_delta(input upd_kind_e k, input logic bobg, input logic bo,
                                   input logic t, input logic hc);
    int d = 0;
    if (k == UPD_BRANCH || (k == UPD_GUARD_FIRST && hc)) begin
      if (bobg != bo) d = (bobg == t) ? 64 : -64;
    end else if (k == UPD_GUARD_FIRST) begin
      d = 1 + ((bobg != t) ? -64 : 0);
    end else if (k == UPD_GUARD_MEMBER && !hc) begin
      d = 1;
    end
    return d;
  endfunction

  initial begin
    up_valid = 0; up_kind = UPD_NONE; pred_bobg = 0; pred_bo = 0; taken = 0; bo_hc = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 30000; i++) begin
      int phase;
      phase = (i / 2500) % 3;
      @(negedge clk);
      up_valid  = $urandom_range(0, 7) != 0;
      up_kind   = upd_kind_e'($urandom_range(0, 3));
      pred_bo   = $urandom_range(0, 1);
      pred_bobg = $urandom_range(0, 1);
      bo_hc     = $urandom_range(0, 1);
      case (phase)
        0: taken = ($urandom_range(0, 9) != 0) ? pred_bobg : pred_bo;   // BO-BG mostly right
        1: taken = ($urandom_range(0, 9) != 0) ? pred_bo : ~pred_bo;    // BO-BG mostly wrong
        default: taken = $urandom_range(0, 1);
      endcase
      if (phase == 0 && up_kind == UPD_GUARD_FIRST) taken = pred_bobg;
      @(posedge clk);
      if (up_valid) begin
        m_bol += ref_delta(up_kind, pred_bobg, pred_bo, taken, bo_hc);
        if (m_bol > 1023) begin m_bol = 1023; n_max++; end
        if (m_bol < -1024) begin m_bol = -1024; n_min++; end
        if (m_bol > 512 && m_mode == MODE_HCO) begin m_mode = MODE_SY; n_to_sy++; end
        if (m_bol < -512 && m_mode == MODE_SY) begin m_mode = MODE_HCO; n_to_hco++; end
      end
      #1;
      check(int'(bol) == m_bol, "counter");
      check(want_mode == m_mode, "wanted mode");
    end
    check(n_to_sy > 0 && n_to_hco > 0, "both mode changes seen");
    check(n_max > 0 && n_min > 0, "both saturation limits seen");
    $display("mode changes: to SY %0d, to HCO %0d", n_to_sy, n_to_hco);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
