// tb_tage_predictor: behavioural checks of one TAGE component at its full size.
//  1. table initialisation: `ready` rises exactly 4096 cycles after reset;
//  2. learning: a branch repeating taken-taken-not-taken (needs history) must be predicted
//     at least 97% right after warm-up, and lookup and update ports agree;
//  3. confidence: an always-not-taken branch reaches a saturated (high-confidence) tagged
//     counter within a few updates, while guards strengthen with probability 1/32 from
//     1, 2, -2, -3 and so need many more (averaged over 8 PCs).
module tb_tage_predictor;
  import bobg_pkg::*;
  localparam int HL = HIST_LEN;
  logic clk = 0, rst_n = 0;
  logic [31:0] lk_pc, up_pc;
  logic [HL-1:0] lk_hist, up_hist, h;
  logic lk_pred, lk_hc, up_valid, up_taken, up_is_guard, up_pred, up_hc, ready;
  int checks = 0, failures = 0;

  tage_predictor dut (.*);

  always #5 clk = ~clk;

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // one commit-time update of (pc, outcome) with history h; returns the prediction first
  task automatic do_update(input logic [31:0] pc, input logic t, input logic guard,
                           output logic p, output logic hc);
    @(negedge clk);
    lk_pc = pc; lk_hist = h; up_pc = pc; up_hist = h; up_taken = t; up_is_guard = guard;
    up_valid = 1;
    #1;
    p = up_pred; hc = up_hc;
    checks++;
    if (lk_pred != up_pred || lk_hc != up_hc) failures++;
    @(posedge clk);
    #1 up_valid = 0;
  endtask

  initial begin
    int cyc, correct, n;
    int br_sum, gd_sum;
    logic p, hc, t;
    up_valid = 0; lk_pc = 0; up_pc = 0; lk_hist = '0; up_hist = '0; up_taken = 0;
    up_is_guard = 0; h = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    cyc = 0;
    while (!ready) begin @(posedge clk); #1; cyc++; end
    check(cyc == 4096, "initialisation time");

    // 2. period-3 pattern
    correct = 0;
    for (int i = 0; i < 3000; i++) begin
      t = (i % 3) != 2;
      do_update(32'h0000_1000, t, 0, p, hc);
      if (i >= 2500 && p == t) correct++;
      h = {h[HL-2:0], t};
    end
    $display("period-3 accuracy %0d/500", correct);
    check(correct >= 485, "period-3 pattern learned");

    // 3. confidence with a fixed history
    h = '0;
    br_sum = 0; gd_sum = 0;
    for (int k = 0; k < 8; k++) begin
      n = 0;
      do begin do_update(32'h0004_0004 + 64 * k, 0, 0, p, hc); n++; end while (!(hc && !p) && n < 1000);
      br_sum += n;
      n = 0;
      do begin do_update(32'h0008_0024 + 64 * k, 0, 1, p, hc); n++; end while (!(hc && !p) && n < 1000);
      check(n < 1000, "guard reaches high confidence");
      gd_sum += n;
    end
    $display("updates to high confidence: branches %0d, guards %0d (8 PCs each)", br_sum, gd_sum);
    check(br_sum <= 8 * 5, "branches become confident quickly");
    check(gd_sum >= 8 * 20, "guards become confident slowly");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
