// tb_meta_predictor: random updates against a reference array of saturating counters.
// After every update the chooser output for the updated PC and for a random PC is compared
// with the reference (counter >= 0 selects BG).
module tb_meta_predictor;
  import bobg_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [31:0] lk_pc, up_pc;
  logic lk_use_bg, up_valid, up_bo_pred, up_bg_pred, up_taken, up_use_bg;
  int checks = 0, failures = 0, n_sat = 0;
  int model [1024];

  meta_predictor dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    int idx;
    for (int i = 0; i < 1024; i++) model[i] = 0;
    up_valid = 0; lk_pc = 0; up_pc = 0; up_bo_pred = 0; up_bg_pred = 0; up_taken = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 20000; i++) begin
      @(negedge clk);
      // few PCs so that counters saturate
      up_pc      = {$urandom_range(0, 15), 2'b00} + (($urandom_range(0, 1)) << 12);
      up_bo_pred = $urandom_range(0, 1);
      up_bg_pred = $urandom_range(0, 1);
      // BG right 3 times out of 4 on even slots, BO right on odd slots
      up_taken   = (up_pc[2] == 0) ? (($urandom_range(0, 3) != 0) ? up_bg_pred : ~up_bg_pred)
                                   : (($urandom_range(0, 3) != 0) ? up_bo_pred : ~up_bo_pred);
      up_valid   = $urandom_range(0, 3) != 0;
      idx = up_pc[11:2];
      #1;
      check(up_use_bg == (model[idx] >= 0), "update-port read");
      @(posedge clk);
      if (up_valid && up_bo_pred != up_bg_pred) begin
        if (up_bg_pred == up_taken) begin if (model[idx] < 15) model[idx]++; else n_sat++; end
        else begin if (model[idx] > -16) model[idx]--; else n_sat++; end
      end
      @(negedge clk);
      up_valid = 0;
      lk_pc = up_pc;
      #1;
      check(lk_use_bg == (model[idx] >= 0), "lookup after update");
      lk_pc = $urandom;
      #1;
      check(lk_use_bg == (model[lk_pc[11:2]] >= 0), "lookup random pc");
    end
    check(n_sat > 100, "saturation exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

