// tb_split_fpcm_cracker: random instructions with random group decisions and random
// back-pressure. Every micro-op leaving the cracker is compared with the expected sequence
// (one OP / CHECK / NOP, or OP-to-temporary then SELECT for an unpredicted guard). A
// final phase without back-pressure checks the rate: one micro-op per cycle, so N
// instructions of which S are split take N + S cycles.
module tb_split_fpcm_cracker;
  import bobg_pkg::*;
  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready, in_guarded, in_first, in_use, in_known, in_value, in_bo_hc, in_br_pred;
  instr_t in_instr;
  ckpt_t in_ckpt;
  logic flush, uop_valid, uop_ready, busy;
  uop_t uop;
  int checks = 0, failures = 0;
  int n_split = 0, n_check = 0, n_nop = 0, n_op = 0, n_flush = 0;
  uop_t exp_q [$];

  split_fpcm_cracker dut (.*);

  always #5 clk = ~clk;

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s at %0t", what, $time); end
  endtask

  // expected micro-ops of one instruction
  task automatic expect_uops();
    uop_t b, u2;
    bit g;
    b = '0;
    b.pc = in_instr.pc; b.opcode = in_instr.opcode; b.cond = in_instr.cond;
    b.is_branch = in_instr.is_branch; b.sets_flags = in_instr.sets_flags;
    b.writes_rd = in_instr.writes_rd; b.rd = in_instr.rd; b.rn = in_instr.rn; b.rm = in_instr.rm;
    b.bo_hc = in_bo_hc; b.ckpt = in_ckpt; b.last = 1; b.kind = UOP_OP; b.upd = UPD_NONE;
    g = in_value ^ in_instr.cond[0];
    if (in_instr.is_branch) begin
      b.pred = in_br_pred;
      b.upd = (in_instr.cond == COND_AL || in_instr.cond == COND_NV) ? UPD_NONE : UPD_BRANCH;
      exp_q.push_back(b);
    end else if (!in_guarded) begin
      exp_q.push_back(b);
    end else if (in_use) begin
      b.upd = in_first ? UPD_GUARD_FIRST : UPD_GUARD_MEMBER;
      b.pred = g;
      b.verify = in_first && !in_known;
      if (!g) b.kind = in_first ? UOP_CHECK : UOP_NOP;
      exp_q.push_back(b);
    end else begin
      u2 = b;
      b.last = 0; b.to_tmp = 1; b.rd = TMP_REG;
      u2.kind = UOP_SELECT; u2.rn = TMP_REG; u2.rm = in_instr.rd;
      u2.upd = in_first ? UPD_GUARD_FIRST : UPD_GUARD_MEMBER;
      exp_q.push_back(b);
      exp_q.push_back(u2);
    end
  endtask

  task automatic randomize_in();
    in_instr = '0;
    in_instr.pc = $urandom & 32'hffff_fffc;
    in_instr.opcode = $urandom;
    in_instr.is_branch = $urandom_range(0, 5) == 0;
    in_instr.cond = cond_e'($urandom_range(0, 15));
    in_instr.sets_flags = $urandom_range(0, 3) == 0;
    in_instr.writes_rd = $urandom_range(0, 1);
    in_instr.rd = $urandom_range(0, 15);
    in_instr.rn = $urandom_range(0, 15);
    in_instr.rm = $urandom_range(0, 15);
    in_guarded = !in_instr.is_branch && in_instr.cond[3:1] != 3'd7;
    in_first = $urandom_range(0, 1);
    in_use = $urandom_range(0, 1);
    in_known = $urandom_range(0, 3) == 0;
    in_value = $urandom_range(0, 1);
    in_bo_hc = $urandom_range(0, 1);
    in_br_pred = $urandom_range(0, 1);
    in_ckpt = ckpt_t'({$urandom, $urandom, $urandom});
  endtask

  // compare every micro-op that leaves
  always @(posedge clk) begin
    if (rst_n && !flush && uop_valid && uop_ready) begin
      check(exp_q.size() > 0, "unexpected micro-op");
      if (exp_q.size() > 0) begin
        check(uop == exp_q[0], "micro-op contents");
        case (uop.kind)
          UOP_SELECT: n_split++;
          UOP_CHECK:  n_check++;
          UOP_NOP:    n_nop++;
          default:    n_op++;
        endcase
        void'(exp_q.pop_front());
      end
    end
  end

  initial begin
    int cyc, n_in, n_sp;
    in_valid = 0; flush = 0; uop_ready = 0;
    randomize_in();
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int it = 0; it < 20000; it++) begin
      @(negedge clk);
      uop_ready = $urandom_range(0, 3) != 0;
      flush = $urandom_range(0, 99) == 0;
      if (!in_valid || in_ready) begin
        randomize_in();
        in_valid = $urandom_range(0, 3) != 0;
      end
      #1;
      @(posedge clk);
      if (flush) begin
        exp_q.delete();
        n_flush++;
      end else if (in_valid && in_ready) expect_uops();
      #1;
      if (flush) in_valid = 0;
    end
    // rate phase: no back-pressure, no flush
    @(negedge clk);
    in_valid = 0; flush = 0; uop_ready = 1;
    repeat (4) @(negedge clk);
    exp_q.delete();
    cyc = 0; n_in = 0; n_sp = 0;
    while (n_in < 200) begin
      randomize_in();
      in_valid = 1;
      #1;
      while (!in_ready) begin @(negedge clk); cyc++; #1; end
      expect_uops();
      if (in_guarded && !in_use) n_sp++;
      n_in++;
      @(negedge clk);
      cyc++;
    end
    in_valid = 0;
    while (busy) begin @(negedge clk); cyc++; end
    // one cycle from acceptance to the first micro-op
    check(cyc == n_in + n_sp + 1, "one micro-op per cycle");
    $display("rate: %0d instructions, %0d split, %0d cycles", n_in, n_sp, cyc);
    check(exp_q.size() == 0, "all micro-ops seen");
    check(n_split > 100 && n_check > 100 && n_nop > 100 && n_flush > 50, "coverage");
    $display("op %0d select %0d check %0d nop %0d flush %0d", n_op, n_split, n_check, n_nop, n_flush);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
