// tb_bobg_frontend: end-to-end run of the guard-predicting front end at its full size.
//
// The testbench is the rest of a small core: it fetches from a program (one instruction
// per cycle, stalling after a branch until the front end has predicted it), keeps the
// micro-ops in an in-order window and executes the oldest one after a fixed latency, so
// that younger work is in flight when a misprediction is found. Branch mispredictions are
// recovered through br_*, guard mispredictions through the guard check (ex_*), and every
// executed micro-op is committed through cm_*.
//
// The program has three loops: A (guards that repeat every fourth iteration, learnable only
// from the guard history) drives the predictor into SY-mode; B (guards on pseudo-random
// data) drives it back to HCO-mode, where they are split; C repeats A. The final register
// file and flags must equal those of an instruction-set model of the same program, and
// each mechanism (both modes, the drain, split micro-ops, checks, dropped members, both
// recoveries, refetched group heads, decode stalls) must have happened.
module tb_bobg_frontend;
  import bobg_pkg::*;

  localparam int NPROG = 128;
  localparam int LAT = 6;           // cycles from entering the window to execution
  localparam int ITER = 300;        // iterations of each loop
  localparam logic [7:0] OP_ADD = 0, OP_SUB = 1, OP_EOR = 2, OP_MUL = 3, OP_AND = 4,
                         OP_CMP = 5, OP_B = 6;

  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready, uop_valid, uop_ready, ex_valid, ex_guard, ex_base;
  instr_t in_instr;
  uop_t uop, ex_uop;
  flags_t ex_flags, ex_tmp_flags, ex_sel_flags;
  logic [31:0] ex_tmp_val, ex_old_val, ex_sel_val, redirect_pc, cm_pc;
  logic redirect_valid, br_mispredict, br_taken, cm_valid, cm_outcome, cm_bo_hc, backend_empty;
  ckpt_t br_ckpt;
  upd_kind_e cm_kind;
  mode_e mode;
  logic drain_req;
  logic signed [10:0] bol;

  bobg_frontend dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  instr_t prog [NPROG];
  logic [31:0] target [NPROG];
  int prog_len;
  logic [31:0] end_pc;

  // ---------------- program ----------------
  function automatic instr_t mk(input int op, input int c, input int rd, input int rn,
                                input int rm);
    instr_t i = '0;
    i.opcode = 8'(op);
    i.cond = cond_e'(c);
    i.is_branch = (op == OP_B);
    i.sets_flags = (op == OP_CMP);
    i.writes_rd = !(op == OP_CMP || op == OP_B);
    i.rd = 5'(rd); i.rn = 5'(rn); i.rm = 5'(rm);
    return i;
  endfunction

  task automatic emit(input instr_t i, input int tgt = 0);
    i.pc = 32'(prog_len * 4);
    prog[prog_len] = i;
    target[prog_len] = 32'(tgt * 4);
    prog_len++;
  endtask

  // r10 is the loop counter, r12 the phase counter of loop A
  task automatic loop_a(input int iters_reg);
    int top;
    emit(mk(OP_SUB, COND_AL, 10, 10, 10));
    top = prog_len;
    emit(mk(OP_ADD, COND_AL, 12, 12, 15));
    emit(mk(OP_AND, COND_AL, 12, 12, 14));
    emit(mk(OP_CMP, COND_AL, 0, 12, 0));       // Z every fourth iteration
    emit(mk(OP_ADD, COND_EQ, 6, 6, 1));
    emit(mk(OP_ADD, COND_NE, 7, 7, 15));
    emit(mk(OP_EOR, COND_EQ, 8, 8, 6));
    emit(mk(OP_ADD, COND_NE, 9, 9, 12));
    emit(mk(OP_SUB, COND_EQ, 5, 5, 12));
    emit(mk(OP_EOR, COND_NE, 2, 2, 7));
    emit(mk(OP_ADD, COND_EQ, 5, 5, 15));
    emit(mk(OP_SUB, COND_NE, 2, 2, 14));
    emit(mk(OP_MUL, COND_AL, 1, 1, 3));
    emit(mk(OP_ADD, COND_AL, 1, 1, 4));
    emit(mk(OP_ADD, COND_AL, 10, 10, 15));
    emit(mk(OP_CMP, COND_AL, 0, 10, iters_reg));
    emit(mk(OP_B, COND_NE, 0, 0, 0), top);
  endtask

  task automatic loop_b(input int iters_reg);
    int top;
    emit(mk(OP_SUB, COND_AL, 10, 10, 10));
    top = prog_len;
    emit(mk(OP_MUL, COND_AL, 1, 1, 3));
    emit(mk(OP_ADD, COND_AL, 1, 1, 4));
    emit(mk(OP_CMP, COND_AL, 0, 1, 13));       // C = top bit of the LCG state
    emit(mk(OP_ADD, COND_CS, 6, 6, 1));
    emit(mk(OP_ADD, COND_CC, 7, 7, 1));
    emit(mk(OP_EOR, COND_CS, 8, 8, 1));
    emit(mk(OP_SUB, COND_CC, 9, 9, 15));
    emit(mk(OP_ADD, COND_CS, 2, 2, 15));
    emit(mk(OP_ADD, COND_AL, 10, 10, 15));
    emit(mk(OP_CMP, COND_AL, 0, 10, iters_reg));
    emit(mk(OP_B, COND_NE, 0, 0, 0), top);
  endtask

  // ---------------- instruction-set model ----------------
  function automatic logic cond_true(input cond_e c, input flags_t f);
    case (c)
      COND_EQ: return f.z;          COND_NE: return !f.z;
      COND_CS: return f.c;          COND_CC: return !f.c;
      COND_MI: return f.n;          COND_PL: return !f.n;
      COND_VS: return f.v;          COND_VC: return !f.v;
      COND_HI: return f.c && !f.z;  COND_LS: return !f.c || f.z;
      COND_GE: return f.n == f.v;   COND_LT: return f.n != f.v;
      COND_GT: return !f.z && f.n == f.v;
      COND_LE: return f.z || f.n != f.v;
      default: return 1'b1;
    endcase
  endfunction

  function automatic logic [31:0] alu(input logic [7:0] op, input logic [31:0] a, input logic [31:0] b);
    case (op)
      OP_ADD: return a + b;
      OP_SUB: return a - b;
      OP_EOR: return a ^ b;
      OP_MUL: return a * b;
      OP_AND: return a & b;
      default: return '0;
    endcase
  endfunction

  function automatic flags_t cmp_flags(input logic [31:0] a, input logic [31:0] b);
    flags_t f;
    logic [31:0] r = a - b;
    f.n = r[31];
    f.z = (r == 0);
    f.c = (a >= b);
    f.v = (a[31] != b[31]) && (r[31] != a[31]);
    return f;
  endfunction

  logic [31:0] init_regs [17];
  logic [31:0] gold_regs [17];
  flags_t gold_flags;
  int gold_count;

  task automatic golden();
    int pc = 0;
    instr_t i;
    gold_regs = init_regs;
    gold_flags = '0;
    gold_count = 0;
    while (pc != int'(end_pc)) begin
      i = prog[pc / 4];
      gold_count++;
      if (cond_true(i.cond, gold_flags)) begin
        if (i.is_branch) begin pc = int'(target[pc / 4]); continue; end
        if (i.sets_flags) gold_flags = cmp_flags(gold_regs[i.rn], gold_regs[i.rm]);
        if (i.writes_rd) gold_regs[i.rd] = alu(i.opcode, gold_regs[i.rn], gold_regs[i.rm]);
      end
      pc += 4;
    end
  endtask

  // ---------------- core model ----------------
  typedef struct { uop_t u; int enq; } rob_t;
  rob_t rob [$];
  logic [31:0] regs [17];
  flags_t flags, tflags;
  logic [31:0] fetch_pc;
  logic wait_br;
  logic [31:0] wait_pc;
  int cyc = 0, committed = 0;

  // mechanism counters
  int n_sy = 0, n_hco = 0, n_drain = 0, n_select = 0, n_check = 0, n_nop = 0, n_unguarded = 0;
  int n_gmis = 0, n_bmis = 0, n_refetch_first = 0, n_stall = 0, n_verify_ok = 0;

  initial begin
    #2000000000;
    failures++;
    $display("watchdog: committed %0d", committed);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at cycle %0d", what, cyc); end
  endtask

  initial begin
    mode_e last_mode;
    int idle;
    logic exec, commit, flush, act, g_mis, b_mis;
    uop_t u;
    logic [31:0] sel_val;
    flags_t sel_flags;

    // registers: r0 = 0, r3/r4 LCG constants, r11 loop bound, r13 = 2^31, r14 = 3, r15 = 1
    for (int r = 0; r < 17; r++) init_regs[r] = 32'(r * 7);
    init_regs[0] = 0; init_regs[1] = 32'h1234_5678; init_regs[3] = 1103515245;
    init_regs[4] = 12345; init_regs[13] = 32'h8000_0000; init_regs[14] = 3; init_regs[15] = 1;
    init_regs[12] = 0;
    init_regs[11] = ITER;   // loop bound, never written by the loops
    prog_len = 0;
    loop_a(11);
    loop_b(11);
    loop_a(11);
    end_pc = 32'(prog_len * 4);
    golden();

    regs = init_regs; flags = '0; tflags = '0;
    fetch_pc = 0; wait_br = 0; wait_pc = 0;
    in_valid = 0; in_instr = '0; uop_ready = 0; ex_valid = 0; ex_uop = '0; ex_flags = '0;
    ex_tmp_flags = '0; ex_tmp_val = 0; ex_old_val = 0; br_mispredict = 0; br_ckpt = '0;
    br_taken = 0; cm_valid = 0; cm_kind = UPD_NONE; cm_pc = 0; cm_outcome = 0; cm_bo_hc = 0;
    backend_empty = 1;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    last_mode = MODE_HCO;
    idle = 0;

    while (idle < 20) begin
      @(negedge clk);
      cyc++;
      // ---- execute / commit the oldest micro-op ----
      exec = rob.size() > 0 && (cyc - rob[0].enq) >= LAT;
      ex_valid = exec; br_mispredict = 0; cm_valid = 0; g_mis = 0; b_mis = 0;
      u = exec ? rob[0].u : '0;
      ex_uop = u; ex_flags = flags; ex_tmp_flags = tflags;
      ex_tmp_val = regs[TMP_REG]; ex_old_val = regs[u.rd > 16 ? 0 : u.rd];
      br_taken = 0;
      if (exec && u.is_branch) begin
        br_taken = cond_true(u.cond, flags);
        if (u.cond != COND_AL && br_taken != u.pred) begin
          b_mis = 1; br_mispredict = 1; br_ckpt = u.ckpt;
        end
      end
      backend_empty = (rob.size() == 0);
      #1;
      g_mis = redirect_valid;
      sel_val = ex_sel_val; sel_flags = ex_sel_flags;
      flush = g_mis || b_mis;
      commit = exec && !g_mis;
      if (commit) begin
        cm_valid = 1; cm_kind = u.upd; cm_pc = u.pc; cm_bo_hc = u.bo_hc;
        cm_outcome = u.is_branch ? br_taken : ex_base;
        if (u.upd == UPD_GUARD_FIRST && u.kind != UOP_SELECT) begin
          if (u.verify) n_verify_ok++; else n_refetch_first++;
        end
      end
      // ---- fetch ----
      uop_ready = !flush && rob.size() < 32;
      in_valid = !flush && !wait_br && fetch_pc != end_pc;
      in_instr = prog[fetch_pc[31:2] % NPROG];
      #1;
      if (in_valid && !in_ready && !drain_req && dut.crk_busy) n_stall++;
      if (drain_req) n_drain++;
      act = in_valid && in_ready;
      @(posedge clk);
      // ---- state updates ----
      if (commit) begin
        case (u.kind)
          UOP_OP: if (!u.is_branch) begin
            if (u.writes_rd) regs[u.rd] = alu(u.opcode, regs[u.rn], regs[u.rm]);
            if (u.sets_flags) begin
              if (u.to_tmp) tflags = cmp_flags(regs[u.rn], regs[u.rm]);
              else flags = cmp_flags(regs[u.rn], regs[u.rm]);
            end
            if (u.upd != UPD_NONE && !u.to_tmp) n_unguarded++;
          end
          UOP_SELECT: begin
            if (u.writes_rd) regs[u.rd] = sel_val;
            if (u.sets_flags) flags = sel_flags;
            n_select++;
          end
          UOP_CHECK: n_check++;
          default: n_nop++;
        endcase
        if (u.last) committed++;
        void'(rob.pop_front());
      end
      if (flush) begin
        rob.delete();
        wait_br = 0;
        if (g_mis) begin fetch_pc = redirect_pc; n_gmis++; end
        else begin fetch_pc = br_taken ? target[u.pc[31:2]] : u.pc + 4; n_bmis++; end
      end else begin
        if (uop_valid && uop_ready) begin
          rob.push_back('{uop, cyc});
          if (wait_br && uop.is_branch && uop.pc == wait_pc) begin
            wait_br = 0;
            fetch_pc = (uop.cond == COND_AL || uop.pred) ? target[uop.pc[31:2]] : uop.pc + 4;
          end
        end
        if (act) begin
          if (in_instr.is_branch) begin wait_br = 1; wait_pc = in_instr.pc; end
          else fetch_pc = fetch_pc + 4;
        end
      end
      if (mode != last_mode) begin
        if (mode == MODE_SY) n_sy++; else n_hco++;
        last_mode = mode;
      end
      idle = (fetch_pc == end_pc && rob.size() == 0 && !uop_valid) ? idle + 1 : 0;
      if (cyc > 400000) break;
    end

    for (int r = 0; r < 16; r++) check(regs[r] == gold_regs[r], $sformatf("register r%0d", r));
    check(flags == gold_flags, "flags");
    check(committed == gold_count, "committed instruction count");
    $display("committed %0d instructions (model %0d) in %0d cycles", committed, gold_count, cyc);
    $display("mode changes: to SY %0d, to HCO %0d; drain cycles %0d; final BoL %0d",
             n_sy, n_hco, n_drain, bol);
    $display("micro-ops: unguarded %0d, select %0d, check %0d, nop %0d",
             n_unguarded, n_select, n_check, n_nop);
    $display("recoveries: guard %0d, branch %0d; refetched heads %0d; verified heads %0d; split stalls %0d",
             n_gmis, n_bmis, n_refetch_first, n_verify_ok, n_stall);
    check(n_sy >= 2, "SY-mode entered (twice)");
    check(n_hco >= 1, "HCO-mode entered");
    check(n_drain > 0, "pipeline drained for the HCO to SY switch");
    check(n_select > 0, "split FPCM select micro-ops");
    check(n_unguarded > 0, "predicted-true guarded instructions issued unguarded");
    check(n_check > 0, "predicted-false group heads issued as checks");
    check(n_nop > 0, "predicted-false members dropped");
    check(n_gmis > 0, "guard misprediction recovery");
    check(n_bmis > 0, "branch misprediction recovery");
    check(n_refetch_first > 0, "refetched group head with a resolved guard");
    check(n_stall > 0, "decode stall while a split instruction is cracked");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
