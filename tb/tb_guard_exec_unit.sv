// tb_guard_exec_unit: random micro-ops through the execute-stage guard logic. The select
// results, the guard value and the misprediction/redirect outputs are compared with a
// reference written from the ARMv7 condition table.
module tb_guard_exec_unit;
  import bobg_pkg::*;
  logic        valid;
  uop_t        u;
  flags_t      flags, tmp_flags, sel_flags;
  logic [31:0] tmp_val, old_val, sel_val;
  logic        guard, base, mispredict;
  logic [31:0] redirect_pc;
  logic [2:0]  pair;
  int          checks = 0, failures = 0, n_mis = 0;

  guard_exec_unit dut (.valid(valid), .uop(u), .flags(flags), .tmp_val(tmp_val),
    .old_val(old_val), .tmp_flags(tmp_flags), .guard(guard), .base(base),
    .sel_val(sel_val), .sel_flags(sel_flags), .mispredict(mispredict),
    .redirect_pc(redirect_pc), .pair(pair));

  function automatic logic ref_guard(input logic [3:0] c, input flags_t f);
    logic r;
    case (c[3:1])
      3'd0: r = f.z;
      3'd1: r = f.c;
      3'd2: r = f.n;
      3'd3: r = f.v;
      3'd4: r = f.c && !f.z;
      3'd5: r = f.n == f.v;
      3'd6: r = !f.z && (f.n == f.v);
      default: return 1'b1;
    endcase
    return c[0] ? !r : r;
  endfunction

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s cond=%0d flags=%b", what, u.cond, flags);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic g;
    for (int i = 0; i < 2000; i++) begin
      u         = '0;
      u.kind    = uop_kind_e'($urandom_range(0, 3));
      u.cond    = cond_e'($urandom_range(0, 15));
      u.pc      = $urandom;
      u.verify  = $urandom_range(0, 1);
      u.pred    = $urandom_range(0, 1);
      valid     = $urandom_range(0, 7) != 0;
      flags     = flags_t'($urandom_range(0, 15));
      tmp_flags = flags_t'($urandom_range(0, 15));
      tmp_val   = $urandom;
      old_val   = $urandom;
      #1;
      g = ref_guard(u.cond, flags);
      check(guard == g, "guard");
      check(sel_val == (g ? tmp_val : old_val), "select value");
      check(sel_flags == (g ? tmp_flags : flags), "select flags");
      check(mispredict == (valid && u.verify && g != u.pred), "mispredict");
      check(redirect_pc == u.pc, "redirect pc");
      check(pair == u.cond[3:1], "pair");
      if (mispredict) n_mis++;
    end
    check(n_mis > 100, "mispredictions exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
