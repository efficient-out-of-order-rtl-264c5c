// tb_guard_eval: exhaustive check of the condition-code evaluator: all 16 condition codes
// against all 16 NZCV flag combinations, compared with the ARMv7 condition table written
// out mnemonic by mnemonic.
module tb_guard_eval;
  import bobg_pkg::*;
  cond_e  cond;
  flags_t flags;
  logic   base, guard;
  int     checks = 0, failures = 0;

  guard_eval dut (.cond(cond), .flags(flags), .base(base), .guard(guard));

  function automatic logic ref_guard(input logic [3:0] c, input flags_t f);
    case (c)
      4'd0:  return f.z;
      4'd1:  return !f.z;
      4'd2:  return f.c;
      4'd3:  return !f.c;
      4'd4:  return f.n;
      4'd5:  return !f.n;
      4'd6:  return f.v;
      4'd7:  return !f.v;
      4'd8:  return f.c && !f.z;
      4'd9:  return !f.c || f.z;
      4'd10: return f.n == f.v;
      4'd11: return f.n != f.v;
      4'd12: return !f.z && (f.n == f.v);
      4'd13: return f.z || (f.n != f.v);
      default: return 1'b1;
    endcase
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 16; c++)
      for (int f = 0; f < 16; f++) begin
        cond  = cond_e'(c);
        flags = flags_t'(f);
        #1;
        checks++;
        if (guard !== ref_guard(4'(c), flags_t'(f))) begin
          failures++;
          $display("FAIL cond=%0d flags=%b guard=%b", c, f, guard);
        end
        if (c < 14) begin
          checks++;
          if (base !== ref_guard({c[3:1], 1'b0}, flags_t'(f))) begin
            failures++;
            $display("FAIL base cond=%0d flags=%b", c, f);
          end
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
