// guard_eval: evaluates an ARMv7 condition code on the NZCV flags.
//
// Each of the seven guard pairs has one flag formula (EQ: Z, CS: C, MI: N, VS: V,
// HI: C and not Z, GE: N == V, GT: not Z and N == V); the odd code of a pair is the
// negation. AL is always true. The encoding NV (1111) is not a condition in ARMv7 and is
// treated as always true here, which is this implementation's choice.
// Purely combinational; `base` is the pair's formula, `guard` the condition itself.
module guard_eval
  import bobg_pkg::*;
(
  input  cond_e  cond,
  input  flags_t flags,
  output logic   base,   // value of the pair's flag formula
  output logic   guard   // value of the condition
);
  always_comb begin
    unique case (cond[3:1])
      3'd0: base = flags.z;
      3'd1: base = flags.c;
      3'd2: base = flags.n;
      3'd3: base = flags.v;
      3'd4: base = flags.c & ~flags.z;
      3'd5: base = (flags.n == flags.v);
      3'd6: base = ~flags.z & (flags.n == flags.v);
      default: base = 1'b1;
    endcase
    guard = (cond[3:1] == 3'd7) ? 1'b1 : (base ^ cond[0]);
  end
endmodule
