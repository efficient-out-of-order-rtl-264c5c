// tb_global_history: random pushes, checkpoint restores (with and without a push in the
// same cycle) and loads against a reference list of outcomes, newest first. The 640-bit
// history window is compared after every cycle.
module tb_global_history;
  localparam int LB = 10, HL = 640, N = 1 << LB;
  logic clk = 0, rst_n = 0;
  logic push, push_bit, restore, load;
  logic [LB-1:0] restore_ptr, load_ptr, ptr;
  logic [N-1:0] load_buf, buf_q;
  logic [HL-1:0] hist;
  int checks = 0, failures = 0, n_restore = 0, n_load = 0;

  // reference: model[0] is the newest outcome
  bit model [$];
  typedef struct { logic [LB-1:0] p; int depth; } ck_t;
  ck_t cks [$];

  global_history #(.LOG_BUF(LB), .HLEN(HL)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [HL-1:0] ref_hist();
    logic [HL-1:0] h = '0;
    for (int i = 0; i < HL && i < model.size(); i++) h[i] = model[i];
    return h;
  endfunction

  initial begin
    push = 0; push_bit = 0; restore = 0; load = 0; restore_ptr = 0; load_ptr = 0; load_buf = '0;
    for (int i = 0; i < HL; i++) model.push_back(1'b0);
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int it = 0; it < 20000; it++) begin
      int r;
      ck_t c;
      @(negedge clk);
      push = 0; restore = 0; load = 0;
      r = $urandom_range(0, 99);
      if (r < 60) begin
        push = 1; push_bit = $urandom_range(0, 1);
        if ($urandom_range(0, 3) == 0) cks.push_back('{ptr, model.size()});
        if (cks.size() > 8) void'(cks.pop_front());
      end else if (r < 70 && cks.size() > 0) begin
        c = cks[$urandom_range(0, cks.size() - 1)];
        // only checkpoints less than N-HL pushes old are valid
        if (model.size() - c.depth < N - HL) begin
          restore = 1; restore_ptr = c.p;
          push = $urandom_range(0, 1); push_bit = $urandom_range(0, 1);
          while (model.size() > c.depth) void'(model.pop_front());
          n_restore++;
        end
        cks.delete();
      end else if (r == 70) begin
        load = 1; load_ptr = $urandom;
        for (int w = 0; w < N; w += 32) load_buf[w +: 32] = $urandom;
        model.delete();
        for (int i = 0; i < N; i++) model.push_back(load_buf[(int'(load_ptr) + i) % N]);
        cks.delete();
        n_load++;
      end
      if (push && !load) model.push_front(push_bit);
      @(posedge clk);
      #1;
      checks++;
      if (hist !== ref_hist()) begin
        failures++;
        if (failures < 5) $display("FAIL it=%0d restore=%b push=%b load=%b", it, restore, push, load);
      end
    end
    checks++;
    if (n_restore < 50 || n_load < 20) failures++;
    $display("restores %0d loads %0d", n_restore, n_load);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
