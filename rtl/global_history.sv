// global_history: one global (branch, or branch-and-guard) history kept as a circular
// bit buffer with a head pointer.
//
// A push writes the new outcome one position below the head and moves the head there, so
// the newest bit is always buf[ptr] and older bits follow at increasing addresses. The
// last HLEN outcomes are presented as `hist` with hist[0] the newest. A checkpoint is just
// the pointer: restoring it discards every younger push, as long as fewer than
// 2**LOG_BUF - HLEN pushes happened since (1024 - 640 = 384, more than the in-flight
// branches and guards of a 256-entry reorder buffer). `load` overwrites buffer and pointer
// at once; it is used to copy the commit-time history into the speculative one after the
// pipeline has drained. Priority in one cycle: load, else restore then push.
// Outputs are the registered state; changes take effect at the next clock edge.
module global_history #(
  parameter int unsigned LOG_BUF = bobg_pkg::HBUF_LOG,
  parameter int unsigned HLEN    = bobg_pkg::HIST_LEN
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  push,
  input  logic                  push_bit,
  input  logic                  restore,
  input  logic [LOG_BUF-1:0]    restore_ptr,
  input  logic                  load,
  input  logic [2**LOG_BUF-1:0] load_buf,
  input  logic [LOG_BUF-1:0]    load_ptr,
  output logic [LOG_BUF-1:0]    ptr,
  output logic [2**LOG_BUF-1:0] buf_q,
  output logic [HLEN-1:0]       hist
);
  localparam int unsigned N = 2**LOG_BUF;

  logic [LOG_BUF-1:0] base_ptr, new_ptr;
  logic [2*N-1:0]     doubled;

  always_comb begin
    base_ptr = restore ? restore_ptr : ptr;
    new_ptr  = base_ptr - LOG_BUF'(1);
    doubled  = {buf_q, buf_q} >> ptr;
    hist     = doubled[HLEN-1:0];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ptr   <= '0;
      buf_q <= '0;
    end else if (load) begin
      ptr   <= load_ptr;
      buf_q <= load_buf;
    end else if (push) begin
      ptr            <= new_ptr;
      buf_q[new_ptr] <= push_bit;
    end else if (restore) begin
      ptr <= restore_ptr;
    end
  end

  initial begin
    assert (HLEN < N) else $fatal(1, "history buffer must be longer than the history");
  end
endmodule
