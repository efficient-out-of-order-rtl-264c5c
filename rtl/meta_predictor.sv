// meta_predictor: PC-indexed chooser between the BO and BG components of the BO-BG predictor.
//
// 2**LOG_ENTRIES signed W-bit saturating counters (1024 x 5 bits, as in the design
// description). A counter >= 0 selects the BG (branch-and-guard history) prediction. The
// counter is trained only when the two components disagree: towards BG when BG was right,
// towards BO otherwise. Reset value 0 (weakly BG) is this implementation's choice.
// Lookup is combinational; the update port reads the counter for up_pc combinationally
// (up_use_bg) and writes it at the clock edge when up_valid is high.
module meta_predictor
  import bobg_pkg::*;
#(
  parameter int unsigned LOG_ENTRIES = META_LOG,
  parameter int unsigned W           = META_W
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [PC_W-1:0] lk_pc,
  output logic            lk_use_bg,
  input  logic            up_valid,
  input  logic [PC_W-1:0] up_pc,
  input  logic            up_bo_pred,
  input  logic            up_bg_pred,
  input  logic            up_taken,
  output logic            up_use_bg
);
  localparam logic signed [W-1:0] MAXV = {1'b0, {(W-1){1'b1}}};
  localparam logic signed [W-1:0] MINV = {1'b1, {(W-1){1'b0}}};

  logic signed [W-1:0] mem [2**LOG_ENTRIES];
  logic [LOG_ENTRIES-1:0] lk_idx, up_idx;
  logic signed [W-1:0] cur;

  always_comb begin
    lk_idx    = lk_pc[2 +: LOG_ENTRIES];
    up_idx    = up_pc[2 +: LOG_ENTRIES];
    lk_use_bg = ~mem[lk_idx][W-1];
    cur       = mem[up_idx];
    up_use_bg = ~cur[W-1];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < 2**LOG_ENTRIES; i++) mem[i] <= '0;
    end else if (up_valid && up_bo_pred != up_bg_pred) begin
      if (up_bg_pred == up_taken) begin
        if (cur != MAXV) mem[up_idx] <= cur + 1'b1;
      end else begin
        if (cur != MINV) mem[up_idx] <= cur - 1'b1;
      end
    end
  end
endmodule
