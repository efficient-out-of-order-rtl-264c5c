// tage_predictor: one TAGE component of the BO-BG predictor (used twice: the BO component
// is fed the branch-only history, the BG component the branch-and-guard history).
//
// A 2-bit bimodal base table and NTAB tagged tables indexed with the PC hashed with
// geometrically growing slices of the global history (4 .. 640 outcomes). The provider is
// the matching table with the longest history, the alternate the next one (or the base).
// Each tagged entry holds a 3-bit signed counter, a tag and a 2-bit useful counter.
//
// Confidence (storage-free, from the counters): a prediction is high confidence when its
// counter is saturated. For guards, a correct prediction made by a counter at 1, 2, -2 or
// -3 strengthens that counter only with probability 1/32 (a 5-bit slice of an LFSR equal
// to zero), so only guards that keep being right reach the saturated, high-confidence
// states. Those two rules follow the design description; the table geometry, hashing,
// allocation and useful-bit aging are the usual TAGE choices made here.
//
// Two ports. Lookup: combinational, prediction and confidence for lk_pc with the given
// history in the same cycle. Update: the entry state is re-read for up_pc with the
// commit-time history (so it is the prediction the component gives on the correct path),
// up_pred/up_hc show it combinationally, and the tables are written at the clock edge when
// up_valid is high (ignored until `ready`). Every 2**U_RESET_LOG updates all useful
// counters are halved, one index per cycle in the background.
module tage_predictor
  import bobg_pkg::*;
#(
  parameter int unsigned NTAB        = TAGE_NTAB,
  parameter int unsigned LOG_T       = TAGE_LOG_T,
  parameter int unsigned LOG_BASE    = TAGE_LOG_BASE,
  parameter int unsigned TAG_W       = TAGE_TAG_W,
  parameter int unsigned HLEN        = HIST_LEN,
  parameter int unsigned U_RESET_LOG = 18,
  parameter logic [15:0] LFSR_SEED   = 16'hACE1
) (
  input  logic            clk,
  input  logic            rst_n,
  // lookup (fetch time, speculative history)
  input  logic [PC_W-1:0] lk_pc,
  input  logic [HLEN-1:0] lk_hist,
  output logic            lk_pred,
  output logic            lk_hc,
  // update (commit time, non-speculative history)
  input  logic            up_valid,
  input  logic [PC_W-1:0] up_pc,
  input  logic [HLEN-1:0] up_hist,
  input  logic            up_taken,
  input  logic            up_is_guard,
  output logic            up_pred,
  output logic            up_hc,
  output logic            ready      // tables initialised (2**max(LOG_BASE,LOG_T) cycles after reset)
);
  localparam int unsigned CW = TAGE_CTR_W;
  localparam int unsigned UW = TAGE_U_W;
  localparam logic signed [CW-1:0] CMAX = 3;
  localparam logic signed [CW-1:0] CMIN = -4;

  function automatic logic [HLEN-1:0] fold_mask(input int unsigned len, input int unsigned w,
                                                input int unsigned b);
    logic [HLEN-1:0] m;
    m = '0;
    for (int unsigned i = 0; i < HLEN; i++)
      if (i < len && (i % w) == b) m[i] = 1'b1;
    return m;
  endfunction

  // ---------------- storage ----------------
  logic [1:0]               base_mem [2**LOG_BASE];
  logic signed [CW-1:0]     ctr_mem  [NTAB][2**LOG_T];
  logic [TAG_W-1:0]         tag_mem  [NTAB][2**LOG_T];
  logic [UW-1:0]            u_mem    [NTAB][2**LOG_T];

  // ---------------- hashing ----------------
  logic [NTAB-1:0][LOG_T-1:0] lk_fi, up_fi;
  logic [NTAB-1:0][TAG_W-1:0] lk_ft, up_ft;
  logic [NTAB-1:0][TAG_W-2:0] lk_ft2, up_ft2;

  for (genvar t = 0; t < NTAB; t++) begin : g_fold
    localparam int unsigned L = (tage_hlen(t) < HLEN) ? tage_hlen(t) : HLEN;
    for (genvar b = 0; b < LOG_T; b++) begin : g_i
      localparam logic [HLEN-1:0] M = fold_mask(L, LOG_T, b);
      assign lk_fi[t][b] = ^(lk_hist & M);
      assign up_fi[t][b] = ^(up_hist & M);
    end
    for (genvar b = 0; b < TAG_W; b++) begin : g_t
      localparam logic [HLEN-1:0] M = fold_mask(L, TAG_W, b);
      assign lk_ft[t][b] = ^(lk_hist & M);
      assign up_ft[t][b] = ^(up_hist & M);
    end
    for (genvar b = 0; b < TAG_W - 1; b++) begin : g_t2
      localparam logic [HLEN-1:0] M = fold_mask(L, TAG_W - 1, b);
      assign lk_ft2[t][b] = ^(lk_hist & M);
      assign up_ft2[t][b] = ^(up_hist & M);
    end
  end

  logic [PC_W-1:0] lk_pcs, up_pcs;
  logic [LOG_T-1:0] lk_idx [NTAB], up_idx [NTAB];
  logic [TAG_W-1:0] lk_tag [NTAB], up_tag [NTAB];
  logic [LOG_BASE-1:0] lk_bidx, up_bidx;

  always_comb begin
    lk_pcs  = lk_pc >> 2;
    up_pcs  = up_pc >> 2;
    lk_bidx = lk_pcs[LOG_BASE-1:0];
    up_bidx = up_pcs[LOG_BASE-1:0];
    for (int t = 0; t < NTAB; t++) begin
      lk_idx[t] = lk_pcs[LOG_T-1:0] ^ lk_pcs[2*LOG_T-1:LOG_T] ^ lk_fi[t];
      up_idx[t] = up_pcs[LOG_T-1:0] ^ up_pcs[2*LOG_T-1:LOG_T] ^ up_fi[t];
      lk_tag[t] = lk_pcs[TAG_W-1:0] ^ lk_ft[t] ^ {lk_ft2[t], 1'b0};
      up_tag[t] = up_pcs[TAG_W-1:0] ^ up_ft[t] ^ {up_ft2[t], 1'b0};
    end
  end

  // ---------------- lookup ----------------
  int lk_prov;
  logic signed [CW-1:0] lk_ctr;
  logic [1:0] lk_base;

  always_comb begin
    lk_prov = -1;
    for (int t = 0; t < NTAB; t++)
      if (tag_mem[t][lk_idx[t]] == lk_tag[t]) lk_prov = t;
    lk_base = base_mem[lk_bidx];
    lk_ctr  = '0;
    if (lk_prov >= 0) begin
      lk_ctr  = ctr_mem[lk_prov][lk_idx[lk_prov]];
      lk_pred = ~lk_ctr[CW-1];
      lk_hc   = (lk_ctr == CMAX) || (lk_ctr == CMIN);
    end else begin
      lk_pred = lk_base[1];
      lk_hc   = (lk_base == 2'd0) || (lk_base == 2'd3);
    end
  end

  // ---------------- update ----------------
  int up_prov, up_alt, alloc;
  logic signed [CW-1:0] up_ctr;
  logic [1:0] up_base;
  logic alt_pred, correct, slow_strengthen;
  logic [15:0] lfsr;
  logic [U_RESET_LOG-1:0] age_cnt;

  logic                 we_ctr [NTAB];
  logic signed [CW-1:0] wd_ctr [NTAB];
  logic                 we_tag [NTAB];
  logic [UW-1:0]        wd_u   [NTAB];
  logic                 we_u   [NTAB];
  logic                 we_base;
  logic [1:0]           wd_base;

  always_comb begin
    up_prov = -1;
    up_alt  = -1;
    for (int t = 0; t < NTAB; t++)
      if (tag_mem[t][up_idx[t]] == up_tag[t]) begin
        up_alt  = up_prov;
        up_prov = t;
      end
    up_base  = base_mem[up_bidx];
    up_ctr   = '0;
    alt_pred = (up_alt >= 0) ? ~ctr_mem[up_alt][up_idx[up_alt]][CW-1] : up_base[1];
    if (up_prov >= 0) begin
      up_ctr  = ctr_mem[up_prov][up_idx[up_prov]];
      up_pred = ~up_ctr[CW-1];
      up_hc   = (up_ctr == CMAX) || (up_ctr == CMIN);
    end else begin
      up_pred = up_base[1];
      up_hc   = (up_base == 2'd0) || (up_base == 2'd3);
    end
    correct = (up_pred == up_taken);

    // first free (useful == 0) table above the provider, for allocation
    alloc = -1;
    for (int t = NTAB - 1; t >= 0; t--)
      if (t > up_prov && u_mem[t][up_idx[t]] == '0) alloc = t;

    // guards: strengthening from 1, 2, -2, -3 happens only with probability 1/32
    slow_strengthen = up_is_guard && correct && up_prov >= 0 &&
                      (up_ctr == 3'sd1 || up_ctr == 3'sd2 || up_ctr == -3'sd2 || up_ctr == -3'sd3);

    we_base = 1'b0;
    wd_base = up_base;
    if (up_prov < 0) begin
      we_base = 1'b1;
      if (up_taken && up_base != 2'd3) wd_base = up_base + 2'd1;
      if (!up_taken && up_base != 2'd0) wd_base = up_base - 2'd1;
    end

    for (int t = 0; t < NTAB; t++) begin
      we_ctr[t] = 1'b0;
      wd_ctr[t] = ctr_mem[t][up_idx[t]];
      we_tag[t] = 1'b0;
      we_u[t]   = 1'b0;
      wd_u[t]   = u_mem[t][up_idx[t]];
      if (t == up_prov) begin
        if (!slow_strengthen || lfsr[4:0] == 5'd0) begin
          we_ctr[t] = 1'b1;
          if (up_taken && wd_ctr[t] != CMAX) wd_ctr[t] = wd_ctr[t] + 3'sd1;
          if (!up_taken && wd_ctr[t] != CMIN) wd_ctr[t] = wd_ctr[t] - 3'sd1;
        end
        if (up_pred != alt_pred) begin
          we_u[t] = 1'b1;
          if (correct && wd_u[t] != '1) wd_u[t] = wd_u[t] + 1'b1;
          if (!correct && wd_u[t] != '0) wd_u[t] = wd_u[t] - 1'b1;
        end
      end else if (!correct && t > up_prov) begin
        if (t == alloc) begin
          we_ctr[t] = 1'b1;
          wd_ctr[t] = up_taken ? 3'sd0 : -3'sd1;
          we_tag[t] = 1'b1;
          we_u[t]   = 1'b1;
          wd_u[t]   = '0;
        end else if (alloc < 0 && wd_u[t] != '0) begin
          we_u[t] = 1'b1;
          wd_u[t] = wd_u[t] - 1'b1;
        end
      end
    end
  end

  // ---------------- initialisation and useful-counter aging ----------------
  // After reset the tables are written one index per cycle (2**INIT_LOG cycles); `ready`
  // rises when that is done. Aging halves the useful counters of one index of every
  // tagged table per cycle; update-driven useful-counter writes are dropped meanwhile.
  localparam int unsigned INIT_LOG = (LOG_BASE > LOG_T) ? LOG_BASE : LOG_T;
  logic [INIT_LOG:0] init_cnt;
  logic              age_busy;
  logic [LOG_T-1:0]  age_ptr;

  assign ready = init_cnt[INIT_LOG];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      init_cnt <= '0;
      lfsr     <= LFSR_SEED;
      age_cnt  <= '0;
      age_busy <= 1'b0;
      age_ptr  <= '0;
    end else if (!ready) begin
      init_cnt <= init_cnt + 1'b1;
      if (init_cnt < (INIT_LOG+1)'(2**LOG_BASE)) base_mem[init_cnt[LOG_BASE-1:0]] <= 2'd2;
      if (init_cnt < (INIT_LOG+1)'(2**LOG_T))
        for (int t = 0; t < NTAB; t++) begin
          ctr_mem[t][init_cnt[LOG_T-1:0]] <= '0;
          tag_mem[t][init_cnt[LOG_T-1:0]] <= '0;
          u_mem[t][init_cnt[LOG_T-1:0]]   <= '0;
        end
    end else begin
      if (age_busy) begin
        for (int t = 0; t < NTAB; t++) u_mem[t][age_ptr] <= u_mem[t][age_ptr] >> 1;
        age_ptr <= age_ptr + 1'b1;
        if (age_ptr == '1) age_busy <= 1'b0;
      end
      if (up_valid) begin
        lfsr    <= {1'b0, lfsr[15:1]} ^ (lfsr[0] ? 16'hB400 : 16'h0000);
        age_cnt <= age_cnt + 1'b1;
        if (age_cnt == '1) age_busy <= 1'b1;
        if (we_base) base_mem[up_bidx] <= wd_base;
        for (int t = 0; t < NTAB; t++) begin
          if (we_ctr[t]) ctr_mem[t][up_idx[t]] <= wd_ctr[t];
          if (we_tag[t]) tag_mem[t][up_idx[t]] <= up_tag[t];
          if (we_u[t] && !age_busy) u_mem[t][up_idx[t]] <= wd_u[t];
        end
      end
    end
  end
endmodule
