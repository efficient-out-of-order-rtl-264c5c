// bobg_pkg: types and constants shared by the BO-BG guard/branch prediction front end.
//
// The front end predicts both conditional branches and the guards (ARMv7 condition codes)
// of guarded instructions. Guards are evaluated from the four NZCV flags; the fourteen
// conditional guards form seven pairs (a guard and its opposite share one flag formula),
// so a guard is identified by its pair number cond[3:1] and its polarity cond[0].
//
// Sizes that come from the design description: 1 base + 12 tagged TAGE tables per component,
// a 1024-entry 5-bit META chooser, an 11-bit BoL counter with a +-512 hysteresis and a Penalty
// of 64. Table sizes, tag width, history lengths and the history buffer depth are this
// implementation's choices (about 16K entries and ~212 Kbit per TAGE component, within the
// 256 Kbit budget).
package bobg_pkg;

  localparam int unsigned PC_W = 32;
  localparam int unsigned REG_W = 5;     // r0..r15 architectural, 16+ for temporaries
  localparam int unsigned NPAIR = 7;     // guard pairs EQ/NE .. GT/LE
  localparam logic [REG_W-1:0] TMP_REG = 5'd16;  // temporary written by a split operation

  // ---------------- TAGE geometry (per component) ----------------
  localparam int unsigned TAGE_NTAB     = 12;   // tagged tables
  localparam int unsigned TAGE_LOG_T    = 10;   // 1K entries per tagged table
  localparam int unsigned TAGE_LOG_BASE = 12;   // 4K-entry bimodal base table
  localparam int unsigned TAGE_TAG_W    = 12;
  localparam int unsigned TAGE_CTR_W    = 3;
  localparam int unsigned TAGE_U_W      = 2;
  localparam int unsigned HIST_LEN      = 640;  // longest history used
  localparam int unsigned HBUF_LOG      = 10;   // 1024-bit circular history buffer

  // Geometric history lengths 4 .. 640 (ratio ~1.586)
  function automatic int unsigned tage_hlen(input int unsigned t);
    case (t)
      0: return 4;     1: return 6;     2: return 10;    3: return 16;
      4: return 25;    5: return 40;    6: return 64;    7: return 101;
      8: return 160;   9: return 254;   10: return 403;  default: return 640;
    endcase
  endfunction

  // ---------------- BoL / META ----------------
  localparam int unsigned META_LOG   = 10;
  localparam int unsigned META_W     = 5;
  localparam int unsigned BOL_W      = 11;
  localparam int          BOL_THRESH = 512;
  localparam int          BOL_PENALTY = 64;

  // ---------------- guards ----------------
  typedef enum logic [3:0] {
    COND_EQ = 4'd0,  COND_NE = 4'd1,  COND_CS = 4'd2,  COND_CC = 4'd3,
    COND_MI = 4'd4,  COND_PL = 4'd5,  COND_VS = 4'd6,  COND_VC = 4'd7,
    COND_HI = 4'd8,  COND_LS = 4'd9,  COND_GE = 4'd10, COND_LT = 4'd11,
    COND_GT = 4'd12, COND_LE = 4'd13, COND_AL = 4'd14, COND_NV = 4'd15
  } cond_e;

  typedef struct packed {
    logic n;
    logic z;
    logic c;
    logic v;
  } flags_t;

  typedef enum logic { MODE_HCO = 1'b0, MODE_SY = 1'b1 } mode_e;

  // How a committed micro-op updates the predictor and BoL
  typedef enum logic [1:0] {
    UPD_NONE = 2'd0, UPD_BRANCH = 2'd1, UPD_GUARD_FIRST = 2'd2, UPD_GUARD_MEMBER = 2'd3
  } upd_kind_e;

  // State kept for one guard pair by the guarded-group tracker
  typedef struct packed {
    logic valid;     // a group of this pair is open
    logic value;     // predicted (or known) value of the pair's flag formula
    logic use_pred;  // the prediction is used (otherwise split FPCM)
    logic bo_hc;     // BO component was high confidence for this group
    logic known;     // value is the resolved one (refetch after a guard misprediction)
    logic refetch;   // next user of the pair is the refetched first instruction of the group
  } pair_state_t;

  typedef pair_state_t [NPAIR-1:0] tracker_t;

  // Everything needed to undo younger speculative work on a misprediction
  typedef struct packed {
    logic [HBUF_LOG-1:0] bo_ptr;
    logic [HBUF_LOG-1:0] bg_ptr;
    tracker_t            trk;
  } ckpt_t;

  // Fetched instruction, as delivered by decode
  typedef struct packed {
    logic [PC_W-1:0]  pc;
    logic [7:0]       opcode;      // opaque to the front end
    cond_e            cond;
    logic             is_branch;   // direct branch (conditional unless cond == AL)
    logic             sets_flags;  // writes NZCV: ends every open guarded group
    logic             writes_rd;
    logic [REG_W-1:0] rd;
    logic [REG_W-1:0] rn;
    logic [REG_W-1:0] rm;
  } instr_t;

  typedef enum logic [1:0] {
    UOP_OP     = 2'd0,  // the operation (unguarded, or the first half of a split)
    UOP_SELECT = 2'd1,  // rd := guard ? rn : rm, flags likewise (second half of a split)
    UOP_CHECK  = 2'd2,  // predicted-false first instruction: only verifies the guard
    UOP_NOP    = 2'd3   // predicted-false member: retires without entering the issue queue
  } uop_kind_e;

  typedef struct packed {
    uop_kind_e        kind;
    logic [PC_W-1:0]  pc;
    logic [7:0]       opcode;
    cond_e            cond;        // guard evaluated at execute (SELECT, CHECK, verify)
    logic             is_branch;
    logic             sets_flags;
    logic             writes_rd;
    logic [REG_W-1:0] rd;
    logic [REG_W-1:0] rn;
    logic [REG_W-1:0] rm;
    logic             verify;      // compare the guard with pred at execute
    logic             pred;        // predicted guard (instruction polarity) or branch direction
    upd_kind_e        upd;         // predictor update made when this micro-op commits
    logic             bo_hc;
    logic             to_tmp;      // results go to TMP_REG and the temporary flags (split, 1st half)
    logic             last;        // last micro-op of its instruction
    ckpt_t            ckpt;
  } uop_t;

endpackage
