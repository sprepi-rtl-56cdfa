// sprepi_pkg: types and constants shared by the SPREPI front end.
//
// The front end renames a stream of ARM-style instructions, up to WIDTH per
// cycle, in which (nearly) every instruction carries a 4-bit condition code.
// Widths of physical tags, buffer indices and group indices are fixed here so
// that every module agrees on the packed structs passed between them.
//
// Sizes that follow the processor configuration of the design: 4-wide
// rename, 128 in-flight instructions (the reorder-buffer size, which is also
// the size of the fetched-instruction buffer), 256 physical registers.  The
// number of architectural registers (16, ARM r0-r15), the condition-code
// encoding (ARM) and the number of in-flight predicated groups (32) are
// choices of this implementation.
package sprepi_pkg;

  localparam int WIDTH     = 4;    // rename width
  localparam int NUM_ARCH  = 16;   // architectural integer registers
  localparam int NUM_PHYS  = 256;  // physical integer registers
  localparam int ROB_SIZE  = 128;  // in-flight instructions = buffer entries
  localparam int NUM_GRP   = 32;   // in-flight predicated groups

  localparam int AR_W  = $clog2(NUM_ARCH);
  localparam int PT_W  = $clog2(NUM_PHYS);
  localparam int IDX_W = $clog2(ROB_SIZE);
  localparam int GRP_W = $clog2(NUM_GRP);

  typedef logic [AR_W-1:0]  areg_t;
  typedef logic [PT_W-1:0]  ptag_t;
  typedef logic [IDX_W-1:0] idx_t;
  typedef logic [GRP_W-1:0] grp_t;

  // ARM condition field encoding.  Opposite conditions differ only in bit 0,
  // so cond[3:1] names the pair {c, !c} that a predicated group shares.
  typedef enum logic [3:0] {
    C_EQ = 4'd0,  C_NE = 4'd1,  C_CS = 4'd2,  C_CC = 4'd3,
    C_MI = 4'd4,  C_PL = 4'd5,  C_VS = 4'd6,  C_VC = 4'd7,
    C_HI = 4'd8,  C_LS = 4'd9,  C_GE = 4'd10, C_LT = 4'd11,
    C_GT = 4'd12, C_LE = 4'd13, C_AL = 4'd14, C_NV = 4'd15
  } cond_t;

  typedef struct packed {
    logic n;
    logic z;
    logic c;
    logic v;
  } flags_t;

  // A decoded instruction as delivered by fetch/decode.
  typedef struct packed {
    logic [31:0] pc;
    cond_t       cond;
    logic        sets_flags;  // flag-defining instruction (ends groups)
    logic        is_branch;   // conditional/unconditional branch
    logic        br_taken;    // predicted direction from the branch predictor
    logic        dst_v;
    areg_t       dst;
    logic        src1_v;
    areg_t       src1;
    logic        src2_v;
    areg_t       src2;
  } inst_t;

  // How the back end must treat a renamed predicated instruction.
  typedef enum logic [1:0] {
    K_NORMAL = 2'd0,  // unpredicated, or predicate (predicted/known) true
    K_NOOP   = 2'd1,  // predicate (predicted/known) false: no effect
    K_SELECT = 2'd2   // predicate not used: dst = p ? op(s1,s2) : s3
  } kind_t;

  // Rename form of an instruction: what decides whether a preserved result
  // is still valid after a replay.
  typedef struct packed {
    kind_t kind;
    logic  ps1_v;
    ptag_t ps1;
    logic  ps2_v;
    ptag_t ps2;
    logic  ps3_v;   // previous value of the destination (K_SELECT only)
    ptag_t ps3;
  } rform_t;

  // Result of renaming one instruction, kept in the instruction buffer.
  typedef struct packed {
    logic   pdst_v;
    ptag_t  pdst;      // allocated once, kept across replays
    ptag_t  old_pdst;  // mapping of dst before this instruction
    logic   upd_map;   // the instruction moved the mapping of dst to pdst
    rform_t form;
  } rrec_t;

  // One entry of the fetched-instruction buffer.
  typedef struct packed {
    inst_t inst;
    logic  in_grp;
    logic  grp_head;
    grp_t  grp;
    rrec_t rec;
  } bent_t;

  // Operation performed by the rename stage in a cycle.
  typedef enum logic [1:0] {
    R_IDLE   = 2'd0,
    R_FRESH  = 2'd1,  // rename newly fetched instructions
    R_REPLAY = 2'd2,  // re-rename buffered instructions after a misprediction
    R_WALK   = 2'd3   // undo map updates, youngest first
  } ren_op_t;

  // Renamed micro-op handed to the out-of-order back end.
  typedef struct packed {
    idx_t   idx;      // buffer / reorder-buffer slot
    grp_t   grp;      // predicated group (meaningful when in_grp)
    logic   in_grp;
    logic   grp_head; // first instruction of its group
    cond_t  cond;
    logic   pdst_v;
    ptag_t  pdst;
    rform_t form;
    logic   replay;   // produced by a replay pass
    logic   reexec;   // replay pass: result must be recomputed
  } uop_t;

  // TAGE geometry: 1 base + 12 tagged components; history lengths grow
  // geometrically from 4 to 640, L(i) = round(4 * 160^((i-1)/11)).
  localparam int TAGE_NT      = 12;
  localparam int TAGE_MAXHIST = 640;
  typedef int hist_len_t [TAGE_NT];
  localparam hist_len_t TAGE_HLEN = '{4, 6, 10, 16, 25, 40, 64, 101, 161, 255, 404, 640};

endpackage
