// pred_rename: register renaming for predicated instructions with predicate
// prediction, symmetric resource allocation and selective-replay support.
//
// Every instruction with a destination gets a new physical register the
// first time it is renamed, whatever its predicate (symmetric allocation: a
// replay never needs new registers, and results of unaffected instructions
// keep their registers).  What depends on the predicate is the map update:
//   * predicate usable (prediction used, or real value known) and true:
//     NORMAL, the destination mapping moves to the new register;
//   * usable and false: NOOP, the mapping does not move, so later readers
//     see the previous definition and there is a single valid definition;
//   * not usable: SELECT, the previous mapping becomes a third source
//     (dst = p ? op(s1, s2) : old) and the mapping moves.
// Unpredicated instructions are NORMAL.
//
// Operations (op, one per cycle):
//   R_FRESH  rename up to W new instructions; destinations taken from the
//            free list in slot order (caller checks free_cnt >= W).
//   R_REPLAY re-rename up to W buffered instructions with their kept
//            destinations.  An instruction must be re-executed when its
//            rename form (kind and source registers) differs from the one
//            recorded by its previous renaming, or when a source register
//            belongs to an instruction re-executed earlier in the replay;
//            its destination is then marked invalid.  inv_clear empties the
//            invalid set at the start of a replay.
//   R_WALK   undo the map updates of up to W buffered instructions, slot 0
//            being the youngest, to bring the map back to the state in front
//            of a mispredicted group.
// In the same cycle, up to W instructions commit (commit_v, in order): the
// register a committed instruction made dead returns to the free list (the
// previous mapping if it moved the map, its own register if it was a NOOP)
// and the committed map is updated.  flush restores the speculative map from
// the committed map and rebuilds the free list from it.
//
// The document keeps results valid with the rename-sequence tags of its
// earlier control-independence work, which it does not describe; the
// rename-form comparison and invalid-register set used here give the same
// outcome on its example (re-execute an instruction whose operand changed,
// and every instruction depending on it) and are this design's choice.
// Combinational outputs; state changes at the clock edge.  Reset maps
// architectural register r to physical register r.
module pred_rename
  import sprepi_pkg::*;
#(
  parameter int W     = WIDTH,
  parameter int NPHYS = NUM_PHYS,
  parameter int NARCH = NUM_ARCH
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     flush,
  input  logic                     inv_clear,
  input  ren_op_t                  op,
  input  logic [W-1:0]             slot_v,
  input  inst_t [W-1:0]            inst,
  input  logic [W-1:0]             in_grp,
  input  logic [W-1:0]             pk_known,   // predicate value usable
  input  logic [W-1:0]             pk_val,     // its value for this instruction
  input  rrec_t [W-1:0]            prev_rec,   // R_REPLAY / R_WALK: recorded renaming
  output rrec_t [W-1:0]            out_rec,
  output logic [W-1:0]             out_reexec,
  input  logic [W-1:0]             commit_v,
  input  bent_t [W-1:0]            commit_ent,
  output logic [$clog2(NPHYS+1)-1:0] free_cnt
);
  ptag_t            map_q  [NARCH];
  ptag_t            cmap_q [NARCH];
  logic [NPHYS-1:0] free_q;
  logic [NPHYS-1:0] inv_q;

  ptag_t            map_d  [NARCH];
  ptag_t            cmap_d [NARCH];
  logic [NPHYS-1:0] free_d;
  logic [NPHYS-1:0] inv_d;

  always_comb begin
    logic [NPHYS-1:0] avail;
    logic             got;
    ptag_t            pd;
    rform_t           f;
    logic             re;
    map_d      = map_q;
    cmap_d     = cmap_q;
    free_d     = free_q;
    inv_d      = inv_clear ? '0 : inv_q;
    avail      = free_q;
    out_rec    = '0;
    out_reexec = '0;
    pd         = '0;
    f          = '0;
    re         = 1'b0;
    got        = 1'b0;

    // ---- rename / replay / walk ----
    if (op == R_WALK) begin
      for (int i = 0; i < W; i++)
        if (slot_v[i] && prev_rec[i].upd_map)
          map_d[inst[i].dst] = prev_rec[i].old_pdst;
    end else if (op == R_FRESH || op == R_REPLAY) begin
      for (int i = 0; i < W; i++) begin
        if (slot_v[i]) begin
          f       = '0;
          f.ps1_v = inst[i].src1_v;
          f.ps1   = inst[i].src1_v ? map_d[inst[i].src1] : '0;
          f.ps2_v = inst[i].src2_v;
          f.ps2   = inst[i].src2_v ? map_d[inst[i].src2] : '0;
          pd      = '0;
          if (inst[i].dst_v) begin
            if (op == R_FRESH) begin
              got = 1'b0;
              for (int p = 0; p < NPHYS; p++)
                if (!got && avail[p]) begin
                  got      = 1'b1;
                  pd       = ptag_t'(p);
                  avail[p] = 1'b0;
                end
            end else begin
              pd = prev_rec[i].pdst;
            end
          end
          out_rec[i].pdst_v   = inst[i].dst_v;
          out_rec[i].pdst     = pd;
          out_rec[i].old_pdst = inst[i].dst_v ? map_d[inst[i].dst] : '0;
          if (in_grp[i] && !pk_known[i]) begin
            f.kind  = K_SELECT;
            f.ps3_v = inst[i].dst_v;
            f.ps3   = inst[i].dst_v ? map_d[inst[i].dst] : '0;
            out_rec[i].upd_map = inst[i].dst_v;
          end else if (in_grp[i] && !pk_val[i]) begin
            f.kind = K_NOOP;
            out_rec[i].upd_map = 1'b0;
          end else begin
            f.kind = K_NORMAL;
            out_rec[i].upd_map = inst[i].dst_v;
          end
          out_rec[i].form = f;
          if (out_rec[i].upd_map) map_d[inst[i].dst] = pd;
          if (op == R_REPLAY) begin
            re = (f != prev_rec[i].form)
                 || (f.ps1_v && inv_d[f.ps1])
                 || (f.ps2_v && inv_d[f.ps2])
                 || (f.ps3_v && inv_d[f.ps3]);
            out_reexec[i] = re;
            if (re && inst[i].dst_v) inv_d[pd] = 1'b1;
          end
        end
      end
      if (op == R_FRESH) free_d = avail;
    end

    // ---- commit ----
    for (int i = 0; i < W; i++)
      if (commit_v[i] && commit_ent[i].rec.pdst_v) begin
        if (commit_ent[i].rec.upd_map) begin
          free_d[commit_ent[i].rec.old_pdst] = 1'b1;
          cmap_d[commit_ent[i].inst.dst]     = commit_ent[i].rec.pdst;
        end else begin
          free_d[commit_ent[i].rec.pdst] = 1'b1;
        end
      end

    // ---- full flush ----
    if (flush) begin
      free_d = '1;
      for (int r = 0; r < NARCH; r++) begin
        map_d[r] = cmap_d[r];
        free_d[cmap_d[r]] = 1'b0;
      end
      inv_d = '0;
    end
  end

  always_comb begin
    free_cnt = '0;
    for (int p = 0; p < NPHYS; p++) free_cnt = free_cnt + ($clog2(NPHYS+1))'(free_q[p]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < NARCH; r++) begin
        map_q[r]  <= ptag_t'(r);
        cmap_q[r] <= ptag_t'(r);
      end
      for (int p = 0; p < NPHYS; p++) free_q[p] <= (p >= NARCH);
      inv_q <= '0;
    end else begin
      map_q  <= map_d;
      cmap_q <= cmap_d;
      free_q <= free_d;
      inv_q  <= inv_d;
    end
  end
endmodule
