// cosmos_top: a single-cluster COSMOS core.
//
// Front end: fetch_unit supplies up to FETCH_W instructions per cycle from the
// instruction cache or, past a predicted-taken branch, from a trace in the
// non-consecutive basic block buffer (NCB), which a fill unit builds off the
// fetch path. The fetch block leaves on f_*. Decoding and register renaming
// are outside this RTL: the back end takes renamed micro-ops on in_*.
//
// Back end: every renamed micro-op enters both the small scheduling window of
// the cluster and the large instruction buffer (the decoupled window). The
// value predictor is consulted on entry; a confidently predicted result is
// written at once so consumers can run speculatively. The window wakes
// micro-ops through its dataflow management table instead of tag comparison,
// and dispatches them to variable latency ALUs (one cycle, or two when a carry
// propagates over 16 bits). When a predicted or reissued result turns out to
// differ from what its consumers used, the instruction buffer reissues the
// consumers that had already been dispatched. Micro-ops commit in order from
// the instruction buffer, up to CW per cycle, with their results on cm_*.
//
// Interfaces: in_valid must be packed from slot 0. Micro-ops enter in order:
// in_accept[i] is high for each one that enters in this cycle, always a
// prefix of the group; the rest must be offered again, first in line, in a
// later cycle. A micro-op enters when it and all before it find room in the
// window, its DMT entries and the instruction buffer. in_accept depends only
// on state and on in_*. Checkpoint ports (ckpt_*) save and restore the DMT around a branch;
// squashing younger micro-ops after a branch misprediction is not part of
// this RTL, so a restore is only meaningful when none are in flight.
//
// Sizes follow the evaluated 8-way machine: a 256-slot window with two DMT
// references per register, a 512-entry instruction buffer, a 4096-entry stride
// predictor and a 32 KB NCB. The 544 physical registers (32 architectural
// plus one per instruction buffer entry), 4 checkpoints, 8 ALUs and 8 commits
// per cycle are this design's own choices.
module cosmos_top
  import cosmos_pkg::*;
#(
  parameter int unsigned IW          = 8,
  parameter int unsigned NALU        = 8,
  parameter int unsigned CW          = 8,
  parameter int unsigned WS          = 256,
  parameter int unsigned IB_SIZE     = 512,
  parameter int unsigned NPREGS      = 544,
  parameter int unsigned IDS         = 2,
  parameter int unsigned NCKPT       = 4,
  parameter int unsigned VP_ENTRIES  = 4096,
  parameter int unsigned NCB_ENTRIES = 1024,
  parameter word_t       RESET_PC    = '0
) (
  input  logic   clk,
  input  logic   rst_n,
  // ---------------- front end
  output word_t  ic_pc,
  input  logic [FETCH_W-1:0][XLEN-1:0] ic_instr,
  input  logic [FETCH_W-1:0]           ic_is_branch,
  input  logic [FETCH_W-1:0][XLEN-1:0] ic_target,
  input  logic [FETCH_W-1:0]           bp_taken,
  input  logic   redirect_valid,
  input  word_t  redirect_pc,
  output logic   f_valid,
  output logic [3:0] f_count,
  output logic [FETCH_W-1:0][XLEN-1:0] f_instr,
  output logic [FETCH_W-1:0][XLEN-1:0] f_pc,
  output logic   f_from_ncb,
  input  logic   f_ready,
  output logic   ncb_fill,
  // ---------------- back end: renamed micro-ops
  input  logic   in_valid [IW],
  input  uop_t   in_uop   [IW],
  output logic   in_accept[IW],
  // commit
  output logic   cm_valid [CW],
  output uop_t   cm_uop   [CW],
  output word_t  cm_value [CW],
  // DMT checkpoints
  input  logic                     ckpt_take,
  input  logic [$clog2(NCKPT)-1:0] ckpt_take_idx,
  input  logic                     ckpt_restore,
  input  logic [$clog2(NCKPT)-1:0] ckpt_restore_idx,
  // status
  output logic [$clog2(WS+1)-1:0]      win_occupancy,
  output logic [$clog2(IB_SIZE+1)-1:0] ib_count,
  output logic                         dmt_stall,
  output logic                         reissue_valid
);

  // ================================================================ front end
  fetch_unit #(
    .RESET_PC    (RESET_PC),
    .NCB_ENTRIES (NCB_ENTRIES)
  ) u_fetch (
    .clk            (clk),
    .rst_n          (rst_n),
    .ic_pc          (ic_pc),
    .ic_instr       (ic_instr),
    .ic_is_branch   (ic_is_branch),
    .ic_target      (ic_target),
    .bp_taken       (bp_taken),
    .redirect_valid (redirect_valid),
    .redirect_pc    (redirect_pc),
    .f_valid        (f_valid),
    .f_count        (f_count),
    .f_instr        (f_instr),
    .f_pc           (f_pc),
    .f_from_ncb     (f_from_ncb),
    .f_ready        (f_ready),
    .ncb_fill       (ncb_fill)
  );

  // ================================================================ back end
  logic      vp_hit   [IW];
  word_t     vp_value [IW];
  word_t     vp_pc    [IW];
  logic      vp_upd_v [NALU];
  word_t     vp_upd_pc[NALU];
  word_t     vp_upd_val[NALU];

  logic      ib_fit   [IW];
  ib_idx_t   ib_idx   [IW];
  logic      ib_pred  [IW];
  logic      cl_fit   [IW];
  logic      take     [IW];
  exec_uop_t d_uop    [IW];

  logic      disp_valid [NALU];
  ib_idx_t   disp_idx   [NALU];
  logic      c_valid    [NALU];
  exec_uop_t c_uop      [NALU];
  word_t     c_value    [NALU];
  logic      c_changed  [NALU];
  logic      c_slow     [NALU];
  ib_idx_t   comp_idx   [NALU];
  gen_t      comp_gen   [NALU];
  preg_t     inv_tag    [NALU];

  exec_uop_t r_uop;
  preg_t     cm_tag [CW];

  always_comb begin
    for (int i = 0; i < IW; i++) begin
      vp_pc[i]          = in_uop[i].pc;
      ib_pred[i]        = vp_hit[i] && in_uop[i].dest != '0;
      d_uop[i].uop      = in_uop[i];
      d_uop[i].ib_idx   = ib_idx[i];
      d_uop[i].gen      = '0;
      d_uop[i].pred     = ib_pred[i];
      d_uop[i].reissue  = 1'b0;
    end
    for (int k = 0; k < NALU; k++) begin
      vp_upd_v[k]   = c_valid[k] && !c_uop[k].reissue && c_uop[k].uop.dest != '0;
      vp_upd_pc[k]  = c_uop[k].uop.pc;
      vp_upd_val[k] = c_value[k];
      comp_idx[k]   = c_uop[k].ib_idx;
      comp_gen[k]   = c_uop[k].gen;
      inv_tag[k]    = c_uop[k].uop.dest;
    end
    for (int c = 0; c < CW; c++) cm_tag[c] = cm_uop[c].dest;
  end

  always_comb begin
    logic ok;
    ok = 1'b1;
    for (int i = 0; i < IW; i++) begin
      ok           = ok && in_valid[i] && ib_fit[i] && cl_fit[i];
      take[i]      = ok;
      in_accept[i] = ok;
    end
  end

  value_predictor #(
    .ENTRIES (VP_ENTRIES),
    .NLOOK   (IW),
    .NUPD    (NALU)
  ) u_vp (
    .clk        (clk),
    .rst_n      (rst_n),
    .look_pc    (vp_pc),
    .look_hit   (vp_hit),
    .look_value (vp_value),
    .upd_valid  (vp_upd_v),
    .upd_pc     (vp_upd_pc),
    .upd_value  (vp_upd_val)
  );

  instruction_buffer #(
    .SIZE (IB_SIZE),
    .AW   (IW),
    .NP   (NALU),
    .CW   (CW)
  ) u_ib (
    .clk         (clk),
    .rst_n       (rst_n),
    .alloc_valid (in_valid),
    .alloc_uop   (in_uop),
    .alloc_pred  (ib_pred),
    .alloc_fit   (ib_fit),
    .alloc_take  (take),
    .alloc_idx   (ib_idx),
    .disp_valid  (disp_valid),
    .disp_idx    (disp_idx),
    .comp_valid  (c_valid),
    .comp_idx    (comp_idx),
    .comp_gen    (comp_gen),
    .inv_valid   (c_changed),
    .inv_tag     (inv_tag),
    .r_valid     (reissue_valid),
    .r_uop       (r_uop),
    .cm_valid    (cm_valid),
    .cm_uop      (cm_uop),
    .count       (ib_count)
  );

  cluster #(
    .IW     (IW),
    .NALU   (NALU),
    .WS     (WS),
    .NPREGS (NPREGS),
    .IDS    (IDS),
    .NCKPT  (NCKPT),
    .CW     (CW)
  ) u_cluster (
    .clk              (clk),
    .rst_n            (rst_n),
    .d_valid          (in_valid),
    .d_uop            (d_uop),
    .d_pred_value     (vp_value),
    .d_fit            (cl_fit),
    .d_take           (take),
    .r_valid          (reissue_valid),
    .r_uop            (r_uop),
    .disp_valid       (disp_valid),
    .disp_idx         (disp_idx),
    .c_valid          (c_valid),
    .c_uop            (c_uop),
    .c_value          (c_value),
    .c_changed        (c_changed),
    .c_slow           (c_slow),
    .cm_tag           (cm_tag),
    .cm_value         (cm_value),
    .ckpt_take        (ckpt_take),
    .ckpt_take_idx    (ckpt_take_idx),
    .ckpt_restore     (ckpt_restore),
    .ckpt_restore_idx (ckpt_restore_idx),
    .win_occupancy    (win_occupancy),
    .dmt_stall        (dmt_stall)
  );

endmodule
