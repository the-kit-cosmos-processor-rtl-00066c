// edf_window: explicit data forwarding (EDF) scheduling window.
//
// The window is a RAM of WS slots. Each slot holds a waiting micro-op with a
// ready bit per source operand. Ready bits are set in two ways only: at
// insertion, from the readiness the caller supplies, and at wakeup, through
// the dataflow management table (dmt), which maps a completing result tag
// straight to the slot ids and operand sides waiting for it. No slot compares
// tags. A slot whose two ready bits are set is a select candidate; up to
// ISSUE_W candidates are dispatched per cycle, lowest slot first, and their
// slots are freed at once (the instruction buffer keeps the micro-op for a
// possible reissue).
//
// Insertion (up to IW micro-ops, valid slots packed from slot 0): ins_fit[i]
// is high when micro-op i and every one before it find a free slot and room
// in the DMT; the caller sets ins_take for the micro-ops that actually enter,
// which must be a prefix of those that fit. A source that completes in the insertion cycle must
// be reported as ready. Wakeup: wake_* are the result tags of the cycle.
// Dispatch: iss_en masks dispatch ports (a port used by a reissue is masked);
// iss_valid/iss_uop are combinational from the slot RAM, and a slot woken in
// cycle t can be dispatched in cycle t+1.
//
// From the design: RAM slots with ready bits, the DMT, the 256-entry size,
// the 8-way width and the two references per DMT entry. This design's own:
// lowest-slot-first selection, in-order partial group insertion and the
// first-free slot allocation.
module edf_window
  import cosmos_pkg::*;
#(
  parameter int unsigned WS      = 256,  // window slots
  parameter int unsigned IW      = 8,    // insertions per cycle
  parameter int unsigned ISSUE_W = 8,    // dispatches per cycle
  parameter int unsigned NWAKE   = 8,    // result tags per cycle
  parameter int unsigned NPREGS  = 544,  // physical registers
  parameter int unsigned IDS     = 2,    // DMT references per entry
  parameter int unsigned NCKPT   = 4     // DMT checkpoints
) (
  input  logic       clk,
  input  logic       rst_n,
  // insertion
  input  logic       ins_valid [IW],
  input  exec_uop_t  ins_uop   [IW],
  input  logic       ins_rdy_a [IW],
  input  logic       ins_rdy_b [IW],
  output logic       ins_fit   [IW],
  input  logic       ins_take  [IW],
  // wakeup
  input  logic       wake_valid [NWAKE],
  input  preg_t      wake_tag   [NWAKE],
  // dispatch
  input  logic       iss_en    [ISSUE_W],
  output logic       iss_valid [ISSUE_W],
  output exec_uop_t  iss_uop   [ISSUE_W],
  // DMT checkpoints
  input  logic                     ckpt_take,
  input  logic [$clog2(NCKPT)-1:0] ckpt_take_idx,
  input  logic                     ckpt_restore,
  input  logic [$clog2(NCKPT)-1:0] ckpt_restore_idx,
  // status
  output logic [$clog2(WS+1)-1:0]  occupancy,
  output logic                     dmt_stall   // first waiting micro-op held by a full DMT entry
);

  logic      slot_v   [WS];
  logic      rdy_a    [WS];
  logic      rdy_b    [WS];
  exec_uop_t slot_uop [WS];

  // ------------------------------------------------------------ allocation
  win_id_t alloc_id [IW];
  int      n_free;      // free slots found, up to IW

  always_comb begin
    n_free = 0;
    for (int i = 0; i < IW; i++) alloc_id[i] = '0;
    for (int s = 0; s < WS; s++) begin
      if (!slot_v[s] && n_free < int'(IW)) begin
        alloc_id[n_free] = win_id_t'(s);
        n_free++;
      end
    end
  end

  // ------------------------------------------------------------ DMT
  localparam int unsigned NREG = 2 * IW;
  logic     reg_valid [NREG];
  preg_t    reg_tag   [NREG];
  win_id_t  reg_id    [NREG];
  logic     reg_side  [NREG];
  logic     reg_ok    [NREG];
  logic     reg_commit[NREG];
  dmt_ref_t wake_ref  [NWAKE][IDS];

  always_comb begin
    for (int i = 0; i < IW; i++) begin
      reg_valid[2*i]   = ins_valid[i] && !ins_rdy_a[i];
      reg_tag[2*i]     = ins_uop[i].uop.src_a;
      reg_id[2*i]      = alloc_id[i];
      reg_side[2*i]    = 1'b0;
      reg_valid[2*i+1] = ins_valid[i] && !ins_rdy_b[i];
      reg_tag[2*i+1]   = ins_uop[i].uop.src_b;
      reg_id[2*i+1]    = alloc_id[i];
      reg_side[2*i+1]  = 1'b1;
    end
  end

  dmt #(
    .NPREGS (NPREGS),
    .IDS    (IDS),
    .NREG   (NREG),
    .NWAKE  (NWAKE),
    .NCKPT  (NCKPT)
  ) u_dmt (
    .clk              (clk),
    .rst_n            (rst_n),
    .reg_valid        (reg_valid),
    .reg_tag          (reg_tag),
    .reg_id           (reg_id),
    .reg_side         (reg_side),
    .reg_ok           (reg_ok),
    .reg_commit       (reg_commit),
    .wake_valid       (wake_valid),
    .wake_tag         (wake_tag),
    .wake_ref         (wake_ref),
    .ckpt_take        (ckpt_take),
    .ckpt_take_idx    (ckpt_take_idx),
    .ckpt_restore     (ckpt_restore),
    .ckpt_restore_idx (ckpt_restore_idx)
  );

  always_comb begin
    logic ok;
    ok        = 1'b1;
    dmt_stall = 1'b0;
    for (int i = 0; i < IW; i++) begin
      logic dmt_ok;
      dmt_ok = (!reg_valid[2*i] || reg_ok[2*i]) && (!reg_valid[2*i+1] || reg_ok[2*i+1]);
      if (ok && ins_valid[i] && i < n_free && !dmt_ok) dmt_stall = 1'b1;
      ok         = ok && ins_valid[i] && i < n_free && dmt_ok;
      ins_fit[i] = ok;
      reg_commit[2*i]   = ins_take[i];
      reg_commit[2*i+1] = ins_take[i];
    end
  end

  // ------------------------------------------------------------ select
  logic           sel     [WS];
  win_id_t        iss_id  [ISSUE_W];

  always_comb begin
    int nen;
    int cnt;
    int pm [ISSUE_W];   // pm[c]: the c-th enabled dispatch port
    nen = 0;
    cnt = 0;
    for (int k = 0; k < ISSUE_W; k++) begin
      pm[k]        = 0;
      iss_valid[k] = 1'b0;
      iss_id[k]    = '0;
    end
    for (int k = 0; k < ISSUE_W; k++) begin
      if (iss_en[k]) begin
        pm[nen] = k;
        nen++;
      end
    end
    for (int s = 0; s < WS; s++) begin
      sel[s] = 1'b0;
      if (slot_v[s] && rdy_a[s] && rdy_b[s] && cnt < nen) begin
        sel[s]             = 1'b1;
        iss_valid[pm[cnt]] = 1'b1;
        iss_id[pm[cnt]]    = win_id_t'(s);
        cnt++;
      end
    end
    for (int k = 0; k < ISSUE_W; k++) iss_uop[k] = slot_uop[iss_id[k]];
  end

  // ------------------------------------------------------------ state
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < WS; s++) begin
        slot_v[s] <= 1'b0;
        rdy_a[s]  <= 1'b0;
        rdy_b[s]  <= 1'b0;
      end
    end else begin
      for (int s = 0; s < WS; s++) begin
        if (sel[s]) slot_v[s] <= 1'b0;
      end
      for (int w = 0; w < NWAKE; w++) begin
        for (int r = 0; r < IDS; r++) begin
          if (wake_ref[w][r].valid) begin
            if (wake_ref[w][r].side) rdy_b[wake_ref[w][r].id] <= 1'b1;
            else                     rdy_a[wake_ref[w][r].id] <= 1'b1;
          end
        end
      end
      begin
        for (int i = 0; i < IW; i++) begin
          if (ins_take[i]) begin
            slot_v[alloc_id[i]] <= 1'b1;
            rdy_a[alloc_id[i]]  <= ins_rdy_a[i];
            rdy_b[alloc_id[i]]  <= ins_rdy_b[i];
          end
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    for (int i = 0; i < IW; i++) begin
      if (ins_take[i]) slot_uop[alloc_id[i]] <= ins_uop[i];
    end
  end

  always_comb begin
    occupancy = '0;
    for (int s = 0; s < WS; s++) occupancy += ($clog2(WS+1))'(slot_v[s]);
  end

endmodule
