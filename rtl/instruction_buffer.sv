// instruction_buffer: the large, centralised half of the decoupled window.
//
// Every micro-op enters the buffer together with the scheduling window and
// stays until it commits, in program order, from the head. The buffer is the
// backup of the small scheduling window: when a register value turns out to
// have been wrong (a value misprediction, or a reissued micro-op producing a
// different result), every micro-op that reads that register and has already
// left the scheduling window is marked for reissue. Marked micro-ops are sent
// to execution again from here, never from the window. Micro-ops that have not
// yet been dispatched stay in the window and simply read the corrected value.
//
// Reissue runs through a two-stage pipeline, because the buffer is too large
// to search and read in one cycle: stage 1 selects the oldest marked entry
// (searching from the head), stage 2 reads it out, and the micro-op leaves on
// r_valid/r_uop in the cycle after that. One reissue is in flight at a time:
// the next marked entry is selected after the previous reissue completes, so
// every reissued micro-op reads final values of all older entries and a
// chain of dependents is walked once, in order, instead of feeding on stale
// operands and being reissued again and again.
// Each entry keeps a small generation count that is bumped whenever it is
// selected for reissue; a completion counts only if its generation matches,
// so a stale execution can never mark an entry done.
//
// Interface: alloc_* offers a group of up to AW micro-ops (valid slots packed
// from 0); alloc_fit[i] says micro-op i and those before it fit; alloc_take
// marks those that enter (a prefix) and alloc_idx gives each one's index.
// disp_* reports micro-ops dispatched from the window,
// comp_* reports completions, inv_* reports registers whose value changed.
// cm_* lists the micro-ops committed in this cycle (up to CW).
//
// From the design: the centralised buffer holding each micro-op until commit,
// reissue of already dispatched dependents from the buffer only, the 512-entry
// size, and the 2-cycle pipelined selection. This design's own: the register
// tag match that finds dependents, the generation counter, oldest-first
// selection and one reissue in flight at a time.
module instruction_buffer
  import cosmos_pkg::*;
#(
  parameter int unsigned SIZE  = 512,  // entries
  parameter int unsigned AW    = 8,    // allocations per cycle
  parameter int unsigned NP    = 8,    // dispatch / completion / invalidation ports
  parameter int unsigned CW    = 8     // commits per cycle
) (
  input  logic      clk,
  input  logic      rst_n,
  // allocation
  input  logic      alloc_valid [AW],
  input  uop_t      alloc_uop   [AW],
  input  logic      alloc_pred  [AW],
  output logic      alloc_fit   [AW],
  input  logic      alloc_take  [AW],
  output ib_idx_t   alloc_idx   [AW],
  // dispatch from the scheduling window
  input  logic      disp_valid [NP],
  input  ib_idx_t   disp_idx   [NP],
  // completions
  input  logic      comp_valid [NP],
  input  ib_idx_t   comp_idx   [NP],
  input  gen_t      comp_gen   [NP],
  // registers whose value changed
  input  logic      inv_valid [NP],
  input  preg_t     inv_tag   [NP],
  // reissue
  output logic      r_valid,
  output exec_uop_t r_uop,
  // commit
  output logic      cm_valid [CW],
  output uop_t      cm_uop   [CW],
  // status
  output logic [$clog2(SIZE+1)-1:0] count
);

  localparam int unsigned AIW = $clog2(SIZE);

  logic  e_valid   [SIZE];
  logic  e_disp    [SIZE];
  logic  e_done    [SIZE];
  logic  e_pend    [SIZE];
  gen_t  e_gen     [SIZE];
  logic  e_pred    [SIZE];
  uop_t  e_uop     [SIZE];

  logic [AIW-1:0] head, tail;

  // ------------------------------------------------------------ allocation
  int n_alloc;
  always_comb begin
    n_alloc = 0;
    for (int i = 0; i < AW; i++) begin
      alloc_idx[i] = ib_idx_t'(AIW'(tail + AIW'(i)));
      alloc_fit[i] = alloc_valid[i] && (int'(count) + i) < int'(SIZE);
      if (alloc_take[i]) n_alloc++;
    end
  end

  // ------------------------------------------------------------ commit
  int n_commit;
  always_comb begin
    logic stop;
    stop     = 1'b0;
    n_commit = 0;
    for (int c = 0; c < CW; c++) begin
      logic [AIW-1:0] k;
      k = AIW'(head + AIW'(c));
      cm_uop[c]   = e_uop[k];
      cm_valid[c] = 1'b0;
      if (!stop && e_valid[k] && e_done[k] && !e_pend[k]) begin
        cm_valid[c] = 1'b1;
        n_commit++;
      end else begin
        stop = 1'b1;
      end
    end
  end

  // ------------------------------------------------------------ marking
  logic disp_now [SIZE];
  logic mark     [SIZE];
  always_comb begin
    for (int e = 0; e < SIZE; e++) begin
      disp_now[e] = 1'b0;
      mark[e]     = 1'b0;
    end
    for (int d = 0; d < NP; d++) begin
      if (disp_valid[d]) disp_now[disp_idx[d][AIW-1:0]] = 1'b1;
    end
    for (int e = 0; e < SIZE; e++) begin
      for (int v = 0; v < NP; v++) begin
        if (inv_valid[v] && inv_tag[v] != '0 && e_valid[e] && (e_disp[e] || disp_now[e]) &&
            (e_uop[e].src_a == inv_tag[v] || e_uop[e].src_b == inv_tag[v]))
          mark[e] = 1'b1;
      end
    end
  end

  // ------------------------------------------------------------ reissue select (stage 1)
  // One reissue is in flight at a time: the next marked entry is selected
  // only once the previous reissue has completed, so it reads final values
  // of every older entry and a chain of reissues does not feed on stale
  // operands (the buffer's wakeup).
  logic           fly_q;
  logic [AIW-1:0] fly_idx;
  gen_t           fly_gen;
  logic           fly_done;
  always_comb begin
    fly_done = 1'b0;
    for (int p = 0; p < NP; p++) begin
      if (comp_valid[p] && comp_idx[p][AIW-1:0] == fly_idx && comp_gen[p] == fly_gen) fly_done = 1'b1;
    end
  end

  logic           sel_found;
  logic [AIW-1:0] sel_idx;
  always_comb begin
    sel_found = 1'b0;
    sel_idx   = '0;
    for (int c = 0; c < SIZE; c++) begin
      logic [AIW-1:0] k;
      k = AIW'(head + AIW'(c));
      if (!sel_found && !fly_q && e_valid[k] && e_pend[k]) begin
        sel_found = 1'b1;
        sel_idx   = k;
      end
    end
  end

  logic           s1_valid;
  logic [AIW-1:0] s1_idx;

  // ------------------------------------------------------------ state
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      head     <= '0;
      tail     <= '0;
      count    <= '0;
      s1_valid <= 1'b0;
      s1_idx   <= '0;
      fly_q    <= 1'b0;
      fly_idx  <= '0;
      fly_gen  <= '0;
      r_valid  <= 1'b0;
      for (int e = 0; e < SIZE; e++) begin
        e_valid[e] <= 1'b0;
        e_disp[e]  <= 1'b0;
        e_done[e]  <= 1'b0;
        e_pend[e]  <= 1'b0;
        e_gen[e]   <= '0;
        e_pred[e]  <= 1'b0;
      end
    end else begin
      // completions
      for (int p = 0; p < NP; p++) begin
        if (comp_valid[p] && comp_gen[p] == e_gen[comp_idx[p][AIW-1:0]] &&
            !e_pend[comp_idx[p][AIW-1:0]])
          e_done[comp_idx[p][AIW-1:0]] <= 1'b1;
      end
      // dispatch
      for (int e = 0; e < SIZE; e++) begin
        if (disp_now[e]) e_disp[e] <= 1'b1;
      end
      // reissue stage 1: take the selected entry out of the marked set
      s1_valid <= sel_found;
      s1_idx   <= sel_idx;
      if (sel_found) begin
        e_pend[sel_idx] <= 1'b0;
        e_gen[sel_idx]  <= e_gen[sel_idx] + 1'b1;
        fly_q           <= 1'b1;
        fly_idx         <= sel_idx;
        fly_gen         <= e_gen[sel_idx] + 1'b1;
      end else if (fly_done) begin
        fly_q           <= 1'b0;
      end
      // marking wins over completion and selection in the same cycle
      for (int e = 0; e < SIZE; e++) begin
        if (mark[e]) begin
          e_pend[e] <= 1'b1;
          e_done[e] <= 1'b0;
        end
      end
      // reissue stage 2: read the entry out
      r_valid <= s1_valid;
      // commit
      for (int c = 0; c < CW; c++) begin
        if (c < n_commit) e_valid[AIW'(head + AIW'(c))] <= 1'b0;
      end
      head <= AIW'(head + AIW'(n_commit));
      // allocation
      begin
        for (int i = 0; i < AW; i++) begin
          if (alloc_take[i]) begin
            e_valid[AIW'(tail + AIW'(i))] <= 1'b1;
            e_disp[AIW'(tail + AIW'(i))]  <= 1'b0;
            e_done[AIW'(tail + AIW'(i))]  <= 1'b0;
            e_pend[AIW'(tail + AIW'(i))]  <= 1'b0;
            e_gen[AIW'(tail + AIW'(i))]   <= '0;
            e_pred[AIW'(tail + AIW'(i))]  <= alloc_pred[i];
          end
        end
        tail  <= AIW'(tail + AIW'(n_alloc));
        count <= ($clog2(SIZE+1))'(int'(count) + n_alloc - n_commit);
      end
    end
  end

  always_ff @(posedge clk) begin
    for (int i = 0; i < AW; i++) begin
      if (alloc_take[i]) e_uop[AIW'(tail + AIW'(i))] <= alloc_uop[i];
    end
    r_uop.uop     <= e_uop[s1_idx];
    r_uop.ib_idx  <= ib_idx_t'(s1_idx);
    r_uop.gen     <= e_gen[s1_idx];
    r_uop.pred    <= e_pred[s1_idx];
    r_uop.reissue <= 1'b1;
  end

endmodule
