// tb_instruction_buffer: self-checking test of the reissue buffer.
//
// A 16-entry buffer with 2-wide allocation, dispatch, completion and commit.
// The bench plays window and execution units: it dispatches allocated
// micro-ops at random, completes them 1-2 cycles later, and now and then
// reports a register whose value changed. For every such report it works out
// which dispatched micro-ops read that register. Checked: exactly those are
// reissued (each one, and nothing else), the first reissue comes two cycles
// after the report when nothing else is pending, a micro-op never commits
// between being marked and completing its reissue, completions carrying a
// stale generation are ignored, and commits come out in allocation order.
module tb_instruction_buffer;
  import cosmos_pkg::*;

  localparam int SIZE = 16, AW = 2, NP = 2, CW = 2;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic      alloc_valid [AW];
  uop_t      alloc_uop   [AW];
  logic      alloc_pred  [AW];
  logic      alloc_fit   [AW];
  logic      alloc_take  [AW];
  ib_idx_t   alloc_idx   [AW];
  logic      disp_valid [NP];
  ib_idx_t   disp_idx   [NP];
  logic      comp_valid [NP];
  ib_idx_t   comp_idx   [NP];
  gen_t      comp_gen   [NP];
  logic      inv_valid [NP];
  preg_t     inv_tag   [NP];
  logic      r_valid;
  exec_uop_t r_uop;
  logic      cm_valid [CW];
  uop_t      cm_uop   [CW];
  logic [4:0] count;

  instruction_buffer #(.SIZE(SIZE), .AW(AW), .NP(NP), .CW(CW)) dut (.*);

  int checks = 0, failures = 0, cycle = 0;
  int n_alloc = 0, n_commit = 0, n_reissue = 0, n_stale = 0, n_full = 0, n_lat2 = 0;

  // model per serial number (pc field)
  typedef struct { uop_t u; int idx; bit disp; bit done; bit dirty; int gen; bit reiss_out; } ent_t;
  ent_t ents [int];
  int next_commit = 0;
  int serial = 0;
  int pend_q [$];                // completions: cycle*65536 + serial
  int pend_gen [$];
  int mark_cycle [int];
  int last_mark [int];

  initial begin : watchdog
    repeat (60000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int serial_of(ib_idx_t idx);
    foreach (ents[s]) if (ents[s].idx == int'(idx)) return s;
    return -1;
  endfunction

  initial begin
    foreach (alloc_valid[i]) begin alloc_valid[i] = 0; alloc_uop[i] = '0; alloc_pred[i] = 0; end
    foreach (disp_valid[i]) begin disp_valid[i] = 0; disp_idx[i] = 0; comp_valid[i] = 0; comp_idx[i] = 0;
                                  comp_gen[i] = 0; inv_valid[i] = 0; inv_tag[i] = 0; end
    foreach (alloc_take[i]) alloc_take[i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 8000; n++) begin
      int disp_s [NP];
      @(negedge clk);
      cycle++;
      // ---- allocation
      for (int i = 0; i < AW; i++) begin
        alloc_valid[i] = (n < 7700) && ($urandom_range(0, 2) != 0) && (i == 0 || alloc_valid[i-1]);
        alloc_uop[i].op    = OP_ADD;
        alloc_uop[i].src_a = preg_t'($urandom_range(1, 6));
        alloc_uop[i].src_b = preg_t'($urandom_range(1, 6));
        alloc_uop[i].dest  = preg_t'($urandom_range(7, 12));
        alloc_uop[i].pc    = word_t'(serial + i);
      end
      // ---- dispatch: random undispatched entries
      foreach (disp_valid[k]) begin disp_valid[k] = 0; disp_s[k] = -1; end
      begin
        int k;
        k = 0;
        foreach (ents[s]) begin
          if (k < NP && !ents[s].disp && $urandom_range(0, 2) == 0) begin
            disp_valid[k] = 1; disp_idx[k] = ib_idx_t'(ents[s].idx); disp_s[k] = s; k++;
          end
        end
      end
      // ---- completions due
      foreach (comp_valid[k]) comp_valid[k] = 0;
      for (int k = 0; k < NP; k++) begin
        int j;
        j = -1;
        foreach (pend_q[q]) if (j < 0 && pend_q[q] / 65536 <= cycle) j = q;
        if (j >= 0) begin
          int s;
          s = pend_q[j] % 65536;
          comp_valid[k] = 1;
          comp_idx[k]   = ib_idx_t'(ents[s].idx);
          comp_gen[k]   = gen_t'(pend_gen[j]);
          pend_q.delete(j); pend_gen.delete(j);
        end
      end
      // a stale completion now and then
      if (!comp_valid[NP-1] && $urandom_range(0, 3) == 0) begin
        foreach (ents[s]) if (ents[s].dirty && ents[s].gen > 0 && !comp_valid[NP-1]) begin
          comp_valid[NP-1] = 1; comp_idx[NP-1] = ib_idx_t'(ents[s].idx); comp_gen[NP-1] = gen_t'(ents[s].gen - 1);
          n_stale++;
        end
      end
      // ---- invalidations
      foreach (inv_valid[k]) begin
        inv_valid[k] = ($urandom_range(0, 39) == 0);
        inv_tag[k]   = preg_t'($urandom_range(1, 6));
      end
      #1;
      // ---- allocation: the fitting prefix enters; fit is checked against the model
      for (int i = 0; i < AW; i++) begin
        bit exp_fit;
        exp_fit = alloc_valid[i] && (ents.size() + i < SIZE);
        checks++;
        if (alloc_fit[i] !== exp_fit) begin failures++; $display("FAIL alloc_fit[%0d]=%0d exp %0d", i, alloc_fit[i], exp_fit); end
        alloc_take[i] = alloc_fit[i] && (i == 0 || alloc_take[i-1]);
        if (alloc_valid[i] && !alloc_fit[i]) n_full++;
      end
      #1;
      // ---- check commits
      for (int c = 0; c < CW; c++) begin
        if (cm_valid[c]) begin
          int s;
          s = int'(cm_uop[c].pc);
          checks++;
          if (s != next_commit) begin failures++; $display("FAIL commit %0d expected %0d", s, next_commit); end
          else if (!ents.exists(s) || !ents[s].done) begin failures++; $display("FAIL commit of unfinished %0d", s); end
          next_commit = s + 1;
          ents.delete(s);
          n_commit++;
        end
      end
      // ---- check reissue output
      if (r_valid) begin
        int s;
        s = int'(r_uop.uop.pc);
        checks++;
        if (!ents.exists(s) || !ents[s].dirty || ents[s].reiss_out || r_uop.ib_idx != ib_idx_t'(ents[s].idx) || !r_uop.reissue) begin
          failures++; $display("FAIL unexpected reissue of %0d", s);
        end else begin
          // selected two cycles ago; a mark since then keeps it waiting
          ents[s].reiss_out = (last_mark[s] < cycle - 2);
          ents[s].gen = int'(r_uop.gen);
          pend_q.push_back((cycle + $urandom_range(1, 2)) * 65536 + s);
          pend_gen.push_back(int'(r_uop.gen));
          n_reissue++;
          if (cycle - mark_cycle[s] == 3) n_lat2++;
          if (cycle - last_mark[s] < 3 && ents[s].reiss_out) begin failures++; $display("FAIL reissue too early"); end
        end
      end
      // ---- model updates (same order as the buffer: completion, dispatch, marking)
      foreach (comp_valid[k]) if (comp_valid[k]) begin
        int s;
        s = serial_of(comp_idx[k]);
        if (s >= 0 && !(ents[s].dirty && !ents[s].reiss_out) && int'(comp_gen[k]) == ents[s].gen) begin
          ents[s].dirty = 0;
          ents[s].done  = 1;
        end
      end
      foreach (disp_valid[k]) if (disp_valid[k]) begin
        ents[disp_s[k]].disp = 1;
        pend_q.push_back((cycle + $urandom_range(1, 2)) * 65536 + disp_s[k]);
        pend_gen.push_back(0);
      end
      foreach (inv_valid[k]) if (inv_valid[k]) begin
        foreach (ents[s]) if (ents[s].disp && (ents[s].u.src_a == inv_tag[k] || ents[s].u.src_b == inv_tag[k])) begin
          if (!ents[s].dirty || ents[s].reiss_out) begin
            bit was_pending;
            was_pending = 0;
            foreach (ents[o]) if (ents[o].dirty && !ents[o].reiss_out) was_pending = 1;
            if (!was_pending) mark_cycle[s] = cycle; else mark_cycle[s] = -100;
          end
          last_mark[s] = cycle;
          ents[s].dirty = 1;
          ents[s].done = 0;
          ents[s].reiss_out = 0;
        end
      end
      // the first reissue for a lone mark must come exactly two cycles later
      // (three cycles after the report: select, read, issue; counted in n_lat2)
      begin
        for (int i = 0; i < AW; i++) if (alloc_take[i]) begin
          ents[serial + i] = '{u: alloc_uop[i], idx: int'(alloc_idx[i]), disp: 0, done: 0, dirty: 0, gen: 0, reiss_out: 0};
          checks++;
          if (int'(alloc_idx[i]) != (serial + i) % SIZE) begin failures++; $display("FAIL alloc index"); end
          n_alloc++;
        end
        foreach (alloc_take[i]) if (alloc_take[i]) serial++;
      end
    end
    checks++;
    if (n_commit != n_alloc) begin failures++; $display("FAIL %0d allocated, %0d committed", n_alloc, n_commit); end
    checks++;
    if (n_reissue < 100 || n_stale < 20 || n_full < 20 || n_lat2 < 10) begin
      failures++;
      $display("FAIL coverage reissue=%0d stale=%0d full=%0d lat2=%0d", n_reissue, n_stale, n_full, n_lat2);
    end
    $display("alloc=%0d commit=%0d reissue=%0d stale=%0d full=%0d lat2=%0d", n_alloc, n_commit, n_reissue, n_stale, n_full, n_lat2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
