// tb_edf_window: self-checking test of the EDF scheduling window.
//
// A small window (8 slots, 2-wide insert and dispatch, 16 registers, 2 DMT
// references) is fed random renamed micro-ops whose sources are results of
// earlier micro-ops. The bench plays the execution units: a dispatched
// micro-op completes 1 to 3 cycles later and its tag is sent as a wakeup.
// Checked: a micro-op is dispatched only after both its sources completed;
// no micro-op is dispatched twice or lost; and when a dispatch port is left
// unused, no micro-op that has been ready for a cycle is left waiting; the
// per-op fit signal forms a prefix and drops only when the window is full or
// the DMT has no free reference. The bench takes every fitting micro-op.
module tb_edf_window;
  import cosmos_pkg::*;

  localparam int WS = 8, IW = 2, ISW = 2, NWK = 2, NP = 16, IDS = 2, NCK = 2;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic      ins_valid [IW];
  exec_uop_t ins_uop   [IW];
  logic      ins_rdy_a [IW];
  logic      ins_rdy_b [IW];
  logic      ins_fit   [IW];
  logic      ins_take  [IW];
  logic      wake_valid [NWK];
  preg_t     wake_tag   [NWK];
  logic      iss_en    [ISW];
  logic      iss_valid [ISW];
  exec_uop_t iss_uop   [ISW];
  logic      ckpt_take, ckpt_restore;
  logic [0:0] ckpt_take_idx, ckpt_restore_idx;
  logic [3:0] occupancy;
  logic      dmt_stall;

  edf_window #(.WS(WS), .IW(IW), .ISSUE_W(ISW), .NWAKE(NWK), .NPREGS(NP), .IDS(IDS), .NCKPT(NCK)) dut (.*);

  int checks = 0, failures = 0;
  int cycle = 0;
  int n_ins = 0, n_disp = 0, n_dmtstall = 0, n_full = 0, n_wait = 0;

  // per tag: cycle its value completed (-1 = pending)
  int done_at [NP];
  // per tag: in use as destination of an uncompleted or waiting micro-op
  int users [NP];
  bit in_win [int];          // serial -> waiting in window
  exec_uop_t win_uop [int];
  int complete_q [$];        // encoded: cycle*64 + tag
  int serial = 0;

  initial begin : watchdog
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit src_done(preg_t t, int now);
    return t == 0 || (done_at[t] >= 0 && done_at[t] < now);
  endfunction

  initial begin
    foreach (done_at[t]) begin done_at[t] = 0; users[t] = 0; end
    foreach (ins_valid[i]) begin ins_valid[i] = 0; ins_uop[i] = '0; ins_rdy_a[i] = 0; ins_rdy_b[i] = 0; end
    foreach (wake_valid[w]) begin wake_valid[w] = 0; wake_tag[w] = 0; end
    foreach (iss_en[k]) iss_en[k] = 1;
    foreach (ins_take[i]) ins_take[i] = 0;
    ckpt_take = 0; ckpt_restore = 0; ckpt_take_idx = 0; ckpt_restore_idx = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 6000 + 200; n++) begin
      @(negedge clk);
      cycle++;
      // ---- wakeups due this cycle
      foreach (wake_valid[w]) wake_valid[w] = 0;
      for (int w = 0; w < NWK; w++) begin
        int idx;
        idx = -1;
        foreach (complete_q[j]) if (idx < 0 && complete_q[j] / 64 <= cycle) idx = j;
        if (idx >= 0) begin
          wake_valid[w] = 1;
          wake_tag[w]   = preg_t'(complete_q[idx] % 64);
          complete_q.delete(idx);
        end
      end
      // ---- insertion group
      begin
        bit   used [NP];
        foreach (used[t]) used[t] = 0;
        for (int i = 0; i < IW; i++) begin
          preg_t d;
          int tries;
          ins_valid[i] = 0;
          if (n < 6000 && $urandom_range(0, 3) != 0) begin
            d = 0;
            for (tries = 0; tries < 8 && d == 0; tries++) begin
              preg_t c;
              c = preg_t'($urandom_range(1, NP - 1));
              if (users[c] == 0 && done_at[c] >= 0 && !used[c]) d = c;
            end
            if (d != 0 && (i == 0 || ins_valid[i-1])) begin
              ins_valid[i] = 1;
              used[d] = 1;
              ins_uop[i] = '0;
              ins_uop[i].uop.dest  = d;
              ins_uop[i].uop.src_a = preg_t'($urandom_range(0, NP - 1));
              ins_uop[i].uop.src_b = preg_t'($urandom_range(0, NP - 1));
              ins_uop[i].uop.pc    = word_t'(serial + i);
            end
          end
        end
        // a source never names a register given out as a destination in this group
        for (int i = 0; i < IW; i++) begin
          if (used[ins_uop[i].uop.src_a]) ins_uop[i].uop.src_a = 0;
          if (used[ins_uop[i].uop.src_b]) ins_uop[i].uop.src_b = 0;
        end
        for (int i = 0; i < IW; i++) begin
          bit wa, wb;
          wa = 0; wb = 0;
          foreach (wake_valid[w]) begin
            if (wake_valid[w] && wake_tag[w] == ins_uop[i].uop.src_a) wa = 1;
            if (wake_valid[w] && wake_tag[w] == ins_uop[i].uop.src_b) wb = 1;
          end
          ins_rdy_a[i] = ins_uop[i].uop.src_a == 0 || done_at[ins_uop[i].uop.src_a] >= 0 || wa;
          ins_rdy_b[i] = ins_uop[i].uop.src_b == 0 || done_at[ins_uop[i].uop.src_b] >= 0 || wb;
        end
      end
      // mostly open dispatch ports, with phases of heavy back-pressure
      foreach (iss_en[k]) iss_en[k] = ((n % 400) < 60) ? ($urandom_range(0, 7) == 0) : ($urandom_range(0, 7) != 0);
      #1;
      // take the fitting prefix; check why the first refused one is refused
      begin
        bit pfx;
        pfx = 1;
        for (int i = 0; i < IW; i++) begin
          if (ins_fit[i] && !pfx) begin failures++; $display("FAIL fit is not a prefix"); end
          if (ins_fit[i] && !ins_valid[i]) begin failures++; $display("FAIL fit on an empty slot"); end
          if (pfx && ins_valid[i] && !ins_fit[i]) begin
            checks++;
            if (int'(occupancy) + i < WS && !dmt_stall) begin
              failures++; $display("FAIL op %0d refused with room and no DMT stall", i);
            end
            if (int'(occupancy) + i >= WS) n_full++; else n_dmtstall++;
          end
          pfx = pfx && ins_fit[i];
          ins_take[i] = pfx;
        end
      end
      #1;
      // ---- check dispatches
      begin
        int nd;
        nd = 0;
        for (int k = 0; k < ISW; k++) begin
          if (iss_valid[k]) begin
            int s;
            nd++;
            s = int'(iss_uop[k].uop.pc);
            checks++;
            if (!iss_en[k]) begin failures++; $display("FAIL dispatch on masked port"); end
            if (!in_win.exists(s)) begin
              failures++; $display("FAIL dispatch of unknown/duplicate %0d", s);
            end else begin
              if (!src_done(iss_uop[k].uop.src_a, cycle) || !src_done(iss_uop[k].uop.src_b, cycle)) begin
                failures++; $display("FAIL %0d dispatched before its sources", s);
              end
              in_win.delete(s);
              complete_q.push_back((cycle + $urandom_range(1, 3)) * 64 + int'(iss_uop[k].uop.dest));
              n_disp++;
            end
          end
        end
        // nothing ready may be left behind while an enabled port is free
        begin
          int nen;
          int nready;
          nen = 0; nready = 0;
          foreach (iss_en[k]) if (iss_en[k]) nen++;
          foreach (in_win[s]) begin
            if (src_done(win_uop[s].uop.src_a, cycle) && src_done(win_uop[s].uop.src_b, cycle)) nready++;
          end
          checks++;
          if (nd < nen && nready > 0) begin
            failures++; $display("FAIL cycle %0d: %0d ready micro-ops left with free ports", cycle, nready);
          end
          if (nd == nen && nready > 0) n_wait++;
        end
      end
      // ---- bookkeeping of the insertion
      begin
        for (int i = 0; i < IW; i++) begin
          if (ins_take[i]) begin
            in_win[int'(ins_uop[i].uop.pc)] = 1;
            win_uop[int'(ins_uop[i].uop.pc)] = ins_uop[i];
            done_at[ins_uop[i].uop.dest] = -1;
            n_ins++;
          end
        end
        serial += IW;
      end
      // wakeups take effect at the end of this cycle
      foreach (wake_valid[w]) if (wake_valid[w]) done_at[wake_tag[w]] = cycle;
      foreach (users[t]) users[t] = 0;
      foreach (in_win[s]) begin
        users[win_uop[s].uop.src_a]++;
        users[win_uop[s].uop.src_b]++;
        users[win_uop[s].uop.dest]++;
      end
      users[0] = 0;
    end
    checks++;
    if (in_win.size() != 0 || n_ins != n_disp) begin
      failures++; $display("FAIL %0d micro-ops never dispatched", in_win.size());
    end
    checks++;
    if (n_ins < 1000 || n_dmtstall < 10 || n_full < 10 || n_wait < 10) begin
      failures++;
      $display("FAIL coverage ins=%0d dmtstall=%0d full=%0d wait=%0d", n_ins, n_dmtstall, n_full, n_wait);
    end
    $display("ins=%0d disp=%0d dmtstall=%0d full=%0d wait=%0d", n_ins, n_disp, n_dmtstall, n_full, n_wait);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
