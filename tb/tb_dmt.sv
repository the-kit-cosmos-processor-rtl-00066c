// tb_dmt: self-checking test of the dataflow management table.
//
// A small table (16 registers, 2 references each, 4 registration and 2 wakeup
// ports, 2 checkpoints) is driven with random registrations, wakeups,
// checkpoint takes and restores. A reference model keeps, per register, the
// set of (slot id, side) references; the per-port fit signal, the references
// returned at wakeup (compared as sets), and the effect of restores are all
// checked against it. Each cycle a random prefix of the fitting ports is
// committed, as the window does when micro-ops enter in order.
module tb_dmt;
  import cosmos_pkg::*;

  localparam int NP = 16, IDS = 2, NREG = 4, NWAKE = 2, NCKPT = 2;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic     reg_valid [NREG];
  preg_t    reg_tag   [NREG];
  win_id_t  reg_id    [NREG];
  logic     reg_side  [NREG];
  logic     reg_ok    [NREG];
  logic     reg_commit[NREG];
  logic     wake_valid [NWAKE];
  preg_t    wake_tag   [NWAKE];
  dmt_ref_t wake_ref   [NWAKE][IDS];
  logic     ckpt_take, ckpt_restore;
  logic [0:0] ckpt_take_idx, ckpt_restore_idx;

  dmt #(.NPREGS(NP), .IDS(IDS), .NREG(NREG), .NWAKE(NWAKE), .NCKPT(NCKPT)) dut (.*);

  int checks = 0, failures = 0;
  int n_reg = 0, n_nofit = 0, n_wakehit = 0, n_restore = 0;

  // model: list of {id,side} encoded as id*2+side per register
  int m   [NP][$];
  int ck  [NCKPT][NP][$];

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (reg_valid[r]) begin reg_valid[r] = 0; reg_tag[r] = 0; reg_id[r] = 0; reg_side[r] = 0; end
    foreach (wake_valid[w]) begin wake_valid[w] = 0; wake_tag[w] = 0; end
    foreach (reg_commit[r]) reg_commit[r] = 0;
    ckpt_take = 0; ckpt_restore = 0; ckpt_take_idx = 0; ckpt_restore_idx = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 5000; n++) begin
      bit exp_ok [NREG];
      int cnt [NP];
      int ncommit;
      bit pfx;
      bit busy [NP];
      @(negedge clk);
      foreach (busy[t]) busy[t] = 0;
      // wakeups on distinct tags
      foreach (wake_valid[w]) begin
        wake_valid[w] = ($urandom_range(0, 2) == 0);
        wake_tag[w]   = preg_t'($urandom_range(1, NP - 1));
        if (wake_valid[w] && busy[wake_tag[w]]) wake_valid[w] = 0;
        if (wake_valid[w]) busy[wake_tag[w]] = 1;
      end
      // registrations avoiding tags woken this cycle
      foreach (cnt[t]) cnt[t] = m[t].size();
      foreach (reg_valid[r]) begin
        reg_valid[r] = ($urandom_range(0, 1) == 0);
        reg_tag[r]   = preg_t'($urandom_range(1, NP - 1));
        reg_id[r]    = win_id_t'($urandom_range(0, 255));
        reg_side[r]  = $urandom_range(0, 1);
        if (busy[reg_tag[r]]) reg_valid[r] = 0;
        exp_ok[r] = cnt[reg_tag[r]] < IDS;
        if (reg_valid[r]) cnt[reg_tag[r]]++;
      end
      // commit a random-length prefix of the ports that fit
      ncommit = $urandom_range(0, NREG);
      pfx = 1;
      foreach (reg_commit[r]) begin
        pfx = pfx && (r < ncommit) && (!reg_valid[r] || exp_ok[r]);
        reg_commit[r] = pfx;
      end
      ckpt_take        = $urandom_range(0, 15) == 0;
      ckpt_take_idx    = 1'($urandom_range(0, 1));
      ckpt_restore     = !ckpt_take && $urandom_range(0, 31) == 0;
      ckpt_restore_idx = 1'($urandom_range(0, 1));
      #1;
      foreach (reg_valid[r]) if (reg_valid[r]) begin
        checks++;
        if (reg_ok[r] !== exp_ok[r]) begin
          failures++;
          $display("FAIL ok port %0d tag %0d got %0d exp %0d", r, reg_tag[r], reg_ok[r], exp_ok[r]);
        end
        if (!exp_ok[r]) n_nofit++;
      end
      foreach (wake_valid[w]) begin
        if (wake_valid[w]) begin
          int got[$];
          int exp[$];
          got.delete();
          for (int s = 0; s < IDS; s++)
            if (wake_ref[w][s].valid) got.push_back(int'(wake_ref[w][s].id) * 2 + int'(wake_ref[w][s].side));
          exp = m[wake_tag[w]];
          got.sort(); exp.sort();
          checks++;
          if (got != exp) begin failures++; $display("FAIL wake tag %0d got %p exp %p", wake_tag[w], got, exp); end
          if (exp.size() > 0) n_wakehit++;
        end
      end
      // update model in the same order as the hardware
      if (ckpt_take) ck[ckpt_take_idx] = m;
      if (ckpt_restore) begin
        m = ck[ckpt_restore_idx];
        n_restore++;
      end else begin
        foreach (reg_valid[r]) if (reg_valid[r] && reg_commit[r]) begin
          m[reg_tag[r]].push_back(int'(reg_id[r]) * 2 + int'(reg_side[r]));
          n_reg++;
        end
      end
      foreach (wake_valid[w]) if (wake_valid[w]) begin
        m[wake_tag[w]].delete();
        for (int c = 0; c < NCKPT; c++) ck[c][wake_tag[w]].delete();
      end
    end
    checks++;
    if (n_reg < 100 || n_nofit < 50 || n_wakehit < 100 || n_restore < 20) begin
      failures++;
      $display("FAIL coverage reg=%0d nofit=%0d wakehit=%0d restore=%0d", n_reg, n_nofit, n_wakehit, n_restore);
    end
    $display("reg=%0d nofit=%0d wakehit=%0d restore=%0d", n_reg, n_nofit, n_wakehit, n_restore);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
