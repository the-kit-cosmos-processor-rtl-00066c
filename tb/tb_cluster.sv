// tb_cluster: self-checking test of one execution cluster.
//
// A small cluster (4-wide entry, 4 ALUs, 8 window slots, 64 physical
// registers, 2 DMT references) is fed random renamed micro-ops by a bench-side
// renamer (8 architectural registers, a free list; a physical register is
// reused only when its value and every reader of it have completed). About a
// quarter of the micro-ops enter with a value prediction, right or wrong. A
// wrong prediction is only made for a value that no later micro-op reads, so
// every consumer sees correct operands and no reissue is needed (reissue is
// exercised in the full-core bench).
//
// Checked for every completion: the micro-op completes exactly once, with the
// value of an in-order golden model; c_changed is set exactly for wrong
// predictions; no micro-op completes before a source whose value was not
// predicted has completed; the commit read ports return final values; entry
// accepts a prefix of the group. Counted: predictions, wrong predictions,
// two-cycle results, DMT stalls and a full window.
module tb_cluster;
  import cosmos_pkg::*;

  localparam int IW = 4, NALU = 4, WS = 8, NP = 64, IDS = 2, NCK = 2, CW = 4, NA = 8;
  localparam int N_OPS = 6000;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic       d_valid      [IW];
  exec_uop_t  d_uop        [IW];
  word_t      d_pred_value [IW];
  logic       d_fit        [IW];
  logic       d_take       [IW];
  logic       r_valid;
  exec_uop_t  r_uop;
  logic       disp_valid [NALU];
  ib_idx_t    disp_idx   [NALU];
  logic       c_valid   [NALU];
  exec_uop_t  c_uop     [NALU];
  word_t      c_value   [NALU];
  logic       c_changed [NALU];
  logic       c_slow    [NALU];
  preg_t      cm_tag   [CW];
  word_t      cm_value [CW];
  logic       ckpt_take, ckpt_restore;
  logic [0:0] ckpt_take_idx, ckpt_restore_idx;
  logic [3:0] win_occupancy;
  logic       dmt_stall;

  cluster #(.IW(IW), .NALU(NALU), .WS(WS), .NPREGS(NP), .IDS(IDS), .NCKPT(NCK), .CW(CW)) dut (.*);

  int checks = 0, failures = 0, cycle = 0;
  int n_pred = 0, n_wrong = 0, n_slow = 0, n_dmt = 0, n_full = 0, n_done = 0;

  // golden state
  word_t arch [NA];
  int    map  [NA];
  bit    poison [NA];       // architectural value that must not be read
  int    free_q [$];
  // per physical register: value, producer completed, readers outstanding
  word_t pval    [NP];
  bit    pdone   [NP];
  bit    ppred   [NP];      // value was predicted correctly at entry
  int    preaders[NP];
  int    pfree_after [NP];  // old register freed once this register's producer completes
  // per micro-op (serial = pc)
  typedef struct { preg_t a; preg_t b; bit use_b; preg_t d; word_t val; bit pred; bit wrong; bit done; } op_t;
  op_t ops [int];
  int serial = 0;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic word_t golden(alu_op_e op, word_t a, word_t b);
    case (op)
      OP_ADD:  return a + b;
      OP_SUB:  return a - b;
      OP_AND:  return a & b;
      OP_OR:   return a | b;
      OP_XOR:  return a ^ b;
      OP_SLT:  return word_t'($signed(a) < $signed(b));
      default: return '0;
    endcase
  endfunction

  function automatic word_t rnd_word();
    case ($urandom_range(0, 3))
      0: return word_t'($urandom_range(0, 15));
      1: return 32'hFFFF_FFFF - word_t'($urandom_range(0, 3));
      2: return 32'h0000_FFFF;
      default: return word_t'($urandom);
    endcase
  endfunction

  // build slot i of the group (does not commit the renaming yet)
  exec_uop_t g_uop [IW];
  op_t       g_op  [IW];
  int        g_arch_d [IW];
  bit        g_poison [IW];

  initial begin
    for (int r = 0; r < NA; r++) begin map[r] = r; arch[r] = 0; poison[r] = 0; end
    foreach (pval[p]) begin pval[p] = 0; pdone[p] = 1; ppred[p] = 0; preaders[p] = 0; pfree_after[p] = 0; end
    for (int p = NA; p < NP; p++) free_q.push_back(p);
    foreach (d_valid[i]) begin d_valid[i] = 0; d_uop[i] = '0; d_pred_value[i] = 0; d_take[i] = 0; end
    foreach (cm_tag[c]) cm_tag[c] = 0;
    r_valid = 0; r_uop = '0;
    ckpt_take = 0; ckpt_restore = 0; ckpt_take_idx = 0; ckpt_restore_idx = 0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    while (serial < N_OPS || ops.size() != 0) begin
      @(negedge clk);
      cycle++;
      // ---- offer a group, renaming in order on a scratch copy
      begin
        word_t a2 [NA];
        int    m2 [NA];
        bit    p2 [NA];
        int    nfree;
        a2 = arch; m2 = map; p2 = poison;
        nfree = free_q.size();
        for (int i = 0; i < IW; i++) begin
          d_valid[i] = 0; d_uop[i] = '0; d_pred_value[i] = 0;
          if (serial + i < N_OPS && (i == 0 || d_valid[i-1]) && i < nfree && $urandom_range(0, 4) != 0) begin
            int ra, rb, rd;
            alu_op_e op;
            word_t av, bv;
            do ra = $urandom_range(0, NA - 1); while (p2[ra]);
            do rb = $urandom_range(0, NA - 1); while (p2[rb]);
            rd = $urandom_range(1, NA - 1);
            op = alu_op_e'($urandom_range(0, 5));
            d_valid[i] = 1;
            d_uop[i].uop.op    = op;
            d_uop[i].uop.src_a = preg_t'(m2[ra]);
            d_uop[i].uop.use_imm = ($urandom_range(0, 2) == 0);
            d_uop[i].uop.imm   = d_uop[i].uop.use_imm ? rnd_word() : '0;
            d_uop[i].uop.src_b = d_uop[i].uop.use_imm ? '0 : preg_t'(m2[rb]);
            d_uop[i].uop.dest  = preg_t'(free_q[i]);
            d_uop[i].uop.pc    = word_t'(serial + i);
            av = a2[ra];
            bv = d_uop[i].uop.use_imm ? d_uop[i].uop.imm : a2[rb];
            g_op[i] = '{a: d_uop[i].uop.src_a, b: d_uop[i].uop.src_b, use_b: !d_uop[i].uop.use_imm,
                        d: d_uop[i].uop.dest, val: golden(op, av, bv), pred: 0, wrong: 0, done: 0};
            if ($urandom_range(0, 3) == 0) begin
              d_uop[i].pred   = 1;
              g_op[i].pred    = 1;
              g_op[i].wrong   = ($urandom_range(0, 2) == 0);
              d_pred_value[i] = g_op[i].wrong ? (g_op[i].val ^ word_t'($urandom_range(1, 255))) : g_op[i].val;
            end
            g_arch_d[i] = rd;
            a2[rd] = g_op[i].val;
            m2[rd] = int'(d_uop[i].uop.dest);
            p2[rd] = g_op[i].wrong;
          end
        end
      end
      // ---- commit read ports: read registers whose producer has completed
      foreach (cm_tag[c]) cm_tag[c] = preg_t'($urandom_range(0, NP - 1));
      #1;
      // ---- entry: the fitting prefix enters
      begin
        bit pfx;
        pfx = 1;
        for (int i = 0; i < IW; i++) begin
          if (d_fit[i] && (!pfx || !d_valid[i])) begin failures++; $display("FAIL fit is not a prefix of the offered group"); end
          if (pfx && d_valid[i] && !d_fit[i]) begin
            if (dmt_stall) n_dmt++;
            else if (int'(win_occupancy) + i >= WS) n_full++;
            else begin failures++; $display("FAIL micro-op %0d refused with room", i); end
          end
          pfx = pfx && d_fit[i];
          d_take[i] = pfx;
        end
      end
      // ---- check the commit read ports (values are final once the producer completed)
      foreach (cm_tag[c]) begin
        if (cm_tag[c] != 0 && pdone[cm_tag[c]] && !ppred[cm_tag[c]] && preaders[cm_tag[c]] >= 0) begin
          checks++;
          if (cm_value[c] != pval[cm_tag[c]]) begin
            failures++; $display("FAIL read port p%0d = %h, expected %h", cm_tag[c], cm_value[c], pval[cm_tag[c]]);
          end
        end
      end
      // ---- completions
      for (int k = 0; k < NALU; k++) begin
        if (c_valid[k]) begin
          int s;
          s = int'(c_uop[k].uop.pc);
          checks++;
          if (!ops.exists(s) || ops[s].done) begin
            failures++; $display("FAIL completion of unknown or finished micro-op %0d", s);
          end else begin
            if (c_value[k] != ops[s].val) begin
              failures++; $display("FAIL micro-op %0d value %h expected %h", s, c_value[k], ops[s].val);
            end
            if (c_changed[k] != (ops[s].pred && ops[s].wrong && ops[s].d != 0)) begin
              failures++; $display("FAIL micro-op %0d changed=%0d pred=%0d wrong=%0d", s, c_changed[k], ops[s].pred, ops[s].wrong);
            end
            if ((!pdone[ops[s].a] && !ppred[ops[s].a]) || (ops[s].use_b && !pdone[ops[s].b] && !ppred[ops[s].b])) begin
              failures++; $display("FAIL micro-op %0d completed before its sources", s);
            end
            if (c_slow[k]) n_slow++;
            ops[s].done = 1;
          end
        end
      end
      // ---- model updates at the clock edge
      for (int k = 0; k < NALU; k++) begin
        if (c_valid[k] && ops.exists(int'(c_uop[k].uop.pc))) begin
          int s;
          s = int'(c_uop[k].uop.pc);
          if (ops[s].d != 0) begin
            pdone[ops[s].d] = 1;
            if (pfree_after[ops[s].d] != 0) begin
              preaders[pfree_after[ops[s].d]]--;   // the redefinition no longer holds the old register
              pfree_after[ops[s].d] = 0;
            end
          end
          preaders[ops[s].a]--;
          if (ops[s].use_b) preaders[ops[s].b]--;
          ops.delete(s);
          n_done++;
        end
      end
      for (int i = 0; i < IW; i++) begin
        if (d_take[i]) begin
          int old;
          ops[serial] = g_op[i];
          preaders[g_op[i].a]++;
          if (g_op[i].use_b) preaders[g_op[i].b]++;
          void'(free_q.pop_front());
          pval[g_op[i].d]  = g_op[i].val;
          pdone[g_op[i].d] = 0;
          ppred[g_op[i].d] = g_op[i].pred && !g_op[i].wrong;
          old = map[g_arch_d[i]];
          // the old register is held until the new value exists
          preaders[old]++;
          pfree_after[g_op[i].d] = old;
          arch[g_arch_d[i]]   = g_op[i].val;
          map[g_arch_d[i]]    = int'(g_op[i].d);
          poison[g_arch_d[i]] = g_op[i].wrong;
          if (g_op[i].pred) n_pred++;
          if (g_op[i].wrong) n_wrong++;
          serial++;
        end
      end
      // free registers that are no longer mapped, complete and unread
      for (int p = NA; p < NP; p++) begin
        bit mapped, queued;
        mapped = 0; queued = 0;
        foreach (map[r]) if (map[r] == p) mapped = 1;
        foreach (free_q[q]) if (free_q[q] == p) queued = 1;
        if (!mapped && !queued && pdone[p] && preaders[p] == 0) begin
          free_q.push_back(p);
          ppred[p] = 0;
        end
      end
      preaders[0] = 0;
      @(posedge clk);
      #1;
      foreach (d_take[i]) d_take[i] = 0;
    end
    checks++;
    if (n_done != N_OPS) begin failures++; $display("FAIL %0d of %0d micro-ops completed", n_done, N_OPS); end
    checks++;
    if (n_pred < 100 || n_wrong < 20 || n_slow < 20 || n_dmt < 10 || n_full < 10) begin
      failures++;
      $display("FAIL coverage pred=%0d wrong=%0d slow=%0d dmt=%0d full=%0d", n_pred, n_wrong, n_slow, n_dmt, n_full);
    end
    $display("ops=%0d cycles=%0d pred=%0d wrong=%0d slow=%0d dmt-stall=%0d window-full=%0d", n_done, cycle, n_pred, n_wrong, n_slow, n_dmt, n_full);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
