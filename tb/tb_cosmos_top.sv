// tb_cosmos_top: end-to-end test of the COSMOS core at its default sizes.
//
// Back end: the bench renames a looping program of 24 static micro-ops (16
// architectural registers, a free list of physical registers, the old
// register of a destination freed when the redefining micro-op commits) and
// offers 8 micro-ops per cycle; those not accepted move to the front of the
// next cycle's group. A golden in-order model computes every
// result; each committed micro-op must come out in program order with the
// right destination and value. The program is built so that the mechanisms of
// the core all occur: stride-predictable values (value prediction), a
// counter that wraps (value mispredictions and reissue from the instruction
// buffer), additions of -1 (carries over 16 bits, two-cycle ALU results),
// three consumers of one pending register (DMT reference slots run out) and a
// serial dependence chain (the instruction buffer fills up). The run opens
// with a three-instruction loop whose values form one serial chain that no
// stride predicts (r12 += r13; r13 ^= r12; r13 += constant): every micro-op
// waits, so the scheduling window fills up.
// DMT checkpoints are taken and restored while no micro-op is entering.
//
// Front end: fetch runs on a synthetic program through a behavioural
// instruction cache; the fetched stream must follow the predicted path, and
// NCB traces must be built and used.
//
// Every mechanism is counted; one that never happened counts as a failure.
module tb_cosmos_top;
  import cosmos_pkg::*;
  import tb_prog_pkg::*;

  localparam int IW = 8, CW = 8, NALU = 8, NPREGS = 544, NA = 16, BODY = 24;
  localparam int N_DYN = 7000, N_CHAIN = 2000;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  word_t  ic_pc;
  logic [FETCH_W-1:0][XLEN-1:0] ic_instr, ic_target, f_instr, f_pc;
  logic [FETCH_W-1:0] ic_is_branch, bp_taken;
  logic   redirect_valid;
  word_t  redirect_pc;
  logic   f_valid, f_from_ncb, f_ready, ncb_fill;
  logic [3:0] f_count;
  logic   in_valid [IW];
  uop_t   in_uop   [IW];
  logic   in_accept[IW];
  logic   cm_valid [CW];
  uop_t   cm_uop   [CW];
  word_t  cm_value [CW];
  logic   ckpt_take, ckpt_restore;
  logic [1:0] ckpt_take_idx, ckpt_restore_idx;
  logic [8:0] win_occupancy;
  logic [9:0] ib_count;
  logic   dmt_stall, reissue_valid;

  cosmos_top dut (.*);
  icache_model u_ic (.pc(ic_pc), .instr(ic_instr), .is_br(ic_is_branch), .target(ic_target), .taken(bp_taken));

  int checks = 0, failures = 0, cycle = 0;

  // ---------------------------------------------------------------- program
  typedef struct { alu_op_e op; int d; int a; int b; bit imm; word_t iv; } sinst_t;
  sinst_t body [BODY];
  sinst_t body2 [3];

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

  initial begin
    body[0]  = '{OP_ADD, 1, 1, 0, 1, 32'd1};          // r1 += 1         (stride)
    body[1]  = '{OP_ADD, 2, 1, 1, 0, 0};              // r2 = 2*r1       (stride)
    body[2]  = '{OP_ADD, 3, 2, 0, 1, 32'hFFFF_FFFF};  // r3 = r2 - 1     (long carry)
    body[3]  = '{OP_ADD, 4, 4, 0, 1, 32'd1};          // r4 += 1
    body[4]  = '{OP_AND, 4, 4, 0, 1, 32'd7};          // r4 &= 7         (wraps)
    body[5]  = '{OP_ADD, 5, 4, 1, 0, 0};              // r5 = r4 + r1    (mostly stride)
    body[6]  = '{OP_XOR, 6, 5, 12, 0, 0};            // waits on the chain
    body[7]  = '{OP_ADD, 9, 6, 1, 0, 0};              // three readers of r6
    body[8]  = '{OP_SUB, 10, 6, 2, 0, 0};
    body[9]  = '{OP_OR,  11, 6, 3, 0, 0};
    body[10] = '{OP_SLT, 8, 9, 10, 0, 0};
    body[11] = '{OP_ADD, 12, 12, 11, 0, 0};           // serial chain through r12
    body[12] = '{OP_SUB, 12, 12, 0, 1, 32'd3};
    body[13] = '{OP_XOR, 12, 12, 5, 0, 0};
    body[14] = '{OP_ADD, 12, 12, 0, 1, 32'hFFFF_0001};
    body[15] = '{OP_ADD, 13, 12, 4, 0, 0};
    body[16] = '{OP_AND, 14, 13, 0, 1, 32'h00FF_FF0F};
    body[17] = '{OP_ADD, 15, 14, 0, 1, 32'hFFFF_FFFF};
    body[18] = '{OP_SUB, 7, 15, 8, 0, 0};
    body[19] = '{OP_ADD, 12, 12, 7, 0, 0};
    body[20] = '{OP_SLT, 0, 7, 3, 0, 0};
    body[21] = '{OP_OR,  0, 0, 4, 1, 32'h5};
    body[22] = '{OP_ADD, 0, 0, 6, 0, 0};
    body[23] = '{OP_XOR, 12, 12, 4, 0, 0};
    body2[0] = '{OP_ADD, 12, 12, 13, 0, 0};
    body2[1] = '{OP_XOR, 13, 12, 13, 0, 0};
    body2[2] = '{OP_ADD, 13, 13, 0, 1, 32'h9E37_79B9};
  end

  // ---------------------------------------------------------------- renaming and golden model
  int    map   [NA];
  word_t arch  [NA];
  int    free_q [$];
  typedef struct { word_t pc; int dest; word_t val; int old; } exp_t;
  exp_t  exp_q [$];
  int    n_dyn = 0;

  // ---------------------------------------------------------------- mechanism counters
  int n_pred = 0, n_vmiss = 0, n_reissue = 0, n_slow = 0, n_dmtstall = 0, n_winfull = 0,
      n_ibfull = 0, n_restore = 0, n_commit = 0, n_ncb = 0, n_fill = 0, n_fetch = 0, max_win = 0;

  always @(negedge clk) begin
    if (rst_n) begin
      cycle++;
      if (reissue_valid) n_reissue++;
      for (int k = 0; k < NALU; k++) begin
        if (dut.c_valid[k] && dut.c_slow[k]) n_slow++;
        if (dut.c_changed[k] && dut.c_uop[k].pred) n_vmiss++;
      end
      // the first micro-op refused in this cycle, and why
      for (int i = 0; i < IW; i++) begin
        if (in_valid[i] && !in_accept[i] && (i == 0 || in_accept[i-1])) begin
          if (!dut.ib_fit[i]) n_ibfull++;
          if (dmt_stall) n_dmtstall++;
          else if (!dut.cl_fit[i]) n_winfull++;
        end
        if (in_accept[i] && dut.ib_pred[i]) n_pred++;
      end
      if (ncb_fill) n_fill++;
      if (int'(win_occupancy) > max_win) max_win = int'(win_occupancy);
    end
  end

  // commit checker
  always @(negedge clk) begin
    if (rst_n) begin
      for (int c = 0; c < CW; c++) begin
        if (cm_valid[c]) begin
          exp_t e;
          checks++;
          if (exp_q.size() == 0) begin
            failures++; $display("FAIL commit with nothing outstanding");
          end else begin
            e = exp_q.pop_front();
            if (cm_uop[c].pc != e.pc || int'(cm_uop[c].dest) != e.dest || (e.dest != 0 && cm_value[c] != e.val)) begin
              failures++;
              $display("FAIL commit #%0d pc %0d dest %0d value %h, expected pc %0d dest %0d value %h",
                       n_commit, cm_uop[c].pc, cm_uop[c].dest, cm_value[c], e.pc, e.dest, e.val);
            end
            if (e.old != 0) free_q.push_back(e.old);
          end
          n_commit++;
        end
      end
    end
  end

  // front end: the fetched stream must follow the predicted path
  word_t fexp;
  always @(negedge clk) begin
    if (rst_n && f_valid && f_ready && !redirect_valid) begin
      word_t a;
      a = fexp;
      n_fetch++;
      if (f_from_ncb) n_ncb++;
      checks++;
      for (int i = 0; i < FETCH_W; i++) begin
        if (i < int'(f_count)) begin
          if (f_pc[i] != a || f_instr[i] != instr_at(a)) begin
            failures++; $display("FAIL fetch slot %0d pc %h expected %h", i, f_pc[i], a);
          end
          a = walk_next(a);
        end
      end
      fexp = a;
    end
  end

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog: dyn=%0d committed=%0d ib=%0d window=%0d accept0=%0d", n_dyn, n_commit, ib_count, win_occupancy, in_accept[0]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // drop the first n_acc micro-ops of the group, move the rest to the front
  // and fill the free slots with the next micro-ops of the program
  task automatic make_group(int n_acc);
    for (int i = 0; i < IW; i++) begin
      if (i + n_acc < IW) begin
        in_valid[i] = in_valid[i + n_acc];
        in_uop[i]   = in_uop[i + n_acc];
      end else begin
        in_valid[i] = 0;
        in_uop[i]   = '0;
      end
    end
    for (int i = 0; i < IW; i++) begin
      if (!in_valid[i] && n_dyn < N_DYN) begin
        sinst_t s;
        exp_t   e;
        int     pd;
        word_t  bv;
        s = (n_dyn < N_CHAIN) ? body2[n_dyn % 3] : body[(n_dyn - N_CHAIN) % BODY];
        in_valid[i]       = 1;
        in_uop[i].op      = s.op;
        in_uop[i].pc      = (n_dyn < N_CHAIN) ? word_t'(256 + 4 * (n_dyn % 3)) : word_t'(4 * ((n_dyn - N_CHAIN) % BODY));
        in_uop[i].src_a   = preg_t'(map[s.a]);
        in_uop[i].use_imm = s.imm;
        in_uop[i].imm     = s.imm ? s.iv : '0;
        in_uop[i].src_b   = s.imm ? '0 : preg_t'(map[s.b]);
        bv = s.imm ? s.iv : arch[s.b];
        e.pc  = in_uop[i].pc;
        if (s.d == 0) begin
          in_uop[i].dest = '0;
          e.dest = 0; e.val = 0; e.old = 0;
        end else begin
          pd = free_q.pop_front();
          in_uop[i].dest = preg_t'(pd);
          e.dest = pd;
          e.val  = golden(s.op, arch[s.a], bv);
          e.old  = map[s.d];
          map[s.d]  = pd;
          arch[s.d] = e.val;
        end
        exp_q.push_back(e);
        n_dyn++;
      end
    end
  endtask

  initial begin
    for (int r = 0; r < NA; r++) begin map[r] = r + 1; arch[r] = 0; end
    map[0] = 0;   // architectural r0 is the zero register
    for (int p = NA + 1; p < NPREGS; p++) free_q.push_back(p);
    foreach (in_valid[i]) begin in_valid[i] = 0; in_uop[i] = '0; end
    redirect_valid = 0; redirect_pc = 0; f_ready = 1; fexp = 0;
    ckpt_take = 0; ckpt_restore = 0; ckpt_take_idx = 0; ckpt_restore_idx = 0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    @(posedge clk);
    #1;
    make_group(0);
    while (exp_q.size() != 0 || n_dyn < N_DYN) begin
      @(negedge clk);
      // every 300 cycles: a checkpoint and its restore with nothing entering
      if (cycle % 300 == 100 && in_valid[0]) begin
        logic   sv [IW];
        uop_t   su [IW];
        sv = in_valid; su = in_uop;
        foreach (in_valid[i]) in_valid[i] = 0;
        ckpt_take = 1; ckpt_take_idx = 2'($urandom_range(0, 3));
        @(negedge clk);
        ckpt_take = 0;
        ckpt_restore = 1; ckpt_restore_idx = ckpt_take_idx;
        n_restore++;
        @(negedge clk);
        ckpt_restore = 0;
        in_valid = sv; in_uop = su;
      end
      #1;
      begin
        int n_acc;
        n_acc = 0;
        foreach (in_accept[i]) if (in_accept[i]) n_acc++;
        @(posedge clk);
        #1;
        f_ready = ($urandom_range(0, 7) != 0);
        make_group(n_acc);
      end
    end
    repeat (5) @(posedge clk);
    checks++;
    if (n_commit != N_DYN) begin failures++; $display("FAIL %0d committed of %0d", n_commit, N_DYN); end
    checks++;
    if (n_pred == 0 || n_vmiss == 0 || n_reissue == 0 || n_slow == 0 || n_dmtstall == 0 ||
        n_winfull == 0 || n_ibfull == 0 || n_restore == 0 || n_ncb == 0 || n_fill == 0) begin
      failures++;
      $display("FAIL a mechanism never occurred");
    end
    $display("cycles=%0d committed=%0d IPC*100=%0d max-window=%0d", cycle, n_commit, n_commit * 100 / cycle, max_win);
    $display("predicted=%0d value-mispredicted=%0d reissued=%0d slow-alu=%0d dmt-stall=%0d window-full=%0d ib-full=%0d restores=%0d",
             n_pred, n_vmiss, n_reissue, n_slow, n_dmtstall, n_winfull, n_ibfull, n_restore);
    $display("fetch blocks=%0d from-ncb=%0d ncb-fills=%0d", n_fetch, n_ncb, n_fill);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
