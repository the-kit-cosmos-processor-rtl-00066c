// tb_fill_unit: self-checking test of the trace fill unit.
//
// The bench delivers the blocks a fetch unit without an NCB would take from
// the instruction cache along the predicted path of a synthetic program
// (each block cut after its first predicted-taken branch), with an occasional
// redirect to a random address and an occasional block marked as coming from
// the NCB. Every trace written is checked against a walk of the predicted path
// from its start address: its instructions, the split point, the target, the
// next fetch address and the finishing rule (line buffer full, or second
// predicted-taken branch).
module tb_fill_unit;
  import cosmos_pkg::*;
  import tb_prog_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic   obs_valid, obs_from_ncb;
  word_t  obs_pc;
  logic [3:0] obs_count;
  logic [FETCH_W-1:0][XLEN-1:0] obs_instr, obs_target;
  logic [FETCH_W-1:0] obs_taken, is_br;
  logic   wr_valid;
  trace_t wr_trace;

  fill_unit dut (.*);
  icache_model u_ic (.pc(obs_pc), .instr(obs_instr), .is_br(is_br), .target(obs_target), .taken(obs_taken));

  int checks = 0, failures = 0, n_full = 0, n_two = 0, n_blocks = 0;

  initial begin : watchdog
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // check every write against the predicted path
  always @(negedge clk) begin
    if (rst_n && wr_valid) begin
      word_t a;
      int    nt;
      int    len1;
      word_t tgt;
      nt = 0; len1 = 0; tgt = 0;
      a = wr_trace.start_pc;
      checks++;
      for (int i = 0; i < FETCH_W; i++) begin
        if (i < int'(wr_trace.count)) begin
          if (wr_trace.instr[i] != instr_at(a)) begin
            failures++; $display("FAIL trace %h slot %0d", wr_trace.start_pc, i);
          end
          if (pred_taken(a)) begin
            nt++;
            if (nt == 1) begin len1 = i + 1; tgt = target_of(a); end
          end
          a = walk_next(a);
        end
      end
      if (nt == 0 || int'(wr_trace.len1) != len1 || wr_trace.target_pc != tgt || wr_trace.next_pc != a ||
          !(int'(wr_trace.count) == FETCH_W || nt == 2) || nt > 2) begin
        failures++;
        $display("FAIL trace %h: count %0d len1 %0d/%0d taken %0d next %h/%h", wr_trace.start_pc,
                 wr_trace.count, wr_trace.len1, len1, nt, wr_trace.next_pc, a);
      end
      if (nt == 2) n_two++; else n_full++;
    end
  end

  initial begin
    word_t pc;
    obs_valid = 0; obs_pc = 0; obs_from_ncb = 0; obs_count = 0;
    pc = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 20000; n++) begin
      int ft;
      @(negedge clk);
      obs_valid = ($urandom_range(0, 5) != 0);
      if ($urandom_range(0, 40) == 0) pc = word_t'($urandom_range(0, SPAN - 1) * 4);
      obs_pc = pc;
      obs_from_ncb = ($urandom_range(0, 30) == 0);
      #1;
      ft = -1;
      for (int i = FETCH_W - 1; i >= 0; i--) if (obs_taken[i]) ft = i;
      obs_count = (ft >= 0) ? 4'(ft + 1) : 4'(FETCH_W);
      if (obs_valid) begin
        n_blocks++;
        pc = (ft >= 0) ? obs_target[ft] : pc + word_t'(4 * FETCH_W);
      end
    end
    @(negedge clk);
    obs_valid = 0;
    repeat (3) @(posedge clk);
    checks++;
    if (n_full < 50 || n_two < 50) begin failures++; $display("FAIL coverage full=%0d two=%0d", n_full, n_two); end
    $display("blocks=%0d traces full=%0d two-branch=%0d", n_blocks, n_full, n_two);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
