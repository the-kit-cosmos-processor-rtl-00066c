// tb_fetch_unit: self-checking test of instruction supply with the NCB.
//
// The fetch unit runs over a synthetic program through a behavioural
// instruction cache and branch predictor, with random stalls and rare
// redirects. Every instruction handed on must be the next one on the predicted
// path (right address, right word), whether it came from the cache or from an
// NCB trace. Also checked: a trace is used only when the cache block holds a
// predicted-taken branch, and NCB blocks do occur and carry more instructions
// on average than cache blocks cut at a taken branch.
module tb_fetch_unit;
  import cosmos_pkg::*;
  import tb_prog_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  word_t  ic_pc;
  logic [FETCH_W-1:0][XLEN-1:0] ic_instr, ic_target, f_instr, f_pc;
  logic [FETCH_W-1:0] ic_is_branch, bp_taken;
  logic   redirect_valid;
  word_t  redirect_pc;
  logic   f_valid, f_from_ncb, f_ready, ncb_fill;
  logic [3:0] f_count;

  fetch_unit #(.NCB_ENTRIES(64)) dut (.*);
  icache_model u_ic (.pc(ic_pc), .instr(ic_instr), .is_br(ic_is_branch), .target(ic_target), .taken(bp_taken));

  int checks = 0, failures = 0;
  int n_ncb = 0, n_ic = 0, n_ncb_insts = 0, n_ic_taken = 0, n_ic_taken_insts = 0, n_fill = 0;
  word_t expect_pc;

  initial begin : watchdog
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    redirect_valid = 0; redirect_pc = 0; f_ready = 0;
    expect_pc = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 20000; n++) begin
      @(negedge clk);
      f_ready = ($urandom_range(0, 4) != 0);
      redirect_valid = ($urandom_range(0, 200) == 0);
      redirect_pc = word_t'($urandom_range(0, SPAN - 1) * 4);
      #1;
      if (ncb_fill) n_fill++;
      if (f_valid && f_ready && !redirect_valid) begin
        word_t a;
        a = expect_pc;
        checks++;
        if (f_count == 0 || int'(f_count) > FETCH_W) begin failures++; $display("FAIL count %0d", f_count); end
        for (int i = 0; i < FETCH_W; i++) begin
          if (i < int'(f_count)) begin
            if (f_pc[i] != a || f_instr[i] != instr_at(a)) begin
              failures++;
              $display("FAIL slot %0d pc %h exp %h ncb %0d", i, f_pc[i], a, f_from_ncb);
            end
            a = walk_next(a);
          end
        end
        if (f_from_ncb) begin
          n_ncb++; n_ncb_insts += f_count;
          if ((ic_is_branch & bp_taken) == '0) begin failures++; $display("FAIL trace without taken branch"); end
        end else begin
          n_ic++;
          if ((ic_is_branch & bp_taken) != '0) begin n_ic_taken++; n_ic_taken_insts += f_count; end
        end
        expect_pc = a;
      end
      if (redirect_valid) expect_pc = redirect_pc;
    end
    checks++;
    if (n_ncb < 500 || n_fill < 20 || n_ic_taken < 50 ||
        n_ncb_insts * n_ic_taken <= n_ic_taken_insts * n_ncb) begin
      failures++;
      $display("FAIL coverage ncb=%0d fill=%0d", n_ncb, n_fill);
    end
    $display("blocks: ncb=%0d (%0d insts) icache=%0d, cut at taken branch %0d (%0d insts), fills=%0d",
             n_ncb, n_ncb_insts, n_ic, n_ic_taken, n_ic_taken_insts, n_fill);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
