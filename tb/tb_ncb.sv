// tb_ncb: self-checking test of the non-consecutive basic block buffer.
//
// A 16-row buffer is written with random traces at random start addresses and
// read at random addresses. A reference map of the last trace written per row
// gives the expected hit (row valid and full address equal) and trace.
module tb_ncb;
  import cosmos_pkg::*;

  localparam int ENTRIES = 16;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  word_t  rd_pc;
  logic   rd_hit;
  trace_t rd_trace;
  logic   wr_valid;
  trace_t wr_trace;

  ncb #(.ENTRIES(ENTRIES)) dut (.*);

  int checks = 0, failures = 0, n_hit = 0, n_miss = 0;
  trace_t m [int];

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rd_pc = 0; wr_valid = 0; wr_trace = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 4000; n++) begin
      int row;
      @(negedge clk);
      rd_pc = word_t'($urandom_range(0, 63) * 4);
      row = int'(rd_pc[5:2]);
      #1;
      checks++;
      if (m.exists(row) && m[row].start_pc == rd_pc) begin
        n_hit++;
        if (!rd_hit || rd_trace != m[row]) begin failures++; $display("FAIL hit at %h", rd_pc); end
      end else begin
        n_miss++;
        if (rd_hit) begin failures++; $display("FAIL false hit at %h", rd_pc); end
      end
      wr_valid = ($urandom_range(0, 3) == 0);
      wr_trace = '0;
      wr_trace.start_pc  = word_t'($urandom_range(0, 63) * 4);
      wr_trace.count     = 4'($urandom_range(1, 8));
      wr_trace.len1      = 4'($urandom_range(1, 7));
      wr_trace.target_pc = $urandom;
      wr_trace.next_pc   = $urandom;
      foreach (wr_trace.instr[i]) wr_trace.instr[i] = $urandom;
      @(posedge clk);
      if (wr_valid) m[int'(wr_trace.start_pc[5:2])] = wr_trace;
    end
    checks++;
    if (n_hit < 200 || n_miss < 200) begin failures++; $display("FAIL coverage"); end
    $display("hit=%0d miss=%0d", n_hit, n_miss);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
