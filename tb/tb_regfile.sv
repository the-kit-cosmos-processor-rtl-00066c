// tb_regfile: self-checking test of the physical register file.
//
// 32 registers, 4 read and 3 write ports. Random writes to distinct registers
// and random reads are compared with a reference array; register 0 must read
// zero whatever is written to it, and a read in the cycle of a write must
// return the old value.
module tb_regfile;
  import cosmos_pkg::*;

  localparam int NP = 32, NR = 4, NW = 3;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  preg_t rd_tag [NR];
  word_t rd_data [NR];
  logic  wr_valid [NW];
  preg_t wr_tag [NW];
  word_t wr_data [NW];

  regfile #(.NPREGS(NP), .NREAD(NR), .NWRITE(NW)) dut (.*);

  int checks = 0, failures = 0;
  word_t m [NP];

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (m[i]) m[i] = 0;
    foreach (rd_tag[r]) rd_tag[r] = 0;
    foreach (wr_valid[w]) begin wr_valid[w] = 0; wr_tag[w] = 0; wr_data[w] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 4000; n++) begin
      bit used [NP];
      @(negedge clk);
      foreach (used[i]) used[i] = 0;
      foreach (wr_valid[w]) begin
        wr_valid[w] = $urandom_range(0, 1);
        wr_tag[w]   = preg_t'($urandom_range(0, NP - 1));
        wr_data[w]  = $urandom;
        if (used[wr_tag[w]]) wr_valid[w] = 0;
        if (wr_valid[w]) used[wr_tag[w]] = 1;
      end
      foreach (rd_tag[r]) rd_tag[r] = preg_t'($urandom_range(0, NP - 1));
      #1;
      foreach (rd_tag[r]) begin
        checks++;
        if (rd_data[r] !== m[rd_tag[r]]) begin failures++; $display("FAIL read %0d", rd_tag[r]); end
      end
      @(posedge clk);
      foreach (wr_valid[w]) if (wr_valid[w] && wr_tag[w] != 0) m[wr_tag[w]] = wr_data[w];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
