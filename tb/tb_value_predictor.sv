// tb_value_predictor: self-checking test of the stride value predictor.
//
// A 64-entry predictor with 2 lookup and 2 update ports. Several
// instruction addresses produce value sequences: constant-stride ones, which
// must become predictable after the counter has risen, and random ones, which
// must not. A reference model (last value, stride, confidence per row) gives
// the expected hit and value for every lookup.
module tb_value_predictor;
  import cosmos_pkg::*;

  localparam int ENTRIES = 64, NL = 2, NU = 2;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  word_t look_pc [NL];
  logic  look_hit [NL];
  word_t look_value [NL];
  logic  upd_valid [NU];
  word_t upd_pc [NU];
  word_t upd_value [NU];

  value_predictor #(.ENTRIES(ENTRIES), .NLOOK(NL), .NUPD(NU)) dut (.*);

  int checks = 0, failures = 0, n_hit = 0, n_correct = 0;
  word_t m_last [ENTRIES], m_stride [ENTRIES];
  int    m_conf [ENTRIES];
  bit    m_init [ENTRIES];
  word_t seq_val [8], seq_stride [8];

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (m_conf[e]) begin m_conf[e] = 0; m_init[e] = 0; end
    foreach (seq_val[i]) begin seq_val[i] = $urandom; seq_stride[i] = (i < 5) ? word_t'($urandom_range(0, 9)) : 0; end
    foreach (look_pc[l]) look_pc[l] = 0;
    foreach (upd_valid[u]) begin upd_valid[u] = 0; upd_pc[u] = 0; upd_value[u] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      foreach (look_pc[l]) look_pc[l] = word_t'($urandom_range(0, 7) * 4);
      #1;
      foreach (look_pc[l]) begin
        int ix;
        ix = int'(look_pc[l][2 +: 6]);
        checks++;
        if (look_hit[l] !== (m_conf[ix] >= 2) ||
            (look_hit[l] && look_value[l] !== m_last[ix] + m_stride[ix])) begin
          failures++; $display("FAIL lookup pc %h hit %0d", look_pc[l], look_hit[l]);
        end
        if (look_hit[l]) begin
          n_hit++;
          if (look_value[l] == seq_val[ix] + seq_stride[ix]) n_correct++;
        end
      end
      // updates on distinct rows
      upd_valid[0] = $urandom_range(0, 1);
      upd_pc[0]    = word_t'($urandom_range(0, 7) * 4);
      upd_valid[1] = $urandom_range(0, 1);
      upd_pc[1]    = word_t'($urandom_range(0, 7) * 4);
      if (upd_pc[1] == upd_pc[0]) upd_valid[1] = 0;
      foreach (upd_valid[u]) if (upd_valid[u]) begin
        int ix;
        ix = int'(upd_pc[u][2 +: 6]);
        if (ix >= 5) seq_val[ix] = $urandom; else seq_val[ix] = seq_val[ix] + seq_stride[ix];
        upd_value[u] = seq_val[ix];
      end
      @(posedge clk);
      foreach (upd_valid[u]) if (upd_valid[u]) begin
        int ix;
        word_t ns;
        ix = int'(upd_pc[u][2 +: 6]);
        ns = upd_value[u] - m_last[ix];
        if (m_init[ix] && ns == m_stride[ix]) begin if (m_conf[ix] < 3) m_conf[ix]++; end
        else m_conf[ix] = 0;
        m_stride[ix] = ns;
        m_last[ix] = upd_value[u];
        m_init[ix] = 1;
      end
    end
    checks++;
    if (n_hit < 500 || n_correct < 500) begin failures++; $display("FAIL coverage hit=%0d correct=%0d", n_hit, n_correct); end
    $display("hit=%0d correct=%0d", n_hit, n_correct);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
