// value_predictor: stride data value predictor.
//
// A table of ENTRIES rows, indexed by the word address of the instruction
// (pc[2 +: log2(ENTRIES)], no tag). Each row keeps the last result of the
// instructions that map to it, the stride between its last two results and a
// 2-bit confidence counter. The prediction is last + stride, and it is offered
// only when the confidence counter is at least THRESH.
//
// Training: on an update the new stride is the new result minus the stored
// last value. If it equals the stored stride the counter counts up
// (saturating), otherwise the counter is cleared and the stride replaced. The
// last value is always replaced.
//
// Interface: NLOOK lookup ports, combinational. NUPD update ports, written at
// the clock edge; when two update the same row in one cycle the higher port
// wins. Only the confidence counters are reset; the value rows start
// undefined, which is harmless because no row predicts before it has been
// trained.
//
// From the design: a 4096-entry stride predictor supplying values for data
// speculation. This design's own: indexing without tags, the confidence
// counter and its threshold, and the update policy.
module value_predictor
  import cosmos_pkg::*;
#(
  parameter int unsigned ENTRIES = 4096,
  parameter int unsigned NLOOK   = 8,
  parameter int unsigned NUPD    = 8,
  parameter int unsigned THRESH  = 2
) (
  input  logic  clk,
  input  logic  rst_n,
  input  word_t look_pc    [NLOOK],
  output logic  look_hit   [NLOOK],
  output word_t look_value [NLOOK],
  input  logic  upd_valid  [NUPD],
  input  word_t upd_pc     [NUPD],
  input  word_t upd_value  [NUPD]
);

  localparam int unsigned IW = $clog2(ENTRIES);

  word_t      last_q   [ENTRIES];
  word_t      stride_q [ENTRIES];
  logic [1:0] conf_q   [ENTRIES];

  function automatic logic [IW-1:0] index_of(word_t pc);
    return pc[2 +: IW];
  endfunction

  always_comb begin
    for (int l = 0; l < NLOOK; l++) begin
      look_hit[l]   = conf_q[index_of(look_pc[l])] >= 2'(THRESH);
      look_value[l] = last_q[index_of(look_pc[l])] + stride_q[index_of(look_pc[l])];
    end
  end

  always_ff @(posedge clk) begin
    for (int u = 0; u < NUPD; u++) begin
      if (upd_valid[u]) begin
        last_q[index_of(upd_pc[u])]   <= upd_value[u];
        stride_q[index_of(upd_pc[u])] <= upd_value[u] - last_q[index_of(upd_pc[u])];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int e = 0; e < ENTRIES; e++) conf_q[e] <= '0;
    end else begin
      for (int u = 0; u < NUPD; u++) begin
        if (upd_valid[u]) begin
          if (upd_value[u] - last_q[index_of(upd_pc[u])] == stride_q[index_of(upd_pc[u])]) begin
            if (conf_q[index_of(upd_pc[u])] != 2'd3)
              conf_q[index_of(upd_pc[u])] <= conf_q[index_of(upd_pc[u])] + 2'd1;
          end else begin
            conf_q[index_of(upd_pc[u])] <= '0;
          end
        end
      end
    end
  end

endmodule
