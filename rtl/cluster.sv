// cluster: one execution cluster of the core.
//
// A cluster owns a scheduling window (edf_window, with its DMT), a local
// physical register file (regfile) with a ready bit per register, and NALU
// variable latency ALUs (vlp_alu). Micro-ops enter the window in groups;
// dispatched micro-ops read their operands from the register file in the
// dispatch cycle (operand B may instead be the micro-op's immediate) and
// enter an ALU. The last ALU port is shared with the
// reissue stream from the instruction buffer, which has priority over the
// window.
//
// Value speculation: a micro-op that enters with pred set has its predicted
// result written into its destination register at once and the register is
// marked ready, so its consumers can run before it does. When a micro-op whose
// result was predicted, or a reissued micro-op, completes, its result is
// compared with what the register held; c_changed reports a difference, and
// the caller then has the dispatched consumers reissued. The register always
// takes the new result.
//
// Entry: d_fit[i] says micro-op i and all before it fit in the window and
// the DMT; d_take marks those that enter (a prefix of the fitting ones).
//
// Timing: a micro-op dispatched in cycle t completes in t+1 (or t+2 for a
// carry over 16 bits); its result is written and its consumers are woken at
// the end of that cycle, so a dependent micro-op dispatches in t+2 at the
// earliest. Completion events (c_*) are combinational from the ALU pipeline.
// cm_tag/cm_value are read ports for the values of committing micro-ops.
//
// From the design: window, distributed registers and functional units per
// cluster, value-predicted operands used speculatively, ALUs with variable
// latency. This design's own: the number of ALUs, the shared reissue port, the
// ready-bit table and the value-compare that detects a wrong speculation.
module cluster
  import cosmos_pkg::*;
#(
  parameter int unsigned IW     = 8,    // micro-ops inserted per cycle
  parameter int unsigned NALU   = 8,    // ALUs (= dispatch width)
  parameter int unsigned WS     = 256,  // scheduling window slots
  parameter int unsigned NPREGS = 544,  // physical registers
  parameter int unsigned IDS    = 2,    // DMT references per entry
  parameter int unsigned NCKPT  = 4,    // DMT checkpoints
  parameter int unsigned CW     = 8     // commit read ports
) (
  input  logic       clk,
  input  logic       rst_n,
  // insertion
  input  logic       d_valid      [IW],
  input  exec_uop_t  d_uop        [IW],
  input  word_t      d_pred_value [IW],
  output logic       d_fit        [IW],
  input  logic       d_take       [IW],
  // reissue from the instruction buffer
  input  logic       r_valid,
  input  exec_uop_t  r_uop,
  // dispatches from the window (for the instruction buffer)
  output logic       disp_valid [NALU],
  output ib_idx_t    disp_idx   [NALU],
  // completions
  output logic       c_valid   [NALU],
  output exec_uop_t  c_uop     [NALU],
  output word_t      c_value   [NALU],
  output logic       c_changed [NALU],
  output logic       c_slow    [NALU],
  // commit value read
  input  preg_t      cm_tag   [CW],
  output word_t      cm_value [CW],
  // DMT checkpoints
  input  logic                     ckpt_take,
  input  logic [$clog2(NCKPT)-1:0] ckpt_take_idx,
  input  logic                     ckpt_restore,
  input  logic [$clog2(NCKPT)-1:0] ckpt_restore_idx,
  // status
  output logic [$clog2(WS+1)-1:0]  win_occupancy,
  output logic                     dmt_stall
);

  localparam int unsigned META_W = $bits(exec_uop_t);
  localparam int unsigned NREAD  = 3 * NALU + CW;
  localparam int unsigned NWRITE = NALU + IW;

  logic ready_q [NPREGS];

  // ------------------------------------------------------------ completions
  logic  wake_valid [NALU];
  preg_t wake_tag   [NALU];
  always_comb begin
    for (int k = 0; k < NALU; k++) begin
      wake_valid[k] = c_valid[k] && c_uop[k].uop.dest != '0;
      wake_tag[k]   = c_uop[k].uop.dest;
    end
  end

  // ------------------------------------------------------------ insertion readiness
  logic ins_rdy_a [IW];
  logic ins_rdy_b [IW];

  function automatic logic src_ready(input preg_t s, input int i,
                                     input logic v [IW], input exec_uop_t u [IW],
                                     input logic rq [NPREGS],
                                     input logic wv [NALU], input preg_t wt [NALU]);
    logic r;
    r = (s == '0) || rq[s];
    for (int k = 0; k < NALU; k++) if (wv[k] && wt[k] == s) r = 1'b1;
    // a producer earlier in the same group overrides the table
    for (int j = 0; j < IW; j++) begin
      if (j < i && v[j] && s != '0 && u[j].uop.dest == s) r = u[j].pred;
    end
    return r;
  endfunction

  always_comb begin
    for (int i = 0; i < IW; i++) begin
      ins_rdy_a[i] = src_ready(d_uop[i].uop.src_a, i, d_valid, d_uop, ready_q, wake_valid, wake_tag);
      ins_rdy_b[i] = src_ready(d_uop[i].uop.src_b, i, d_valid, d_uop, ready_q, wake_valid, wake_tag);
    end
  end

  // ------------------------------------------------------------ window
  logic      iss_en    [NALU];
  logic      iss_valid [NALU];
  exec_uop_t iss_uop   [NALU];

  always_comb begin
    for (int k = 0; k < NALU; k++) iss_en[k] = !(k == int'(NALU) - 1 && r_valid);
  end

  edf_window #(
    .WS      (WS),
    .IW      (IW),
    .ISSUE_W (NALU),
    .NWAKE   (NALU),
    .NPREGS  (NPREGS),
    .IDS     (IDS),
    .NCKPT   (NCKPT)
  ) u_window (
    .clk              (clk),
    .rst_n            (rst_n),
    .ins_valid        (d_valid),
    .ins_uop          (d_uop),
    .ins_rdy_a        (ins_rdy_a),
    .ins_rdy_b        (ins_rdy_b),
    .ins_fit          (d_fit),
    .ins_take         (d_take),
    .wake_valid       (wake_valid),
    .wake_tag         (wake_tag),
    .iss_en           (iss_en),
    .iss_valid        (iss_valid),
    .iss_uop          (iss_uop),
    .ckpt_take        (ckpt_take),
    .ckpt_take_idx    (ckpt_take_idx),
    .ckpt_restore     (ckpt_restore),
    .ckpt_restore_idx (ckpt_restore_idx),
    .occupancy        (win_occupancy),
    .dmt_stall        (dmt_stall)
  );

  // ------------------------------------------------------------ ALU inputs
  logic      alu_v   [NALU];
  exec_uop_t alu_uop [NALU];
  always_comb begin
    for (int k = 0; k < NALU; k++) begin
      if (k == int'(NALU) - 1 && r_valid) begin
        alu_v[k]   = 1'b1;
        alu_uop[k] = r_uop;
      end else begin
        alu_v[k]   = iss_valid[k];
        alu_uop[k] = iss_uop[k];
      end
      disp_valid[k] = iss_valid[k] && iss_en[k];
      disp_idx[k]   = iss_uop[k].ib_idx;
    end
  end

  // ------------------------------------------------------------ register file
  preg_t rd_tag   [NREAD];
  word_t rd_data  [NREAD];
  logic  wr_valid [NWRITE];
  preg_t wr_tag   [NWRITE];
  word_t wr_data  [NWRITE];

  always_comb begin
    for (int k = 0; k < NALU; k++) begin
      rd_tag[2*k]          = alu_uop[k].uop.src_a;
      rd_tag[2*k+1]        = alu_uop[k].uop.src_b;
      rd_tag[2*NALU + k]   = c_uop[k].uop.dest;
      wr_valid[k]          = wake_valid[k];
      wr_tag[k]            = c_uop[k].uop.dest;
      wr_data[k]           = c_value[k];
    end
    for (int c = 0; c < CW; c++) begin
      rd_tag[3*NALU + c] = cm_tag[c];
      cm_value[c]        = rd_data[3*NALU + c];
    end
    for (int i = 0; i < IW; i++) begin
      wr_valid[NALU + i] = d_take[i] && d_uop[i].pred;
      wr_tag[NALU + i]   = d_uop[i].uop.dest;
      wr_data[NALU + i]  = d_pred_value[i];
    end
  end

  regfile #(
    .NPREGS (NPREGS),
    .NREAD  (NREAD),
    .NWRITE (NWRITE)
  ) u_regs (
    .clk      (clk),
    .rst_n    (rst_n),
    .rd_tag   (rd_tag),
    .rd_data  (rd_data),
    .wr_valid (wr_valid),
    .wr_tag   (wr_tag),
    .wr_data  (wr_data)
  );

  // ------------------------------------------------------------ ALUs
  for (genvar k = 0; k < NALU; k++) begin : g_alu
    logic [META_W-1:0] out_meta;
    vlp_alu #(
      .W      (XLEN),
      .CHAIN  (16),
      .META_W (META_W)
    ) u_alu (
      .clk        (clk),
      .rst_n      (rst_n),
      .in_valid   (alu_v[k]),
      .in_op      (alu_uop[k].uop.op),
      .in_a       (rd_data[2*k]),
      .in_b       (alu_uop[k].uop.use_imm ? alu_uop[k].uop.imm : rd_data[2*k+1]),
      .in_meta    (alu_uop[k]),
      .out_valid  (c_valid[k]),
      .out_result (c_value[k]),
      .out_meta   (out_meta),
      .out_slow   (c_slow[k])
    );
    assign c_uop[k]     = exec_uop_t'(out_meta);
    assign c_changed[k] = c_valid[k] && c_uop[k].uop.dest != '0 &&
                          (c_uop[k].pred || c_uop[k].reissue) &&
                          c_value[k] != rd_data[2*NALU + k];
  end

  // ------------------------------------------------------------ ready bits
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int t = 0; t < NPREGS; t++) ready_q[t] <= 1'b1;
    end else begin
      for (int k = 0; k < NALU; k++) begin
        if (wake_valid[k]) ready_q[wake_tag[k]] <= 1'b1;
      end
      for (int i = 0; i < IW; i++) begin
        if (d_take[i] && d_uop[i].uop.dest != '0) ready_q[d_uop[i].uop.dest] <= d_uop[i].pred;
      end
    end
  end

endmodule
