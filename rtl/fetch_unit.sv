// fetch_unit: instruction supply with the NCB.
//
// Every cycle the program counter indexes the instruction cache and the NCB
// at once, and the branch predictor predicts the branches of the cache block.
// If the block holds a branch predicted taken and the NCB has a trace for the
// address, the trace is supplied, and fetch continues where the trace ends.
// If the block holds a predicted-taken branch but the NCB misses, the block is
// supplied up to and including that branch and fetch continues at its target.
// Otherwise the whole block is supplied and fetch continues after it. The
// fill unit watches the blocks supplied from the cache and fills the NCB.
//
// Interfaces: ic_* is the instruction cache, read combinationally with pc
// (FETCH_W sequential instructions, with predecoded branch flags and targets);
// bp_taken is the branch predictor's per-slot prediction for the same
// address. f_* is the fetch block handed on; it advances when f_ready is high.
// redirect_* restarts fetch (e.g. after a branch misprediction found later).
//
// From the design: the cache and NCB indexed by the same PC, the branch
// prediction choosing between them, the cache as fallback on an NCB miss and
// the fill unit fed by the cache stream and the predicted outcomes. This
// design's own: the cache port (predecode, alignment and hit assumed), the
// block length and the redirect port.
module fetch_unit
  import cosmos_pkg::*;
#(
  parameter word_t       RESET_PC    = '0,
  parameter int unsigned NCB_ENTRIES = 1024
) (
  input  logic   clk,
  input  logic   rst_n,
  // instruction cache (with predecode)
  output word_t  ic_pc,
  input  logic [FETCH_W-1:0][XLEN-1:0] ic_instr,
  input  logic [FETCH_W-1:0]           ic_is_branch,
  input  logic [FETCH_W-1:0][XLEN-1:0] ic_target,
  // branch predictor
  input  logic [FETCH_W-1:0]           bp_taken,
  // redirect
  input  logic   redirect_valid,
  input  word_t  redirect_pc,
  // fetch block
  output logic   f_valid,
  output logic [3:0] f_count,
  output logic [FETCH_W-1:0][XLEN-1:0] f_instr,
  output logic [FETCH_W-1:0][XLEN-1:0] f_pc,
  output logic   f_from_ncb,
  input  logic   f_ready,
  // NCB fill activity (for observation)
  output logic   ncb_fill
);

  word_t  pc_q, pc_d;
  logic   ncb_hit;
  trace_t ncb_trace;
  logic   ncb_wr;
  trace_t ncb_wr_trace;
  int     first_taken;
  logic [FETCH_W-1:0] taken;

  assign ic_pc = pc_q;

  ncb #(.ENTRIES(NCB_ENTRIES)) u_ncb (
    .clk      (clk),
    .rst_n    (rst_n),
    .rd_pc    (pc_q),
    .rd_hit   (ncb_hit),
    .rd_trace (ncb_trace),
    .wr_valid (ncb_wr),
    .wr_trace (ncb_wr_trace)
  );

  always_comb begin
    taken       = ic_is_branch & bp_taken;
    first_taken = -1;
    for (int i = FETCH_W - 1; i >= 0; i--) if (taken[i]) first_taken = i;

    f_valid    = 1'b1;
    f_instr    = ic_instr;
    f_from_ncb = 1'b0;
    for (int i = 0; i < FETCH_W; i++) f_pc[i] = pc_q + word_t'(4 * i);

    if (first_taken >= 0 && ncb_hit) begin
      f_from_ncb = 1'b1;
      f_count    = ncb_trace.count;
      f_instr    = ncb_trace.instr;
      for (int i = 0; i < FETCH_W; i++) begin
        if (i < int'(ncb_trace.len1)) f_pc[i] = pc_q + word_t'(4 * i);
        else f_pc[i] = ncb_trace.target_pc + word_t'(4 * (i - int'(ncb_trace.len1)));
      end
      pc_d = ncb_trace.next_pc;
    end else if (first_taken >= 0) begin
      f_count = 4'(first_taken + 1);
      pc_d    = ic_target[first_taken];
    end else begin
      f_count = 4'(FETCH_W);
      pc_d    = pc_q + word_t'(4 * FETCH_W);
    end
  end

  fill_unit u_fill (
    .clk          (clk),
    .rst_n        (rst_n),
    .obs_valid    (f_valid && f_ready && !redirect_valid),
    .obs_pc       (pc_q),
    .obs_count    (f_count),
    .obs_instr    (ic_instr),
    .obs_taken    (taken),
    .obs_target   (ic_target),
    .obs_from_ncb (f_from_ncb),
    .wr_valid     (ncb_wr),
    .wr_trace     (ncb_wr_trace)
  );

  assign ncb_fill = ncb_wr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc_q <= RESET_PC;
    end else if (redirect_valid) begin
      pc_q <= redirect_pc;
    end else if (f_valid && f_ready) begin
      pc_q <= pc_d;
    end
  end

endmodule
