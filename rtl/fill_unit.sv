// fill_unit: builds NCB traces off the fetch path.
//
// The fill unit watches the blocks the fetch unit takes from the instruction
// cache, with the branch outcomes predicted for them, and builds traces in a
// line buffer of FETCH_W slots:
//   1. A block from the instruction cache is examined.
//   2. If it holds a branch predicted taken, the instructions up to and
//      including that branch are placed in the line buffer and a trace is
//      started at the block's address.
//   3. The following fetched blocks (from the branch target on) are appended.
// A trace is finished, and written to the NCB, when the line buffer is full or
// when it contains its second predicted-taken branch. A block that finishes a
// trace and itself holds a predicted-taken branch also starts the next trace.
// Building is abandoned if the next block does not continue the trace (a
// redirect, or a block served from the NCB).
//
// Interface: obs_* is one fetched block, valid for one cycle: its address,
// instruction count (at most FETCH_W, already cut after a predicted-taken
// branch), instructions, per-slot predicted-taken flags and targets, and
// whether it came from the NCB. wr_valid/wr_trace go to the NCB and are
// registered: a trace is written one cycle after its last block was seen.
//
// From the design: the line buffer, steps 1-3, both finishing conditions,
// traces starting at any address, building on predicted outcomes, and a fill
// unit that is pipelined off the fetch path. This design's own: one block
// handled per cycle, the abandon rule and chaining a new trace from the
// finishing block.
module fill_unit
  import cosmos_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   obs_valid,
  input  word_t  obs_pc,
  input  logic [3:0] obs_count,
  input  logic [FETCH_W-1:0][XLEN-1:0] obs_instr,
  input  logic [FETCH_W-1:0]           obs_taken,
  input  logic [FETCH_W-1:0][XLEN-1:0] obs_target,
  input  logic   obs_from_ncb,
  output logic   wr_valid,
  output trace_t wr_trace
);

  typedef enum logic [0:0] {IDLE, BUILD} state_e;

  state_e state_q, state_d;
  trace_t lb_q, lb_d;          // line buffer under construction
  word_t  expect_q, expect_d;  // address the next block must start at
  logic   wr_d;
  trace_t wr_trace_d;

  always_comb begin
    logic        done;
    logic        start_new;
    int          first_taken;
    trace_t      t;
    state_d    = state_q;
    lb_d       = lb_q;
    expect_d   = expect_q;
    wr_d       = 1'b0;
    wr_trace_d = lb_q;
    start_new  = 1'b0;
    done       = 1'b0;
    t          = '0;

    first_taken = -1;
    for (int i = FETCH_W - 1; i >= 0; i--) begin
      if (i < int'(obs_count) && obs_taken[i]) first_taken = i;
    end

    if (obs_valid) begin
      if (obs_from_ncb) begin
        state_d = IDLE;
      end else if (state_q == BUILD && obs_pc == expect_q) begin
        // Step 3: append this block.
        t    = lb_q;
        done = 1'b0;
        for (int i = 0; i < FETCH_W; i++) begin
          if (!done && i < int'(obs_count)) begin
            t.instr[t.count] = obs_instr[i];
            t.count          = t.count + 4'd1;
            t.next_pc        = obs_pc + word_t'(4 * (i + 1));
            if (obs_taken[i]) begin
              t.next_pc = obs_target[i];
              done      = 1'b1;        // second predicted-taken branch
            end else if (int'(t.count) == FETCH_W) begin
              done      = 1'b1;        // line buffer full
            end
          end
        end
        if (done) begin
          wr_d       = 1'b1;
          wr_trace_d = t;
          state_d    = IDLE;
          start_new  = first_taken >= 0;
        end else begin
          lb_d     = t;
          expect_d = t.next_pc;
        end
      end else begin
        start_new = first_taken >= 0;
        state_d   = IDLE;
      end

      if (start_new) begin
        // Steps 1-2: keep the instructions reaching the taken branch.
        t          = '0;
        t.start_pc = obs_pc;
        for (int i = 0; i < FETCH_W; i++) begin
          if (i <= first_taken) t.instr[i] = obs_instr[i];
        end
        t.count     = 4'(first_taken + 1);
        t.len1      = 4'(first_taken + 1);
        t.target_pc = obs_target[first_taken];
        t.next_pc   = obs_target[first_taken];
        if (first_taken == FETCH_W - 1) begin
          // full already: only one basic block fits (dropped if a finished
          // trace is written in this same cycle)
          if (!wr_d) wr_trace_d = t;
          state_d    = IDLE;
        end else begin
          lb_d     = t;
          expect_d = t.target_pc;
          state_d  = BUILD;
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q  <= IDLE;
      wr_valid <= 1'b0;
    end else begin
      state_q  <= state_d;
      wr_valid <= wr_d;
    end
  end

  always_ff @(posedge clk) begin
    lb_q     <= lb_d;
    expect_q <= expect_d;
    wr_trace <= wr_trace_d;
  end

endmodule
