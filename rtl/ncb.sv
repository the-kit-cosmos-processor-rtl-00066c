// ncb: non-consecutive basic block buffer.
//
// An extension of a branch target buffer that keeps, for a fetch address, a
// whole trace: the instructions up to and including a predicted-taken branch
// followed by instructions from its target. Only traces that contain a taken
// branch are stored; the fill unit builds them. The fetch unit reads the NCB
// with the same program counter as the instruction cache.
//
// Organisation: direct mapped, ENTRIES rows indexed by the word address
// pc[2 +: log2(ENTRIES)], each row holding a valid bit, the full start address
// as tag and one trace_t. With 8 instruction slots of 4 bytes a row carries
// 32 bytes of instructions, so 1024 rows make the 32 KB buffer evaluated for
// the design.
//
// Interface: lookup is combinational (rd_hit, rd_trace in the cycle of
// rd_pc); wr_valid writes wr_trace at the clock edge, indexed by its
// start_pc. Valid bits reset to zero.
//
// From the design: a PC-indexed buffer of traces holding non-consecutive basic
// blocks, filled by the fill unit, 32 KB. This design's own: direct mapping,
// the full-address tag and the row layout.
module ncb
  import cosmos_pkg::*;
#(
  parameter int unsigned ENTRIES = 1024
) (
  input  logic   clk,
  input  logic   rst_n,
  input  word_t  rd_pc,
  output logic   rd_hit,
  output trace_t rd_trace,
  input  logic   wr_valid,
  input  trace_t wr_trace
);

  localparam int unsigned IW = $clog2(ENTRIES);

  logic   valid_q [ENTRIES];
  word_t  tag_q   [ENTRIES];
  trace_t data_q  [ENTRIES];

  logic [IW-1:0] rd_index, wr_index;
  assign rd_index = rd_pc[2 +: IW];
  assign wr_index = wr_trace.start_pc[2 +: IW];

  assign rd_hit   = valid_q[rd_index] && tag_q[rd_index] == rd_pc;
  assign rd_trace = data_q[rd_index];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int e = 0; e < ENTRIES; e++) valid_q[e] <= 1'b0;
    end else if (wr_valid) begin
      valid_q[wr_index] <= 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (wr_valid) begin
      tag_q[wr_index]  <= wr_trace.start_pc;
      data_q[wr_index] <= wr_trace;
    end
  end

endmodule
