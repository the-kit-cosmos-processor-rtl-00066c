// regfile: physical register file of one cluster.
//
// NPREGS registers of XLEN bits with NREAD combinational read ports and NWRITE
// write ports written at the clock edge. Register 0 always reads zero. All
// registers reset to zero. Writes in the same cycle to the same register are
// not expected (renaming gives every result its own register); if they happen
// the higher port wins. A read in the cycle of a write returns the old value.
//
// From the design: each cluster has its own local register file and there is
// no global copy. This design's own: the port counts, which the cluster sets
// from its width, and the reset value.
module regfile
  import cosmos_pkg::*;
#(
  parameter int unsigned NPREGS = 544,
  parameter int unsigned NREAD  = 24,
  parameter int unsigned NWRITE = 16
) (
  input  logic  clk,
  input  logic  rst_n,
  input  preg_t rd_tag   [NREAD],
  output word_t rd_data  [NREAD],
  input  logic  wr_valid [NWRITE],
  input  preg_t wr_tag   [NWRITE],
  input  word_t wr_data  [NWRITE]
);

  word_t regs [NPREGS];

  always_comb begin
    for (int r = 0; r < NREAD; r++) begin
      rd_data[r] = (rd_tag[r] == '0 || int'(rd_tag[r]) >= int'(NPREGS)) ? '0 : regs[rd_tag[r]];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NPREGS; i++) regs[i] <= '0;
    end else begin
      for (int w = 0; w < NWRITE; w++) begin
        if (wr_valid[w] && wr_tag[w] != '0) regs[wr_tag[w]] <= wr_data[w];
      end
    end
  end

endmodule
