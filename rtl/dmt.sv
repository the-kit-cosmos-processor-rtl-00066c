// dmt: dataflow management table of the EDF scheduling window.
//
// The table replaces the associative tag match of a conventional window. It
// is indexed by physical register number; each entry holds up to IDS
// references to waiting consumers, each a scheduling window slot id plus the
// operand side (A or B) that waits for that register. When a micro-op enters
// the window, every source operand that is not yet ready is registered in the
// entry of its source register. When a result completes, the entry of its
// destination register is read and cleared, and the references it returns set
// ready bits in the window: a plain RAM read, no comparison against the
// window contents.
//
// Registration: NREG ports are offered at once (two per inserted micro-op).
// reg_ok[r] says, combinationally, whether request r finds a free reference
// slot, counting the slots that all earlier ports of the same cycle would take
// in the same register; the caller writes the requests it keeps with
// reg_commit (normally a prefix of the ports, as micro-ops enter in order). A register
// that completes in the same cycle must not be registered (the caller treats
// that operand as ready). Wakeup: NWAKE result tags read their entries
// combinationally (wake_ref) and the entries are cleared at the clock edge.
//
// Checkpoints: NCKPT copies of the table. ckpt_take copies the table as it
// stands at the start of the cycle; ckpt_restore brings a copy back. Every
// wakeup also clears the woken entry in all copies, so a restored table holds
// no references for results that have already been delivered.
//
// From the design: indexing by physical register, id plus A/B side per
// reference, registration at issue, lookup at completion, a checkpoint per
// predicted branch, and two references per entry as the chosen trade-off.
// This design's own: per-port fit signals for in-order partial entry, the
// number of checkpoints, and the clearing of wakeups in the copies.
module dmt
  import cosmos_pkg::*;
#(
  parameter int unsigned NPREGS = 544,  // physical registers
  parameter int unsigned IDS    = 2,    // references per entry
  parameter int unsigned NREG   = 16,   // registration ports
  parameter int unsigned NWAKE  = 8,    // result tags per cycle
  parameter int unsigned NCKPT  = 4     // checkpoints
) (
  input  logic      clk,
  input  logic      rst_n,
  // registration
  input  logic      reg_valid [NREG],
  input  preg_t     reg_tag   [NREG],
  input  win_id_t   reg_id    [NREG],
  input  logic      reg_side  [NREG],
  output logic      reg_ok    [NREG],
  input  logic      reg_commit[NREG],
  // wakeup
  input  logic      wake_valid [NWAKE],
  input  preg_t     wake_tag   [NWAKE],
  output dmt_ref_t  wake_ref   [NWAKE][IDS],
  // branch checkpoints
  input  logic                       ckpt_take,
  input  logic [$clog2(NCKPT)-1:0]   ckpt_take_idx,
  input  logic                       ckpt_restore,
  input  logic [$clog2(NCKPT)-1:0]   ckpt_restore_idx
);

  dmt_ref_t tab  [NPREGS][IDS];
  dmt_ref_t ckpt [NCKPT][NPREGS][IDS];

  localparam int unsigned SW = (IDS > 1) ? $clog2(IDS) : 1;

  // Slot chosen for each registration port.
  logic [SW-1:0] reg_slot [NREG];

  always_comb begin
    for (int r = 0; r < NREG; r++) begin
      logic [IDS-1:0] used;
      reg_slot[r] = '0;
      for (int s = 0; s < IDS; s++) used[s] = tab[reg_tag[r]][s].valid;
      for (int q = 0; q < r; q++) begin
        if (reg_valid[q] && reg_tag[q] == reg_tag[r]) used[reg_slot[q]] = 1'b1;
      end
      reg_ok[r] = !(&used);
      if (!(&used)) begin
        for (int s = IDS - 1; s >= 0; s--) begin
          if (!used[s]) reg_slot[r] = SW'(s);
        end
      end
    end
  end

  always_comb begin
    for (int w = 0; w < NWAKE; w++) begin
      for (int s = 0; s < IDS; s++) begin
        wake_ref[w][s] = tab[wake_tag[w]][s];
        if (!wake_valid[w]) wake_ref[w][s].valid = 1'b0;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int t = 0; t < NPREGS; t++) begin
        for (int s = 0; s < IDS; s++) begin
          tab[t][s] <= '0;
          for (int c = 0; c < NCKPT; c++) ckpt[c][t][s] <= '0;
        end
      end
    end else begin
      if (ckpt_take) begin
        for (int t = 0; t < NPREGS; t++) begin
          for (int s = 0; s < IDS; s++) ckpt[ckpt_take_idx][t][s] <= tab[t][s];
        end
      end
      if (ckpt_restore) begin
        for (int t = 0; t < NPREGS; t++) begin
          for (int s = 0; s < IDS; s++) tab[t][s] <= ckpt[ckpt_restore_idx][t][s];
        end
      end else begin
        for (int r = 0; r < NREG; r++) begin
          if (reg_valid[r] && reg_commit[r] && reg_ok[r]) begin
            tab[reg_tag[r]][reg_slot[r]] <= '{valid: 1'b1, id: reg_id[r], side: reg_side[r]};
          end
        end
      end
      // Delivered results leave the table and every checkpoint.
      for (int w = 0; w < NWAKE; w++) begin
        if (wake_valid[w]) begin
          for (int s = 0; s < IDS; s++) begin
            tab[wake_tag[w]][s].valid <= 1'b0;
            for (int c = 0; c < NCKPT; c++) ckpt[c][wake_tag[w]][s].valid <= 1'b0;
          end
        end
      end
    end
  end

  // A result tag that completes must not be registered in the same cycle.
  always_ff @(posedge clk) begin
    begin
      for (int r = 0; r < NREG; r++) begin
        for (int w = 0; w < NWAKE; w++) begin
          assert (!(reg_valid[r] && reg_commit[r] && wake_valid[w] && reg_tag[r] == wake_tag[w]))
            else $error("dmt: register %0d registered while it completes", reg_tag[r]);
        end
      end
    end
  end

endmodule
