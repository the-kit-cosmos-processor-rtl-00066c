// icache_model: behavioural instruction cache and branch predictor for the
// front-end testbenches. Returns, combinationally, the FETCH_W sequential
// instructions at pc from the synthetic program with their predecoded branch
// flags and targets, and the predicted outcome of each. It always hits.
module icache_model
  import cosmos_pkg::*;
  import tb_prog_pkg::*;
(
  input  word_t                        pc,
  output logic [FETCH_W-1:0][XLEN-1:0] instr,
  output logic [FETCH_W-1:0]           is_br,
  output logic [FETCH_W-1:0][XLEN-1:0] target,
  output logic [FETCH_W-1:0]           taken
);
  always_comb begin
    for (int i = 0; i < FETCH_W; i++) begin
      word_t a;
      a         = pc + word_t'(4 * i);
      instr[i]  = instr_at(a);
      is_br[i]  = is_branch(a);
      target[i] = target_of(a);
      taken[i]  = pred_taken(a);
    end
  end
endmodule
