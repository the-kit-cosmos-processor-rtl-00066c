// tb_prog_pkg: a synthetic program for the front-end testbenches.
//
// Every word address holds a known instruction word. Some addresses hold
// branches; each has a fixed target and a fixed predicted outcome, so the
// predicted path through the program is known in advance. walk_next gives the
// address that follows an instruction on that path.
package tb_prog_pkg;
  import cosmos_pkg::*;

  localparam int unsigned SPAN = 512;   // program words

  function automatic word_t instr_at(word_t a);
    return a ^ 32'hC05A_0000;
  endfunction

  function automatic bit is_branch(word_t a);
    return ((a >> 2) % 7) == 3 || ((a >> 2) % 11) == 5;
  endfunction

  function automatic bit pred_taken(word_t a);
    return is_branch(a) && (((a >> 2) * 2654435761) >> 29) < 5;
  endfunction

  function automatic word_t target_of(word_t a);
    return word_t'(((((a >> 2) * 40503) + 17) % SPAN) * 4);
  endfunction

  function automatic word_t walk_next(word_t a);
    return pred_taken(a) ? target_of(a) : a + 4;
  endfunction
endpackage
