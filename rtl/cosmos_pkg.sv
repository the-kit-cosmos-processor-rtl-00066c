// cosmos_pkg: types and sizes shared by the COSMOS core.
//
// The core is an 8-way out-of-order engine. Its front end fetches up to
// FETCH_W instructions per cycle, either a block from the instruction cache or
// a trace from the non-consecutive basic block buffer (NCB). Its back end takes
// already renamed micro-ops: physical register tags select the operands, and a
// tag also names the result. The 8-way width, the 256-entry scheduling window,
// the 512-entry instruction buffer and the 4096-entry value predictor are the
// sizes evaluated for the design; the micro-op format, the ALU operation set,
// the number of physical registers and the 32-bit data width are this
// implementation's own choices, because no instruction set is defined for it.
package cosmos_pkg;

  localparam int unsigned XLEN       = 32;   // data and address width
  localparam int unsigned FETCH_W    = 8;    // instructions per fetch block / trace
  localparam int unsigned PREG_W     = 10;   // physical register tag width (up to 1024)
  localparam int unsigned WIN_IDX_W  = 8;    // scheduling window slot id width (up to 256)
  localparam int unsigned IB_IDX_W   = 9;    // instruction buffer index width (up to 512)
  localparam int unsigned GEN_W      = 2;    // reissue generation counter width

  typedef logic [XLEN-1:0]      word_t;
  typedef logic [PREG_W-1:0]    preg_t;
  typedef logic [WIN_IDX_W-1:0] win_id_t;
  typedef logic [IB_IDX_W-1:0]  ib_idx_t;
  typedef logic [GEN_W-1:0]     gen_t;

  // Integer operations of the variable latency ALU. ADD, SUB and SLT use the
  // carry chain and so may take two cycles; the logic operations never do.
  typedef enum logic [2:0] {
    OP_ADD = 3'd0,
    OP_SUB = 3'd1,
    OP_AND = 3'd2,
    OP_OR  = 3'd3,
    OP_XOR = 3'd4,
    OP_SLT = 3'd5
  } alu_op_e;

  // A renamed micro-op. Tag 0 is a hard-wired zero register: as a source it is
  // always ready and reads 0, as a destination it means "no result". With
  // use_imm set, operand B is imm and src_b must be 0.
  typedef struct packed {
    alu_op_e op;
    preg_t   src_a;
    preg_t   src_b;
    preg_t   dest;
    logic    use_imm;
    word_t   imm;
    word_t   pc;
  } uop_t;

  // A micro-op on its way through the cluster: the micro-op, where it lives in
  // the instruction buffer, and how it got there.
  typedef struct packed {
    uop_t    uop;
    ib_idx_t ib_idx;
    gen_t    gen;      // instruction buffer generation it was issued under
    logic    pred;     // its result was value-predicted at dispatch
    logic    reissue;  // it comes from the instruction buffer, not the window
  } exec_uop_t;

  // One DMT registration: window slot and operand side (0 = A, 1 = B).
  typedef struct packed {
    logic    valid;
    win_id_t id;
    logic    side;
  } dmt_ref_t;

  // A trace held in the NCB. Slots 0..len1-1 are sequential from start_pc;
  // slots len1..count-1 are sequential from target_pc. next_pc is where fetch
  // continues after the trace.
  typedef struct packed {
    logic [3:0]                  count;
    logic [3:0]                  len1;
    word_t                       start_pc;
    word_t                       target_pc;
    word_t                       next_pc;
    logic [FETCH_W-1:0][XLEN-1:0] instr;
  } trace_t;

endpackage
