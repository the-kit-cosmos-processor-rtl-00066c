// vlp_alu: variable latency pipelined integer ALU.
//
// Two circuits compute every operation side by side. Circuit A is a fast adder
// whose carries look back over at most CHAIN bit positions, so it is right for
// every operation in which no carry propagates over CHAIN or more positions.
// Circuit B is an exact adder cut into two pipeline stages at the middle bit.
// A completion detector, placed in the second cycle, tells whether A's result
// is right: if so the operation completes after one cycle, otherwise B's
// result is used after two. Logic operations have no carry and always take one
// cycle. One operation can enter every cycle.
//
// The output has a single port. When the previous operation is leaving from
// circuit B, an operation that A finished in the same cycle also takes B's
// path and leaves one cycle later, so the throughput stays at one per cycle.
//
// Interface: in_* is sampled at the clock edge that ends the issue cycle.
// out_valid is combinational from the pipeline registers: one cycle after
// entry for a fast operation, two for a slow one; out_slow tells which.
//
// The split into a fast unpipelined circuit and a pipelined backup, the
// pipelined completion detector and the two-cycle latency for a carry
// propagating over 16 bits follow the design. How A limits its carries, the
// exact detector condition and the output-collision rule are this design's
// own choices.
module vlp_alu
  import cosmos_pkg::*;
#(
  parameter int unsigned W      = 32,  // operand width
  parameter int unsigned CHAIN  = 16,  // longest carry propagation circuit A handles
  parameter int unsigned META_W = 8    // width of the tag that travels with an operation
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  alu_op_e           in_op,
  input  logic [W-1:0]      in_a,
  input  logic [W-1:0]      in_b,
  input  logic [META_W-1:0] in_meta,
  output logic              out_valid,
  output logic [W-1:0]      out_result,
  output logic [META_W-1:0] out_meta,
  output logic              out_slow
);

  localparam int unsigned HALF = W / 2;

  // ---------------------------------------------------------------- cycle 1
  logic         arith;
  logic         cin;
  logic [W-1:0] b_eff;
  logic [W-1:0] g, p;
  logic [W-1:0] sum_a;      // circuit A sum
  logic [W-1:0] res_a;      // circuit A result
  logic [HALF:0] low_b;     // circuit B first stage: low half with carry out

  always_comb begin
    arith = (in_op == OP_ADD) || (in_op == OP_SUB) || (in_op == OP_SLT);
    cin   = (in_op == OP_SUB) || (in_op == OP_SLT);
    b_eff = cin ? ~in_b : in_b;
    g     = in_a & b_eff;
    p     = in_a ^ b_eff;
    // Circuit A: the carry into bit i ripples over at most CHAIN positions
    // below it; the carry-in counts as a generate just below bit 0.
    for (int i = 0; i < W; i++) begin
      logic c;
      int   lo;
      lo = (i > int'(CHAIN)) ? i - int'(CHAIN) : 0;
      c  = (i < int'(CHAIN)) ? cin : 1'b0;
      for (int j = 0; j < W; j++) begin
        if (j >= lo && j < i) c = g[j] | (p[j] & c);
      end
      sum_a[i] = p[i] ^ c;
    end
    unique case (in_op)
      OP_ADD, OP_SUB: res_a = sum_a;
      OP_SLT:         res_a = W'((in_a[W-1] != in_b[W-1]) ? in_a[W-1] : sum_a[W-1]);
      OP_AND:         res_a = in_a & in_b;
      OP_OR:          res_a = in_a | in_b;
      OP_XOR:         res_a = in_a ^ in_b;
      default:        res_a = '0;
    endcase
    low_b = {1'b0, in_a[HALF-1:0]} + {1'b0, b_eff[HALF-1:0]} + (HALF+1)'(cin);
  end

  typedef struct packed {
    logic              arith;
    alu_op_e           op;
    logic              cin;
    logic [W-1:0]      a;
    logic [W-1:0]      b_eff;
    logic              sign_a;
    logic              sign_b;
    logic [W-1:0]      res_a;
    logic [HALF:0]     low_b;
    logic [META_W-1:0] meta;
  } s1_t;

  typedef struct packed {
    logic [W-1:0]      res;
    logic [META_W-1:0] meta;
  } s2_t;

  s1_t  s1_q;
  s2_t  s2_q;
  logic s1_v, s2_v;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_v <= 1'b0;
    end else begin
      s1_v <= in_valid;
    end
  end

  always_ff @(posedge clk) begin
    s1_q.arith  <= arith;
    s1_q.op     <= in_op;
    s1_q.cin    <= cin;
    s1_q.a      <= in_a;
    s1_q.b_eff  <= b_eff;
    s1_q.sign_a <= in_a[W-1];
    s1_q.sign_b <= in_b[W-1];
    s1_q.res_a  <= res_a;
    s1_q.low_b  <= low_b;
    s1_q.meta   <= in_meta;
  end

  // ---------------------------------------------------------------- cycle 2
  // Completion detector: some carry (a generate, or the carry-in) runs through
  // CHAIN or more propagate positions and reaches a bit of the result.
  logic         slow;
  logic [W-1:0] g1, p1;
  logic [W-1:0] sum_b;
  logic [W-1:0] res_b;

  logic [W:0] gx;   // gx[0] = carry-in, gx[j+1] = generate of bit j
  logic [W:0] px;   // px[j+1] = propagate of bit j
  always_comb begin
    g1   = s1_q.a & s1_q.b_eff;
    p1   = s1_q.a ^ s1_q.b_eff;
    gx   = {g1, s1_q.cin};
    px   = {p1, 1'b0};
    slow = 1'b0;
    // a carry born at position j (or the carry-in) that propagates over the
    // CHAIN positions above it and still reaches a result bit
    for (int j = 0; j + int'(CHAIN) <= int'(W) - 1; j++) begin
      slow = slow | (gx[j] & (&px[j+1 +: CHAIN]));
    end
    slow = slow & s1_q.arith;
    // Circuit B second stage: high half from the registered low-half carry.
    sum_b[HALF-1:0] = s1_q.low_b[HALF-1:0];
    sum_b[W-1:HALF] = s1_q.a[W-1:HALF] + s1_q.b_eff[W-1:HALF] + (W-HALF)'(s1_q.low_b[HALF]);
    unique case (s1_q.op)
      OP_ADD, OP_SUB: res_b = sum_b;
      OP_SLT:         res_b = W'((s1_q.sign_a != s1_q.sign_b) ? s1_q.sign_a : sum_b[W-1]);
      default:        res_b = s1_q.res_a;   // logic operations: A is exact
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s2_v <= 1'b0;
    end else begin
      s2_v <= s1_v && (slow || s2_v);
    end
  end

  always_ff @(posedge clk) begin
    s2_q.res  <= res_b;
    s2_q.meta <= s1_q.meta;
  end

  always_comb begin
    if (s2_v) begin
      out_valid  = 1'b1;
      out_result = s2_q.res;
      out_meta   = s2_q.meta;
      out_slow   = 1'b1;
    end else begin
      out_valid  = s1_v && !slow;
      out_result = s1_q.res_a;
      out_meta   = s1_q.meta;
      out_slow   = 1'b0;
    end
  end

endmodule
