// tb_vlp_alu: self-checking test of the variable latency ALU.
//
// Drives random operations (with random idle cycles), including operand pairs
// built to create long carry chains, and checks every result and its latency.
// The expected result comes from plain SystemVerilog arithmetic; the expected
// latency from an independent scan for a carry that runs through 16 or more
// propagate positions, plus the rule that an operation issued right after a
// two-cycle one also takes two cycles.
module tb_vlp_alu;
  import cosmos_pkg::*;

  localparam int W = 32;
  localparam int CHAIN = 16;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic         in_valid;
  alu_op_e      in_op;
  logic [W-1:0] in_a, in_b;
  logic [15:0]  in_meta;
  logic         out_valid, out_slow;
  logic [W-1:0] out_result;
  logic [15:0]  out_meta;

  vlp_alu #(.W(W), .CHAIN(CHAIN), .META_W(16)) dut (
    .clk, .rst_n, .in_valid, .in_op, .in_a, .in_b, .in_meta,
    .out_valid, .out_result, .out_meta, .out_slow
  );

  int checks = 0, failures = 0;
  int n_slow = 0, n_fast = 0, n_chained = 0;

  function automatic logic [W-1:0] ref_result(alu_op_e op, logic [W-1:0] a, logic [W-1:0] b);
    case (op)
      OP_ADD:  return a + b;
      OP_SUB:  return a - b;
      OP_AND:  return a & b;
      OP_OR:   return a | b;
      OP_XOR:  return a ^ b;
      OP_SLT:  return W'($signed(a) < $signed(b));
      default: return '0;
    endcase
  endfunction

  // longest run of positions a carry propagates through, over all carries
  // that reach a result bit
  function automatic bit ref_slow(alu_op_e op, logic [W-1:0] a, logic [W-1:0] b);
    logic [W-1:0] bb;
    logic         c0;
    int           run;
    bit           carry;
    if (!(op == OP_ADD || op == OP_SUB || op == OP_SLT)) return 0;
    c0 = (op != OP_ADD);
    bb = c0 ? ~b : b;
    carry = c0;
    run   = 0;   // positions the live carry has crossed since it was generated
    for (int i = 0; i < W; i++) begin
      // carry entering bit i
      if (carry && run >= CHAIN) return 1;
      if (a[i] & bb[i]) begin carry = 1; run = 0; end
      else if (a[i] ^ bb[i]) begin if (carry) run++; end
      else begin carry = 0; run = 0; end
    end
    return 0;
  endfunction

  typedef struct { logic [W-1:0] res; int due; logic [15:0] meta; bit slow; } exp_t;
  exp_t q[$];
  int cycle = 0;
  bit prev_two = 0;   // the operation issued in the previous cycle took two cycles

  always @(posedge clk) cycle <= cycle + 1;

  // output checker
  always @(negedge clk) begin
    if (rst_n) begin
      if (out_valid) begin
        checks++;
        if (q.size() == 0) begin
          failures++;
          $display("FAIL: unexpected output");
        end else begin
          exp_t e;
          e = q.pop_front();
          if (out_result !== e.res || out_meta !== e.meta || cycle != e.due || out_slow != e.slow) begin
            failures++;
            $display("FAIL meta=%0d res=%h exp=%h cycle=%0d due=%0d slow=%0d/%0d",
                     out_meta, out_result, e.res, cycle, e.due, out_slow, e.slow);
          end
        end
      end else if (q.size() != 0 && q[0].due < cycle) begin
        failures++;
        checks++;
        $display("FAIL: missing output for meta %0d", q[0].meta);
        void'(q.pop_front());
      end
    end
  end

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 0; in_op = OP_ADD; in_a = 0; in_b = 0; in_meta = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 20000; n++) begin
      @(negedge clk);
      if ($urandom_range(0, 4) == 0) begin
        in_valid = 0;
        prev_two = 0;
      end else begin
        logic [W-1:0] a, b;
        alu_op_e op;
        bit s;
        int lat;
        op = alu_op_e'($urandom_range(0, 5));
        a  = $urandom;
        b  = $urandom;
        case ($urandom_range(0, 3))
          0: b = ~a ^ (32'h1 << $urandom_range(0, 31));           // long propagate runs
          1: begin a = 32'h0000_ffff << $urandom_range(0, 16); b = 32'h1; end
          default: ;
        endcase
        if (op == OP_SUB && $urandom_range(0, 3) == 0) b = a ^ (32'h1 << $urandom_range(0, 31));
        s   = ref_slow(op, a, b);
        lat = (s || prev_two) ? 2 : 1;
        if (s) n_slow++; else if (prev_two) n_chained++; else n_fast++;
        prev_two = (lat == 2);
        in_valid = 1; in_op = op; in_a = a; in_b = b; in_meta = 16'(n);
        q.push_back('{res: ref_result(op, a, b), due: cycle + lat, meta: 16'(n), slow: (lat == 2)});
      end
    end
    @(negedge clk);
    in_valid = 0;
    repeat (5) @(posedge clk);
    checks++;
    if (q.size() != 0) begin failures++; $display("FAIL: %0d results missing", q.size()); end
    checks++;
    if (n_slow < 100 || n_fast < 100 || n_chained < 10) begin
      failures++;
      $display("FAIL: coverage slow=%0d fast=%0d chained=%0d", n_slow, n_fast, n_chained);
    end
    $display("slow=%0d fast=%0d chained=%0d", n_slow, n_fast, n_chained);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
