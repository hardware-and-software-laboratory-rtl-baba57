// alu: the 16-bit arithmetic/logic unit of SIMPLE/B (phase p3).
//
// Computes y = a OP b and the condition codes of the result, combinationally.
//   ALU_ADD   a + b          ALU_SUB   a - b (also used by CMP)
//   ALU_AND   a & b          ALU_OR    a | b
//   ALU_XOR   a ^ b          ALU_PASSB b     (MOV, LI)
// The same unit forms effective addresses (BR + sign_ext(d)) and branch
// targets (PC + sign_ext(d)); the controller simply ignores the flags then.
//
// Flags, as the architecture defines them: S = y[15], Z = (y == 0),
// C = carry out of the most significant bit for ADD and SUB and 0 for every
// other operation, V = signed 16-bit overflow for ADD and SUB and 0 otherwise.
// Subtraction is done as a + ~b + 1, so its C is the carry out of that sum
// (1 when no borrow occurs); the architecture only says "carry from the most
// significant bit", and reading it as the adder's carry is this design's
// choice.
module alu
  import simple_pkg::*;
(
  input  word_t   a,
  input  word_t   b,
  input  alu_op_t op,
  output word_t   y,
  output flags_t  flags
);

  logic [WORD_W:0] sum;   // carry out in bit WORD_W
  word_t           b_eff;
  logic            arith;

  always_comb begin
    arith = (op == ALU_ADD) || (op == ALU_SUB);
    b_eff = (op == ALU_SUB) ? ~b : b;
    sum   = {1'b0, a} + {1'b0, b_eff} + {{WORD_W{1'b0}}, (op == ALU_SUB)};

    unique case (op)
      ALU_ADD, ALU_SUB: y = sum[WORD_W-1:0];
      ALU_AND:          y = a & b;
      ALU_OR:           y = a | b;
      ALU_XOR:          y = a ^ b;
      default:          y = b;
    endcase

    flags.s = y[WORD_W-1];
    flags.z = (y == '0);
    flags.c = arith & sum[WORD_W];
    // Overflow: both addends share a sign that the result does not.
    flags.v = arith & (a[WORD_W-1] == b_eff[WORD_W-1]) & (y[WORD_W-1] != a[WORD_W-1]);
  end

endmodule
