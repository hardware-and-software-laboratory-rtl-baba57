// shifter: the shift circuit of SIMPLE/B (phase p3).
//
// Shifts x by d (0..15) places, combinationally, as the shift instructions
// define:
//   SH_SLL  left, zeros shifted in          SH_SLR  left rotate
//   SH_SRL  right, zeros shifted in         SH_SRA  right, sign bit shifted in
// Flags: S = y[15], Z = (y == 0), V = 0 always. C is the last bit shifted
// out, except that it is 0 for SLR and whenever d = 0; all of this is the
// architecture's definition. The barrel-shifter form (one shift operator
// per kind) is this design's choice.
module shifter
  import simple_pkg::*;
(
  input  word_t      x,
  input  logic [3:0] d,
  input  shift_op_t  op,
  output word_t      y,
  output flags_t     flags
);

  word_t               rot;
  logic                last_out;

  always_comb begin
    rot      = (d == 4'd0) ? x : ((x << d) | (x >> (5'd16 - {1'b0, d})));
    last_out = 1'b0;
    unique case (op)
      SH_SLL: begin
        y = x << d;
        if (d != 4'd0) last_out = x[WORD_W - 32'(d)];
      end
      SH_SLR: y = rot;
      SH_SRL: begin
        y = x >> d;
        if (d != 4'd0) last_out = x[32'(d) - 1];
      end
      default: begin  // SH_SRA
        y = word_t'($signed(x) >>> d);
        if (d != 4'd0) last_out = x[32'(d) - 1];
      end
    endcase

    flags.s = y[WORD_W-1];
    flags.z = (y == '0);
    flags.c = last_out;
    flags.v = 1'b0;
  end

endmodule
