// tb_shifter: self-checking test of the shift circuit.
// For every shift kind and every distance 0..15 it shifts random and corner
// values and compares with a reference that moves the word one place at a
// time, recording the bit that falls off (C is 0 for SLR and for d = 0).
module tb_shifter;
  import simple_pkg::*;

  word_t      x, y;
  logic [3:0] d;
  shift_op_t  op;
  flags_t     flags;
  int         checks = 0, failures = 0;

  shifter dut (.x(x), .d(d), .op(op), .y(y), .flags(flags));

  task automatic check_one(input word_t tx, input int td, input shift_op_t top);
    word_t  r;
    logic   lost;
    flags_t ef;
    x = tx; d = 4'(td); op = top;
    #1;
    r = tx; lost = 1'b0;
    for (int i = 0; i < td; i++) begin
      case (top)
        SH_SLL: begin lost = r[15]; r = {r[14:0], 1'b0}; end
        SH_SLR: begin lost = 1'b0;  r = {r[14:0], r[15]}; end
        SH_SRL: begin lost = r[0];  r = {1'b0, r[15:1]}; end
        default: begin lost = r[0]; r = {r[15], r[15:1]}; end
      endcase
    end
    ef.s = r[15]; ef.z = (r == 0); ef.c = lost; ef.v = 1'b0;
    checks++;
    if (y !== r || flags !== ef) begin
      failures++;
      if (failures < 10)
        $display("FAIL op=%s x=%h d=%0d y=%h/%h flags=%b/%b", top.name(), tx, td, y, r, flags, ef);
    end
  endtask

  initial begin
    #100000;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    shift_op_t ops [4] = '{SH_SLL, SH_SLR, SH_SRL, SH_SRA};
    foreach (ops[k]) for (int s = 0; s < 16; s++) begin
      check_one(16'h8001, s, ops[k]);
      check_one(16'h0000, s, ops[k]);
      check_one(16'hffff, s, ops[k]);
      repeat (40) check_one(word_t'($urandom), s, ops[k]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
