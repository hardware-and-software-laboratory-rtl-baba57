// tb_alu: self-checking test of the ALU.
// Drives random and corner-case operands through every operation and
// compares the result and S/Z/C/V with values computed here from integer
// arithmetic: C of ADD is the 17th bit of the sum, C of SUB is "no borrow"
// (a >= b unsigned), V is "the signed result lies outside -32768..32767".
module tb_alu;
  import simple_pkg::*;

  word_t   a, b, y;
  alu_op_t op;
  flags_t  flags;
  int      checks = 0, failures = 0;

  alu dut (.a(a), .b(b), .op(op), .y(y), .flags(flags));

  task automatic check_one(input word_t ta, input word_t tb_, input alu_op_t top);
    word_t  ey;
    flags_t ef;
    int     sa, sb, sr;
    a = ta; b = tb_; op = top;
    #1;
    sa = $signed(ta); sb = $signed(tb_);
    ef = '0;
    case (top)
      ALU_ADD: begin
        ey = ta + tb_;
        ef.c = (int'(ta) + int'(tb_)) > 65535;
        sr = sa + sb;
        ef.v = (sr > 32767) || (sr < -32768);
      end
      ALU_SUB: begin
        ey = ta - tb_;
        ef.c = (ta >= tb_);
        sr = sa - sb;
        ef.v = (sr > 32767) || (sr < -32768);
      end
      ALU_AND: ey = ta & tb_;
      ALU_OR:  ey = ta | tb_;
      ALU_XOR: ey = ta ^ tb_;
      default: ey = tb_;
    endcase
    ef.s = ey[15];
    ef.z = (ey == 16'h0000);
    checks++;
    if (y !== ey || flags !== ef) begin
      failures++;
      if (failures < 10)
        $display("FAIL op=%s a=%h b=%h y=%h/%h flags=%b/%b", top.name(), ta, tb_, y, ey, flags, ef);
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
    word_t corners [8] = '{16'h0000, 16'h0001, 16'h7fff, 16'h8000, 16'hffff, 16'h8001, 16'h5555, 16'haaaa};
    alu_op_t ops [6] = '{ALU_ADD, ALU_SUB, ALU_AND, ALU_OR, ALU_XOR, ALU_PASSB};
    foreach (ops[k]) begin
      foreach (corners[i]) foreach (corners[j]) check_one(corners[i], corners[j], ops[k]);
      repeat (2000) check_one(word_t'($urandom), word_t'($urandom), ops[k]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
