// tb_controller: self-checking test of the instruction decoder/controller.
// For each instruction of the SIMPLE instruction set (and some reserved
// encodings) the testbench assembles a word with random register fields and
// displacement, walks it through phases p1..p5, and checks every enable
// against the expectation for that mnemonic; operand selection and ALU
// operation are checked in p3. Branch conditions are tried under all 16
// flag combinations. With running = 0 every enable must be 0.
module tb_controller;
  import simple_pkg::*;

  typedef enum {M_ADD, M_SUB, M_AND, M_OR, M_XOR, M_CMP, M_MOV, M_SLL, M_SLR, M_SRL, M_SRA,
                M_IN, M_OUT, M_HLT, M_RSV_CALC, M_LD, M_ST, M_LI, M_B, M_RSV_IMM,
                M_BE, M_BLT, M_BLE, M_BNE, M_RSV_COND} mn_t;

  phase_t phase;
  logic   running;
  word_t  ir;
  flags_t cc;
  ctrl_t  ctrl;
  int     checks = 0, failures = 0;

  controller dut (.phase(phase), .running(running), .ir(ir), .cc(cc), .ctrl(ctrl));

  task automatic expect_bit(input logic got, input logic exp, input string what, input mn_t m);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s %s phase=%s got %b", m.name(), what, phase.name(), got);
    end
  endtask

  function automatic word_t assemble(input mn_t m, input logic [2:0] x, input logic [2:0] y,
                                     input logic [7:0] d);
    case (m)
      M_ADD: return {2'b11, x, y, 4'b0000, d[3:0]};
      M_SUB: return {2'b11, x, y, 4'b0001, d[3:0]};
      M_AND: return {2'b11, x, y, 4'b0010, d[3:0]};
      M_OR:  return {2'b11, x, y, 4'b0011, d[3:0]};
      M_XOR: return {2'b11, x, y, 4'b0100, d[3:0]};
      M_CMP: return {2'b11, x, y, 4'b0101, d[3:0]};
      M_MOV: return {2'b11, x, y, 4'b0110, d[3:0]};
      M_SLL: return {2'b11, x, y, 4'b1000, d[3:0]};
      M_SLR: return {2'b11, x, y, 4'b1001, d[3:0]};
      M_SRL: return {2'b11, x, y, 4'b1010, d[3:0]};
      M_SRA: return {2'b11, x, y, 4'b1011, d[3:0]};
      M_IN:  return {2'b11, x, y, 4'b1100, d[3:0]};
      M_OUT: return {2'b11, x, y, 4'b1101, d[3:0]};
      M_HLT: return {2'b11, x, y, 4'b1111, d[3:0]};
      M_RSV_CALC: return {2'b11, x, y, (d[0] ? 4'b0111 : 4'b1110), d[3:0]};
      M_LD:  return {2'b00, x, y, d};
      M_ST:  return {2'b01, x, y, d};
      M_LI:  return {2'b10, 3'b000, y, d};
      M_B:   return {2'b10, 3'b100, y, d};
      M_RSV_IMM: return {2'b10, (d[0] ? 3'b001 : 3'b110), y, d};
      M_BE:  return {2'b10, 3'b111, 3'b000, d};
      M_BLT: return {2'b10, 3'b111, 3'b001, d};
      M_BLE: return {2'b10, 3'b111, 3'b010, d};
      M_BNE: return {2'b10, 3'b111, 3'b011, d};
      default: return {2'b10, 3'b111, 1'b1, d[1:0], d};
    endcase
  endfunction

  task automatic run_instr(input mn_t m, input flags_t f);
    logic [2:0] x, y;
    logic [7:0] d;
    logic arith, shift, taken, wr, wsrc_mdr;
    logic [2:0] wreg;
    x = 3'($urandom); y = 3'($urandom); d = 8'($urandom);
    ir = assemble(m, x, y, d);
    cc = f;
    running = 1'b1;
    arith = m inside {M_ADD, M_SUB, M_AND, M_OR, M_XOR, M_CMP, M_MOV};
    shift = m inside {M_SLL, M_SLR, M_SRL, M_SRA};
    case (m)
      M_B:   taken = 1;
      M_BE:  taken = f.z;
      M_BLT: taken = f.s ^ f.v;
      M_BLE: taken = f.z | (f.s ^ f.v);
      M_BNE: taken = !f.z;
      default: taken = 0;
    endcase
    wr = (arith && m != M_CMP) || shift || m inside {M_IN, M_LD, M_LI};
    wsrc_mdr = m inside {M_IN, M_LD};
    wreg = (m == M_LD) ? x : y;

    phase = PH_P1; #1;
    expect_bit(ctrl.ir_we, 1, "ir_we", m);
    expect_bit(ctrl.pc_inc, 1, "pc_inc", m);
    expect_bit(ctrl.mem_addr_dr, 0, "fetch from PC", m);
    expect_bit(ctrl.ab_we | ctrl.dr_we | ctrl.cc_we | ctrl.mem_we | ctrl.mdr_we | ctrl.out_we
               | ctrl.rf_we | ctrl.pc_load | ctrl.halt, 0, "p1 other", m);
    phase = PH_P2; #1;
    expect_bit(ctrl.ab_we, 1, "ab_we", m);
    expect_bit(ctrl.ir_we | ctrl.pc_inc | ctrl.dr_we | ctrl.cc_we | ctrl.mem_we | ctrl.mdr_we
               | ctrl.out_we | ctrl.rf_we | ctrl.pc_load | ctrl.halt, 0, "p2 other", m);
    phase = PH_P3; #1;
    expect_bit(ctrl.dr_we, 1, "dr_we", m);
    expect_bit(ctrl.cc_we, arith | shift, "cc_we", m);
    expect_bit(ctrl.dr_from_shift, shift, "dr_from_shift", m);
    expect_bit(ctrl.ir_we | ctrl.pc_inc | ctrl.ab_we | ctrl.mem_we | ctrl.mdr_we | ctrl.out_we
               | ctrl.rf_we | ctrl.pc_load | ctrl.halt, 0, "p3 other", m);
    if (m inside {M_LD, M_ST}) begin
      expect_bit(ctrl.alu_op == ALU_ADD && !ctrl.alu_a_pc && ctrl.alu_b_imm, 1, "address calc", m);
    end
    if (m inside {M_B, M_BE, M_BLT, M_BLE, M_BNE}) begin
      expect_bit(ctrl.alu_op == ALU_ADD && ctrl.alu_a_pc && ctrl.alu_b_imm, 1, "target calc", m);
    end
    if (m == M_LI)  expect_bit(ctrl.alu_op == ALU_PASSB && ctrl.alu_b_imm, 1, "li", m);
    if (m == M_MOV) expect_bit(ctrl.alu_op == ALU_PASSB && !ctrl.alu_b_imm, 1, "mov", m);
    if (m == M_ADD) expect_bit(ctrl.alu_op == ALU_ADD && !ctrl.alu_a_pc && !ctrl.alu_b_imm, 1, "add", m);
    if (m inside {M_SUB, M_CMP})
      expect_bit(ctrl.alu_op == ALU_SUB && !ctrl.alu_a_pc && !ctrl.alu_b_imm, 1, "sub", m);
    if (m == M_AND) expect_bit(ctrl.alu_op == ALU_AND && !ctrl.alu_b_imm, 1, "and", m);
    if (m == M_OR)  expect_bit(ctrl.alu_op == ALU_OR && !ctrl.alu_b_imm, 1, "or", m);
    if (m == M_XOR) expect_bit(ctrl.alu_op == ALU_XOR && !ctrl.alu_b_imm, 1, "xor", m);
    phase = PH_P4; #1;
    expect_bit(ctrl.mem_addr_dr, 1, "p4 address from DR", m);
    expect_bit(ctrl.mem_we, m == M_ST, "mem_we", m);
    expect_bit(ctrl.mdr_we, m inside {M_LD, M_IN}, "mdr_we", m);
    if (ctrl.mdr_we) expect_bit(ctrl.mdr_from_in, m == M_IN, "mdr source", m);
    expect_bit(ctrl.out_we, m == M_OUT, "out_we", m);
    expect_bit(ctrl.ir_we | ctrl.pc_inc | ctrl.ab_we | ctrl.dr_we | ctrl.cc_we | ctrl.rf_we
               | ctrl.pc_load | ctrl.halt, 0, "p4 other", m);
    phase = PH_P5; #1;
    expect_bit(ctrl.rf_we, wr, "rf_we", m);
    if (wr) begin
      expect_bit(ctrl.rf_waddr == wreg, 1, "rf_waddr", m);
      expect_bit(ctrl.rf_from_mdr, wsrc_mdr, "rf source", m);
    end
    expect_bit(ctrl.pc_load, taken, "pc_load", m);
    expect_bit(ctrl.halt, m == M_HLT, "halt", m);
    expect_bit(ctrl.ir_we | ctrl.pc_inc | ctrl.ab_we | ctrl.dr_we | ctrl.cc_we | ctrl.mem_we
               | ctrl.mdr_we | ctrl.out_we, 0, "p5 other", m);
    // Stopped: nothing may be enabled in any phase.
    running = 1'b0;
    for (int p = 0; p < 5; p++) begin
      phase = phase_t'(5'b1 << p); #1;
      expect_bit(ctrl.ir_we | ctrl.pc_inc | ctrl.ab_we | ctrl.dr_we | ctrl.cc_we | ctrl.mem_we
                 | ctrl.mdr_we | ctrl.out_we | ctrl.rf_we | ctrl.pc_load | ctrl.halt, 0, "stopped", m);
    end
  endtask

  initial begin
    #1000000;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i <= int'(M_RSV_COND); i++)
      for (int f = 0; f < 16; f++)
        repeat (3) run_instr(mn_t'(i), flags_t'(f));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
