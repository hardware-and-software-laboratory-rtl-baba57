// controller: instruction decoder and phase controller of SIMPLE/B.
//
// Combinational. From the instruction in IR, the current phase and the
// condition codes it produces the control word (simple_pkg::ctrl_t) that
// enables the datapath registers and steers the selectors in this cycle.
// All enables are 0 while the machine is stopped (running = 0).
//   p1  IR <= *(PC), PC <= PC + 1                         every instruction
//   p2  AR <= r[IR[13:11]], BR <= r[IR[10:8]]             every instruction
//   p3  DR <= ALU/shifter result; SZCV set by ADD..SRA (not by IN/OUT/HLT,
//       loads, stores, LI or branches)
//         ADD/SUB/AND/OR/XOR/CMP  BR op AR          MOV  AR
//         shifts                  shift(BR, d)      LD/ST BR + sign_ext(d)
//         LI                      sign_ext(d)       B/Bcc PC + sign_ext(d)
//   p4  LD: MDR <= *(DR); ST: *(DR) <= AR; IN: MDR <= input; OUT: output <= AR
//   p5  ADD..SRA except CMP: r[Rd] <= DR; LI: r[Rb] <= DR; IN: r[Rd] <= MDR;
//       LD: r[Ra] <= MDR; B or a true condition: PC <= DR; HLT: halt
// Branch conditions: BE Z, BLT S^V, BLE Z|(S^V), BNE !Z, read from SZCV in
// p5. Reserved encodings do nothing but advance to the next instruction.
// The phase assignment follows the SIMPLE/B description; the per-signal
// decoding is this design's.
module controller
  import simple_pkg::*;
(
  input  phase_t phase,
  input  logic   running,
  input  word_t  ir,
  input  flags_t cc,
  output ctrl_t  ctrl
);

  logic [1:0] op1;
  logic [2:0] op2;
  logic [2:0] cond;
  op3_t       op3;

  logic is_calc, is_ld, is_st, is_li, is_b, is_bcc;
  logic is_alu_op, is_shift, is_in, is_out, is_hlt, writes_rd;
  logic cond_true;

  always_comb begin
    op1  = ir[15:14];
    op2  = ir[13:11];
    cond = ir[10:8];
    op3  = op3_t'(ir[7:4]);

    is_calc = (op1 == OP1_CALC);
    is_ld   = (op1 == OP1_LD);
    is_st   = (op1 == OP1_ST);
    is_li   = (op1 == OP1_IMM) && (op2 == OP2_LI);
    is_b    = (op1 == OP1_IMM) && (op2 == OP2_B);
    is_bcc  = (op1 == OP1_IMM) && (op2 == OP2_BCND);

    // ADD..MOV (op3 0000..0110) use the ALU; SLL..SRA (10xx) the shifter.
    is_alu_op = is_calc && (ir[7] == 1'b0) && (op3 != OP3_RSV7);
    is_shift  = is_calc && (ir[7:6] == 2'b10);
    is_in     = is_calc && (op3 == OP3_IN);
    is_out    = is_calc && (op3 == OP3_OUT);
    is_hlt    = is_calc && (op3 == OP3_HLT);
    writes_rd = (is_alu_op && (op3 != OP3_CMP)) || is_shift;

    unique case (cond)
      COND_BE:  cond_true = cc.z;
      COND_BLT: cond_true = cc.s ^ cc.v;
      COND_BLE: cond_true = cc.z | (cc.s ^ cc.v);
      COND_BNE: cond_true = ~cc.z;
      default:  cond_true = 1'b0;
    endcase

    ctrl = '0;

    // Selector settings hold for the whole instruction.
    ctrl.alu_a_pc      = is_b || is_bcc;
    ctrl.alu_b_imm     = is_ld || is_st || is_li || is_b || is_bcc;
    ctrl.dr_from_shift = is_shift;
    ctrl.mem_addr_dr   = (phase != PH_P1);
    ctrl.mdr_from_in   = is_in;
    ctrl.rf_from_mdr   = is_ld || is_in;
    ctrl.rf_waddr      = is_ld ? ir[13:11] : ir[10:8];
    if (is_alu_op) begin
      unique case (op3)
        OP3_ADD:          ctrl.alu_op = ALU_ADD;
        OP3_SUB, OP3_CMP: ctrl.alu_op = ALU_SUB;
        OP3_AND:          ctrl.alu_op = ALU_AND;
        OP3_OR:           ctrl.alu_op = ALU_OR;
        OP3_XOR:          ctrl.alu_op = ALU_XOR;
        default:          ctrl.alu_op = ALU_PASSB;  // MOV
      endcase
    end else if (is_li) begin
      ctrl.alu_op = ALU_PASSB;
    end else begin
      ctrl.alu_op = ALU_ADD;  // addresses and branch targets
    end

    if (running) begin
      unique case (phase)
        PH_P1: begin
          ctrl.ir_we  = 1'b1;
          ctrl.pc_inc = 1'b1;
        end
        PH_P2: ctrl.ab_we = 1'b1;
        PH_P3: begin
          ctrl.dr_we = 1'b1;
          ctrl.cc_we = is_alu_op || is_shift;
        end
        PH_P4: begin
          ctrl.mem_we = is_st;
          ctrl.mdr_we = is_ld || is_in;
          ctrl.out_we = is_out;
        end
        default: begin  // PH_P5
          ctrl.rf_we   = writes_rd || is_li || is_in || is_ld;
          ctrl.pc_load = is_b || (is_bcc && cond_true);
          ctrl.halt    = is_hlt;
        end
      endcase
    end
  end

endmodule
