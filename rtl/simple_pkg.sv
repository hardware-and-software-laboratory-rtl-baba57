// simple_pkg: shared types and constants of the SIMPLE/B processor.
//
// SIMPLE is a 16-bit word-addressed machine with eight general purpose
// registers and four condition codes (S, Z, C, V). Every instruction is one
// word; bits [15:14] (op1) pick one of four formats:
//   11  operation / input-output   [13:11] Rs, [10:8] Rd, [7:4] op3, [3:0] d
//   00  load  LD Ra,d(Rb)          [13:11] Ra, [10:8] Rb, [7:0] d
//   01  store ST Ra,d(Rb)
//   10  LI / B / conditional branch [13:11] op2, [10:8] Rb or cond, [7:0] d
// The opcode values below are the architecture's own. The phase encoding,
// the ALU operation codes and the control-word layout are this design's
// choices.
package simple_pkg;

  localparam int unsigned WORD_W = 16;
  typedef logic [WORD_W-1:0] word_t;
  typedef logic [2:0]        reg_idx_t;

  // op1, instruction bits [15:14]
  typedef enum logic [1:0] {
    OP1_LD   = 2'b00,
    OP1_ST   = 2'b01,
    OP1_IMM  = 2'b10,
    OP1_CALC = 2'b11
  } op1_t;

  // op3, instruction bits [7:4] of the operation / input-output format
  typedef enum logic [3:0] {
    OP3_ADD  = 4'b0000,
    OP3_SUB  = 4'b0001,
    OP3_AND  = 4'b0010,
    OP3_OR   = 4'b0011,
    OP3_XOR  = 4'b0100,
    OP3_CMP  = 4'b0101,
    OP3_MOV  = 4'b0110,
    OP3_RSV7 = 4'b0111,
    OP3_SLL  = 4'b1000,
    OP3_SLR  = 4'b1001,
    OP3_SRL  = 4'b1010,
    OP3_SRA  = 4'b1011,
    OP3_IN   = 4'b1100,
    OP3_OUT  = 4'b1101,
    OP3_RSVE = 4'b1110,
    OP3_HLT  = 4'b1111
  } op3_t;

  // op2, instruction bits [13:11] when op1 = 10
  localparam logic [2:0] OP2_LI   = 3'b000;
  localparam logic [2:0] OP2_B    = 3'b100;
  localparam logic [2:0] OP2_BCND = 3'b111;

  // cond, instruction bits [10:8] of the conditional branch format
  localparam logic [2:0] COND_BE  = 3'b000;
  localparam logic [2:0] COND_BLT = 3'b001;
  localparam logic [2:0] COND_BLE = 3'b010;
  localparam logic [2:0] COND_BNE = 3'b011;

  // Shift kind, equal to op3[1:0] of the shift instructions.
  typedef enum logic [1:0] {
    SH_SLL = 2'b00,
    SH_SLR = 2'b01,
    SH_SRL = 2'b10,
    SH_SRA = 2'b11
  } shift_op_t;

  // ALU operation: the register operations plus a pass of operand B,
  // which serves MOV and LI.
  typedef enum logic [2:0] {
    ALU_ADD   = 3'd0,
    ALU_SUB   = 3'd1,
    ALU_AND   = 3'd2,
    ALU_OR    = 3'd3,
    ALU_XOR   = 3'd4,
    ALU_PASSB = 3'd5
  } alu_op_t;

  typedef struct packed {
    logic s;
    logic z;
    logic c;
    logic v;
  } flags_t;

  // The five phases, one-hot.
  typedef enum logic [4:0] {
    PH_P1 = 5'b00001,  // instruction fetch
    PH_P2 = 5'b00010,  // register readout
    PH_P3 = 5'b00100,  // operation
    PH_P4 = 5'b01000,  // main memory access
    PH_P5 = 5'b10000   // register writing
  } phase_t;

  // Control word driven by the controller for the current phase.
  typedef struct packed {
    logic     pc_inc;        // p1: PC <= PC + 1
    logic     pc_load;       // p5: PC <= DR (branch taken)
    logic     ir_we;         // p1: IR <= data bus
    logic     ab_we;         // p2: AR, BR <= register file
    logic     dr_we;         // p3: DR <= ALU or shifter
    logic     cc_we;         // p3: SZCV <= flags
    alu_op_t  alu_op;
    logic     alu_a_pc;      // ALU A = PC instead of BR
    logic     alu_b_imm;     // ALU B = sign_ext(d) instead of AR
    logic     dr_from_shift; // DR and SZCV take the shifter's result
    logic     mem_addr_dr;   // address bus = DR instead of PC
    logic     mem_we;        // p4: write AR to *(DR)
    logic     mdr_we;        // p4: MDR <= data bus or external input
    logic     mdr_from_in;   // MDR takes the external input
    logic     out_we;        // p4: external output <= AR
    logic     rf_we;         // p5: register file write
    reg_idx_t rf_waddr;
    logic     rf_from_mdr;   // written value is MDR instead of DR
    logic     halt;          // p5 of HLT: stop after this instruction
  } ctrl_t;

  function automatic word_t sign_ext8(input logic [7:0] d);
    return {{(WORD_W-8){d[7]}}, d};
  endfunction

endpackage
