// simple_b: the SIMPLE/B processor, a five-phase implementation of the
// 16-bit SIMPLE instruction set.
//
// Each instruction passes through five phases, one clock cycle each:
//   p1 fetch       IR <= *(PC), PC <= PC + 1
//   p2 read        AR <= r[IR[13:11]] (Ra/Rs), BR <= r[IR[10:8]] (Rb/Rd)
//   p3 operate     DR <= ALU or shifter result, SZCV <= flags
//   p4 memory/IO   MDR <= *(DR) or external input; *(DR) <= AR; output <= AR
//   p5 write back  r[...] <= DR or MDR; PC <= DR for a taken branch
// The datapath registers (PC, IR, AR, BR, DR, MDR, SZCV), the ALU, the
// shifter, the register file, the single address bus (PC in p1, DR
// otherwise) and data bus, and the controller with its phase counter are
// those of the SIMPLE/B block diagram. The main memory reads and writes on
// the falling clock edge so that a fetch or load completes inside one phase.
//
// Interface
//   clk, reset   reset clears PC and all registers and leaves the machine
//                stopped at p1
//   exec         start/stop push switch (0->1 starts; 0->1 while running
//                stops after the current instruction)
//   in_data      value read by IN (switches), sampled at the end of p4
//   out_data     value of the last OUT (drives the 7-segment display),
//   out_valid    one-cycle pulse after out_data was updated
//   running, halted, pc, phase   status for display and debugging
// The external devices themselves are outside this module. halted (set by
// HLT, cleared by the next start) and out_valid are this design's additions.
module simple_b
  import simple_pkg::*;
#(
  parameter int unsigned MEM_WORDS = 65536,
  parameter string       INIT_FILE = ""
) (
  input  logic   clk,
  input  logic   reset,
  input  logic   exec,
  input  word_t  in_data,
  output word_t  out_data,
  output logic   out_valid,
  output logic   running,
  output logic   halted,
  output word_t  pc,
  output phase_t phase
);

  ctrl_t  ctrl;
  word_t  ir, ar, br, dr, mdr;
  flags_t szcv;

  word_t  rf_a, rf_b, rf_wdata;
  word_t  alu_a, alu_b, alu_y, sh_y;
  flags_t alu_flags, sh_flags;
  word_t  addr_bus, mem_rdata;

  // ---------------- control ----------------
  phase_counter u_phase (
    .clk    (clk),
    .reset  (reset),
    .exec   (exec),
    .halt   (ctrl.halt),
    .phase  (phase),
    .running(running)
  );

  controller u_ctrl (
    .phase  (phase),
    .running(running),
    .ir     (ir),
    .cc     (szcv),
    .ctrl   (ctrl)
  );

  // ---------------- p1: PC and fetch ----------------
  pc_unit u_pc (
    .clk       (clk),
    .reset     (reset),
    .inc       (ctrl.pc_inc),
    .load      (ctrl.pc_load),
    .load_value(dr),
    .pc        (pc)
  );

  assign addr_bus = ctrl.mem_addr_dr ? dr : pc;

  main_memory #(
    .WORDS    (MEM_WORDS),
    .INIT_FILE(INIT_FILE)
  ) u_mem (
    .clk  (clk),
    .addr (addr_bus),
    .we   (ctrl.mem_we),
    .wdata(ar),
    .rdata(mem_rdata)
  );

  // ---------------- p2: register readout ----------------
  register_file u_rf (
    .clk    (clk),
    .reset  (reset),
    .raddr_a(ir[13:11]),
    .raddr_b(ir[10:8]),
    .rdata_a(rf_a),
    .rdata_b(rf_b),
    .we     (ctrl.rf_we),
    .waddr  (ctrl.rf_waddr),
    .wdata  (rf_wdata)
  );

  // ---------------- p3: operation ----------------
  assign alu_a = ctrl.alu_a_pc  ? pc : br;
  assign alu_b = ctrl.alu_b_imm ? sign_ext8(ir[7:0]) : ar;

  alu u_alu (
    .a    (alu_a),
    .b    (alu_b),
    .op   (ctrl.alu_op),
    .y    (alu_y),
    .flags(alu_flags)
  );

  shifter u_sh (
    .x    (br),
    .d    (ir[3:0]),
    .op   (shift_op_t'(ir[5:4])),
    .y    (sh_y),
    .flags(sh_flags)
  );

  // ---------------- p5: write-back selector ----------------
  assign rf_wdata = ctrl.rf_from_mdr ? mdr : dr;

  // ---------------- datapath registers ----------------
  always_ff @(posedge clk) begin
    if (reset) begin
      ir        <= '0;
      ar        <= '0;
      br        <= '0;
      dr        <= '0;
      mdr       <= '0;
      szcv      <= '0;
      out_data  <= '0;
      out_valid <= 1'b0;
      halted    <= 1'b0;
    end else begin
      out_valid <= ctrl.out_we;
      if (ctrl.ir_we) ir <= mem_rdata;
      if (ctrl.ab_we) begin
        ar <= rf_a;
        br <= rf_b;
      end
      if (ctrl.dr_we)  dr   <= ctrl.dr_from_shift ? sh_y : alu_y;
      if (ctrl.cc_we)  szcv <= ctrl.dr_from_shift ? sh_flags : alu_flags;
      if (ctrl.mdr_we) mdr  <= ctrl.mdr_from_in ? in_data : mem_rdata;
      if (ctrl.out_we) out_data <= ar;
      if (ctrl.halt)                halted <= 1'b1;
      else if (ctrl.ir_we)          halted <= 1'b0;
    end
  end

endmodule
