// tb_simple_b: end-to-end test of the SIMPLE/B processor at its default
// size (64 KW main memory, no parameter overrides).
//
// An instruction-set reference model written here (registers, flags, PC
// and a mirror of the memory) executes the same programs as the processor.
// The processor is stopped repeatedly - by HLT, and by exec presses at
// random moments - and at every stop its PC, registers, condition codes
// and halt status are compared with the model after the same number of
// instructions; OUT values are compared in order, and the data area and the
// whole memory are compared at the end. Every segment must take exactly
// five clock cycles per instruction.
//
// Programs: a directed loop that sums 1..10 through memory (expected
// results written out by hand), then random programs built from every
// instruction, with forward branches only so that they always end. Each
// instruction kind, both outcomes of each conditional branch, reserved
// encodings, IN/OUT, HLT restart and exec stop are counted; one that never
// happened counts as a failure.
module tb_simple_b;
  import simple_pkg::*;

  localparam int MEMW = 65536;
  localparam int MAX_CYCLES = 2_000_000;

  logic   clk = 0, reset = 1, exec = 0;
  word_t  in_data = 0;
  word_t  out_data, pc;
  logic   out_valid, running, halted;
  phase_t phase;

  simple_b dut (.clk(clk), .reset(reset), .exec(exec), .in_data(in_data),
                .out_data(out_data), .out_valid(out_valid), .running(running),
                .halted(halted), .pc(pc), .phase(phase));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cycles = 0;

  // ---------------- reference model ----------------
  word_t  m_mem [MEMW];
  word_t  m_r [8];
  word_t  m_pc;
  logic   m_s, m_z, m_c, m_v;
  logic   m_halted;
  word_t  m_out [$];
  int     m_steps;

  // Coverage counters, indexed by a name.
  int cov [string];

  function automatic word_t sx(input logic [7:0] d);
    return word_t'(int'($signed(d)));
  endfunction

  task automatic set_szcv(input word_t r, input logic c, input logic v);
    m_s = r[15]; m_z = (r == 0); m_c = c; m_v = v;
  endtask

  task automatic m_step();
    word_t ir, a, b, r;
    int    sa, sb, full;
    int    dd;
    logic  lost;
    ir = m_mem[m_pc];
    m_pc = m_pc + 1;
    m_halted = 0;
    m_steps++;
    case (ir[15:14])
      2'b00: begin
        m_r[ir[13:11]] = m_mem[m_r[ir[10:8]] + sx(ir[7:0])];
        cov["LD"]++;
      end
      2'b01: begin
        m_mem[m_r[ir[10:8]] + sx(ir[7:0])] = m_r[ir[13:11]];
        cov["ST"]++;
      end
      2'b10: begin
        case (ir[13:11])
          3'b000: begin m_r[ir[10:8]] = sx(ir[7:0]); cov["LI"]++; end
          3'b100: begin m_pc = m_pc + sx(ir[7:0]); cov["B"]++; end
          3'b111: begin
            logic t;
            string nm;
            case (ir[10:8])
              3'd0: begin t = m_z;               nm = "BE";  end
              3'd1: begin t = m_s != m_v;        nm = "BLT"; end
              3'd2: begin t = m_z || (m_s != m_v); nm = "BLE"; end
              3'd3: begin t = !m_z;              nm = "BNE"; end
              default: begin t = 0;              nm = "RSV"; end
            endcase
            if (t) m_pc = m_pc + sx(ir[7:0]);
            cov[{nm, t ? "_taken" : "_not_taken"}]++;
          end
          default: cov["RSV"]++;
        endcase
      end
      default: begin
        a = m_r[ir[10:8]];   // Rd
        b = m_r[ir[13:11]];  // Rs
        sa = $signed(a); sb = $signed(b);
        dd = int'(ir[3:0]);
        case (ir[7:4])
          4'h0: begin r = a + b; full = sa + sb;
                  set_szcv(r, (int'(a) + int'(b)) >= 65536, full > 32767 || full < -32768);
                  m_r[ir[10:8]] = r; cov["ADD"]++; end
          4'h1, 4'h5: begin r = a - b; full = sa - sb;
                  set_szcv(r, a >= b, full > 32767 || full < -32768);
                  if (ir[7:4] == 4'h1) begin m_r[ir[10:8]] = r; cov["SUB"]++; end
                  else cov["CMP"]++; end
          4'h2: begin r = a & b; set_szcv(r, 0, 0); m_r[ir[10:8]] = r; cov["AND"]++; end
          4'h3: begin r = a | b; set_szcv(r, 0, 0); m_r[ir[10:8]] = r; cov["OR"]++; end
          4'h4: begin r = a ^ b; set_szcv(r, 0, 0); m_r[ir[10:8]] = r; cov["XOR"]++; end
          4'h6: begin r = b;     set_szcv(r, 0, 0); m_r[ir[10:8]] = r; cov["MOV"]++; end
          4'h8: begin r = a << dd; lost = (dd == 0) ? 1'b0 : a[16 - dd];
                  set_szcv(r, lost, 0); m_r[ir[10:8]] = r; cov["SLL"]++; end
          4'h9: begin r = (dd == 0) ? a : ((a << dd) | (a >> (16 - dd)));
                  set_szcv(r, 0, 0); m_r[ir[10:8]] = r; cov["SLR"]++; end
          4'ha: begin r = a >> dd; lost = (dd == 0) ? 1'b0 : a[dd - 1];
                  set_szcv(r, lost, 0); m_r[ir[10:8]] = r; cov["SRL"]++; end
          4'hb: begin r = word_t'(sa >>> dd); lost = (dd == 0) ? 1'b0 : a[dd - 1];
                  set_szcv(r, lost, 0); m_r[ir[10:8]] = r; cov["SRA"]++; end
          4'hc: begin m_r[ir[10:8]] = in_data; cov["IN"]++; end
          4'hd: begin m_out.push_back(b); cov["OUT"]++; end
          4'hf: begin m_halted = 1; cov["HLT"]++; end
          default: cov["RSV"]++;
        endcase
      end
    endcase
  endtask

  // ---------------- observation of the processor ----------------
  int    dut_instrs = 0;      // completed instructions (p5 while running)
  int    run_cycles = 0;      // cycles spent running
  word_t dut_out [$];

  always @(posedge clk) begin
    cycles++;
    if (!reset && running) run_cycles++;
    if (!reset && running && phase == PH_P5) dut_instrs++;
    if (!reset && out_valid) dut_out.push_back(out_data);
  end

  initial begin
    forever begin
      @(posedge clk);
      if (cycles > MAX_CYCLES) begin
        $display("watchdog expired");
        failures++;
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    end
  end

  task automatic expect_eq(input int got, input int exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %h expected %h (t=%0t)", what, got, exp, $time);
    end
  endtask

  // ---------------- assembler helpers ----------------
  function automatic word_t calc(input logic [3:0] op3, input int rd, input int rs, input int d = 0);
    return {2'b11, 3'(rs), 3'(rd), op3, 4'(d)};
  endfunction
  function automatic word_t ld(input int ra, input int d, input int rb);
    return {2'b00, 3'(ra), 3'(rb), 8'(d)};
  endfunction
  function automatic word_t st(input int ra, input int d, input int rb);
    return {2'b01, 3'(ra), 3'(rb), 8'(d)};
  endfunction
  function automatic word_t li(input int rb, input int d);
    return {2'b10, 3'b000, 3'(rb), 8'(d)};
  endfunction
  function automatic word_t br(input int d);
    return {2'b10, 3'b100, 3'b000, 8'(d)};
  endfunction
  function automatic word_t bcc(input int cond, input int d);
    return {2'b10, 3'b111, 3'(cond), 8'(d)};
  endfunction
  localparam word_t HLT = 16'hc0f0;

  task automatic put(input int addr, input word_t w);
    m_mem[addr] = w;
    dut.u_mem.mem[addr] = w;
  endtask

  // Press exec for one cycle.
  task automatic press();
    @(negedge clk) exec = 1;
    @(negedge clk) exec = 0;
  endtask

  // Compare architectural state after the processor has stopped.
  task automatic compare_state(input string tag);
    while (m_steps < dut_instrs) m_step();
    expect_eq(m_steps, dut_instrs, {tag, " instruction count"});
    expect_eq(dut.pc, m_pc, {tag, " PC"});
    for (int i = 0; i < 8; i++) expect_eq(dut.u_rf.regs[i], m_r[i], $sformatf("%s r%0d", tag, i));
    expect_eq({dut.szcv.s, dut.szcv.z, dut.szcv.v}, {m_s, m_z, m_v}, {tag, " S Z V"});
    expect_eq(dut.szcv.c, m_c, {tag, " C"});
    expect_eq(halted, m_halted, {tag, " halted"});
  endtask

  // Start the processor, optionally press exec again after stop_after
  // cycles, wait until it stops and check the state and the cycle count.
  task automatic run_segment(input int stop_after, input string tag);
    int instr0, cyc0;
    instr0 = dut_instrs; cyc0 = run_cycles;
    press();
    if (stop_after > 0) begin
      repeat (stop_after) @(negedge clk);
      if (running) begin
        press();
        cov["exec_stop"]++;
      end
    end
    while (running) @(negedge clk);
    @(negedge clk);
    expect_eq(run_cycles - cyc0, 5 * (dut_instrs - instr0), {tag, " five cycles per instruction"});
    compare_state(tag);
  endtask

  task automatic reset_both();
    reset = 1;
    repeat (2) @(negedge clk);
    reset = 0;
    @(negedge clk);
    for (int i = 0; i < 8; i++) m_r[i] = 0;
    m_pc = 0; m_s = 0; m_z = 0; m_c = 0; m_v = 0; m_halted = 0;
    m_steps = 0; dut_instrs = 0;
  endtask

  // Random instruction for the body of a random program. Registers 0..6
  // are free; r7 stays the store base so that stores land in the data area
  // at the top of memory and never overwrite code.
  function automatic word_t rand_instr();
    int k = $urandom_range(0, 99);
    int rd = $urandom_range(0, 6);
    int rs = $urandom_range(0, 7);
    if (k < 35) begin
      logic [3:0] ops [7] = '{4'h0, 4'h1, 4'h2, 4'h3, 4'h4, 4'h5, 4'h6};
      return calc(ops[$urandom_range(0, 6)], rd, rs);
    end
    if (k < 50) return calc(4'(8 + $urandom_range(0, 3)), rd, rs, $urandom_range(0, 15));
    if (k < 56) return ld(rd, $urandom_range(0, 255), $urandom_range(0, 7));
    if (k < 62) return st(rs, $urandom_range(0, 255), 7);
    if (k < 70) return li(rd, $urandom_range(0, 255));
    if (k < 73) return br($urandom_range(0, 3));
    if (k < 88) return bcc($urandom_range(0, 3), $urandom_range(0, 3));
    if (k < 91) return calc(4'hc, rd, rs);
    if (k < 94) return calc(4'hd, rd, rs);
    if (k < 96) return HLT;
    case ($urandom_range(0, 3))
      0: return calc(($urandom_range(0, 1) == 1) ? 4'h7 : 4'he, rd, rs);
      1: return {2'b10, 3'(1 + $urandom_range(0, 2)), 3'(rd), 8'($urandom)};
      2: return {2'b10, 3'b101 + 3'($urandom_range(0, 1)), 3'(rd), 8'($urandom)};
      default: return bcc(4 + $urandom_range(0, 3), $urandom_range(0, 3));
    endcase
  endfunction

  string mechanisms [30] = '{"ADD", "SUB", "AND", "OR", "XOR", "CMP", "MOV", "SLL", "SLR", "SRL",
      "SRA", "IN", "OUT", "HLT", "LD", "ST", "LI", "B",
      "BE_taken", "BE_not_taken", "BLT_taken", "BLT_not_taken",
      "BLE_taken", "BLE_not_taken", "BNE_taken", "BNE_not_taken",
      "RSV_not_taken", "RSV", "exec_stop", "halt_restart"};

  initial begin
    int prog_len;
    string tag;

    // The same random image in both memories.
    for (int i = 0; i < MEMW; i++) put(i, word_t'($urandom));

    // ---- directed program: sum 1..10 through memory ----
    // r1 = 10 (counter), r2 = 0 (sum), r3 = 1, r7 = 0xFF80 (data base)
    // loop: ADD r2,r1 ; SUB r1,r3 ; BNE loop ; ST r2,5(r7) ; LD r4,5(r7)
    //       OUT r4 ; IN r5 ; SLL r4,2 ; CMP r4,r5 ; BLT +1 ; LI r6,1 ; HLT
    reset_both();
    in_data = 16'h0100;
    put(0, li(1, 10));
    put(1, li(2, 0));
    put(2, li(3, 1));
    put(3, li(7, 8'h80));
    put(4, calc(4'h0, 2, 1));
    put(5, calc(4'h1, 1, 3));
    put(6, bcc(3, -3));
    put(7, st(2, 5, 7));
    put(8, ld(4, 5, 7));
    put(9, calc(4'hd, 0, 4));
    put(10, calc(4'hc, 5, 0));
    put(11, calc(4'h8, 4, 0, 2));
    put(12, calc(4'h5, 4, 5));
    put(13, bcc(1, 1));
    put(14, li(6, 1));
    put(15, HLT);
    run_segment(0, "directed");
    expect_eq(dut.u_rf.regs[2], 55, "directed sum");
    expect_eq(dut.u_mem.mem[16'hff85], 55, "directed stored sum");
    expect_eq(dut.u_rf.regs[4], 220, "directed shifted sum");
    expect_eq(dut.u_rf.regs[6], 0, "directed BLT taken");
    expect_eq(dut.pc, 16, "directed final PC");
    expect_eq(dut_instrs, 4 + 3 * 10 + 8, "directed instruction count");

    // ---- random programs ----
    for (int p = 0; p < 600; p++) begin
      tag = $sformatf("prog%0d", p);
      prog_len = $urandom_range(20, 80);
      reset_both();
      in_data = word_t'($urandom);
      for (int i = 0; i < 7; i++) put(i, li(i, $urandom_range(0, 255)));
      put(7, li(7, 8'h80));
      for (int i = 8; i < 8 + prog_len; i++) put(i, rand_instr());
      for (int i = 8 + prog_len; i < 8 + prog_len + 5; i++) put(i, HLT);
      // Run until the model has passed the end of the program.
      while (m_pc < word_t'(8 + prog_len)) begin
        run_segment(($urandom_range(0, 2) == 0) ? $urandom_range(1, 200) : 0, tag);
        if (m_halted && m_pc < word_t'(8 + prog_len)) cov["halt_restart"]++;
      end
      if (failures > 20) break;
    end

    // ---- outputs and memory ----
    expect_eq(dut_out.size(), m_out.size(), "number of OUT values");
    for (int i = 0; i < m_out.size() && i < dut_out.size(); i++)
      expect_eq(dut_out[i], m_out[i], $sformatf("OUT value %0d", i));
    begin
      int bad = 0;
      for (int i = 0; i < MEMW; i++) if (dut.u_mem.mem[i] !== m_mem[i]) bad++;
      expect_eq(bad, 0, "memory words differing from the model");
    end

    // ---- coverage ----
    foreach (mechanisms[i]) begin
      checks++;
      if (!cov.exists(mechanisms[i]) || cov[mechanisms[i]] == 0) begin
        failures++;
        $display("FAIL mechanism %s never happened", mechanisms[i]);
      end else begin
        $display("  %-14s %0d", mechanisms[i], cov[mechanisms[i]]);
      end
    end
    $display("cycles=%0d instructions in last program=%0d", cycles, dut_instrs);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
