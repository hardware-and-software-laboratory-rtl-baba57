// tb_simple_b_init: runs a program loaded through the INIT_FILE parameter
// on a processor built with a 33 KW main memory (MEM_WORDS = 33792, the size
// that fits a small FPGA).
//
// tb/fib_program.hex holds SIMPLE machine code that writes the first ten
// Fibonacci numbers with OUT and stores them at addresses 64..73, then
// stores to and loads from 0xF900, which lies beyond the 33 KW memory: the
// store must be ignored and the load must return 0. The expected numbers
// are generated here by the recurrence F(n+2) = F(n+1) + F(n). The run must
// take 5 cycles for each of its 5 + 9*10 + 5 instructions.
module tb_simple_b_init;
  import simple_pkg::*;

  logic   clk = 0, reset = 1, exec = 0;
  word_t  out_data, pc;
  logic   out_valid, running, halted;
  phase_t phase;
  word_t  outs [$];
  int     checks = 0, failures = 0, run_cycles = 0;

  simple_b #(.MEM_WORDS(33792), .INIT_FILE("tb/fib_program.hex")) dut (
    .clk(clk), .reset(reset), .exec(exec), .in_data(16'h0000),
    .out_data(out_data), .out_valid(out_valid), .running(running),
    .halted(halted), .pc(pc), .phase(phase));

  always #5 clk = ~clk;

  always @(posedge clk) begin
    if (!reset && out_valid) outs.push_back(out_data);
    if (!reset && running) run_cycles++;
  end

  task automatic expect_eq(input int got, input int exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int a, b, t;
    repeat (2) @(negedge clk);
    reset = 0;
    @(negedge clk) exec = 1;
    @(negedge clk) exec = 0;
    while (running) @(negedge clk);
    @(negedge clk);
    expect_eq(int'(halted), 1, "halted by HLT");
    expect_eq(pc, 19, "final PC");
    expect_eq(run_cycles, 5 * (5 + 9 * 10 + 5), "cycles");
    expect_eq(outs.size(), 10, "number of OUT values");
    a = 0; b = 1;
    for (int i = 0; i < 10; i++) begin
      if (i < outs.size()) expect_eq(outs[i], a, $sformatf("OUT %0d", i));
      expect_eq(dut.u_mem.mem[64 + i], a, $sformatf("stored F(%0d)", i));
      t = a + b; a = b; b = t;
    end
    expect_eq(dut.u_rf.regs[1], a, "r1 = F(10)");
    expect_eq(dut.u_rf.regs[7], 0, "load beyond memory reads 0");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
