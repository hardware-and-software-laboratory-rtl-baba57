// tb_phase_counter: self-checking test of the phase sequencer.
// Scenarios with hand-derived expectations: stopped after reset; exec press
// starts at p1 and phases then repeat p1..p5 (five cycles per instruction);
// a held exec does not retrigger; an exec press mid-instruction stops only
// after p5; HLT (halt in p5) stops; a press while stopped restarts; reset
// while running stops.
module tb_phase_counter;
  import simple_pkg::*;

  logic   clk = 0, reset = 1, exec = 0, halt = 0;
  phase_t phase;
  logic   running;
  int     checks = 0, failures = 0;

  phase_counter dut (.clk(clk), .reset(reset), .exec(exec), .halt(halt),
                     .phase(phase), .running(running));

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Apply inputs, take one clock edge, compare the new state.
  task automatic tick(input logic e, input logic h, input logic exp_run, input phase_t exp_ph);
    exec = e; halt = h;
    @(posedge clk); #1;
    checks++;
    if (running !== exp_run || phase !== exp_ph) begin
      failures++;
      $display("FAIL t=%0t running=%b/%b phase=%s/%s", $time, running, exp_run, phase.name(), exp_ph.name());
    end
  endtask

  initial begin
    phase_t seq [5] = '{PH_P1, PH_P2, PH_P3, PH_P4, PH_P5};
    repeat (2) @(posedge clk);
    #1 reset = 0;
    // Stopped after reset.
    repeat (4) tick(0, 0, 0, PH_P1);
    // Start: exec rises and is held; it must not stop the machine again.
    tick(1, 0, 1, PH_P1);
    for (int n = 1; n <= 12; n++) tick(1, 0, 1, seq[n % 5]);   // now at p3
    // Release, then press during p3: finish p4, p5 and stop.
    tick(0, 0, 1, PH_P4);
    tick(1, 0, 1, PH_P5);   // press sampled in p4
    tick(0, 0, 0, PH_P1);   // end of p5: stopped
    repeat (3) tick(0, 0, 0, PH_P1);
    // Restart with a one-cycle press, run one instruction, halt in p5.
    tick(1, 0, 1, PH_P1);
    tick(0, 0, 1, PH_P2);
    tick(0, 0, 1, PH_P3);
    tick(0, 0, 1, PH_P4);
    tick(0, 0, 1, PH_P5);
    tick(0, 1, 0, PH_P1);   // halt during p5
    tick(0, 0, 0, PH_P1);
    // Press exactly during p5 also stops at the end of that p5.
    tick(1, 0, 1, PH_P1);
    tick(0, 0, 1, PH_P2);
    tick(0, 0, 1, PH_P3);
    tick(0, 0, 1, PH_P4);
    tick(0, 0, 1, PH_P5);
    tick(1, 0, 0, PH_P1);
    // Restart and reset in the middle.
    tick(0, 0, 0, PH_P1);
    tick(1, 0, 1, PH_P1);
    tick(0, 0, 1, PH_P2);
    reset = 1;
    tick(0, 0, 0, PH_P1);
    reset = 0;
    tick(0, 0, 0, PH_P1);
    // Long run: five-cycle instruction period.
    tick(1, 0, 1, PH_P1);
    for (int n = 1; n <= 50; n++) tick(0, 0, 1, seq[n % 5]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
