// phase_counter: sequences the five phases of SIMPLE/B and handles
// start/stop.
//
// While running, each rising clock edge moves the one-hot phase on:
// p1 -> p2 -> p3 -> p4 -> p5 -> p1, so one instruction takes five cycles.
// Start/stop follows the exec push switch: a 0->1 change of exec while
// stopped starts execution at p1 of the instruction at the PC; a 0->1
// change while running lets the current instruction finish (through p5)
// and then stops. halt (HLT in its p5) also stops at the end of p5. While
// stopped the phase rests at p1 and `running` is 0, which keeps every
// register enable low. Reset stops the machine with the phase at p1.
//
// exec is taken to be synchronous to clk and already debounced; the
// architecture does not describe conditioning of the switch. The one-cycle
// edge detector and the stop-request flag are this design's choices.
module phase_counter
  import simple_pkg::*;
(
  input  logic   clk,
  input  logic   reset,
  input  logic   exec,
  input  logic   halt,
  output phase_t phase,
  output logic   running
);

  logic exec_q;
  logic stop_pending;
  logic exec_rise;

  assign exec_rise = exec & ~exec_q;

  always_ff @(posedge clk) begin
    if (reset) begin
      exec_q       <= exec;
      phase        <= PH_P1;
      running      <= 1'b0;
      stop_pending <= 1'b0;
    end else begin
      exec_q <= exec;
      if (!running) begin
        phase <= PH_P1;
        if (exec_rise) running <= 1'b1;
      end else begin
        unique case (phase)
          PH_P1:   phase <= PH_P2;
          PH_P2:   phase <= PH_P3;
          PH_P3:   phase <= PH_P4;
          PH_P4:   phase <= PH_P5;
          default: phase <= PH_P1;
        endcase
        if (phase == PH_P5) begin
          stop_pending <= 1'b0;
          if (halt || stop_pending || exec_rise) running <= 1'b0;
        end else if (exec_rise) begin
          stop_pending <= 1'b1;
        end
      end
    end
  end

  // The phase register is always exactly one-hot.
  a_onehot: assert property (@(posedge clk) disable iff (reset) $onehot(phase));

endmodule
